// tb_mae_sweep: accuracy sweep over word length b and stage count n.
//
// For every combination of b in {4, 8, 16} and n in {4, 8, 16}, a unit
// sqdiv_cordic #(.B(b), .N(n)) computes 2048 square roots of random X and
// 2048 quotients X/Z of random positive X, Z (b-bit). The mean absolute error
// is taken on the normalised result, i.e. the error divided by the output
// shift 2**(k/2) or 2**k, so that it is the error of the CORDIC's cos value
// in [0, 1]. The table is printed. Checks: every result arrives n cycles
// after issue, the error falls as n grows from 4 to 16 at b = 8 and 16, and at
// b = n = 16 the MAE stays below 0.002 for both functions.
module tb_mae_sweep;
  import sqdiv_pkg::*;

  localparam int NS    = 2048;
  localparam int BS[3] = '{4, 8, 16};
  localparam int NN[3] = '{4, 8, 16};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  real mae_sqrt [3][3];
  real mae_div  [3][3];
  bit  done     [3][3];
  int  checks = 0, failures = 0;

  for (genvar bi = 0; bi < 3; bi++) begin : g_b
    for (genvar ni = 0; ni < 3; ni++) begin : g_n
      localparam int B  = BS[bi];
      localparam int N  = NN[ni];
      localparam int F  = B - 2;
      localparam int OW = 2 * B + 1;

      logic                 in_valid = 1'b0;
      op_e                  op = OP_SQRT;
      logic signed [B-1:0]  x_in = '0, z_in = '0;
      logic                 out_valid, out_invalid;
      logic signed [OW-1:0] result;

      sqdiv_cordic #(.B(B), .N(N)) dut (.*);

      int  xs [2 * NS], zs [2 * NS];
      real sum_sq = 0.0, sum_dv = 0.0;
      int  n_out = 0, lat_bad = 0;
      longint issue_cyc [2 * NS];
      longint cyc = 0;

      always @(posedge clk) cyc <= cyc + 1;

      function automatic int shift_of(bit is_div, int x, int z);
        int k;
        k = 0;
        if (!is_div) begin
          while ((longint'(1) << k) < longint'(x)) k += 2;
          return k / 2;
        end
        if (x > z) begin
          while ((longint'(1) << k) < longint'(x) - longint'(z)) k++;
          if (k == 0) k = 1;
          if (longint'(x) > (longint'(z) << k)) k++;
        end
        return k;
      endfunction

      // Results come back in issue order.
      always @(posedge clk) if (rst_n && out_valid) begin
        real got, exp, sc;
        bit  is_div;
        is_div = (n_out >= NS);
        sc     = real'(longint'(1) << shift_of(is_div, xs[n_out], zs[n_out]));
        got    = real'(result) / real'(1 << F) / sc;
        exp    = is_div ? real'(xs[n_out]) / real'(zs[n_out]) / sc : $sqrt(real'(xs[n_out])) / sc;
        if (is_div) sum_dv += (got > exp) ? got - exp : exp - got;
        else        sum_sq += (got > exp) ? got - exp : exp - got;
        if (cyc - issue_cyc[n_out] != longint'(N)) lat_bad++;
        n_out++;
        if (n_out == 2 * NS) begin
          mae_sqrt[bi][ni] = sum_sq / NS;
          mae_div[bi][ni]  = sum_dv / NS;
          done[bi][ni]     = 1'b1;
          if (lat_bad != 0) begin
            failures++;
            $display("FAIL: b=%0d n=%0d: %0d results with latency other than n", B, N, lat_bad);
          end
          checks++;
        end
      end

      initial begin
        for (int i = 0; i < 2 * NS; i++) begin
          xs[i] = $urandom_range((1 << (B - 1)) - 1, (i < NS) ? 0 : 1);
          zs[i] = $urandom_range((1 << (B - 1)) - 1, 1);
        end
        @(posedge rst_n);
        for (int i = 0; i < 2 * NS; i++) begin
          @(negedge clk);
          in_valid     = 1'b1;
          op           = (i < NS) ? OP_SQRT : OP_DIV;
          x_in         = B'(xs[i]);
          z_in         = B'(zs[i]);
          issue_cyc[i] = cyc;
        end
        @(negedge clk);
        in_valid = 1'b0;
      end
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bit all;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    do begin
      @(posedge clk);
      all = 1'b1;
      foreach (done[i, j]) all &= done[i][j];
    end while (!all);
    $display("MAE of the normalised result (2048 samples each)");
    $display("   b    n      sqrt       div");
    foreach (mae_sqrt[i, j])
      $display("%4d %4d  %8.5f  %8.5f", BS[i], NN[j], mae_sqrt[i][j], mae_div[i][j]);
    // At b = 4 the CORDIC words have two fraction bits, which swamps the
    // effect of the stage count; the trend is checked at b = 8 and 16.
    for (int i = 1; i < 3; i++) begin
      check(mae_sqrt[i][0] > mae_sqrt[i][2], $sformatf("sqrt MAE falls from n=4 to n=16 at b=%0d", BS[i]));
      check(mae_div[i][0] > mae_div[i][2], $sformatf("div MAE falls from n=4 to n=16 at b=%0d", BS[i]));
    end
    check(mae_sqrt[2][2] < 0.002, "sqrt MAE at b=n=16 below 0.002");
    check(mae_div[2][2] < 0.002, "div MAE at b=n=16 below 0.002");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * NS + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
