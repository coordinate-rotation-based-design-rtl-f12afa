// tb_sqdiv_input_scaling: checks the shift-based range reduction against a
// real-valued reference. For square roots: k is even with
// 2**(k-2) < X <= 2**k, and tgt_sqrt = |2*X/2**k - 1| with fold = (X/2**k < 1/2).
// For divisions: k is the smallest with 2**(k-1) <= |X|-|Z| <= 2**k, raised
// by one if |X|/2**k still exceeds |Z|; z_div lies in [1/2, 1), x_div <= z_div
// and x_div/z_div = |X| / (|Z| * 2**k); plus sign and invalid flags.
module tb_sqdiv_input_scaling;
  import sqdiv_pkg::*;

  localparam int B = 16;
  localparam int F = B - 2;

  op_e                 op;
  logic signed [B-1:0] x_in, z_in, tgt_sqrt, x_div, z_div;
  logic [4:0]          k;
  logic                fold, neg, invalid;

  sqdiv_input_scaling #(.B(B)) dut (.*);

  int checks = 0, failures = 0;

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (op=%s x=%0d z=%0d k=%0d tgt=%0d xd=%0d zd=%0d)",
               what, op.name(), x_in, z_in, k, tgt_sqrt, x_div, z_div);
    end
  endtask

  task automatic run(op_e o, int x, int z);
    int  ax, az, rk;
    real xs, t, ratio, want;
    op = o; x_in = B'(x); z_in = B'(z);
    #1;
    ax = (x < 0) ? -x : x;
    az = (z < 0) ? -z : z;
    if (o == OP_SQRT) begin
      rk = 0;
      while ((longint'(1) << rk) < longint'(ax)) rk += 2;
      expect_true(k == 5'(rk), "sqrt shift k");
      expect_true(invalid == (x < 0), "sqrt invalid flag");
      if (x >= 0) begin
        xs = real'(ax) / real'(longint'(1) << rk);
        t  = 2.0 * xs - 1.0;
        expect_true(fold == (t < 0.0 || ax == 0), "sqrt fold flag");
        if (t < 0.0) t = -t;
        expect_true(real'(tgt_sqrt) / real'(1 << F) - t < 5.0e-4 &&
                    t - real'(tgt_sqrt) / real'(1 << F) < 5.0e-4, "sqrt target 2X-1");
      end
    end else begin
      rk = 0;
      if (ax > az) begin
        while ((longint'(1) << rk) < longint'(ax) - longint'(az)) rk++;
        if (rk == 0) rk = 1;
        if (longint'(ax) > (longint'(az) << rk)) rk++;
      end
      expect_true(k == 5'(rk), "div shift k");
      expect_true(invalid == (z == 0), "div invalid flag");
      expect_true(neg == (((x < 0) != (z < 0)) && x != 0), "div sign");
      if (z != 0) begin
        expect_true(z_div >= (1 <<< (F - 1)) && z_div < (1 <<< F), "div |Z| normalised to [1/2,1)");
        expect_true(x_div <= z_div, "div |X| <= |Z| after scaling");
        ratio = real'(x_div) / real'(z_div);
        want  = real'(ax) / (real'(az) * real'(longint'(1) << rk));
        expect_true(ratio - want < 5.0e-4 && want - ratio < 5.0e-4, "div scaled ratio");
      end
    end
  endtask

  initial begin
    run(OP_SQRT, 49, 0);
    expect_true(k == 5'd6, "X=49 gives k=6");
    run(OP_DIV, 55, 30);
    expect_true(k == 5'd5, "X=55,Z=30 gives k=5");
    run(OP_SQRT, 0, 0);
    run(OP_SQRT, 1, 0);
    run(OP_SQRT, 2, 0);
    run(OP_SQRT, 32767, 0);
    run(OP_SQRT, -1, 0);
    run(OP_DIV, 2, 1);
    run(OP_DIV, 3, 1);
    run(OP_DIV, -32768, 1);
    run(OP_DIV, 32767, -32768);
    run(OP_DIV, 4, 0);
    for (int i = 0; i < 3000; i++) begin
      run(OP_SQRT, int'($urandom_range(32767)) >> $urandom_range(14), 0);
      run(OP_DIV, int'($signed(B'($urandom))) >>> $urandom_range(15),
                  int'($signed(B'($urandom))) >>> $urandom_range(15));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
