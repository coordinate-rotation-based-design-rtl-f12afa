// tb_sqdiv_cordic: end-to-end test of the square-root / division unit at its
// default size (B = 16-bit operands, N = 16 stages).
//
// Operations are issued back to back, one per clock, mixing square roots and
// divisions at random, plus directed cases (sqrt(49) = 7, 55/30 = 1.833, edge
// values). Each result is compared with the real-valued reference ($sqrt or
// X/Z), with a tolerance of TOL_LSB units of the result's last CORDIC bit
// scaled by the output shift. The latency of every result is checked to be
// exactly N cycles. The test also counts how often each mechanism occurred
// (fold, input down-scaling, negative quotient, invalid operands, mode change
// between consecutive operations, "no rotation" stages, back-to-back issue)
// and fails a mechanism that never occurred.
module tb_sqdiv_cordic;
  import sqdiv_pkg::*;

  localparam int B       = 16;
  localparam int N       = 16;
  localparam int F       = B - 2;
  localparam int OW      = 2 * B + 1;
  localparam int NRAND   = 4000;
  localparam int LAT     = N;      // doubly pipelined: N cycles
  localparam real TOL_LSB = 16.0;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 in_valid = 1'b0;
  op_e                  op = OP_SQRT;
  logic signed [B-1:0]  x_in = '0, z_in = '0;
  logic                 out_valid, out_invalid;
  logic signed [OW-1:0] result;

  sqdiv_cordic dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    op_e        op;
    int         x, z;
    longint     cycle;
  } req_t;

  req_t   q[$];
  longint cyc = 0;
  int     checks = 0, failures = 0;
  int     n_sqrt = 0, n_div = 0, n_fold = 0, n_sq_scaled = 0, n_dv_scaled = 0;
  int     n_neg = 0, n_invalid = 0, n_switch = 0, n_norot = 0, n_b2b = 0;
  real    max_err_lsb = 0.0;
  op_e    last_op = OP_SQRT;
  longint last_issue = -10;

  always @(posedge clk) cyc <= cyc + 1;

  // Count "no rotation" codes seen by the rotation CORDIC.
  always @(posedge clk) if (rst_n)
    for (int i = 0; i < N; i++)
      if (dut.meta[LAT - N + i].valid && (dut.code[i] == AB_NONE0 || dut.code[i] == AB_NONE1)) n_norot++;

  // Reference model: even k with 2**(k-2) < X <= 2**k, or the division rule.
  function automatic int ref_shift(op_e o, int x, int z);
    int ax, az, k;
    ax = (x < 0) ? -x : x;
    az = (z < 0) ? -z : z;
    k  = 0;
    if (o == OP_SQRT) begin
      while ((longint'(1) << k) < longint'(ax)) k += 2;
    end else if (ax > az) begin
      while ((longint'(1) << k) < longint'(ax) - longint'(az)) k++;
      if (k == 0) k = 1;
      if (longint'(ax) > (longint'(az) << k)) k++;
    end
    return k;
  endfunction

  task automatic issue(op_e o, int x, int z);
    int ax, az;
    ax = (x < 0) ? -x : x;
    az = (z < 0) ? -z : z;
    @(negedge clk);
    in_valid = 1'b1;
    op       = o;
    x_in     = B'(x);
    z_in     = B'(z);
    q.push_back('{o, x, z, cyc});
    if (last_issue == cyc - 1) begin
      n_b2b++;
      if (o != last_op) n_switch++;
    end
    last_issue = cyc;
    last_op    = o;
    if (o == OP_SQRT) begin
      n_sqrt++;
      if (x < 0) n_invalid++;
      else if (real'(x) / real'(longint'(1) << ref_shift(o, x, z)) < 0.5) n_fold++;
      if (ref_shift(o, x, z) > 0) n_sq_scaled++;
    end else begin
      n_div++;
      if (z == 0) n_invalid++;
      else begin
        if (ax > az) n_dv_scaled++;
        if ((x < 0) != (z < 0) && x != 0) n_neg++;
      end
    end
  endtask

  // Result checker.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      req_t r;
      real  got, exp, tol;
      int   k, sh;
      bit   inv;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: result with no operation outstanding");
      end else begin
        r   = q.pop_front();
        k   = ref_shift(r.op, r.x, r.z);
        sh  = (r.op == OP_SQRT) ? k / 2 : k;
        inv = (r.op == OP_SQRT) ? (r.x < 0) : (r.z == 0);
        got = real'(result) / real'(1 << F);
        if (inv)                 exp = 0.0;
        else if (r.op == OP_SQRT) exp = $sqrt(real'(r.x));
        else                      exp = real'(r.x) / real'(r.z);
        tol = TOL_LSB * real'(longint'(1) << sh) / real'(1 << F);
        checks++;
        if (cyc - r.cycle != longint'(LAT)) begin
          failures++;
          $display("FAIL: latency %0d, expected %0d", cyc - r.cycle, LAT);
        end
        checks++;
        if (out_invalid != inv) begin
          failures++;
          $display("FAIL: invalid flag %0b for op=%s x=%0d z=%0d", out_invalid, r.op.name(), r.x, r.z);
        end
        checks++;
        if ((got - exp > tol) || (exp - got > tol)) begin
          failures++;
          $display("FAIL: %s x=%0d z=%0d got %f expected %f (tol %f)",
                   r.op.name(), r.x, r.z, got, exp, tol);
        end
        if (!inv) begin
          real e;
          e = (got > exp ? got - exp : exp - got) / (real'(longint'(1) << sh) / real'(1 << F));
          if (e > max_err_lsb) max_err_lsb = e;
        end
      end
    end
  end

  task automatic need(string name, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL: mechanism '%s' never occurred", name);
    end else $display("mechanism %-22s : %0d", name, count);
  endtask

  initial begin
    int x, z;
    repeat (3) @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL: out_valid during reset"); end
    rst_n = 1'b1;

    // Directed operations (examples of the method and edge values).
    issue(OP_SQRT, 49, 0);
    issue(OP_DIV, 55, 30);
    issue(OP_SQRT, 0, 0);
    issue(OP_SQRT, 1, 0);
    issue(OP_SQRT, 2, 0);
    issue(OP_SQRT, 32767, 0);
    issue(OP_SQRT, -5, 0);
    issue(OP_DIV, 1, 1);
    issue(OP_DIV, 3, 1);
    issue(OP_DIV, -7, 3);
    issue(OP_DIV, 0, 9);
    issue(OP_DIV, 5, 0);
    issue(OP_DIV, -32768, 1);
    issue(OP_DIV, 32767, -32768);
    issue(OP_DIV, 100, 200);

    // Random back-to-back traffic, with occasional idle cycles.
    for (int i = 0; i < NRAND; i++) begin
      if ($urandom_range(9) == 0) begin
        @(negedge clk);
        in_valid = 1'b0;
      end
      if ($urandom_range(1) == 0) begin
        case ($urandom_range(2))
          0: x = $urandom_range(32767);
          1: x = $urandom_range(255);
          default: x = $urandom_range(32767) >> $urandom_range(14);
        endcase
        issue(OP_SQRT, x, 0);
      end else begin
        x = int'($signed(B'($urandom))) >>> $urandom_range(15);
        z = int'($signed(B'($urandom))) >>> $urandom_range(15);
        if (z == 0) z = 1;
        issue(OP_DIV, x, z);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 4) @(posedge clk);

    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d results missing", q.size()); end
    need("square root", n_sqrt);
    need("division", n_div);
    need("sqrt fold (Xs < 1/2)", n_fold);
    need("sqrt input scaling", n_sq_scaled);
    need("div input scaling", n_dv_scaled);
    need("negative quotient", n_neg);
    need("invalid operand", n_invalid);
    need("mode switch", n_switch);
    need("back-to-back issue", n_b2b);
    need("no-rotation stage", n_norot);
    $display("largest error: %f result LSBs", max_err_lsb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * NRAND + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
