// tb_cr_cordic: feeds the rotation CORDIC one operation per clock, each with
// a random code per stage (11 = counter-clockwise, 00 = clockwise, 01/10 =
// no rotation), presenting stage i's code i cycles after issue. Each result
// must appear N cycles after issue with x = cos(angle) and y = sin(angle) of
// the angle the codes describe, i.e. unit length whatever the number of
// non-rotating stages.
module tb_cr_cordic;
  import sqdiv_pkg::*;

  localparam int  W    = 16;
  localparam int  N    = 16;
  localparam int  F    = W - 2;
  localparam int  NOPS = 3000;
  localparam real TOL  = 1.5e-3;

  logic                clk = 1'b0;
  ab_code_e            code [N];
  logic signed [W-1:0] x_n, y_n;

  cr_cordic #(.W(W), .N(N)) dut (.*);

  always #5 clk = ~clk;

  ab_code_e ops [NOPS][N];
  int       checks = 0, failures = 0;
  real      maxerr = 0.0;

  function automatic real angle_of(int c);
    real s;
    s = 0.0;
    for (int i = 0; i < N; i++)
      if (ops[c][i] == AB_CCW)     s += $atan(1.0 / real'(1 << i));
      else if (ops[c][i] == AB_CW) s -= $atan(1.0 / real'(1 << i));
    return s;
  endfunction

  initial begin
    for (int c = 0; c < NOPS; c++)
      for (int i = 0; i < N; i++) begin
        ops[c][i] = ab_code_e'($urandom_range(3));
        if (c % 3 == 0 && i < 4) ops[c][i] = AB_NONE0;   // many non-rotating early stages
        if (c == 1) ops[c][i] = AB_NONE1;                 // no rotation at all
      end
    for (int c = 0; c < NOPS + N; c++) begin
      @(negedge clk);
      // Check the result of the operation issued N cycles ago.
      if (c >= N) begin
        real ang, ex, ey;
        ang = angle_of(c - N);
        ex = real'(x_n) / real'(1 << F) - $cos(ang);
        ey = real'(y_n) / real'(1 << F) - $sin(ang);
        if (ex < 0.0) ex = -ex;
        if (ey < 0.0) ey = -ey;
        if (ex > maxerr) maxerr = ex;
        if (ey > maxerr) maxerr = ey;
        checks++;
        if (ex > TOL || ey > TOL) begin
          failures++;
          $display("FAIL: op %0d got (%f,%f) expected (%f,%f)", c - N,
                   real'(x_n) / real'(1 << F), real'(y_n) / real'(1 << F), $cos(ang), $sin(ang));
        end
      end
      for (int i = 0; i < N; i++)
        code[i] = (c - i >= 0 && c - i < NOPS) ? ops[c - i][i] : AB_NONE0;
    end
    $display("largest error = %f", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NOPS + N + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
