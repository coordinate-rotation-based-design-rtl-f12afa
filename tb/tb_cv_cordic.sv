// tb_cv_cordic: drives the vectoring CORDIC with one operation per clock
// (x0 in [1/2, 1], target xc in [0, x0]) and gathers each operation's
// micro-rotation bits as they appear, stage i in the i-th cycle after issue.
// The angle they describe, sum of +-atan(2**-i), must satisfy
// cos(angle) = xc / x0 within TOL.
module tb_cv_cordic;
  import sqdiv_pkg::*;

  localparam int  W    = 16;
  localparam int  N    = 16;
  localparam int  F    = W - 2;
  localparam int  NOPS = 3000;
  localparam real TOL  = 1.5e-3;

  logic                clk = 1'b0;
  logic signed [W-1:0] x0 = '0, xc = '0;
  logic        [N-1:0] mu;

  cv_cordic #(.W(W), .N(N)) dut (.*);

  always #5 clk = ~clk;

  logic [N-1:0] hist [NOPS + N];
  real          ratio [NOPS];
  int           checks = 0, failures = 0;
  real          maxerr = 0.0;

  initial begin
    for (int c = 0; c < NOPS + N; c++) begin
      @(negedge clk);
      if (c < NOPS) begin
        int a, b;
        case (c % 4)
          0: begin a = 1 << F; b = $urandom_range(1 << F); end
          1: begin a = $urandom_range(1 << F, 1 << (F - 1)); b = a; end
          default: begin a = $urandom_range(1 << F, 1 << (F - 1)); b = $urandom_range(a); end
        endcase
        if (c == 5) b = 0;
        x0 = W'(a);
        xc = W'(b);
        ratio[c] = real'(b) / real'(a);
      end
      #1;
      hist[c] = mu;
    end
    for (int c = 0; c < NOPS; c++) begin
      real ang, err;
      ang = 0.0;
      for (int i = 0; i < N; i++)
        ang += (hist[c + i][i] ? 1.0 : -1.0) * $atan(1.0 / real'(1 << i));
      err = $cos(ang) - ratio[c];
      if (err < 0.0) err = -err;
      if (err > maxerr) maxerr = err;
      checks++;
      if (err > TOL) begin
        failures++;
        $display("FAIL: op %0d cos(angle)=%f expected %f", c, $cos(ang), ratio[c]);
      end
      checks++;
      if (ang < -0.01 || ang > 1.5808) begin
        failures++;
        $display("FAIL: op %0d angle %f outside [0, pi/2]", c, ang);
      end
    end
    $display("largest |cos(angle) - xc/x0| = %f", maxerr);
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
