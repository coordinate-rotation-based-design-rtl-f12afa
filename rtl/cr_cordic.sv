// cr_cordic: pipelined circular rotation-mode CORDIC (CRCORDIC) driven
// directly by micro-rotation codes instead of an angle. It rotates the vector
// [1, 0] and delivers x_n = cos(theta), y_n = sin(theta), where theta is the
// sum of the rotations its codes select.
//
// Stage i receives a two-bit code {A_mu, B_mu}: 11 turns counter-clockwise by
// atan(2**-i), 00 clockwise, and 01 or 10 leave the angle unchanged. A stage
// that does not rotate still multiplies the vector by sqrt(1+2**-2i) (a
// constant multiply), so that every operation sees the same total length
// growth; the start vector is [1/K, 0], K = prod_{i<N} sqrt(1+2**-2i), and
// the result comes out with unit length. (Passing the vector through a
// non-rotating stage unchanged, as the bare half-angle scheme does, would
// make the length growth depend on the data.)
//
// Interface: code[i] is the code for the operation currently in stage i,
// which is the operation that entered stage 0 i cycles ago. Stage 0 is
// combinational from code[0]; x_n/y_n are registered after the last stage,
// N cycles after the operation entered stage 0. No stall, one operation per
// clock. Words are W-bit two's complement with F = W-2 fraction bits.
module cr_cordic
  import sqdiv_pkg::*;
#(
  parameter int W = 16,
  parameter int N = 16
) (
  input  logic                clk,
  input  ab_code_e            code [N],
  output logic signed [W-1:0] x_n,
  output logic signed [W-1:0] y_n
);
  localparam int F = W - 2;
  localparam logic signed [W-1:0] X_START = W'(inv_gain(N, F));

  logic signed [W-1:0] xs [N+1];
  logic signed [W-1:0] ys [N+1];

  assign xs[0] = X_START;
  assign ys[0] = '0;

  for (genvar i = 0; i < N; i++) begin : g_stage
    localparam logic signed [F+2:0] KI = (F+3)'(stage_gain(i, F));
    localparam logic signed [W+F+2:0] RND = (W+F+3)'(1) <<< (F - 1);
    logic signed [W-1:0]   x_nx, y_nx;
    logic signed [W+F+2:0] x_prod, y_prod;

    always_comb begin
      x_prod = xs[i] * KI + RND;
      y_prod = ys[i] * KI + RND;
      unique case (code[i])
        AB_CCW: begin
          x_nx = xs[i] - (ys[i] >>> i);
          y_nx = ys[i] + (xs[i] >>> i);
        end
        AB_CW: begin
          x_nx = xs[i] + (ys[i] >>> i);
          y_nx = ys[i] - (xs[i] >>> i);
        end
        default: begin
          x_nx = W'(x_prod >>> F);
          y_nx = W'(y_prod >>> F);
        end
      endcase
    end

    always_ff @(posedge clk) begin
      xs[i+1] <= x_nx;
      ys[i+1] <= y_nx;
    end
  end

  assign x_n = xs[N];
  assign y_n = ys[N];

endmodule
