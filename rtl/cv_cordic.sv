// cv_cordic: pipelined circular vectoring-mode CORDIC (CVCORDIC) that turns
// the vector [x0, 0] until its x coordinate equals a target xc, i.e. it finds
// the angle theta with cos(theta) = xc / x0 for 0 <= xc <= x0. The angle is
// never formed as a number: each stage emits its micro-rotation bit mu_i
// (1 = counter-clockwise by atan(2**-i), 0 = clockwise) and these bits are
// handed stage by stage to the rotation CORDIC (double pipelining).
//
// Stage i decides by comparing x_i with t_i = xc * prod_{j<i} sqrt(1+2**-2j):
// every micro-rotation lengthens the vector by sqrt(1+2**-2i), so the target
// is lengthened alike instead of correcting the vector. The vector turns
// counter-clockwise while it is below the x axis or while x_i > t_i (angle
// still too small), and clockwise otherwise. The target update is a multiply
// by a per-stage constant (a fixed shift-and-add network).
// The angle range reachable is the micro-rotation sum, about 99.9 degrees,
// which covers the 0..90 degree range the scaling stage delivers.
//
// Interface: x0 and xc are sampled combinationally by stage 0 in the cycle
// they are presented. mu[i] is the decision of the operation that is in
// stage i during the current cycle, i.e. of the operation presented i cycles
// earlier. The pipeline has no stall: one operation per clock.
// Words are W-bit two's complement with F = W-2 fraction bits.
//
// The vectoring-until-x-equals-xc operation and the per-stage hand-over of
// micro-rotations follow the architecture; the target-lengthening decision
// rule is this implementation's choice.
module cv_cordic
  import sqdiv_pkg::*;
#(
  parameter int W = 16,
  parameter int N = 16
) (
  input  logic                clk,
  input  logic signed [W-1:0] x0,
  input  logic signed [W-1:0] xc,
  output logic        [N-1:0] mu
);
  localparam int F = W - 2;

  // Stage inputs; index 0 is the module input, the rest are registers.
  logic signed [W-1:0] xs [N];
  logic signed [W-1:0] ys [N];
  logic signed [W-1:0] ts [N];

  assign xs[0] = x0;
  assign ys[0] = '0;
  assign ts[0] = xc;

  for (genvar i = 0; i < N; i++) begin : g_stage
    localparam logic signed [F+2:0] KI = (F+3)'(stage_gain(i, F));
    assign mu[i] = ys[i][W-1] || (xs[i] > ts[i]);

    // The last stage only decides; its rotated vector is not needed.
    if (i < N - 1) begin : g_rot
      logic signed [W-1:0]   x_nx, y_nx, t_nx;
      logic signed [W+F+2:0] t_prod;

      always_comb begin
        if (mu[i]) begin
          x_nx = xs[i] - (ys[i] >>> i);
          y_nx = ys[i] + (xs[i] >>> i);
        end else begin
          x_nx = xs[i] + (ys[i] >>> i);
          y_nx = ys[i] - (xs[i] >>> i);
        end
        t_prod = ts[i] * KI + ((W+F+3)'(1) <<< (F - 1));
        t_nx   = W'(t_prod >>> F);
      end

      always_ff @(posedge clk) begin
        xs[i+1] <= x_nx;
        ys[i+1] <= y_nx;
        ts[i+1] <= t_nx;
      end
    end
  end

endmodule
