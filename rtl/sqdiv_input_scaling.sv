// sqdiv_input_scaling: shift-based range reduction in front of the CORDICs.
//
// Square root (op = OP_SQRT): X is a non-negative B-bit integer. The shift k
// is the even number with 2**(k-2) < X <= 2**k, so Xs = X / 2**k lies in
// (1/4, 1]. The vectoring target is cos(2*Phi) = 2*Xs - 1. A target below 0
// would need a vectoring angle above 90 degrees, beyond what the micro-rotation
// set can reach (about 99.9 degrees) for all X, so the target is folded:
// tgt_sqrt = |2*Xs - 1| and fold = 1. With the folded angle psi = pi - 2*Phi,
// sqrt(Xs) = cos(Phi) = sin(psi/2), which the rotation CORDIC delivers on y.
// X = 0 gives tgt_sqrt = 1 with fold set, so the result is sin(0) = 0.
//
// Division (op = OP_DIV): X and Z are signed B-bit integers, and the CORDIC
// works on magnitudes. When |X| > |Z|, k follows the rule
// 2**(k-1) <= |X|-|Z| <= 2**k (the smallest such k), and is raised by one
// when |X| / 2**k would still exceed |Z| (this happens for |Z| = 1 or
// |X|-|Z| = 1). Then both operands are shifted by the same amount so that
// z_div = |Z| * 2**s lies in [1/2, 1) and x_div = |X| * 2**(s-k) <= z_div; this
// common normalisation keeps the quotient and uses the full fraction width.
// neg is the sign of the quotient, invalid flags Z = 0.
//
// A negative X in square-root mode is flagged invalid.
//
// Interface: purely combinational. Outputs are W-bit (W = B) fixed point with
// F = W-2 fraction bits. k is 5 bits, so B may be at most 31.
// The shift rules and the example values (X = 49 -> k = 6; X = 55, Z = 30 ->
// k = 5) follow the architecture's definition; the fold, the extra k step
// and the common normalisation are this implementation's additions.
module sqdiv_input_scaling
  import sqdiv_pkg::*;
#(
  parameter int B = 16
) (
  input  op_e                 op,
  input  logic signed [B-1:0] x_in,
  input  logic signed [B-1:0] z_in,
  output logic signed [B-1:0] tgt_sqrt,  // |2*Xs - 1|
  output logic signed [B-1:0] x_div,     // normalised |X| / 2**k
  output logic signed [B-1:0] z_div,     // normalised |Z|
  output logic        [4:0]   k,
  output logic                fold,
  output logic                neg,
  output logic                invalid
);
  localparam int W  = B;
  localparam int F  = W - 2;
  localparam int LW = 2 * B + F + 2;

  // Number of bits needed to hold v (0 for v = 0).
  function automatic int bitlen(input logic [B:0] v);
    int n;
    n = 0;
    for (int i = 0; i <= B; i++) if (v[i]) n = i + 1;
    return n;
  endfunction

  logic [B:0]     ax, az, diff;   // magnitudes, one bit wider for -2**(B-1)
  logic [4:0]     k_sq, k_dv;
  logic [B+F:0]   xs;             // Xs = X / 2**k, Q.F
  logic signed [B+F+2:0] d;       // 2*Xs - 1
  int             p;

  always_comb begin
    ax   = x_in[B-1] ? (B+1)'(-x_in) : (B+1)'(x_in);
    az   = z_in[B-1] ? (B+1)'(-z_in) : (B+1)'(z_in);

    // ---- square root -------------------------------------------------
    if (x_in[B-1] || ax == '0) k_sq = '0;
    else begin
      k_sq = 5'(bitlen(ax - 1'b1));
      k_sq = k_sq + 5'(k_sq[0]);            // round up to even
    end
    xs = x_in[B-1] ? '0 : ((B+F+1)'(ax) << F) >> k_sq;
    d  = $signed({1'b0, xs, 1'b0}) - $signed((B+F+3)'(1) << F);

    // ---- division -----------------------------------------------------
    diff = ax - az;
    k_dv = '0;
    if (ax > az) begin
      k_dv = 5'(bitlen(diff - 1'b1));
      if (k_dv == 0) k_dv = 5'd1;
      if ((B + 33)'(ax) > ((B + 33)'(az) << k_dv)) k_dv = k_dv + 5'd1;
    end
    p  = bitlen(az) - 1;
    if (p < 0) p = 0;

    // ---- outputs ------------------------------------------------------
    tgt_sqrt = W'(d[B+F+2] ? -d : d);
    z_div    = W'((LW'(az) << (F - 1 + B)) >> (p + B));
    x_div    = W'((LW'(ax) << (F - 1 + B)) >> (p + B + int'(k_dv)));
    if (op == OP_SQRT) begin
      k       = k_sq;
      fold    = d[B+F+2] || (ax == '0);
      neg     = 1'b0;
      invalid = x_in[B-1];
    end else begin
      k       = k_dv;
      fold    = 1'b0;
      neg     = (x_in[B-1] ^ z_in[B-1]) && (ax != '0);
      invalid = (az == '0);
    end
  end

endmodule
