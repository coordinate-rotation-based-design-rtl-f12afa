// sqdiv_output_scaling: undoes the input scaling on the rotation CORDIC's
// result. A square root is shifted left by k/2 (sqrt(X) = sqrt(Xs) * 2**(k/2)),
// a quotient by k (X/Z = (X/2**k)/Z * 2**k).
//
// For a folded square root (scaled X below 1/2) the value is taken from the
// y output (sin) instead of x (cos). A quotient with neg set is negated. The
// CORDIC value is a magnitude, so a slightly negative one (rounding near 90
// degrees) is clamped to 0. An invalid operation, or a slot without a valid
// operation, returns 0.
//
// Interface: purely combinational. cos_in/sin_in are W-bit with F = W-2
// fraction bits; result is OW = W+B+1 bits wide with the same F fraction
// bits, wide enough for a shift by up to B. The shift-back rule follows the
// architecture; fold, sign and clamp handling are this implementation's.
module sqdiv_output_scaling
  import sqdiv_pkg::*;
#(
  parameter int B  = 16,
  parameter int W  = B,
  parameter int OW = W + B + 1
) (
  input  meta_t                meta,
  input  logic signed [W-1:0]  cos_in,
  input  logic signed [W-1:0]  sin_in,
  output logic signed [OW-1:0] result
);
  logic signed [W-1:0]  r;
  logic        [4:0]    sh;
  logic signed [OW-1:0] mag;

  always_comb begin
    r  = (meta.op == OP_SQRT && meta.fold) ? sin_in : cos_in;
    if (r < 0) r = '0;
    sh  = (meta.op == OP_SQRT) ? (meta.k >> 1) : meta.k;
    mag = OW'(r) <<< sh;
    if (!meta.valid || meta.invalid) result = '0;
    else if (meta.neg) result = -mag;
    else               result = mag;
  end

endmodule
