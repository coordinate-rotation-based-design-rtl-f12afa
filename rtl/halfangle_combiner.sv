// halfangle_combiner: forms the micro-rotations of the rotation CORDIC from
// those of the vectoring CORDIC, one stage at a time.
//
// Per stage i, a multiplexer picks B_mu: the constant zero-angle sequence
// ZERO_MU for a square root, or A_mu itself for a division. The code passed
// on is {A_mu, B_mu}. Equal bits (00, 11) rotate in that bit's direction,
// unequal bits (01, 10) mean no rotation. Summed over the stages this gives
// the angle (A + B) / 2: for division (A + A)/2 = A = beta, for the square
// root (2*Phi + 0)/2 = Phi. The halving of the angle thus costs no shifter
// and works on bits that arrive one stage per cycle.
//
// The upper bit of each code is A_mu itself, wired straight through; only
// the lower bit is logic.
//
// Interface: purely combinational. a_mu[i] and op_stage[i] belong to the
// operation currently in stage i; code[i] goes to stage i of the rotation
// CORDIC. ZERO_MU defaults to the 16-stage zero sequence 1000101100001011
// (stage 0 first) given for the architecture.
module halfangle_combiner
  import sqdiv_pkg::*;
#(
  parameter int             N       = 16,
  parameter logic [N-1:0]   ZERO_MU = N'(zero_mu(N))
) (
  input  logic [N-1:0] a_mu,
  input  op_e          op_stage [N],
  output ab_code_e     code [N]
);
  for (genvar i = 0; i < N; i++) begin : g_stage
    logic b_mu;
    assign b_mu    = (op_stage[i] == OP_DIV) ? a_mu[i] : ZERO_MU[i];
    assign code[i] = ab_code_e'({a_mu[i], b_mu});
  end

endmodule
