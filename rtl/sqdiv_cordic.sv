// sqdiv_cordic: square root and division on a pair of circular CORDICs.
//
// sqrt (op = OP_SQRT): with X scaled to Xs in (1/4, 1] and Xs = cos^2(Phi),
//   cos(2*Phi) = 2*Xs - 1. The vectoring CORDIC turns [1, 0] until x = 2Xs-1,
//   which yields the micro-rotations of 2*Phi; the half-angle combiner turns
//   them into those of Phi, and the rotation CORDIC rotates [1, 0] by Phi:
//   x = cos(Phi) = sqrt(Xs). The output stage shifts back by k/2.
// div  (op = OP_DIV): the vectoring CORDIC turns [Z, 0] until x = X, which
//   yields beta with cos(beta) = X/Z; the rotation CORDIC rotates [1, 0] by
//   beta: x = X/Z. The output stage shifts back by k.
//
// Both CORDICs have N stages. With DP = 1 (the default) they are doubly
// pipelined: stage i of the rotation CORDIC takes the micro-rotation of stage
// i of the vectoring CORDIC in the same cycle, so a result leaves N cycles
// after its operands enter. With DP = 0 the rotation CORDIC starts only when
// the vectoring CORDIC has finished: each micro-rotation bit waits N cycles in
// a delay line, and the latency is 2N. Either way a new operation can enter
// every cycle and the two modes may be mixed freely. The per-operation
// information (mode, shift k, sign, fold, valid) travels in a side pipeline
// beside the stages.
//
// Interface:
//   in_valid, op, x_in, z_in : operands, B-bit two's complement integers
//                              (z_in is ignored for a square root)
//   out_valid, result        : LAT = N (DP = 1) or 2N (DP = 0) cycles later;
//                              result has F = B-2 fraction
//                              bits and OW = 2B+1 bits in all
//   out_invalid              : Z = 0, or X < 0 for a square root (result 0)
// Reset (rst_n, asynchronous, active low) clears the valid side pipeline; the
// datapath registers are not reset.
//
// B = 16 and N = 16 are the word length and stage count of the reference
// implementation; both hand-over schemes (DP) are described for it. Start
// vectors, target-length tracking in the vectoring
// CORDIC, gain-balanced "no rotation" stages, the square-root fold above
// 90 degrees and the handshake are this implementation's choices.
module sqdiv_cordic
  import sqdiv_pkg::*;
#(
  parameter int B  = 16,            // word length b
  parameter int N  = 16,            // CORDIC stages n
  parameter int OW = 2 * B + 1,
  parameter bit DP = 1'b1           // 1: doubly pipelined, 0: sequential hand-over
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  op_e                  op,
  input  logic signed [B-1:0]  x_in,
  input  logic signed [B-1:0]  z_in,
  output logic                 out_valid,
  output logic signed [OW-1:0] result,
  output logic                 out_invalid
);
  localparam int W   = B;
  localparam int LAT = DP ? N : 2 * N;   // cycles from operands to result

  // The shift k travels as a 5-bit field, which bounds the word length.
  if (B < 4 || B > 31) begin : g_bad_b
    $error("sqdiv_cordic: B must lie in 4..31");
  end

  // ---- input scaling and operand selection ---------------------------------
  logic signed [W-1:0] tgt_sqrt, x_div, z_div, cv_x0, cv_xc;
  logic [4:0]          k;
  logic                fold, neg, invalid;

  sqdiv_input_scaling #(.B(B)) u_in_scale (
    .op(op), .x_in(x_in), .z_in(z_in),
    .tgt_sqrt(tgt_sqrt), .x_div(x_div), .z_div(z_div),
    .k(k), .fold(fold), .neg(neg), .invalid(invalid)
  );

  sqdiv_operand_mux #(.W(W)) u_opmux (
    .op(op), .tgt_sqrt(tgt_sqrt), .x_div(x_div), .z_div(z_div),
    .x0(cv_x0), .xc(cv_xc)
  );

  // ---- side pipeline: meta[j] belongs to the operation issued j cycles ago --
  meta_t meta [LAT+1];
  op_e   op_stage [N];

  always_comb begin
    meta[0].valid   = in_valid;
    meta[0].op      = op;
    meta[0].k       = k;
    meta[0].fold    = fold;
    meta[0].neg     = neg;
    meta[0].invalid = invalid;
  end

  // Rotation stage i works on the operation issued LAT-N+i cycles ago.
  for (genvar i = 0; i < N; i++) begin : g_op_stage
    assign op_stage[i] = meta[LAT - N + i].op;
  end

  for (genvar i = 0; i < LAT; i++) begin : g_meta
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) meta[i+1] <= '0;
      else        meta[i+1] <= meta[i];
    end
  end

  // ---- CORDIC pair ----------------------------------------------------------
  logic [N-1:0]        a_mu, a_mu_cr;
  ab_code_e            code [N];
  logic signed [W-1:0] cos_n, sin_n;

  cv_cordic #(.W(W), .N(N)) u_cv (
    .clk(clk), .x0(cv_x0), .xc(cv_xc), .mu(a_mu)
  );

  // Hand-over of the micro-rotations: straight across (doubly pipelined), or
  // through an N-cycle delay line so that rotation stage i runs after the
  // whole vectoring pass.
  if (DP) begin : g_dp
    assign a_mu_cr = a_mu;
  end else begin : g_seq
    logic [N-1:0] mu_dl [N];
    always_ff @(posedge clk) begin
      mu_dl[0] <= a_mu;
      for (int j = 1; j < N; j++) mu_dl[j] <= mu_dl[j-1];
    end
    assign a_mu_cr = mu_dl[N-1];
  end

  halfangle_combiner #(.N(N)) u_comb (
    .a_mu(a_mu_cr), .op_stage(op_stage), .code(code)
  );

  cr_cordic #(.W(W), .N(N)) u_cr (
    .clk(clk), .code(code), .x_n(cos_n), .y_n(sin_n)
  );

  // ---- output scaling -------------------------------------------------------
  sqdiv_output_scaling #(.B(B), .W(W), .OW(OW)) u_out_scale (
    .meta(meta[LAT]), .cos_in(cos_n), .sin_in(sin_n), .result(result)
  );

  assign out_valid   = meta[LAT].valid;
  assign out_invalid = meta[LAT].valid && meta[LAT].invalid;

  // Interface rules: an invalid operation returns 0, and no result is
  // flagged invalid outside a valid slot.
  a_invalid_zero: assert property (@(posedge clk)
    out_invalid |-> (result == '0 && out_valid));

endmodule
