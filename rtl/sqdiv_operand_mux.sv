// sqdiv_operand_mux: the two select multiplexers in front of the vectoring
// CORDIC. Square root (op = OP_SQRT) starts the vector at [1, 0] and vectors
// until x reaches 2X-1; division (op = OP_DIV) starts at [Z, 0] and vectors
// until x reaches X. Select 0 picks the square-root operand, 1 the division
// operand, as on the architecture's multiplexers.
//
// Interface: purely combinational, W-bit fixed point with F = W-2 fraction
// bits, so the constant 1 is 2**F.
module sqdiv_operand_mux
  import sqdiv_pkg::*;
#(
  parameter int W = 16
) (
  input  op_e                 op,
  input  logic signed [W-1:0] tgt_sqrt,  // 2X-1 (folded)
  input  logic signed [W-1:0] x_div,     // X after scaling
  input  logic signed [W-1:0] z_div,     // Z after scaling
  output logic signed [W-1:0] x0,        // start x of the vectoring CORDIC
  output logic signed [W-1:0] xc         // target x of the vectoring CORDIC
);
  localparam int F = W - 2;
  localparam logic signed [W-1:0] ONE = W'(1) << F;

  always_comb begin
    unique case (op)
      OP_SQRT: begin x0 = ONE;   xc = tgt_sqrt; end
      OP_DIV:  begin x0 = z_div; xc = x_div;    end
      default: begin x0 = ONE;   xc = tgt_sqrt; end
    endcase
  end

endmodule
