// tb_sqdiv_output_scaling: checks the shift back by k/2 (square root) or k
// (division), the choice of sin for a folded square root, negation, the
// clamp of negative CORDIC values and the zero result of invalid operations
// and of slots without a valid operation.
module tb_sqdiv_output_scaling;
  import sqdiv_pkg::*;

  localparam int B  = 16;
  localparam int W  = B;
  localparam int OW = W + B + 1;

  meta_t                meta;
  logic signed [W-1:0]  cos_in, sin_in;
  logic signed [OW-1:0] result;

  sqdiv_output_scaling #(.B(B), .W(W), .OW(OW)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int t = 0; t < 4000; t++) begin
      longint r, want;
      meta.valid   = ($urandom_range(15) != 0);
      meta.op      = op_e'($urandom_range(1));
      meta.k       = 5'($urandom_range(B));
      meta.fold    = 1'($urandom);
      meta.neg     = 1'($urandom);
      meta.invalid = ($urandom_range(15) == 0);
      cos_in       = W'($urandom);
      sin_in       = W'($urandom);
      if (t % 2 == 0) begin cos_in[W-1] = 1'b0; sin_in[W-1] = 1'b0; end
      #1;
      r = (meta.op == OP_SQRT && meta.fold) ? longint'(sin_in) : longint'(cos_in);
      if (r < 0) r = 0;
      want = (meta.op == OP_SQRT) ? r * (longint'(1) << (meta.k / 2)) : r * (longint'(1) << meta.k);
      if (meta.neg) want = -want;   // neg is only ever set for a division
      if (!meta.valid || meta.invalid) want = 0;
      checks++;
      if (longint'(result) != want) begin
        failures++;
        $display("FAIL: op=%s k=%0d fold=%0b neg=%0b cos=%0d sin=%0d got %0d expected %0d",
                 meta.op.name(), meta.k, meta.fold, meta.neg, cos_in, sin_in, result, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
