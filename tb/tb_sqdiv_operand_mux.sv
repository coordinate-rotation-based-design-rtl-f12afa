// tb_sqdiv_operand_mux: checks that the square-root select gives x0 = 1.0 and
// target 2X-1, and the division select gives x0 = Z and target X.
module tb_sqdiv_operand_mux;
  import sqdiv_pkg::*;

  localparam int W = 16;
  localparam int F = W - 2;

  op_e                 op;
  logic signed [W-1:0] tgt_sqrt, x_div, z_div, x0, xc;

  sqdiv_operand_mux #(.W(W)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int i = 0; i < 2000; i++) begin
      op       = op_e'($urandom_range(1));
      tgt_sqrt = W'($urandom);
      x_div    = W'($urandom);
      z_div    = W'($urandom);
      #1;
      checks++;
      if (op == OP_SQRT) begin
        if (x0 != W'(1 << F) || xc != tgt_sqrt) begin
          failures++;
          $display("FAIL: sqrt select x0=%0d xc=%0d", x0, xc);
        end
      end else if (x0 != z_div || xc != x_div) begin
        failures++;
        $display("FAIL: div select x0=%0d xc=%0d", x0, xc);
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
