// tb_halfangle_combiner: checks the per-stage B multiplexer and the code
// {A_mu, B_mu} against the truth table, and that the codes describe the
// angle (A+B)/2: with A = 70 degrees (1101110111111010, stage 0 first) and
// B = 0 the combined rotation must be 35 degrees, and for a division the
// combined angle must equal A.
module tb_halfangle_combiner;
  import sqdiv_pkg::*;

  localparam int N = 16;

  logic [N-1:0] a_mu;
  op_e          op_stage [N];
  ab_code_e     code [N];

  halfangle_combiner #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  localparam logic [N-1:0] ZERO = 16'b1101_0000_1101_0001;  // 1000101100001011 reversed

  function automatic real mu_angle(logic [N-1:0] m);
    real s;
    s = 0.0;
    for (int i = 0; i < N; i++) s += (m[i] ? 1.0 : -1.0) * $atan(1.0 / real'(1 << i));
    return s * 180.0 / 3.14159265358979;
  endfunction

  function automatic real code_angle();
    real s;
    s = 0.0;
    for (int i = 0; i < N; i++)
      if (code[i] == AB_CCW)     s += $atan(1.0 / real'(1 << i));
      else if (code[i] == AB_CW) s -= $atan(1.0 / real'(1 << i));
    return s * 180.0 / 3.14159265358979;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [N-1:0] a70;
    real          ang;
    a70 = '0;
    // 1101110111111010, stage 0 first
    foreach (a70[i]) a70[i] = 1'((64'hDDFA >> (N - 1 - i)) & 64'd1);
    check(mu_angle(a70) > 69.99 && mu_angle(a70) < 70.01, "70 degree sequence");
    check(mu_angle(ZERO) > -0.01 && mu_angle(ZERO) < 0.01, "zero sequence");

    a_mu = a70;
    foreach (op_stage[i]) op_stage[i] = OP_SQRT;
    #1;
    ang = code_angle();
    check(ang > 34.99 && ang < 35.01, $sformatf("(70+0)/2 gives %f", ang));

    for (int t = 0; t < 500; t++) begin
      a_mu = N'($urandom);
      foreach (op_stage[i]) op_stage[i] = op_e'($urandom_range(1));
      #1;
      for (int i = 0; i < N; i++) begin
        logic b;
        b = (op_stage[i] == OP_DIV) ? a_mu[i] : ZERO[i];
        check(code[i] == ab_code_e'({a_mu[i], b}), $sformatf("stage %0d code", i));
      end
      foreach (op_stage[i]) op_stage[i] = OP_SQRT;
      #1;
      ang = code_angle();
      check(ang - (mu_angle(a_mu) + mu_angle(ZERO)) / 2.0 < 1.0e-6 &&
            (mu_angle(a_mu) + mu_angle(ZERO)) / 2.0 - ang < 1.0e-6, "sqrt angle (A+B)/2");
      foreach (op_stage[i]) op_stage[i] = OP_DIV;
      #1;
      ang = code_angle();
      check(ang - mu_angle(a_mu) < 1.0e-6 && mu_angle(a_mu) - ang < 1.0e-6, "div angle A");
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
