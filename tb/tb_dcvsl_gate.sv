// tb_dcvsl_gate: exhaustive check of the DCVSL gate. For every combination
// of the precharge input and the two pull-down trees it compares both rails
// and the NAND output with values written out from the precharge/evaluate
// rules: precharge keeps both rails high and the output low; in evaluation a
// conducting tree pulls its rail low.
module tb_dcvsl_gate;
  logic eval, pd_q, pd_qn, q, q_n, done;
  int checks = 0, failures = 0;

  dcvsl_gate dut (.eval(eval), .pd_q(pd_q), .pd_qn(pd_qn), .q(q), .q_n(q_n), .done(done));

  // expected {q, q_n, done} indexed by {eval, pd_q, pd_qn}
  localparam logic [2:0] EXP [8] = '{
    3'b110, 3'b110, 3'b110, 3'b110,   // precharge
    3'b110, 3'b101, 3'b011, 3'b001    // evaluate
  };

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {eval, pd_q, pd_qn} = 3'(v);
      #1;
      checks++;
      if ({q, q_n, done} !== EXP[v]) begin
        failures++;
        $display("FAIL in=%03b got=%03b exp=%03b", 3'(v), {q, q_n, done}, EXP[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
