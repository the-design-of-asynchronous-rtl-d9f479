// Tests dr_full_adder on all eight input combinations, presented in random
// order of arrival: the sum and carry rails must match a + b + ci, appear
// only after all three inputs are VALID, and clear when all are EMPTY.
module tb_dr_full_adder;
  logic rst = 1'b1;
  logic a_t = 0, a_f = 0, b_t = 0, b_f = 0, ci_t = 0, ci_f = 0;
  logic s_t, s_f, co_t, co_f;
  int checks = 0, failures = 0;
  dr_full_adder dut (.*);
  initial begin
    #1 rst = 1'b0; #1;
    for (int r = 0; r < 48; r++) begin
      int v; logic a, b, c; int sum;
      v = r % 8; a = v[2]; b = v[1]; c = v[0]; sum = int'(a) + int'(b) + int'(c);
      a_t = a; a_f = !a; #1;
      b_t = b; b_f = !b; #1;
      checks++;
      if (s_t || s_f || co_t || co_f) begin failures++; $display("FAIL early output"); end
      ci_t = c; ci_f = !c; #1;
      checks++;
      if (s_t !== sum[0] || s_f !== !sum[0] || co_t !== sum[1] || co_f !== !sum[1]) begin
        failures++; $display("FAIL %b+%b+%b: s t%b f%b co t%b f%b", a, b, c, s_t, s_f, co_t, co_f);
      end
      a_t = 0; a_f = 0; ci_t = 0; ci_f = 0; #1;
      checks++;
      if (s_t !== sum[0] || co_t !== sum[1]) begin failures++; $display("FAIL no hold"); end
      b_t = 0; b_f = 0; #1;
      checks++;
      if (s_t || s_f || co_t || co_f) begin failures++; $display("FAIL not EMPTY"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
