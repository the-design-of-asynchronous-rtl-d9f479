// Tests c_element with two and three inputs against the C-element truth
// table: the output follows the inputs when they all agree and holds
// otherwise; reset forces 0. Random input sequences, compared with a
// reference state kept by the testbench.
module tb_c_element;
  logic rst = 1'b1;
  logic [1:0] a2 = '0;
  logic [2:0] a3 = '0;
  logic z2, z3;
  logic m2, m3;
  int checks = 0, failures = 0;

  c_element #(.N(2)) u2 (.rst(rst), .in(a2), .z(z2));
  c_element #(.N(3)) u3 (.rst(rst), .in(a3), .z(z3));

  initial begin
    #1;
    checks += 2;
    if (z2 !== 1'b0 || z3 !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst = 1'b0; m2 = 1'b0; m3 = 1'b0;
    for (int i = 0; i < 400; i++) begin
      a2 = 2'($urandom); a3 = 3'($urandom);
      #1;
      if (a2 == 2'b11) m2 = 1'b1; else if (a2 == 2'b00) m2 = 1'b0;
      if (a3 == 3'b111) m3 = 1'b1; else if (a3 == 3'b000) m3 = 1'b0;
      checks += 2;
      if (z2 !== m2) begin failures++; $display("FAIL N=2 in=%b z=%b exp=%b", a2, z2, m2); end
      if (z3 !== m3) begin failures++; $display("FAIL N=3 in=%b z=%b exp=%b", a3, z3, m3); end
    end
    // explicit hold sequence of the truth table
    a2 = 2'b11; #1; a2 = 2'b01; #1; checks++; if (z2 !== 1'b1) begin failures++; $display("FAIL hold 1"); end
    a2 = 2'b00; #1; a2 = 2'b10; #1; checks++; if (z2 !== 1'b0) begin failures++; $display("FAIL hold 0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
