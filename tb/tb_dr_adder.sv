// Tests dr_adder at 16 bits as adder (SUB = 0) and subtractor (SUB = 1) with
// random and corner operands: the results must equal a + b and a - b modulo
// 2^16 once the operands are VALID, and all rails must return to EMPTY.
module tb_dr_adder;
  localparam int W = 16;
  logic rst = 1'b1;
  logic [W-1:0] a_t = '0, a_f = '0, b_t = '0, b_f = '0;
  logic [W-1:0] s_t, s_f, d_t, d_f;
  int checks = 0, failures = 0;
  dr_adder #(.W(W), .SUB(1'b0)) u_add (.rst(rst), .a_t(a_t), .a_f(a_f), .b_t(b_t), .b_f(b_f), .s_t(s_t), .s_f(s_f));
  dr_adder #(.W(W), .SUB(1'b1)) u_sub (.rst(rst), .a_t(a_t), .a_f(a_f), .b_t(b_t), .b_f(b_f), .s_t(d_t), .s_f(d_f));
  initial begin
    #1 rst = 1'b0; #1;
    for (int r = 0; r < 300; r++) begin
      logic [W-1:0] a, b, es, ed;
      a = W'($urandom); b = W'($urandom);
      if (r == 0) begin a = 16'hFFFF; b = 16'h0001; end
      if (r == 1) begin a = 16'h8000; b = 16'h8000; end
      if (r == 2) begin a = 16'h0000; b = 16'h0001; end
      es = a + b; ed = a - b;
      a_t = a; a_f = ~a; #1; b_t = b; b_f = ~b; #1;
      checks += 2;
      if (s_t !== es || s_f !== ~es) begin failures++; $display("FAIL %h + %h = t%h f%h", a, b, s_t, s_f); end
      if (d_t !== ed || d_f !== ~ed) begin failures++; $display("FAIL %h - %h = t%h f%h", a, b, d_t, d_f); end
      a_t = '0; a_f = '0; b_t = '0; b_f = '0; #1;
      checks++;
      if ((s_t | s_f | d_t | d_f) != '0) begin failures++; $display("FAIL not EMPTY"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
