// Tests dr_merge (W = 8): words sent alternately and randomly on b or c
// appear on a; the acknowledge goes back only to the input that sent; the
// output returns to EMPTY with the input.
module tb_dr_merge;
  localparam int W = 8;
  logic rst = 1'b1;
  logic [W-1:0] b_t = '0, b_f = '0, c_t = '0, c_f = '0, a_t, a_f;
  logic b_ack, c_ack, a_ack = 0;
  int checks = 0, failures = 0;
  dr_merge #(.W(W)) dut (.*);
  initial begin
    #1 rst = 1'b0; #1;
    for (int r = 0; r < 80; r++) begin
      logic [W-1:0] v; bit useb;
      v = W'($urandom); useb = 1'($urandom);
      if (useb) begin b_t = v; b_f = ~v; end else begin c_t = v; c_f = ~v; end
      #1; checks++;
      if (a_t !== v || a_f !== ~v) begin failures++; $display("FAIL value"); end
      a_ack = 1; #1; checks++;
      if (b_ack !== useb || c_ack !== !useb) begin failures++; $display("FAIL ack routing b%b c%b", b_ack, c_ack); end
      b_t = '0; b_f = '0; c_t = '0; c_f = '0; #1;
      checks++; if ((a_t | a_f) != '0) begin failures++; $display("FAIL not EMPTY"); end
      a_ack = 0; #1; checks++;
      if (b_ack || c_ack) begin failures++; $display("FAIL ack not released"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
