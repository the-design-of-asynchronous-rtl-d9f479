// Tests dr_mux (W = 8): both inputs are offered, the select picks one; the
// output carries the chosen word, only the chosen input is acknowledged and
// the other input stays pending until a later select takes it.
module tb_dr_mux;
  localparam int W = 8;
  logic rst = 1'b1;
  logic [W-1:0] a_t = '0, a_f = '0, b_t = '0, b_f = '0, y_t, y_f;
  logic a_ack, b_ack, sel_t = 0, sel_f = 0, sel_ack, y_ack = 0;
  int checks = 0, failures = 0;
  dr_mux #(.W(W)) dut (.*);
  initial begin
    logic [W-1:0] va, vb;
    #1 rst = 1'b0; #1;
    va = W'($urandom); vb = W'($urandom);
    a_t = va; a_f = ~va; b_t = vb; b_f = ~vb;
    for (int r = 0; r < 80; r++) begin
      bit s;
      s = 1'($urandom);
      #1; checks++; if ((y_t | y_f) != '0) begin failures++; $display("FAIL output without select"); end
      sel_t = s; sel_f = !s; #1;
      checks++;
      if (y_t !== (s ? vb : va) || y_f !== ~(s ? vb : va)) begin failures++; $display("FAIL select %b got %h", s, y_t); end
      y_ack = 1; #1;
      checks++;
      if (a_ack !== !s || b_ack !== s || !sel_ack) begin failures++; $display("FAIL ack routing a%b b%b", a_ack, b_ack); end
      sel_t = 0; sel_f = 0;
      if (s) begin b_t = '0; b_f = '0; end else begin a_t = '0; a_f = '0; end
      #1; checks++; if ((y_t | y_f) != '0) begin failures++; $display("FAIL not EMPTY"); end
      y_ack = 0; #1;
      checks++; if (a_ack || b_ack) begin failures++; $display("FAIL ack not released"); end
      // the used input gets a new word, the other one keeps its word
      if (s) begin vb = W'($urandom); b_t = vb; b_f = ~vb; end
      else begin va = W'($urandom); a_t = va; a_f = ~va; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
