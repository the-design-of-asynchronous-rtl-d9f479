// Tests dr_demux (W = 8) against the DEMUX truth table: with select false
// the word appears on y and z stays EMPTY, with select true the reverse;
// nothing appears before both data and select are VALID; the acknowledge of
// the chosen output is returned.
module tb_dr_demux;
  localparam int W = 8;
  logic rst = 1'b1;
  logic [W-1:0] x_t = '0, x_f = '0, y_t, y_f, z_t, z_f;
  logic sel_t = 0, sel_f = 0, x_ack, y_ack = 0, z_ack = 0;
  int checks = 0, failures = 0;
  dr_demux #(.W(W)) dut (.*);
  initial begin
    #1 rst = 1'b0; #1;
    for (int r = 0; r < 80; r++) begin
      logic [W-1:0] v; bit s;
      v = W'($urandom); s = 1'($urandom);
      x_t = v; x_f = ~v; #1;
      checks++; if ((y_t | y_f | z_t | z_f) != '0) begin failures++; $display("FAIL output without select"); end
      sel_t = s; sel_f = !s; #1;
      checks++;
      if (s) begin
        if (z_t !== v || z_f !== ~v || (y_t | y_f) != '0) begin failures++; $display("FAIL route to z"); end
      end else begin
        if (y_t !== v || y_f !== ~v || (z_t | z_f) != '0) begin failures++; $display("FAIL route to y"); end
      end
      if (s) z_ack = 1; else y_ack = 1;
      #1; checks++; if (!x_ack) begin failures++; $display("FAIL no ack"); end
      x_t = '0; x_f = '0; sel_t = 0; sel_f = 0; #1;
      checks++; if ((y_t | y_f | z_t | z_f) != '0) begin failures++; $display("FAIL not EMPTY"); end
      y_ack = 0; z_ack = 0; #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
