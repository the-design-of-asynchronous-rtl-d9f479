// Tests dr_fork (W = 8): both outputs carry the input word, and the input
// acknowledge rises only after both receivers acknowledged and falls only
// after both released, whichever order the receivers answer in.
module tb_dr_fork;
  localparam int W = 8;
  logic rst = 1'b1;
  logic [W-1:0] a_t = '0, a_f = '0, b_t, b_f, c_t, c_f;
  logic a_ack, b_ack = 0, c_ack = 0;
  int checks = 0, failures = 0;
  dr_fork #(.W(W)) dut (.*);
  initial begin
    #1 rst = 1'b0; #1;
    for (int r = 0; r < 50; r++) begin
      logic [W-1:0] v; bit bfirst;
      v = W'($urandom); bfirst = 1'($urandom);
      a_t = v; a_f = ~v; #1;
      checks += 2;
      if (b_t !== v || b_f !== ~v || c_t !== v || c_f !== ~v) begin failures++; $display("FAIL copy"); end
      if (bfirst) b_ack = 1; else c_ack = 1;
      #1; if (a_ack) begin failures++; $display("FAIL ack after one receiver"); end
      b_ack = 1; c_ack = 1; #1;
      checks++; if (!a_ack) begin failures++; $display("FAIL no ack after both"); end
      a_t = '0; a_f = '0; #1;
      if (bfirst) b_ack = 0; else c_ack = 0;
      #1; checks++; if (!a_ack) begin failures++; $display("FAIL release after one receiver"); end
      b_ack = 0; c_ack = 0; #1;
      checks++; if (a_ack) begin failures++; $display("FAIL ack stuck"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
