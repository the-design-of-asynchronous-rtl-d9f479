// Tests dr_index_counter (IW = 3): over 20 handshakes the tag presented
// with each sample must be its index modulo 8, VALID only while the sample
// is VALID and EMPTY otherwise; reset restarts the count.
module tb_dr_index_counter;
  localparam int IW = 3;
  logic rst = 1'b0;
  initial #1 rst = 1'b1;   // a real rising edge for the counter's asynchronous reset
  logic data_valid = 0, ack = 0;
  logic [IW-1:0] idx_t, idx_f, count;
  int checks = 0, failures = 0;

  dr_index_counter #(.IW(IW)) dut (.*);

  initial begin
    #2 rst = 1'b0; #1;
    for (int r = 0; r < 20; r++) begin
      if (r == 12) begin rst = 1'b1; #1 rst = 1'b0; #1; end
      checks++;
      if ((idx_t | idx_f) != '0) begin failures++; $display("FAIL tag VALID without data"); end
      data_valid = 1; #1;
      checks++;
      if (idx_t !== IW'(r >= 12 ? r - 12 : r) || idx_f !== ~idx_t) begin
        failures++; $display("FAIL sample %0d tag %0d", r, idx_t);
      end
      ack = 1; #1; data_valid = 0; #1;
      ack = 0; #2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
