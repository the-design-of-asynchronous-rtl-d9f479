// Tests dr_completion (W = 8): 'done' must rise only when every bit is VALID,
// fall only when every bit is EMPTY, and hold in between. Bits are made
// VALID and then EMPTY one at a time in random order, with random values.
module tb_dr_completion;
  localparam int W = 8;
  logic rst = 1'b1;
  logic [W-1:0] t = '0, f = '0;
  logic done;
  int checks = 0, failures = 0;

  dr_completion #(.W(W)) dut (.rst(rst), .d_t(t), .d_f(f), .done(done));

  initial begin
    #1 rst = 1'b0; #1;
    for (int r = 0; r < 30; r++) begin
      int order [W];
      for (int i = 0; i < W; i++) order[i] = i;
      order.shuffle();
      for (int i = 0; i < W; i++) begin
        if ($urandom_range(0, 1)) t[order[i]] = 1'b1; else f[order[i]] = 1'b1;
        #1; checks++;
        if (done !== (i == W - 1)) begin failures++; $display("FAIL rise round %0d bit %0d done=%b", r, i, done); end
      end
      order.shuffle();
      for (int i = 0; i < W; i++) begin
        t[order[i]] = 1'b0; f[order[i]] = 1'b0;
        #1; checks++;
        if (done !== (i != W - 1)) begin failures++; $display("FAIL fall round %0d bit %0d done=%b", r, i, done); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
