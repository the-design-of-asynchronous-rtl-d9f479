// Tests dr_pipe_stage (W = 8) with a 4-phase dual-rail sender and receiver.
// Checks: each word appears unchanged at the output; the stage acknowledges
// a word (in_ack high) only after it holds it; it does not take the spacer
// while the receiver has not acknowledged; the receiver gets every word in
// order, with random stalls on both sides.
module tb_dr_pipe_stage;
  localparam int W = 8;
  localparam int NW = 60;
  logic rst = 1'b1;
  logic [W-1:0] in_t = '0, in_f = '0, out_t, out_f;
  logic in_ack, out_ack = 1'b0;
  int checks = 0, failures = 0;
  logic [W-1:0] words [NW];

  dr_pipe_stage #(.W(W)) dut (.*);

  initial begin
    for (int i = 0; i < NW; i++) words[i] = W'($urandom);
    #2 rst = 1'b0; #1;
    fork
      for (int i = 0; i < NW; i++) begin
        in_t = words[i]; in_f = ~words[i];
        wait (in_ack);
        checks++;
        if (out_t !== words[i] || out_f !== ~words[i]) begin failures++; $display("FAIL ack before data held"); end
        #($urandom_range(1, 5));
        in_t = '0; in_f = '0;
        wait (!in_ack);
        #($urandom_range(1, 5));
      end
      for (int i = 0; i < NW; i++) begin
        wait (&(out_t | out_f));
        #($urandom_range(1, 6));
        checks++;
        if (out_t !== words[i]) begin failures++; $display("FAIL word %0d got %h exp %h", i, out_t, words[i]); end
        checks++;
        if (in_t != '0 || in_f != '0) begin
          // sender has already sent the spacer: the stage must still hold the word
          if (out_t !== words[i]) begin failures++; $display("FAIL word lost before acknowledge"); end
        end
        out_ack = 1'b1;
        wait ((out_t | out_f) == '0);
        #($urandom_range(1, 6));
        out_ack = 1'b0;
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
