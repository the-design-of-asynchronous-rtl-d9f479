// Tests dr_fifo (DEPTH = 4, W = 8). First, with the receiver idle, the FIFO
// must accept exactly DEPTH + 1 words and then refuse the next one. Then all
// words are read back in order, and a long random stream with random
// stalls on both sides must pass through unchanged and in order.
module tb_dr_fifo;
  localparam int W = 8;
  localparam int DEPTH = 4;
  localparam int NW = 80;
  logic rst = 1'b1;
  logic [W-1:0] in_t = '0, in_f = '0, out_t, out_f;
  logic in_ack, out_ack = 1'b0;
  int checks = 0, failures = 0;
  logic [W-1:0] words [NW];
  int accepted = 0;

  dr_fifo #(.DEPTH(DEPTH), .W(W)) dut (.*);

  task automatic send(input logic [W-1:0] v, input int maxwait, output bit ok);
    int n = 0;
    in_t = v; in_f = ~v;
    while (!in_ack && n < maxwait) begin #1; n++; end
    ok = in_ack;
    if (ok) begin #1; in_t = '0; in_f = '0; wait (!in_ack); #1; end
  endtask

  initial begin
    bit ok;
    for (int i = 0; i < NW; i++) words[i] = W'($urandom);
    #2 rst = 1'b0; #1;
    // capacity
    for (int i = 0; i < DEPTH + 2; i++) begin
      send(words[i], 50, ok);
      if (ok) accepted++;
      else break;
    end
    checks++;
    if (accepted != DEPTH + 1) begin failures++; $display("FAIL capacity %0d, expected %0d", accepted, DEPTH + 1); end
    // the refused word is still offered: it enters when the first is read
    fork
      begin
        wait (in_ack); #1; in_t = '0; in_f = '0; wait (!in_ack); #1;
        for (int i = DEPTH + 2; i < NW; i++) begin
          send(words[i], 1000000, ok);
          #($urandom_range(0, 8));
        end
      end
      for (int i = 0; i < NW; i++) begin
        wait (&(out_t | out_f));
        #($urandom_range(1, 8));
        checks++;
        if (out_t !== words[i]) begin failures++; $display("FAIL word %0d got %h exp %h", i, out_t, words[i]); end
        out_ack = 1'b1;
        wait ((out_t | out_f) == '0);
        #1 out_ack = 1'b0;
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
