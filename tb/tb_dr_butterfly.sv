// Tests dr_butterfly (W = 16, IW = 3): random complex operand pairs with
// index tags. sum = a + b must carry a's tag, diff = a - b b's tag; nothing
// appears before both operands are VALID; the operands are acknowledged only
// after both results were acknowledged, and released only after both
// receivers released.
module tb_dr_butterfly;
  localparam int W = 16, IW = 3, TW = 2 * W + IW;
  logic rst = 1'b1;
  logic [TW-1:0] a_t = '0, a_f = '0, b_t = '0, b_f = '0, sum_t, sum_f, diff_t, diff_f;
  logic ab_ack, sum_ack = 0, diff_ack = 0;
  int checks = 0, failures = 0;

  dr_butterfly #(.W(W), .IW(IW)) dut (.*);

  initial begin
    #1 rst = 1'b0; #1;
    for (int r = 0; r < 100; r++) begin
      logic [W-1:0] ar, ai, br, bi;
      logic [IW-1:0] ax, bx;
      logic [TW-1:0] a, b, es, ed;
      ar = W'($urandom); ai = W'($urandom); br = W'($urandom); bi = W'($urandom);
      ax = IW'($urandom); bx = IW'($urandom);
      a = {ar, ai, ax}; b = {br, bi, bx};
      es = {W'(ar + br), W'(ai + bi), ax};
      ed = {W'(ar - br), W'(ai - bi), bx};
      a_t = a; a_f = ~a; #1;
      checks++;
      if ((sum_t[TW-1:IW] | sum_f[TW-1:IW] | diff_t[TW-1:IW] | diff_f[TW-1:IW]) != '0) begin
        failures++; $display("FAIL result before b");
      end
      b_t = b; b_f = ~b; #1;
      checks += 2;
      if (sum_t !== es || sum_f !== ~es) begin failures++; $display("FAIL sum %h exp %h", sum_t, es); end
      if (diff_t !== ed || diff_f !== ~ed) begin failures++; $display("FAIL diff %h exp %h", diff_t, ed); end
      sum_ack = 1; #1;
      checks++; if (ab_ack) begin failures++; $display("FAIL ack after one result"); end
      diff_ack = 1; #1;
      checks++; if (!ab_ack) begin failures++; $display("FAIL no ack"); end
      a_t = '0; a_f = '0; b_t = '0; b_f = '0; #1;
      checks++; if ((sum_t | sum_f | diff_t | diff_f) != '0) begin failures++; $display("FAIL not EMPTY"); end
      diff_ack = 0; #1;
      checks++; if (!ab_ack) begin failures++; $display("FAIL early release"); end
      sum_ack = 0; #1;
      checks++; if (ab_ack) begin failures++; $display("FAIL ack stuck"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
