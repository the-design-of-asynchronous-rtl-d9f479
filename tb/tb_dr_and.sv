// Tests dr_and: for every pair of input values the output becomes the AND
// of the two, stays put while only one input has returned to EMPTY, and
// returns to EMPTY when both have. Inputs arrive in either order.
module tb_dr_and;
  logic rst = 1'b1;
  logic x_t = 0, x_f = 0, y_t = 0, y_f = 0, z_t, z_f;
  int checks = 0, failures = 0;
  dr_and dut (.*);
  initial begin
    #1 rst = 1'b0; #1;
    for (int r = 0; r < 64; r++) begin
      logic xv, yv, first;
      xv = 1'($urandom); yv = 1'($urandom); first = 1'($urandom);
      if (first) begin x_t = xv; x_f = !xv; end else begin y_t = yv; y_f = !yv; end
      #1; checks++;
      if (z_t || z_f) begin failures++; $display("FAIL output before both inputs"); end
      if (first) begin y_t = yv; y_f = !yv; end else begin x_t = xv; x_f = !xv; end
      #1; checks++;
      if (z_t !== (xv & yv) || z_f !== !(xv & yv)) begin failures++; $display("FAIL %b&%b -> t%b f%b", xv, yv, z_t, z_f); end
      x_t = 0; x_f = 0; #1; checks++;
      if (z_t !== (xv & yv) || z_f !== !(xv & yv)) begin failures++; $display("FAIL no hold"); end
      y_t = 0; y_f = 0; #1; checks++;
      if (z_t || z_f) begin failures++; $display("FAIL not EMPTY"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
