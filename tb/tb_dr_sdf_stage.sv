// Tests one dr_sdf_stage with its default delay D = 4 and twiddle unit. Four
// groups of eight tagged samples (tags 0..7) are streamed in; for each group
// the stage must output, in this order, x[n] + x[n+4] (n = 0..3, tag n) and
// (x[n] - x[n+4]) * W8^n (tag n+4), bit-exact against a behavioural model.
// The receiver stalls at random, so words queue up in the stage. The first
// output may not appear before the fifth input has been offered.
module tb_dr_sdf_stage;
  localparam int W = 16, IW = 3, TW = 2 * W + IW, G = 4;
  logic rst = 1'b1;
  logic [TW-1:0] in_t = '0, in_f = '0, out_t, out_f;
  logic in_ack, out_ack = 1'b0;
  int checks = 0, failures = 0;
  int xr [G][8]; int xi [G][8];
  int n_sent = 0;

  dr_sdf_stage dut (.*);

  function automatic int wrap16(int v); return int'(signed'(16'(v))); endfunction
  function automatic int ksc(int v);
    return wrap16((v >>> 1) + (v >>> 3) + (v >>> 4) + (v >>> 6) + (v >>> 8) + (v >>> 14));
  endfunction
  function automatic void rot(input int re, input int im, input int k, output int ore, output int oim);
    int p, q;
    if (k % 2 == 1) begin p = ksc(wrap16(re + im)); q = ksc(wrap16(im - re)); end
    else begin p = re; q = im; end
    if (k >= 2) begin ore = q; oim = wrap16(-p); end else begin ore = p; oim = q; end
  endfunction

  initial begin
    for (int g = 0; g < G; g++)
      for (int n = 0; n < 8; n++) begin
        xr[g][n] = int'($urandom_range(0, 8000)) - 4000;
        xi[g][n] = int'($urandom_range(0, 8000)) - 4000;
      end
    #2 rst = 1'b0; #1;
    fork
      for (int g = 0; g < G; g++)
        for (int n = 0; n < 8; n++) begin
          logic [TW-1:0] v;
          v = {W'(xr[g][n]), W'(xi[g][n]), IW'(n)};
          in_t = v; in_f = ~v;
          wait (in_ack); #1;
          n_sent++;
          in_t = '0; in_f = '0;
          wait (!in_ack); #($urandom_range(1, 4));
        end
      for (int g = 0; g < G; g++)
        for (int p = 0; p < 8; p++) begin
          int er, ei, gr, gi, gx;
          wait (&(out_t | out_f)); #1;
          if (g == 0 && p == 0) begin
            checks++;
            if (n_sent < 4) begin failures++; $display("FAIL output before the butterfly input"); end
          end
          if (p < 4) begin er = wrap16(xr[g][p] + xr[g][p+4]); ei = wrap16(xi[g][p] + xi[g][p+4]); end
          else rot(wrap16(xr[g][p-4] - xr[g][p]), wrap16(xi[g][p-4] - xi[g][p]), p - 4, er, ei);
          gr = int'(signed'(out_t[TW-1 -: W])); gi = int'(signed'(out_t[IW +: W])); gx = int'(out_t[IW-1:0]);
          checks++;
          if (gr != er || gi != ei || gx != p || out_f !== ~out_t) begin
            failures++; $display("FAIL group %0d pos %0d got (%0d,%0d) tag %0d exp (%0d,%0d) tag %0d", g, p, gr, gi, gx, er, ei, p);
          end
          #($urandom_range(1, 30));
          out_ack = 1'b1;
          wait ((out_t | out_f) == '0); #1;
          out_ack = 1'b0;
        end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
