// Tests dr_twiddle: random complex values, every k = 0..3. The result must
// equal the reference (re + j im) * W8^k computed with the same
// shift-and-add sqrt(2)/2, and lie within 7 LSB of the exact product (each of the six shifted terms truncates). The
// outputs must stay EMPTY until k is VALID and return to EMPTY afterwards.
module tb_dr_twiddle;
  localparam int W = 16;
  localparam real PI = 3.14159265358979;
  logic rst = 1'b1;
  logic [W-1:0] re_t = '0, re_f = '0, im_t = '0, im_f = '0;
  logic [1:0] k_t = '0, k_f = '0;
  logic [W-1:0] ore_t, ore_f, oim_t, oim_f;
  int checks = 0, failures = 0;

  dr_twiddle #(.W(W)) dut (.*);

  function automatic int wrap16(int v); return int'(signed'(16'(v))); endfunction
  function automatic int ksc(int v);
    return wrap16((v >>> 1) + (v >>> 3) + (v >>> 4) + (v >>> 6) + (v >>> 8) + (v >>> 14));
  endfunction

  initial begin
    #1 rst = 1'b0; #1;
    for (int r = 0; r < 200; r++) begin
      int re, im, k, er, ei, gr, gi;
      real xr, xi;
      re = int'($urandom_range(0, 20000)) - 10000;
      im = int'($urandom_range(0, 20000)) - 10000;
      k = r % 4;
      case (k)
        0: begin er = re; ei = im; end
        1: begin er = ksc(wrap16(re + im)); ei = ksc(wrap16(im - re)); end
        2: begin er = im; ei = wrap16(-re); end
        default: begin er = ksc(wrap16(im - re)); ei = wrap16(-ksc(wrap16(re + im))); end
      endcase
      re_t = W'(re); re_f = ~W'(re); im_t = W'(im); im_f = ~W'(im);
      #1; checks++;
      if ((ore_t | ore_f | oim_t | oim_f) != '0) begin failures++; $display("FAIL output before k"); end
      k_t = 2'(k); k_f = ~2'(k);
      #1;
      gr = int'(signed'(ore_t)); gi = int'(signed'(oim_t));
      checks++;
      if (gr != er || gi != ei || ore_f !== ~ore_t || oim_f !== ~oim_t) begin
        failures++; $display("FAIL k=%0d (%0d,%0d): got (%0d,%0d) exp (%0d,%0d)", k, re, im, gr, gi, er, ei);
      end
      xr = real'(re) * $cos(PI * k / 4.0) + real'(im) * $sin(PI * k / 4.0);
      xi = real'(im) * $cos(PI * k / 4.0) - real'(re) * $sin(PI * k / 4.0);
      checks++;
      if (real'(gr) - xr > 7.0 || xr - real'(gr) > 7.0 || real'(gi) - xi > 7.0 || xi - real'(gi) > 7.0) begin
        failures++; $display("FAIL k=%0d accuracy: got (%0d,%0d) exact (%f,%f)", k, gr, gi, xr, xi);
      end
      re_t = '0; re_f = '0; im_t = '0; im_f = '0; k_t = '0; k_f = '0; #1;
      checks++;
      if ((ore_t | ore_f | oim_t | oim_f) != '0) begin failures++; $display("FAIL not EMPTY"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
