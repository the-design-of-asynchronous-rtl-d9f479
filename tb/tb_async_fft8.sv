// End-to-end test of the asynchronous 8-point FFT at its default size.
//
// A 4-phase dual-rail sender streams FRAMES frames of eight random complex
// samples (small enough that no 16-bit result wraps); a receiver with random
// response delays takes the results. Every result is compared with
//   * a bit-exact behavioural model of the radix-2 DIF SDF algorithm with the
//     same shift-and-add sqrt(2)/2 (bit-reversed output order), and
//   * a floating-point DFT, within 16 LSB (truncation of the shift-and-add constant),
// and its output index tag must equal its position in the frame. The test also
// counts how often each mechanism occurred (FIFO pushes of new samples,
// butterfly operations, drained differences, each non-trivial twiddle,
// back-pressure on the input and on the output, a frame following another
// without a gap) and fails if one never did.
module tb_async_fft8;
  localparam int W = 16;
  localparam int FRAMES = 6;
  localparam real PI = 3.14159265358979;

  logic rst = 1'b0;
  initial #1 rst = 1'b1;   // a real rising edge for the counter's asynchronous reset
  logic [W-1:0] in_re_t = '0, in_re_f = '0, in_im_t = '0, in_im_f = '0;
  logic in_ack;
  logic [W-1:0] out_re_t, out_re_f, out_im_t, out_im_f;
  logic [2:0] out_idx_t, out_idx_f, in_count;
  logic out_ack = 1'b0;

  async_fft8 dut (.*);

  int checks = 0, failures = 0;
  int x_re [FRAMES][8];
  int x_im [FRAMES][8];

  // ---------------- reference model ----------------
  function automatic int wrap16(int v);
    return int'(signed'(16'(v)));
  endfunction
  function automatic int ksc(int v);   // sqrt(2)/2 by shifts, per term floor
    int r;
    r = (v >>> 1) + (v >>> 3) + (v >>> 4) + (v >>> 6) + (v >>> 8) + (v >>> 14);
    return wrap16(r);
  endfunction
  function automatic void rot(input int re, input int im, input int k, output int ore, output int oim);
    int p, q;
    if (k % 2 == 1) begin p = ksc(wrap16(re + im)); q = ksc(wrap16(im - re)); end
    else begin p = re; q = im; end
    if (k >= 2) begin ore = q; oim = wrap16(-p); end
    else begin ore = p; oim = q; end
  endfunction
  function automatic int bitrev3(int v);
    return ((v & 1) << 2) | (v & 2) | ((v >> 2) & 1);
  endfunction

  int ref_re [FRAMES][8];
  int ref_im [FRAMES][8];
  task automatic build_ref(int fr);
    int re [8]; int im [8]; int nre [8]; int nim [8];
    for (int n = 0; n < 8; n++) begin re[n] = x_re[fr][n]; im[n] = x_im[fr][n]; end
    for (int ld = 2; ld >= 0; ld--) begin
      int d = 1 << ld;
      for (int g = 0; g < 8; g += 2 * d)
        for (int n = 0; n < d; n++) begin
          int ar = re[g+n], ai = im[g+n], br = re[g+n+d], bi = im[g+n+d];
          nre[g+n] = wrap16(ar + br); nim[g+n] = wrap16(ai + bi);
          rot(wrap16(ar - br), wrap16(ai - bi), n * (4 / d), nre[g+n+d], nim[g+n+d]);
        end
      re = nre; im = nim;
    end
    for (int p = 0; p < 8; p++) begin ref_re[fr][p] = re[p]; ref_im[fr][p] = im[p]; end
  endtask

  // ---------------- mechanism counters ----------------
  int n_fill [3], n_bfly [3], n_drain [3];
  int n_tw_k [4];
  int n_in_stall = 0, n_out_stall = 0, n_back_to_back = 0;
  for (genvar s = 0; s < 3; s++) begin : g_mon
    always @(posedge dut.g_stage[s].u_stage.fill_ack) n_fill[s]++;
    always @(posedge dut.g_stage[s].u_stage.bfa_ack)  n_bfly[s]++;
    always @(posedge dut.g_stage[s].u_stage.drn_ack)  n_drain[s]++;
  end
  always @(posedge dut.g_stage[0].u_stage.drn_ack)
    n_tw_k[{dut.g_stage[0].u_stage.drn_t[1], dut.g_stage[0].u_stage.drn_t[0]}]++;

  // ---------------- sender ----------------
  logic sending_done = 1'b0;
  initial begin
    for (int fr = 0; fr < FRAMES; fr++)
      for (int n = 0; n < 8; n++) begin
        x_re[fr][n] = int'($urandom_range(0, 1200)) - 600;
        x_im[fr][n] = int'($urandom_range(0, 1200)) - 600;
      end
    // first frame: a single impulse and a constant are easy to read in a waveform
    for (int n = 0; n < 8; n++) begin x_re[0][n] = (n == 0) ? 1000 : 0; x_im[0][n] = 0; end
    for (int fr = 0; fr < FRAMES; fr++) build_ref(fr);
    #10 rst = 1'b0;
    #10;
    for (int fr = 0; fr < FRAMES; fr++)
      for (int n = 0; n < 8; n++) begin
        logic [W-1:0] r, i;
        int waited;
        r = W'(x_re[fr][n]); i = W'(x_im[fr][n]);
        in_re_t = r; in_re_f = ~r; in_im_t = i; in_im_f = ~i;
        waited = 0;
        while (!in_ack) begin #1; waited++; end
        if (waited > 2) n_in_stall++;
        #1;
        in_re_t = '0; in_re_f = '0; in_im_t = '0; in_im_f = '0;
        wait (!in_ack);
        if (n == 0 && fr > 0) n_back_to_back++;
        // fast sender for most frames, slower in frame 3
        if (fr == 3) #($urandom_range(1, 40)); else #1;
      end
    sending_done = 1'b1;
  end

  // ---------------- receiver ----------------
  initial begin
    wait (!rst);
    for (int fr = 0; fr < FRAMES; fr++)
      for (int p = 0; p < 8; p++) begin
        int gr, gi, gidx;
        real er, ei;
        wait ((&(out_re_t | out_re_f)) && (&(out_im_t | out_im_f)) && (&(out_idx_t | out_idx_f)));
        #1;
        gr = int'(signed'(out_re_t)); gi = int'(signed'(out_im_t)); gidx = int'(out_idx_t);
        checks++;
        if (gr != ref_re[fr][p] || gi != ref_im[fr][p] || gidx != p) begin
          failures++;
          $display("FAIL frame %0d pos %0d: got (%0d,%0d) idx %0d, expected (%0d,%0d) idx %0d",
                   fr, p, gr, gi, gidx, ref_re[fr][p], ref_im[fr][p], p);
        end
        // floating-point DFT of bin bitrev(p)
        er = 0.0; ei = 0.0;
        for (int n = 0; n < 8; n++) begin
          real ang;
          ang = -2.0 * PI * real'(n * bitrev3(p)) / 8.0;
          er += real'(x_re[fr][n]) * $cos(ang) - real'(x_im[fr][n]) * $sin(ang);
          ei += real'(x_re[fr][n]) * $sin(ang) + real'(x_im[fr][n]) * $cos(ang);
        end
        checks++;
        if ((real'(gr) - er) > 16.0 || (er - real'(gr)) > 16.0 || (real'(gi) - ei) > 16.0 || (ei - real'(gi)) > 16.0) begin
          failures++;
          $display("FAIL frame %0d bin %0d: got (%0d,%0d), DFT (%f,%f)", fr, bitrev3(p), gr, gi, er, ei);
        end
        // slow receiver in frames 1 and 2: results queue up inside the stages
        if (fr == 1 || fr == 2) begin #($urandom_range(20, 60)); n_out_stall++; end
        out_ack = 1'b1;
        wait (!((|(out_re_t | out_re_f)) || (|(out_im_t | out_im_f)) || (|(out_idx_t | out_idx_f))));
        #1 out_ack = 1'b0;
      end
    #20;
    // every mechanism must have occurred
    for (int s = 0; s < 3; s++) begin
      checks += 3;
      if (n_fill[s] != 4 * FRAMES)  begin failures++; $display("FAIL stage %0d pushes %0d", s, n_fill[s]); end
      if (n_bfly[s] != 4 * FRAMES)  begin failures++; $display("FAIL stage %0d butterflies %0d", s, n_bfly[s]); end
      if (n_drain[s] != 4 * FRAMES) begin failures++; $display("FAIL stage %0d drains %0d", s, n_drain[s]); end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_tw_k[k] != FRAMES) begin failures++; $display("FAIL twiddle k=%0d used %0d times", k, n_tw_k[k]); end
    end
    checks += 3;
    if (n_in_stall == 0)     begin failures++; $display("FAIL no input back-pressure seen"); end
    if (n_out_stall == 0)    begin failures++; $display("FAIL no output stall seen"); end
    if (n_back_to_back == 0) begin failures++; $display("FAIL no back-to-back frames"); end
    checks++;
    if (!sending_done) begin failures++; $display("FAIL sender not finished"); end
    $display("mechanisms: pushes %0d/%0d/%0d butterflies %0d/%0d/%0d drains %0d/%0d/%0d twiddle k0..3 %0d %0d %0d %0d input stalls %0d output stalls %0d back-to-back %0d",
             n_fill[0], n_fill[1], n_fill[2], n_bfly[0], n_bfly[1], n_bfly[2], n_drain[0], n_drain[1], n_drain[2],
             n_tw_k[0], n_tw_k[1], n_tw_k[2], n_tw_k[3], n_in_stall, n_out_stall, n_back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
