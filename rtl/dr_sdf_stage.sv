// One stage of a radix-2 single-path delay-feedback (R2SDF) DIF FFT in
// 4-phase dual-rail logic.
//
// A stage with delay D = 2^LOGD receives tokens {re, im, idx}. Bit LOGD of the
// index tells the two halves of each 2D-sample group apart:
//   * first half  (bit 0): the input DEMUX sends x[n] through a MERGE into the
//     FIFO (mode (a) of the butterfly: push);
//   * second half (bit 1): the input DEMUX sends x[n+D] to the butterfly,
//     where it meets x[n] from the FIFO head. The sum x[n] + x[n+D] goes on to
//     the output; the difference x[n] - x[n+D] is fed back into the FIFO
//     (mode (b)).
// A second DEMUX at the FIFO head steers by the same bit: words of the first
// half go to the butterfly, differences (bit 1) are drained to the output
// through the twiddle unit, which multiplies by W8^k with k = (idx mod D) *
// 4/D. A MERGE joins the sums and the drained differences into an output
// latch. The last stage (LOGD = 0) has no twiddle unit.
//
// Both MERGEs see one active input at a time because the butterfly outputs are
// unlatched: the next word can reach the FIFO or the output only after the
// butterfly's previous result has been taken and its channel has returned to
// EMPTY. The FIFO holds D + 1 words (see dr_fifo). The data flow, the two
// butterfly modes, the FIFO lengths N/2, N/4, ..., 1 and the components
// (DEMUX, FIFO, adder/subtractor, twiddle, MERGE) follow the source design;
// steering by the carried index bit rather than a per-stage counter is this
// implementation's choice. No clock: every transfer is a 4-phase handshake.
//
// Latches and combinational loops reported by tools for this module are its
// C-elements (state-holding gates) and the request/acknowledge cycles of the
// 4-phase handshakes; a clockless circuit is built from exactly these.
module dr_sdf_stage #(
  parameter int unsigned LOGD    = 2,
  parameter bit          TWIDDLE = 1'b1,
  parameter int unsigned W       = dr_pkg::DATA_W,
  parameter int unsigned IW      = dr_pkg::IDX_W
) (
  input  logic              rst,
  input  logic [2*W+IW-1:0] in_t,
  input  logic [2*W+IW-1:0] in_f,
  output logic              in_ack,
  output logic [2*W+IW-1:0] out_t,
  output logic [2*W+IW-1:0] out_f,
  input  logic              out_ack
);
  localparam int unsigned TW = 2 * W + IW;
  localparam int unsigned D  = 1 << LOGD;

  logic [TW-1:0] fill_t, fill_f, bin_t, bin_f, fin_t, fin_f, head_t, head_f;
  logic [TW-1:0] bfa_t, bfa_f, drn_t, drn_f, rot_t, rot_f;
  logic [TW-1:0] sum_t, sum_f, dif_t, dif_f, mo_t, mo_f;
  logic fill_ack, bin_ack, fin_ack, head_ack, bfa_ack, drn_ack;
  logic sum_ack, dif_ack, mo_ack;

  // input steering
  dr_demux #(.W(TW)) u_in_demux (
    .rst(rst), .x_t(in_t), .x_f(in_f), .sel_t(in_t[LOGD]), .sel_f(in_f[LOGD]), .x_ack(in_ack),
    .y_t(fill_t), .y_f(fill_f), .y_ack(fill_ack),
    .z_t(bin_t),  .z_f(bin_f),  .z_ack(bin_ack)
  );

  // FIFO write side: new samples or butterfly differences
  dr_merge #(.W(TW)) u_fifo_merge (
    .rst(rst),
    .b_t(fill_t), .b_f(fill_f), .b_ack(fill_ack),
    .c_t(dif_t),  .c_f(dif_f),  .c_ack(dif_ack),
    .a_t(fin_t),  .a_f(fin_f),  .a_ack(fin_ack)
  );

  dr_fifo #(.DEPTH(D), .W(TW)) u_fifo (
    .rst(rst), .in_t(fin_t), .in_f(fin_f), .in_ack(fin_ack),
    .out_t(head_t), .out_f(head_f), .out_ack(head_ack)
  );

  // FIFO read side: to the butterfly or drained to the output
  dr_demux #(.W(TW)) u_head_demux (
    .rst(rst), .x_t(head_t), .x_f(head_f), .sel_t(head_t[LOGD]), .sel_f(head_f[LOGD]), .x_ack(head_ack),
    .y_t(bfa_t), .y_f(bfa_f), .y_ack(bfa_ack),
    .z_t(drn_t), .z_f(drn_f), .z_ack(drn_ack)
  );

  dr_butterfly #(.W(W), .IW(IW)) u_bfly (
    .rst(rst),
    .a_t(bfa_t), .a_f(bfa_f), .b_t(bin_t), .b_f(bin_f), .ab_ack(bfa_ack),
    .sum_t(sum_t), .sum_f(sum_f), .sum_ack(sum_ack),
    .diff_t(dif_t), .diff_f(dif_f), .diff_ack(dif_ack)
  );
  assign bin_ack = bfa_ack;

  if (TWIDDLE) begin : g_tw
    // k = (idx mod D) << (FFT_LOG_N - 1 - LOGD); a constant-0 bit of k is
    // VALID together with the index
    localparam int unsigned KSH = dr_pkg::FFT_LOG_N - 1 - LOGD;
    logic [1:0] k_t, k_f;
    for (genvar j = 0; j < 2; j++) begin : g_k
      if (j >= KSH && j - KSH < LOGD) begin : g_idx
        assign k_t[j] = drn_t[j - KSH];
        assign k_f[j] = drn_f[j - KSH];
      end else begin : g_zero
        assign k_t[j] = 1'b0;
        assign k_f[j] = drn_t[0] | drn_f[0];
      end
    end
    dr_twiddle #(.W(W)) u_tw (
      .rst(rst),
      .re_t(drn_t[IW + W +: W]), .re_f(drn_f[IW + W +: W]),
      .im_t(drn_t[IW +: W]),     .im_f(drn_f[IW +: W]),
      .k_t(k_t), .k_f(k_f),
      .ore_t(rot_t[IW + W +: W]), .ore_f(rot_f[IW + W +: W]),
      .oim_t(rot_t[IW +: W]),     .oim_f(rot_f[IW +: W])
    );
    assign rot_t[IW-1:0] = drn_t[IW-1:0];
    assign rot_f[IW-1:0] = drn_f[IW-1:0];
  end else begin : g_no_tw
    assign rot_t = drn_t;
    assign rot_f = drn_f;
  end

  // output: sums and drained differences
  dr_merge #(.W(TW)) u_out_merge (
    .rst(rst),
    .b_t(sum_t), .b_f(sum_f), .b_ack(sum_ack),
    .c_t(rot_t), .c_f(rot_f), .c_ack(drn_ack),
    .a_t(mo_t),  .a_f(mo_f),  .a_ack(mo_ack)
  );

  dr_pipe_stage #(.W(TW)) u_out_latch (
    .rst(rst), .in_t(mo_t), .in_f(mo_f), .in_ack(mo_ack),
    .out_t(out_t), .out_f(out_f), .out_ack(out_ack)
  );
endmodule
