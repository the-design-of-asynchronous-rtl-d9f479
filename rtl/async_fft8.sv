// Asynchronous 8-point radix-2 DIF FFT processor, single-path delay feedback,
// 4-phase dual-rail, 16-bit complex data.
//
// Input and output are 4-phase dual-rail channels: the sender makes a sample
// VALID on the rails, waits for the acknowledge to rise, returns all rails to
// EMPTY and waits for the acknowledge to fall. Samples enter in natural order
// x[0..7]; results leave in bit-reversed order, each with its output index
// tag p (0..7 within the frame) on out_idx: the result carries X[bitrev3(p)].
// Frames may follow each other without a gap; the last frame drains without
// further input.
//
// Structure: a control counter (dr_index_counter) tags every input sample
// with its index; three dr_sdf_stage instances with FIFO lengths 4, 2 and 1
// follow, with twiddle units (W8^0..3, then W8^0 and W8^2) after the first
// two. There is no clock; rst puts every C-element into the EMPTY state and
// clears the counter. No scaling is applied between stages: results wrap at
// 16 bits, so inputs must be small enough for the sum of eight samples to fit.
// The 8-point R2SDF structure, the dual-rail encoding, the data width and
// the shift-and-add twiddle follow the source design; the index tag is this
// implementation's steering mechanism.
//
// Latches and combinational loops reported by tools for this module are its
// C-elements (state-holding gates) and the request/acknowledge cycles of the
// 4-phase handshakes; a clockless circuit is built from exactly these.
module async_fft8 #(
  parameter int unsigned W = dr_pkg::DATA_W
) (
  input  logic                        rst,
  input  logic [W-1:0]                in_re_t,
  input  logic [W-1:0]                in_re_f,
  input  logic [W-1:0]                in_im_t,
  input  logic [W-1:0]                in_im_f,
  output logic                        in_ack,
  output logic [W-1:0]                out_re_t,
  output logic [W-1:0]                out_re_f,
  output logic [W-1:0]                out_im_t,
  output logic [W-1:0]                out_im_f,
  output logic [dr_pkg::IDX_W-1:0]    out_idx_t,
  output logic [dr_pkg::IDX_W-1:0]    out_idx_f,
  input  logic                        out_ack,
  output logic [dr_pkg::IDX_W-1:0]    in_count
);
  import dr_pkg::*;
  localparam int unsigned TW = 2 * W + IDX_W;
  localparam int unsigned NS = FFT_LOG_N;

  logic              in_valid;
  logic [IDX_W-1:0]  idx_t, idx_f;
  logic [TW-1:0]     s_t [NS+1];
  logic [TW-1:0]     s_f [NS+1];
  logic              s_ack [NS+1];

  dr_completion #(.W(2 * W)) u_in_cd (
    .rst(rst), .d_t({in_re_t, in_im_t}), .d_f({in_re_f, in_im_f}), .done(in_valid)
  );
  dr_index_counter #(.IW(IDX_W)) u_cnt (
    .rst(rst), .data_valid(in_valid), .ack(in_ack), .idx_t(idx_t), .idx_f(idx_f), .count(in_count)
  );

  assign s_t[0] = {in_re_t, in_im_t, idx_t};
  assign s_f[0] = {in_re_f, in_im_f, idx_f};
  assign in_ack = s_ack[0];

  for (genvar s = 0; s < NS; s++) begin : g_stage
    localparam int unsigned LOGD = NS - 1 - s;
    dr_sdf_stage #(.LOGD(LOGD), .TWIDDLE(LOGD != 0), .W(W), .IW(IDX_W)) u_stage (
      .rst(rst), .in_t(s_t[s]), .in_f(s_f[s]), .in_ack(s_ack[s]),
      .out_t(s_t[s+1]), .out_f(s_f[s+1]), .out_ack(s_ack[s+1])
    );
  end

  assign out_re_t  = s_t[NS][IDX_W + W +: W];
  assign out_re_f  = s_f[NS][IDX_W + W +: W];
  assign out_im_t  = s_t[NS][IDX_W +: W];
  assign out_im_f  = s_f[NS][IDX_W +: W];
  assign out_idx_t = s_t[NS][IDX_W-1:0];
  assign out_idx_f = s_f[NS][IDX_W-1:0];
  assign s_ack[NS] = out_ack;
endmodule
