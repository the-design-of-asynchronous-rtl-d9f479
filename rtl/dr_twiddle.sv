// Twiddle-factor unit of the 8-point FFT: (re + j im) * W8^k, k = 0..3, in
// dual-rail delay-insensitive logic, without a multiplier.
//
// With K = sqrt(2)/2 (dr_sqrt2_scale):
//   k=0: ( re,        im       )     k=1: ( K(re+im),  K(im-re) )
//   k=2: ( im,       -re       )     k=3: ( K(im-re), -K(re+im) )
// Bit 0 of k chooses between (re, im) and (K(re+im), K(im-re)) giving (p, q);
// bit 1 then chooses between (p, q) and (q, -p). All candidates are computed
// and the choice is made by dr_sel2, so the outputs become VALID when the data
// and k are VALID and EMPTY when they are EMPTY. No acknowledge passes through
// this block; it sits inside a channel. The W8^k values, the shift-and-add
// constant and the avoidance of multipliers follow the source design; the
// order of operations and the truncation are this implementation's. Results
// wrap to W bits.
//
// Latches and combinational loops reported by tools for this module are its
// C-elements (state-holding gates) and the request/acknowledge cycles of the
// 4-phase handshakes; a clockless circuit is built from exactly these.
module dr_twiddle #(
  parameter int unsigned W = 16
) (
  input  logic         rst,
  input  logic [W-1:0] re_t,
  input  logic [W-1:0] re_f,
  input  logic [W-1:0] im_t,
  input  logic [W-1:0] im_f,
  input  logic [1:0]   k_t,
  input  logic [1:0]   k_f,
  output logic [W-1:0] ore_t,
  output logic [W-1:0] ore_f,
  output logic [W-1:0] oim_t,
  output logic [W-1:0] oim_f
);
  logic [W-1:0] s_t, s_f, d_t, d_f, ks_t, ks_f, kd_t, kd_f;
  logic [W-1:0] p_t, p_f, q_t, q_f, np_t, np_f, z_f;

  dr_adder #(.W(W), .SUB(1'b0)) u_sum  (.rst(rst), .a_t(re_t), .a_f(re_f), .b_t(im_t), .b_f(im_f), .s_t(s_t), .s_f(s_f));
  dr_adder #(.W(W), .SUB(1'b1)) u_diff (.rst(rst), .a_t(im_t), .a_f(im_f), .b_t(re_t), .b_f(re_f), .s_t(d_t), .s_f(d_f));
  dr_sqrt2_scale #(.W(W)) u_ks (.rst(rst), .v_t(s_t), .v_f(s_f), .y_t(ks_t), .y_f(ks_f));
  dr_sqrt2_scale #(.W(W)) u_kd (.rst(rst), .v_t(d_t), .v_f(d_f), .y_t(kd_t), .y_f(kd_f));

  dr_sel2 #(.W(W)) u_sel_p (.rst(rst), .s_t(k_t[0]), .s_f(k_f[0]), .a_t(re_t), .a_f(re_f), .b_t(ks_t), .b_f(ks_f), .y_t(p_t), .y_f(p_f));
  dr_sel2 #(.W(W)) u_sel_q (.rst(rst), .s_t(k_t[0]), .s_f(k_f[0]), .a_t(im_t), .a_f(im_f), .b_t(kd_t), .b_f(kd_f), .y_t(q_t), .y_f(q_f));

  // -p = 0 - p; the constant 0 is VALID exactly when bit 0 of p is
  assign z_f = {W{p_t[0] | p_f[0]}};
  dr_adder #(.W(W), .SUB(1'b1)) u_neg (.rst(rst), .a_t('0), .a_f(z_f), .b_t(p_t), .b_f(p_f), .s_t(np_t), .s_f(np_f));

  dr_sel2 #(.W(W)) u_sel_re (.rst(rst), .s_t(k_t[1]), .s_f(k_f[1]), .a_t(p_t), .a_f(p_f), .b_t(q_t),  .b_f(q_f),  .y_t(ore_t), .y_f(ore_f));
  dr_sel2 #(.W(W)) u_sel_im (.rst(rst), .s_t(k_t[1]), .s_f(k_f[1]), .a_t(q_t), .a_f(q_f), .b_t(np_t), .b_f(np_f), .y_t(oim_t), .y_f(oim_f));
endmodule
