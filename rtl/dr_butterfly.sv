// Radix-2 DIF butterfly on dual-rail complex tokens {re, im, idx}.
//
// Channel a carries x[n] (from the FIFO head), channel b carries x[n+D]
// (from the stage input). The two are joined (their rails side by side, one
// acknowledge for both) and forked (dr_fork) to an adder pair producing
// sum = a + b and a subtractor pair producing diff = a - b, each on 16-bit
// real and imaginary parts, results wrapping. The sum keeps a's index tag and
// the difference b's, so the downstream steering sees which half each belongs
// to. The outputs are not latched here: a and b are acknowledged only after
// both receivers have taken their results, and released only after both have
// taken the spacer. The source design describes the add/subtract pair and the
// two modes; the tag passing and the unlatched outputs are this
// implementation's.
//
// Latches and combinational loops reported by tools for this module are its
// C-elements (state-holding gates) and the request/acknowledge cycles of the
// 4-phase handshakes; a clockless circuit is built from exactly these.
module dr_butterfly #(
  parameter int unsigned W  = 16,
  parameter int unsigned IW = 3
) (
  input  logic                rst,
  input  logic [2*W+IW-1:0]   a_t,
  input  logic [2*W+IW-1:0]   a_f,
  input  logic [2*W+IW-1:0]   b_t,
  input  logic [2*W+IW-1:0]   b_f,
  output logic                ab_ack,
  output logic [2*W+IW-1:0]   sum_t,
  output logic [2*W+IW-1:0]   sum_f,
  input  logic                sum_ack,
  output logic [2*W+IW-1:0]   diff_t,
  output logic [2*W+IW-1:0]   diff_f,
  input  logic                diff_ack
);
  localparam int unsigned TW = 2 * W + IW;
  localparam int unsigned JW = 2 * TW;

  // join: {a, b}
  logic [JW-1:0] j_t, j_f, p_t, p_f, m_t, m_f;
  assign j_t = {a_t, b_t};
  assign j_f = {a_f, b_f};

  dr_fork #(.W(JW)) u_fork (
    .rst(rst), .a_t(j_t), .a_f(j_f), .a_ack(ab_ack),
    .b_t(p_t), .b_f(p_f), .b_ack(sum_ack),
    .c_t(m_t), .c_f(m_f), .c_ack(diff_ack)
  );

  // field positions inside a joined copy
  localparam int unsigned A_RE = TW + IW + W;
  localparam int unsigned A_IM = TW + IW;
  localparam int unsigned B_RE = IW + W;
  localparam int unsigned B_IM = IW;

  dr_adder #(.W(W), .SUB(1'b0)) u_add_re (.rst(rst),
    .a_t(p_t[A_RE +: W]), .a_f(p_f[A_RE +: W]), .b_t(p_t[B_RE +: W]), .b_f(p_f[B_RE +: W]),
    .s_t(sum_t[IW + W +: W]), .s_f(sum_f[IW + W +: W]));
  dr_adder #(.W(W), .SUB(1'b0)) u_add_im (.rst(rst),
    .a_t(p_t[A_IM +: W]), .a_f(p_f[A_IM +: W]), .b_t(p_t[B_IM +: W]), .b_f(p_f[B_IM +: W]),
    .s_t(sum_t[IW +: W]), .s_f(sum_f[IW +: W]));
  dr_adder #(.W(W), .SUB(1'b1)) u_sub_re (.rst(rst),
    .a_t(m_t[A_RE +: W]), .a_f(m_f[A_RE +: W]), .b_t(m_t[B_RE +: W]), .b_f(m_f[B_RE +: W]),
    .s_t(diff_t[IW + W +: W]), .s_f(diff_f[IW + W +: W]));
  dr_adder #(.W(W), .SUB(1'b1)) u_sub_im (.rst(rst),
    .a_t(m_t[A_IM +: W]), .a_f(m_f[A_IM +: W]), .b_t(m_t[B_IM +: W]), .b_f(m_f[B_IM +: W]),
    .s_t(diff_t[IW +: W]), .s_f(diff_f[IW +: W]));

  assign sum_t[IW-1:0]  = p_t[TW +: IW];
  assign sum_f[IW-1:0]  = p_f[TW +: IW];
  assign diff_t[IW-1:0] = m_t[0 +: IW];
  assign diff_f[IW-1:0] = m_f[0 +: IW];
endmodule
