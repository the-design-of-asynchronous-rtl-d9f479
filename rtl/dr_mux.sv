// Dual-rail MUX: passes channel a (select false) or b (select true) to y.
//
// The select is a dual-rail channel of its own. Each data rail is gated by a
// C-element with the matching select rail, so only the chosen input can reach
// the output; the two gated channels are then combined by a dr_merge, which
// also returns the output acknowledge to the chosen input only. The select
// channel is acknowledged together with the data (sel_ack = y_ack). The source
// design gives the MUX's function and builds it from its DEMUX; the gating
// plus MERGE structure is this implementation's.
//
// Latches and combinational loops reported by tools for this module are its
// C-elements (state-holding gates) and the request/acknowledge cycles of the
// 4-phase handshakes; a clockless circuit is built from exactly these.
module dr_mux #(
  parameter int unsigned W = 16
) (
  input  logic         rst,
  input  logic [W-1:0] a_t,
  input  logic [W-1:0] a_f,
  output logic         a_ack,
  input  logic [W-1:0] b_t,
  input  logic [W-1:0] b_f,
  output logic         b_ack,
  input  logic         sel_t,
  input  logic         sel_f,
  output logic         sel_ack,
  output logic [W-1:0] y_t,
  output logic [W-1:0] y_f,
  input  logic         y_ack
);
  logic [W-1:0] ga_t, ga_f, gb_t, gb_f;
  for (genvar i = 0; i < W; i++) begin : g_bit
    c_element u_at (.rst(rst), .in({a_t[i], sel_f}), .z(ga_t[i]));
    c_element u_af (.rst(rst), .in({a_f[i], sel_f}), .z(ga_f[i]));
    c_element u_bt (.rst(rst), .in({b_t[i], sel_t}), .z(gb_t[i]));
    c_element u_bf (.rst(rst), .in({b_f[i], sel_t}), .z(gb_f[i]));
  end
  dr_merge #(.W(W)) u_merge (
    .rst(rst),
    .b_t(ga_t), .b_f(ga_f), .b_ack(a_ack),
    .c_t(gb_t), .c_f(gb_f), .c_ack(b_ack),
    .a_t(y_t),  .a_f(y_f),  .a_ack(y_ack)
  );
  assign sel_ack = y_ack;
endmodule
