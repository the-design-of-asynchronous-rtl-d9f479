// Dual-rail DEMUX: steers a W-bit channel x to y (select false) or z
// (select true).
//
// Every output rail is a C-element of the data rail and one select rail, which
// is the source design's DEMUX truth table: an output becomes VALID when data
// and the matching select value are both VALID, returns to EMPTY when both are
// EMPTY, and otherwise holds. The acknowledge of the chosen output is returned
// to the data and select senders (x_ack = y_ack | z_ack; only one output is
// ever active). The select may be one of the bits of x itself.
//
// Latches and combinational loops reported by tools for this module are its
// C-elements (state-holding gates) and the request/acknowledge cycles of the
// 4-phase handshakes; a clockless circuit is built from exactly these.
module dr_demux #(
  parameter int unsigned W = 16
) (
  input  logic         rst,
  input  logic [W-1:0] x_t,
  input  logic [W-1:0] x_f,
  input  logic         sel_t,
  input  logic         sel_f,
  output logic         x_ack,
  output logic [W-1:0] y_t,
  output logic [W-1:0] y_f,
  input  logic         y_ack,
  output logic [W-1:0] z_t,
  output logic [W-1:0] z_f,
  input  logic         z_ack
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    c_element u_yt (.rst(rst), .in({x_t[i], sel_f}), .z(y_t[i]));
    c_element u_yf (.rst(rst), .in({x_f[i], sel_f}), .z(y_f[i]));
    c_element u_zt (.rst(rst), .in({x_t[i], sel_t}), .z(z_t[i]));
    c_element u_zf (.rst(rst), .in({x_f[i], sel_t}), .z(z_f[i]));
  end
  assign x_ack = y_ack | z_ack;
endmodule
