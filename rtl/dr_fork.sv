// Dual-rail FORK of one W-bit channel into two.
//
// The rails are copied to both outputs; a C-element joins the two output
// acknowledges, so the sender sees its acknowledge rise only after both
// receivers took the word and fall only after both took the spacer. This is
// the source design's FORK exactly.
//
// Latches and combinational loops reported by tools for this module are its
// C-elements (state-holding gates) and the request/acknowledge cycles of the
// 4-phase handshakes; a clockless circuit is built from exactly these.
module dr_fork #(
  parameter int unsigned W = 16
) (
  input  logic         rst,
  input  logic [W-1:0] a_t,
  input  logic [W-1:0] a_f,
  output logic         a_ack,
  output logic [W-1:0] b_t,
  output logic [W-1:0] b_f,
  input  logic         b_ack,
  output logic [W-1:0] c_t,
  output logic [W-1:0] c_f,
  input  logic         c_ack
);
  assign b_t = a_t;
  assign b_f = a_f;
  assign c_t = a_t;
  assign c_f = a_f;
  c_element u_c (.rst(rst), .in({b_ack, c_ack}), .z(a_ack));
endmodule
