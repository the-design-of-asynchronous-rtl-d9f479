// Dual-rail MERGE of two W-bit channels that are never active together.
//
// The output rails are the OR of the two input rails, as in the source
// design's MERGE truth table: EMPTY when both inputs are EMPTY, otherwise the
// value of the active input. The output acknowledge is routed back only to the
// active input: each input acknowledge is a C-element of out_ack and the
// completion of that input, so an idle sender never sees an acknowledge.
// The caller must guarantee that b and c are not VALID at the same time.
//
// Latches and combinational loops reported by tools for this module are its
// C-elements (state-holding gates) and the request/acknowledge cycles of the
// 4-phase handshakes; a clockless circuit is built from exactly these.
module dr_merge #(
  parameter int unsigned W = 16
) (
  input  logic         rst,
  input  logic [W-1:0] b_t,
  input  logic [W-1:0] b_f,
  output logic         b_ack,
  input  logic [W-1:0] c_t,
  input  logic [W-1:0] c_f,
  output logic         c_ack,
  output logic [W-1:0] a_t,
  output logic [W-1:0] a_f,
  input  logic         a_ack
);
  logic b_done, c_done;
  assign a_t = b_t | c_t;
  assign a_f = b_f | c_f;
  dr_completion #(.W(W)) u_cdb (.rst(rst), .d_t(b_t), .d_f(b_f), .done(b_done));
  dr_completion #(.W(W)) u_cdc (.rst(rst), .d_t(c_t), .d_f(c_f), .done(c_done));
  c_element u_ab (.rst(rst), .in({a_ack, b_done}), .z(b_ack));
  c_element u_ac (.rst(rst), .in({a_ack, c_done}), .z(c_ack));

  // Mutual exclusion of the two inputs (no bit of both may be set).
  always_comb begin
    if (!rst) assert (((b_t | b_f) & (c_t | c_f)) == '0)
      else $error("dr_merge: both inputs active");
  end
endmodule
