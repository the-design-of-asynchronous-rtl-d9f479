// One stage of a 4-phase dual-rail pipeline, W bits wide.
//
// Every rail is a Muller-pipeline stage: a C-element of the incoming rail and
// the inverted acknowledge of the next stage. The stage therefore takes a VALID
// word only after the next stage has gone EMPTY (out_ack low) and takes the
// EMPTY spacer only after the next stage has captured the word (out_ack high).
// The acknowledge returned to the sender is the completion of the stored word
// (see dr_completion), so it rises when all bits are VALID and falls when all
// are EMPTY. The structure follows the source design's dual-rail pipeline; the
// W-bit completion detector is used instead of a per-bit OR.
//
// Latches and combinational loops reported by tools for this module are its
// C-elements (state-holding gates) and the request/acknowledge cycles of the
// 4-phase handshakes; a clockless circuit is built from exactly these.
module dr_pipe_stage #(
  parameter int unsigned W = 16
) (
  input  logic         rst,
  input  logic [W-1:0] in_t,
  input  logic [W-1:0] in_f,
  output logic         in_ack,
  output logic [W-1:0] out_t,
  output logic [W-1:0] out_f,
  input  logic         out_ack
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    c_element u_ct (.rst(rst), .in({in_t[i], ~out_ack}), .z(out_t[i]));
    c_element u_cf (.rst(rst), .in({in_f[i], ~out_ack}), .z(out_f[i]));
  end
  dr_completion #(.W(W)) u_cd (.rst(rst), .d_t(out_t), .d_f(out_f), .done(in_ack));
endmodule
