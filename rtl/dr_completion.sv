// Completion detector for a W-bit dual-rail vector.
//
// Each bit is tested for validity with an OR of its two rails; a W-input
// C-element combines the results, so 'done' rises only when every bit is VALID
// and falls only when every bit is EMPTY (the "All Valid" / all-empty behaviour
// of the N-bit completion detection of the source design). 'done' is the
// acknowledge a dual-rail latch stage returns to its sender.
//
// Latches and combinational loops reported by tools for this module are its
// C-elements (state-holding gates) and the request/acknowledge cycles of the
// 4-phase handshakes; a clockless circuit is built from exactly these.
module dr_completion #(
  parameter int unsigned W = 16
) (
  input  logic         rst,
  input  logic [W-1:0] d_t,
  input  logic [W-1:0] d_f,
  output logic         done
);
  c_element #(.N(W)) u_c (.rst(rst), .in(d_t | d_f), .z(done));
endmodule
