// Dual-rail FIFO of the delay-feedback path of an SDF stage.
//
// A chain of 2*(DEPTH+1) dual-rail pipeline stages (dr_pipe_stage). A 4-phase
// dual-rail pipeline keeps an EMPTY spacer between two words, so 2*(DEPTH+1)
// stages hold DEPTH+1 words: the DEPTH words of the SDF delay line plus one
// free place, which the butterfly needs because it writes its difference into
// the FIFO before it releases the word it read from the FIFO head. Words fall
// through to the head without waiting for a request (the source design only
// states the FIFO's length and its push/pop behaviour; the spacer-aware sizing
// is this implementation's choice).
//
// Latches and combinational loops reported by tools for this module are its
// C-elements (state-holding gates) and the request/acknowledge cycles of the
// 4-phase handshakes; a clockless circuit is built from exactly these.
module dr_fifo #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned W     = 35
) (
  input  logic         rst,
  input  logic [W-1:0] in_t,
  input  logic [W-1:0] in_f,
  output logic         in_ack,
  output logic [W-1:0] out_t,
  output logic [W-1:0] out_f,
  input  logic         out_ack
);
  localparam int unsigned S = 2 * (DEPTH + 1);
  logic [W-1:0] t [S+1];
  logic [W-1:0] f [S+1];
  logic         a [S+1];

  assign t[0]   = in_t;
  assign f[0]   = in_f;
  assign in_ack = a[0];
  assign out_t  = t[S];
  assign out_f  = f[S];
  assign a[S]   = out_ack;

  for (genvar s = 0; s < S; s++) begin : g_stage
    dr_pipe_stage #(.W(W)) u_st (
      .rst(rst), .in_t(t[s]), .in_f(f[s]), .in_ack(a[s]),
      .out_t(t[s+1]), .out_f(f[s+1]), .out_ack(a[s+1])
    );
  end
endmodule
