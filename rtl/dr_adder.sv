// W-bit dual-rail ripple adder or subtractor (two's complement, result
// wraps to W bits).
//
// A chain of dr_full_adder cells. With SUB = 0 it computes a + b; with SUB = 1
// it computes a - b as a + ~b + 1: inverting a dual-rail bit is a swap of its
// rails, and the carry-in is a constant. A dual-rail constant must still
// follow the VALID/EMPTY rhythm of the data, so the carry-in's active rail is
// taken from the validity (t | f) of bit 0 of a. The source design builds its
// subtractor from its adder in the same way; the ripple-carry chain and the
// dropped carry-out are this implementation's choices.
//
// Latches and combinational loops reported by tools for this module are its
// C-elements (state-holding gates) and the request/acknowledge cycles of the
// 4-phase handshakes; a clockless circuit is built from exactly these.
module dr_adder #(
  parameter int unsigned W   = 16,
  parameter bit          SUB = 1'b0
) (
  input  logic         rst,
  input  logic [W-1:0] a_t,
  input  logic [W-1:0] a_f,
  input  logic [W-1:0] b_t,
  input  logic [W-1:0] b_f,
  output logic [W-1:0] s_t,
  output logic [W-1:0] s_f
);
  logic [W:0]   c_t, c_f;
  logic [W-1:0] bb_t, bb_f;
  logic         valid0;

  assign valid0 = a_t[0] | a_f[0];
  assign c_t[0] = SUB ? valid0 : 1'b0;
  assign c_f[0] = SUB ? 1'b0 : valid0;
  assign bb_t   = SUB ? b_f : b_t;
  assign bb_f   = SUB ? b_t : b_f;

  for (genvar i = 0; i < W; i++) begin : g_fa
    dr_full_adder u_fa (
      .rst(rst),
      .a_t(a_t[i]), .a_f(a_f[i]), .b_t(bb_t[i]), .b_f(bb_f[i]),
      .ci_t(c_t[i]), .ci_f(c_f[i]),
      .s_t(s_t[i]), .s_f(s_f[i]), .co_t(c_t[i+1]), .co_f(c_f[i+1])
    );
  end
endmodule
