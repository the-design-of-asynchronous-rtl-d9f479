// Dual-rail selection function: y = s ? b : a, for W-bit vectors, as
// delay-insensitive logic.
//
// Each bit is (~s AND a) OR (s AND b) made of the dual-rail AND and OR gates
// (dr_and, dr_or); inverting s is a swap of its rails. Being complete logic,
// y is VALID only after s, a and b are all VALID and EMPTY only after all three
// are EMPTY. Used inside the twiddle unit, where every candidate is computed.
//
// Latches and combinational loops reported by tools for this module are its
// C-elements (state-holding gates) and the request/acknowledge cycles of the
// 4-phase handshakes; a clockless circuit is built from exactly these.
module dr_sel2 #(
  parameter int unsigned W = 16
) (
  input  logic         rst,
  input  logic         s_t,
  input  logic         s_f,
  input  logic [W-1:0] a_t,
  input  logic [W-1:0] a_f,
  input  logic [W-1:0] b_t,
  input  logic [W-1:0] b_f,
  output logic [W-1:0] y_t,
  output logic [W-1:0] y_f
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    logic u_t, u_f, v_t, v_f;
    dr_and u_and_a (.rst(rst), .x_t(s_f), .x_f(s_t), .y_t(a_t[i]), .y_f(a_f[i]), .z_t(u_t), .z_f(u_f));
    dr_and u_and_b (.rst(rst), .x_t(s_t), .x_f(s_f), .y_t(b_t[i]), .y_f(b_f[i]), .z_t(v_t), .z_f(v_f));
    dr_or  u_or    (.rst(rst), .x_t(u_t), .x_f(u_f), .y_t(v_t), .y_f(v_f), .z_t(y_t[i]), .z_f(y_f[i]));
  end
endmodule
