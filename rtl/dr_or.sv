// Dual-rail OR gate built by delay-insensitive minterm synthesis.
//
// Same four minterm C-elements as dr_and; the false rail of z is the (0,0)
// minterm and the true rail the OR of the other three. VALID when both inputs
// are VALID, EMPTY when both are EMPTY, held otherwise.
//
// Latches and combinational loops reported by tools for this module are its
// C-elements (state-holding gates) and the request/acknowledge cycles of the
// 4-phase handshakes; a clockless circuit is built from exactly these.
module dr_or (
  input  logic rst,
  input  logic x_t, x_f,
  input  logic y_t, y_f,
  output logic z_t, z_f
);
  logic m11, m10, m01, m00;
  c_element u_m11 (.rst(rst), .in({x_t, y_t}), .z(m11));
  c_element u_m10 (.rst(rst), .in({x_t, y_f}), .z(m10));
  c_element u_m01 (.rst(rst), .in({x_f, y_t}), .z(m01));
  c_element u_m00 (.rst(rst), .in({x_f, y_f}), .z(m00));
  assign z_t = m11 | m10 | m01;
  assign z_f = m00;
endmodule
