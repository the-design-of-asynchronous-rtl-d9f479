// Dual-rail AND gate built by delay-insensitive minterm synthesis.
//
// Four C-elements each detect one combination of the two dual-rail inputs;
// the true rail of z is the (1,1) minterm and the false rail is the OR of the
// other three. z is VALID once both inputs are VALID and returns to EMPTY only
// when both are EMPTY, otherwise it keeps its value (source design's dual-rail
// AND: four C-elements and one OR gate). No acknowledge: it is a function
// block inside a channel.
//
// Latches and combinational loops reported by tools for this module are its
// C-elements (state-holding gates) and the request/acknowledge cycles of the
// 4-phase handshakes; a clockless circuit is built from exactly these.
module dr_and (
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
  assign z_t = m11;
  assign z_f = m10 | m01 | m00;
endmodule
