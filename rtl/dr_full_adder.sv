// Dual-rail full adder by delay-insensitive minterm synthesis (DIMS).
//
// Eight 3-input C-elements generate every minterm of (a, b, ci); the sum and
// carry rails are ORs of the minterms given by the full-adder truth table
// (s true for an odd number of ones, d = carry true for two or more). The
// outputs become VALID only when all three inputs are VALID and EMPTY only
// when all three are EMPTY, so the adder is delay-insensitive, as in the
// source design.
//
// Latches and combinational loops reported by tools for this module are its
// C-elements (state-holding gates) and the request/acknowledge cycles of the
// 4-phase handshakes; a clockless circuit is built from exactly these.
module dr_full_adder (
  input  logic rst,
  input  logic a_t, a_f,
  input  logic b_t, b_f,
  input  logic ci_t, ci_f,
  output logic s_t, s_f,
  output logic co_t, co_f
);
  logic [7:0] m;   // m[{a,b,ci}]
  for (genvar k = 0; k < 8; k++) begin : g_min
    c_element #(.N(3)) u_m (
      .rst(rst),
      .in({(k & 4) != 0 ? a_t : a_f, (k & 2) != 0 ? b_t : b_f, (k & 1) != 0 ? ci_t : ci_f}),
      .z(m[k])
    );
  end
  assign s_t  = m[1] | m[2] | m[4] | m[7];
  assign s_f  = m[0] | m[3] | m[5] | m[6];
  assign co_t = m[3] | m[5] | m[6] | m[7];
  assign co_f = m[0] | m[1] | m[2] | m[4];
endmodule
