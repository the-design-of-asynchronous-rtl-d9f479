// Multiplies a W-bit dual-rail two's-complement value by sqrt(2)/2 without a
// multiplier.
//
// y = (v>>>1) + (v>>>3) + (v>>>4) + (v>>>6) + (v>>>8) + (v>>>14), the
// shift-and-add approximation of the source design (0.70709 against
// 0.70711). Arithmetic shifts are wiring (the sign rails are repeated), so the
// block is five dual-rail adders in a chain. Each shifted term is truncated
// toward minus infinity before the additions.
//
// Latches and combinational loops reported by tools for this module are its
// C-elements (state-holding gates) and the request/acknowledge cycles of the
// 4-phase handshakes; a clockless circuit is built from exactly these.
module dr_sqrt2_scale #(
  parameter int unsigned W = 16
) (
  input  logic         rst,
  input  logic [W-1:0] v_t,
  input  logic [W-1:0] v_f,
  output logic [W-1:0] y_t,
  output logic [W-1:0] y_f
);
  import dr_pkg::*;

  logic [W-1:0] sh_t [K_TERMS];
  logic [W-1:0] sh_f [K_TERMS];
  logic [W-1:0] acc_t [K_TERMS];
  logic [W-1:0] acc_f [K_TERMS];

  for (genvar j = 0; j < K_TERMS; j++) begin : g_term
    for (genvar i = 0; i < W; i++) begin : g_bit
      localparam int unsigned SRC = (i + K_SHIFTS[j] < W) ? i + K_SHIFTS[j] : W - 1;
      assign sh_t[j][i] = v_t[SRC];
      assign sh_f[j][i] = v_f[SRC];
    end
    if (j == 0) begin : g_first
      assign acc_t[0] = sh_t[0];
      assign acc_f[0] = sh_f[0];
    end else begin : g_add
      dr_adder #(.W(W), .SUB(1'b0)) u_add (
        .rst(rst), .a_t(acc_t[j-1]), .a_f(acc_f[j-1]), .b_t(sh_t[j]), .b_f(sh_f[j]),
        .s_t(acc_t[j]), .s_f(acc_f[j])
      );
    end
  end
  assign y_t = acc_t[K_TERMS-1];
  assign y_f = acc_f[K_TERMS-1];
endmodule
