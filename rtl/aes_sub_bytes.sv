// aes_sub_bytes -- Substitution / Inverse Substitution of a whole state.
//
// Sixteen S-box and sixteen SI-box look-up tables work on the 16 bytes of
// the 128-bit state in parallel; the mode input selects which result is
// passed on (0: S-box, encryption; 1: SI-box, decryption). Keeping separate
// S-box and SI-box tables follows the design description; placing all 32
// tables side by side behind one multiplexer is this implementation's
// choice.
//
// Ports: state_in (128), decrypt -> state_out (128). Combinational.
module aes_sub_bytes
  import aes_pkg::*;
(
  input  state_t state_in,
  input  logic   decrypt,
  output state_t state_out
);

  state_t s_fwd, s_inv;

  for (genvar i = 0; i < 16; i++) begin : g_byte
    aes_sbox     u_sbox  (.in_byte(state_in[i]), .out_byte(s_fwd[i]));
    aes_inv_sbox u_sibox (.in_byte(state_in[i]), .out_byte(s_inv[i]));
  end

  assign state_out = decrypt ? s_inv : s_fwd;

endmodule
