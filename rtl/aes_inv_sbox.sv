// aes_inv_sbox -- SI-box (inverse S-box) look-up table for decryption.
//
// A 256-entry byte ROM, purely combinational. aes_pkg::build_inv_sbox()
// fills it at elaboration: the input is XORed with 0x63, multiplied by the
// inverse affine matrix, and the multiplicative inverse in GF(2^8) of that
// is taken (0 maps to 0). The look-up-table form follows the design
// description; computing the contents from the definition is this
// implementation's choice.
//
// Ports: in_byte (8) -> out_byte (8), no clock, zero latency.
module aes_inv_sbox
  import aes_pkg::*;
(
  input  byte_t in_byte,
  output byte_t out_byte
);

  assign out_byte = INV_SBOX[in_byte];

endmodule
