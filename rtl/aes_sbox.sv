// aes_sbox -- S-box look-up table of the Rijndael substitution step.
//
// A 256-entry byte ROM, one read per input byte, purely combinational.
// The table is filled at elaboration by aes_pkg::build_sbox(): the
// multiplicative inverse in GF(2^8) (0 maps to 0) followed by the affine
// transform. Realising the S-box as a look-up table rather than as an
// inverse-calculating circuit follows the design description; computing the
// table contents from the definition instead of listing them is this
// implementation's choice.
//
// Ports: in_byte (8) -> out_byte (8), no clock, zero latency.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t in_byte,
  output byte_t out_byte
);

  assign out_byte = SBOX[in_byte];

endmodule
