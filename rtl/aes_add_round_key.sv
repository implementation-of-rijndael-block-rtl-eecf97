// aes_add_round_key -- Add Round Key: bitwise XOR of the 128-bit state with
// the 128-bit round key. Used three times in the processor: on the input
// block, after MixColumn in the encryption branch and before Inverse
// MixColumn in the decryption branch.
//
// Ports: state_in (128), round_key (128) -> state_out (128). Combinational.
module aes_add_round_key
  import aes_pkg::*;
(
  input  state_t state_in,
  input  state_t round_key,
  output state_t state_out
);

  assign state_out = state_in ^ round_key;

endmodule
