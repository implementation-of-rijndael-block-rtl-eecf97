// aes_round -- one Rijndael round for encryption and decryption.
//
// The loop body of the processor datapath. Both modes pass the state first
// through Substitution / Inverse Substitution and then Shift Row / Inverse
// Shift Row: in decryption the order of the two inverse steps is swapped
// relative to the textbook order, which is allowed because both act on
// single bytes, and lets the two modes share one front end. After it the mode
// selects one of two branches:
//   encrypt (decrypt = 0): MixColumn, then Add Round Key
//   decrypt (decrypt = 1): Add Round Key, then Inverse MixColumn
// In the final round (final_round = 1) MixColumn and Inverse MixColumn are
// bypassed, so the round is Substitution, Shift Row and Add Round Key only.
// The branch structure and the exchanged decryption order follow the
// design description; the bypass multiplexers are this implementation's
// way of dropping the MixColumn step in the last round.
//
// Ports: state_in (128), round_key (128), decrypt, final_round ->
// state_out (128). Combinational; the caller registers the result.
module aes_round
  import aes_pkg::*;
(
  input  state_t state_in,
  input  state_t round_key,
  input  logic   decrypt,
  input  logic   final_round,
  output state_t state_out
);

  state_t s_sub, s_shift;
  state_t e_mix, e_mix_sel, e_out;
  state_t d_ark, d_mix, d_out;

  aes_sub_bytes  u_sub   (.state_in(state_in), .decrypt(decrypt), .state_out(s_sub));
  aes_shift_rows u_shift (.state_in(s_sub),    .decrypt(decrypt), .state_out(s_shift));

  // Encryption branch
  aes_mix_columns   u_mix     (.state_in(s_shift), .state_out(e_mix));
  assign e_mix_sel = final_round ? s_shift : e_mix;
  aes_add_round_key u_ark_enc (.state_in(e_mix_sel), .round_key(round_key), .state_out(e_out));

  // Decryption branch
  aes_add_round_key   u_ark_dec (.state_in(s_shift), .round_key(round_key), .state_out(d_ark));
  aes_inv_mix_columns u_imix    (.state_in(d_ark), .state_out(d_mix));
  assign d_out = final_round ? d_ark : d_mix;

  // Mode multiplexer back into the state register
  assign state_out = decrypt ? d_out : e_out;

endmodule
