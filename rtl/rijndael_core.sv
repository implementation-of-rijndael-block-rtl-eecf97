// rijndael_core -- iterative Rijndael (AES) encryption / decryption
// processor for 128, 192 and 256-bit keys.
//
// A 128-bit state register is fed back through one combinational round
// (aes_round) per clock. A block operation is: capture key and data; the
// initial round, which is Add Round Key only; then Nr rounds of
// Substitution, Shift Row and, selected by the mode, MixColumn + Add Round
// Key (encryption) or Add Round Key + Inverse MixColumn (decryption); the
// last round skips the (Inverse) MixColumn. S-box and SI-box are look-up
// tables. Round keys are generated on the fly next to the rounds
// (aes_key_sched); for decryption the key generator first runs forward Nr
// cycles to reach the last round key. aes_ctrl sequences it all.
//
// Interface: pulse start while busy is low, with decrypt (0 encrypt,
// 1 decrypt), key_len (0/1/2 = 128/192/256 bits), key (left aligned: a
// 128-bit key sits in bits 255:128) and in_data. Inputs are sampled at that
// edge only. done pulses for one cycle when out_data holds the result;
// out_data stays valid until the next start. Latency start-to-done: Nr + 2
// clocks encrypting, 2*Nr + 2 decrypting (Nr = 10, 12, 14).
//
// The loop structure, the mode-selected branches, the exchanged order of the
// inverse substitution and shift, look-up-table S-boxes and on-the-fly keys
// follow the design description; one round per clock, the register
// placement, the key set-up pass and the handshake are this implementation's.
module rijndael_core
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         decrypt,
  input  key_len_e     key_len,
  input  logic [255:0] key,
  input  logic [127:0] in_data,
  output logic         busy,
  output logic         done,
  output logic [127:0] out_data
);

  logic       load, key_fwd, key_inv, do_init, do_round, final_round, mode;
  key_len_e   klen;
  logic [3:0] round, key_round;
  state_t     state_q, round_key, init_out, round_out;

  aes_ctrl u_ctrl (
    .clk, .rst_n, .start, .decrypt, .key_len,
    .load, .key_fwd, .key_inv, .do_init, .do_round, .final_round,
    .mode, .klen, .round, .busy, .done
  );

  aes_key_sched u_keys (
    .clk, .rst_n, .load, .key_len, .key_in(key),
    .step_fwd(key_fwd), .step_inv(key_inv),
    .round_key, .key_round
  );

  // Initial round: Add Round Key on the input block
  aes_add_round_key u_ark_in (.state_in(state_q), .round_key(round_key), .state_out(init_out));

  aes_round u_round (
    .state_in(state_q), .round_key(round_key), .decrypt(mode),
    .final_round(final_round), .state_out(round_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        state_q <= '0;
    else if (load)     state_q <= in_data;
    else if (do_init)  state_q <= init_out;
    else if (do_round) state_q <= round_out;
  end

  assign out_data = state_q;

  // The round key in use always matches the round being computed:
  // encryption uses key r in round r, decryption key Nr - r.
  a_key_index: assert property (@(posedge clk) disable iff (!rst_n)
    do_round |-> key_round == (mode ? num_rounds(klen) - round : round));

  // The controller's round number and the state machine agree on the
  // final round
  a_final: assert property (@(posedge clk) disable iff (!rst_n)
    final_round |-> round == num_rounds(klen));

endmodule
