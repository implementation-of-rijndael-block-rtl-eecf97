// aes_key_sched -- on-the-fly round key generator for 128, 192 and 256-bit
// keys.
//
// Round keys are produced while the rounds run instead of being expanded
// into a table first. The generator keeps a window of Nk key-expansion words
// (Nk = 4, 6 or 8), w[4r] .. w[4r+Nk-1], where r is the index of the current
// round key; the round key itself is the first four words of the window.
// One step moves the window by one round key (four words):
//   forward:  w[i] = w[i-Nk] ^ F(w[i-1], i)      for the four next words
//   backward: w[i-Nk] = w[i] ^ F(w[i-1], i)      for the four previous words
// with F(t, i) = SubWord(RotWord(t)) ^ Rcon(i/Nk)   if i mod Nk = 0,
//              = SubWord(t)                        if Nk = 8 and i mod Nk = 4,
//              = t                                 otherwise.
// Because a 4-word step and the Nk-word expansion period are out of phase
// for 192-bit keys, the word that needs SubWord moves between steps: word 0,
// word 2 or none (three kinds of step). For 256-bit keys it is always word 0,
// either with RotWord and Rcon or without (two kinds). For 128-bit keys every
// step is alike. Encryption steps forward from the cipher key; decryption
// first steps forward Nr times (key set-up) to reach the last round key and
// then steps backward once per round. On-the-fly generation and the
// different step kinds per key size follow the design description; the
// sliding window and the backward recurrence are this implementation's.
//
// Ports: load (with key_len, key_in; key left aligned, first byte in bits
// 255:248) restarts at round key 0. step_fwd / step_inv move one round key
// per clock; round_key and key_round are registered outputs, so the key of a
// round is ready at the start of its cycle. A step_inv at round key 0 is
// ignored. Reset is asynchronous, active low.
module aes_key_sched
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  key_len_e     key_len,
  input  logic [255:0] key_in,
  input  logic         step_fwd,
  input  logic         step_inv,
  output state_t       round_key,
  output logic [3:0]   key_round
);

  key_len_e   klen;
  logic [3:0] kr;
  word_t      win     [8];
  word_t      win_fwd [8];
  word_t      win_inv [8];
  word_t      nw      [4];
  word_t      mw      [4];

  // F(t, i) of the key expansion for the latched key length
  function automatic word_t kfun(word_t t, logic [6:0] i, key_len_e kl);
    logic [6:0] imod, idiv;
    case (kl)
      KEY_192: begin imod = i % 7'd6; idiv = i / 7'd6; end
      KEY_256: begin imod = {4'd0, i[2:0]}; idiv = i >> 3; end
      default: begin imod = {5'd0, i[1:0]}; idiv = i >> 2; end
    endcase
    if (imod == 7'd0)
      return sub_word({t[23:0], t[31:24]}) ^ {rcon(idiv), 24'h0};
    else if (kl == KEY_256 && imod == 7'd4)
      return sub_word(t);
    else
      return t;
  endfunction

  logic [3:0] nk;
  assign nk = num_key_words(klen);

  // Forward step: the four words after the window
  always_comb begin
    word_t prev;
    nw = '{default: '0};
    for (int k = 0; k < 4; k++) begin
      prev  = (k == 0) ? win[3'(nk - 4'd1)] : nw[k-1];
      nw[k] = win[k] ^ kfun(prev, 7'(4*int'(kr) + int'(nk) + k), klen);
    end
    for (int j = 0; j < 8; j++) begin
      if (j + 4 < int'(nk))   win_fwd[j] = win[j+4];
      else if (j < int'(nk))  win_fwd[j] = nw[j + 4 - int'(nk)];
      else                    win_fwd[j] = '0;
    end
  end

  // Backward step: the four words before the window, last one first
  always_comb begin
    word_t prev;
    int    p;
    mw = '{default: '0};
    for (int q = 3; q >= 0; q--) begin
      p     = q + int'(nk) - 1;              // w[4r-4+p] precedes w[4r-4+q+Nk]
      prev  = (p >= 4) ? win[p-4] : mw[3];   // p < 4 only for Nk = 4, q = 0
      mw[q] = win[q + int'(nk) - 4] ^ kfun(prev, 7'(4*int'(kr) - 4 + q + int'(nk)), klen);
    end
    for (int j = 0; j < 8; j++) begin
      if (j < 4)             win_inv[j] = mw[j];
      else if (j < int'(nk)) win_inv[j] = win[j-4];
      else                   win_inv[j] = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      klen <= KEY_128;
      kr   <= '0;
      for (int j = 0; j < 8; j++) win[j] <= '0;
    end else if (load) begin
      klen <= key_len;
      kr   <= '0;
      for (int j = 0; j < 8; j++) win[j] <= key_in[255 - 32*j -: 32];
    end else if (step_fwd) begin
      kr  <= kr + 4'd1;
      win <= win_fwd;
    end else if (step_inv && kr != 4'd0) begin
      kr  <= kr - 4'd1;
      win <= win_inv;
    end
  end

  assign round_key = {win[0], win[1], win[2], win[3]};
  assign key_round = kr;

endmodule
