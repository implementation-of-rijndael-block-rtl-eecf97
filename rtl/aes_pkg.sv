// aes_pkg -- shared types, constants and GF(2^8) helpers of the Rijndael
// (AES) processor.
//
// State layout: a 128-bit block is a packed array of 16 bytes, byte 0 in
// the most significant position, byte k = row (k % 4), column (k / 4), as in
// the AES definition. Key words are 32 bits, first byte most significant.
//
// The S-box and SI-box look-up tables are not typed in: they are computed at
// elaboration from their definition. S(x) = Affine(inverse(x)), with the
// inverse of 0 taken as 0; SI(x) = inverse(InvAffine(x)), where InvAffine
// first XORs 0x63 and then applies the inverse matrix. The matrix rows below
// are the rows of the affine matrix and of its inverse, bit j of a row mask
// being the coefficient of input bit b_j (b_0 = LSB). The field is GF(2^8)
// with the AES reduction polynomial x^8 + x^4 + x^3 + x + 1 (0x11B).
package aes_pkg;

  typedef logic [7:0]          byte_t;
  typedef logic [31:0]         word_t;
  typedef logic [0:15][7:0]    state_t;   // state_t[0] = first byte (MSB)
  typedef logic [255:0][7:0]   table_t;   // 256-entry byte look-up table

  // Key length selection and the round counts of the three key sizes
  typedef enum logic [1:0] {
    KEY_128 = 2'd0,
    KEY_192 = 2'd1,
    KEY_256 = 2'd2
  } key_len_e;

  localparam int unsigned NR_128 = 10;
  localparam int unsigned NR_192 = 12;
  localparam int unsigned NR_256 = 14;

  // Number of rounds for a key length (an unused code falls back to 128 bits)
  function automatic logic [3:0] num_rounds(key_len_e kl);
    case (kl)
      KEY_192: return 4'(NR_192);
      KEY_256: return 4'(NR_256);
      default: return 4'(NR_128);
    endcase
  endfunction

  // Number of 32-bit words in the cipher key (Nk)
  function automatic logic [3:0] num_key_words(key_len_e kl);
    case (kl)
      KEY_192: return 4'd6;
      KEY_256: return 4'd8;
      default: return 4'd4;
    endcase
  endfunction

  // Affine transform matrix rows (row i gives output bit i) and constant
  localparam byte_t AFF_ROW [8] = '{8'hF1, 8'hE3, 8'hC7, 8'h8F,
                                    8'h1F, 8'h3E, 8'h7C, 8'hF8};
  localparam byte_t AFF_C = 8'h63;
  // Inverse affine matrix rows
  localparam byte_t IAFF_ROW [8] = '{8'hA4, 8'h49, 8'h92, 8'h25,
                                     8'h4A, 8'h94, 8'h29, 8'h52};

  // Multiply by x in GF(2^8)
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
  endfunction

  // General multiply in GF(2^8), shift-and-add
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = '0;
    byte_t t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= t;
      t = xtime(t);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254; gives 0 for 0 as the definition asks
  function automatic byte_t gf_inv(byte_t a);
    byte_t r = 8'h01;
    byte_t sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq);  // 254 = 0b1111_1110
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  function automatic byte_t affine(byte_t b);
    byte_t o;
    for (int i = 0; i < 8; i++) o[i] = ^(AFF_ROW[i] & b);
    return o ^ AFF_C;
  endfunction

  function automatic byte_t inv_affine(byte_t b);
    byte_t o;
    byte_t t = b ^ AFF_C;
    for (int i = 0; i < 8; i++) o[i] = ^(IAFF_ROW[i] & t);
    return o;
  endfunction

  function automatic table_t build_sbox();
    table_t t;
    for (int x = 0; x < 256; x++) t[x] = affine(gf_inv(byte_t'(x)));
    return t;
  endfunction

  function automatic table_t build_inv_sbox();
    table_t t;
    for (int x = 0; x < 256; x++) t[x] = gf_inv(inv_affine(byte_t'(x)));
    return t;
  endfunction

  localparam table_t SBOX     = build_sbox();
  localparam table_t INV_SBOX = build_inv_sbox();

  // Four S-box look-ups on a key word (SubWord of the key expansion)
  function automatic word_t sub_word(word_t w);
    return {SBOX[w[31:24]], SBOX[w[23:16]], SBOX[w[15:8]], SBOX[w[7:0]]};
  endfunction

  // Round constant of key-expansion period j (j >= 1): x^(j-1) in GF(2^8)
  function automatic byte_t rcon(logic [6:0] j);
    byte_t r = 8'h01;
    for (int i = 1; i < 32; i++) begin
      if (i < int'(j)) r = xtime(r);
    end
    return r;
  endfunction

endpackage
