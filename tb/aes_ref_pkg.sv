// aes_ref_pkg -- behavioural AES reference model used by the testbenches.
//
// Written independently of the RTL: the S-box is built by searching for the
// multiplicative inverse and applying the affine transform in its rotation
// form (b'_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i), the SI-box
// by inverting the S-box table, the key expansion is the textbook word loop
// over the whole schedule, and decryption is the textbook inverse cipher
// (InvShiftRows, InvSubBytes, AddRoundKey, InvMixColumns). Blocks are
// handled as 16-byte arrays, byte 0 first (most significant in a vector).
package aes_ref_pkg;

  typedef byte unsigned blk_t [16];

  byte unsigned sb  [256];
  byte unsigned isb [256];
  bit           ready = 0;

  function automatic byte unsigned gmul(byte unsigned a, byte unsigned b);
    byte unsigned p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b & 1) p ^= a;
      a = (a & 8'h80) ? byte'((a << 1) ^ 8'h1b) : byte'(a << 1);
      b >>= 1;
    end
    return p;
  endfunction

  function automatic void init();
    byte unsigned inv, s;
    if (ready) return;
    for (int x = 0; x < 256; x++) begin
      inv = 0;
      for (int y = 1; y < 256; y++) if (gmul(byte'(x), byte'(y)) == 1) inv = byte'(y);
      s = 8'h63;
      for (int i = 0; i < 8; i++) begin
        bit v;
        v = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
        s[i] = s[i] ^ v;
      end
      sb[x] = s;
    end
    for (int x = 0; x < 256; x++) isb[sb[x]] = byte'(x);
    ready = 1;
  endfunction

  function automatic blk_t from_vec(logic [127:0] v);
    blk_t b;
    for (int k = 0; k < 16; k++) b[k] = v[127 - 8*k -: 8];
    return b;
  endfunction

  function automatic logic [127:0] to_vec(blk_t b);
    logic [127:0] v;
    for (int k = 0; k < 16; k++) v[127 - 8*k -: 8] = b[k];
    return v;
  endfunction

  function automatic logic [127:0] sub_bytes(logic [127:0] v, bit inverse);
    blk_t b = from_vec(v);
    init();
    for (int k = 0; k < 16; k++) b[k] = inverse ? isb[b[k]] : sb[b[k]];
    return to_vec(b);
  endfunction

  // out[r][c] = in[r][c + r] (encrypt) or in[r][c - r] (decrypt)
  function automatic logic [127:0] shift_rows(logic [127:0] v, bit inverse);
    blk_t a = from_vec(v);
    blk_t b;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        b[r + 4*c] = inverse ? a[r + 4*((c + 4 - r) % 4)] : a[r + 4*((c + r) % 4)];
    return to_vec(b);
  endfunction

  function automatic logic [127:0] mix_columns(logic [127:0] v, bit inverse);
    blk_t a = from_vec(v);
    blk_t b;
    byte unsigned m [4];
    m = inverse ? '{8'h0e, 8'h0b, 8'h0d, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        b[r + 4*c] = 0;
        for (int j = 0; j < 4; j++) b[r + 4*c] ^= gmul(m[(j - r + 4) % 4], a[j + 4*c]);
      end
    return to_vec(b);
  endfunction

  // Full key schedule, 4*(Nr+1) words
  function automatic void expand(logic [255:0] key, int nk, output logic [31:0] w [60]);
    int nr = nk + 6;
    logic [31:0] t;
    byte unsigned rc = 1;
    init();
    for (int i = 0; i < 60; i++) w[i] = 0;
    for (int i = 0; i < nk; i++) w[i] = key[255 - 32*i -: 32];
    for (int i = nk; i < 4*(nr+1); i++) begin
      t = w[i-1];
      if (i % nk == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb[t[31:24]], sb[t[23:16]], sb[t[15:8]], sb[t[7:0]]};
        t[31:24] ^= rc;
        rc = gmul(rc, 8'h02);
      end else if (nk == 8 && i % nk == 4) begin
        t = {sb[t[31:24]], sb[t[23:16]], sb[t[15:8]], sb[t[7:0]]};
      end
      w[i] = w[i-nk] ^ t;
    end
  endfunction

  function automatic logic [127:0] round_key(logic [31:0] w [60], int r);
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] pt, logic [255:0] key, int nk);
    logic [31:0]  w [60];
    logic [127:0] s;
    int nr = nk + 6;
    expand(key, nk, w);
    s = pt ^ round_key(w, 0);
    for (int r = 1; r <= nr; r++) begin
      s = shift_rows(sub_bytes(s, 0), 0);
      if (r != nr) s = mix_columns(s, 0);
      s ^= round_key(w, r);
    end
    return s;
  endfunction

  function automatic logic [127:0] decrypt(logic [127:0] ct, logic [255:0] key, int nk);
    logic [31:0]  w [60];
    logic [127:0] s;
    int nr = nk + 6;
    expand(key, nk, w);
    s = ct ^ round_key(w, nr);
    for (int r = nr - 1; r >= 0; r--) begin
      s = sub_bytes(shift_rows(s, 1), 1);
      s ^= round_key(w, r);
      if (r != 0) s = mix_columns(s, 1);
    end
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  function automatic logic [255:0] rand256();
    return {rand128(), rand128()};
  endfunction

endpackage
