// aes_inv_mix_columns -- Inverse MixColumn step of decryption.
//
// Each column (a0..a3) is multiplied in GF(2^8) by the circulant matrix with
// first row (0E 0B 0D 09), the inverse of the MixColumn matrix:
//   b_i = E*a_i ^ B*a_(i+1) ^ D*a_(i+2) ^ 9*a_(i+3)   (indices mod 4).
// The constant multiplications are built from xtime: with x2 = 2a, x4 = 4a,
// x8 = 8a, 9a = x8^a, Ba = x8^x2^a, Da = x8^x4^a, Ea = x8^x4^x2.
//
// Ports: state_in (128) -> state_out (128). Combinational.
module aes_inv_mix_columns
  import aes_pkg::*;
(
  input  state_t state_in,
  output state_t state_out
);

  byte_t m9 [16], mb [16], md [16], me [16];

  always_comb begin
    for (int k = 0; k < 16; k++) begin
      byte_t x2, x4, x8;
      x2 = xtime(state_in[k]);
      x4 = xtime(x2);
      x8 = xtime(x4);
      m9[k] = x8 ^ state_in[k];
      mb[k] = x8 ^ x2 ^ state_in[k];
      md[k] = x8 ^ x4 ^ state_in[k];
      me[k] = x8 ^ x4 ^ x2;
    end
    for (int c = 0; c < 4; c++) begin
      for (int i = 0; i < 4; i++) begin
        state_out[4*c + i] = me[4*c + i] ^ mb[4*c + (i+1)%4]
                           ^ md[4*c + (i+2)%4] ^ m9[4*c + (i+3)%4];
      end
    end
  end

endmodule
