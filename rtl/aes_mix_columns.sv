// aes_mix_columns -- MixColumn step of encryption.
//
// Each of the four 4-byte columns (a0..a3) is multiplied in GF(2^8) by the
// circulant matrix with first row (02 03 01 01):
//   b_i = 2*a_i ^ 3*a_(i+1) ^ a_(i+2) ^ a_(i+3)   (indices mod 4).
// Multiplication by 2 is xtime (shift left, XOR 0x1B on carry), by 3 is
// xtime plus the operand. The constants come from the AES definition.
//
// Ports: state_in (128) -> state_out (128). Combinational.
module aes_mix_columns
  import aes_pkg::*;
(
  input  state_t state_in,
  output state_t state_out
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int i = 0; i < 4; i++) begin
        state_out[4*c + i] = xtime(state_in[4*c + i])
                           ^ xtime(state_in[4*c + (i+1)%4]) ^ state_in[4*c + (i+1)%4]
                           ^ state_in[4*c + (i+2)%4]
                           ^ state_in[4*c + (i+3)%4];
      end
    end
  end

endmodule
