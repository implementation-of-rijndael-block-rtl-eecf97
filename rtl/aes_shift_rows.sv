// aes_shift_rows -- Shift Rows / Inverse Shift Rows.
//
// The state is seen as four 32-bit rows, row r holding bytes r, r+4, r+8 and
// r+12. For encryption row r is rotated left by r bytes (0, 1, 2, 3); for
// decryption by 0, 3, 2, 1 bytes. Rows 0 and 2 are therefore the same in
// both modes and are shared; only rows 1 and 3 have a mode multiplexer, as
// the design description points out. In this one-round-per-clock datapath the
// row rotations are fixed wiring in front of the state register rather than
// separate shift registers.
//
// Ports: state_in (128), decrypt -> state_out (128). Combinational.
module aes_shift_rows
  import aes_pkg::*;
(
  input  state_t state_in,
  input  logic   decrypt,
  output state_t state_out
);

  // Row r as a word, column 0 in the most significant byte
  function automatic word_t get_row(state_t s, int r);
    return {s[r], s[r+4], s[r+8], s[r+12]};
  endfunction

  word_t row_in [4];
  word_t row_out[4];

  always_comb begin
    for (int r = 0; r < 4; r++) row_in[r] = get_row(state_in, r);
    row_out[0] = row_in[0];                                    // shared
    row_out[1] = decrypt ? {row_in[1][7:0],   row_in[1][31:8]}   // 3 left
                         : {row_in[1][23:0],  row_in[1][31:24]}; // 1 left
    row_out[2] = {row_in[2][15:0], row_in[2][31:16]};          // shared, 2 left
    row_out[3] = decrypt ? {row_in[3][23:0],  row_in[3][31:24]}  // 1 left
                         : {row_in[3][7:0],   row_in[3][31:8]};  // 3 left
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        state_out[r + 4*c] = row_out[r][31 - 8*c -: 8];
  end

endmodule
