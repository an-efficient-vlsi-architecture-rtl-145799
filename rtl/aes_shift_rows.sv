// aes_shift_rows: ShiftRows transformation of a 128-bit AES state.
//
// Row 0 stays as it is; rows 1, 2 and 3 are rotated cyclically to the left
// by 1, 2 and 3 byte positions: s'[r][c] = s[r][(c + r) mod 4]. With the
// FIPS-197 byte order (byte n is row n%4, column n/4) output byte 4c+r
// therefore takes input byte 4((c+r) mod 4)+r. Pure wiring, combinational.
// Rotation amounts and direction follow the architecture's ShiftRows
// description and figure.

module aes_shift_rows
  import aes_pkg::*;
(
  input  block_t in_state,
  output block_t out_state
);

  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        out_state[127 - 8 * (4 * c + r) -: 8] = in_state[127 - 8 * (4 * ((c + r) % 4) + r) -: 8];
  end

endmodule
