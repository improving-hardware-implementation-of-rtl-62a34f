// aes_shift_rows: ShiftRows, a fixed byte permutation (wiring only).
//
// Row r of the state is rotated left by r byte positions: output byte
// (row r, column c) takes input byte (row r, column (c+r) mod 4). With the
// column-major byte order, output byte 4c+r = input byte 4((c+r) mod 4)+r.
module aes_shift_rows
  import aes_pkg::*;
(
  input  block_t a,
  output block_t b
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign b[127 - 8*(4*c + r) -: 8] = a[127 - 8*(4*((c + r) % 4) + r) -: 8];
    end
  end
endmodule
