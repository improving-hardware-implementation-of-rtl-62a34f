// aes_mix_columns: MixColumns on the whole 128-bit state in parallel.
//
// Each column (a0..a3) is multiplied by the circulant matrix
// [02 03 01 01; 01 02 03 01; 01 01 02 03; 03 01 01 02] over GF(2^8).
// All sixteen bytes go through the same three small units at once:
//   M2 : d2 = {02}*a            (one per input byte)
//   M3 : d3 = d2 xor a = {03}*a (one per input byte)
//   M4 : out = 4-input XOR      (one per output byte)
// so output row r of a column is M4(d2[r], d3[r+1], a[r+2], a[r+3]) with
// indices mod 4. This is the parallel arrangement the source design
// prefers over a per-row multiplier. Combinational.
module aes_mix_columns
  import aes_pkg::*;
(
  input  block_t a,
  output block_t b
);

  byte_t x  [16];
  byte_t d2 [16];
  byte_t d3 [16];
  byte_t o  [16];

  for (genvar i = 0; i < 16; i++) begin : g_byte
    assign x[i] = a[127 - 8*i -: 8];
    aes_mc_m2 u_m2 (.a(x[i]), .y(d2[i]));
    aes_xor2  u_m3 (.a(d2[i]), .b(x[i]), .y(d3[i]));
  end

  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      aes_xor4 u_m4 (
        .a(d2[4*c + r]),
        .b(d3[4*c + (r+1)%4]),
        .c(x [4*c + (r+2)%4]),
        .d(x [4*c + (r+3)%4]),
        .z(o [4*c + r])
      );
      assign b[127 - 8*(4*c+r) -: 8] = o[4*c + r];
    end
  end

endmodule
