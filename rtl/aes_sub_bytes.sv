// aes_sub_bytes: SubBytes, sixteen S-boxes side by side.
//
// Byte A0 (bits 127:120) through A15 (bits 7:0) each go through their own
// aes_sbox; all sixteen substitutions happen at once. Combinational.
module aes_sub_bytes
  import aes_pkg::*;
(
  input  block_t a,
  output block_t b
);
  for (genvar i = 0; i < 16; i++) begin : g_sbox
    aes_sbox u_sbox (.a(a[127 - 8*i -: 8]), .y(b[127 - 8*i -: 8]));
  end
endmodule
