// aes_xor4: byte-wide four-input XOR (M4 of the MixColumns datapath).
//
// Sums the four product terms of one MixColumns output byte in GF(2^8);
// also merges the four quadrant outputs of the S-box. Combinational.
module aes_xor4
  import aes_pkg::*;
(
  input  byte_t a,
  input  byte_t b,
  input  byte_t c,
  input  byte_t d,
  output byte_t z
);
  assign z = a ^ b ^ c ^ d;
endmodule
