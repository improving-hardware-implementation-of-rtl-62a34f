// aes_xor2: byte-wide two-input XOR.
//
// The basic adder of GF(2^8). It serves as M3 in the MixColumns datapath
// ({03}*x formed as {02}*x xor x) and as one byte slice of AddRoundKey.
// Combinational.
module aes_xor2
  import aes_pkg::*;
(
  input  byte_t a,
  input  byte_t b,
  output byte_t y
);
  assign y = a ^ b;
endmodule
