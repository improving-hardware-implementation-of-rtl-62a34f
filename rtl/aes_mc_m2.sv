// aes_mc_m2: multiplication by {02} in GF(2^8) (M2, "xtime").
//
// Left shift by one; when the bit shifted out is 1 the result is reduced by
// XOR with 8'h1B (the low byte of x^8+x^4+x^3+x+1). Example: F3 -> FD.
// Combinational.
module aes_mc_m2
  import aes_pkg::*;
(
  input  byte_t a,
  output byte_t y
);
  assign y = xtime(a);
endmodule
