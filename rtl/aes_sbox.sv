// aes_sbox: Rijndael S-box as four quadrant LUTs and a 4-input combiner.
//
// The input byte is offered to all four quadrant LUTs at once (see
// aes_sbox_quad). Exactly one of them produces the substitute value, the
// other three produce zero, and a byte-wide 4-input adder merges them. The
// adder is built as a GF(2^8) sum (XOR), which equals the integer sum here
// because only one operand is ever non-zero. This is the reduced-LUT
// arrangement the source design found fastest and smallest; the XOR form of
// the adder is this implementation's choice. Combinational, no clock.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t a,
  output byte_t y
);

  byte_t q [4];

  for (genvar i = 0; i < 4; i++) begin : g_quad
    aes_sbox_quad #(.Q(i)) u_quad (.a(a), .y(q[i]));
  end

  aes_xor4 u_sum (.a(q[0]), .b(q[1]), .c(q[2]), .d(q[3]), .z(y));

endmodule
