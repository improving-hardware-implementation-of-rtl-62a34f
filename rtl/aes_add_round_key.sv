// aes_add_round_key: AddRoundKey, state xor round key.
//
// Built from sixteen byte-wide XOR2 units, one per state byte, all in
// parallel. Combinational.
module aes_add_round_key
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);
  for (genvar i = 0; i < 16; i++) begin : g_xor
    aes_xor2 u_xor (
      .a(state_in [127 - 8*i -: 8]),
      .b(round_key[127 - 8*i -: 8]),
      .y(state_out[127 - 8*i -: 8])
    );
  end
endmodule
