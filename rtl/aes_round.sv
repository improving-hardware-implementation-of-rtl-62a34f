// aes_round: one unrolled AES encryption round.
//
// state_out = AddRoundKey(MixColumns(ShiftRows(SubBytes(state_in))), key).
// With FINAL = 1 the MixColumns stage is left out, as in the last round of
// the cipher. The round is pure combinational logic: the cipher chains NR
// of these with no register between them.
module aes_round
  import aes_pkg::*;
#(
  parameter bit FINAL = 1'b0
) (
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);

  block_t s_sub, s_shift, s_mix;

  aes_sub_bytes  u_sub   (.a(state_in), .b(s_sub));
  aes_shift_rows u_shift (.a(s_sub),    .b(s_shift));

  if (FINAL) begin : g_final
    assign s_mix = s_shift;
  end else begin : g_mix
    aes_mix_columns u_mix (.a(s_shift), .b(s_mix));
  end

  aes_add_round_key u_ark (.state_in(s_mix), .round_key(round_key), .state_out(state_out));

endmodule
