// aes_cipher_rounds: the round datapath of the cipher, without the key
// schedule.
//
// Takes all NR+1 round keys at once and applies AddRoundKey with key 0,
// then rounds 1..NR (the last one without MixColumns). Split out of
// aes_cipher so that a CBC chain can share one key schedule among several
// block datapaths. Combinational.
module aes_cipher_rounds
  import aes_pkg::*;
#(
  parameter int unsigned NK = 4,
  localparam int unsigned NR = nr_of(NK)
) (
  input  block_t pt,
  input  block_t round_keys [NR+1],
  output block_t ct
);

  block_t st [NR+1];

  aes_add_round_key u_ark0 (.state_in(pt), .round_key(round_keys[0]), .state_out(st[0]));

  for (genvar r = 1; r <= NR; r++) begin : g_round
    aes_round #(.FINAL(r == NR)) u_round (
      .state_in (st[r-1]),
      .round_key(round_keys[r]),
      .state_out(st[r])
    );
  end

  assign ct = st[NR];

endmodule
