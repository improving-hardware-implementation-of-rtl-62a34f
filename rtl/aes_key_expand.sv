// aes_key_expand: combinational key schedule for NK-word keys.
//
// Produces the NW = 4*(NR+1) words w[0..NW-1] of the expanded key; round
// key r is w[4r..4r+3]. The first NK words are the key itself (word 0 from
// the key's most significant bits). Every later word is
//   i mod NK == 0            : w[i] = SubWord(RotWord(w[i-1])) ^ Rcon(i/NK) ^ w[i-NK]
//   NK > 6 and i mod 4 == 0  : w[i] = SubWord(w[i-1]) ^ w[i-NK]
//   otherwise                : w[i] = w[i-1] ^ w[i-NK]
// For NK = 4, 6, 8 this is the standard AES schedule; for NK = 16 it is the
// 512-bit extension (SubWord with Rcon on multiples of 16, SubWord alone on
// the other multiples of 4, Rcon1..Rcon4). SubWord uses the same
// reduced-LUT S-box as the datapath. The schedule is one long combinational
// chain; there is no clock. The 512-bit rule set follows the source
// design; generating every word in one module, rather than one module per
// round, is this design's choice.
module aes_key_expand
  import aes_pkg::*;
#(
  parameter int unsigned NK = 4,
  localparam int unsigned NR = nr_of(NK),
  localparam int unsigned NW = 4 * (NR + 1)
) (
  input  logic [32*NK-1:0] key,
  output block_t           round_keys [NR+1]
);

  // One generate block per expanded-key word; each refers back to the
  // words it depends on by name, which keeps the chain visibly acyclic.
  for (genvar i = 0; i < NW; i++) begin : g_word
    word_t w;
    if (i < NK) begin : g_key
      assign w = key[32*NK-1 - 32*i -: 32];
    end else if (i % NK == 0) begin : g_rot
      word_t prev, rot, sub;
      assign prev = g_word[i-1].w;
      assign rot  = {prev[23:0], prev[31:24]};
      for (genvar b = 0; b < 4; b++) begin : g_sb
        aes_sbox u_sbox (.a(rot[31-8*b -: 8]), .y(sub[31-8*b -: 8]));
      end
      assign w = g_word[i-NK].w ^ sub ^ {rcon(i / NK), 24'h0};
    end else if (NK > 6 && i % 4 == 0) begin : g_sub
      word_t prev, sub;
      assign prev = g_word[i-1].w;
      for (genvar b = 0; b < 4; b++) begin : g_sb
        aes_sbox u_sbox (.a(prev[31-8*b -: 8]), .y(sub[31-8*b -: 8]));
      end
      assign w = g_word[i-NK].w ^ sub;
    end else begin : g_xor
      assign w = g_word[i-NK].w ^ g_word[i-1].w;
    end
  end

  for (genvar r = 0; r <= NR; r++) begin : g_rk
    assign round_keys[r] = {g_word[4*r].w, g_word[4*r+1].w, g_word[4*r+2].w, g_word[4*r+3].w};
  end

endmodule
