// aes_cbc: cipher-block-chaining encryption of NBLOCKS blocks.
//
// ct[0] = E(pt[0] ^ iv), ct[i] = E(pt[i] ^ ct[i-1]). The chaining register
// of the textbook description is replaced by plain wiring: NBLOCKS unrolled
// round datapaths sit in series, so ct[i] settles after about i+1 cipher
// delays. One key schedule feeds all of them. Combinational, no clock.
// The two-block depth is the source design's CBC configuration; sharing the
// key schedule is this implementation's choice.
module aes_cbc
  import aes_pkg::*;
#(
  parameter int unsigned NK      = 4,
  parameter int unsigned NBLOCKS = 2,
  localparam int unsigned NR = nr_of(NK)
) (
  input  logic [32*NK-1:0] key,
  input  block_t           iv,
  input  block_t           pt [NBLOCKS],
  output block_t           ct [NBLOCKS]
);

  block_t rk  [NR+1];
  block_t chn [NBLOCKS];   // value each block is XORed with

  aes_key_expand #(.NK(NK)) u_keys (.key(key), .round_keys(rk));

  for (genvar i = 0; i < NBLOCKS; i++) begin : g_blk
    block_t x;
    if (i == 0) begin : g_iv
      assign chn[i] = iv;
    end else begin : g_prev
      assign chn[i] = ct[i-1];
    end
    aes_add_round_key u_chain (.state_in(pt[i]), .round_key(chn[i]), .state_out(x));
    aes_cipher_rounds #(.NK(NK)) u_enc (.pt(x), .round_keys(rk), .ct(ct[i]));
  end

endmodule
