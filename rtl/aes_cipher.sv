// aes_cipher: fully unrolled AES encryption of one block (ECB core).
//
// ct = E_key(pt) for a key of NK words (4, 6, 8 or 16: AES-128, -192, -256
// and the 512-bit extension, with NR = 10, 12, 14, 16 rounds). The block
// goes through an initial AddRoundKey, NR-1 full rounds and a final round
// without MixColumns; the key schedule runs alongside in the same netlist.
// Everything is combinational: ct is valid one propagation delay after pt
// and key settle, and no clock or handshake is involved. Used on its own it
// is electronic-codebook (ECB) encryption of one block.
//
// subkey is the last round key, as brought out by the source design's
// per-variant projects. The round structure and the register-free
// unrolling follow the source design.
module aes_cipher
  import aes_pkg::*;
#(
  parameter int unsigned NK = 4,
  localparam int unsigned NR = nr_of(NK)
) (
  input  logic [32*NK-1:0] key,
  input  block_t           pt,
  output block_t           ct,
  output block_t           subkey
);

  block_t rk [NR+1];

  aes_key_expand #(.NK(NK)) u_keys (.key(key), .round_keys(rk));

  aes_cipher_rounds #(.NK(NK)) u_rounds (.pt(pt), .round_keys(rk), .ct(ct));

  assign subkey = rk[NR];

endmodule
