// aes_top: the four AES variants in ECB and in CBC mode, side by side.
//
// Eight independent combinational encryptors, each with its own ports:
//   ecb128/192/256/512 : one block, ct = E_key(pt), plus the last round key
//   cbc128/192/256/512 : CBC_BLOCKS chained blocks with an IV
// Key widths are 128, 192, 256 and 512 bits; blocks are always 128 bits.
// There is no clock: every output is a combinational function of the
// inputs. The 512-bit variant uses the extended key schedule described in
// aes_key_expand.
// The variants, the two modes and the two-block CBC depth follow the source
// design, which built each combination as a separate FPGA project; placing
// them in one top and taking every key as a port are this design's choices.
module aes_top
  import aes_pkg::*;
#(
  parameter int unsigned CBC_BLOCKS = 2
) (
  input  logic [127:0] ecb128_key,
  input  block_t       ecb128_pt,
  output block_t       ecb128_ct,
  output block_t       ecb128_subkey,
  input  logic [191:0] ecb192_key,
  input  block_t       ecb192_pt,
  output block_t       ecb192_ct,
  output block_t       ecb192_subkey,
  input  logic [255:0] ecb256_key,
  input  block_t       ecb256_pt,
  output block_t       ecb256_ct,
  output block_t       ecb256_subkey,
  input  logic [511:0] ecb512_key,
  input  block_t       ecb512_pt,
  output block_t       ecb512_ct,
  output block_t       ecb512_subkey,

  input  logic [127:0] cbc128_key,
  input  block_t       cbc128_iv,
  input  block_t       cbc128_pt [CBC_BLOCKS],
  output block_t       cbc128_ct [CBC_BLOCKS],
  input  logic [191:0] cbc192_key,
  input  block_t       cbc192_iv,
  input  block_t       cbc192_pt [CBC_BLOCKS],
  output block_t       cbc192_ct [CBC_BLOCKS],
  input  logic [255:0] cbc256_key,
  input  block_t       cbc256_iv,
  input  block_t       cbc256_pt [CBC_BLOCKS],
  output block_t       cbc256_ct [CBC_BLOCKS],
  input  logic [511:0] cbc512_key,
  input  block_t       cbc512_iv,
  input  block_t       cbc512_pt [CBC_BLOCKS],
  output block_t       cbc512_ct [CBC_BLOCKS]
);

  aes_cipher #(.NK(4))  u_ecb128 (.key(ecb128_key), .pt(ecb128_pt), .ct(ecb128_ct), .subkey(ecb128_subkey));
  aes_cipher #(.NK(6))  u_ecb192 (.key(ecb192_key), .pt(ecb192_pt), .ct(ecb192_ct), .subkey(ecb192_subkey));
  aes_cipher #(.NK(8))  u_ecb256 (.key(ecb256_key), .pt(ecb256_pt), .ct(ecb256_ct), .subkey(ecb256_subkey));
  aes_cipher #(.NK(16)) u_ecb512 (.key(ecb512_key), .pt(ecb512_pt), .ct(ecb512_ct), .subkey(ecb512_subkey));

  aes_cbc #(.NK(4),  .NBLOCKS(CBC_BLOCKS)) u_cbc128 (.key(cbc128_key), .iv(cbc128_iv), .pt(cbc128_pt), .ct(cbc128_ct));
  aes_cbc #(.NK(6),  .NBLOCKS(CBC_BLOCKS)) u_cbc192 (.key(cbc192_key), .iv(cbc192_iv), .pt(cbc192_pt), .ct(cbc192_ct));
  aes_cbc #(.NK(8),  .NBLOCKS(CBC_BLOCKS)) u_cbc256 (.key(cbc256_key), .iv(cbc256_iv), .pt(cbc256_pt), .ct(cbc256_ct));
  aes_cbc #(.NK(16), .NBLOCKS(CBC_BLOCKS)) u_cbc512 (.key(cbc512_key), .iv(cbc512_iv), .pt(cbc512_pt), .ct(cbc512_ct));

endmodule
