// aes_pkg: types, sizes and constant tables shared by the AES datapath.
//
// The datapath works on a 128-bit state whose byte 0 sits in bits 127:120
// and byte 15 in bits 7:0; bytes are taken column by column, so byte 4c+r
// is row r of column c. Keys are NK 32-bit words, word 0 in the most
// significant bits. The four key sizes are 4, 6, 8 and 16 words (AES-128,
// -192, -256 and the 512-bit extension), with 10, 12, 14 and 16 rounds.
//
// The S-box table itself lives in aes_sbox_pkg.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;

  // Number of rounds for a key of nk words.
  function automatic int unsigned nr_of(int unsigned nk);
    case (nk)
      4:       return 10;
      6:       return 12;
      8:       return 14;
      16:      return 16;
      default: return nk + 6;
    endcase
  endfunction

  // Multiplication by {02} in GF(2^8) (the M2 operation).
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Round constant for key-expansion step j (j >= 1): {02}^(j-1), high byte.
  function automatic byte_t rcon(int unsigned j);
    byte_t r = 8'h01;
    for (int unsigned k = 1; k < j; k++) r = xtime(r);
    return r;
  endfunction

endpackage
