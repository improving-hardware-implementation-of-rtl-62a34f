// aes_ref_pkg: behavioural AES reference used by the testbenches.
//
// Computes everything from first principles, independently of the RTL:
// GF(2^8) multiplication by shift-and-add, the S-box as multiplicative
// inverse (found by search) plus the affine map, the key schedule for
// NK = 4, 6, 8, 16 words (SubWord also on i mod 4 == 0 when NK > 6), and
// block encryption. Keys are passed left-aligned in 512 bits: word 0 in
// bits 511:480. Simulation only.
package aes_ref_pkg;

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = 8'h00;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  function automatic logic [7:0] ginv(logic [7:0] a);
    if (a == 0) return 8'h00;
    for (int b = 1; b < 256; b++)
      if (gmul(a, 8'(b)) == 8'h01) return 8'(b);
    return 8'h00;
  endfunction

  function automatic logic [7:0] rotl8(logic [7:0] x, int s);
    return 8'((x << s) | (x >> (8 - s)));
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] a);
    logic [7:0] b = ginv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  // Table built once for speed; each entry from sbox().
  logic [7:0] sb_tab [256];
  bit         sb_ready = 0;
  function automatic logic [7:0] sb(logic [7:0] a);
    if (!sb_ready) begin
      for (int i = 0; i < 256; i++) sb_tab[i] = sbox(8'(i));
      sb_ready = 1;
    end
    return sb_tab[a];
  endfunction

  function automatic int nr_of(int nk);
    return (nk == 16) ? 16 : nk + 6;
  endfunction

  function automatic logic [7:0] byte_of(logic [127:0] s, int i);
    return s[127 - 8*i -: 8];
  endfunction

  function automatic logic [127:0] sub_bytes(logic [127:0] s);
    logic [127:0] o;
    for (int i = 0; i < 16; i++) o[127 - 8*i -: 8] = sb(byte_of(s, i));
    return o;
  endfunction

  function automatic logic [127:0] shift_rows(logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = byte_of(s, 4*((c + r) % 4) + r);
    return o;
  endfunction

  function automatic logic [127:0] mix_columns(logic [127:0] s);
    logic [127:0] o;
    logic [7:0] a [4];
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) a[r] = byte_of(s, 4*c + r);
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = gmul(a[r], 8'h02) ^ gmul(a[(r+1)%4], 8'h03)
                                    ^ a[(r+2)%4] ^ a[(r+3)%4];
    end
    return o;
  endfunction

  // Round key r of a key of nk words.
  function automatic logic [127:0] round_key(logic [511:0] key, int nk, int r);
    logic [31:0] w [68];
    logic [31:0] t;
    logic [7:0]  rc = 8'h01;
    int nw = 4 * (nr_of(nk) + 1);
    for (int i = 0; i < nk; i++) w[i] = key[511 - 32*i -: 32];
    for (int i = nk; i < nw; i++) begin
      t = w[i-1];
      if (i % nk == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb(t[31:24]), sb(t[23:16]), sb(t[15:8]), sb(t[7:0])};
        t[31:24] ^= rc;
        rc = gmul(rc, 8'h02);
      end else if (nk > 6 && i % 4 == 0) begin
        t = {sb(t[31:24]), sb(t[23:16]), sb(t[15:8]), sb(t[7:0])};
      end
      w[i] = w[i-nk] ^ t;
    end
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  // State after round `upto` (upto = nr gives the ciphertext).
  function automatic logic [127:0] encrypt_upto(logic [511:0] key, int nk, logic [127:0] pt, int upto);
    logic [127:0] s = pt ^ round_key(key, nk, 0);
    int nr = nr_of(nk);
    for (int r = 1; r <= upto; r++) begin
      s = shift_rows(sub_bytes(s));
      if (r != nr) s = mix_columns(s);
      s ^= round_key(key, nk, r);
    end
    return s;
  endfunction

  function automatic logic [127:0] encrypt(logic [511:0] key, int nk, logic [127:0] pt);
    return encrypt_upto(key, nk, pt, nr_of(nk));
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  function automatic logic [511:0] rand512();
    return {rand128(), rand128(), rand128(), rand128()};
  endfunction

endpackage
