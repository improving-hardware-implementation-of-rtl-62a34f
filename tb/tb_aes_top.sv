// tb_aes_top: end-to-end testbench of the whole design at its default size.
//
// Drives all eight encryptors of aes_top (ECB and two-block CBC for 128-,
// 192-, 256- and 512-bit keys) with published vectors and with random keys
// and blocks, and compares every output with the reference model. It counts
// how often each mechanism was exercised (ECB per key size, CBC chaining
// per key size with the IV reaching the second block, last-round-key
// output) and counts a failure for any that never happened.
// Ends with one TB_RESULT line; a watchdog stops the run if it hangs.
module tb_aes_top;
  import aes_ref_pkg::*;

  localparam logic [255:0] K256 = 256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4;
  localparam logic [127:0] P1   = 128'h6bc1bee22e409f96e93d7e117393172a;
  localparam logic [127:0] P2   = 128'hae2d8a571e03ac9c9eb76fac45af8e51;
  localparam int NKS [4] = '{4, 6, 8, 16};

  int checks = 0;
  int failures = 0;
  int ecb_seen [4];
  int cbc_seen [4];
  int subkey_seen = 0;

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [511:0] key [4];          // left-aligned keys, one per size
  logic [127:0] ecb_pt [4], ecb_ct [4], ecb_sk [4];
  logic [127:0] iv [4];
  logic [127:0] cbc_pt [4][2], cbc_ct [4][2];

  aes_top dut (
    .ecb128_key(key[0][511:384]), .ecb128_pt(ecb_pt[0]), .ecb128_ct(ecb_ct[0]), .ecb128_subkey(ecb_sk[0]),
    .ecb192_key(key[1][511:320]), .ecb192_pt(ecb_pt[1]), .ecb192_ct(ecb_ct[1]), .ecb192_subkey(ecb_sk[1]),
    .ecb256_key(key[2][511:256]), .ecb256_pt(ecb_pt[2]), .ecb256_ct(ecb_ct[2]), .ecb256_subkey(ecb_sk[2]),
    .ecb512_key(key[3]),          .ecb512_pt(ecb_pt[3]), .ecb512_ct(ecb_ct[3]), .ecb512_subkey(ecb_sk[3]),
    .cbc128_key(key[0][511:384]), .cbc128_iv(iv[0]), .cbc128_pt(cbc_pt[0]), .cbc128_ct(cbc_ct[0]),
    .cbc192_key(key[1][511:320]), .cbc192_iv(iv[1]), .cbc192_pt(cbc_pt[1]), .cbc192_ct(cbc_ct[1]),
    .cbc256_key(key[2][511:256]), .cbc256_iv(iv[2]), .cbc256_pt(cbc_pt[2]), .cbc256_ct(cbc_ct[2]),
    .cbc512_key(key[3]),          .cbc512_iv(iv[3]), .cbc512_pt(cbc_pt[3]), .cbc512_ct(cbc_ct[3])
  );

  function automatic logic [511:0] trim(logic [511:0] k, int nk);
    return (nk == 16) ? k : k & ~(512'(-1) >> (32 * nk));
  endfunction

  // Compare every output with the model and count the mechanisms seen.
  task automatic compare_all(string tag);
    logic [127:0] c0, c1;
    for (int v = 0; v < 4; v++) begin
      int nk = NKS[v];
      logic [511:0] k = trim(key[v], nk);
      check($sformatf("%s ecb nk%0d", tag, nk), ecb_ct[v], encrypt(k, nk, ecb_pt[v]));
      check($sformatf("%s subkey nk%0d", tag, nk), ecb_sk[v], round_key(k, nk, nr_of(nk)));
      ecb_seen[v]++;
      subkey_seen++;
      c0 = encrypt(k, nk, cbc_pt[v][0] ^ iv[v]);
      c1 = encrypt(k, nk, cbc_pt[v][1] ^ c0);
      check($sformatf("%s cbc0 nk%0d", tag, nk), cbc_ct[v][0], c0);
      check($sformatf("%s cbc1 nk%0d", tag, nk), cbc_ct[v][1], c1);
    end
  endtask

  // Flip the IVs and see each chain's second block change accordingly.
  task automatic chain_probe();
    logic [127:0] prev_ct [4];
    for (int v = 0; v < 4; v++) prev_ct[v] = cbc_ct[v][1];
    for (int v = 0; v < 4; v++) iv[v] ^= 128'h80;
    #1;
    for (int v = 0; v < 4; v++) begin
      checks++;
      if (cbc_ct[v][1] != prev_ct[v]) cbc_seen[v]++;
      else begin failures++; $display("FAIL chain nk%0d: IV change did not reach block 1", NKS[v]); end
    end
    compare_all("after iv flip");
  endtask

  initial begin
    // Published vectors: SP 800-38A ECB/CBC for 128- and 256-bit keys, the
    // 512-bit core with the 256-bit key written twice.
    key[0] = {128'h2b7e151628aed2a6abf7158809cf4f3c, 384'h0};
    key[1] = {192'h8e73b0f7da0e6452c810f32b809079e562f8ead2522c6b7b, 320'h0};
    key[2] = {K256, 256'h0};
    key[3] = {K256, K256};
    for (int v = 0; v < 4; v++) begin
      ecb_pt[v] = P1;
      iv[v] = 128'h000102030405060708090a0b0c0d0e0f;
      cbc_pt[v][0] = P1;
      cbc_pt[v][1] = P2;
    end
    #1;
    check("ecb128 vector", ecb_ct[0], 128'h3ad77bb40d7a3660a89ecaf32466ef97);
    check("ecb192 vector", ecb_ct[1], 128'hbd334f1d6e45f25ff712a214571fa5cc);
    check("ecb256 vector", ecb_ct[2], 128'hf3eed1bdb5d2a03c064b5a7e3db181f8);
    check("cbc128 c1", cbc_ct[0][0], 128'h7649abac8119b246cee98e9b12e9197d);
    check("cbc128 c2", cbc_ct[0][1], 128'h5086cb9b507219ee95db113a917678b2);
    check("cbc256 c1", cbc_ct[2][0], 128'hf58c4c04d6e5f1ba779eabfb5f7bfbd6);
    check("cbc256 c2", cbc_ct[2][1], 128'h9cfc4e967edb808d679f777bc6702c7d);
    check("aes512 round 9 subkey", round_key(key[3], 16, 9), 128'hc6e13f1f5530abd2eb792fbc5c247426);
    compare_all("vectors");
    chain_probe();

    for (int i = 0; i < 10; i++) begin
      for (int v = 0; v < 4; v++) begin
        key[v] = rand512(); ecb_pt[v] = rand128(); iv[v] = rand128();
        cbc_pt[v][0] = rand128(); cbc_pt[v][1] = rand128();
      end
      #1;
      compare_all($sformatf("random %0d", i));
      chain_probe();
    end

    for (int v = 0; v < 4; v++) begin
      $display("nk%0d: ecb checked %0d times, cbc chaining seen %0d times", NKS[v], ecb_seen[v], cbc_seen[v]);
      if (ecb_seen[v] == 0) begin failures++; $display("FAIL ecb nk%0d never exercised", NKS[v]); end
      if (cbc_seen[v] == 0) begin failures++; $display("FAIL cbc nk%0d chaining never seen", NKS[v]); end
    end
    if (subkey_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
