// tb_aes_cbc: self-checking testbench for aes_cbc.
//
// Two-block CBC chains for all four key sizes. The AES-128 chain is checked
// against the SP 800-38A CBC vectors; all chains against the reference
// C0 = E(P0 ^ IV), C1 = E(P1 ^ C0) on random data. A changed IV must change
// both ciphertexts (the chaining reaches the second block).
// Ends with one TB_RESULT line; a watchdog stops the run if it hangs.
module tb_aes_cbc;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;

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
  logic [511:0] key;
  logic [127:0] iv;
  logic [127:0] pt [2];
  logic [127:0] c4 [2], c6 [2], c8 [2], c16 [2];
  int chained = 0;

  aes_cbc #(.NK(4),  .NBLOCKS(2)) dut4  (.key(key[511:384]), .iv(iv), .pt(pt), .ct(c4));
  aes_cbc #(.NK(6),  .NBLOCKS(2)) dut6  (.key(key[511:320]), .iv(iv), .pt(pt), .ct(c6));
  aes_cbc #(.NK(8),  .NBLOCKS(2)) dut8  (.key(key[511:256]), .iv(iv), .pt(pt), .ct(c8));
  aes_cbc #(.NK(16), .NBLOCKS(2)) dut16 (.key(key),          .iv(iv), .pt(pt), .ct(c16));

  task automatic check_chain(string n, int nk, logic [127:0] c [2]);
    logic [511:0] k = key;
    logic [127:0] e0, e1;
    if (nk < 16) k = k & ~(512'(-1) >> (32 * nk));
    e0 = encrypt(k, nk, pt[0] ^ iv);
    e1 = encrypt(k, nk, pt[1] ^ e0);
    check({n, " block0"}, c[0], e0);
    check({n, " block1"}, c[1], e1);
  endtask

  initial begin
    logic [127:0] old0, old1;
    key = {128'h2b7e151628aed2a6abf7158809cf4f3c, 384'h0};
    iv  = 128'h000102030405060708090a0b0c0d0e0f;
    pt[0] = 128'h6bc1bee22e409f96e93d7e117393172a;
    pt[1] = 128'hae2d8a571e03ac9c9eb76fac45af8e51;
    #1;
    check("sp800-38a cbc c1", c4[0], 128'h7649abac8119b246cee98e9b12e9197d);
    check("sp800-38a cbc c2", c4[1], 128'h5086cb9b507219ee95db113a917678b2);
    for (int i = 0; i < 20; i++) begin
      key = rand512(); iv = rand128(); pt[0] = rand128(); pt[1] = rand128();
      #1;
      check_chain("aes128", 4, c4);
      check_chain("aes192", 6, c6);
      check_chain("aes256", 8, c8);
      check_chain("aes512", 16, c16);
      old0 = c16[0]; old1 = c16[1];
      iv = iv ^ 128'h1;
      #1;
      checks++;
      if (c16[0] != old0 && c16[1] != old1) chained++;
      else begin failures++; $display("FAIL IV change did not reach both blocks"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
