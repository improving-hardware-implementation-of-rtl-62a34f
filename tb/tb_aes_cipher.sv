// tb_aes_cipher: self-checking testbench for aes_cipher.
//
// Four cores (AES-128/192/256/512) against published vectors (FIPS-197
// appendix C, SP 800-38A ECB) and against the reference model on random
// keys and blocks. The 512-bit core also checks the last round key.
// Ends with one TB_RESULT line; a watchdog stops the run if it hangs.
module tb_aes_cipher;
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
  localparam logic [255:0] K256 = 256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4;
  localparam logic [127:0] P0   = 128'h00112233445566778899aabbccddeeff;
  localparam logic [127:0] P1   = 128'h6bc1bee22e409f96e93d7e117393172a;

  logic [127:0] k4;
  logic [191:0] k6;
  logic [255:0] k8;
  logic [511:0] k16;
  logic [127:0] pt;
  logic [127:0] ct4, ct6, ct8, ct16, sk4, sk6, sk8, sk16;

  aes_cipher #(.NK(4))  dut4  (.key(k4),  .pt(pt), .ct(ct4),  .subkey(sk4));
  aes_cipher #(.NK(6))  dut6  (.key(k6),  .pt(pt), .ct(ct6),  .subkey(sk6));
  aes_cipher #(.NK(8))  dut8  (.key(k8),  .pt(pt), .ct(ct8),  .subkey(sk8));
  aes_cipher #(.NK(16)) dut16 (.key(k16), .pt(pt), .ct(ct16), .subkey(sk16));

  initial begin
    pt  = P0;
    k4  = 128'h000102030405060708090a0b0c0d0e0f;
    k6  = 192'h000102030405060708090a0b0c0d0e0f1011121314151617;
    k8  = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
    k16 = {K256, K256};
    #1;
    check("fips aes128", ct4, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    check("fips aes192", ct6, 128'hdda97ca4864cdfe06eaf70a0ec0d7191);
    check("fips aes256", ct8, 128'h8ea2b7ca516745bfeafc49904b496089);
    check("aes512 ref",  ct16, encrypt(k16, 16, P0));
    pt = P1; k4 = 128'h2b7e151628aed2a6abf7158809cf4f3c; k8 = K256;
    #1;
    check("sp800-38a ecb aes128", ct4, 128'h3ad77bb40d7a3660a89ecaf32466ef97);
    check("sp800-38a ecb aes256", ct8, 128'hf3eed1bdb5d2a03c064b5a7e3db181f8);
    check("aes128 subkey", sk4, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
    check("aes512 subkey", sk16, round_key(k16, 16, 16));
    check("aes512 round 9 state", encrypt_upto(k16, 16, P1, 9), 128'hfdfaeea39003ae13205d1675715727e3);
    check("aes512", ct16, encrypt(k16, 16, P1));
    for (int i = 0; i < 40; i++) begin
      k16 = rand512(); pt = rand128();
      k4 = k16[511:384]; k6 = k16[511:320]; k8 = k16[511:256];
      #1;
      check("rand aes128", ct4,  encrypt({k4, 384'h0}, 4, pt));
      check("rand aes192", ct6,  encrypt({k6, 320'h0}, 6, pt));
      check("rand aes256", ct8,  encrypt({k8, 256'h0}, 8, pt));
      check("rand aes512", ct16, encrypt(k16, 16, pt));
      check("rand aes192 subkey", sk6, round_key({k6, 320'h0}, 6, 12));
      check("rand aes256 subkey", sk8, round_key({k8, 256'h0}, 8, 14));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
