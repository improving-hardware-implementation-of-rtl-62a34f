// tb_aes_avalanche: avalanche-effect measurement on the AES-128 and AES-512
// cores.
//
// For random keys and plaintexts, one plaintext bit is flipped and the
// number of ciphertext bits that change is counted. A good block cipher
// changes about half of them. Each trial must change between 20 and 108 of
// the 128 bits (more than 7 standard deviations from 64 either way), and
// the mean over all trials must lie between 45% and 55%. Also checks the
// ciphertexts themselves against the reference model.
// Ends with one TB_RESULT line; a watchdog stops the run if it hangs.
module tb_aes_avalanche;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [511:0] key;
  logic [127:0] pt_a, pt_b;
  logic [127:0] ca4, cb4, ca16, cb16, unused4a, unused4b, unused16a, unused16b;

  aes_cipher #(.NK(4))  u_a4  (.key(key[511:384]), .pt(pt_a), .ct(ca4),  .subkey(unused4a));
  aes_cipher #(.NK(4))  u_b4  (.key(key[511:384]), .pt(pt_b), .ct(cb4),  .subkey(unused4b));
  aes_cipher #(.NK(16)) u_a16 (.key(key),          .pt(pt_a), .ct(ca16), .subkey(unused16a));
  aes_cipher #(.NK(16)) u_b16 (.key(key),          .pt(pt_b), .ct(cb16), .subkey(unused16b));

  task automatic judge(string n, logic [127:0] x, logic [127:0] y, ref longint total);
    int d = $countones(x ^ y);
    total += longint'(d);
    checks++;
    if (d < 20 || d > 108) begin
      failures++;
      $display("FAIL %s: only %0d bits changed", n, d);
    end
  endtask

  initial begin
    automatic longint tot4 = 0, tot16 = 0;
    automatic int trials = 0;
    for (int t = 0; t < 200; t++) begin
      key  = rand512();
      pt_a = rand128();
      pt_b = pt_a ^ (128'h1 << ($urandom % 128));
      #1;
      checks += 2;
      if (ca4 !== encrypt({key[511:384], 384'h0}, 4, pt_a)) failures++;
      if (ca16 !== encrypt(key, 16, pt_a)) failures++;
      judge("aes128", ca4, cb4, tot4);
      judge("aes512", ca16, cb16, tot16);
      trials++;
    end
    $display("avalanche aes128: %0.2f%%, aes512: %0.2f%% over %0d trials",
             100.0 * tot4 / (128.0 * trials), 100.0 * tot16 / (128.0 * trials), trials);
    checks += 2;
    if (tot4  * 100 < 45 * 128 * trials || tot4  * 100 > 55 * 128 * trials) failures++;
    if (tot16 * 100 < 45 * 128 * trials || tot16 * 100 > 55 * 128 * trials) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
