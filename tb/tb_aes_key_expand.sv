// tb_aes_key_expand: self-checking testbench for aes_key_expand.
//
// One schedule per key size (4, 6, 8, 16 words). Every round key is compared
// with the reference schedule for random keys; fixed anchors are the
// FIPS-197 AES-128 last round key and the 512-bit schedule's round-9 key
// C6E13F1F5530ABD2EB792FBC5C247426 for the SP 800-38A 256-bit key repeated.
// Ends with one TB_RESULT line; a watchdog stops the run if it hangs.
module tb_aes_key_expand;
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

  logic [127:0] k4;
  logic [191:0] k6;
  logic [255:0] k8;
  logic [511:0] k16;
  logic [127:0] rk4 [11];
  logic [127:0] rk6 [13];
  logic [127:0] rk8 [15];
  logic [127:0] rk16 [17];

  aes_key_expand #(.NK(4))  dut4  (.key(k4),  .round_keys(rk4));
  aes_key_expand #(.NK(6))  dut6  (.key(k6),  .round_keys(rk6));
  aes_key_expand #(.NK(8))  dut8  (.key(k8),  .round_keys(rk8));
  aes_key_expand #(.NK(16)) dut16 (.key(k16), .round_keys(rk16));

  task automatic compare_all();
    for (int r = 0; r <= 10; r++) check($sformatf("nk4 r%0d", r),  rk4[r],  round_key({k4,  384'h0}, 4, r));
    for (int r = 0; r <= 12; r++) check($sformatf("nk6 r%0d", r),  rk6[r],  round_key({k6,  320'h0}, 6, r));
    for (int r = 0; r <= 14; r++) check($sformatf("nk8 r%0d", r),  rk8[r],  round_key({k8,  256'h0}, 8, r));
    for (int r = 0; r <= 16; r++) check($sformatf("nk16 r%0d", r), rk16[r], round_key(k16, 16, r));
  endtask

  initial begin
    k4  = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    k6  = 192'h000102030405060708090a0b0c0d0e0f1011121314151617;
    k8  = K256;
    k16 = {K256, K256};
    #1;
    check("aes128 rk10", rk4[10], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
    check("aes512 rk9", rk16[9], 128'hc6e13f1f5530abd2eb792fbc5c247426);
    compare_all();
    for (int i = 0; i < 20; i++) begin
      k16 = rand512();
      k4 = k16[511:384]; k6 = k16[511:320]; k8 = k16[511:256];
      #1 compare_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
