// tb_aes_sbox: self-checking testbench for aes_sbox.
//
// All 256 inputs against the S-box computed from the GF(2^8) inverse and
// the affine map; also the worked example C3 -> 2E and a permutation check.
// Ends with one TB_RESULT line; a watchdog stops the run if it hangs.
module tb_aes_sbox;
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
  logic [7:0] a, y;
  bit seen [256];
  aes_sbox dut (.a(a), .y(y));
  initial begin
    a = 8'hc3; #1 check("C3", 128'(y), 128'h2e);
    for (int i = 0; i < 256; i++) begin
      a = 8'(i); #1 check($sformatf("a=%02h", i), 128'(y), 128'(sbox(8'(i))));
      seen[y] = 1'b1;
    end
    for (int i = 0; i < 256; i++) check("permutation", 128'(seen[i]), 128'(1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
