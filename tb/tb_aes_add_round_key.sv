// tb_aes_add_round_key: self-checking testbench for aes_add_round_key.
//
// Random state/key pairs against state ^ key.
// Ends with one TB_RESULT line; a watchdog stops the run if it hangs.
module tb_aes_add_round_key;
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
  logic [127:0] s, k, o;
  aes_add_round_key dut (.state_in(s), .round_key(k), .state_out(o));
  initial begin
    for (int i = 0; i < 300; i++) begin
      s = rand128(); k = rand128(); #1 check("random", o, s ^ k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
