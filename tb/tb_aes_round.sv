// tb_aes_round: self-checking testbench for aes_round.
//
// A full round and a final round on random states and keys against the
// reference transformations; the FIPS-197 first-round example as well.
// Ends with one TB_RESULT line; a watchdog stops the run if it hangs.
module tb_aes_round;
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
  logic [127:0] s, k, o_full, o_final;
  aes_round #(.FINAL(1'b0)) dut_full  (.state_in(s), .round_key(k), .state_out(o_full));
  aes_round #(.FINAL(1'b1)) dut_final (.state_in(s), .round_key(k), .state_out(o_final));
  initial begin
    s = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    k = 128'ha0fafe1788542cb123a339392a6c7605;
    #1 check("fips197 round 1", o_full, 128'ha49c7ff2689f352b6b5bea43026a5049);
    for (int i = 0; i < 200; i++) begin
      s = rand128(); k = rand128(); #1;
      check("full",  o_full,  mix_columns(shift_rows(sub_bytes(s))) ^ k);
      check("final", o_final, shift_rows(sub_bytes(s)) ^ k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
