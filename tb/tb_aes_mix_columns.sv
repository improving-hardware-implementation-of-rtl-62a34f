// tb_aes_mix_columns: self-checking testbench for aes_mix_columns.
//
// The worked example column D4 BF 5D 30 -> 04 66 81 E5 (first byte 66 is
// the example worked out by hand for MixColumns), then random states
// against the matrix product computed with generic GF(2^8) multiplication.
// Ends with one TB_RESULT line; a watchdog stops the run if it hangs.
module tb_aes_mix_columns;
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
  logic [127:0] a, b;
  aes_mix_columns dut (.a(a), .b(b));
  initial begin
    a = {32'hd4bf5d30, 32'he0b452ae, 32'hb84111f1, 32'h1e2798e5};
    #1 check("example", b, {32'h046681e5, 32'he0cb199a, 32'h48f8d37a, 32'h2806264c});
    for (int i = 0; i < 300; i++) begin
      a = rand128(); #1 check("random", b, mix_columns(a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
