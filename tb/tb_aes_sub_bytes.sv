// tb_aes_sub_bytes: self-checking testbench for aes_sub_bytes.
//
// Random states and the byte ramp 00..0F (gives 637C777B F26B6FC5 3001672B
// FED7AB76) against byte-wise reference S-boxes.
// Ends with one TB_RESULT line; a watchdog stops the run if it hangs.
module tb_aes_sub_bytes;
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
  aes_sub_bytes dut (.a(a), .b(b));
  initial begin
    a = 128'h000102030405060708090a0b0c0d0e0f;
    #1 check("ramp", b, 128'h637c777bf26b6fc53001672bfed7ab76);
    for (int i = 0; i < 300; i++) begin
      a = rand128(); #1 check("random", b, sub_bytes(a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
