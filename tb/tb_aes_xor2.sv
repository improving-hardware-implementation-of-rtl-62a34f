// tb_aes_xor2: self-checking testbench for aes_xor2.
//
// Random operand pairs against a ^ b, plus the printed example
// 11110011 ^ 11001111 = 00111100.
// Ends with one TB_RESULT line; a watchdog stops the run if it hangs.
module tb_aes_xor2;
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
  logic [7:0] a, b, y;
  aes_xor2 dut (.a(a), .b(b), .y(y));
  initial begin
    a = 8'b11110011; b = 8'b11001111; #1 check("example", 128'(y), 128'b00111100);
    for (int i = 0; i < 500; i++) begin
      a = 8'($urandom); b = 8'($urandom);
      #1 check("random", 128'(y), 128'(a ^ b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
