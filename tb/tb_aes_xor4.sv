// tb_aes_xor4: self-checking testbench for aes_xor4.
//
// Random operand sets against the 4-way XOR, plus the printed example
// F3, CF, AA, FF -> 69.
// Ends with one TB_RESULT line; a watchdog stops the run if it hangs.
module tb_aes_xor4;
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
  logic [7:0] a, b, c, d, z;
  aes_xor4 dut (.a(a), .b(b), .c(c), .d(d), .z(z));
  initial begin
    a = 8'b11110011; b = 8'b11001111; c = 8'b10101010; d = 8'b11111111;
    #1 check("example", 128'(z), 128'b01101001);
    for (int i = 0; i < 500; i++) begin
      a = 8'($urandom); b = 8'($urandom); c = 8'($urandom); d = 8'($urandom);
      #1 check("random", 128'(z), 128'(a ^ b ^ c ^ d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
