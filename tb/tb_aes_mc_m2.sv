// tb_aes_mc_m2: self-checking testbench for aes_mc_m2.
//
// Drives all 256 bytes and compares with {02}*a computed by shift-and-add
// in the reference package; also the printed example F3 -> FD.
// Ends with one TB_RESULT line; a watchdog stops the run if it hangs.
module tb_aes_mc_m2;
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
  aes_mc_m2 dut (.a(a), .y(y));
  initial begin
    a = 8'hf3; #1 check("F3", 128'(y), 128'h fd);
    for (int i = 0; i < 256; i++) begin
      a = 8'(i); #1 check($sformatf("a=%02h", i), 128'(y), 128'(gmul(8'(i), 8'h02)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
