// tb_aes_sbox_quad: self-checking testbench for aes_sbox_quad.
//
// Instantiates all four quadrants and drives all 256 bytes: the quadrant
// {a[7],a[3]} must give the S-box value (inverse plus affine map, computed
// in the reference package), the other three must give zero.
// Ends with one TB_RESULT line; a watchdog stops the run if it hangs.
module tb_aes_sbox_quad;
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
  logic [7:0] a;
  logic [7:0] y [4];
  aes_sbox_quad #(.Q(0)) dut0 (.a(a), .y(y[0]));
  aes_sbox_quad #(.Q(1)) dut1 (.a(a), .y(y[1]));
  aes_sbox_quad #(.Q(2)) dut2 (.a(a), .y(y[2]));
  aes_sbox_quad #(.Q(3)) dut3 (.a(a), .y(y[3]));
  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      for (int q = 0; q < 4; q++)
        check($sformatf("a=%02h q=%0d", i, q), 128'(y[q]),
              (q == {a[7], a[3]}) ? 128'(sbox(a)) : 128'h0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
