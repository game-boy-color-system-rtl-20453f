// Testbench for reset_gen: power-up countdown, button held, release
// countdown length.
//
// The expected values are worked out from the register definitions, not taken
// from the design under test.
module tb_reset_gen;
  logic clk = 0, button = 0, rst;
  int checks = 0, failures = 0, n;
  always #5 clk = !clk;
  task automatic check(input logic ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  reset_gen #(.COUNT(50)) dut (.clk, .button, .rst);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    #1 check(rst, "reset at power-up");
    n = 0; while (rst) begin @(posedge clk); #1 n++; end
    check(n == 50, $sformatf("power-up reset %0d cycles", n));
    button = 1; repeat (3) @(posedge clk); #1;
    check(rst, "button asserts reset");
    repeat (200) @(posedge clk); #1;
    check(rst, "held while pressed");
    button = 0;
    n = 0; while (rst) begin @(posedge clk); #1 n++; end
    check(n == 52, $sformatf("release countdown %0d cycles (2 sync + 50)", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
