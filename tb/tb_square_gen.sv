// Testbench for square_gen: period length, high time for each duty cycle,
// amplitude from the volume, silence when disabled.
//
// The expected values are worked out from the register definitions, not taken
// from the design under test.
module tb_square_gen;
  localparam int HZ = 1 << 20;
  logic clk = 0, rst = 1, en = 0;
  logic [10:0] freq = 11'd2000;
  logic [3:0] volume = 4'd9;
  logic [1:0] duty = 0;
  logic signed [19:0] wave;
  int checks = 0, failures = 0;
  always #5 clk = !clk;
  task automatic check(input logic ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  square_gen #(.CLK_HZ(HZ)) dut (.clk, .rst, .freq, .volume, .duty, .en, .wave);
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int per = HZ / 131072 * (2048 - 2000);   // 384
    int exp_hi [4];
    exp_hi = '{per / 8, per / 4, per / 2, per - per / 4};
    repeat (2) @(posedge clk); #1 rst = 0;
    check(wave == 0, "disabled is silent");
    for (int d = 0; d < 4; d++) begin
      int hi, lo, other;
      hi = 0; lo = 0; other = 0;
      duty = 2'(d); en = 0; @(posedge clk); #1 en = 1;
      for (int c = 0; c < 3 * per; c++) begin
        #1;
        if (wave == 20'sd9 * 34952) hi++; else if (wave == -20'sd9 * 34952) lo++; else other++;
        @(posedge clk);
      end
      check(hi == 3 * exp_hi[d] && lo == 3 * (per - exp_hi[d]) && other == 0,
            $sformatf("duty %0d: high %0d low %0d", d, hi, lo));
    end
    freq = 11'd2040; volume = 4'd15; duty = 2;
    en = 0; @(posedge clk); #1 en = 1;
    begin
      int hi;
      hi = 0;
      for (int c = 0; c < 64; c++) begin #1 if (wave == 20'sd15 * 34952) hi++; @(posedge clk); end
      check(hi == 32, $sformatf("x=2040 period 64, half high (%0d)", hi));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
