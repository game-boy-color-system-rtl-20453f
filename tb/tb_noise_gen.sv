// Testbench for noise_gen: output sign follows a reference LFSR (bit0 XOR
// bit1 into the top stage) for both widths; sequence periods 127 and 32767.
//
// The expected values are worked out from the register definitions, not taken
// from the design under test.
module tb_noise_gen;
  logic clk = 0, rst = 1, restart = 0, lfsr_sel = 0, shift_tick = 0, en = 1;
  logic [3:0] volume = 4'd5;
  logic signed [19:0] wave;
  int checks = 0, failures = 0;
  always #5 clk = !clk;
  noise_gen dut (.clk, .rst, .restart, .lfsr_sel, .shift_tick, .volume, .en, .wave);
  initial begin #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [14:0] r15;
    logic [6:0] r7;
    int bad, per;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int w = 0; w < 2; w++) begin
      lfsr_sel = 1'(w); restart = 1; @(posedge clk); #1 restart = 0;
      r15 = '1; r7 = '1; bad = 0; per = 0;
      for (int i = 0; i < 40000; i++) begin
        logic b;
        b = w ? r7[0] : r15[0];
        if (wave != (b ? 20'sd5 * 34952 : -20'sd5 * 34952)) bad++;
        shift_tick = 1; @(posedge clk); #1 shift_tick = 0;
        r15 = {r15[0] ^ r15[1], r15[14:1]};
        r7  = {r7[0] ^ r7[1], r7[6:1]};
        if (per == 0 && (w ? r7 == 7'h7F : r15 == 15'h7FFF)) per = i + 1;
      end
      checks += 2;
      if (bad != 0) begin failures++; $display("FAIL width %0d: %0d mismatches", w, bad); end
      if (per != (w ? 127 : 32767)) begin failures++; $display("FAIL period %0d", per); end
    end
    en = 0; #1; checks++; if (wave != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
