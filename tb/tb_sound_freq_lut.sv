// Testbench for sound_freq_lut: period in clocks against the formulas
// CLK_HZ*(2048-x)/131072 (channels 1, 2) and CLK_HZ*(2048-x)/65536 (channel 3).
//
// The expected values are worked out from the register definitions, not taken
// from the design under test.
module tb_sound_freq_lut;
  logic [10:0] freq;
  logic ch3;
  logic [31:0] clocks, clocks_b;
  int checks = 0, failures = 0;
  sound_freq_lut dut (.freq, .ch3, .clocks);
  sound_freq_lut #(.CLK_HZ(48000)) dut_b (.freq, .ch3, .clocks(clocks_b));
  initial begin
    for (int i = 0; i < 400; i++) begin
      longint e, eb;
      freq = (i < 2) ? 11'(i * 2047) : 11'($urandom); ch3 = 1'(i & 1); #1;
      e  = longint'(33554432) * (2048 - freq) / (ch3 ? 65536 : 131072);
      eb = longint'(48000) * (2048 - freq) / (ch3 ? 65536 : 131072);
      checks += 2;
      if (clocks != 32'(e))   begin failures++; $display("FAIL x=%0d ch3=%0d %0d != %0d", freq, ch3, clocks, e); end
      if (clocks_b != 32'(eb)) begin failures++; $display("FAIL 48k x=%0d", freq); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
