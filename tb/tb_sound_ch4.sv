// Testbench for sound_ch4: the shift rate set by NR43 (the output may only
// change on multiples of the shift period), the repeat length of the 7-bit
// LFSR (127 shifts) against the 15-bit one, envelope and length.
// CLK_HZ = 2^20: shift period = 2^20 * r' * 2^s / 2^19 clocks.
//
// The expected values are worked out from the register definitions, not taken
// from the design under test.
module tb_sound_ch4;
  import gb_pkg::*;
  localparam int HZ = 1 << 20;
  localparam int A  = 34952;
  logic clk = 0, rst = 1;
  logic tick_len = 0, tick_env = 0;
  mem_req_t req = MEM_IDLE;
  logic [7:0] rdata;
  logic signed [19:0] wave;
  logic active;
  always #5 clk = !clk;
  `include "tb_bus.svh"

  sound_ch4 #(.CLK_HZ(HZ)) dut (.clk, .rst, .io_req(req), .io_rdata(rdata), .tick_len,
                                .tick_env, .wave, .active);

  logic [19:0] hist [8192];

  initial begin #20000000; failures++; finish_tb(); end

  initial begin
    int off, changes, diff;
    repeat (2) @(posedge clk); #1 rst = 0;
    bus_write(16'hFF21, 8'hF0);     // NR42: volume 15
    bus_write(16'hFF22, 8'h21);     // NR43: s = 2, r = 1 -> 2 * 4 * 2 = 16 clocks
    bus_write(16'hFF23, 8'h80);     // trigger
    check(active, "active after trigger");
    // the output changes only 16k cycles after the trigger
    off = 0; changes = 0;
    for (int c = 1; c < 2000; c++) begin
      logic signed [19:0] prev;
      prev = wave;
      @(posedge clk); #1;
      if (wave != prev) begin
        changes++;
        if (c % 16 != 0) off++;
      end
      if (wave != 20'(15 * A) && wave != -20'(15 * A)) off++;
    end
    check(changes > 20 && off == 0, $sformatf("shift period 16: %0d changes, %0d off-grid", changes, off));
    // 7-bit mode, shift every 2 clocks (s = 0, r = 0): repeats after 127 shifts
    bus_write(16'hFF22, 8'h08);
    bus_write(16'hFF23, 8'h80);
    for (int c = 0; c < 8192; c++) begin hist[c] = wave; @(posedge clk); #1; end
    diff = 0;
    for (int c = 0; c < 4000; c++) if (hist[c] != hist[c + 254]) diff++;
    check(diff == 0, $sformatf("7-bit LFSR repeats after 127 shifts (%0d differ)", diff));
    // 15-bit mode does not repeat after 127 shifts
    bus_write(16'hFF22, 8'h00);
    bus_write(16'hFF23, 8'h80);
    for (int c = 0; c < 8192; c++) begin hist[c] = wave; @(posedge clk); #1; end
    diff = 0;
    for (int c = 0; c < 4000; c++) if (hist[c] != hist[c + 254]) diff++;
    check(diff > 100, $sformatf("15-bit LFSR differs from 127-shift repeat (%0d differ)", diff));
    // envelope down from 2, step 1
    bus_write(16'hFF21, 8'h21);
    bus_write(16'hFF23, 8'h80);
    tick_env = 1; @(posedge clk); #1 tick_env = 0;
    check(wave == 20'(A) || wave == -20'(A), "envelope 2 -> 1");
    // length 64 - 63 = 1
    bus_write(16'hFF20, 8'h3F);
    bus_write(16'hFF23, 8'hC0);
    check(active, "length started");
    tick_len = 1; @(posedge clk); #1 tick_len = 0;
    check(!active && wave == 0, "length ran out");
    bus_expect(16'hFF20, 8'hFF, "NR41 reads with unused ones");
    finish_tb();
  end
endmodule
