// Testbench for sound_ch3: wave RAM write and read, the order in which the
// 32 samples are played (high nibble first), samples per period, the NR32
// output level shifts, length counter and the NR30 on/off switch.
// CLK_HZ = 2^20: one period is 16 * (2048 - x) clocks, a sample 1/32 of it.
//
// The expected values are worked out from the register definitions, not taken
// from the design under test.
module tb_sound_ch3;
  import gb_pkg::*;
  localparam int HZ = 1 << 20;
  localparam int A  = 34952;
  logic clk = 0, rst = 1;
  logic tick_len = 0;
  mem_req_t req = MEM_IDLE;
  logic [7:0] rdata;
  logic signed [19:0] wave;
  logic active;
  always #5 clk = !clk;
  `include "tb_bus.svh"

  sound_ch3 #(.CLK_HZ(HZ)) dut (.clk, .rst, .io_req(req), .io_rdata(rdata), .tick_len,
                                .wave, .active);

  logic [7:0] pat [16];

  function automatic logic [3:0] nibble(input int i);
    return i[0] ? pat[i / 2][3:0] : pat[i / 2][7:4];
  endfunction

  initial begin #10000000; failures++; finish_tb(); end

  initial begin
    int bad;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 16; i++) begin
      pat[i] = 8'($urandom);
      bus_write(16'hFF30 + 16'(i), pat[i]);
    end
    bad = 0;
    for (int i = 0; i < 16; i++) begin
      logic [7:0] d;
      bus_read(16'hFF30 + 16'(i), d);
      if (d != pat[i]) bad++;
    end
    check(bad == 0, "wave RAM read-back");
    bus_write(16'hFF1A, 8'h80);
    bus_write(16'hFF1C, 8'h20);          // level 100 %
    bus_write(16'hFF1D, 8'hE0);
    bus_write(16'hFF1E, 8'h87);          // x = 0x7E0 = 2016: 512 clocks, 16 per sample
    check(active, "active after trigger");
    // sample k is held from cycle 16k to 16k + 15 after the trigger
    bad = 0;
    for (int k = 0; k < 40; k++) begin
      repeat (8) @(posedge clk); #1;
      if (wave != 20'(nibble(k % 32) * A)) bad++;
      repeat (8) @(posedge clk); #1;
    end
    check(bad == 0, $sformatf("sample sequence, %0d wrong", bad));
    // level 50 % and 25 %
    bus_write(16'hFF1C, 8'h40);
    bus_write(16'hFF1E, 8'h87);
    repeat (4) @(posedge clk); #1;
    check(wave == 20'((nibble(0) >> 1) * A), "level 50 %");
    bus_write(16'hFF1C, 8'h60);
    bus_write(16'hFF1E, 8'h87);
    repeat (4) @(posedge clk); #1;
    check(wave == 20'((nibble(0) >> 2) * A), "level 25 %");
    bus_write(16'hFF1C, 8'h00);
    check(wave == 0, "level 0 is silent");
    bus_expect(16'hFF1C, 8'h9F, "NR32 read-back with unused ones");
    // length 256 - 254 = 2
    bus_write(16'hFF1B, 8'hFE);
    bus_write(16'hFF1E, 8'hC7);
    tick_len = 1; @(posedge clk); #1 tick_len = 0;
    check(active, "length 1 of 2");
    tick_len = 1; @(posedge clk); #1 tick_len = 0;
    check(!active, "length ran out");
    bus_write(16'hFF1E, 8'h87);
    bus_write(16'hFF1A, 8'h00);
    @(posedge clk); #1;
    check(!active && wave == 0, "NR30 bit 7 clear turns the channel off");
    finish_tb();
  end
endmodule
