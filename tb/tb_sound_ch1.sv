// Testbench for sound_ch1. The frame ticks are driven directly by the
// testbench. Checks: trigger and amplitude, sweep write-back into NR13/NR14
// and the sweep overflow stop, length counter stop, envelope step down,
// channel off with zero start volume, NR10 read-back with its unused bit.
// Runs at CLK_HZ = 2^20 so the periods are short.
//
// The expected values are worked out from the register definitions, not taken
// from the design under test.
module tb_sound_ch1;
  import gb_pkg::*;
  localparam int HZ = 1 << 20;
  localparam int A  = 34952;
  logic clk = 0, rst = 1;
  logic tick_len = 0, tick_sweep = 0, tick_env = 0;
  mem_req_t req = MEM_IDLE;
  logic [7:0] rdata;
  logic signed [19:0] wave;
  logic active;
  always #5 clk = !clk;
  `include "tb_bus.svh"

  sound_ch1 #(.CLK_HZ(HZ)) dut (.clk, .rst, .io_req(req), .io_rdata(rdata), .tick_len,
                                .tick_sweep, .tick_env, .wave, .active);

  task automatic pulse(input int which);
    if (which == 0) tick_len = 1; else if (which == 1) tick_sweep = 1; else tick_env = 1;
    @(posedge clk); #1;
    tick_len = 0; tick_sweep = 0; tick_env = 0;
    @(posedge clk); #1;
  endtask

  function automatic logic amp_is(input int v);
    return wave == 20'(v * A) || wave == -20'(v * A);
  endfunction

  initial begin #10000000; failures++; finish_tb(); end

  initial begin
    logic [7:0] d;
    repeat (2) @(posedge clk); #1 rst = 0;
    check(!active && wave == 0, "silent after reset");
    bus_expect(16'hFF10, 8'h80, "NR10 reset, bit 7 reads 1");
    // trigger: volume 15, duty 50 %, f = 0x400
    bus_write(16'hFF12, 8'hF0);
    bus_write(16'hFF11, 8'h80);
    bus_write(16'hFF13, 8'h00);
    bus_write(16'hFF14, 8'h84);
    check(active, "active after trigger");
    check(amp_is(15), $sformatf("amplitude 15 (wave %0d)", wave));
    // sweep up, shift 2, time 1: 1024 -> 1280 -> 1600 -> 2000 -> overflow
    bus_write(16'hFF10, 8'h12);
    bus_expect(16'hFF10, 8'h92, "NR10 read-back");
    pulse(1);
    bus_expect(16'hFF13, 8'h00, "sweep 1 low");
    bus_read(16'hFF14, d); check(d[2:0] == 3'd5, "sweep 1 high = 5");
    pulse(1);
    bus_expect(16'hFF13, 8'h40, "sweep 2 low");
    bus_read(16'hFF14, d); check(d[2:0] == 3'd6, "sweep 2 high = 6");
    pulse(1);
    bus_expect(16'hFF13, 8'hD0, "sweep 3 low");
    check(active, "still active below 2048");
    pulse(1);
    check(!active && wave == 0, "sweep overflow stops the channel");
    // sweep down with time 2: two ticks per step
    bus_write(16'hFF10, 8'h29);
    bus_write(16'hFF13, 8'h00);
    bus_write(16'hFF14, 8'h84);
    pulse(1);
    bus_expect(16'hFF13, 8'h00, "sweep time 2: no change after one tick");
    pulse(1);
    bus_read(16'hFF13, d); bus_expect(16'hFF13, 8'h00, "down 1024 - 512 low");
    bus_read(16'hFF14, d); check(d[2:0] == 3'd2, "down 1024 - 512 = 0x200");
    bus_write(16'hFF10, 8'h00);
    // length: 64 - 62 = 2 ticks
    bus_write(16'hFF11, 8'h3E);
    bus_write(16'hFF14, 8'hC4);
    pulse(0);
    check(active, "length 1 of 2");
    pulse(0);
    check(!active, "length ran out");
    // length ignored without NR14 bit 6
    bus_write(16'hFF11, 8'h3F);
    bus_write(16'hFF14, 8'h84);
    pulse(0); pulse(0);
    check(active, "length disabled keeps playing");
    // envelope: start 5, down, step 1 -> 4 -> 3
    bus_write(16'hFF12, 8'h51);
    bus_write(16'hFF14, 8'h84);
    check(amp_is(5), "envelope start 5");
    pulse(2);
    check(amp_is(4), "envelope 4");
    pulse(2);
    check(amp_is(3), "envelope 3");
    bus_write(16'hFF12, 8'h00);
    @(posedge clk); #1;
    check(!active, "zero volume, down: channel off");
    finish_tb();
  end
endmodule
