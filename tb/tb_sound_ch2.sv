// Testbench for sound_ch2: trigger, waveform period from NR23/NR24, envelope
// step up, length counter stop, register read-back. The frame ticks are
// driven directly; CLK_HZ = 2^20, so one period is 8 * (2048 - x) clocks.
//
// The expected values are worked out from the register definitions, not taken
// from the design under test.
module tb_sound_ch2;
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

  sound_ch2 #(.CLK_HZ(HZ)) dut (.clk, .rst, .io_req(req), .io_rdata(rdata), .tick_len,
                                .tick_env, .wave, .active);

  task automatic pulse(input logic env);
    if (env) tick_env = 1; else tick_len = 1;
    @(posedge clk); #1;
    tick_len = 0; tick_env = 0;
    @(posedge clk); #1;
  endtask

  function automatic logic amp_is(input int v);
    return wave == 20'(v * A) || wave == -20'(v * A);
  endfunction

  initial begin #10000000; failures++; finish_tb(); end

  initial begin
    int t0, t1;
    repeat (2) @(posedge clk); #1 rst = 0;
    bus_write(16'hFF17, 8'hA0);
    bus_expect(16'hFF17, 8'hA0, "NR22 read-back");
    bus_write(16'hFF16, 8'h80);
    bus_write(16'hFF18, 8'hD0);
    bus_write(16'hFF19, 8'h87);          // x = 0x7D0 = 2000, period 384
    check(active && amp_is(10), "trigger, volume 10");
    // period: time between two rising edges
    while (wave > 0) @(posedge clk);
    while (wave < 0) @(posedge clk);
    t0 = $time;
    while (wave > 0) @(posedge clk);
    while (wave < 0) @(posedge clk);
    t1 = $time;
    check((t1 - t0) / 10 == 384, $sformatf("period %0d clocks, expected 384", (t1 - t0) / 10));
    #1;
    // envelope up, step 2: two ticks per step
    bus_write(16'hFF17, 8'hAA);
    bus_write(16'hFF19, 8'h87);
    pulse(1);
    check(amp_is(10), "envelope holds after one tick");
    pulse(1);
    check(amp_is(11), "envelope up to 11");
    // length 64 - 61 = 3
    bus_write(16'hFF16, 8'h3D);
    bus_write(16'hFF19, 8'hC7);
    pulse(0); pulse(0);
    check(active, "length not yet out");
    pulse(0);
    check(!active && wave == 0, "length ran out");
    finish_tb();
  end
endmodule
