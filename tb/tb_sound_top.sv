// Testbench for sound_top: NR52 power switch and channel status bits,
// NR51 left/right routing of the mix, the mix value (sum / 4), the hand-over
// of the sample on the codec strobe in the separate bit-clock domain, the
// 256 Hz frame tick seen through a length counter, and channel registers
// cleared while the unit is off. CLK_HZ = 2^20, so one frame tick is 4096
// clocks.
//
// The expected values are worked out from the register definitions, not taken
// from the design under test.
module tb_sound_top;
  import gb_pkg::*;
  localparam int HZ = 1 << 20;
  localparam int A  = 34952;
  logic clk = 0, rst = 1;
  logic bclk = 0, strobe = 0;
  mem_req_t req = MEM_IDLE;
  logic [7:0] rdata;
  logic signed [19:0] left_out, right_out;
  logic [3:0] ch_active;
  always #5 clk = !clk;
  always #41 bclk = !bclk;
  `include "tb_bus.svh"

  sound_top #(.CLK_HZ(HZ)) dut (.clk, .rst, .io_req(req), .io_rdata(rdata),
                                .ac97_bit_clk(bclk), .ac97_strobe(strobe),
                                .left_out, .right_out, .ch_active);

  // codec frame: one strobe every 16 bit clocks
  int strobes = 0;
  initial begin
    forever begin
      repeat (15) @(negedge bclk);
      strobe = 1; @(negedge bclk); strobe = 0;
      strobes++;
    end
  end

  task automatic wait_strobes(input int n);
    int s0;
    s0 = strobes;
    while (strobes < s0 + n) @(posedge clk);
    #1;
  endtask

  initial begin #30000000; failures++; finish_tb(); end

  initial begin
    int t0, hi, lo, other;
    repeat (2) @(posedge clk); #1 rst = 0;
    bus_expect(16'hFF26, 8'h70, "NR52 off after reset");
    bus_write(16'hFF17, 8'hF0);
    bus_expect(16'hFF17, 8'h00, "channel register held clear while off");
    bus_write(16'hFF26, 8'h80);
    bus_expect(16'hFF26, 8'hF0, "NR52 on, no channel playing");
    // channel 2 full volume, 50 % duty, routed left only
    bus_write(16'hFF25, 8'h20);
    bus_write(16'hFF17, 8'hF0);
    bus_write(16'hFF16, 8'h80);
    bus_write(16'hFF18, 8'h00);
    bus_write(16'hFF19, 8'h80);
    bus_expect(16'hFF26, 8'hF2, "NR52 shows channel 2 playing");
    hi = 0; lo = 0; other = 0;
    for (int i = 0; i < 200; i++) begin
      wait_strobes(1);
      if (left_out == 20'(15 * A / 4)) hi++;
      else if (left_out == -20'(15 * A / 4) - 20'sd1 || left_out == -20'(15 * A / 4)) lo++;
      else other++;
      if (right_out != 0) other++;
    end
    check(hi > 50 && lo > 50 && other == 0,
          $sformatf("left carries channel 2 / 4, right silent (hi %0d lo %0d other %0d)", hi, lo, other));
    // route to both sides: right follows left
    bus_write(16'hFF25, 8'h22);
    other = 0;
    for (int i = 0; i < 50; i++) begin wait_strobes(1); if (right_out != left_out) other++; end
    check(other == 0, "both sides equal when routed to both");
    // add channel 1 at the same frequency and phase on the left: sum / 4
    bus_write(16'hFF25, 8'h30);
    bus_write(16'hFF12, 8'hF0);
    bus_write(16'hFF11, 8'h80);
    bus_write(16'hFF13, 8'h00);
    req.addr = 16'hFF14; req.wdata = 8'h80; req.we_l = 0; @(posedge clk); #1;
    req.addr = 16'hFF19; @(posedge clk); #1; req.we_l = 1;
    hi = 0;
    for (int i = 0; i < 100; i++) begin
      wait_strobes(1);
      if (left_out == 20'(30 * A / 4) || left_out == -20'(30 * A / 4)) hi++;
    end
    check(hi > 40, $sformatf("two channels summed (%0d of 100 at full sum)", hi));
    bus_expect(16'hFF26, 8'hF3, "channels 1 and 2 playing");
    // frame tick: length 1 on channel 2 ends within one 4096-clock tick
    bus_write(16'hFF16, 8'hBF);
    bus_write(16'hFF19, 8'hC0);
    t0 = $time;
    while (ch_active[1]) @(posedge clk);
    check(($time - t0) / 10 <= 4096, $sformatf("length tick after %0d clocks", ($time - t0) / 10));
    // power off
    bus_write(16'hFF26, 8'h00);
    bus_expect(16'hFF26, 8'h70, "NR52 off");
    bus_expect(16'hFF12, 8'h00, "channel 1 register cleared by power off");
    check(ch_active == 0, "all channels stopped");
    wait_strobes(3);
    check(left_out == 0 && right_out == 0, "silent output");
    finish_tb();
  end
endmodule
