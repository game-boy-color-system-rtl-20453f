// Testbench for clock_ctrl: divider enables at 1/2, 1/4, 1/8 of clk, CPU
// enable rate in both speeds, KEY1 armed switch with the settle countdown.
//
// The expected values are worked out from the register definitions, not taken
// from the design under test.
module tb_clock_ctrl;
  import gb_pkg::*;
  logic clk = 0, rst = 1, dip_double = 0, cpu_stop = 0;
  mem_req_t req = MEM_IDLE;
  logic [7:0] rdata;
  logic clk_16m, clk_8m, clk_4m, ce_16m, ce_8m, ce_4m, cpu_ce, double_speed;
  int n16, n8, n4, ncpu;
  always #5 clk = !clk;
  `include "tb_bus.svh"

  clock_ctrl #(.SETTLE(20)) dut (.clk, .rst, .dip_double, .cpu_stop, .io_req(req), .io_rdata(rdata),
                                 .clk_16m, .clk_8m, .clk_4m, .ce_16m, .ce_8m, .ce_4m, .cpu_ce, .double_speed);
  always @(posedge clk) begin n16 += ce_16m; n8 += ce_8m; n4 += ce_4m; ncpu += cpu_ce; end
  initial begin #1000000; failures++; finish_tb(); end

  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    n16 = 0; n8 = 0; n4 = 0; ncpu = 0;
    repeat (800) @(posedge clk); #1;
    check(n16 == 400 && n8 == 200 && n4 == 100, $sformatf("enable rates %0d %0d %0d", n16, n8, n4));
    check(ncpu == 100, "normal speed CPU enable = 4 MHz");
    bus_expect(A_KEY1, 8'h7E, "KEY1 normal, not armed");
    bus_write(A_KEY1, 8'h01);
    bus_expect(A_KEY1, 8'h7F, "armed");
    cpu_stop = 1; @(posedge clk); #1 cpu_stop = 0;
    repeat (25) @(posedge clk); #1;
    bus_expect(A_KEY1, 8'hFE, "double speed, disarmed");
    ncpu = 0; repeat (800) @(posedge clk); #1;
    check(ncpu == 200, "double speed CPU enable = 8 MHz");
    cpu_stop = 1; @(posedge clk); #1 cpu_stop = 0;
    repeat (30) @(posedge clk); #1;
    check(double_speed, "STOP without arming keeps speed");
    dip_double = 0; rst = 1; @(posedge clk); #1 rst = 0;
    check(!double_speed, "reset takes DIP setting");
    finish_tb();
  end
endmodule
