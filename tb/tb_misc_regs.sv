// Testbench for misc_regs: reset values, writable bits and read-only
// registers of RP and the undocumented CGB registers.
//
// The expected values are worked out from the register definitions, not taken
// from the design under test.
module tb_misc_regs;
  import gb_pkg::*;
  logic clk = 0, rst = 1, ir_led;
  mem_req_t req = MEM_IDLE;
  logic [7:0] rdata;
  always #5 clk = !clk;
  `include "tb_bus.svh"
  misc_regs dut (.clk, .rst, .io_req(req), .io_rdata(rdata), .ir_led);
  initial begin #1000000; failures++; finish_tb(); end
  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    bus_expect(16'hFF6C, 8'hFE, "FF6C reset");
    bus_expect(16'hFF72, 8'h00, "FF72 reset");
    bus_expect(16'hFF75, 8'h8F, "FF75 reset");
    bus_expect(A_RP, 8'h3E, "RP reset");
    bus_write(16'hFF6C, 8'h00); bus_expect(16'hFF6C, 8'hFE, "FF6C bit 0 clear");
    bus_write(16'hFF6C, 8'h01); bus_expect(16'hFF6C, 8'hFF, "FF6C bit 0 set");
    bus_write(16'hFF72, 8'hA5); bus_expect(16'hFF72, 8'hA5, "FF72 r/w");
    bus_write(16'hFF73, 8'h5A); bus_expect(16'hFF73, 8'h5A, "FF73 r/w");
    bus_write(16'hFF74, 8'h3C); bus_expect(16'hFF74, 8'h3C, "FF74 r/w");
    bus_write(16'hFF75, 8'hFF); bus_expect(16'hFF75, 8'hFF, "FF75 bits 6-4");
    bus_write(16'hFF75, 8'h00); bus_expect(16'hFF75, 8'h8F, "FF75 clear");
    bus_write(16'hFF76, 8'hFF); bus_expect(16'hFF76, 8'h00, "FF76 read only");
    bus_write(16'hFF77, 8'hFF); bus_expect(16'hFF77, 8'h00, "FF77 read only");
    bus_write(A_RP, 8'hC1); bus_expect(A_RP, 8'hFF, "RP enable and LED");
    check(ir_led, "LED output");
    bus_write(A_RP, 8'h00); check(!ir_led, "LED off");
    bus_expect(16'hFF71, 8'h00, "unmapped address reads 0");
    finish_tb();
  end
endmodule
