// Testbench for interrupt_ctrl: rising-edge capture into IF, levels held
// high do not re-trigger, CPU write and acknowledge, IE register.
//
// The expected values are worked out from the register definitions, not taken
// from the design under test.
module tb_interrupt_ctrl;
  import gb_pkg::*;
  logic clk = 0, rst = 1;
  mem_req_t req = MEM_IDLE;
  logic [7:0] rdata, ie_q;
  logic [4:0] irq_in = 0, if_clr = 0, if_q;
  always #5 clk = !clk;
  `include "tb_bus.svh"

  interrupt_ctrl dut (.clk, .rst, .io_req(req), .io_rdata(rdata), .irq_in, .if_clr, .if_q, .ie_q);
  initial begin #1000000; failures++; finish_tb(); end

  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    bus_expect(A_IF, 8'hE0, "IF reset");
    irq_in = 5'b00100; @(posedge clk); #1;
    check(if_q == 5'b00100, "timer edge sets bit 2");
    if_clr = 5'b00100; @(posedge clk); #1 if_clr = 0;
    check(if_q == 5'b00000, "acknowledge clears");
    repeat (5) @(posedge clk); #1;
    check(if_q == 5'b00000, "held level does not re-trigger");
    irq_in = 5'b10101; @(posedge clk); #1;
    check(if_q == 5'b10001, "new edges on bits 0 and 4");
    bus_write(A_IF, 8'h02);
    bus_expect(A_IF, 8'hE2, "CPU write to IF");
    irq_in = 0; @(posedge clk); #1 irq_in = 5'b01000;
    bus_write(A_IF, 8'h00);
    check(if_q == 5'b01000, "edge in the write cycle kept");
    bus_write(A_IE, 8'h1F);
    bus_expect(A_IE, 8'h1F, "IE readback");
    check(ie_q == 8'h1F, "IE output");
    finish_tb();
  end
endmodule
