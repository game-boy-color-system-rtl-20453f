// Testbench for timer: DIV rate 1/256, DIV reset on write, TIMA rates for
// all four TAC settings, reload from TMA and the overflow interrupt.
//
// The expected values are worked out from the register definitions, not taken
// from the design under test.
module tb_timer;
  import gb_pkg::*;
  logic clk = 0, rst = 1, ce = 1, irq;
  mem_req_t req = MEM_IDLE;
  logic [7:0] rdata;
  int irqs = 0;
  always #5 clk = !clk;
  `include "tb_bus.svh"

  timer dut (.clk, .rst, .ce, .io_req(req), .io_rdata(rdata), .irq);
  always @(posedge clk) if (irq) irqs++;
  initial begin #50000000; failures++; finish_tb(); end

  initial begin
    int per [4] = '{1024, 16, 64, 256};
    logic [7:0] d;
    repeat (2) @(posedge clk); #1 rst = 0;
    bus_write(A_DIV, 8'h00);
    repeat (256 * 5 + 2) @(posedge clk); #1;
    bus_expect(A_DIV, 8'd5, "DIV after 5*256 cycles");
    bus_write(A_DIV, 8'h12);
    bus_expect(A_DIV, 8'd0, "DIV cleared by write");
    for (int r = 0; r < 4; r++) begin
      bus_write(A_TAC, 8'(4 | r));
      bus_write(A_DIV, 8'h00);
      bus_write(A_TIMA, 8'h00);
      repeat (per[r] * 10 + per[r] / 2) @(posedge clk); #1;
      bus_read(A_TIMA, d);
      check(d == 8'd10, $sformatf("TAC=%0d: TIMA=%0d after 10 periods", r, d));
    end
    // overflow
    bus_write(A_TAC, 8'h05);           // CPU/16
    bus_write(A_TMA, 8'hF0);
    bus_write(A_DIV, 8'h00);
    bus_write(A_TIMA, 8'hFE);
    irqs = 0;
    repeat (16 * 2 + 4) @(posedge clk); #1;
    check(irqs == 1, "one interrupt at overflow");
    bus_read(A_TIMA, d);
    check(d == 8'hF0, $sformatf("reloaded from TMA (%02h)", d));
    bus_write(A_TAC, 8'h01);
    bus_read(A_TIMA, d);
    repeat (100) @(posedge clk); #1;
    bus_expect(A_TIMA, d, "stopped with TAC bit 2 clear");
    bus_expect(A_TAC, 8'hF9, "TAC readback");
    finish_tb();
  end
endmodule
