// Testbench for io_bus_parser: bus reads and writes of one register, write
// mask and always-one bits, owner-side write, bus-write precedence, and
// the cpu_wr pulse.
//
// The expected values are worked out from the register definitions, not taken
// from the design under test.
module tb_io_bus_parser;
  import gb_pkg::*;
  logic clk = 0, rst = 1;
  mem_req_t req = MEM_IDLE;
  logic [7:0] rdata, rd_data, wr_data = 0;
  logic io_hit, cpu_wr, wr_en = 0;
  int wr_pulses = 0;
  always #5 clk = !clk;
  `include "tb_bus.svh"

  io_bus_parser #(.ADDR(16'hFF75), .RESET_VAL(8'h8F), .WMASK(8'h70), .ONES(8'h8F)) dut (
    .clk, .rst, .io_req(req), .io_rdata(rdata), .io_hit, .rd_data, .cpu_wr, .wr_data, .wr_en);

  always @(posedge clk) if (cpu_wr) wr_pulses++;
  initial begin #100000; failures++; finish_tb(); end

  initial begin
    logic [7:0] d;
    repeat (2) @(posedge clk); #1 rst = 0;
    bus_expect(16'hFF75, 8'h8F, "reset value");
    bus_write(16'hFF75, 8'hFF);
    bus_expect(16'hFF75, 8'hFF, "masked write sets bits 6-4");
    check(rd_data == 8'hFF, "owner sees stored bits");
    bus_write(16'hFF75, 8'h00);
    bus_expect(16'hFF75, 8'h8F, "masked write clears bits 6-4");
    bus_read(16'hFF74, d);
    check(d == 8'h00, "other address reads 0");
    check(wr_pulses == 2, "cpu_wr pulsed once per write");
    bus_write(16'hFF74, 8'h70);
    check(rd_data == 8'h8F, "write to another address ignored");
    // owner write
    wr_data = 8'h20; wr_en = 1; @(posedge clk); #1 wr_en = 0;
    check(rd_data == 8'h20, "owner write");
    // bus write wins
    wr_data = 8'h55; wr_en = 1; req.addr = 16'hFF75; req.wdata = 8'h10; req.we_l = 0;
    @(posedge clk); #1 wr_en = 0; req.we_l = 1;
    check(rd_data == 8'h10, "bus write wins over owner write");
    finish_tb();
  end
endmodule
