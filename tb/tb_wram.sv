// Testbench for wram: bank 0 fixed, SVBK banking (0 acts as 1), echo area,
// SVBK read-back with unused bits set.
//
// The expected values are worked out from the register definitions, not taken
// from the design under test.
module tb_wram;
  import gb_pkg::*;
  logic clk = 0, rst = 1;
  mem_req_t req = MEM_IDLE;       // drives both the RAM port and the I/O bus
  logic [7:0] wram_rdata, io_rdata, rdata;
  logic [2:0] bank;
  always #5 clk = !clk;
  assign rdata = (req.addr[15:8] == 8'hFF) ? io_rdata : wram_rdata;
  `include "tb_bus.svh"

  wram dut (.clk, .rst, .wram_req(req), .wram_rdata, .io_req(req), .io_rdata, .bank);
  initial begin #1000000; failures++; finish_tb(); end

  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    bus_expect(A_SVBK, 8'hF8, "SVBK reset");
    check(bank == 3'd1, "bank 1 after reset");
    for (int b = 1; b < 8; b++) begin
      bus_write(A_SVBK, 8'(b));
      bus_write(16'hD123, 8'(8'h10 + b));
    end
    bus_write(16'hC123, 8'hAA);
    for (int b = 7; b >= 0; b--) begin
      bus_write(A_SVBK, 8'(b));
      bus_expect(16'hD123, 8'(8'h10 + (b == 0 ? 1 : b)), "banked byte");
      bus_expect(16'hC123, 8'hAA, "bank 0 unaffected");
    end
    bus_expect(16'hE123, 8'hAA, "echo of C123");
    bus_write(A_SVBK, 8'h03);
    bus_expect(16'hF123, 8'h13, "echo of D123 in bank 3");
    bus_expect(A_SVBK, 8'hFB, "SVBK readback");
    finish_tb();
  end
endmodule
