// Testbench for dma_ctrl with a reference memory: OAM DMA takes exactly 160
// CPU cycles and copies the bytes, GDMA halts the CPU for its whole length,
// HDMA moves 16 bytes per H-blank start and can be cancelled.
//
// The expected values are worked out from the register definitions, not taken
// from the design under test.
module tb_dma_ctrl;
  import gb_pkg::*;
  logic clk = 0, rst = 1, ce = 1, hblank = 0;
  mem_req_t req = MEM_IDLE, dmar_req, dmaw_req;
  logic [7:0] rdata, dmar_rdata;
  logic halt_cpu, oam_active, hdma_active;
  logic [7:0] mem [65536];
  int writes = 0;
  always #5 clk = !clk;
  `include "tb_bus.svh"

  dma_ctrl dut (.clk, .rst, .ce, .io_req(req), .io_rdata(rdata), .hblank, .dmar_req, .dmar_rdata,
                .dmaw_req, .halt_cpu, .oam_active, .hdma_active);

  assign dmar_rdata = !dmar_req.re_l ? mem[dmar_req.addr] : 8'hFF;
  always @(posedge clk) if (!dmaw_req.we_l) begin mem[dmaw_req.addr] <= dmaw_req.wdata; writes++; end

  initial begin #10000000; failures++; finish_tb(); end

  initial begin
    int cyc, hcyc;
    logic ok;
    for (int i = 0; i < 65536; i++) mem[i] = 8'(i * 7 + (i >> 8));
    repeat (2) @(posedge clk); #1 rst = 0;
    // ---- OAM DMA from C100
    writes = 0;
    bus_write(A_DMA, 8'hC1);
    cyc = 0;
    while (oam_active) begin @(posedge clk); #1 cyc++; end
    check(cyc == 160, $sformatf("OAM DMA took %0d cycles", cyc));
    check(writes == 160, "OAM DMA wrote 160 bytes");
    ok = 1;
    for (int i = 0; i < 160; i++) ok &= mem[16'hFE00 + i] == 8'((16'hC100 + i) * 7 + 8'hC1);
    check(ok, "OAM contents");
    check(!halt_cpu, "OAM DMA does not halt CPU");
    // ---- GDMA: 0x4120 -> 0x8340, 3 blocks (48 bytes)
    bus_write(A_HDMA1, 8'h41); bus_write(A_HDMA2, 8'h2F);
    bus_write(A_HDMA3, 8'hE3); bus_write(A_HDMA4, 8'h4F);
    writes = 0;
    bus_write(A_HDMA5, 8'h02);
    hcyc = 0;
    while (halt_cpu) begin @(posedge clk); #1 hcyc++; end
    check(hcyc == 48, $sformatf("GDMA halted CPU %0d cycles", hcyc));
    check(writes == 48, "GDMA bytes");
    ok = 1;
    for (int i = 0; i < 48; i++) ok &= mem[16'h8340 + i] == 8'((16'h4120 + i) * 7 + 8'h41);
    check(ok, "GDMA contents");
    bus_expect(A_HDMA5, 8'hFF, "HDMA5 idle after GDMA");
    // ---- HDMA: 0xD000 -> 0x9000, 3 blocks
    bus_write(A_HDMA1, 8'hD0); bus_write(A_HDMA2, 8'h00);
    bus_write(A_HDMA3, 8'h10); bus_write(A_HDMA4, 8'h00);
    writes = 0;
    bus_write(A_HDMA5, 8'h82);
    repeat (20) @(posedge clk); #1;
    check(writes == 0 && !halt_cpu, "HDMA waits for H-blank");
    bus_expect(A_HDMA5, 8'h02, "HDMA5 shows active, 3 blocks left");
    for (int b = 0; b < 3; b++) begin
      hblank = 1; @(posedge clk); #1;
      hcyc = 0;
      while (halt_cpu) begin @(posedge clk); #1 hcyc++; end
      check(hcyc == 16, $sformatf("HDMA block %0d halted %0d cycles", b, hcyc));
      repeat (30) @(posedge clk); #1;
      check(writes == 16 * (b + 1), $sformatf("one block per H-blank (%0d)", writes));
      hblank = 0; repeat (3) @(posedge clk); #1;
    end
    check(!hdma_active, "HDMA finished");
    ok = 1;
    for (int i = 0; i < 48; i++) ok &= mem[16'h9000 + i] == 8'((16'hD000 + i) * 7 + 8'hD0);
    check(ok, "HDMA contents");
    // ---- HDMA cancel
    bus_write(A_HDMA5, 8'h85);
    hblank = 1; repeat (40) @(posedge clk); hblank = 0; #1;
    bus_expect(A_HDMA5, 8'h04, "after one block, 5 left");
    bus_write(A_HDMA5, 8'h00);
    check(!hdma_active, "HDMA cancelled");
    finish_tb();
  end
endmodule
