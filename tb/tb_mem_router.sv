// Testbench for mem_router: address decode to the four slaves, read data
// returned only to the granted master, DMA priority over the CPU, HRAM
// closed to DMA, unusable area reading FF.
//
// The expected values are worked out from the register definitions, not taken
// from the design under test.
module tb_mem_router;
  import gb_pkg::*;
  logic clk = 0, rst = 1;
  mem_req_t cpu_req = MEM_IDLE, dmar_req = MEM_IDLE, dmaw_req = MEM_IDLE;
  mem_req_t cart_req, ppu_req, wram_req, io_req;
  logic [7:0] cpu_rdata, dmar_rdata;
  logic cpu_denied;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  mem_router dut (.clk, .rst, .cpu_req, .cpu_rdata, .dmar_req, .dmar_rdata, .dmaw_req, .cpu_denied,
                  .cart_req, .cart_rdata(8'hC1), .ppu_req, .ppu_rdata(8'hB2),
                  .wram_req, .wram_rdata(8'hA3), .io_req, .io_rdata(8'h94));

  function automatic mem_req_t rd(input logic [15:0] a);
    return '{addr: a, wdata: 8'h00, re_l: 1'b0, we_l: 1'b1};
  endfunction
  function automatic mem_req_t wr(input logic [15:0] a, input logic [7:0] d);
    return '{addr: a, wdata: d, re_l: 1'b1, we_l: 1'b0};
  endfunction

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [15:0] addrs [12] = '{16'h0000, 16'h4000, 16'h8000, 16'hA000, 16'hC000, 16'hD000,
                                16'hE000, 16'hFE00, 16'hFF00, 16'hFF40, 16'hFF80, 16'hFFFF};
    logic [7:0]  exp   [12] = '{8'hC1, 8'hC1, 8'hB2, 8'hC1, 8'hA3, 8'hA3, 8'hA3, 8'hB2, 8'h94,
                                8'hB2, 8'h94, 8'h94};
    repeat (2) @(posedge clk); #1 rst = 0;
    foreach (addrs[i]) begin
      cpu_req = rd(addrs[i]); #1;
      check(cpu_rdata == exp[i], $sformatf("cpu read %04h -> %02h", addrs[i], cpu_rdata));
      @(posedge clk);
    end
    cpu_req = rd(16'hFEA0); #1 check(cpu_rdata == 8'hFF, "unusable area reads FF");
    cpu_req = MEM_IDLE;   #1 check(cpu_rdata == 8'hFF, "no read, FF");
    // CPU write reaches WRAM with its data
    cpu_req = wr(16'hC010, 8'h5A); #1;
    check(!wram_req.we_l && wram_req.addr == 16'hC010 && wram_req.wdata == 8'h5A, "cpu write to wram");
    check(cart_req.we_l && ppu_req.we_l && io_req.we_l, "no stray writes");
    // OAM DMA: reader on cart, writer on OAM, CPU on HRAM: all served
    dmar_req = rd(16'h0100); dmaw_req = wr(16'hFE00, 8'h77); cpu_req = rd(16'hFF90); #1;
    check(dmar_rdata == 8'hC1, "dma reader gets cart data");
    check(!ppu_req.we_l && ppu_req.addr == 16'hFE00, "dma writer reaches ppu");
    check(cpu_rdata == 8'h94 && !cpu_denied, "cpu keeps hram during dma");
    // CPU conflicts with the DMA reader on the cartridge
    cpu_req = rd(16'h0200); #1;
    check(cpu_rdata == 8'hFF && cpu_denied, "cpu refused while dma holds cart");
    check(cart_req.addr == 16'h0100, "cart sees the dma address");
    // DMA may not touch HRAM
    dmar_req = rd(16'hFF85); cpu_req = MEM_IDLE; #1;
    check(dmar_rdata == 8'hFF && io_req.re_l, "dma refused hram");
    dmar_req = MEM_IDLE; dmaw_req = MEM_IDLE; #1;
    check(cart_req.re_l && ppu_req.we_l, "idle after dma");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
