// Testbench for bram_bus_if: same-cycle reads, writes on we_l, FF when not
// reading, against a reference array.
//
// The expected values are worked out from the register definitions, not taken
// from the design under test.
module tb_bram_bus_if;
  import gb_pkg::*;
  logic clk = 0;
  mem_req_t req = MEM_IDLE;
  logic [7:0] rdata;
  logic [7:0] ref_mem [256];
  always #5 clk = !clk;
  `include "tb_bus.svh"

  bram_bus_if #(.AW(8)) dut (.clk, .addr(req.addr[7:0]), .wdata(req.wdata), .re_l(req.re_l),
                             .we_l(req.we_l), .rdata);
  initial begin #1000000; failures++; finish_tb(); end

  initial begin
    @(posedge clk); #1;
    for (int i = 0; i < 256; i++) begin
      ref_mem[i] = 8'($urandom);
      bus_write(16'(i), ref_mem[i]);
    end
    for (int i = 0; i < 200; i++) begin
      int a;
      a = $urandom_range(0, 255);
      bus_expect(16'(a), ref_mem[a], "read back");
    end
    #1 check(rdata == 8'hFF, "idle bus reads FF");
    finish_tb();
  end
endmodule
