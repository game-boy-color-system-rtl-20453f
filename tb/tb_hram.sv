// Testbench for hram: FF80-FFFE store and read back; other addresses read 0.
//
// The expected values are worked out from the register definitions, not taken
// from the design under test.
module tb_hram;
  import gb_pkg::*;
  logic clk = 0;
  mem_req_t req = MEM_IDLE;
  logic [7:0] rdata;
  logic [7:0] ref_mem [127];
  always #5 clk = !clk;
  `include "tb_bus.svh"

  hram dut (.clk, .io_req(req), .io_rdata(rdata));
  initial begin #1000000; failures++; finish_tb(); end

  initial begin
    @(posedge clk); #1;
    for (int i = 0; i < 127; i++) begin ref_mem[i] = 8'($urandom); bus_write(16'hFF80 + 16'(i), ref_mem[i]); end
    bus_write(16'hFF7F, 8'h55);
    for (int i = 0; i < 127; i++) bus_expect(16'hFF80 + 16'(i), ref_mem[i], "hram byte");
    bus_expect(16'hFFFF, 8'h00, "IE address not hram");
    bus_expect(16'hFF7F, 8'h00, "FF7F not hram");
    finish_tb();
  end
endmodule
