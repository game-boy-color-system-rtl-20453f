// High RAM, FF80-FFFE: 127 bytes on the I/O register bus.
//
// The CPU runs code from here while an OAM DMA owns the rest of the bus, so
// the memory router keeps the DMA masters away from this range. The block
// decodes its range on the I/O bus and puts the bytes in a bram_bus_if;
// reads return in the request cycle and read 0 on the bus when another
// address is selected, so the I/O read data can be ORed.
//
// High RAM at FF80-FFFE and its use during OAM DMA follow the original
// design; placing it on the I/O bus is this design's choice.
module hram
  import gb_pkg::*;
(
  input  logic       clk,
  input  mem_req_t   io_req,
  output logic [7:0] io_rdata
);
  logic       sel;
  logic [7:0] q;

  assign sel = io_req.addr >= 16'hFF80 && io_req.addr <= 16'hFFFE;

  bram_bus_if #(.AW(7), .DEPTH(127)) u_ram (
    .clk, .addr(io_req.addr[6:0]), .wdata(io_req.wdata),
    .re_l(io_req.re_l || !sel), .we_l(io_req.we_l || !sel), .rdata(q));

  assign io_rdata = (sel && !io_req.re_l) ? q : 8'h00;
endmodule
