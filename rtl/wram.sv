// Banked work RAM, C000-DFFF (echoed at E000-FDFF), with the SVBK register.
//
// 32 KB of RAM in eight 4 KB banks. Bank 0 is always at C000-CFFF; D000-DFFF
// shows the bank held in SVBK (FF70, bits 2-0), where 0 selects bank 1 as 1
// does. The translation replaces the high address bits: RAM address =
// {bank[2:0], addr[11:0]}, bank = 0 when addr[12] is 0. The RAM sits behind
// a bram_bus_if, so reads return in the request cycle. SVBK sits on the I/O
// bus through an io_bus_parser; its unused bits read as 1. Reset clears SVBK.
//
// The bank translation (the high address bits replaced by SVBK) follows the
// original design; bank 0 fixed at C000 and SVBK 0 selecting bank 1 follow
// the real console.
module wram
  import gb_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  mem_req_t   wram_req,
  output logic [7:0] wram_rdata,
  input  mem_req_t   io_req,
  output logic [7:0] io_rdata,
  output logic [2:0] bank        // bank currently mapped at D000
);
  logic [7:0] svbk;
  logic [14:0] ram_addr;

  io_bus_parser #(.ADDR(A_SVBK), .RESET_VAL(8'h00), .WMASK(8'h07), .ONES(8'hF8)) u_svbk (
    .clk, .rst, .io_req, .io_rdata, .io_hit(), .rd_data(svbk), .cpu_wr(),
    .wr_data(8'h00), .wr_en(1'b0));

  assign bank     = (svbk[2:0] == 3'd0) ? 3'd1 : svbk[2:0];
  assign ram_addr = {wram_req.addr[12] ? bank : 3'd0, wram_req.addr[11:0]};

  bram_bus_if #(.AW(15)) u_ram (
    .clk, .addr(ram_addr), .wdata(wram_req.wdata), .re_l(wram_req.re_l),
    .we_l(wram_req.we_l), .rdata(wram_rdata));
endmodule
