// Memory router: the hub of the memory-mapped system.
//
// Three masters (CPU, DMA reader, DMA writer) reach four slaves (cartridge,
// PPU, work RAM, I/O register bus). Each master's address is decoded to a
// slave (gb_pkg::decode_slave). Each slave is given to at most one master per
// cycle, fixed priority DMA writer > DMA reader > CPU, and only the granted
// master's strobes reach it; the others see their strobes held inactive.
// A master gets read data only from the slave it was granted, and 8'hFF when
// it was refused or addressed an unused area. High RAM (FF80-FFFE) sits on
// the I/O bus but is reachable only by the CPU. The router is purely
// combinational, so a read returns in the cycle of its request; clk and rst
// only clock the bus-protocol assertions.
// The three masters and four slaves, and the rule that one master at a time
// owns a slave, are the document's; the priority order, the FF read of a
// refused master and the HRAM protection are this design's choices.
// Lint reports a combinational loop (UNOPTFLAT) through this router when
// the DMA writer's data is the DMA reader's read data. It is a false path:
// the loop would need the reader and the writer on the same slave, and the
// writer takes priority, so the reader then gets FF, not the slave's data.
// The DMA only ever copies between two different slaves.
module mem_router
  import gb_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  mem_req_t   cpu_req,
  output logic [7:0] cpu_rdata,
  input  mem_req_t   dmar_req,
  output logic [7:0] dmar_rdata,
  input  mem_req_t   dmaw_req,
  output logic       cpu_denied,   // the CPU asked and a DMA master held its slave
  output mem_req_t   cart_req,
  input  logic [7:0] cart_rdata,
  output mem_req_t   ppu_req,
  input  logic [7:0] ppu_rdata,
  output mem_req_t   wram_req,
  input  logic [7:0] wram_rdata,
  output mem_req_t   io_req,
  input  logic [7:0] io_rdata
);
  typedef enum logic [1:0] {M_NONE, M_CPU, M_DMAR, M_DMAW} master_t;

  function automatic logic active(input mem_req_t r);
    return !r.re_l || !r.we_l;
  endfunction

  function automatic logic is_hram(input logic [15:0] a);
    return a >= 16'hFF80 && a <= 16'hFFFE;
  endfunction

  slave_t  cpu_sl, dr_sl, dw_sl;
  master_t own [5];   // owner per slave_t value

  always_comb begin
    cpu_sl = active(cpu_req)  ? decode_slave(cpu_req.addr)  : SL_NONE;
    dr_sl  = active(dmar_req) && !is_hram(dmar_req.addr) ? decode_slave(dmar_req.addr) : SL_NONE;
    dw_sl  = active(dmaw_req) && !is_hram(dmaw_req.addr) ? decode_slave(dmaw_req.addr) : SL_NONE;
    for (int s = 0; s < 5; s++) begin
      if      (dw_sl  == slave_t'(s)) own[s] = M_DMAW;
      else if (dr_sl  == slave_t'(s)) own[s] = M_DMAR;
      else if (cpu_sl == slave_t'(s)) own[s] = M_CPU;
      else                            own[s] = M_NONE;
    end
  end

  function automatic mem_req_t pick(input master_t m, input mem_req_t c,
                                    input mem_req_t r, input mem_req_t w);
    case (m)
      M_CPU:   return c;
      M_DMAR:  return r;
      M_DMAW:  return w;
      default: return MEM_IDLE;
    endcase
  endfunction

  assign cart_req = pick(own[SL_CART], cpu_req, dmar_req, dmaw_req);
  assign ppu_req  = pick(own[SL_PPU],  cpu_req, dmar_req, dmaw_req);
  assign wram_req = pick(own[SL_WRAM], cpu_req, dmar_req, dmaw_req);
  assign io_req   = pick(own[SL_IO],   cpu_req, dmar_req, dmaw_req);

  function automatic logic [7:0] slave_data(input slave_t s, input logic [7:0] c,
      input logic [7:0] p, input logic [7:0] w, input logic [7:0] i);
    case (s)
      SL_CART: return c;
      SL_PPU:  return p;
      SL_WRAM: return w;
      SL_IO:   return i;
      default: return 8'hFF;
    endcase
  endfunction

  always_comb begin
    cpu_rdata  = 8'hFF;
    dmar_rdata = 8'hFF;
    if (cpu_sl != SL_NONE && own[cpu_sl] == M_CPU && !cpu_req.re_l)
      cpu_rdata = slave_data(cpu_sl, cart_rdata, ppu_rdata, wram_rdata, io_rdata);
    if (dr_sl != SL_NONE && own[dr_sl] == M_DMAR && !dmar_req.re_l)
      dmar_rdata = slave_data(dr_sl, cart_rdata, ppu_rdata, wram_rdata, io_rdata);
  end

  assign cpu_denied = (cpu_sl != SL_NONE) && (own[cpu_sl] != M_CPU);

  // Bus rule: a master never reads and writes in the same cycle.
  a_cpu_rw:  assert property (@(posedge clk) disable iff (rst) !(!cpu_req.re_l  && !cpu_req.we_l));
  a_dmar_rw: assert property (@(posedge clk) disable iff (rst) !(!dmar_req.re_l && !dmar_req.we_l));
  a_dmaw_rw: assert property (@(posedge clk) disable iff (rst) !(!dmaw_req.re_l && !dmaw_req.we_l));
endmodule
