// Shared types and constants of the Game Boy Color system.
//
// The system bus follows the console's CPU protocol: a 16-bit address, an
// 8-bit data path and active-low read and write strobes, with read data
// returned in the same cycle as the request. The data path is logically
// tri-state; here it is split into a write-data field carried with the
// request and a separate read-data return, which is how a tri-state bus is
// built inside an FPGA or ASIC. The register addresses are the console's
// memory map.
//
// The bus fields (16-bit address, 8-bit data, active-low read and write)
// follow the original design; the type names and the decode function are this
// design's.
package gb_pkg;

  // One request from a bus master (CPU, DMA reader, DMA writer) to a slave.
  typedef struct packed {
    logic [15:0] addr;
    logic [7:0]  wdata;
    logic        re_l;   // active-low read strobe
    logic        we_l;   // active-low write strobe
  } mem_req_t;

  localparam mem_req_t MEM_IDLE = '{addr: 16'h0000, wdata: 8'h00, re_l: 1'b1, we_l: 1'b1};

  // Slaves behind the memory router.
  typedef enum logic [2:0] {
    SL_NONE = 3'd0,
    SL_CART = 3'd1,
    SL_PPU  = 3'd2,
    SL_WRAM = 3'd3,
    SL_IO   = 3'd4
  } slave_t;

  // Memory-mapped I/O registers (console addresses).
  localparam logic [15:0] A_P1    = 16'hFF00;
  localparam logic [15:0] A_SB    = 16'hFF01;
  localparam logic [15:0] A_SC    = 16'hFF02;
  localparam logic [15:0] A_DIV   = 16'hFF04;
  localparam logic [15:0] A_TIMA  = 16'hFF05;
  localparam logic [15:0] A_TMA   = 16'hFF06;
  localparam logic [15:0] A_TAC   = 16'hFF07;
  localparam logic [15:0] A_IF    = 16'hFF0F;
  localparam logic [15:0] A_NR10  = 16'hFF10;
  localparam logic [15:0] A_NR11  = 16'hFF11;
  localparam logic [15:0] A_NR12  = 16'hFF12;
  localparam logic [15:0] A_NR13  = 16'hFF13;
  localparam logic [15:0] A_NR14  = 16'hFF14;
  localparam logic [15:0] A_NR21  = 16'hFF16;
  localparam logic [15:0] A_NR22  = 16'hFF17;
  localparam logic [15:0] A_NR23  = 16'hFF18;
  localparam logic [15:0] A_NR24  = 16'hFF19;
  localparam logic [15:0] A_NR30  = 16'hFF1A;
  localparam logic [15:0] A_NR31  = 16'hFF1B;
  localparam logic [15:0] A_NR32  = 16'hFF1C;
  localparam logic [15:0] A_NR33  = 16'hFF1D;
  localparam logic [15:0] A_NR34  = 16'hFF1E;
  localparam logic [15:0] A_NR41  = 16'hFF20;
  localparam logic [15:0] A_NR42  = 16'hFF21;
  localparam logic [15:0] A_NR43  = 16'hFF22;
  localparam logic [15:0] A_NR44  = 16'hFF23;
  localparam logic [15:0] A_NR50  = 16'hFF24;
  localparam logic [15:0] A_NR51  = 16'hFF25;
  localparam logic [15:0] A_NR52  = 16'hFF26;
  localparam logic [15:0] A_WAVE0 = 16'hFF30;
  localparam logic [15:0] A_LCDC  = 16'hFF40;
  localparam logic [15:0] A_STAT  = 16'hFF41;
  localparam logic [15:0] A_SCY   = 16'hFF42;
  localparam logic [15:0] A_SCX   = 16'hFF43;
  localparam logic [15:0] A_LY    = 16'hFF44;
  localparam logic [15:0] A_LYC   = 16'hFF45;
  localparam logic [15:0] A_DMA   = 16'hFF46;
  localparam logic [15:0] A_BGP   = 16'hFF47;
  localparam logic [15:0] A_OBP0  = 16'hFF48;
  localparam logic [15:0] A_OBP1  = 16'hFF49;
  localparam logic [15:0] A_WY    = 16'hFF4A;
  localparam logic [15:0] A_WX    = 16'hFF4B;
  localparam logic [15:0] A_KEY1  = 16'hFF4D;
  localparam logic [15:0] A_VBK   = 16'hFF4F;
  localparam logic [15:0] A_HDMA1 = 16'hFF51;
  localparam logic [15:0] A_HDMA2 = 16'hFF52;
  localparam logic [15:0] A_HDMA3 = 16'hFF53;
  localparam logic [15:0] A_HDMA4 = 16'hFF54;
  localparam logic [15:0] A_HDMA5 = 16'hFF55;
  localparam logic [15:0] A_RP    = 16'hFF56;
  localparam logic [15:0] A_BCPS  = 16'hFF68;
  localparam logic [15:0] A_BCPD  = 16'hFF69;
  localparam logic [15:0] A_OCPS  = 16'hFF6A;
  localparam logic [15:0] A_OCPD  = 16'hFF6B;
  localparam logic [15:0] A_SVBK  = 16'hFF70;
  localparam logic [15:0] A_IE    = 16'hFFFF;

  // Interrupt request bit positions in IF / IE.
  localparam int IRQ_VBLANK = 0;
  localparam int IRQ_STAT   = 1;
  localparam int IRQ_TIMER  = 2;
  localparam int IRQ_SERIAL = 3;
  localparam int IRQ_JOYPAD = 4;

  // Address decode of the memory router.
  function automatic slave_t decode_slave(input logic [15:0] a);
    if (a < 16'h8000)                         return SL_CART;
    else if (a < 16'hA000)                    return SL_PPU;   // VRAM
    else if (a < 16'hC000)                    return SL_CART;  // external RAM / RTC
    else if (a < 16'hFE00)                    return SL_WRAM;  // WRAM and echo
    else if (a < 16'hFEA0)                    return SL_PPU;   // OAM
    else if (a < 16'hFF00)                    return SL_NONE;  // not usable
    else if ((a >= 16'hFF40 && a <= 16'hFF45) || (a >= 16'hFF47 && a <= 16'hFF4B) ||
             a == 16'hFF4F || (a >= 16'hFF68 && a <= 16'hFF6B))
                                              return SL_PPU;   // video registers
    else                                      return SL_IO;    // FF00-FF7F, HRAM, IE
  endfunction

endpackage
