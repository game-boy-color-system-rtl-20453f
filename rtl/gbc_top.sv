// Game Boy Color system, around a memory router.
//
// Everything the CPU sees is memory mapped, so the design is built around
// mem_router: the CPU, the DMA reader and the DMA writer are its masters;
// the cartridge (MBC3 simulator over board flash), the work RAM, the PPU
// and the I/O register bus are its slaves. On the I/O bus sit high RAM and
// every register block (joypad, serial link, timer, interrupt flags, sound,
// DMA, speed switch, infrared/undocumented registers); their read data are
// ORed, each driving 0 when not addressed. The PPU keeps its own VRAM, OAM
// and color file and renders into the video converter's frame buffers.
//
// The CPU core is outside this module: its bus request, read data, halt
// (from the DMA), interrupt flags/enables, STOP and clock enable are ports.
// So are the board flash that holds the games, the DVI transmitter's raster
// position and pixel, and the AC97 codec's bit clock, strobe and samples.
// One clock, clk, runs everything at the base rate (8 x 4.19 MHz); the CPU
// and the CPU-rate blocks (timer, DMA, serial) step on cpu_ce, 4.19 MHz or
// 8.39 MHz in double speed. A bus access lasts one clk cycle with its
// strobe low; read data comes back in the same cycle.
// The block split, the router with its three masters and four slaves, the
// shared I/O bus and the clock rates follow the document. Keeping IE here
// rather than in the CPU, the single clock with enables, and ORing the I/O
// read data are this design's choices. The lint warning about a
// combinational loop through u_router and the DMA write data is a false
// path (see mem_router): the DMA never reads and writes one slave at once.
module gbc_top
  import gb_pkg::*;
#(
  parameter int CLK_HZ       = 33554432,
  parameter int CLKS_PER_DOT = 8,
  parameter int RESET_COUNT  = 65535,
  parameter int SETTLE       = 1024,
  parameter int SAVE_SLOTS   = 4
) (
  input  logic         clk,
  input  logic         reset_button,
  input  logic         dip_double_speed,
  input  logic         dip_dmg_mode,
  input  logic [2:0]   game_sel,
  output logic         rst,
  // CPU core
  input  mem_req_t     cpu_req,
  output logic [7:0]   cpu_rdata,
  output logic         cpu_halt,
  output logic         cpu_ce,
  input  logic         cpu_stop,
  output logic [4:0]   cpu_if,
  output logic [7:0]   cpu_ie,
  input  logic [4:0]   cpu_if_clr,
  output logic         double_speed,
  // board flash with the game ROMs
  output logic [23:0]  flash_addr,
  output logic         flash_re,
  input  logic [7:0]   flash_data,
  // NES controller
  output logic         nes_latch,
  output logic         nes_pulse,
  input  logic         nes_data,
  // link cable
  output logic         link_bit_out,
  output logic         link_clock_out,
  input  logic         link_bit_in,
  input  logic         link_clock_in,
  // infrared LED (register only)
  output logic         ir_led,
  // AC97 codec
  input  logic         ac97_bit_clk,
  input  logic         ac97_strobe,
  output logic signed [19:0] audio_left,
  output logic signed [19:0] audio_right,
  // DVI transmitter
  input  logic [10:0]  disp_x,
  input  logic [10:0]  disp_y,
  output logic [23:0]  disp_rgb,
  // status
  output logic [1:0]   lcd_mode,
  output logic         oam_dma_active,
  output logic         hdma_active,
  output logic         cpu_denied
);
  mem_req_t   dmar_req, dmaw_req, cart_req, ppu_req, wram_req, io_req;
  logic [7:0] dmar_rdata, cart_rdata, ppu_rdata, wram_rdata, io_rdata;
  logic [7:0] rd_hram, rd_wram, rd_dma, rd_tim, rd_int, rd_clk, rd_joy, rd_ser, rd_snd, rd_misc;
  logic       hblank, vblank_irq, stat_irq, irq_timer, irq_serial, irq_joy;
  logic       clk_16m, clk_8m, clk_4m, ce_16m, ce_8m, ce_4m;
  logic       pix_valid, frame_start;
  logic [7:0] pix_x, pix_y, ly;
  logic [15:0] pix_rgb;
  logic [7:0] buttons;
  logic [3:0] ch_active;
  logic [2:0] wram_bank;

  reset_gen #(.COUNT(RESET_COUNT)) u_reset (.clk, .button(reset_button), .rst);

  clock_ctrl #(.SETTLE(SETTLE)) u_clock (
    .clk, .rst, .dip_double(dip_double_speed), .cpu_stop, .io_req, .io_rdata(rd_clk),
    .clk_16m, .clk_8m, .clk_4m, .ce_16m, .ce_8m, .ce_4m, .cpu_ce, .double_speed);

  mem_router u_router (
    .clk, .rst, .cpu_req, .cpu_rdata, .dmar_req, .dmar_rdata, .dmaw_req, .cpu_denied,
    .cart_req, .cart_rdata, .ppu_req, .ppu_rdata, .wram_req, .wram_rdata, .io_req, .io_rdata);

  cart_mbc3 #(.CLK_HZ(CLK_HZ), .SLOT_BITS(21), .SEL_BITS(3), .SAVE_SLOTS(SAVE_SLOTS)) u_cart (
    .clk, .rst, .game_sel, .cart_req, .cart_rdata, .flash_addr, .flash_data, .flash_re);

  wram u_wram (.clk, .rst, .wram_req, .wram_rdata, .io_req, .io_rdata(rd_wram), .bank(wram_bank));

  ppu #(.CLKS_PER_DOT(CLKS_PER_DOT)) u_ppu (
    .clk, .rst, .dmg_mode(dip_dmg_mode), .ppu_req, .ppu_rdata, .mode(lcd_mode), .hblank,
    .vblank_irq, .stat_irq, .ly, .pix_valid, .pix_x, .pix_y, .pix_rgb, .frame_start);

  video_converter u_video (
    .clk, .rst, .pix_valid, .pix_x, .pix_y, .pix_rgb, .frame_done(frame_start),
    .disp_x, .disp_y, .disp_rgb, .front());

  hram u_hram (.clk, .io_req, .io_rdata(rd_hram));

  dma_ctrl u_dma (
    .clk, .rst, .ce(cpu_ce), .io_req, .io_rdata(rd_dma), .hblank, .dmar_req, .dmar_rdata,
    .dmaw_req, .halt_cpu(cpu_halt), .oam_active(oam_dma_active), .hdma_active);

  timer u_timer (.clk, .rst, .ce(cpu_ce), .io_req, .io_rdata(rd_tim), .irq(irq_timer));

  interrupt_ctrl u_int (
    .clk, .rst, .io_req, .io_rdata(rd_int),
    .irq_in({irq_joy, irq_serial, irq_timer, stat_irq, vblank_irq}),
    .if_clr(cpu_if_clr), .if_q(cpu_if), .ie_q(cpu_ie));

  joypad #(.CLK_HZ(CLK_HZ)) u_joy (
    .clk, .rst, .io_req, .io_rdata(rd_joy), .nes_latch, .nes_pulse, .nes_data, .buttons,
    .irq(irq_joy));

  link_serial u_link (
    .clk, .rst, .ce(cpu_ce), .io_req, .io_rdata(rd_ser), .bit_out(link_bit_out),
    .clock_out(link_clock_out), .bit_in(link_bit_in), .clock_in(link_clock_in), .irq(irq_serial));

  sound_top #(.CLK_HZ(CLK_HZ)) u_sound (
    .clk, .rst, .io_req, .io_rdata(rd_snd), .ac97_bit_clk, .ac97_strobe,
    .left_out(audio_left), .right_out(audio_right), .ch_active);

  misc_regs u_misc (.clk, .rst, .io_req, .io_rdata(rd_misc), .ir_led);

  assign io_rdata = rd_hram | rd_wram | rd_dma | rd_tim | rd_int | rd_clk | rd_joy |
                    rd_ser | rd_snd | rd_misc;
endmodule
