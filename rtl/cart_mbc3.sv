// Cartridge simulator: an MBC3 memory bank controller with battery RAM and
// real-time clock, reading the game ROM from board flash.
//
// Writes to the ROM area program the controller:
//   0000-1FFF  8'h0A enables external RAM and the clock registers
//   2000-3FFF  ROM bank number (7 bits, 0 reads as bank 1)
//   4000-5FFF  0-3 selects a RAM bank, 8-C a clock register (S, M, H, DL, DH)
//   6000-7FFF  writing 00 then 01 latches the running clock into the
//              registers the CPU reads
// Reads: 0000-3FFF bank 0, 4000-7FFF the selected ROM bank, A000-BFFF the
// selected RAM bank, or the selected latched clock register.
// Game switching: game_sel (board DIP switches) adds game_sel * 2^SLOT_BITS
// to every flash address and picks the save-RAM slot game_sel mod SAVE_SLOTS,
// so each game keeps its own saves. The flash is read combinationally, as
// the bus needs data in the request cycle. The clock counts seconds from a
// divider of clk (CLK_HZ); DH bit 6 halts it, bit 0 is day bit 8, bit 7 the
// day-counter carry. RAM contents survive reset; registers do not.
//
// The register map, the four RAM banks, the timer registers, the latch and
// game switching by an offset into flash follow the original design. Slot
// sizes, the enable value 0A, the 00-then-01 latch sequence, bank 0 selecting
// bank 1 and the RTC details follow the real MBC3 and are this design's
// choice.
module cart_mbc3
  import gb_pkg::*;
#(
  parameter int CLK_HZ     = 33554432,
  parameter int SLOT_BITS  = 21,        // 2 MB per game in flash
  parameter int SEL_BITS   = 3,
  parameter int SAVE_SLOTS = 4,
  parameter int FLASH_AW   = SLOT_BITS + SEL_BITS
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [SEL_BITS-1:0] game_sel,
  input  mem_req_t            cart_req,
  output logic [7:0]          cart_rdata,
  output logic [FLASH_AW-1:0] flash_addr,
  input  logic [7:0]          flash_data,
  output logic                flash_re     // flash read strobe
);
  localparam int SLOT_W = $clog2(SAVE_SLOTS);   // SAVE_SLOTS: a power of two, 2 or more
  localparam int RAM_AW = 15 + SLOT_W;

  logic        ram_en;
  logic [6:0]  rom_bank;
  logic [3:0]  ram_sel;
  logic        latch_prev0;
  // running and latched clock: sec, min, hour, day low, day high
  logic [5:0]  rtc_s, rtc_m;
  logic [4:0]  rtc_h;
  logic [8:0]  rtc_d;
  logic        rtc_halt, rtc_carry;
  logic [7:0]  lat [5];
  logic [$clog2(CLK_HZ)-1:0] div;
  logic        sec_tick;

  logic        is_rom, is_ram, wr, rd;
  logic [6:0]  eff_bank;
  logic [RAM_AW-1:0] ram_addr;
  logic [7:0]  ram_q;
  logic [7:0]  rtc_q;

  assign is_rom   = !cart_req.addr[15];
  assign is_ram   = cart_req.addr[15:13] == 3'b101;
  assign wr       = !cart_req.we_l;
  assign rd       = !cart_req.re_l;
  assign eff_bank = (rom_bank == 7'd0) ? 7'd1 : rom_bank;

  // flash address: game slot offset plus banked ROM address
  always_comb begin
    flash_addr = '0;
    flash_addr[SLOT_BITS-1:0] = cart_req.addr[14] ? SLOT_BITS'({eff_bank, cart_req.addr[13:0]})
                                                  : SLOT_BITS'(cart_req.addr[13:0]);
    flash_addr[FLASH_AW-1:SLOT_BITS] = game_sel;
  end
  assign flash_re = rd && is_rom;

  // save RAM: slot, bank, offset
  assign ram_addr = {SLOT_W'(game_sel), ram_sel[1:0], cart_req.addr[12:0]};

  bram_bus_if #(.AW(RAM_AW)) u_ram (
    .clk, .addr(ram_addr), .wdata(cart_req.wdata),
    .re_l(!(rd && is_ram && ram_en && !ram_sel[3])),
    .we_l(!(wr && is_ram && ram_en && !ram_sel[3])), .rdata(ram_q));

  always_comb begin
    case (ram_sel)
      4'h8:    rtc_q = lat[0];
      4'h9:    rtc_q = lat[1];
      4'hA:    rtc_q = lat[2];
      4'hB:    rtc_q = lat[3];
      4'hC:    rtc_q = lat[4];
      default: rtc_q = 8'hFF;
    endcase
  end

  always_comb begin
    cart_rdata = 8'hFF;
    if (rd && is_rom)                     cart_rdata = flash_data;
    else if (rd && is_ram && ram_en)      cart_rdata = ram_sel[3] ? rtc_q : ram_q;
  end

  assign sec_tick = (32'(div) == CLK_HZ - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      ram_en <= 1'b0; rom_bank <= 7'd1; ram_sel <= '0; latch_prev0 <= 1'b0;
      rtc_s <= '0; rtc_m <= '0; rtc_h <= '0; rtc_d <= '0; rtc_halt <= 1'b0; rtc_carry <= 1'b0;
      for (int i = 0; i < 5; i++) lat[i] <= '0;
      div <= '0;
    end else begin
      div <= sec_tick ? '0 : div + 1'b1;
      if (sec_tick && !rtc_halt) begin
        if (rtc_s == 6'd59) begin
          rtc_s <= '0;
          if (rtc_m == 6'd59) begin
            rtc_m <= '0;
            if (rtc_h == 5'd23) begin
              rtc_h <= '0;
              if (rtc_d == 9'd511) begin rtc_d <= '0; rtc_carry <= 1'b1; end
              else rtc_d <= rtc_d + 9'd1;
            end else rtc_h <= rtc_h + 5'd1;
          end else rtc_m <= rtc_m + 6'd1;
        end else rtc_s <= rtc_s + 6'd1;
      end
      if (wr && is_rom) begin
        case (cart_req.addr[14:13])
          2'd0: ram_en   <= cart_req.wdata[3:0] == 4'hA;
          2'd1: rom_bank <= cart_req.wdata[6:0];
          2'd2: ram_sel  <= cart_req.wdata[3:0];
          2'd3: begin
            if (latch_prev0 && cart_req.wdata == 8'h01) begin
              lat[0] <= {2'b0, rtc_s};
              lat[1] <= {2'b0, rtc_m};
              lat[2] <= {3'b0, rtc_h};
              lat[3] <= rtc_d[7:0];
              lat[4] <= {rtc_carry, rtc_halt, 5'b0, rtc_d[8]};
            end
            latch_prev0 <= cart_req.wdata == 8'h00;
          end
        endcase
      end
      // the CPU sets the clock by writing the selected register
      if (wr && is_ram && ram_en && ram_sel[3]) begin
        case (ram_sel)
          4'h8: begin rtc_s <= cart_req.wdata[5:0]; div <= '0; end
          4'h9: rtc_m <= cart_req.wdata[5:0];
          4'hA: rtc_h <= cart_req.wdata[4:0];
          4'hB: rtc_d[7:0] <= cart_req.wdata;
          4'hC: begin rtc_d[8] <= cart_req.wdata[0]; rtc_halt <= cart_req.wdata[6];
                      rtc_carry <= cart_req.wdata[7]; end
          default: ;
        endcase
      end
    end
  end
endmodule
