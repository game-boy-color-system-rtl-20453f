// Pixel processing unit (video module) of the Game Boy Color.
//
// It owns the video memories, so rendering never waits for the system bus:
// two 8 KB VRAM banks (8000-9FFF, bank chosen by VBK), the 160-byte sprite
// table OAM (FE00-FE9F), and the color file (64 bytes of background and 64
// bytes of sprite palettes, RGB555 little-endian, 8 palettes x 4 colors),
// plus the LCD registers LCDC, STAT, SCY, SCX, LY, LYC, BGP, OBP0/1, WY, WX,
// VBK, BCPS/BCPD and OCPS/OCPD. The memory router sends every access to
// these addresses here; reads return in the request cycle.
//
// Timing: one dot is CLKS_PER_DOT clocks (8 at the 33.5 MHz base clock is
// the 4.19 MHz dot rate). A line is 456 dots: mode 2 (OAM search) dots 0-79,
// mode 3 (drawing) 80-251, mode 0 (H-blank) 252-455; lines 144-153 are
// mode 1 (V-blank). With the display off (LCDC bit 7 = 0) the PPU is held in
// mode 1 at line 0. The bus cannot reach VRAM and the palette data in mode
// 3, nor OAM in modes 2 and 3 (reads give FF, writes are dropped).
//
// Rendering is scanline based. At the start of each visible line a render
// FSM, running one step per clock, (1) fills a 160-entry line buffer with
// the background or window pixel of each column, with its color index,
// palette and priority from the bank-1 map attributes; (2) walks the 40
// sprites in OAM order, takes at most 10 that cover the line, and writes
// each non-transparent sprite pixel into columns that no lower-numbered
// sprite has taken, marking it as a sprite pixel with its palette; (3) sends
// the 160 pixels out in order, looking each color up in the color file to a
// 16-bit RGB555 value (pix_valid, pix_x, pix_y, pix_rgb). This takes about
// 680 clocks, well inside modes 2 and 3 (2016 clocks).
// Background-over-sprite priority follows the CGB rules (LCDC bit 0 master,
// then the sprite or map-attribute priority bit, for background color 1-3).
// With dmg_mode set, map attributes are ignored and colors pass first
// through BGP/OBP0/OBP1, then background palette 0 or sprite palette 0/1.
// The color file resets to a four-shade grey ramp.
//
// The memories and registers kept inside the PPU, the 33 MHz (8 clocks per
// dot) rendering, the per-line steps (background/window with palette data,
// sprites with palette and sprite mark, 16-bit color out through the color
// file) follow the original design. The renderer itself, the mode timing, the
// priority rules and the DMG path follow the real console and are this
// design's own.
module ppu
  import gb_pkg::*;
#(
  parameter int CLKS_PER_DOT = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        dmg_mode,
  input  mem_req_t    ppu_req,
  output logic [7:0]  ppu_rdata,
  output logic [1:0]  mode,
  output logic        hblank,
  output logic        vblank_irq,
  output logic        stat_irq,
  output logic [7:0]  ly,
  output logic        pix_valid,
  output logic [7:0]  pix_x,
  output logic [7:0]  pix_y,
  output logic [15:0] pix_rgb,
  output logic        frame_start    // one-cycle pulse when line 144 begins
);
  // ---------------- memories and registers ----------------
  logic [7:0] vram [16384];
  logic [7:0] oam  [160];
  logic [7:0] bgpal [64];
  logic [7:0] obpal [64];
  logic [7:0] lcdc, stat_r, scy, scx, lyc, bgp, obp0, obp1, wy, wx;
  logic       vbk;
  logic [6:0] bcps, ocps;   // {auto-increment, index[5:0]}

  // line buffer entry
  typedef struct packed {
    logic       spr;      // a sprite took this column
    logic       show;     // sprite pixel visible over the background
    logic [2:0] spal;     // sprite palette
    logic [1:0] scol;     // sprite color index
    logic       bprio;    // map attribute priority bit
    logic [2:0] bpal;     // background palette
    logic [1:0] bcol;     // background color index
  } lb_t;
  lb_t linebuf [160];

  // ---------------- timing ----------------
  logic [$clog2(CLKS_PER_DOT)-1:0] sub;
  logic [8:0] dot;
  logic       lcd_on, dot_tick;

  assign lcd_on   = lcdc[7];
  assign dot_tick = 32'(sub) == CLKS_PER_DOT - 1;

  always_comb begin
    if (!lcd_on || ly >= 8'd144) mode = 2'd1;
    else if (dot < 9'd80)        mode = 2'd2;
    else if (dot < 9'd252)       mode = 2'd3;
    else                         mode = 2'd0;
  end

  assign hblank     = lcd_on && mode == 2'd0;
  assign vblank_irq = lcd_on && ly >= 8'd144;
  assign stat_irq   = lcd_on && ((stat_r[6] && ly == lyc) || (stat_r[5] && mode == 2'd2) ||
                                 (stat_r[4] && mode == 2'd1) || (stat_r[3] && mode == 2'd0));
  assign frame_start = lcd_on && dot_tick && dot == 9'd455 && ly == 8'd143;

  always_ff @(posedge clk) begin
    if (rst || !lcd_on) begin
      sub <= '0; dot <= '0; ly <= '0;
    end else begin
      sub <= dot_tick ? '0 : sub + 1'b1;
      if (dot_tick) begin
        if (dot == 9'd455) begin
          dot <= '0;
          ly  <= (ly == 8'd153) ? 8'd0 : ly + 8'd1;
        end else dot <= dot + 9'd1;
      end
    end
  end

  // ---------------- bus access ----------------
  logic a_vram, a_oam, rd, wr;
  logic vram_ok, oam_ok, pal_ok;
  logic [13:0] cpu_vaddr;

  assign a_vram   = ppu_req.addr[15:13] == 3'b100;
  assign a_oam    = ppu_req.addr >= 16'hFE00 && ppu_req.addr < 16'hFEA0;
  assign rd       = !ppu_req.re_l;
  assign wr       = !ppu_req.we_l;
  assign vram_ok  = mode != 2'd3;
  assign oam_ok   = mode == 2'd0 || mode == 2'd1;
  assign pal_ok   = mode != 2'd3;
  assign cpu_vaddr = {vbk, ppu_req.addr[12:0]};

  always_comb begin
    ppu_rdata = 8'hFF;
    if (rd) begin
      if (a_vram)     ppu_rdata = vram_ok ? vram[cpu_vaddr] : 8'hFF;
      else if (a_oam) ppu_rdata = oam_ok ? oam[ppu_req.addr[7:0]] : 8'hFF;
      else begin
        case (ppu_req.addr)
          A_LCDC: ppu_rdata = lcdc;
          A_STAT: ppu_rdata = {1'b1, stat_r[6:3], ly == lyc, mode};
          A_SCY:  ppu_rdata = scy;
          A_SCX:  ppu_rdata = scx;
          A_LY:   ppu_rdata = ly;
          A_LYC:  ppu_rdata = lyc;
          A_BGP:  ppu_rdata = bgp;
          A_OBP0: ppu_rdata = obp0;
          A_OBP1: ppu_rdata = obp1;
          A_WY:   ppu_rdata = wy;
          A_WX:   ppu_rdata = wx;
          A_VBK:  ppu_rdata = {7'b1111111, vbk};
          A_BCPS: ppu_rdata = {bcps[6], 1'b1, bcps[5:0]};
          A_BCPD: ppu_rdata = pal_ok ? bgpal[bcps[5:0]] : 8'hFF;
          A_OCPS: ppu_rdata = {ocps[6], 1'b1, ocps[5:0]};
          A_OCPD: ppu_rdata = pal_ok ? obpal[ocps[5:0]] : 8'hFF;
          default: ppu_rdata = 8'hFF;
        endcase
      end
    end
  end

  // grey ramp used to initialise the color file
  function automatic logic [7:0] grey_byte(input int i);
    logic [15:0] c;
    case ((i >> 1) & 3)
      0: c = 16'h7FFF;
      1: c = 16'h56B5;
      2: c = 16'h294A;
      default: c = 16'h0000;
    endcase
    return ((i & 1) != 0) ? c[15:8] : c[7:0];
  endfunction

  always_ff @(posedge clk) begin
    if (wr && a_vram && vram_ok) vram[cpu_vaddr] <= ppu_req.wdata;
    if (wr && a_oam && oam_ok)   oam[ppu_req.addr[7:0]] <= ppu_req.wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      lcdc <= 8'h00; stat_r <= 8'h00; scy <= '0; scx <= '0; lyc <= '0;
      bgp <= 8'hE4; obp0 <= 8'hE4; obp1 <= 8'hE4; wy <= '0; wx <= '0; vbk <= 1'b0;
      bcps <= '0; ocps <= '0;
      for (int i = 0; i < 64; i++) begin bgpal[i] <= grey_byte(i); obpal[i] <= grey_byte(i); end
    end else if (wr) begin
      case (ppu_req.addr)
        A_LCDC: lcdc <= ppu_req.wdata;
        A_STAT: stat_r <= {1'b0, ppu_req.wdata[6:3], 3'b000};
        A_SCY:  scy <= ppu_req.wdata;
        A_SCX:  scx <= ppu_req.wdata;
        A_LYC:  lyc <= ppu_req.wdata;
        A_BGP:  bgp <= ppu_req.wdata;
        A_OBP0: obp0 <= ppu_req.wdata;
        A_OBP1: obp1 <= ppu_req.wdata;
        A_WY:   wy <= ppu_req.wdata;
        A_WX:   wx <= ppu_req.wdata;
        A_VBK:  vbk <= ppu_req.wdata[0];
        A_BCPS: bcps <= {ppu_req.wdata[7], ppu_req.wdata[5:0]};
        A_OCPS: ocps <= {ppu_req.wdata[7], ppu_req.wdata[5:0]};
        A_BCPD: if (pal_ok) begin
          bgpal[bcps[5:0]] <= ppu_req.wdata;
          if (bcps[6]) bcps[5:0] <= bcps[5:0] + 6'd1;
        end
        A_OCPD: if (pal_ok) begin
          obpal[ocps[5:0]] <= ppu_req.wdata;
          if (ocps[6]) ocps[5:0] <= ocps[5:0] + 6'd1;
        end
        default: ;
      endcase
    end
  end

  // ---------------- render FSM ----------------
  typedef enum logic [1:0] {R_IDLE, R_BG, R_SPR, R_OUT} rst_t;
  rst_t       rs;
  logic [7:0] x;          // column (BG, OUT)
  logic [5:0] si;         // sprite index
  logic [2:0] sp;         // pixel within sprite
  logic [3:0] nspr;       // sprites taken on this line

  // background / window pixel for column x
  logic       win;
  logic [7:0] bx, by, tile, attr, lo, hi;
  logic [12:0] map_off, td_addr;
  logic [2:0] row, bit_i;
  logic [1:0] bcol;

  always_comb begin
    win   = lcdc[5] && ly >= wy && ({1'b0, x} + 9'd7 >= {1'b0, wx});
    bx    = win ? x + 8'd7 - wx : x + scx;
    by    = win ? ly - wy       : ly + scy;
    map_off = {((win ? lcdc[6] : lcdc[3]) ? 3'b111 : 3'b110), by[7:3], bx[7:3]};
    tile  = vram[{1'b0, map_off}];
    attr  = dmg_mode ? 8'h00 : vram[{1'b1, map_off}];
    row   = attr[6] ? ~by[2:0] : by[2:0];
    td_addr = lcdc[4] ? {1'b0, tile, row, 1'b0} : {!tile[7], tile, row, 1'b0};
    lo    = vram[{attr[3], td_addr}];
    hi    = vram[{attr[3], td_addr | 13'd1}];
    bit_i = attr[5] ? bx[2:0] : ~bx[2:0];
    bcol  = {hi[bit_i], lo[bit_i]};
    if (dmg_mode && !lcdc[0]) bcol = 2'b00;
  end

  // sprite si, pixel sp
  logic [7:0] oy, ox, ot, oa, slo, shi;
  logic [8:0] line9, sx9;
  logic [3:0] srow;
  logic       on_line, s_in, bg_wins;
  logic [7:0] stile;
  logic [12:0] s_addr;
  logic [2:0] sbit;
  logic [1:0] scol;
  lb_t        cur;

  always_comb begin
    oy      = oam[{si, 2'd0}];
    ox      = oam[{si, 2'd1}];
    ot      = oam[{si, 2'd2}];
    oa      = oam[{si, 2'd3}];
    line9   = {1'b0, ly} + 9'd16 - {1'b0, oy};
    on_line = line9 < (lcdc[2] ? 9'd16 : 9'd8);
    srow    = oa[6] ? ((lcdc[2] ? 4'd15 : 4'd7) - line9[3:0]) : line9[3:0];
    stile   = lcdc[2] ? {ot[7:1], srow[3]} : ot;
    s_addr  = {1'b0, stile, srow[2:0], 1'b0};
    slo     = vram[{(!dmg_mode && oa[3]), s_addr}];
    shi     = vram[{(!dmg_mode && oa[3]), s_addr | 13'd1}];
    sbit    = oa[5] ? sp : ~sp;
    scol    = {shi[sbit], slo[sbit]};
    sx9     = {1'b0, ox} + {6'd0, sp} - 9'd8;
    s_in    = sx9 < 9'd160;
    cur     = linebuf[sx9[7:0] < 8'd160 ? sx9[7:0] : 8'd0];
    if (dmg_mode) bg_wins = oa[7] && cur.bcol != 2'b00;
    else          bg_wins = lcdc[0] && (oa[7] || cur.bprio) && cur.bcol != 2'b00;
  end

  // output color lookup for column x
  lb_t        oe;
  logic [1:0] ocol, shade;
  logic [2:0] opal;
  logic       is_obj;
  logic [5:0] pidx;
  logic [7:0] dmgp;

  always_comb begin
    oe     = linebuf[x < 8'd160 ? x : 8'd0];
    is_obj = lcdc[1] && oe.spr && oe.show;
    ocol   = is_obj ? oe.scol : oe.bcol;
    opal   = is_obj ? oe.spal : oe.bpal;
    dmgp   = !is_obj ? bgp : (oe.spal[0] ? obp1 : obp0);
    case (ocol)
      2'd0: shade = dmgp[1:0];
      2'd1: shade = dmgp[3:2];
      2'd2: shade = dmgp[5:4];
      default: shade = dmgp[7:6];
    endcase
    if (dmg_mode) pidx = {2'b00, opal[0] & is_obj, shade, 1'b0};
    else          pidx = {opal, ocol, 1'b0};
  end

  always_ff @(posedge clk) begin
    pix_valid <= 1'b0;
    if (rst || !lcd_on) begin
      rs <= R_IDLE; x <= '0; si <= '0; sp <= '0; nspr <= '0;
      pix_x <= '0; pix_y <= '0; pix_rgb <= '0;
    end else begin
      case (rs)
        R_IDLE: if (dot == 9'd0 && sub == '0 && ly < 8'd144) begin rs <= R_BG; x <= '0; end
        R_BG: begin
          linebuf[x] <= '{spr: 1'b0, show: 1'b0, spal: 3'd0, scol: 2'd0,
                          bprio: attr[7], bpal: attr[2:0], bcol: bcol};
          if (x == 8'd159) begin rs <= R_SPR; si <= '0; sp <= '0; nspr <= '0; end
          else x <= x + 8'd1;
        end
        R_SPR: begin
          if (sp == 3'd0 && (!on_line || nspr == 4'd10 || !lcdc[1])) begin
            // sprite not on this line (or limit reached): next sprite
            if (si == 6'd39) begin rs <= R_OUT; x <= '0; end
            else si <= si + 6'd1;
          end else begin
            if (sp == 3'd0) nspr <= nspr + 4'd1;
            if (s_in && scol != 2'b00 && !cur.spr) begin
              linebuf[sx9[7:0]] <= '{spr: 1'b1, show: !bg_wins,
                                     spal: dmg_mode ? {2'b00, oa[4]} : oa[2:0], scol: scol,
                                     bprio: cur.bprio, bpal: cur.bpal, bcol: cur.bcol};
            end
            sp <= sp + 3'd1;
            if (sp == 3'd7) begin
              if (si == 6'd39) begin rs <= R_OUT; x <= '0; end
              else si <= si + 6'd1;
            end
          end
        end
        R_OUT: begin
          pix_valid <= 1'b1;
          pix_x     <= x;
          pix_y     <= ly;
          pix_rgb   <= is_obj ? {obpal[pidx | 6'd1], obpal[pidx]} : {bgpal[pidx | 6'd1], bgpal[pidx]};
          if (x == 8'd159) rs <= R_IDLE;
          else x <= x + 8'd1;
        end
      endcase
    end
  end
endmodule
