// Testbench for ppu, run with CLKS_PER_DOT = 4 to halve the run time.
// Checks: register and VRAM bank read-back, palette auto-increment, line
// and mode timing (80/172/204 dots, 154 lines), the V-blank and frame-start
// outputs, bus blocking in modes 2 and 3, and the rendered picture: a
// background tile with scrolling, a sprite with its own palette, a sprite
// behind colored background, the 10-sprites-per-line limit, the window, and
// the DMG palette path (BGP) with dmg_mode set.
//
// The expected values are worked out from the register definitions, not taken
// from the design under test.
module tb_ppu;
  import gb_pkg::*;
  localparam int CPD = 4;
  logic clk = 0, rst = 1, dmg_mode = 0;
  mem_req_t req = MEM_IDLE;
  logic [7:0] rdata;
  logic [1:0] mode;
  logic hblank, vblank_irq, stat_irq, pix_valid, frame_start;
  logic [7:0] ly, pix_x, pix_y;
  logic [15:0] pix_rgb;
  always #5 clk = !clk;
  `include "tb_bus.svh"

  ppu #(.CLKS_PER_DOT(CPD)) dut (.clk, .rst, .dmg_mode, .ppu_req(req), .ppu_rdata(rdata), .mode,
                                 .hblank, .vblank_irq, .stat_irq, .ly, .pix_valid, .pix_x, .pix_y,
                                 .pix_rgb, .frame_start);

  logic [15:0] fr [144][160];
  int npix = 0, nframe = 0;
  always @(posedge clk) begin
    if (pix_valid) begin fr[pix_y][pix_x] <= pix_rgb; npix++; end
    if (frame_start) nframe++;
  end

  localparam logic [15:0] C [4] = '{16'h0001, 16'h0002, 16'h0003, 16'h0004};
  localparam logic [15:0] SPR3 = 16'h1234;
  // tile 1 row pattern: lo 0F, hi 33 -> colors 0 0 2 2 1 1 3 3
  localparam int PAT [8] = '{0, 0, 2, 2, 1, 1, 3, 3};

  task automatic wait_frame();
    int n;
    n = nframe;
    while (nframe == n) @(posedge clk);
    #1;
  endtask

  initial begin #200000000; failures++; finish_tb(); end

  initial begin
    logic [7:0] d;
    int t0, c2, c3, c0, bad, lines;
    repeat (2) @(posedge clk); #1 rst = 0;
    bus_expect(A_STAT, 8'h85, "STAT with display off: mode 1, LY = LYC");
    bus_write(A_SCX, 8'h5A); bus_expect(A_SCX, 8'h5A, "SCX read-back");
    bus_write(A_SCX, 8'h00);
    // VRAM banks
    bus_write(16'h8000, 8'h11);
    bus_write(A_VBK, 8'h01);
    bus_write(16'h8000, 8'h22);
    bus_expect(16'h8000, 8'h22, "VRAM bank 1");
    bus_expect(A_VBK, 8'hFF, "VBK reads bank 1");
    bus_write(16'h8000, 8'h00);         // bank-1 attributes of map entry 0: none
    bus_write(A_VBK, 8'h00);
    bus_expect(16'h8000, 8'h11, "VRAM bank 0");
    bus_write(16'h8000, 8'h00);
    // memories power up undefined: clear both banks of map 9800, tile 0, OAM
    for (int b = 0; b < 2; b++) begin
      bus_write(A_VBK, 8'(b));
      for (int i = 0; i < 1024; i++) bus_write(16'h9800 + 16'(i), 8'h00);
    end
    bus_write(A_VBK, 8'h00);
    for (int i = 0; i < 16; i++) bus_write(16'h8000 + 16'(i), 8'h00);
    for (int i = 0; i < 160; i++) bus_write(16'hFE00 + 16'(i), 8'h00);
    // background palette 0 through auto-increment
    bus_write(A_BCPS, 8'h80);
    for (int k = 0; k < 4; k++) begin bus_write(A_BCPD, C[k][7:0]); bus_write(A_BCPD, C[k][15:8]); end
    bus_expect(A_BCPS, 8'hC8, "BCPS advanced to 8");
    bus_write(A_BCPS, 8'h04);
    bus_expect(A_BCPD, 8'h03, "BCPD byte 4");
    // sprite palette 1, color 3
    bus_write(A_OCPS, 8'h8E);
    bus_write(A_OCPD, SPR3[7:0]); bus_write(A_OCPD, SPR3[15:8]);
    // tiles: 1 = pattern, 2 = solid color 3
    for (int r = 0; r < 8; r++) begin
      bus_write(16'h8010 + 16'(2 * r), 8'h0F); bus_write(16'h8011 + 16'(2 * r), 8'h33);
      bus_write(16'h8020 + 16'(2 * r), 8'hFF); bus_write(16'h8021 + 16'(2 * r), 8'hFF);
    end
    bus_write(16'h9800, 8'h01);         // map (0,0) = tile 1
    // OAM: sprite 0 at pixel 20 lines 0-7, palette 1
    bus_write(16'hFE00, 8'd16); bus_write(16'hFE01, 8'd28); bus_write(16'hFE02, 8'd2); bus_write(16'hFE03, 8'h01);
    // sprite 1 at pixel 0 lines 0-7, behind the background
    bus_write(16'hFE04, 8'd16); bus_write(16'hFE05, 8'd8); bus_write(16'hFE06, 8'd2); bus_write(16'hFE07, 8'h81);
    // sprites 2-12 on lines 100-107 at pixels 40 + 10k
    for (int k = 0; k < 11; k++) begin
      bus_write(16'hFE08 + 16'(4 * k), 8'd116); bus_write(16'hFE09 + 16'(4 * k), 8'(48 + 10 * k));
      bus_write(16'hFE0A + 16'(4 * k), 8'd2);   bus_write(16'hFE0B + 16'(4 * k), 8'h01);
    end
    bus_expect(16'hFE09, 8'd48, "OAM read-back");
    // window from line 120, WX = 7, map 9800
    bus_write(A_WY, 8'd120); bus_write(A_WX, 8'd7);
    // display on: BG on, sprites on, 8000 tile data, window on
    bus_write(A_LCDC, 8'hB3);
    // line timing
    while (ly != 8'd2) @(posedge clk);
    t0 = $time;
    while (ly != 8'd3) @(posedge clk);
    check(($time - t0) / 10 == 456 * CPD, $sformatf("line length %0d clocks", ($time - t0) / 10));
    c2 = 0; c3 = 0; c0 = 0;
    while (ly == 8'd3) begin
      #1;
      if (mode == 2) c2++; else if (mode == 3) c3++; else if (mode == 0) c0++;
      @(posedge clk);
    end
    check(c2 == 80 * CPD && c3 == 172 * CPD && c0 == 204 * CPD,
          $sformatf("mode lengths %0d %0d %0d clocks", c2, c3, c0));
    // bus blocking: read VRAM in mode 3, OAM in mode 2
    while (mode != 2'd3) @(posedge clk);
    #1 bus_expect(16'h9800, 8'hFF, "VRAM blocked in mode 3");
    while (mode != 2'd2) @(posedge clk);
    #1 bus_expect(16'hFE01, 8'hFF, "OAM blocked in mode 2");
    while (mode != 2'd0) @(posedge clk);
    #1 bus_expect(16'h9800, 8'h01, "VRAM open in H-blank");
    bus_expect(16'hFE01, 8'd28, "OAM open in H-blank");
    // frame: 154 lines, V-blank from line 144
    wait_frame();
    check(ly == 8'd144 && vblank_irq && mode == 2'd1, "frame start at line 144, V-blank");
    t0 = $time;
    wait_frame();
    check(($time - t0) / 10 == 154 * 456 * CPD, $sformatf("frame %0d clocks", ($time - t0) / 10));
    // picture of the last full frame
    bad = 0;
    for (int y = 0; y < 8; y++)
      for (int x = 0; x < 32; x++) begin
        logic [15:0 ] e;
        if (x >= 20 && x < 28)  e = SPR3;
        else if (x < 8)         e = (PAT[x] == 0) ? SPR3 : C[PAT[x]];
        else                    e = C[0];
        if (fr[y][x] != e) begin bad++; if (bad < 5) $display("  line %0d x %0d: %04h, expected %04h", y, x, fr[y][x], e); end
      end
    check(bad == 0, "tile, sprite and sprite behind background on lines 0-7");
    bad = 0;
    for (int y = 100; y < 108; y++)
      for (int k = 0; k < 11; k++)
        if (fr[y][40 + 10 * k] != (k < 10 ? SPR3 : C[0])) bad++;
    check(bad == 0, "only the first 10 sprites of a line are drawn");
    bad = 0;
    for (int x = 0; x < 8; x++) if (fr[120][x] != C[PAT[x]] || fr[119][x] != C[0]) bad++;
    check(bad == 0, "window shows map row 0 from line 120");
    // scroll by 2: the pattern moves left
    bus_write(A_SCX, 8'd2);
    wait_frame(); wait_frame();
    bad = 0;
    for (int x = 0; x < 6; x++) if (fr[8][x] != C[0] || (x < 6 && fr[0][x] != ((x < 6 && x + 2 < 8) ? (PAT[x + 2] == 0 ? SPR3 : C[PAT[x + 2]]) : C[0]))) bad++;
    check(bad == 0, "SCX scroll");
    // DMG palette path: BGP maps color 3 to shade 0
    bus_write(A_LCDC, 8'h91);
    bus_write(A_SCX, 8'd0);
    bus_write(A_BGP, 8'h1B);
    dmg_mode = 1;
    wait_frame(); wait_frame();
    check(fr[0][6] == C[0] && fr[0][0] == C[3], "BGP remaps colors in DMG mode");
    lines = npix / 160;
    check(lines > 0 && npix % 160 == 0, "whole lines sent");
    // display off: mode 1, LY 0
    bus_write(A_LCDC, 8'h00);
    @(posedge clk); #1;
    check(ly == 0 && mode == 2'd1 && !vblank_irq, "display off");
    finish_tb();
  end
endmodule
