// End-to-end testbench for gbc_top at its default parameters (33.5 MHz base
// clock, 8 clocks per dot, full reset count, 1024-clock speed-switch
// settle): no parameter is overridden.
//
// The testbench plays the parts of the board around the system: a scripted
// CPU (bus accesses of one clk cycle, issued on cpu_ce like the real core),
// the board flash (flash_rom_model), an NES controller, a link cable looped
// back onto itself, the AC97 bit clock with a strobe every 16 bit clocks,
// and the DVI transmitter's raster position. The CPU script walks through
// every mechanism of the system; a monitor counts how often each one
// happened, and at the end any mechanism that never happened is a failure:
//   reset release, cartridge ROM bank 0 and switched bank, cartridge RAM
//   banks, RTC latch, WRAM bank switch, echo RAM, high RAM, interrupt
//   enable, infrared LED register, OAM DMA, CPU refused by the router during
//   DMA, general DMA with CPU halt, H-blank DMA blocks, timer interrupt,
//   serial transfer with interrupt, sound sample at the codec, rendered PPU
//   lines, frame buffer swap with the picture on the display, V-blank and
//   LCD STAT interrupts, NES controller poll, joypad register and interrupt,
//   interrupt flag clear, double-speed switch.
//
// The expected values are worked out from the register definitions, not taken
// from the design under test.
module tb_gbc_top;
  import gb_pkg::*;

  logic clk = 0, reset_button = 1, dip_double_speed = 0, dip_dmg_mode = 0;
  logic [2:0] game_sel = 3'd1;
  logic rst;
  mem_req_t cpu_req = MEM_IDLE;
  logic [7:0] cpu_rdata;
  logic cpu_halt, cpu_ce, cpu_stop = 0, double_speed;
  logic [4:0] cpu_if, cpu_if_clr = 0;
  logic [7:0] cpu_ie;
  logic [23:0] flash_addr;
  logic flash_re;
  logic [7:0] flash_data;
  logic nes_latch, nes_pulse, nes_data;
  logic link_bit_out, link_clock_out;
  logic ir_led;
  logic ac97_bit_clk = 0, ac97_strobe = 0;
  logic signed [19:0] audio_left, audio_right;
  logic [10:0] disp_x = 0, disp_y = 0;
  logic [23:0] disp_rgb;
  logic [1:0] lcd_mode;
  logic oam_dma_active, hdma_active, cpu_denied;

  always #15 clk = !clk;                 // about 33 MHz
  always #41 ac97_bit_clk = !ac97_bit_clk;

  gbc_top dut (
    .clk, .reset_button, .dip_double_speed, .dip_dmg_mode, .game_sel, .rst,
    .cpu_req, .cpu_rdata, .cpu_halt, .cpu_ce, .cpu_stop, .cpu_if, .cpu_ie, .cpu_if_clr,
    .double_speed, .flash_addr, .flash_re, .flash_data, .nes_latch, .nes_pulse, .nes_data,
    .link_bit_out, .link_clock_out, .link_bit_in(link_bit_out), .link_clock_in(link_clock_out),
    .ir_led, .ac97_bit_clk, .ac97_strobe, .audio_left, .audio_right, .disp_x, .disp_y,
    .disp_rgb, .lcd_mode, .oam_dma_active, .hdma_active, .cpu_denied);

  flash_rom_model u_flash (.addr(flash_addr), .data(flash_data));

  // ---------------- board models ----------------
  logic [7:0] pad = 8'b1000_0001;        // Right and A held
  logic [7:0] nes_sh;
  always @(posedge nes_latch) nes_sh = pad;
  always @(posedge nes_pulse) nes_sh = {1'b0, nes_sh[7:1]};
  assign nes_data = !nes_sh[0];

  initial forever begin
    repeat (15) @(negedge ac97_bit_clk);
    ac97_strobe = 1; @(negedge ac97_bit_clk); ac97_strobe = 0;
  end

  // ---------------- checks and mechanism counters ----------------
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef enum int {
    M_RESET, M_ROM0, M_ROMBANK, M_CARTRAM, M_RTC, M_WRAMBANK, M_ECHO, M_HRAM, M_IE, M_IR,
    M_OAMDMA, M_DENIED, M_GDMA, M_HDMA, M_TIMER, M_SERIAL, M_SOUND, M_LINES, M_SWAP,
    M_VBLANK, M_STAT, M_NESPOLL, M_JOYP, M_JOYIRQ, M_IFCLR, M_SPEED, M_COUNT
  } mech_t;
  int seen [M_COUNT];
  initial for (int i = 0; i < M_COUNT; i++) seen[i] = 0;

  // counters driven by the hardware itself
  logic rst_q = 1, halt_q = 0, ce_q = 0, hdma_q = 0, latch_q = 0, frame_q = 0;
  logic [4:0] if_q = 0;
  logic [19:0] audio_q = 0;
  int halt_len = 0, last_halt_len = 0, hdma_blocks = 0, ce_count = 0;
  always @(posedge clk) begin
    rst_q <= rst; halt_q <= cpu_halt; hdma_q <= hdma_active; latch_q <= nes_latch; if_q <= cpu_if;
    if (rst_q && !rst) seen[M_RESET]++;
    if (cpu_ce) ce_count++;
    if (cpu_halt && cpu_ce) halt_len++;
    if (!cpu_halt && halt_q) begin last_halt_len = halt_len; halt_len = 0; end
    if (cpu_halt && !halt_q && hdma_active && dut.u_dma.hst == 3'd3) hdma_blocks++;
    if (cpu_denied) seen[M_DENIED]++;
    if (nes_latch && !latch_q) seen[M_NESPOLL]++;
    if (dut.pix_valid) seen[M_LINES] += (dut.pix_x == 8'd159);
    if (dut.frame_start) seen[M_SWAP]++;
    if (cpu_if[0] && !if_q[0]) seen[M_VBLANK]++;
    if (cpu_if[1] && !if_q[1]) seen[M_STAT]++;
    if (cpu_if[2] && !if_q[2]) seen[M_TIMER]++;
    if (cpu_if[4] && !if_q[4]) seen[M_JOYIRQ]++;
  end

  // ---------------- scripted CPU ----------------
  task automatic wait_ce();
    while (!(cpu_ce && !cpu_halt)) begin @(posedge clk); #1; end
  endtask

  task automatic cpu_write(input logic [15:0] a, input logic [7:0] d);
    wait_ce();
    cpu_req.addr = a; cpu_req.wdata = d; cpu_req.we_l = 1'b0;
    @(posedge clk); #1 cpu_req.we_l = 1'b1;
  endtask

  task automatic cpu_read(input logic [15:0] a, output logic [7:0] d);
    wait_ce();
    cpu_req.addr = a; cpu_req.re_l = 1'b0;
    #1 d = cpu_rdata;
    @(posedge clk); #1 cpu_req.re_l = 1'b1;
  endtask

  task automatic cpu_expect(input logic [15:0] a, input logic [7:0] e, input string what);
    logic [7:0] d;
    cpu_read(a, d);
    check(d == e, $sformatf("%s: %04h = %02h, expected %02h", what, a, d, e));
  endtask

  // video memory is only open outside mode 3
  task automatic wait_vram_open();
    while (lcd_mode == 2'd3 || lcd_mode == 2'd2) begin @(posedge clk); #1; end
  endtask

  function automatic logic [7:0] rom(input int bank, input int off);
    logic [23:0] a;
    a = 24'({game_sel, 21'(bank * 16384 + off)});
    return a[7:0] ^ a[15:8] ^ a[23:16] ^ 8'h5A;
  endfunction

  task automatic wait_clocks(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // watchdog: the script needs about 3 million clocks
  initial begin
    #400ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d, d2;
    int t0, n, bad, c0;
    // ---- reset
    wait_clocks(10);
    reset_button = 0;
    t0 = $time;
    while (rst) @(posedge clk);
    #1 check(($time - t0) / 30 >= 65535, $sformatf("reset held %0d clocks", ($time - t0) / 30));

    // ---- high RAM, IE, infrared register
    cpu_write(16'hFF90, 8'hC3);
    cpu_read(16'hFF90, d); check(d == 8'hC3, "HRAM"); seen[M_HRAM] += (d == 8'hC3);
    cpu_write(A_IE, 8'h1F);
    check(cpu_ie == 8'h1F, "IE register"); seen[M_IE] += (cpu_ie == 8'h1F);
    cpu_write(A_RP, 8'h01);
    check(ir_led, "infrared LED on"); seen[M_IR] += ir_led;
    cpu_write(A_RP, 8'h00);

    // ---- cartridge: ROM banks, RAM banks, RTC
    cpu_read(16'h0150, d);
    check(d == rom(0, 16'h0150), "ROM bank 0"); seen[M_ROM0] += (d == rom(0, 16'h0150));
    cpu_write(16'h2000, 8'h05);
    cpu_read(16'h4123, d);
    check(d == rom(5, 16'h0123), "ROM bank 5"); seen[M_ROMBANK] += (d == rom(5, 16'h0123));
    cpu_write(16'h2000, 8'h00);
    cpu_read(16'h4123, d);
    check(d == rom(1, 16'h0123), "bank 0 selects bank 1"); seen[M_ROMBANK] += (d == rom(1, 16'h0123));
    cpu_write(16'h0000, 8'h0A);
    cpu_write(16'h4000, 8'h02); cpu_write(16'hA010, 8'h5A);
    cpu_write(16'h4000, 8'h01); cpu_write(16'hA010, 8'hA5);
    cpu_read(16'hA010, d);
    cpu_write(16'h4000, 8'h02); cpu_read(16'hA010, d2);
    check(d == 8'hA5 && d2 == 8'h5A, "cartridge RAM banks"); seen[M_CARTRAM] += (d == 8'hA5 && d2 == 8'h5A);
    cpu_write(16'h4000, 8'h09); cpu_write(16'hA000, 8'd42);     // minutes = 42
    cpu_write(16'h6000, 8'h00); cpu_write(16'h6000, 8'h01);     // latch
    cpu_read(16'hA000, d);
    check(d == 8'd42, "RTC latched minutes"); seen[M_RTC] += (d == 8'd42);
    cpu_write(16'h0000, 8'h00);
    cpu_read(16'hA000, d); check(d == 8'hFF, "cartridge RAM disabled reads FF");

    // ---- work RAM banks and echo
    cpu_write(16'hC000, 8'h77);
    cpu_write(A_SVBK, 8'h01); cpu_write(16'hD000, 8'h11);
    cpu_write(A_SVBK, 8'h03); cpu_write(16'hD000, 8'h33);
    cpu_write(A_SVBK, 8'h00); cpu_read(16'hD000, d);
    cpu_write(A_SVBK, 8'h03); cpu_read(16'hD000, d2);
    check(d == 8'h11 && d2 == 8'h33, "WRAM banks 1 and 3"); seen[M_WRAMBANK] += (d == 8'h11 && d2 == 8'h33);
    cpu_read(16'hE000, d);
    check(d == 8'h77, "echo of C000"); seen[M_ECHO] += (d == 8'h77);
    cpu_write(A_SVBK, 8'h01);

    // ---- video memory setup with the display off (LCDC = 0 at reset)
    for (int b = 0; b < 2; b++) begin
      cpu_write(A_VBK, 8'(b));
      for (int i = 0; i < 1024; i++) cpu_write(16'h9800 + 16'(i), 8'h00);
    end
    cpu_write(A_VBK, 8'h00);
    for (int i = 0; i < 16; i++) cpu_write(16'h8000 + 16'(i), 8'h00);
    cpu_write(A_BCPS, 8'h80);
    cpu_write(A_BCPD, 8'h1F); cpu_write(A_BCPD, 8'h7C);           // color 0 = magenta
    for (int i = 0; i < 160; i++) cpu_write(16'hC100 + 16'(i), 8'(i * 3 + 1));

    // ---- OAM DMA from C100, with the CPU trying WRAM meanwhile
    cpu_write(A_DMA, 8'hC1);
    check(oam_dma_active, "OAM DMA running");
    n = 0;
    while (oam_dma_active) begin
      cpu_read(16'hC000, d);
      if (d == 8'hFF) n++;
    end
    check(n > 0, $sformatf("CPU refused %0d times during OAM DMA", n));
    bad = 0;
    for (int i = 0; i < 160; i++) begin cpu_read(16'hFE00 + 16'(i), d); if (d != 8'(i * 3 + 1)) bad++; end
    check(bad == 0, $sformatf("OAM DMA copied 160 bytes (%0d wrong)", bad));
    seen[M_OAMDMA] += (bad == 0);
    cpu_read(16'hC000, d); check(d == 8'h77, "WRAM readable after DMA");
    for (int i = 0; i < 160; i++) cpu_write(16'hFE00 + 16'(i), 8'h00);   // no sprites on screen

    // ---- general DMA: 32 bytes of ROM bank 1 (4000) to VRAM 9000
    cpu_write(A_HDMA1, 8'h40); cpu_write(A_HDMA2, 8'h00);
    cpu_write(A_HDMA3, 8'h10); cpu_write(A_HDMA4, 8'h00);
    cpu_write(A_HDMA5, 8'h01);
    wait_ce();
    check(last_halt_len == 32, $sformatf("GDMA halted the CPU %0d cycles", last_halt_len));
    bad = 0;
    for (int i = 0; i < 32; i++) begin cpu_read(16'h9000 + 16'(i), d); if (d != rom(1, i)) bad++; end
    check(bad == 0, "GDMA copied ROM to VRAM");
    seen[M_GDMA] += (bad == 0 && last_halt_len == 32);
    cpu_expect(A_HDMA5, 8'hFF, "HDMA5 idle");

    // ---- timer interrupt and flag clear
    cpu_write(A_TMA, 8'hF0); cpu_write(A_TIMA, 8'hF0);
    cpu_write(A_TAC, 8'h05);                                     // 262 kHz
    n = 0;
    while (!cpu_if[2] && n < 10000) begin wait_clocks(1); n++; end
    check(cpu_if[2], "timer interrupt flag");
    cpu_expect(A_IF, 8'hE0 | {3'b000, cpu_if}, "IF readback");
    cpu_if_clr = 5'b00100; wait_clocks(1); cpu_if_clr = 0;
    check(!cpu_if[2], "timer flag cleared by the CPU"); seen[M_IFCLR] += !cpu_if[2];
    cpu_write(A_TAC, 8'h00);

    // ---- serial: internal fast clock, looped back
    cpu_write(A_SB, 8'hB4);
    cpu_write(A_SC, 8'h83);
    n = 0;
    while (!cpu_if[3] && n < 20000) begin wait_clocks(1); n++; end
    cpu_read(A_SB, d);
    check(cpu_if[3] && d == 8'hB4, $sformatf("serial loopback: SB = %02h", d));
    seen[M_SERIAL] += (cpu_if[3] && d == 8'hB4);
    cpu_expect(A_SC, 8'h7F, "SC start bit cleared");

    // ---- sound: channel 2 to both sides
    cpu_write(A_NR52, 8'h80); cpu_write(A_NR50, 8'h77); cpu_write(A_NR51, 8'h22);
    cpu_write(A_NR22, 8'hF0); cpu_write(A_NR21, 8'h80);
    cpu_write(A_NR23, 8'h00); cpu_write(A_NR24, 8'h86);
    cpu_expect(A_NR52, 8'hF2, "NR52 shows channel 2");
    n = 0;
    repeat (200) begin
      @(posedge ac97_strobe);
      if (audio_left != 0 && audio_left == audio_right) n++;
    end
    check(n > 150, $sformatf("codec samples carry channel 2 (%0d of 200)", n));
    seen[M_SOUND] += n;

    // ---- display on: H-blank DMA and interrupts
    cpu_write(A_LYC, 8'd10);
    cpu_write(A_STAT, 8'h40);
    cpu_write(A_LCDC, 8'h91);
    for (int i = 0; i < 32; i++) cpu_write(16'hC200 + 16'(i), 8'(8'hA0 + i));
    cpu_write(A_HDMA1, 8'hC2); cpu_write(A_HDMA2, 8'h00);
    cpu_write(A_HDMA3, 8'h08); cpu_write(A_HDMA4, 8'h00);
    cpu_write(A_HDMA5, 8'h81);                                   // two blocks in H-blank
    while (hdma_active) wait_clocks(1);
    bad = 0;
    for (int i = 0; i < 32; i++) begin
      wait_vram_open();
      cpu_read(16'h8800 + 16'(i), d);
      if (d != 8'(8'hA0 + i)) bad++;
    end
    check(bad == 0 && hdma_blocks == 2, $sformatf("HDMA: %0d blocks, %0d bytes wrong", hdma_blocks, bad));
    seen[M_HDMA] += hdma_blocks;

    // two frame ends: the second shows a complete frame on the display
    n = seen[M_SWAP];
    while (seen[M_SWAP] < n + 2) wait_clocks(1);
    wait_clocks(10);
    disp_x = 11'd320; disp_y = 11'd240; wait_clocks(2);
    check(disp_rgb == 24'hFF00FF, $sformatf("display centre %06h, expected FF00FF", disp_rgb));
    disp_x = 11'd10; wait_clocks(2);
    check(disp_rgb == 24'h000000, "display border black");
    check(seen[M_LINES] >= 144, $sformatf("%0d lines rendered", seen[M_LINES]));
    check(cpu_if[0] && cpu_if[1], "V-blank and STAT flags set");

    // ---- joypad: at least one controller poll has happened by now
    check(seen[M_NESPOLL] > 0, "NES controller polled");
    cpu_write(A_P1, 8'h10);                                      // buttons
    cpu_read(A_P1, d);
    cpu_write(A_P1, 8'h20);                                      // directions
    cpu_read(A_P1, d2);
    check(d == 8'hDE && d2 == 8'hEE, $sformatf("JOYP buttons %02h directions %02h", d, d2));
    seen[M_JOYP] += (d == 8'hDE && d2 == 8'hEE);

    // ---- double speed switch
    c0 = ce_count; wait_clocks(800);
    n = ce_count - c0;
    check(n == 100, $sformatf("normal speed: %0d CPU cycles in 800 clocks", n));
    cpu_write(A_KEY1, 8'h01);
    cpu_expect(A_KEY1, 8'h7F, "KEY1 armed");
    cpu_stop = 1; wait_clocks(1); cpu_stop = 0;
    wait_clocks(1100);
    c0 = ce_count; wait_clocks(800);
    n = ce_count - c0;
    check(double_speed && n == 200, $sformatf("double speed: %0d CPU cycles in 800 clocks", n));
    cpu_expect(A_KEY1, 8'hFE, "KEY1 reads double speed");
    seen[M_SPEED] += (double_speed && n == 200);

    // ---- report
    for (int i = 0; i < M_COUNT; i++) begin
      mech_t m;
      m = mech_t'(i);
      $display("mechanism %-12s happened %0d times", m.name(), seen[i]);
      if (seen[i] == 0) begin failures++; $display("FAIL: mechanism %s never happened", m.name()); end
      checks++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
