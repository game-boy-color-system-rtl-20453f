// Testbench for cart_mbc3: ROM bank 0 and switchable bank reads through the
// flash with the game-select offset, RAM enable and banks, per-game save
// slots, and the real-time clock (ticking, latch, halt, set).
//
// The expected values are worked out from the register definitions, not taken
// from the design under test.
module tb_cart_mbc3;
  import gb_pkg::*;
  localparam int HZ = 64;   // short "second" for simulation
  logic clk = 0, rst = 1;
  logic [2:0] game_sel = 3'd2;
  mem_req_t req = MEM_IDLE;
  logic [7:0] rdata, flash_data;
  logic [23:0] flash_addr;
  logic flash_re;
  always #5 clk = !clk;
  `include "tb_bus.svh"

  cart_mbc3 #(.CLK_HZ(HZ)) dut (.clk, .rst, .game_sel, .cart_req(req), .cart_rdata(rdata),
                                .flash_addr, .flash_data, .flash_re);
  flash_rom_model u_flash (.addr(flash_addr), .data(flash_data));

  function automatic logic [7:0] rom(input int g, input int bank, input int off);
    logic [23:0] a = 24'(g << 21) | 24'(bank << 14) | 24'(off);
    return a[7:0] ^ a[15:8] ^ a[23:16] ^ 8'h5A;
  endfunction

  initial begin #100000000; failures++; finish_tb(); end

  initial begin
    logic [7:0] s0, s1;
    repeat (2) @(posedge clk); #1 rst = 0;
    bus_expect(16'h0134, rom(2, 0, 16'h0134), "bank 0");
    bus_expect(16'h4134, rom(2, 1, 16'h0134), "default bank 1");
    bus_write(16'h2000, 8'h25);
    bus_expect(16'h7FFF, rom(2, 8'h25, 16'h3FFF), "bank 25");
    bus_write(16'h2000, 8'h00);
    bus_expect(16'h4000, rom(2, 1, 0), "bank 0 maps to 1");
    bus_write(16'h2000, 8'h7F);
    bus_expect(16'h4001, rom(2, 8'h7F, 1), "bank 7F");
    // RAM disabled
    bus_write(16'hA000, 8'h11);
    bus_expect(16'hA000, 8'hFF, "RAM disabled reads FF");
    bus_write(16'h0000, 8'h0A);
    for (int b = 0; b < 4; b++) begin bus_write(16'h4000, 8'(b)); bus_write(16'hA100, 8'(8'h30 + b)); end
    for (int b = 3; b >= 0; b--) begin bus_write(16'h4000, 8'(b)); bus_expect(16'hA100, 8'(8'h30 + b), "RAM bank"); end
    // another game has its own save slot
    game_sel = 3'd3; #1;
    bus_expect(16'h0010, rom(3, 0, 16'h0010), "game 3 ROM");
    bus_write(16'hA100, 8'hEE);
    game_sel = 3'd2; #1;
    bus_expect(16'hA100, 8'h30, "game 2 save kept");
    // clock: set seconds to 58, minutes 59, hours 23
    bus_write(16'h4000, 8'h08); bus_write(16'hA000, 8'd58);
    bus_write(16'h4000, 8'h09); bus_write(16'hA000, 8'd59);
    bus_write(16'h4000, 8'h0A); bus_write(16'hA000, 8'd23);
    bus_write(16'h4000, 8'h0B); bus_write(16'hA000, 8'd0);
    bus_write(16'h4000, 8'h0C); bus_write(16'hA000, 8'h00);
    repeat (3 * HZ) @(posedge clk); #1;
    bus_write(16'h6000, 8'h00); bus_write(16'h6000, 8'h01);
    bus_write(16'h4000, 8'h08); bus_expect(16'hA000, 8'd1, "seconds wrapped");
    bus_write(16'h4000, 8'h09); bus_expect(16'hA000, 8'd0, "minutes wrapped");
    bus_write(16'h4000, 8'h0A); bus_expect(16'hA000, 8'd0, "hours wrapped");
    bus_write(16'h4000, 8'h0B); bus_expect(16'hA000, 8'd1, "day counted");
    // latched value holds without a new latch
    repeat (2 * HZ) @(posedge clk); #1;
    bus_write(16'h4000, 8'h08); bus_expect(16'hA000, 8'd1, "latched value held");
    // halt
    bus_write(16'h4000, 8'h0C); bus_write(16'hA000, 8'h40);
    bus_write(16'h6000, 8'h00); bus_write(16'h6000, 8'h01);
    bus_write(16'h4000, 8'h08); bus_read(16'hA000, s0);
    repeat (3 * HZ) @(posedge clk); #1;
    bus_write(16'h6000, 8'h00); bus_write(16'h6000, 8'h01);
    bus_read(16'hA000, s1);
    check(s0 == s1, "halted clock stands still");
    bus_write(16'h4000, 8'h0C); bus_expect(16'hA000, 8'h40, "DH halt bit");
    finish_tb();
  end
endmodule
