// Testbench for joypad with an NES controller model: latch width, eight
// pulses per poll, button vector, JOYP select logic and the interrupt.
//
// The expected values are worked out from the register definitions, not taken
// from the design under test.
module tb_joypad;
  import gb_pkg::*;
  localparam int HZ = 2000000;   // UNIT = 12 clocks, FRAME = HZ/60
  logic clk = 0, rst = 1;
  mem_req_t req = MEM_IDLE;
  logic [7:0] rdata, buttons, pad = 8'h00;   // pad: 1 = pressed, {R,L,D,U,St,Se,B,A}
  logic nes_latch, nes_pulse, nes_data, irq;
  logic [7:0] sh;
  int pulses = 0, latch_len = 0, irqs = 0;
  always #5 clk = !clk;
  `include "tb_bus.svh"

  joypad #(.CLK_HZ(HZ)) dut (.clk, .rst, .io_req(req), .io_rdata(rdata), .nes_latch, .nes_pulse,
                             .nes_data, .buttons, .irq);

  // NES controller: 4021 shift register, active-low data
  always @(posedge nes_latch) sh = pad;
  always @(posedge nes_pulse) begin sh = {1'b0, sh[7:1]}; pulses++; end
  assign nes_data = !sh[0];
  always @(posedge clk) begin if (nes_latch) latch_len++; if (irq) irqs++; end

  initial begin #50000000; failures++; finish_tb(); end

  task automatic wait_poll();
    @(posedge nes_latch); @(negedge nes_latch);
    repeat (8) @(negedge nes_pulse);
    repeat (20) @(posedge clk); #1;
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    pad = 8'b1001_0101;   // Right, Up, Select, A
    wait_poll();
    check(latch_len == 24, $sformatf("latch width %0d clocks", latch_len));
    check(pulses == 8, $sformatf("%0d pulses per poll", pulses));
    check(buttons == pad, $sformatf("buttons %02h", buttons));
    bus_write(A_P1, 8'h20);                       // directions
    bus_expect(A_P1, 8'hEA, "directions: Up and Right pressed");   // D U L R -> 1 0 1 0
    bus_write(A_P1, 8'h10);                       // buttons
    bus_expect(A_P1, 8'hDA, "buttons: Select and A");            // St Se B A -> 1 0 1 0
    bus_write(A_P1, 8'h30);
    bus_expect(A_P1, 8'hFF, "nothing selected");
    bus_write(A_P1, 8'h10);
    repeat (3) @(posedge clk);
    irqs = 0;
    pad = 8'b0000_1101;   // Start, Select, A: Start is new
    pulses = 0;
    wait_poll();
    check(buttons == pad, "second poll");
    check(irqs == 1, $sformatf("interrupt on new press (%0d)", irqs));
    bus_expect(A_P1, 8'hD2, "Start, Select, A");
    finish_tb();
  end
endmodule
