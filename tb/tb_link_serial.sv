// Testbench for link_serial: two ports cross-wired as two boards, one
// with the internal clock, exchange bytes; bit period 2^9 CPU cycles
// normally and 2^4 fast; SC bit 7 clears and the interrupt fires.
//
// The expected values are worked out from the register definitions, not taken
// from the design under test.
module tb_link_serial;
  import gb_pkg::*;
  logic clk = 0, rst = 1, ce = 1;
  mem_req_t req = MEM_IDLE, req_b = MEM_IDLE;
  logic [7:0] rdata, rdata_b;
  logic a_bit, a_clk, b_bit, b_clk, irq_a, irq_b;
  int irqs_a = 0, irqs_b = 0, t0, t1;
  always #5 clk = !clk;
  `include "tb_bus.svh"

  link_serial u_a (.clk, .rst, .ce, .io_req(req),   .io_rdata(rdata),   .bit_out(a_bit), .clock_out(a_clk),
                   .bit_in(b_bit), .clock_in(b_clk), .irq(irq_a));
  link_serial u_b (.clk, .rst, .ce, .io_req(req_b), .io_rdata(rdata_b), .bit_out(b_bit), .clock_out(b_clk),
                   .bit_in(a_bit), .clock_in(a_clk), .irq(irq_b));
  always @(posedge clk) begin irqs_a += irq_a; irqs_b += irq_b; end

  initial begin #100000000; failures++; finish_tb(); end

  task automatic b_write(input logic [15:0] a, input logic [7:0] d);
    req_b = '{addr: a, wdata: d, re_l: 1'b1, we_l: 1'b0}; @(posedge clk); #1 req_b = MEM_IDLE;
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int fast = 0; fast < 2; fast++) begin
      logic [7:0] va, vb;
      va = fast ? 8'h3C : 8'hA5; vb = fast ? 8'hE1 : 8'h5B;
      irqs_a = 0; irqs_b = 0;
      b_write(A_SB, vb);
      b_write(A_SC, 8'h80);                 // B: external clock, waiting
      bus_write(A_SB, va);
      t0 = $time;
      bus_write(A_SC, fast ? 8'h83 : 8'h81); // A: internal clock, start
      while (irqs_a == 0) @(posedge clk);
      t1 = $time;
      repeat (5) @(posedge clk); #1;
      check((t1 - t0) / 10 >= 8 * (fast ? 16 : 512) - 2 && (t1 - t0) / 10 <= 8 * (fast ? 16 : 512) + 4,
            $sformatf("transfer time %0d cycles", (t1 - t0) / 10));
      bus_expect(A_SB, vb, "A received B's byte");
      req_b = '{addr: A_SB, wdata: 0, re_l: 1'b0, we_l: 1'b1}; #1;
      check(rdata_b == va, "B received A's byte");
      req_b = MEM_IDLE;
      check(irqs_a == 1 && irqs_b == 1, "one interrupt each side");
      bus_expect(A_SC, fast ? 8'h7F : 8'h7D, "SC start bit cleared");
    end
    finish_tb();
  end
endmodule
