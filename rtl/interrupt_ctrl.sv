// Interrupt flag register IF (FF0F) and enable register IE (FFFF).
//
// Each interrupt line (bit 0 V-blank, 1 LCD STAT, 2 timer, 3 serial,
// 4 joypad) is watched for a rising edge, which sets its IF bit. The CPU can
// write IF to set or clear bits, and clears a bit with if_clr when it takes
// that interrupt. IE is a plain read/write register kept here next to IF so
// that both reach the CPU core as signals; the master enable IME stays in
// the CPU. An edge arriving in the cycle of a write to IF is kept. Reads are
// same-cycle; IF bits 7-5 read as 1. Reset clears both registers.
//
// Rising-edge capture into IF follows the original design. There IE lives in
// the CPU; here it is kept next to IF because the CPU is outside this design,
// and if_clr is this design's way for the CPU to acknowledge.
module interrupt_ctrl
  import gb_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  mem_req_t   io_req,
  output logic [7:0] io_rdata,
  input  logic [4:0] irq_in,
  input  logic [4:0] if_clr,
  output logic [4:0] if_q,
  output logic [7:0] ie_q
);
  logic [4:0] prev, rise;

  assign rise = irq_in & ~prev;

  always_ff @(posedge clk) begin
    if (rst) begin
      prev <= '0; if_q <= '0; ie_q <= '0;
    end else begin
      prev <= irq_in;
      if (!io_req.we_l && io_req.addr == A_IF) if_q <= io_req.wdata[4:0] | rise;
      else                                     if_q <= (if_q & ~if_clr) | rise;
      if (!io_req.we_l && io_req.addr == A_IE) ie_q <= io_req.wdata;
    end
  end

  always_comb begin
    io_rdata = 8'h00;
    if (!io_req.re_l && io_req.addr == A_IF) io_rdata = {3'b111, if_q};
    if (!io_req.re_l && io_req.addr == A_IE) io_rdata = ie_q;
  end
endmodule
