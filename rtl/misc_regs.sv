// Infrared port register RP (FF56) and the undocumented CGB registers
// FF6C and FF72-FF77.
//
// The infrared LED itself is not built; RP is kept as a register so that
// programs that touch it behave: bits 7-6 (read enable) and bit 0 (LED) are
// read/write, bit 1 reads the receiver, which sees no light (1), bits 5-2
// read 1. The undocumented registers, each an io_bus_parser, hold the bits
// and reset values known for them: FF6C bit 0 (FEh), FF72/FF73/FF74 all
// bits (00h), FF75 bits 6-4 (8Fh), FF76/FF77 read-only 00h.
module misc_regs
  import gb_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  mem_req_t   io_req,
  output logic [7:0] io_rdata,
  output logic       ir_led
);
  logic [7:0] rd [8];
  logic [7:0] rp;

  io_bus_parser #(.ADDR(A_RP),     .RESET_VAL(8'h02), .WMASK(8'hC1), .ONES(8'h3E)) u_rp   (.clk, .rst, .io_req, .io_rdata(rd[0]), .io_hit(), .rd_data(rp), .cpu_wr(), .wr_data(8'h00), .wr_en(1'b0));
  io_bus_parser #(.ADDR(16'hFF6C), .RESET_VAL(8'hFE), .WMASK(8'h01), .ONES(8'hFE)) u_ff6c (.clk, .rst, .io_req, .io_rdata(rd[1]), .io_hit(), .rd_data(), .cpu_wr(), .wr_data(8'h00), .wr_en(1'b0));
  io_bus_parser #(.ADDR(16'hFF72), .RESET_VAL(8'h00), .WMASK(8'hFF), .ONES(8'h00)) u_ff72 (.clk, .rst, .io_req, .io_rdata(rd[2]), .io_hit(), .rd_data(), .cpu_wr(), .wr_data(8'h00), .wr_en(1'b0));
  io_bus_parser #(.ADDR(16'hFF73), .RESET_VAL(8'h00), .WMASK(8'hFF), .ONES(8'h00)) u_ff73 (.clk, .rst, .io_req, .io_rdata(rd[3]), .io_hit(), .rd_data(), .cpu_wr(), .wr_data(8'h00), .wr_en(1'b0));
  io_bus_parser #(.ADDR(16'hFF74), .RESET_VAL(8'h00), .WMASK(8'hFF), .ONES(8'h00)) u_ff74 (.clk, .rst, .io_req, .io_rdata(rd[4]), .io_hit(), .rd_data(), .cpu_wr(), .wr_data(8'h00), .wr_en(1'b0));
  io_bus_parser #(.ADDR(16'hFF75), .RESET_VAL(8'h8F), .WMASK(8'h70), .ONES(8'h8F)) u_ff75 (.clk, .rst, .io_req, .io_rdata(rd[5]), .io_hit(), .rd_data(), .cpu_wr(), .wr_data(8'h00), .wr_en(1'b0));
  io_bus_parser #(.ADDR(16'hFF76), .RESET_VAL(8'h00), .WMASK(8'h00), .ONES(8'h00)) u_ff76 (.clk, .rst, .io_req, .io_rdata(rd[6]), .io_hit(), .rd_data(), .cpu_wr(), .wr_data(8'h00), .wr_en(1'b0));
  io_bus_parser #(.ADDR(16'hFF77), .RESET_VAL(8'h00), .WMASK(8'h00), .ONES(8'h00)) u_ff77 (.clk, .rst, .io_req, .io_rdata(rd[7]), .io_hit(), .rd_data(), .cpu_wr(), .wr_data(8'h00), .wr_en(1'b0));

  always_comb begin
    io_rdata = 8'h00;
    for (int i = 0; i < 8; i++) io_rdata |= rd[i];
  end

  assign ir_led = rp[0];
endmodule
