// Serial link port: SB (FF01) data and SC (FF02) control, for a four-wire
// link between two boards (bit_out, clock_out, bit_in, clock_in).
//
// Writing SC with bit 7 set starts a transfer of the byte in SB. With SC
// bit 0 = 1 this side makes the shift clock: clock_out toggles every half
// period, a full period being 2^9 CPU cycles (ce pulses) normally and 2^4
// with SC bit 1 (fast). With SC bit 0 = 0 the clock comes from the other
// board on clock_in (synchronised here). Bits leave MSB first: bit_out shows
// SB[7] and changes on the falling clock edge; on each rising edge bit_in is
// shifted into SB[0]. After eight rising edges SC bit 7 clears and irq
// pulses. clock_out idles high. SC unused bits read as 1.
//
// The four wires, the start/speed/clock-source bits and the two rates (clock
// / 2^9 and / 2^4) follow the original design; the edge on which bits change
// and are sampled and the SB/SC addresses follow the real console.
module link_serial
  import gb_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  mem_req_t   io_req,
  output logic [7:0] io_rdata,
  output logic       bit_out,
  output logic       clock_out,
  input  logic       bit_in,
  input  logic       clock_in,
  output logic       irq
);
  logic [7:0] sb;
  logic       start, fast, internal;
  logic [7:0] half_cnt;
  logic [3:0] nbits;
  logic [2:0] cin_sync;
  logic       sclk, sclk_q, rise, fall;
  logic [7:0] half;

  assign half = fast ? 8'd7 : 8'd255;   // half period minus one, in CPU cycles

  always_ff @(posedge clk) begin
    if (rst) begin
      sb <= '0; start <= 1'b0; fast <= 1'b0; internal <= 1'b0; half_cnt <= '0;
      nbits <= '0; cin_sync <= 3'b111; clock_out <= 1'b1; sclk_q <= 1'b1; irq <= 1'b0;
      bit_out <= 1'b1;
    end else begin
      irq <= 1'b0;
      cin_sync <= {cin_sync[1:0], clock_in};
      sclk_q <= sclk;
      if (start && internal && ce) begin
        if (half_cnt == half) begin half_cnt <= '0; clock_out <= !clock_out; end
        else half_cnt <= half_cnt + 8'd1;
      end
      if (start && fall) bit_out <= sb[7];
      if (start && rise) begin
        sb <= {sb[6:0], bit_in};
        if (nbits == 4'd7) begin
          start <= 1'b0; irq <= 1'b1; nbits <= '0; clock_out <= 1'b1;
        end else nbits <= nbits + 4'd1;
      end
      if (!io_req.we_l && io_req.addr == A_SB) sb <= io_req.wdata;
      if (!io_req.we_l && io_req.addr == A_SC) begin
        start <= io_req.wdata[7]; fast <= io_req.wdata[1]; internal <= io_req.wdata[0];
        half_cnt <= '0; nbits <= '0; clock_out <= 1'b1;
        bit_out <= sb[7];
      end
    end
  end

  assign sclk = internal ? clock_out : cin_sync[2];
  assign rise = sclk && !sclk_q;
  assign fall = !sclk && sclk_q;

  always_comb begin
    io_rdata = 8'h00;
    if (!io_req.re_l && io_req.addr == A_SB) io_rdata = sb;
    if (!io_req.re_l && io_req.addr == A_SC) io_rdata = {start, 5'b11111, fast, internal};
  end
endmodule
