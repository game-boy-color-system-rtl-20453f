// Sound channel 3: user waveform from wave RAM, NR30-NR34 (FF1A-FF1E) and
// wave RAM FF30-FF3F.
//
// Wave RAM holds 32 4-bit samples, two per byte, high nibble first. The
// channel-3 period from sound_freq_lut (a whole 32-sample wave) divided by
// 32 (a right shift by 5) gives the clocks per sample; each time the sample
// timer runs out a 5-bit pointer advances and wraps, replaying the wave.
// NR30 bit 7 turns the channel on; NR31 gives the length ((256 - t)/256 s);
// NR32 bits 6-5 the output level (mute, 100 %, 50 %, 25 %, by right shifts
// of the sample); NR33/NR34[2:0] the frequency code; NR34 bit 7 = 1 starts
// playback from sample 0, bit 6 enables the length stop. The 4-bit sample
// maps to an unsigned 20-bit value sample * 34952 (0 .. 2^19-8).
//
// The wave RAM at FF30-FF3F, high nibble first and 32 samples spread over one
// period follow the original design; the level shifts and length rule follow
// the real console.
module sound_ch3
  import gb_pkg::*;
#(
  parameter int CLK_HZ = 33554432
) (
  input  logic               clk,
  input  logic               rst,
  input  mem_req_t           io_req,
  output logic [7:0]         io_rdata,
  input  logic               tick_len,
  output logic signed [19:0] wave,
  output logic               active
);
  logic [7:0] nr30, nr31, nr32, nr33, nr34;
  logic [7:0] rd0, rd1, rd2, rd3, rd4;
  logic       w31, w34, trig;
  logic [7:0] wram [16];
  logic [4:0] ptr;
  logic [31:0] period, per_sample, tcnt;
  logic [8:0] len;
  logic [3:0] nib, lvl;
  logic       wsel;

  io_bus_parser #(.ADDR(A_NR30), .WMASK(8'h80), .ONES(8'h7F)) u_nr30 (.clk, .rst, .io_req, .io_rdata(rd0), .io_hit(), .rd_data(nr30), .cpu_wr(), .wr_data(8'h00), .wr_en(1'b0));
  io_bus_parser #(.ADDR(A_NR31)) u_nr31 (.clk, .rst, .io_req, .io_rdata(rd1), .io_hit(), .rd_data(nr31), .cpu_wr(w31), .wr_data(8'h00), .wr_en(1'b0));
  io_bus_parser #(.ADDR(A_NR32), .WMASK(8'h60), .ONES(8'h9F)) u_nr32 (.clk, .rst, .io_req, .io_rdata(rd2), .io_hit(), .rd_data(nr32), .cpu_wr(), .wr_data(8'h00), .wr_en(1'b0));
  io_bus_parser #(.ADDR(A_NR33)) u_nr33 (.clk, .rst, .io_req, .io_rdata(rd3), .io_hit(), .rd_data(nr33), .cpu_wr(), .wr_data(8'h00), .wr_en(1'b0));
  io_bus_parser #(.ADDR(A_NR34)) u_nr34 (.clk, .rst, .io_req, .io_rdata(rd4), .io_hit(), .rd_data(nr34), .cpu_wr(w34), .wr_data(8'h00), .wr_en(1'b0));

  assign wsel = io_req.addr[15:4] == 12'hFF3;
  assign trig = w34 && io_req.wdata[7];

  always_ff @(posedge clk)
    if (wsel && !io_req.we_l) wram[io_req.addr[3:0]] <= io_req.wdata;

  assign io_rdata = rd0 | rd1 | rd2 | rd3 | rd4 |
                    ((wsel && !io_req.re_l) ? wram[io_req.addr[3:0]] : 8'h00);

  sound_freq_lut #(.CLK_HZ(CLK_HZ)) u_lut (.freq({nr34[2:0], nr33}), .ch3(1'b1), .clocks(period));
  assign per_sample = period >> 5;

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0; ptr <= '0; tcnt <= '0; len <= '0;
    end else begin
      if (w31) len <= 9'd256 - {1'b0, io_req.wdata};
      if (trig) begin
        active <= 1'b1; ptr <= '0; tcnt <= '0;
        if (len == 0) len <= 9'd256;
      end else begin
        if (active) begin
          if (tcnt >= per_sample - 1) begin tcnt <= '0; ptr <= ptr + 5'd1; end
          else tcnt <= tcnt + 32'd1;
        end
        if (tick_len && nr34[6] && len != 0) begin
          len <= len - 9'd1;
          if (len == 9'd1) active <= 1'b0;
        end
      end
      if (!nr30[7]) active <= 1'b0;
    end
  end

  assign nib = ptr[0] ? wram[ptr[4:1]][3:0] : wram[ptr[4:1]][7:4];

  always_comb begin
    case (nr32[6:5])
      2'd0: lvl = 4'd0;
      2'd1: lvl = nib;
      2'd2: lvl = nib >> 1;
      default: lvl = nib >> 2;
    endcase
  end

  assign wave = active ? 20'(lvl) * 20'sd34952 : 20'sd0;
endmodule
