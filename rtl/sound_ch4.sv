// Sound channel 4: white noise with volume envelope, NR41-NR44 (FF20-FF23).
//
// NR41 bits 5-0: length ((64 - t)/256 s). NR42: start volume, envelope
// direction and step. NR43: shift clock frequency s (bits 7-4), LFSR width
// (bit 3, 1 = 7 bits) and divide ratio r (bits 2-0). The LFSR shifts at
// 524288 / r / 2^(s+1) Hz, r = 0 counting as 0.5; a counter makes that rate
// from clk as CLK_HZ * r' * 2^s / 2^19 clocks per shift, r' = 2r (or 1 when
// r = 0). NR44 bit 7 = 1 starts the sound and reloads the LFSR, bit 6
// enables the length stop. noise_gen makes the waveform.
//
// The noise generator with an envelope and a counter-made shift clock follow
// the original design; the shift-rate formula follows the real console.
module sound_ch4
  import gb_pkg::*;
#(
  parameter int CLK_HZ = 33554432
) (
  input  logic               clk,
  input  logic               rst,
  input  mem_req_t           io_req,
  output logic [7:0]         io_rdata,
  input  logic               tick_len,
  input  logic               tick_env,
  output logic signed [19:0] wave,
  output logic               active
);
  logic [7:0] nr41, nr42, nr43, nr44;
  logic [7:0] rd1, rd2, rd3, rd4;
  logic       w41, w44, trig;
  logic [6:0] len;
  logic [3:0] vol;
  logic [47:0] prod;
  logic [31:0] per_shift, scnt;
  logic        shift_tick;

  io_bus_parser #(.ADDR(A_NR41), .WMASK(8'h3F), .ONES(8'hC0)) u_nr41 (.clk, .rst, .io_req, .io_rdata(rd1), .io_hit(), .rd_data(nr41), .cpu_wr(w41), .wr_data(8'h00), .wr_en(1'b0));
  io_bus_parser #(.ADDR(A_NR42)) u_nr42 (.clk, .rst, .io_req, .io_rdata(rd2), .io_hit(), .rd_data(nr42), .cpu_wr(), .wr_data(8'h00), .wr_en(1'b0));
  io_bus_parser #(.ADDR(A_NR43)) u_nr43 (.clk, .rst, .io_req, .io_rdata(rd3), .io_hit(), .rd_data(nr43), .cpu_wr(), .wr_data(8'h00), .wr_en(1'b0));
  io_bus_parser #(.ADDR(A_NR44), .WMASK(8'hC0), .ONES(8'h3F)) u_nr44 (.clk, .rst, .io_req, .io_rdata(rd4), .io_hit(), .rd_data(nr44), .cpu_wr(w44), .wr_data(8'h00), .wr_en(1'b0));

  assign io_rdata = rd1 | rd2 | rd3 | rd4;
  assign trig     = w44 && io_req.wdata[7];

  assign prod      = (48'(CLK_HZ) * 48'((nr43[2:0] == 3'd0) ? 4'd1 : {nr43[2:0], 1'b0})) << nr43[7:4];
  assign per_shift = (prod >> 19) == 0 ? 32'd1 : 32'(prod >> 19);
  assign shift_tick = active && scnt >= per_shift - 1;

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0; len <= '0; scnt <= '0;
    end else begin
      if (w41) len <= 7'd64 - {1'b0, io_req.wdata[5:0]};
      scnt <= (trig || shift_tick) ? '0 : scnt + 32'd1;
      if (trig) begin
        active <= 1'b1;
        if (len == 0) len <= 7'd64;
      end else if (tick_len && nr44[6] && len != 0) begin
        len <= len - 7'd1;
        if (len == 7'd1) active <= 1'b0;
      end
      if (nr42[7:3] == 5'd0) active <= 1'b0;
    end
  end

  sound_envelope u_env (.clk, .rst, .trigger(trig), .tick_env, .init_vol(nr42[7:4]),
                        .dir_up(nr42[3]), .step(nr42[2:0]), .vol);

  noise_gen u_noise (.clk, .rst, .restart(trig), .lfsr_sel(nr43[3]), .shift_tick,
                     .volume(vol), .en(active), .wave);
endmodule
