// Sound channel 1: square wave with frequency sweep and volume envelope,
// controlled by NR10-NR14 (FF10-FF14).
//
// The five registers are io_bus_parsers. NR10: sweep time (bits 6-4, in
// 1/128 s), direction (bit 3, 1 = down) and shift (bits 2-0). NR11: duty
// (bits 7-6) and length (bits 5-0, (64 - t)/256 s). NR12: start volume
// (7-4), envelope direction (3, 1 = up), envelope step (2-0, n/64 s).
// NR13/NR14[2:0]: the 11-bit frequency code; NR14 bit 7 written as 1 starts
// the sound, bit 6 stops it when the length runs out.
// Every sweep period the frequency becomes f +/- f >> shift; a result above
// 2047 stops the channel. The swept frequency is written back into NR13 and
// NR14 through the parsers' owner port, so the registers always hold the
// frequency being played. The frame ticks (256, 128, 64 Hz) come from
// sound_top. A zero start volume with direction down (NR12[7:3] = 0) turns
// the channel off. The square_gen makes the waveform.
//
// The five registers read through I/O bus parsers and the square generator
// follow the original design; the sweep, envelope and length rules follow the
// real console.
module sound_ch1
  import gb_pkg::*;
#(
  parameter int CLK_HZ = 33554432
) (
  input  logic               clk,
  input  logic               rst,
  input  mem_req_t           io_req,
  output logic [7:0]         io_rdata,
  input  logic               tick_len,
  input  logic               tick_sweep,
  input  logic               tick_env,
  output logic signed [19:0] wave,
  output logic               active
);
  logic [7:0] nr10, nr11, nr12, nr13, nr14;
  logic [7:0] rd0, rd1, rd2, rd3, rd4;
  logic       w14, w11;
  logic       trig;
  logic [10:0] freq, swept;
  logic [11:0] next_f;
  logic        sw_wr;
  logic [2:0]  sw_cnt;
  logic [6:0]  len;
  logic [3:0]  vol;

  io_bus_parser #(.ADDR(A_NR10), .WMASK(8'h7F), .ONES(8'h80)) u_nr10 (.clk, .rst, .io_req, .io_rdata(rd0), .io_hit(), .rd_data(nr10), .cpu_wr(), .wr_data(8'h00), .wr_en(1'b0));
  io_bus_parser #(.ADDR(A_NR11)) u_nr11 (.clk, .rst, .io_req, .io_rdata(rd1), .io_hit(), .rd_data(nr11), .cpu_wr(w11), .wr_data(8'h00), .wr_en(1'b0));
  io_bus_parser #(.ADDR(A_NR12)) u_nr12 (.clk, .rst, .io_req, .io_rdata(rd2), .io_hit(), .rd_data(nr12), .cpu_wr(), .wr_data(8'h00), .wr_en(1'b0));
  io_bus_parser #(.ADDR(A_NR13)) u_nr13 (.clk, .rst, .io_req, .io_rdata(rd3), .io_hit(), .rd_data(nr13), .cpu_wr(), .wr_data(swept[7:0]), .wr_en(sw_wr));
  io_bus_parser #(.ADDR(A_NR14)) u_nr14 (.clk, .rst, .io_req, .io_rdata(rd4), .io_hit(), .rd_data(nr14), .cpu_wr(w14), .wr_data({nr14[7:3], swept[10:8]}), .wr_en(sw_wr));

  assign io_rdata = rd0 | rd1 | rd2 | rd3 | rd4;
  assign trig     = w14 && io_req.wdata[7];
  assign freq     = {nr14[2:0], nr13};
  assign next_f   = nr10[3] ? {1'b0, freq} - ({1'b0, freq} >> nr10[2:0])
                            : {1'b0, freq} + ({1'b0, freq} >> nr10[2:0]);
  assign swept    = next_f[10:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0; sw_cnt <= '0; len <= '0; sw_wr <= 1'b0;
    end else begin
      sw_wr <= 1'b0;
      if (w11) len <= 7'd64 - {1'b0, io_req.wdata[5:0]};
      if (trig) begin
        active <= 1'b1; sw_cnt <= nr10[6:4];
        if (len == 0) len <= 7'd64;
      end else begin
        if (tick_len && nr14[6] && len != 0) begin
          len <= len - 7'd1;
          if (len == 7'd1) active <= 1'b0;
        end
        if (tick_sweep && nr10[6:4] != 3'd0 && nr10[2:0] != 3'd0 && active) begin
          if (sw_cnt <= 3'd1) begin
            sw_cnt <= nr10[6:4];
            if (next_f[11]) active <= 1'b0;
            else            sw_wr  <= 1'b1;
          end else sw_cnt <= sw_cnt - 3'd1;
        end
      end
      if (nr12[7:3] == 5'd0) active <= 1'b0;
    end
  end

  sound_envelope u_env (.clk, .rst, .trigger(trig), .tick_env, .init_vol(nr12[7:4]),
                        .dir_up(nr12[3]), .step(nr12[2:0]), .vol);

  square_gen #(.CLK_HZ(CLK_HZ)) u_sq (.clk, .rst, .freq, .volume(vol), .duty(nr11[7:6]),
                                       .en(active), .wave);
endmodule
