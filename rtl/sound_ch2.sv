// Sound channel 2: square wave with volume envelope, NR21-NR24 (FF16-FF19).
//
// The same as channel 1 without the frequency sweep. NR21: duty (7-6) and
// length (5-0, (64 - t)/256 s). NR22: start volume, envelope direction and
// step. NR23/NR24[2:0]: frequency code; NR24 bit 7 = 1 starts the sound,
// bit 6 enables the length stop. Registers are io_bus_parsers; frame ticks
// come from sound_top. NR22[7:3] = 0 turns the channel off.
//
// Channel 1 without the sweep, as in the original design; the register rules
// follow the real console.
module sound_ch2
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
  logic [7:0] nr21, nr22, nr23, nr24;
  logic [7:0] rd1, rd2, rd3, rd4;
  logic       w21, w24, trig;
  logic [6:0] len;
  logic [3:0] vol;

  io_bus_parser #(.ADDR(A_NR21)) u_nr21 (.clk, .rst, .io_req, .io_rdata(rd1), .io_hit(), .rd_data(nr21), .cpu_wr(w21), .wr_data(8'h00), .wr_en(1'b0));
  io_bus_parser #(.ADDR(A_NR22)) u_nr22 (.clk, .rst, .io_req, .io_rdata(rd2), .io_hit(), .rd_data(nr22), .cpu_wr(), .wr_data(8'h00), .wr_en(1'b0));
  io_bus_parser #(.ADDR(A_NR23)) u_nr23 (.clk, .rst, .io_req, .io_rdata(rd3), .io_hit(), .rd_data(nr23), .cpu_wr(), .wr_data(8'h00), .wr_en(1'b0));
  io_bus_parser #(.ADDR(A_NR24)) u_nr24 (.clk, .rst, .io_req, .io_rdata(rd4), .io_hit(), .rd_data(nr24), .cpu_wr(w24), .wr_data(8'h00), .wr_en(1'b0));

  assign io_rdata = rd1 | rd2 | rd3 | rd4;
  assign trig     = w24 && io_req.wdata[7];

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0; len <= '0;
    end else begin
      if (w21) len <= 7'd64 - {1'b0, io_req.wdata[5:0]};
      if (trig) begin
        active <= 1'b1;
        if (len == 0) len <= 7'd64;
      end else if (tick_len && nr24[6] && len != 0) begin
        len <= len - 7'd1;
        if (len == 7'd1) active <= 1'b0;
      end
      if (nr22[7:3] == 5'd0) active <= 1'b0;
    end
  end

  sound_envelope u_env (.clk, .rst, .trigger(trig), .tick_env, .init_vol(nr22[7:4]),
                        .dir_up(nr22[3]), .step(nr22[2:0]), .vol);

  square_gen #(.CLK_HZ(CLK_HZ)) u_sq (.clk, .rst, .freq({nr24[2:0], nr23}), .volume(vol),
                                       .duty(nr21[7:6]), .en(active), .wave);
endmodule
