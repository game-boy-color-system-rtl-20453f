// Sound system: four channels, NR50-NR52 (FF24-FF26), stereo mixing and the
// hand-over to the audio codec.
//
// A divider of clk makes the frame ticks the channels use: 256 Hz (length),
// 128 Hz (sweep) and 64 Hz (envelope). NR51 routes each channel to the left
// (bits 7-4) and/or right (bits 3-0) output; the selected samples are summed
// and the sum divided by 4 to stay a 20-bit signed sample. NR50 (output
// volume) is stored and read back but does not scale the output. NR52 bit 7
// switches the whole unit on; bits 3-0 read which channels are playing.
// The mix is computed on clk; on the codec side (bit_clk domain) one
// register takes the mix every bit clock and a second takes that on the
// codec's strobe, so the sample handed to the codec never comes from a
// metastable capture of a changing value.
//
// NR50 being ignored, the plain sum of the channels and one register between
// the clock domains follow the original design; the divide by 4, the
// frame-tick divider and the NR52 power switch are this design's choice.
module sound_top
  import gb_pkg::*;
#(
  parameter int CLK_HZ = 33554432
) (
  input  logic               clk,
  input  logic               rst,
  input  mem_req_t           io_req,
  output logic [7:0]         io_rdata,
  input  logic               ac97_bit_clk,
  input  logic               ac97_strobe,
  output logic signed [19:0] left_out,
  output logic signed [19:0] right_out,
  output logic [3:0]         ch_active
);
  localparam int DIV256 = CLK_HZ / 256;

  logic [$clog2(DIV256)-1:0] fdiv;
  logic [1:0]  fstep;
  logic        tick_len, tick_sweep, tick_env;
  logic [7:0]  nr50, nr51, nr52;
  logic [7:0]  rd50, rd51, rd52, rdc [4];
  logic signed [19:0] w [4];
  logic signed [21:0] lsum, rsum;
  logic signed [19:0] lmix, rmix, lsync, rsync;
  logic        on, ch_rst;

  io_bus_parser #(.ADDR(A_NR50)) u_nr50 (.clk, .rst, .io_req, .io_rdata(rd50), .io_hit(), .rd_data(nr50), .cpu_wr(), .wr_data(8'h00), .wr_en(1'b0));
  io_bus_parser #(.ADDR(A_NR51)) u_nr51 (.clk, .rst, .io_req, .io_rdata(rd51), .io_hit(), .rd_data(nr51), .cpu_wr(), .wr_data(8'h00), .wr_en(1'b0));
  io_bus_parser #(.ADDR(A_NR52), .WMASK(8'h80), .ONES(8'h70)) u_nr52 (.clk, .rst, .io_req, .io_rdata(rd52), .io_hit(), .rd_data(nr52), .cpu_wr(), .wr_data(8'h00), .wr_en(1'b0));

  assign on     = nr52[7];
  assign ch_rst = rst || !on;

  always_ff @(posedge clk) begin
    if (rst) begin fdiv <= '0; fstep <= '0; end
    else if (32'(fdiv) == DIV256 - 1) begin fdiv <= '0; fstep <= fstep + 2'd1; end
    else fdiv <= fdiv + 1'b1;
  end
  assign tick_len   = 32'(fdiv) == DIV256 - 1;
  assign tick_sweep = tick_len && fstep[0];
  assign tick_env   = tick_len && fstep == 2'd3;

  sound_ch1 #(.CLK_HZ(CLK_HZ)) u_ch1 (.clk, .rst(ch_rst), .io_req, .io_rdata(rdc[0]), .tick_len,
                                      .tick_sweep, .tick_env, .wave(w[0]), .active(ch_active[0]));
  sound_ch2 #(.CLK_HZ(CLK_HZ)) u_ch2 (.clk, .rst(ch_rst), .io_req, .io_rdata(rdc[1]), .tick_len,
                                      .tick_env, .wave(w[1]), .active(ch_active[1]));
  sound_ch3 #(.CLK_HZ(CLK_HZ)) u_ch3 (.clk, .rst(ch_rst), .io_req, .io_rdata(rdc[2]), .tick_len,
                                      .wave(w[2]), .active(ch_active[2]));
  sound_ch4 #(.CLK_HZ(CLK_HZ)) u_ch4 (.clk, .rst(ch_rst), .io_req, .io_rdata(rdc[3]), .tick_len,
                                      .tick_env, .wave(w[3]), .active(ch_active[3]));

  always_comb begin
    lsum = '0; rsum = '0;
    for (int i = 0; i < 4; i++) begin
      if (nr51[4+i]) lsum += 22'(w[i]);
      if (nr51[i])   rsum += 22'(w[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin lmix <= '0; rmix <= '0; end
    else begin lmix <= 20'(lsum >>> 2); rmix <= 20'(rsum >>> 2); end
  end

  always_ff @(posedge ac97_bit_clk) begin
    lsync <= lmix;
    rsync <= rmix;
    if (ac97_strobe) begin left_out <= lsync; right_out <= rsync; end
  end

  assign io_rdata = rd50 | rd51 | (rd52 & 8'hF0) | (rd52 != 8'h00 ? {4'h0, ch_active} : 8'h00) |
                    rdc[0] | rdc[1] | rdc[2] | rdc[3];
endmodule
