// Square waveform generator for sound channels 1 and 2.
//
// Inputs are the 11-bit frequency code, a 4-bit volume, a 2-bit duty cycle
// (00 12.5 %, 01 25 %, 10 50 %, 11 75 %) and an enable. sound_freq_lut turns
// the code into the period in clocks; shifts of the period give the high
// time (period/8, /4, /2, period - period/4). The volume maps to a positive
// 20-bit sample vol * 34952 (0 .. 2^19-8). A counter runs over the period:
// while it is below the high time the output is +sample, for the rest of
// the period -sample. Disabled, the output is 0 and the counter restarts.
// The waveform is made on clk; the codec strobe samples it in sound_top.
//
// The duty cycles, the shift-derived high time, the 20-bit signed output and
// the negated low half follow the original design; the volume scale factor is
// this design's choice.
module square_gen #(
  parameter int CLK_HZ = 33554432
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [10:0]        freq,
  input  logic [3:0]         volume,
  input  logic [1:0]         duty,
  input  logic               en,
  output logic signed [19:0] wave
);
  logic [31:0] period, high, cnt;
  logic signed [19:0] amp;

  sound_freq_lut #(.CLK_HZ(CLK_HZ)) u_lut (.freq, .ch3(1'b0), .clocks(period));

  always_comb begin
    case (duty)
      2'd0: high = period >> 3;
      2'd1: high = period >> 2;
      2'd2: high = period >> 1;
      default: high = period - (period >> 2);
    endcase
  end

  assign amp = 20'(volume) * 20'sd34952;

  always_ff @(posedge clk) begin
    if (rst || !en)             cnt <= '0;
    else if (cnt >= period - 1) cnt <= '0;
    else                        cnt <= cnt + 32'd1;
  end

  assign wave = !en ? 20'sd0 : (cnt < high) ? amp : -amp;
endmodule
