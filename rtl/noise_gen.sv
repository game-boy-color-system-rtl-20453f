// Random waveform generator for sound channel 4.
//
// Two linear feedback shift registers, 15 and 7 bits long, advance on each
// shift_tick (the shift clock, a one-cycle enable made by sound_ch4). In
// each, the next value of the last stage is bit 0 XOR bit 1 and every other
// stage takes its neighbour's value (a right shift). lfsr_sel picks the
// 7-bit register. The output is +sample while bit 0 of the chosen register
// is 1 and -sample otherwise, with sample = volume * 34952. restart loads
// both registers with all ones. Disabled, the output is 0.
//
// The 15/7-bit LFSR choice, the shift-clock input and the sign from the
// lowest LFSR bit follow the original design; the feedback taps follow the
// real console.
module noise_gen (
  input  logic               clk,
  input  logic               rst,
  input  logic               restart,
  input  logic               lfsr_sel,   // 1: 7-bit register
  input  logic               shift_tick,
  input  logic [3:0]         volume,
  input  logic               en,
  output logic signed [19:0] wave
);
  logic [14:0] l15;
  logic [6:0]  l7;
  logic signed [19:0] amp;
  logic bit0;

  always_ff @(posedge clk) begin
    if (rst || restart) begin
      l15 <= '1; l7 <= '1;
    end else if (shift_tick) begin
      l15 <= {l15[0] ^ l15[1], l15[14:1]};
      l7  <= {l7[0] ^ l7[1], l7[6:1]};
    end
  end

  assign bit0 = lfsr_sel ? l7[0] : l15[0];
  assign amp  = 20'(volume) * 20'sd34952;
  assign wave = !en ? 20'sd0 : bit0 ? amp : -amp;
endmodule
