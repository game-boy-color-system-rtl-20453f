// Frequency code to waveform period, in clk cycles.
//
// Channels 1 and 2 play f = 131072 / (2048 - x) Hz for an 11-bit code x, so
// one period lasts CLK_HZ * (2048 - x) / 131072 clocks. Channel 3 plays its
// 32-sample wave at f = 65536 / (2048 - x), so a whole wave lasts
// CLK_HZ * (2048 - x) / 65536 clocks. Since both divisors are powers of two
// the table is computed exactly as a multiply and a shift (rounded down), not
// stored. With the default CLK_HZ = 2^25 the results are exact integers.
// ch3 selects the channel-3 formula. Purely combinational.
//
// The original design looks the period up in a 2048-entry block RAM; this
// design computes the same formula with a multiplier and a shift, which is
// exact because 131072 is a power of two.
module sound_freq_lut #(
  parameter int CLK_HZ = 33554432
) (
  input  logic [10:0] freq,
  input  logic        ch3,
  output logic [31:0] clocks
);
  logic [47:0] prod;
  assign prod   = 48'(CLK_HZ) * 48'(12'd2048 - {1'b0, freq});
  assign clocks = ch3 ? 32'(prod >> 16) : 32'(prod >> 17);
endmodule
