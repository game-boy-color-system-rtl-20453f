// Clock module: clock dividers and CPU speed mode (KEY1, FF4D).
//
// From the base clock (8 times the 4.19 MHz normal CPU rate) a 3-bit counter
// makes 16, 8 and 4 MHz square waves and one-cycle enables at those rates.
// cpu_ce is the 4 MHz enable in normal speed and the 8 MHz enable in double
// speed. The speed after reset comes from a DIP switch. A program can also
// switch: it sets KEY1 bit 0, then executes STOP (cpu_stop); the controller
// counts SETTLE cycles to let the CPU state settle, flips the speed and
// clears bit 0. KEY1 reads bit 7 = current speed, bit 0 = switch armed, the
// rest 1. While settling, cpu_ce is held low.
//
// The 4/8/16 MHz outputs, the DIP switch at reset and the KEY1 switch with a
// settle countdown follow the original design; the countdown length and the
// use of enables instead of derived clocks are this design's choice.
module clock_ctrl
  import gb_pkg::*;
#(
  parameter int SETTLE = 1024
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       dip_double,
  input  logic       cpu_stop,
  input  mem_req_t   io_req,
  output logic [7:0] io_rdata,
  output logic       clk_16m, clk_8m, clk_4m,
  output logic       ce_16m, ce_8m, ce_4m,
  output logic       cpu_ce,
  output logic       double_speed
);
  logic [2:0] cnt;
  logic       armed;
  logic [$clog2(SETTLE+1)-1:0] settle;

  assign clk_16m = cnt[0];
  assign clk_8m  = cnt[1];
  assign clk_4m  = cnt[2];
  assign ce_16m  = cnt[0];
  assign ce_8m   = cnt[1:0] == 2'b11;
  assign ce_4m   = cnt == 3'b111;
  assign cpu_ce  = (settle == '0) && (double_speed ? ce_8m : ce_4m);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0; armed <= 1'b0; settle <= '0; double_speed <= dip_double;
    end else begin
      cnt <= cnt + 3'd1;
      if (!io_req.we_l && io_req.addr == A_KEY1) armed <= io_req.wdata[0];
      if (settle != '0) begin
        settle <= settle - 1'b1;
        if (settle == 1) begin double_speed <= !double_speed; armed <= 1'b0; end
      end else if (cpu_stop && armed) begin
        settle <= ($clog2(SETTLE+1))'(SETTLE);
      end
    end
  end

  assign io_rdata = (!io_req.re_l && io_req.addr == A_KEY1) ? {double_speed, 6'b111111, armed} : 8'h00;
endmodule
