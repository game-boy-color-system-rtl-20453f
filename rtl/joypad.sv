// Joypad: reads an NES controller and presents it as the P1/JOYP register.
//
// Controller protocol: FRAME_HZ times a second the FSM raises latch for two
// time units (the controller stores its eight buttons), then gives eight
// pulses of one unit high and one unit low. The data line (active low) shows
// A first, then B, Select, Start, Up, Down, Left, Right, each advanced by a
// pulse; the FSM samples each bit just before the next pulse rises. One
// unit is UNIT_US microseconds of clk (CLK_HZ). The sampled set is held in
// a button vector that always has the latest state.
// JOYP (FF00): the CPU writes bits 5-4 to select buttons (bit 5 low) and/or
// directions (bit 4 low); bits 3-0 read the selected keys, 0 = pressed
// (Down/Start, Up/Select, Left/B, Right/A); bits 7-6 read 1. irq pulses when
// a bit 3-0 falls.
//
// The 60 Hz latch, eight pulses and the always-current button vector follow
// the original design; the pulse widths and bit order follow the standard NES
// controller and are this design's choice.
module joypad
  import gb_pkg::*;
#(
  parameter int CLK_HZ   = 33554432,
  parameter int FRAME_HZ = 60,
  parameter int UNIT_US  = 6
) (
  input  logic       clk,
  input  logic       rst,
  input  mem_req_t   io_req,
  output logic [7:0] io_rdata,
  output logic       nes_latch,
  output logic       nes_pulse,
  input  logic       nes_data,
  output logic [7:0] buttons,   // 1 = pressed: {Right,Left,Down,Up,Start,Select,B,A}
  output logic       irq
);
  localparam int UNIT  = (CLK_HZ / 1000000) * UNIT_US;
  localparam int FRAME = CLK_HZ / FRAME_HZ;

  typedef enum logic [1:0] {S_IDLE, S_LATCH, S_HIGH, S_LOW} st_t;
  st_t st;
  logic [$clog2(FRAME+1)-1:0] frame_cnt;
  logic [$clog2(2*UNIT+1)-1:0] t;
  logic [2:0] bitn;
  logic [7:0] shift;
  logic [1:0] sel;     // JOYP bits 5-4
  logic [3:0] low, low_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE; frame_cnt <= '0; t <= '0; bitn <= '0; shift <= '0; buttons <= '0;
    end else begin
      frame_cnt <= (32'(frame_cnt) >= FRAME - 1) ? '0 : frame_cnt + 1'b1;
      case (st)
        S_IDLE: if (32'(frame_cnt) == FRAME - 1) begin st <= S_LATCH; t <= '0; end
        S_LATCH: if (32'(t) == 2*UNIT - 1) begin
          shift[0] <= !nes_data; bitn <= 3'd1; t <= '0; st <= S_HIGH;
        end else t <= t + 1'b1;
        S_HIGH: if (32'(t) == UNIT - 1) begin t <= '0; st <= S_LOW; end
                else t <= t + 1'b1;
        S_LOW: if (32'(t) == UNIT - 1) begin
          t <= '0;
          if (bitn == 3'd0) begin st <= S_IDLE; buttons <= shift; end
          else begin shift[bitn] <= !nes_data; bitn <= bitn + 3'd1; st <= S_HIGH; end
        end else t <= t + 1'b1;
      endcase
    end
  end

  // S_LOW with bitn wrapped to 0 is the last (eighth) pulse's low phase
  assign nes_latch = st == S_LATCH;
  assign nes_pulse = st == S_HIGH;

  always_comb begin
    low = 4'hF;
    if (!sel[0]) low &= ~{buttons[5], buttons[4], buttons[6], buttons[7]}; // Down Up Left Right
    if (!sel[1]) low &= ~{buttons[3], buttons[2], buttons[1], buttons[0]}; // Start Select B A
  end

  always_ff @(posedge clk) begin
    if (rst) begin sel <= 2'b11; low_q <= 4'hF; irq <= 1'b0; end
    else begin
      if (!io_req.we_l && io_req.addr == A_P1) sel <= io_req.wdata[5:4];
      low_q <= low;
      irq   <= |(low_q & ~low);
    end
  end

  assign io_rdata = (!io_req.re_l && io_req.addr == A_P1) ? {2'b11, sel, low} : 8'h00;
endmodule
