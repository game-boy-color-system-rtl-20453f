// Timer: DIV, TIMA, TMA and TAC (FF04-FF07) and the timer interrupt.
//
// A 16-bit divider counts CPU cycles (ce pulses); DIV is its upper byte, so
// it advances at 1/256 of the CPU clock, and any write to DIV clears the
// whole divider. When TAC bit 2 is set, TIMA counts on each falling edge of
// the divider bit chosen by TAC[1:0] (00: CPU/1024, 01: CPU/16, 10: CPU/64,
// 11: CPU/256). When TIMA overflows it is reloaded from TMA and irq pulses
// for one clock. Registers read in the request cycle; unused TAC bits read 1.
//
// The four registers and the reload from TMA follow the original design; the
// divider bits for each TAC rate follow the real console.
module timer
  import gb_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  mem_req_t   io_req,
  output logic [7:0] io_rdata,
  output logic       irq
);
  logic [15:0] div;
  logic [7:0]  tima, tma;
  logic [2:0]  tac;
  logic        sel_bit, sel_q;

  always_comb begin
    case (tac[1:0])
      2'd0: sel_bit = div[9];
      2'd1: sel_bit = div[3];
      2'd2: sel_bit = div[5];
      default: sel_bit = div[7];
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      div <= '0; tima <= '0; tma <= '0; tac <= '0; sel_q <= 1'b0; irq <= 1'b0;
    end else begin
      irq <= 1'b0;
      if (ce) div <= div + 16'd1;
      sel_q <= sel_bit && tac[2];
      if (sel_q && !(sel_bit && tac[2])) begin
        if (tima == 8'hFF) begin tima <= tma; irq <= 1'b1; end
        else tima <= tima + 8'd1;
      end
      if (!io_req.we_l) begin
        case (io_req.addr)
          A_DIV:  div  <= '0;
          A_TIMA: tima <= io_req.wdata;
          A_TMA:  tma  <= io_req.wdata;
          A_TAC:  tac  <= io_req.wdata[2:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    io_rdata = 8'h00;
    if (!io_req.re_l) begin
      case (io_req.addr)
        A_DIV:  io_rdata = div[15:8];
        A_TIMA: io_rdata = tima;
        A_TMA:  io_rdata = tma;
        A_TAC:  io_rdata = {5'b11111, tac};
        default: io_rdata = 8'h00;
      endcase
    end
  end
endmodule
