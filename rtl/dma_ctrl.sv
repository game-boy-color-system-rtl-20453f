// DMA controller: OAM DMA, general DMA (GDMA) and H-blank DMA (HDMA).
//
// All three engines share one DMA reader port and one DMA writer port on the
// memory router. A byte moves in a single cycle: the reader requests the
// source and the same-cycle read data goes out on the writer port to the
// destination. One byte moves per ce (CPU clock enable) pulse.
//
// OAM DMA: a write to DMA (FF46) starts a copy of 160 bytes from
// {DMA,8'h00} to FE00; the engine is in TRANSFER while count < 159 and
// returns to WAIT after byte 159, so a transfer takes exactly 160 ce cycles.
// The CPU is not halted.
//
// GDMA/HDMA: HDMA1/2 give the source (low 4 bits ignored), HDMA3/4 the
// destination in 8000-9FF0 (top 3 and low 4 bits ignored), HDMA5[6:0] the
// length as (n+1)*16 bytes. A write to HDMA5 with bit 7 clear starts a GDMA,
// which halts the CPU until all bytes are moved. Bit 7 set starts an HDMA:
// WAIT_HBLANK until an H-blank begins, TRANSFER16 moves 16 bytes with the
// CPU halted, ACTIVE_HDMA waits (CPU running) for the next H-blank start,
// until the length is done. Writing HDMA5 with bit 7 clear during an HDMA
// cancels it. Reading HDMA5 gives bit 7 = 0 while an HDMA is pending and the
// remaining 16-byte blocks minus one in bits 6-0, 8'hFF when idle.
// HDMA1-4 read as FF. The H-blank is taken on its rising edge; an HDMA
// block waits while an OAM DMA is running, and new requests are ignored while
// the same engine is busy.
//
// The three engines in one module, their shared reader and writer ports, the
// states (WAIT, TRANSFER; WAIT, WAIT_HBLANK, TRANSFER16, ACTIVE_HDMA) and the
// 160-cycle OAM transfer follow the original design. One byte per CPU cycle
// for GDMA/HDMA, OAM priority and the HDMA5 read value are this design's
// choice.
module dma_ctrl
  import gb_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  mem_req_t   io_req,
  output logic [7:0] io_rdata,
  input  logic       hblank,       // PPU is in mode 0
  output mem_req_t   dmar_req,
  input  logic [7:0] dmar_rdata,
  output mem_req_t   dmaw_req,
  output logic       halt_cpu,
  output logic       oam_active,
  output logic       hdma_active   // GDMA or HDMA engine not idle
);
  typedef enum logic {O_WAIT, O_TRANSFER} oam_st_t;
  typedef enum logic [2:0] {H_WAIT, H_GDMA, H_WAIT_HBLANK, H_TRANSFER16, H_ACTIVE_HDMA} hd_st_t;

  oam_st_t    ost;
  hd_st_t     hst;
  logic [7:0] oam_cnt, dma_src;
  logic [7:0] hdma1, hdma2, hdma3, hdma4;
  logic [6:0] hlen;          // blocks minus one
  logic [10:0] hcnt;         // bytes moved
  logic       hb_q, hb_rise;
  logic       wr_dma, wr_h5;
  logic [15:0] hsrc, hdst;
  logic [11:0] tlen;         // transfer length in bytes
  logic       o_move, h_move;

  assign wr_dma  = !io_req.we_l && io_req.addr == A_DMA;
  assign wr_h5   = !io_req.we_l && io_req.addr == A_HDMA5;
  assign hb_rise = hblank && !hb_q;
  assign tlen    = ({5'd0, hlen} + 12'd1) << 4;
  assign hsrc    = {hdma1, hdma2[7:4], 4'h0} + {5'd0, hcnt};
  assign hdst    = {3'b100, hdma3[4:0], hdma4[7:4], 4'h0} + {5'd0, hcnt};

  assign o_move  = ce && ost == O_TRANSFER;
  assign h_move  = ce && !o_move && (hst == H_GDMA || hst == H_TRANSFER16);

  always_ff @(posedge clk) begin
    if (rst) begin
      ost <= O_WAIT; hst <= H_WAIT; oam_cnt <= '0; dma_src <= '0;
      hdma1 <= '0; hdma2 <= '0; hdma3 <= '0; hdma4 <= '0; hlen <= '0; hcnt <= '0;
      hb_q <= 1'b0;
    end else begin
      hb_q <= hblank;
      if (!io_req.we_l) begin
        case (io_req.addr)
          A_HDMA1: hdma1 <= io_req.wdata;
          A_HDMA2: hdma2 <= io_req.wdata;
          A_HDMA3: hdma3 <= io_req.wdata;
          A_HDMA4: hdma4 <= io_req.wdata;
          default: ;
        endcase
      end
      // OAM DMA
      case (ost)
        O_WAIT: if (wr_dma) begin dma_src <= io_req.wdata; oam_cnt <= '0; ost <= O_TRANSFER; end
        O_TRANSFER: if (o_move) begin
          if (oam_cnt >= 8'd159) ost <= O_WAIT;
          else oam_cnt <= oam_cnt + 8'd1;
        end
      endcase
      // General / H-blank DMA
      case (hst)
        H_WAIT: if (wr_h5) begin
          hlen <= io_req.wdata[6:0]; hcnt <= '0;
          hst  <= io_req.wdata[7] ? H_WAIT_HBLANK : H_GDMA;
        end
        H_GDMA: if (h_move) begin
          if ({1'b0, hcnt} >= tlen - 12'd1) hst <= H_WAIT;
          hcnt <= hcnt + 11'd1;
        end
        H_WAIT_HBLANK, H_ACTIVE_HDMA: begin
          if (wr_h5 && !io_req.wdata[7]) hst <= H_WAIT;
          else if (hb_rise)             hst <= H_TRANSFER16;
        end
        H_TRANSFER16: if (h_move) begin
          hcnt <= hcnt + 11'd1;
          if ({1'b0, hcnt} >= tlen - 12'd1) hst <= H_WAIT;
          else if (hcnt[3:0] == 4'hF)      hst <= H_ACTIVE_HDMA;
        end
        default: hst <= H_WAIT;
      endcase
    end
  end

  always_comb begin
    dmar_req = MEM_IDLE;
    dmaw_req = MEM_IDLE;
    if (o_move) begin
      dmar_req.addr = {dma_src, oam_cnt};
      dmar_req.re_l = 1'b0;
      dmaw_req.addr = 16'hFE00 + {8'd0, oam_cnt};
      dmaw_req.we_l = 1'b0;
    end else if (h_move) begin
      dmar_req.addr = hsrc;
      dmar_req.re_l = 1'b0;
      dmaw_req.addr = hdst;
      dmaw_req.we_l = 1'b0;
    end
    dmaw_req.wdata = dmar_rdata;
  end

  assign halt_cpu    = hst == H_GDMA || hst == H_TRANSFER16;
  assign oam_active  = ost == O_TRANSFER;
  assign hdma_active = hst != H_WAIT;

  always_comb begin
    io_rdata = 8'h00;
    if (!io_req.re_l) begin
      case (io_req.addr)
        A_DMA:   io_rdata = dma_src;
        A_HDMA1, A_HDMA2, A_HDMA3, A_HDMA4: io_rdata = 8'hFF;
        A_HDMA5: io_rdata = (hst == H_WAIT) ? 8'hFF : {1'b0, hlen - hcnt[10:4]};
        default: io_rdata = 8'h00;
      endcase
    end
  end
endmodule
