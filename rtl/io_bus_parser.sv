// One memory-mapped I/O register on the shared I/O register bus.
//
// All I/O registers share the FF00-FF7F/FFFF bus. Each parser watches it:
// when the bus reads its address it drives the register value (unwritable
// bits read as 1), when the bus writes its address it stores the writable
// bits and pulses cpu_wr for that cycle so the owner can react. The owner
// sees the value on rd_data and can load a new value with wr_en/wr_data
// (active-high, one cycle). If the bus and the owner write in the same cycle
// the bus write wins. Read data is combinational (same cycle as the request);
// writes take effect at the next clock edge. Reset loads RESET_VAL.
//
// The bus-side and owner-side interfaces (read data, CPU write strobe, write
// data, write enable) follow the original design; the write mask, the
// read-as-one bits and the bus-write-wins rule are this design's additions.
module io_bus_parser
  import gb_pkg::*;
#(
  parameter logic [15:0] ADDR      = 16'hFF72,
  parameter logic [7:0]  RESET_VAL = 8'h00,
  parameter logic [7:0]  WMASK     = 8'hFF,   // bits the bus may write
  parameter logic [7:0]  ONES      = 8'h00    // bits that always read as 1
) (
  input  logic       clk,
  input  logic       rst,
  input  mem_req_t   io_req,
  output logic [7:0] io_rdata,   // read data onto the bus, 0 when not selected
  output logic       io_hit,     // this register is being read
  output logic [7:0] rd_data,    // register value for the owner
  output logic       cpu_wr,     // bus is writing this register this cycle
  input  logic [7:0] wr_data,
  input  logic       wr_en
);
  logic [7:0] q;
  logic sel;

  assign sel      = (io_req.addr == ADDR);
  assign io_hit   = sel && !io_req.re_l;
  assign io_rdata = io_hit ? (q | ONES) : 8'h00;
  assign cpu_wr   = sel && !io_req.we_l;
  assign rd_data  = q;

  always_ff @(posedge clk) begin
    if (rst)         q <= RESET_VAL;
    else if (cpu_wr) q <= (q & ~WMASK) | (io_req.wdata & WMASK);
    else if (wr_en)  q <= wr_data;
  end
endmodule
