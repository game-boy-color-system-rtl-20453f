// Block RAM behind a system-bus port.
//
// The system bus expects read data in the same cycle as the request, while a
// block RAM returns it one clock later. This block holds the RAM array and
// converts between the two: the write enable comes from the active-low write
// strobe, the write data is taken from the request, and read data is driven
// back only while the read strobe is low (the tri-state arbitration of the
// logical bus), 8'hFF otherwise. The array is read asynchronously, which
// plays the role of clocking the BRAM at twice the bus rate. The address is
// the already translated RAM address (AW bits). Writes land on the rising
// clock edge of a cycle with we_l low. Contents are not reset.
//
// The original design double-clocks a block RAM to return data in the same
// cycle; this one uses an asynchronously read array instead, which gives the
// same bus timing with a single clock.
module bram_bus_if #(
  parameter int AW    = 12,
  parameter int DEPTH = 1 << AW
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    wdata,
  input  logic          re_l,
  input  logic          we_l,
  output logic [7:0]    rdata
);
  logic [7:0] mem [DEPTH];
  logic       we;

  assign we    = !we_l && (int'(addr) < DEPTH);
  assign rdata = (!re_l && int'(addr) < DEPTH) ? mem[addr] : 8'hFF;

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;
endmodule
