// Behavioural model of the board flash that holds the game ROMs.
// Its contents are a fixed pattern that a checker can recompute:
// byte(a) = a[7:0] ^ a[15:8] ^ a[23:16] ^ 8'h5A. Reads are combinational.
//
// This is a test model only: the board flash is a bought part, not part of
// the design.
module flash_rom_model #(
  parameter int AW = 24
) (
  input  logic [AW-1:0] addr,
  output logic [7:0]    data
);
  function automatic logic [7:0] pattern(input logic [23:0] a);
    return a[7:0] ^ a[15:8] ^ a[23:16] ^ 8'h5A;
  endfunction
  assign data = pattern(24'(addr));
endmodule
