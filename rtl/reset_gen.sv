// Reset module: turns a push button into a clean synchronous reset.
//
// The button (active high, any length) is synchronised by two flip-flops.
// While it is pressed, and for COUNT cycles after release, rst is held high;
// the counter counts down to zero and then releases rst. Power-up also
// starts the countdown (the counter starts at COUNT).
//
// The push button held into a countdown follows the original design; the
// count length and the synchronizer are this design's choice.
module reset_gen #(
  parameter int COUNT = 65535
) (
  input  logic clk,
  input  logic button,
  output logic rst
);
  logic [1:0] sync = 2'b00;
  logic [$clog2(COUNT+1)-1:0] cnt = ($clog2(COUNT+1))'(COUNT);

  always_ff @(posedge clk) begin
    sync <= {sync[0], button};
    if (sync[1])          cnt <= ($clog2(COUNT+1))'(COUNT);
    else if (cnt != '0)   cnt <= cnt - 1'b1;
  end

  assign rst = cnt != '0;
endmodule
