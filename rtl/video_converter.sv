// Video converter: double frame buffer between the PPU and the display.
//
// The PPU's 16-bit RGB555 pixels (pix_x, pix_y, pix_valid) are written into
// the back buffer, one of two 160x144 x 16-bit block RAMs. At the end of
// each PPU frame (frame_done) the buffers swap, so the display side always
// reads a whole, finished frame. The display side gives the raster position
// (disp_x, disp_y) of a DISP_W x DISP_H screen; the Game Boy picture is
// placed unscaled in the centre and the rest is black. Each 5-bit channel
// becomes 8 bits by repeating its top bits (c << 3 | c >> 2), giving the
// 24-bit {R, G, B} value for the DVI transmitter one clock after the
// position (registered BRAM read).
//
// Two frame buffers swapped per frame, 16-bit pixels, 24-bit output and a
// centred picture follow the original design; the screen size and the bit
// widening are this design's choice.
module video_converter #(
  parameter int DISP_W = 640,
  parameter int DISP_H = 480
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        pix_valid,
  input  logic [7:0]  pix_x,
  input  logic [7:0]  pix_y,
  input  logic [15:0] pix_rgb,
  input  logic        frame_done,
  input  logic [10:0] disp_x,
  input  logic [10:0] disp_y,
  output logic [23:0] disp_rgb,
  output logic        front      // buffer being displayed
);
  localparam int W = 160, H = 144, N = W * H;
  localparam int X0 = (DISP_W - W) / 2, Y0 = (DISP_H - H) / 2;

  logic [15:0] fb0 [N];
  logic [15:0] fb1 [N];
  logic [14:0] waddr, raddr;
  logic        in_win, in_win_q, front_q;
  logic [15:0] q0, q1, c;
  logic [10:0] rx, ry;

  assign waddr  = 15'(pix_y) * 15'(W) + 15'(pix_x);
  assign rx     = disp_x - 11'(X0);
  assign ry     = disp_y - 11'(Y0);
  assign in_win = disp_x >= 11'(X0) && disp_x < 11'(X0 + W) && disp_y >= 11'(Y0) && disp_y < 11'(Y0 + H);
  assign raddr  = in_win ? 15'(ry) * 15'(W) + 15'(rx) : '0;

  always_ff @(posedge clk) begin
    if (rst) front <= 1'b0;
    else if (frame_done) front <= !front;
  end

  always_ff @(posedge clk) begin
    if (pix_valid && front)  fb0[waddr] <= pix_rgb;   // back buffer is fb0
    if (pix_valid && !front) fb1[waddr] <= pix_rgb;
    q0 <= fb0[raddr];
    q1 <= fb1[raddr];
    in_win_q <= in_win;
    front_q  <= front;
  end

  assign c = front_q ? q1 : q0;
  assign disp_rgb = !in_win_q ? 24'h000000 :
                    {c[4:0], c[4:2], c[9:5], c[9:7], c[14:10], c[14:12]};
endmodule
