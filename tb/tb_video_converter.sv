// Testbench for video_converter at its default 640x480 screen. Writes a
// whole frame, swaps, and reads the screen back one clock after each
// position: the picture sits at (240,168)-(399,311), the border is black,
// each 5-bit channel widens to 8 bits. While the next frame is written the
// display keeps showing the finished one until the swap.
//
// The expected values are worked out from the register definitions, not taken
// from the design under test.
module tb_video_converter;
  logic clk = 0, rst = 1;
  logic pix_valid = 0, frame_done = 0;
  logic [7:0] pix_x = 0, pix_y = 0;
  logic [15:0] pix_rgb = 0;
  logic [10:0] disp_x = 0, disp_y = 0;
  logic [23:0] disp_rgb;
  logic front;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  task automatic check(input logic ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  video_converter dut (.clk, .rst, .pix_valid, .pix_x, .pix_y, .pix_rgb, .frame_done,
                       .disp_x, .disp_y, .disp_rgb, .front);

  function automatic logic [15:0] pat(input int seed, input int x, input int y);
    return 16'((x * 37 + y * 101 + seed * 7919) & 16'h7FFF);
  endfunction

  function automatic logic [23:0] widen(input logic [15:0] c);
    return {c[4:0], c[4:2], c[9:5], c[9:7], c[14:10], c[14:12]};
  endfunction

  task automatic write_frame(input int seed);
    for (int y = 0; y < 144; y++)
      for (int x = 0; x < 160; x++) begin
        pix_valid = 1; pix_x = 8'(x); pix_y = 8'(y); pix_rgb = pat(seed, x, y);
        @(posedge clk); #1;
      end
    pix_valid = 0;
  endtask

  task automatic swap();
    frame_done = 1; @(posedge clk); #1 frame_done = 0;
  endtask

  // reads 2000 random screen positions, half of them inside the picture
  task automatic check_screen(input int seed, input string what);
    int bad, x, y;
    logic [23:0] e;
    bad = 0;
    for (int i = 0; i < 2000; i++) begin
      if (i % 2 == 0) begin x = 240 + $urandom_range(0, 159); y = 168 + $urandom_range(0, 143); end
      else begin x = $urandom_range(0, 639); y = $urandom_range(0, 479); end
      disp_x = 11'(x); disp_y = 11'(y);
      @(posedge clk); #1;
      if (x >= 240 && x < 400 && y >= 168 && y < 312) e = widen(pat(seed, x - 240, y - 168));
      else e = 24'h0;
      if (disp_rgb != e) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d of 2000 positions wrong", what, bad));
  endtask

  initial begin #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic f0;
    repeat (2) @(posedge clk); #1 rst = 0;
    f0 = front;
    write_frame(1);
    swap();
    check(front != f0, "frame_done swaps the buffers");
    check_screen(1, "frame 1");
    // corners of the picture and just outside it
    disp_x = 240; disp_y = 168; @(posedge clk); #1;
    check(disp_rgb == widen(pat(1, 0, 0)), "top-left pixel");
    disp_x = 399; disp_y = 311; @(posedge clk); #1;
    check(disp_rgb == widen(pat(1, 159, 143)), "bottom-right pixel");
    disp_x = 400; @(posedge clk); #1;
    check(disp_rgb == 0, "right of the picture is black");
    disp_x = 239; @(posedge clk); #1;
    check(disp_rgb == 0, "left of the picture is black");
    // writing the next frame does not disturb the one on screen
    write_frame(2);
    check_screen(1, "frame 1 still shown while frame 2 is written");
    swap();
    check_screen(2, "frame 2 after the swap");
    // pure red, green, blue widen to full 8-bit channels
    pix_valid = 1; pix_x = 0; pix_y = 0; pix_rgb = 16'h001F; @(posedge clk); #1;
    pix_x = 1; pix_rgb = 16'h03E0; @(posedge clk); #1;
    pix_x = 2; pix_rgb = 16'h7C00; @(posedge clk); #1 pix_valid = 0;
    swap();
    disp_x = 240; disp_y = 168; @(posedge clk); #1; check(disp_rgb == 24'hFF0000, "red");
    disp_x = 241; @(posedge clk); #1; check(disp_rgb == 24'h00FF00, "green");
    disp_x = 242; @(posedge clk); #1; check(disp_rgb == 24'h0000FF, "blue");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
