// Volume envelope shared by sound channels 1, 2 and 4.
//
// On trigger the volume loads init_vol and the step counter loads step.
// With step = n != 0, every n-th tick_env (64 Hz) the volume moves one unit
// up (dir_up) or down, stopping at 15 or 0. step = 0 holds the volume.
//
// The envelope is shared by channels 1, 2 and 4 here; its rules follow the
// real console.
module sound_envelope (
  input  logic       clk,
  input  logic       rst,
  input  logic       trigger,
  input  logic       tick_env,
  input  logic [3:0] init_vol,
  input  logic       dir_up,
  input  logic [2:0] step,
  output logic [3:0] vol
);
  logic [2:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      vol <= '0; cnt <= '0;
    end else if (trigger) begin
      vol <= init_vol; cnt <= step;
    end else if (tick_env && step != 3'd0) begin
      if (cnt <= 3'd1) begin
        cnt <= step;
        if (dir_up && vol != 4'hF)       vol <= vol + 4'd1;
        else if (!dir_up && vol != 4'h0) vol <= vol - 4'd1;
      end else cnt <= cnt - 3'd1;
    end
  end
endmodule
