// direction_ctrl: the snake's heading register and turn rules.
//
// Implements the direction part of the game's flow chart. While the snake
// moves up or down only a left/right tilt of the joystick is considered and
// turns it left or right; while it moves left or right only an up/down tilt
// is considered and turns it up or down. A tilt along the current axis is
// ignored, so the snake can never reverse onto itself; with no tilt it keeps
// its heading. When both perpendicular flags were somehow set, left and up
// win (this design's choice).
//
// `dir_next` is the heading the snake will take on the coming step (combi-
// national from the current heading and the tilt flags); the register takes
// it on `step`, so at most one turn happens per movement step, as in the flow
// chart's loop. `init` (game start) sets the heading to right, the initial
// heading being this design's choice. After reset the heading is STOP (the
// stationary snake shown before the first start).
module direction_ctrl
  import snake_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic init,
  input  logic step,
  input  logic tilt_left,
  input  logic tilt_right,
  input  logic tilt_up,
  input  logic tilt_down,
  output dir_t dir,
  output dir_t dir_next
);
  always_comb begin
    dir_next = dir;
    unique case (dir)
      DIR_UP, DIR_DOWN: begin
        if (tilt_left)       dir_next = DIR_LEFT;
        else if (tilt_right) dir_next = DIR_RIGHT;
      end
      DIR_LEFT, DIR_RIGHT: begin
        if (tilt_up)         dir_next = DIR_UP;
        else if (tilt_down)  dir_next = DIR_DOWN;
      end
      default: dir_next = dir;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)       dir <= DIR_STOP;
    else if (init) dir <= DIR_RIGHT;
    else if (step) dir <= dir_next;
  end

  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(dir))
    else $error("direction_ctrl: heading not one-hot");
endmodule
