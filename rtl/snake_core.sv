// snake_core: snake body, movement, growth, collisions and game state.
//
// The body is an array of MAX_LEN (50) grid cells, element 0 being the head;
// only the first `len` elements are part of the snake. A game starts with a
// three-block snake in the middle of the field heading right. On every
// movement `step` (from move_timer, which only runs while the game runs and
// is not paused) the core works out the next head cell from the heading
// chosen for this step (`dir_next`) and then:
//   * lethal collision - the next head is on the border ring or on a body
//     segment that will still be there (the tail is excluded unless the snake
//     grows this step): the game goes to GS_OVER, the snake freezes and its
//     body flashes, toggling every FLASH_FRAMES video frames;
//   * good collision   - the next head is on the apple: the body shifts one
//     place towards the tail with the new head in front, the length grows by
//     one (up to MAX_LEN) and `eat` pulses for one cycle, which asks
//     apple_gen for a new apple, speeds up move_timer and is the score event;
//   * otherwise the body simply shifts one place.
// `start` (the restart button) in any state puts the snake back to its
// initial state and runs the game; the apple is left where it is. `pause`
// (a slide switch) stops the update cycle while high.
//
// The 50-segment array, start length 3, shift-from-head-to-tail movement,
// body and border checks, pause, freeze-and-flash on game over and restart
// keeping the apple all follow the project report. The READY state after reset
// (waiting for the start button, as in the game's flow chart), the start
// position and heading, and the flash rate are this design's choices.
//
// Timing: all updates happen on the clock edge of the `step` cycle; `eat`
// and `game_over` are valid from the following cycle. `init` pulses for one
// cycle after `start` to restart direction_ctrl and move_timer.
module snake_core
  import snake_pkg::*;
#(
  parameter int unsigned FLASH_FRAMES = 15
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic                pause,
  input  logic                step,
  input  dir_t                dir_next,
  input  cell_t               apple,
  input  logic                frame_tick,
  output cell_t [MAX_LEN-1:0] body,
  output logic [LEN_W-1:0]    len,
  output game_state_t         state,
  output logic                run,
  output logic                init,
  output logic                eat,
  output logic                game_over,
  output logic                body_visible
);
  localparam int unsigned FW = (FLASH_FRAMES > 1) ? $clog2(FLASH_FRAMES) : 1;

  cell_t nh;
  logic  grow, hit_border, hit_self;
  logic [FW-1:0] flash_cnt;

  assign nh         = step_cell(body[0], dir_next);
  assign grow       = (nh == apple);
  assign hit_border = is_border(nh);

  always_comb begin
    hit_self = 1'b0;
    for (int i = 0; i < MAX_LEN; i++) begin
      if ((LEN_W'(i) < (grow ? len : len - 1'b1)) && (body[i] == nh)) hit_self = 1'b1;
    end
  end

  function automatic cell_t start_cell(int i);
    cell_t c;
    c   = START_HEAD;
    c.x = START_HEAD.x - X_W'((i < int'(INIT_LEN)) ? i : INIT_LEN - 1);
    return c;
  endfunction

  assign run       = (state == GS_RUN) && !pause;
  assign game_over = (state == GS_OVER);

  always_ff @(posedge clk) begin
    if (rst || start) begin
      for (int i = 0; i < MAX_LEN; i++) body[i] <= start_cell(i);
      len   <= LEN_W'(INIT_LEN);
      state <= rst ? GS_READY : GS_RUN;
      init  <= !rst;
      eat   <= 1'b0;
    end else begin
      init <= 1'b0;
      eat  <= 1'b0;
      if (state == GS_RUN && !pause && step) begin
        if (hit_border || hit_self) begin
          state <= GS_OVER;
        end else begin
          for (int i = MAX_LEN - 1; i > 0; i--) body[i] <= body[i-1];
          body[0] <= nh;
          if (grow) begin
            eat <= 1'b1;
            if (len < LEN_W'(MAX_LEN)) len <= len + 1'b1;
          end
        end
      end
    end
  end

  // Game-over flashing of the body.
  always_ff @(posedge clk) begin
    if (rst || state != GS_OVER) begin
      flash_cnt    <= '0;
      body_visible <= 1'b1;
    end else if (frame_tick) begin
      if (flash_cnt == FW'(FLASH_FRAMES - 1)) begin
        flash_cnt    <= '0;
        body_visible <= !body_visible;
      end else begin
        flash_cnt <= flash_cnt + 1'b1;
      end
    end
  end

  a_len_range: assert property (@(posedge clk) disable iff (rst)
                                len >= LEN_W'(INIT_LEN) && len <= LEN_W'(MAX_LEN))
    else $error("snake_core: length out of range");
endmodule
