// snake_top: Snake game for a Spartan-3E board with a PmodJSTK joystick and
// a VGA monitor.
//
// Everything runs from the 50 MHz board clock with clock enables:
//   * tick_gen /2 makes the 25 MHz pixel enable; vga_sync counts the 640x480
//     timing from it and vga_render paints the 80x60-block playfield
//     (border, snake, apple, background) as 8-bit RGB;
//   * tick_gen /375 makes the half-period tick of the 66.67 kHz joystick
//     SCLK; jstk_master polls the joystick over SPI five times a second and
//     jstk_decode turns the two 10-bit axis readings into tilt flags;
//   * direction_ctrl applies the turn rules to the tilt flags, move_timer
//     paces the steps (faster after each apple), snake_core moves the body,
//     detects apple, border and self collisions and keeps the game state, and
//     apple_gen places the next apple from a free-running LFSR;
//   * sevenseg_driver shows the score on the 4-digit display.
// The score itself is computed by a small soft processor outside this RTL:
// it receives `score_event` (one clock pulse per apple eaten) and `snake_len`
// and returns `score_bcd`, which is displayed as four decimal digits.
//
// Buttons, switch and MISO are synchronized with two flip-flops. `rst` is an
// active-high synchronous reset (a board button). `btn_start` starts and
// restarts the game on its rising edge; `sw_pause` high freezes the game.
// `led[5:0]` show the joystick decode (X<400, X>600, Y<400, Y>600, BTN1,
// BTN2), led[6] the stick's push button, led[7] game over. The joystick
// module's own two LEDs follow its BTN1/BTN2 buttons.
//
// The block structure, clock rates, screen geometry, thresholds, snake size
// limits and game rules are the project report's; the clock-enable scheme, the
// synchronizers and the LED/port assignments are this design's choices.
module snake_top
  import snake_pkg::*;
#(
  parameter int unsigned PIX_DIV        = 2,           // 50 MHz -> 25 MHz
  parameter int unsigned SCLK_HALF_DIV  = 375,         // 66.67 kHz SCLK
  parameter int unsigned POLL_CYCLES    = 10_000_000,  // 5 Hz joystick poll
  parameter int unsigned MOVE_PERIOD    = 1_000_000,   // pixel clocks per step
  parameter int unsigned SPEEDUP        = 20_000,
  parameter int unsigned MIN_PERIOD     = 250_000,
  parameter int unsigned FLASH_FRAMES   = 15,
  parameter int unsigned REFRESH_CYCLES = 50_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        btn_start,
  input  logic        sw_pause,
  // PmodJSTK
  output logic        jstk_ss_n,
  output logic        jstk_sclk,
  output logic        jstk_mosi,
  input  logic        jstk_miso,
  // VGA
  output logic        vga_hs,
  output logic        vga_vs,
  output logic [2:0]  vga_red,
  output logic [2:0]  vga_green,
  output logic [1:0]  vga_blue,
  // board LEDs and 7-segment display
  output logic [7:0]  led,
  output logic [3:0]  an,
  output logic [6:0]  seg,
  output logic        dp,
  // score processor link
  output logic        score_event,
  output logic [LEN_W-1:0] snake_len,
  input  logic [15:0] score_bcd
);
  localparam int unsigned PERW = $clog2(MOVE_PERIOD + 1);

  logic pix_ce, sclk_half;
  logic start_s, start_d, pause_s, miso_s, start_pulse;

  // Inputs
  sync_2ff u_sync_start (.clk, .rst, .d(btn_start), .q(start_s));
  sync_2ff u_sync_pause (.clk, .rst, .d(sw_pause),  .q(pause_s));
  sync_2ff u_sync_miso  (.clk, .rst, .d(jstk_miso), .q(miso_s));

  always_ff @(posedge clk) begin
    if (rst) start_d <= 1'b0;
    else     start_d <= start_s;
  end
  assign start_pulse = start_s && !start_d;

  // Clock enables
  tick_gen #(.DIV(PIX_DIV))       u_pix_ce (.clk, .rst, .en(1'b1), .tick(pix_ce));
  tick_gen #(.DIV(SCLK_HALF_DIV)) u_sclk   (.clk, .rst, .en(1'b1), .tick(sclk_half));

  // Joystick
  logic [9:0] jx, jy;
  logic [2:0] jbtn;
  logic       jvalid;
  logic       t_left, t_right, t_up, t_down;
  logic [5:0] dec_led;

  jstk_master #(.POLL_CYCLES(POLL_CYCLES)) u_jstk (
    .clk, .rst,
    .half_tick (sclk_half),
    .led       (jbtn[2:1]),
    .ss_n      (jstk_ss_n),
    .sclk      (jstk_sclk),
    .mosi      (jstk_mosi),
    .miso      (miso_s),
    .x         (jx),
    .y         (jy),
    .btn       (jbtn),
    .valid     (jvalid)
  );

  jstk_decode u_dec (
    .x (jx), .y (jy), .btn (jbtn),
    .tilt_left (t_left), .tilt_right (t_right),
    .tilt_down (t_down), .tilt_up (t_up),
    .led (dec_led)
  );

  // Game
  dir_t                dir, dir_next;
  cell_t               apple, rand_cell;
  cell_t [MAX_LEN-1:0] body;
  logic [LEN_W-1:0]    len;
  game_state_t         state;
  logic                run, init, eat, game_over, body_visible, step;
  logic [PERW-1:0]     period;
  logic                frame_start, line_end, video_on;
  logic [9:0]          px, py, hcnt, vcnt;

  direction_ctrl u_dir (
    .clk, .rst, .init, .step,
    .tilt_left (t_left), .tilt_right (t_right),
    .tilt_up (t_up), .tilt_down (t_down),
    .dir, .dir_next
  );

  move_timer #(
    .START_PERIOD (MOVE_PERIOD),
    .SPEEDUP      (SPEEDUP),
    .MIN_PERIOD   (MIN_PERIOD)
  ) u_timer (
    .clk, .rst, .pix_ce, .run, .init, .eat, .step, .period
  );

  snake_core #(.FLASH_FRAMES(FLASH_FRAMES)) u_snake (
    .clk, .rst,
    .start      (start_pulse),
    .pause      (pause_s),
    .step, .dir_next, .apple,
    .frame_tick (frame_start),
    .body, .len, .state, .run, .init, .eat, .game_over, .body_visible
  );

  apple_gen u_apple (.clk, .rst, .pix_ce, .eat, .apple, .rand_cell);

  // Video
  logic [7:0] rgb;

  vga_sync u_sync (
    .clk, .rst, .pix_ce,
    .hs (vga_hs), .vs (vga_vs),
    .video_on, .px, .py, .hcnt, .vcnt, .line_end, .frame_start
  );

  vga_render u_render (
    .clk, .rst, .pix_ce, .video_on, .px, .py,
    .body, .len, .body_visible, .apple, .rgb
  );

  assign {vga_red, vga_green, vga_blue} = rgb;

  // Score display and status
  sevenseg_driver #(.REFRESH_CYCLES(REFRESH_CYCLES)) u_7seg (
    .clk, .rst, .value (score_bcd), .an, .seg, .dp
  );

  assign score_event = eat;
  assign snake_len   = len;
  assign led         = {game_over, jbtn[0], dec_led};
endmodule
