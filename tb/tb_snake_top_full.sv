// tb_snake_top_full: one complete game on snake_top with every parameter at
// its default (50 MHz clock, 25 MHz pixel rate, 66.67 kHz SCLK, 5 Hz
// joystick poll, 10^6 pixel clocks per step).
//
// The start button is pressed 9 M clocks after a joystick poll, so that the
// 5 Hz polls (every 5 steps) land halfway between steps. The snake starts at
// (40,30) heading right; the joystick is tilted up after the 16th step, the
// next poll delivers it between steps 20 and 21, so the snake turns up at
// column 60 on step 21, runs into the apple waiting at its reset cell
// (60,20) on step 30, grows to four blocks, speeds up, scores, and runs into
// the top border on step 50. The testbench checks each of those events at its expected step,
// the step period in clocks, the body flashing 15 frames after the crash,
// the score of 4 on the 7-segment display, and the VGA line length.
module tb_snake_top_full;
  import snake_pkg::*;
  logic clk = 1'b0, rst = 1'b1, btn_start = 1'b0, sw_pause = 1'b0;
  logic jstk_ss_n, jstk_sclk, jstk_mosi, jstk_miso;
  logic vga_hs, vga_vs;
  logic [2:0] vga_red, vga_green;
  logic [1:0] vga_blue;
  logic [7:0] led;
  logic [3:0] an;
  logic [6:0] seg;
  logic dp, score_event;
  logic [5:0] snake_len;
  logic [15:0] score_bcd;
  int score;
  logic [9:0] jx = 10'd512, jy = 10'd512;
  logic [2:0] jbtn = 3'b000;
  logic [7:0] jcmd;
  int jframes, jbad;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;   // 50 MHz

  snake_top dut (.*);

  jstk_model u_js (.ss_n(jstk_ss_n), .sclk(jstk_sclk), .mosi(jstk_mosi), .miso(jstk_miso),
                   .x(jx), .y(jy), .btn(jbtn), .cmd(jcmd), .frames(jframes), .bad_frames(jbad));

  score_model u_score (.clk, .rst, .score_event, .snake_len, .score_bcd, .score);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL: %s", what); end
  endtask

  cell_t head;
  assign head = dut.u_snake.body[0];

  int     n_steps = 0, eat_step = -1, over_step = -1, turn_step = -1;
  longint cyc = 0, last_step = -1, hs_fall = -1;
  logic   hs_d = 1'b1;
  int     n_lines = 0, n_score_shown = 0;

  always @(posedge clk) begin
    cyc++;
    if (dut.step && dut.u_snake.run) begin
      n_steps++;
      if (last_step >= 0 && n_steps < 30)
        check(cyc - last_step == 2_000_000, $sformatf("step period %0d clocks", cyc - last_step));
      last_step = cyc;
      if (dut.dir_next == DIR_UP && turn_step < 0) turn_step = n_steps;
    end
    if (score_event) eat_step = n_steps;
    if (dut.u_snake.game_over && over_step < 0) over_step = n_steps;
    if (hs_d && !vga_hs) begin
      if (hs_fall >= 0) check(cyc - hs_fall == 1600, "line length 1600 clocks");
      hs_fall = cyc; n_lines++;
    end
    hs_d = vga_hs;
    // digit 0 of the display shows "4" once the apple has been scored
    if (an == 4'b1110 && seg == ~7'b1100110) n_score_shown++;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk iff dut.jvalid);
    check(jcmd[7:2] == 6'b100000, "LED command sent to the joystick");
    repeat (9_000_000) @(posedge clk);
    btn_start <= 1'b1;
    repeat (10) @(posedge clk);
    btn_start <= 1'b0;
    wait (n_steps == 16);
    @(posedge clk);
    jy = 10'd900;                // tilt up
    wait (dut.u_snake.game_over);
    repeat (10) @(posedge clk);
    check(turn_step == 21, $sformatf("turned up on step %0d", turn_step));
    check(eat_step == 30, $sformatf("apple eaten on step %0d", eat_step));
    check(snake_len == 6'd4, "snake grew to four blocks");
    check(dut.u_timer.period == 20'(1_000_000 - 20_000), "step period shortened");
    check(over_step == 50, $sformatf("game over on step %0d", over_step));
    check(head.x == 7'd60 && head.y == 6'd1, $sformatf("head stopped at %0d,%0d", head.x, head.y));
    check(score == 4, $sformatf("score %0d", score));
    check(dut.u_apple.apple != '{x: 7'd60, y: 6'd20}, "a new apple was placed");
    // the body flashes after 15 frames (15 x 833,600 clocks)
    check(dut.u_snake.body_visible, "body visible at the crash");
    repeat (15 * 833_600 + 1_000) @(posedge clk);
    check(!dut.u_snake.body_visible, "body hidden after 15 frames");
    check(n_score_shown > 0, "score 4 on the display");
    check(jbad == 0 && jframes > 10, "joystick transactions complete");
    check(n_lines > 1000, "video running");
    $display("steps=%0d turn=%0d eat=%0d over=%0d polls=%0d score=%0d", n_steps, turn_step, eat_step,
             over_step, jframes, score);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
