// tb_snake_top: plays whole games on the full design, with the joystick and
// the score processor replaced by behavioural models and the slow rates
// shortened (SCLK half period 4 clocks, joystick poll every 2000 clocks,
// 3000 pixel clocks per step). The VGA timing keeps its real 640x480 values.
//
// The testbench steers the snake towards the apple through the joystick
// model, and checks along the way: nothing moves before the start button;
// every step moves the head by one block in the current heading; every apple
// grows the snake, makes the next apple appear, shortens the step period and
// adds the length to the score; the score reaches the 7-segment display;
// pause freezes the snake; a border crash and a body crash both end the
// game; the body flashes while the game is over; restart brings back the
// three-block snake. The VGA output is checked for 1600-clock lines (800
// pixel clocks at 25 MHz), a 96-pixel HS pulse and snake and apple colours
// on screen. Every mechanism must be seen at least once.
module tb_snake_top;
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

  // mechanism counters
  int n_poll = 0, n_turn = 0, n_eat = 0, n_speedup = 0, n_pause = 0, n_border = 0,
      n_self = 0, n_flash = 0, n_restart = 0, n_score_shown = 0, n_lines = 0, n_frames = 0,
      n_steps = 0;

  always #5 clk = ~clk;

  snake_top #(
    .SCLK_HALF_DIV (4),
    .POLL_CYCLES   (2000),
    .MOVE_PERIOD   (3000),
    .SPEEDUP       (250),
    .MIN_PERIOD    (2000),
    .FLASH_FRAMES  (1),
    .REFRESH_CYCLES(8)
  ) dut (.*);

  jstk_model u_js (.ss_n(jstk_ss_n), .sclk(jstk_sclk), .mosi(jstk_mosi), .miso(jstk_miso),
                   .x(jx), .y(jy), .btn(jbtn), .cmd(jcmd), .frames(jframes), .bad_frames(jbad));

  score_model u_score (.clk, .rst, .score_event, .snake_len, .score_bcd, .score);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- views
  cell_t head, apple_c;
  dir_t  heading;
  assign head    = dut.u_snake.body[0];
  assign apple_c = dut.u_apple.apple;
  assign heading = dut.u_dir.dir;

  // ------------------------------------------------- step-by-step checking
  cell_t prev_head;
  dir_t  prev_heading;
  int    prev_len, prev_period;
  always @(posedge clk) if (!rst) begin
    if (dut.step && dut.u_snake.state == GS_RUN && !dut.u_snake.pause) begin
      prev_head    <= head;
      prev_len     <= int'(snake_len);
      prev_period  <= int'(dut.u_timer.period);
    end
  end

  // after each applied step, check the head moved one block in dir
  logic step_d;
  always @(posedge clk) begin
    step_d <= dut.step && dut.u_snake.run;
    if (!rst && step_d && dut.u_snake.state == GS_RUN) begin
      n_steps++;
      check(head == step_cell(prev_head, heading),
            $sformatf("head %0d,%0d after step from %0d,%0d", head.x, head.y, prev_head.x, prev_head.y));
      if (heading != prev_heading) n_turn++;
      prev_heading <= heading;
    end
  end

  // apple eaten: growth, new apple, speed-up, score
  always @(posedge clk) if (!rst && score_event) begin
    n_eat++;
    #1;
    check(int'(snake_len) == prev_len + 1, $sformatf("length %0d after eating at %0d", snake_len, prev_len));
    @(posedge clk); #1;
    check(int'(dut.u_timer.period) == ((prev_period - 250 < 2000) ? 2000 : prev_period - 250),
          $sformatf("period %0d after eating", dut.u_timer.period));
    if (int'(dut.u_timer.period) < prev_period) n_speedup++;
  end

  // joystick polls
  always @(posedge clk) if (dut.jvalid) n_poll++;

  // VGA line and frame timing, colours on screen
  longint cyc = 0, hs_fall = -1;
  logic hs_d = 1'b1, vs_d = 1'b1, vis_d = 1'b1;
  int n_head_px = 0, n_apple_px = 0;
  always @(posedge clk) begin
    cyc++;
    if (hs_d && !vga_hs) begin
      if (hs_fall >= 0) check(cyc - hs_fall == 1600, $sformatf("line length %0d", cyc - hs_fall));
      hs_fall = cyc; n_lines++;
    end
    if (!hs_d && vga_hs) check(cyc - hs_fall == 192, $sformatf("HS pulse %0d", cyc - hs_fall));
    if (vs_d && !vga_vs) n_frames++;
    if ({vga_red, vga_green, vga_blue} == 8'b111_010_11) n_head_px++;
    if ({vga_red, vga_green, vga_blue} == 8'b111_000_00) n_apple_px++;
    if (dut.u_snake.body_visible != vis_d) n_flash++;
    hs_d = vga_hs; vs_d = vga_vs; vis_d = dut.u_snake.body_visible;
  end

  // 7-segment display: compare every displayed digit with the score
  always @(posedge clk) if (!rst && $countones(~an) == 1) begin
    int d;
    logic [3:0] nib;
    logic [6:0] expect_seg;
    d = 0;
    for (int k = 0; k < 4; k++) if (!an[k]) d = k;
    nib = score_bcd[4*d +: 4];
    case (nib)
      4'd0: expect_seg = ~7'b0111111; 4'd1: expect_seg = ~7'b0000110;
      4'd2: expect_seg = ~7'b1011011; 4'd3: expect_seg = ~7'b1001111;
      4'd4: expect_seg = ~7'b1100110; 4'd5: expect_seg = ~7'b1101101;
      4'd6: expect_seg = ~7'b1111101; 4'd7: expect_seg = ~7'b0000111;
      4'd8: expect_seg = ~7'b1111111; default: expect_seg = ~7'b1101111;
    endcase
    if (seg == expect_seg && nib != 0) n_score_shown++;
  end

  // ------------------------------------------------------------ steering
  task automatic tilt(input dir_t d);
    jx = 10'd512; jy = 10'd512;
    case (d)
      DIR_LEFT:  jx = 10'd100;
      DIR_RIGHT: jx = 10'd900;
      DIR_UP:    jy = 10'd900;
      DIR_DOWN:  jy = 10'd100;
      default: ;
    endcase
  endtask

  function automatic dir_t toward_apple();
    int dx, dy;
    dx = int'(apple_c.x) - int'(head.x);
    dy = int'(apple_c.y) - int'(head.y);
    if (heading == DIR_LEFT || heading == DIR_RIGHT) begin
      if ((heading == DIR_RIGHT && dx > 0) || (heading == DIR_LEFT && dx < 0)) return heading;
      if (dy != 0) return (dy > 0) ? DIR_DOWN : DIR_UP;
      return (head.y < 30) ? DIR_DOWN : DIR_UP;
    end else begin
      if ((heading == DIR_DOWN && dy > 0) || (heading == DIR_UP && dy < 0)) return heading;
      if (dx != 0) return (dx > 0) ? DIR_RIGHT : DIR_LEFT;
      return (head.x < 40) ? DIR_RIGHT : DIR_LEFT;
    end
  endfunction

  localparam dir_t cw[4] = '{DIR_RIGHT, DIR_DOWN, DIR_LEFT, DIR_UP};

  task automatic press_start();
    @(posedge clk); btn_start <= 1'b1;
    repeat (5) @(posedge clk); btn_start <= 1'b0;
    repeat (5) @(posedge clk);
    n_restart++;
    check(dut.u_snake.state == GS_RUN && snake_len == 6'd3 && head == START_HEAD,
          "three-block snake running after start");
  endtask

  // eat n apples, steering after every step
  task automatic eat_apples(input int n);
    int target, budget;
    target = n_eat + n;
    budget = 1000;
    while (n_eat < target) begin
      @(posedge clk iff step_d);
      #1;
      if (--budget == 0) begin
        failures++;
        $display("FAIL: no apple reached within 1000 steps");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
      if (dut.u_snake.state == GS_OVER) begin
        $display("note: unplanned crash while steering, restarting");
        press_start();
      end
      tilt(toward_apple());
    end
  endtask

  // ------------------------------------------------------------- scenario
  initial begin
    int seen_flash;
    cell_t h0;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    // nothing moves before start
    repeat (20_000) @(posedge clk);
    check(dut.u_snake.state == GS_READY && head == START_HEAD, "waits for the start button");
    check(n_poll > 3, "joystick polled while waiting");

    press_start();
    eat_apples(4);
    check(score > 0, "score counted");

    // pause for several step periods
    @(posedge clk iff step_d);
    sw_pause = 1'b1;
    repeat (10) @(posedge clk);
    h0 = head;
    repeat (30_000) @(posedge clk);
    check(head == h0, "snake frozen while paused");
    n_pause++;
    sw_pause = 1'b0;

    // let it run straight into the border
    tilt(DIR_STOP);
    wait (dut.u_snake.state == GS_OVER);
    n_border++;
    check(is_border(step_cell(head, heading)), "game over at the border");
    h0 = head;
    seen_flash = n_flash;
    repeat (2_000_000) @(posedge clk);   // a little over two frames
    check(n_flash - seen_flash >= 2, $sformatf("body flashed %0d times", n_flash - seen_flash));
    check(head == h0, "frozen after game over");

    // new game: grow to five, then turn in a tight circle into the body
    press_start();
    eat_apples(2);
    begin
      int idx, sense;
      @(posedge clk iff step_d); #1;
      idx = 0;
      for (int k = 0; k < 4; k++) if (cw[k] == heading) idx = k;
      // rotate towards the middle of the field
      if (heading == DIR_RIGHT) sense = (head.y < 30) ? 1 : 3;
      else if (heading == DIR_LEFT) sense = (head.y < 30) ? 3 : 1;
      else if (heading == DIR_DOWN) sense = (head.x < 40) ? 3 : 1;
      else sense = (head.x < 40) ? 1 : 3;
      for (int t = 0; t < 4 && dut.u_snake.state != GS_OVER; t++) begin
        idx = (idx + sense) % 4;
        tilt(cw[idx]);
        @(posedge clk iff (step_d || dut.u_snake.state == GS_OVER)); #1;
      end
      repeat (10) @(posedge clk);
      check(dut.u_snake.state == GS_OVER && !is_border(step_cell(head, heading)) && snake_len >= 6'd5,
            "game over by running into the body");
      if (dut.u_snake.state == GS_OVER && !is_border(step_cell(head, heading))) n_self++;
    end

    repeat (20_000) @(posedge clk);
    check(jbad == 0, "all joystick transactions complete");
    check(led[7] == 1'b1, "game-over LED");
    // every mechanism seen
    check(n_poll > 0, "joystick polls");
    check(n_turn > 0, "turns");
    check(n_eat >= 6, "apples eaten");
    check(n_speedup > 0, "speed-ups");
    check(n_pause > 0, "pause");
    check(n_border > 0, "border crash");
    check(n_self > 0, "body crash");
    check(n_flash > 0, "flashing");
    check(n_restart >= 2, "restarts");
    check(n_score_shown > 0, "score on the display");
    check(n_frames > 0 && n_lines > 0, "video frames");
    check(n_head_px > 0 && n_apple_px > 0, "snake and apple on screen");
    $display("polls=%0d steps=%0d turns=%0d eats=%0d speedups=%0d pauses=%0d border=%0d self=%0d flash=%0d restarts=%0d score=%0d frames=%0d",
             n_poll, n_steps, n_turn, n_eat, n_speedup, n_pause, n_border, n_self, n_flash, n_restart, score, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
