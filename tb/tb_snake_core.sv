// tb_snake_core: plays the snake core against a reference model kept in a
// SystemVerilog queue. Each step the testbench picks a heading (a random
// safe turn most of the time) and sometimes puts the apple right in front of
// the head; after the step the whole body, the length, the eat pulse and the
// game state must match the model. The run covers growth up to the 50-block
// limit, a border crash, a crash into the body, pause, the flashing of the
// body after a crash (toggling every FLASH_FRAMES frame ticks) and restart.
module tb_snake_core;
  import snake_pkg::*;
  localparam int FLASH = 4;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0, pause = 1'b0, step = 1'b0, frame_tick = 1'b0;
  dir_t dir_next;
  cell_t apple;
  cell_t [MAX_LEN-1:0] body;
  logic [LEN_W-1:0] len;
  game_state_t state;
  logic run, init, eat, game_over, body_visible;
  int checks = 0, failures = 0;
  int n_eat = 0, n_border = 0, n_self = 0, n_cap = 0, n_pause = 0, n_flash = 0, n_restart = 0;

  always #5 clk = ~clk;

  snake_core #(.FLASH_FRAMES(FLASH)) dut (.clk, .rst, .start, .pause, .step, .dir_next, .apple,
    .frame_tick, .body, .len, .state, .run, .init, .eat, .game_over, .body_visible);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // reference model
  cell_t m_body[$];
  bit    m_over;
  dir_t  m_dir;

  function automatic cell_t nxt(cell_t c, dir_t d);
    cell_t n = c;
    if (d == DIR_UP) n.y--; else if (d == DIR_DOWN) n.y++;
    else if (d == DIR_LEFT) n.x--; else if (d == DIR_RIGHT) n.x++;
    return n;
  endfunction

  function automatic bit lethal(cell_t n, bit grows);
    if (n.x == 0 || n.x == 79 || n.y == 0 || n.y == 59) return 1;
    for (int i = 0; i < m_body.size() - (grows ? 0 : 1); i++) if (m_body[i] == n) return 1;
    return 0;
  endfunction

  task automatic compare(input string what);
    check(len == LEN_W'(m_body.size()), $sformatf("%s: len %0d expected %0d", what, len, m_body.size()));
    for (int i = 0; i < m_body.size(); i++)
      check(body[i] == m_body[i], $sformatf("%s: segment %0d", what, i));
    check(game_over == m_over, $sformatf("%s: game_over %0b expected %0b", what, game_over, m_over));
  endtask

  task automatic do_restart();
    @(posedge clk); start <= 1'b1; @(posedge clk); start <= 1'b0;
    m_body.delete();
    for (int i = 0; i < 3; i++) m_body.push_back('{x: 7'(40 - i), y: 6'd30});
    m_over = 0; m_dir = DIR_RIGHT; n_restart++;
    @(posedge clk); #1;
    check(state == GS_RUN && run, "running after start");
    compare("restart");
  endtask

  // one step in heading d; apple in front if feed
  task automatic do_step(input dir_t d, input bit feed);
    cell_t n;
    bit g, dead;
    n = nxt(m_body[0], d);
    if (feed) apple = n;
    else if (apple == n) apple = '{x: 7'd1, y: 6'd1};
    g = (n == apple);
    dead = lethal(n, g);
    dir_next = d;
    @(posedge clk); step <= 1'b1; @(posedge clk); step <= 1'b0; #1;
    if (m_over) begin
      g = 0;   // frozen: nothing changes
    end else if (dead) begin
      m_over = 1;
      if (n.x == 0 || n.x == 79 || n.y == 0 || n.y == 59) n_border++; else n_self++;
    end else begin
      m_body.push_front(n);
      if (!g || m_body.size() > MAX_LEN) void'(m_body.pop_back());
      if (g && m_body.size() == MAX_LEN) n_cap++;
      if (g) n_eat++;
      m_dir = d;
    end
    check(eat == (g && !dead), "eat pulse");
    compare("step");
  endtask

  function automatic dir_t pick_safe();
    dir_t opts[$];
    dir_t all[4] = '{DIR_UP, DIR_DOWN, DIR_LEFT, DIR_RIGHT};
    foreach (all[k]) begin
      if ((m_dir == DIR_UP && all[k] == DIR_DOWN) || (m_dir == DIR_DOWN && all[k] == DIR_UP) ||
          (m_dir == DIR_LEFT && all[k] == DIR_RIGHT) || (m_dir == DIR_RIGHT && all[k] == DIR_LEFT)) continue;
      if (!lethal(nxt(m_body[0], all[k]), 0)) opts.push_back(all[k]);
    end
    if (opts.size() == 0) return m_dir;
    foreach (opts[k]) if (opts[k] == m_dir && $urandom_range(0, 3) != 0) return m_dir;
    return opts[$urandom_range(0, opts.size() - 1)];
  endfunction

  initial begin
    int vis_toggles;
    logic vis_prev;
    apple = '{x: 7'd1, y: 6'd1};
    dir_next = DIR_RIGHT;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk); #1;
    check(state == GS_READY && !run, "ready after reset");
    check(len == 6'd3 && body[0] == START_HEAD, "initial snake shown");
    // steps are ignored before the start button
    @(posedge clk); step <= 1'b1; @(posedge clk); step <= 1'b0; #1;
    check(body[0] == START_HEAD, "no move before start");

    // long game: grow to the limit
    do_restart();
    for (int s = 0; s < 600 && !m_over; s++) do_step(pick_safe(), $urandom_range(0, 9) < 4);
    if (m_over) do_restart();

    // pause
    pause <= 1'b1;
    @(posedge clk); #1;
    check(!run, "run low while paused");
    begin
      cell_t h;
      h = body[0];
      repeat (5) begin @(posedge clk); step <= 1'b1; @(posedge clk); step <= 1'b0; end
      #1; check(body[0] == h, "no movement while paused"); n_pause++;
    end
    pause <= 1'b0;

    // crash into the border: keep the current heading
    for (int s = 0; s < 100 && !m_over; s++) do_step(m_dir, 0);
    check(m_over && state == GS_OVER, "game over after border crash");

    // flashing while over, frozen body
    vis_toggles = 0; vis_prev = body_visible;
    check(body_visible == 1'b1, "visible at game over");
    for (int f = 0; f < 4 * FLASH; f++) begin
      @(posedge clk); frame_tick <= 1'b1; @(posedge clk); frame_tick <= 1'b0; #1;
      if (body_visible != vis_prev) begin
        vis_toggles++;
        check((f + 1) % FLASH == 0, $sformatf("toggle after frame %0d", f + 1));
      end
      vis_prev = body_visible;
    end
    check(vis_toggles == 4, $sformatf("flash toggles %0d", vis_toggles));
    n_flash += vis_toggles;
    do_step(DIR_UP, 0);   // ignored while over (model: m_over stays, body same)

    // restart and crash into the body
    do_restart();
    check(body_visible, "visible again after restart");
    do_step(DIR_RIGHT, 1);
    do_step(DIR_RIGHT, 1);
    do_step(DIR_DOWN, 0);
    do_step(DIR_LEFT, 0);
    do_step(DIR_UP, 0);
    check(m_over && state == GS_OVER, "game over after body crash");

    check(n_eat > 40, $sformatf("apples eaten %0d", n_eat));
    check(n_cap > 0, "length limit reached");
    check(n_border > 0, "border crash");
    check(n_self > 0, "body crash");
    check(n_pause > 0, "pause");
    check(n_restart >= 2, "restart");
    $display("eats=%0d cap=%0d border=%0d self=%0d flash=%0d restarts=%0d",
             n_eat, n_cap, n_border, n_self, n_flash, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
