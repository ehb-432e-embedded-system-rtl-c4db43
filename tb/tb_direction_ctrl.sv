// tb_direction_ctrl: drives random tilt flags and steps and checks the
// heading against the turn rules: from up/down only left/right tilts turn
// the snake, from left/right only up/down tilts do, never a reversal, at most
// one change per step, STOP after reset and RIGHT after init.
module tb_direction_ctrl;
  import snake_pkg::*;
  logic clk = 1'b0, rst = 1'b1, init = 1'b0, step = 1'b0;
  logic tl, tr, tu, td;
  dir_t dir, dir_next;
  int checks = 0, failures = 0;
  int turns = 0;

  always #5 clk = ~clk;

  direction_ctrl dut (.clk, .rst, .init, .step, .tilt_left(tl), .tilt_right(tr),
                      .tilt_up(tu), .tilt_down(td), .dir, .dir_next);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic dir_t expect_next(dir_t d, logic l, logic r, logic u, logic dn);
    if (d == DIR_UP || d == DIR_DOWN) return l ? DIR_LEFT : (r ? DIR_RIGHT : d);
    if (d == DIR_LEFT || d == DIR_RIGHT) return u ? DIR_UP : (dn ? DIR_DOWN : d);
    return d;
  endfunction

  dir_t prev_dir;
  initial begin
    {tl, tr, tu, td} = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk); #1;
    check(dir == DIR_STOP, "STOP after reset");
    step <= 1'b1; tl <= 1'b1; tu <= 1'b1;
    @(posedge clk); #1;
    check(dir == DIR_STOP, "STOP ignores tilts");
    step <= 1'b0; init <= 1'b1;
    @(posedge clk); #1;
    init <= 1'b0;
    check(dir == DIR_RIGHT, "RIGHT after init");
    for (int i = 0; i < 3000; i++) begin
      tl = 1'($urandom_range(0, 1)); tr = tl ? 1'b0 : 1'($urandom_range(0, 1));
      tu = 1'($urandom_range(0, 1)); td = tu ? 1'b0 : 1'($urandom_range(0, 1));
      step = ($urandom_range(0, 2) == 0);
      #1;
      check(dir_next == expect_next(dir, tl, tr, tu, td),
            $sformatf("dir_next %s from %s", dir_next.name(), dir.name()));
      prev_dir = dir;
      @(posedge clk); #1;
      if (step) begin
        check(dir == expect_next(prev_dir, tl, tr, tu, td), "heading after step");
        if (dir != prev_dir) turns++;
      end else begin
        check(dir == prev_dir, "heading held without step");
      end
      check(!((prev_dir == DIR_UP && dir == DIR_DOWN) || (prev_dir == DIR_DOWN && dir == DIR_UP) ||
              (prev_dir == DIR_LEFT && dir == DIR_RIGHT) || (prev_dir == DIR_RIGHT && dir == DIR_LEFT)),
            "no reversal");
    end
    step = 1'b0;
    check(turns > 100, $sformatf("turns exercised: %0d", turns));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
