// tb_move_timer: with a 10-pixel-clock start period, 3-clock speed-up and a
// 4-clock floor, measures the number of pixel enables between steps: 10 at
// start, 7 after one apple, 4 after two, still 4 after three (floor); no
// steps while `run` is low; and `init` restoring the start period.
module tb_move_timer;
  logic clk = 1'b0, rst = 1'b1, pix_ce, run = 1'b0, init = 1'b0, eat = 1'b0, step;
  logic [3:0] period;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // pixel enable every other clock
  tick_gen #(.DIV(2)) u_ce (.clk, .rst, .en(1'b1), .tick(pix_ce));

  move_timer #(.START_PERIOD(10), .SPEEDUP(3), .MIN_PERIOD(4)) dut (
    .clk, .rst, .pix_ce, .run, .init, .eat, .step, .period);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int ce_since;
  int gaps[$];
  always @(posedge clk) begin
    if (!rst && step) begin gaps.push_back(ce_since); ce_since = 0; end
    if (pix_ce && run) ce_since++;
  end

  task automatic measure(input int expect_gap, input string what);
    gaps.delete();
    wait (gaps.size() == 4);
    // the first gap may be partial; the next three must be exact
    for (int i = 1; i < 4; i++) check(gaps[i] == expect_gap, $sformatf("%s: gap %0d expected %0d", what, gaps[i], expect_gap));
  endtask

  task automatic pulse_eat();
    @(posedge clk); eat <= 1'b1; @(posedge clk); eat <= 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (50) @(posedge clk);
    check(gaps.size() == 0, "no step while run is low");
    run <= 1'b1;
    measure(10, "start");
    pulse_eat(); measure(7, "one apple");
    pulse_eat(); measure(4, "two apples");
    pulse_eat(); measure(4, "floor");
    run <= 1'b0;
    gaps.delete();
    repeat (100) @(posedge clk);
    check(gaps.size() == 0, "paused");
    @(posedge clk); init <= 1'b1; @(posedge clk); init <= 1'b0;
    run <= 1'b1;
    measure(10, "after init");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
