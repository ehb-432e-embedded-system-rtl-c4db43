// tb_tick_gen: checks that tick_gen emits exactly one tick every DIV enabled
// cycles, holds its count while disabled, and that the default (/2) instance
// ticks on every other cycle.
module tb_tick_gen;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic tick5, tick2;
  int checks = 0, failures = 0;
  int en_count, last_tick_at, n_ticks5, n_ticks2;

  always #5 clk = ~clk;

  tick_gen #(.DIV(5)) dut5 (.clk, .rst, .en, .tick(tick5));
  tick_gen            dut2 (.clk, .rst, .en(1'b1), .tick(tick2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Independent reference: count enabled cycles, a tick must follow every
  // fifth one (registered: visible on the next cycle).
  int ref_cnt;
  logic ref_tick;
  always_ff @(posedge clk) begin
    if (rst) begin ref_cnt <= 0; ref_tick <= 1'b0; end
    else begin
      ref_tick <= 1'b0;
      if (en) begin
        if (ref_cnt == 4) begin ref_cnt <= 0; ref_tick <= 1'b1; end
        else ref_cnt <= ref_cnt + 1;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int c = 0; c < 2000; c++) begin
      @(posedge clk);
      en <= ($urandom_range(0, 3) != 0);
      #1;
      check(tick5 == ref_tick, $sformatf("cycle %0d: tick5=%0b expected %0b", c, tick5, ref_tick));
      if (tick5) n_ticks5++;
      if (tick2) n_ticks2++;
    end
    check(n_ticks5 > 250, $sformatf("too few DIV=5 ticks: %0d", n_ticks5));
    check(n_ticks2 == 1000, $sformatf("DIV=2 ticks in 2000 cycles: %0d", n_ticks2));
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
