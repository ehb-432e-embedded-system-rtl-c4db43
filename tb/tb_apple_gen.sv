// tb_apple_gen: checks the apple register and the random cell source.
// After reset the apple is at its reset cell; it changes only when `eat`
// pulses and then takes the random cell of that cycle; every random cell seen
// over 200,000 pixel clocks lies inside the border (columns 1..78, rows
// 1..58); and the random source reaches most of the interior (at least 4000
// of the 4524 cells).
module tb_apple_gen;
  import snake_pkg::*;
  logic clk = 1'b0, rst = 1'b1, pix_ce = 1'b0, eat = 1'b0;
  cell_t apple, rand_cell, sampled;
  int checks = 0, failures = 0;
  bit seen [GRID_W][GRID_H];
  int distinct = 0, eats = 0;

  always #5 clk = ~clk;

  apple_gen dut (.clk, .rst, .pix_ce, .eat, .apple, .rand_cell);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    cell_t prev;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk); #1;
    check(apple.x == 7'd60 && apple.y == 6'd20, "reset apple position");
    for (int i = 0; i < 200_000; i++) begin
      pix_ce = 1'b1;
      eat = ($urandom_range(0, 999) == 0);
      #1;
      sampled = rand_cell;
      prev = apple;
      check(rand_cell.x >= 1 && rand_cell.x <= 78 && rand_cell.y >= 1 && rand_cell.y <= 58,
            $sformatf("random cell out of field: %0d,%0d", rand_cell.x, rand_cell.y));
      if (!seen[rand_cell.x][rand_cell.y]) begin seen[rand_cell.x][rand_cell.y] = 1; distinct++; end
      @(posedge clk); #1;
      if (eat) begin
        check(apple == sampled, "apple takes the random cell on eat");
        eats++;
      end else begin
        check(apple == prev, "apple holds without eat");
      end
    end
    eat = 1'b0;
    check(distinct >= 4000, $sformatf("distinct cells %0d", distinct));
    check(eats > 100, "eats exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
