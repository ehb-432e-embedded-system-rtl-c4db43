// tb_vga_render: places a snake (with stale cells beyond its length) and an
// apple, then probes 20,000 random pixels plus chosen ones and compares the
// registered colour with a reference painter: black outside the active area,
// the border ring, head, body (hidden when body_visible is low), apple,
// background, and segments beyond the length never drawn.
module tb_vga_render;
  import snake_pkg::*;
  logic clk = 1'b0, rst = 1'b1, video_on, body_visible;
  logic [9:0] px, py;
  cell_t [MAX_LEN-1:0] body;
  logic [LEN_W-1:0] len;
  cell_t apple;
  logic [7:0] rgb;
  int checks = 0, failures = 0;
  int n_head = 0, n_body = 0, n_apple = 0, n_border = 0, n_bg = 0;

  localparam logic [7:0] BG = 8'b001_011_11, BORDER = 8'hFF, HEAD = 8'b111_010_11,
                         BODY = 8'b000_111_00, APPLE = 8'b111_000_00;

  always #5 clk = ~clk;

  vga_render dut (.clk, .rst, .pix_ce(1'b1), .video_on, .px, .py, .body, .len,
                  .body_visible, .apple, .rgb);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] expect_col(int x, int y, logic von);
    int bx = x / 8, by = y / 8;
    if (!von) return 8'h00;
    if (bx == 0 || bx == 79 || by == 0 || by == 59) begin n_border++; return BORDER; end
    if (body_visible && body[0].x == bx && body[0].y == by) begin n_head++; return HEAD; end
    for (int i = 1; i < len; i++)
      if (body_visible && body[i].x == bx && body[i].y == by) begin n_body++; return BODY; end
    if (apple.x == bx && apple.y == by) begin n_apple++; return APPLE; end
    n_bg++;
    return BG;
  endfunction

  task automatic probe(input int x, input int y, input logic von);
    logic [7:0] e;
    px = 10'(x); py = 10'(y); video_on = von;
    e = expect_col(x, y, von);
    @(posedge clk); #1;
    check(rgb == e, $sformatf("pixel %0d,%0d: %h expected %h", x, y, rgb, e));
  endtask

  initial begin
    for (int i = 0; i < MAX_LEN; i++) body[i] = '{x: 7'(10 + i), y: 6'd5};
    len = 6'd20;   // cells 10..29 on row 5, stale cells 30..59 beyond
    apple = '{x: 7'd40, y: 6'd30};
    body_visible = 1'b1;
    video_on = 1'b0; px = '0; py = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    probe(10 * 8 + 3, 5 * 8 + 7, 1'b1);   // head
    probe(20 * 8, 5 * 8, 1'b1);           // body
    probe(45 * 8 + 1, 5 * 8 + 1, 1'b1);   // stale cell beyond len
    probe(40 * 8 + 4, 30 * 8 + 4, 1'b1);  // apple
    probe(3, 200, 1'b1);                  // left border
    probe(639, 479, 1'b1);                // bottom-right border
    probe(40 * 8 + 4, 30 * 8 + 4, 1'b0);  // blanking
    for (int k = 0; k < 20_000; k++) begin
      if (k == 10_000) body_visible = 1'b0;
      if (k % 2 == 0)
        probe($urandom_range(0, 639), $urandom_range(0, 479), ($urandom_range(0, 9) != 0));
      else   // bias towards the snake's row and the apple
        probe($urandom_range(60, 260), (k % 4 == 1) ? $urandom_range(40, 47) : $urandom_range(236, 250), 1'b1);
    end
    check(n_head > 0 && n_body > 0 && n_apple > 0 && n_border > 0 && n_bg > 0, "all colours exercised");
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
