// tb_vga_sync: runs vga_sync at its default 640x480 timing with a pixel
// enable on every clock for two full frames and measures, from the outputs
// only: the HS period (800) and pulse width (96), the VS period (521 lines =
// 416,800 pixel clocks) and pulse width (2 lines = 1,600 pixel clocks), the
// number of active pixels per line (640) and per frame (640*480), the
// px/py ranges and the position of the first active pixel after the HS pulse
// (96 + 48 = 144 pixel clocks after the pulse starts).
module tb_vga_sync;
  logic clk = 1'b0, rst = 1'b1;
  logic hs, vs, video_on, line_end, frame_start;
  logic [9:0] px, py, hcnt, vcnt;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vga_sync dut (.clk, .rst, .pix_ce(1'b1), .hs, .vs, .video_on, .px, .py,
                .hcnt, .vcnt, .line_end, .frame_start);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  longint cyc = 0;
  longint hs_fall = -1, vs_fall = -1, hs_rise;
  int     hs_periods = 0, vs_periods = 0, lines_checked = 0;
  int     act_line = 0, act_frame = 0, frames_done = 0;
  logic   hs_d = 1'b1, vs_d = 1'b1, von_d = 1'b0;
  int     max_px = 0, max_py = 0;
  longint first_act_in_line;

  always @(posedge clk) if (!rst) begin
    cyc++;
    // HS (active low): falling edge starts a pulse
    if (hs_d && !hs) begin
      if (hs_fall >= 0) begin
        check(cyc - hs_fall == 800, $sformatf("HS period %0d", cyc - hs_fall));
        hs_periods++;
      end
      hs_fall = cyc;
      first_act_in_line = -1;
    end
    if (!hs_d && hs) check(cyc - hs_fall == 96, $sformatf("HS width %0d", cyc - hs_fall));
    // VS
    if (vs_d && !vs) begin
      if (vs_fall >= 0) begin
        check(cyc - vs_fall == 416_800, $sformatf("VS period %0d", cyc - vs_fall));
        check(act_frame == 640 * 480, $sformatf("active pixels/frame %0d", act_frame));
        vs_periods++;
      end
      vs_fall = cyc;
      act_frame = 0;
    end
    if (!vs_d && vs) check(cyc - vs_fall == 1600, $sformatf("VS width %0d", cyc - vs_fall));
    // Active area (hs/vs lag the counters by one pixel, so the first
    // active pixel shows 143 cycles after the HS fall)
    if (video_on) begin
      act_line++; act_frame++;
      if (px > max_px) max_px = px;
      if (py > max_py) max_py = py;
      if (!von_d && hs_fall >= 0) begin
        check(cyc - hs_fall == 143, $sformatf("first active pixel %0d after HS", cyc - hs_fall));
        check(px == 0, "px starts at 0");
      end
    end
    if (von_d && !video_on) begin
      check(act_line == 640, $sformatf("active pixels/line %0d", act_line));
      lines_checked++;
    end
    if (!video_on) act_line = 0;
    hs_d = hs; vs_d = vs; von_d = video_on;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (vs_periods == 2);
    check(max_px == 639, $sformatf("max px %0d", max_px));
    check(max_py == 479, $sformatf("max py %0d", max_py));
    check(lines_checked >= 960, $sformatf("lines %0d", lines_checked));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_500_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
