// tb_jstk_decode: sweeps both axes over their whole 0..1023 range (and every
// button combination) and compares the tilt flags and LEDs with the
// 400/600 threshold rule.
module tb_jstk_decode;
  logic [9:0] x, y;
  logic [2:0] btn;
  logic tl, tr, td, tu;
  logic [5:0] led;
  int checks = 0, failures = 0;

  jstk_decode dut (.x, .y, .btn, .tilt_left(tl), .tilt_right(tr),
                   .tilt_down(td), .tilt_up(tu), .led);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int v = 0; v < 1024; v++) begin
      x = 10'(v); y = 10'(1023 - v); btn = 3'(v);
      #1;
      check(tl == (v < 400),          $sformatf("x=%0d left=%0b", v, tl));
      check(tr == (v > 600),          $sformatf("x=%0d right=%0b", v, tr));
      check(td == ((1023 - v) < 400), $sformatf("y=%0d down=%0b", 1023 - v, td));
      check(tu == ((1023 - v) > 600), $sformatf("y=%0d up=%0b", 1023 - v, tu));
      check(led == {btn[2], btn[1], tu, td, tr, tl}, "led pattern");
    end
    // exact boundaries
    x = 10'd399; y = 10'd601; #1; check(tl && !tr && tu && !td, "399/601");
    x = 10'd400; y = 10'd600; #1; check(!tl && !tr && !tu && !td, "400/600 centred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
