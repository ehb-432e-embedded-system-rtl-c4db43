// tb_jstk_master: polls the behavioural joystick model with a short poll
// period and checks that every 5-byte transaction is complete (40 bits), that
// the LED command byte is 8'b1000_00LL, that X, Y and the buttons read back
// as set in the model, that `valid` pulses once per poll, that polls come
// every POLL_CYCLES clocks, and that chip select stays low for the expected
// length: 3 setup half periods + 5 x (16 + 3) half periods.
module tb_jstk_master;
  localparam int POLL = 1500;
  localparam int HDIV = 4;
  logic clk = 1'b0, rst = 1'b1;
  logic half_tick, ss_n, sclk, mosi, miso, valid;
  logic [1:0] led;
  logic [9:0] x, y, mx, my;
  logic [2:0] btn, mbtn;
  logic [7:0] cmd;
  int frames, bad_frames;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tick_gen #(.DIV(HDIV)) u_ht (.clk, .rst, .en(1'b1), .tick(half_tick));

  jstk_master #(.POLL_CYCLES(POLL)) dut (.clk, .rst, .half_tick, .led, .ss_n, .sclk,
                                         .mosi, .miso, .x, .y, .btn, .valid);

  jstk_model u_js (.ss_n, .sclk, .mosi, .miso, .x(mx), .y(my), .btn(mbtn),
                   .cmd, .frames, .bad_frames);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  longint cyc = 0, ss_fall_at = -1, last_valid = -1;
  logic ss_d = 1'b1;
  always @(posedge clk) begin
    cyc++;
    if (ss_d && !ss_n) begin
      if (ss_fall_at >= 0) check(cyc - ss_fall_at == POLL, $sformatf("poll period %0d", cyc - ss_fall_at));
      ss_fall_at = cyc;
    end
    if (!ss_d && ss_n) begin
      // (3 + 5*19) half periods of HDIV cycles (the first one may be cut
      // short), plus a few cycles of handshake per byte
      check((cyc - ss_fall_at) >= (3 + 5 * 19 - 1) * HDIV &&
            (cyc - ss_fall_at) <= (3 + 5 * 19) * HDIV + 5 * HDIV + 10,
            $sformatf("SS low for %0d cycles", cyc - ss_fall_at));
    end
    ss_d = ss_n;
  end

  initial begin
    mx = 10'd512; my = 10'd512; mbtn = 3'b000; led = 2'b00;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 40; i++) begin
      @(posedge clk iff ss_n);  // change the stick only between transactions
      mx = 10'($urandom); my = 10'($urandom); mbtn = 3'($urandom); led = 2'($urandom);
      @(posedge clk iff valid);
      #1;
      check(x == mx, $sformatf("x %0d expected %0d", x, mx));
      check(y == my, $sformatf("y %0d expected %0d", y, my));
      check(btn == mbtn, "buttons");
      check(cmd == {6'b100000, led}, $sformatf("LED command %h", cmd));
      check(bad_frames == 0, "every transaction is 40 bits");
      check(frames == i + 1, $sformatf("frames %0d", frames));
      @(posedge clk); #1;
      check(!valid, "valid is a single pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
