// tb_spi_master: exchanges 200 random bytes with a mode-0 slave written
// here, checking the byte the slave collected from MOSI, the byte returned on
// rx_byte, the SCLK idle level, 8 rising edges per byte and the length of a
// byte (16 half ticks from the first half tick after start to done).
module tb_spi_master;
  logic clk = 1'b0, rst = 1'b1;
  logic half_tick, start = 1'b0, busy, done, sclk, mosi, miso;
  logic [7:0] tx_byte, rx_byte;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tick_gen #(.DIV(3)) u_ht (.clk, .rst, .en(1'b1), .tick(half_tick));

  spi_master dut (.clk, .rst, .half_tick, .start, .tx_byte, .busy, .done,
                  .rx_byte, .sclk, .mosi, .miso);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // slave
  logic [7:0] s_tx, s_rx;
  int s_rises;
  assign miso = s_tx[7];
  always @(posedge sclk) begin s_rx = {s_rx[6:0], mosi}; s_rises++; end
  always @(negedge sclk) s_tx = {s_tx[6:0], 1'b0};

  int ht_count;
  always @(posedge clk) if (busy && half_tick) ht_count++;

  initial begin
    logic [7:0] m, s;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (2) @(posedge clk);
    check(sclk == 1'b0 && !busy, "idle");
    for (int i = 0; i < 200; i++) begin
      m = 8'($urandom); s = 8'($urandom);
      s_tx = s; s_rises = 0; ht_count = 0;
      @(posedge clk);
      tx_byte <= m; start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      @(posedge clk iff done);
      #1;
      check(rx_byte == s, $sformatf("rx %h expected %h", rx_byte, s));
      check(s_rx == m, $sformatf("slave got %h expected %h", s_rx, m));
      check(s_rises == 8, $sformatf("rising edges %0d", s_rises));
      check(ht_count == 16, $sformatf("half ticks %0d", ht_count));
      check(sclk == 1'b0, "SCLK idles low");
      repeat ($urandom_range(0, 5)) @(posedge clk);
    end
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
