// tb_sevenseg_driver: with a 3-cycle refresh, checks that exactly one anode
// is active (low) at a time, that the digits are scanned AN0..AN3 in turn,
// each for REFRESH_CYCLES clocks, and that the segments show the matching
// nibble of `value` in the standard hexadecimal glyphs (active low, A..G).
module tb_sevenseg_driver;
  logic clk = 1'b0, rst = 1'b1;
  logic [15:0] value;
  logic [3:0] an;
  logic [6:0] seg;
  logic dp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sevenseg_driver #(.REFRESH_CYCLES(3)) dut (.clk, .rst, .value, .an, .seg, .dp);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // Segments lit for each hex digit, as strings of the lit segment letters.
  function automatic string glyph(input logic [3:0] d);
    string g[16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                     "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};
    return g[d];
  endfunction

  function automatic string lit(input logic [6:0] s);
    string r = "";
    string names = "abcdefg";
    for (int i = 0; i < 7; i++) if (!s[i]) r = {r, names.substr(i, i)};
    return r;
  endfunction

  initial begin
    int digit, run_len;
    logic [3:0] an_prev;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int v = 0; v < 40; v++) begin
      value = (v < 16) ? {4{4'(v)}} : 16'($urandom);
      an_prev = 4'b1111; run_len = 0;
      for (int c = 0; c < 24; c++) begin
        @(posedge clk); #1;
        check($countones(~an) == 1, "one anode active");
        digit = 0;
        for (int k = 0; k < 4; k++) if (!an[k]) digit = k;
        check(lit(seg) == glyph(value[4*digit +: 4]),
              $sformatf("digit %0d shows %s for %h", digit, lit(seg), value[4*digit +: 4]));
        check(dp == 1'b1, "decimal point off");
        if (an == an_prev) run_len++;
        else begin
          if (an_prev != 4'b1111 && c > 3) begin
            check(run_len == 3, $sformatf("digit held %0d cycles", run_len));
            check(an == {an_prev[2:0], an_prev[3]}, "scan order");
          end
          run_len = 1;
        end
        an_prev = an;
      end
    end
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
