// move_timer: paces the snake and speeds it up as it eats.
//
// Counts pixel-clock enables while `run` is high and emits a one-cycle
// `step` every `period` of them. `period` starts at START_PERIOD (the
// document's 10^6 delay, read here as 10^6 pixel clocks = 40 ms per step at
// 25 MHz) and shrinks by SPEEDUP on every `eat` pulse, down to MIN_PERIOD, so
// the game "speeds a pinch" with each apple. `init` (game start) restores
// START_PERIOD and clears the count. While `run` is low (paused, not started,
// game over) the count holds. SPEEDUP and MIN_PERIOD are this design's
// choices; the project report gives no amount.
module move_timer #(
  parameter int unsigned START_PERIOD = 1_000_000,
  parameter int unsigned SPEEDUP      = 20_000,
  parameter int unsigned MIN_PERIOD   = 250_000,
  localparam int unsigned PW = $clog2(START_PERIOD + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          pix_ce,
  input  logic          run,
  input  logic          init,
  input  logic          eat,
  output logic          step,
  output logic [PW-1:0] period
);
  logic [PW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst || init) begin
      period <= PW'(START_PERIOD);
      cnt    <= '0;
      step   <= 1'b0;
    end else begin
      step <= 1'b0;
      if (eat) begin
        period <= (period >= PW'(MIN_PERIOD + SPEEDUP)) ? period - PW'(SPEEDUP)
                                                         : PW'(MIN_PERIOD);
      end
      if (run && pix_ce) begin
        if (cnt >= period - 1'b1) begin
          cnt  <= '0;
          step <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  initial assert (MIN_PERIOD >= 1 && MIN_PERIOD <= START_PERIOD)
    else $error("move_timer: bad period limits");
endmodule
