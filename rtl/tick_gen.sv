// tick_gen: clock-enable divider.
//
// Produces a one-cycle-wide `tick` once every DIV cycles of `clk` (when `en`
// is high; the count holds while `en` is low). The whole game runs in a
// single clock domain and slower rates are made with these enables rather
// than with derived clocks: DIV=2 on the 50 MHz board clock gives the 25 MHz
// pixel rate, DIV=375 gives the 133.3 kHz half-period tick of the 66.67 kHz
// joystick serial clock. Using enables instead of divided clocks is this
// design's choice.
//
// Timing: with `en` held high the first tick comes DIV cycles after reset is
// released and every DIV cycles after that.
module tick_gen #(
  parameter int unsigned DIV = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output logic tick
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (en) begin
        if (cnt == CW'(DIV - 1)) begin
          cnt  <= '0;
          tick <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  initial assert (DIV >= 1) else $error("tick_gen: DIV must be at least 1");
endmodule
