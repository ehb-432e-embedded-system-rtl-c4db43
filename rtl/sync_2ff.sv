// sync_2ff: two-flip-flop synchronizer for an asynchronous input (buttons,
// switches, the joystick's MISO line). Output lags the input by two clocks.
// Reset value is 0.
module sync_2ff (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk) begin
    if (rst) {q, meta} <= 2'b00;
    else     {q, meta} <= {meta, d};
  end
endmodule
