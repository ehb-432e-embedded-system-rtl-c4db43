// jstk_decode: turns raw joystick positions into tilt flags and status LEDs.
//
// Each axis reading (0..1023) is split into three zones by two thresholds:
// below LOW_TH (400) the stick is tilted to the low side, above HIGH_TH (600)
// to the high side, in between it is centred and gives no flag. X low is
// "left", X high "right", Y low "down", Y high "up"; which side of the Y axis
// means up is this design's choice. The thresholds are the project report's.
//
// `led` mirrors the decode as in the project report's first milestone: led[0] X low,
// led[1] X high, led[2] Y low, led[3] Y high, led[4]/led[5] the joystick's
// two extra buttons (BTN1, BTN2). Purely combinational.
module jstk_decode #(
  parameter int unsigned LOW_TH  = 400,
  parameter int unsigned HIGH_TH = 600
) (
  input  logic [9:0] x,
  input  logic [9:0] y,
  input  logic [2:0] btn,
  output logic       tilt_left,
  output logic       tilt_right,
  output logic       tilt_down,
  output logic       tilt_up,
  output logic [5:0] led
);
  assign tilt_left  = x < 10'(LOW_TH);
  assign tilt_right = x > 10'(HIGH_TH);
  assign tilt_down  = y < 10'(LOW_TH);
  assign tilt_up    = y > 10'(HIGH_TH);
  assign led = {btn[2], btn[1], tilt_up, tilt_down, tilt_right, tilt_left};
endmodule
