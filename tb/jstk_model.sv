// jstk_model: behavioural model of the PmodJSTK joystick module's SPI side,
// for simulation only.
//
// While `ss_n` is low it acts as an SPI mode-0 slave: it shifts out five
// bytes MSB first, changing MISO after each falling SCLK edge (the first bit
// is ready when SS falls), and samples MOSI on each rising edge. The bytes
// sent are X[7:0], X[9:8], Y[7:0], Y[9:8], buttons, taken from `x`, `y`,
// `btn` at the moment SS falls. `cmd` holds the first byte received in the
// last transaction (the LED command); `frames` counts completed transactions
// of exactly 40 bits and `bad_frames` those of any other length.
module jstk_model (
  input  logic       ss_n,
  input  logic       sclk,
  input  logic       mosi,
  output logic       miso,
  input  logic [9:0] x,
  input  logic [9:0] y,
  input  logic [2:0] btn,
  output logic [7:0] cmd,
  output int         frames,
  output int         bad_frames
);
  logic [39:0] tx;
  logic [39:0] rx;
  int nbits;

  initial begin
    frames = 0; bad_frames = 0; cmd = '0; nbits = 0; tx = '0; rx = '0;
  end

  assign miso = tx[39];

  always @(negedge ss_n) begin
    tx    = {x[7:0], 6'b0, x[9:8], y[7:0], 6'b0, y[9:8], 5'b0, btn};
    nbits = 0;
  end

  always @(posedge sclk) if (!ss_n) begin
    rx = {rx[38:0], mosi};
    nbits++;
    if (nbits == 8) cmd = rx[7:0];
  end

  always @(negedge sclk) if (!ss_n) tx = {tx[38:0], 1'b0};

  always @(posedge ss_n) begin
    if (nbits == 40) frames++;
    else if (nbits != 0) bad_frames++;
  end
endmodule
