// apple_gen: random grid position source and apple (target) register.
//
// A 16-bit maximal-length Fibonacci LFSR (taps 16,14,13,11) advances on every
// pixel clock enable, so its value at the moment the apple is eaten depends on
// how many pixel clocks the game has taken and is unpredictable to a player.
// Two bit fields of it are folded into the playfield interior, the columns
// 1..78 and rows 1..58 inside the border: a 7-bit field 0..127 minus 78 when
// it is 78 or more, a 6-bit field 0..63 minus 58 when it is 58 or more, then
// plus one. The fold is slightly non-uniform; that is accepted.
//
// The apple register takes the current random cell when `eat` pulses and
// keeps it otherwise; a game restart does not move it. After reset it sits at
// RESET_APPLE. The LFSR, fold and reset position are this design's choices:
// the project report says only that a random x/y generator clocked at the 25 MHz
// VGA rate gives the next apple location each time one is eaten.
module apple_gen
  import snake_pkg::*;
#(
  parameter cell_t RESET_APPLE = '{x: 7'd60, y: 6'd20}
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  pix_ce,
  input  logic  eat,
  output cell_t apple,
  output cell_t rand_cell
);
  logic [15:0] lfsr;
  logic [6:0]  rx;
  logic [5:0]  ry;

  always_ff @(posedge clk) begin
    if (rst)         lfsr <= 16'hACE1;
    else if (pix_ce) lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
  end

  always_comb begin
    rx = lfsr[6:0];
    ry = lfsr[13:8];
    if (rx >= 7'(GRID_W - 2)) rx = rx - 7'(GRID_W - 2);
    if (ry >= 6'(GRID_H - 2)) ry = ry - 6'(GRID_H - 2);
    rand_cell.x = rx + 7'd1;
    rand_cell.y = ry + 6'd1;
  end

  always_ff @(posedge clk) begin
    if (rst)      apple <= RESET_APPLE;
    else if (eat) apple <= rand_cell;
  end
endmodule
