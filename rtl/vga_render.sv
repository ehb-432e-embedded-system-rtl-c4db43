// vga_render: turns the game state into the colour of the current pixel.
//
// The 640x480 picture is treated as an 80x60 matrix of 8x8-pixel blocks, so
// the block under the beam is just the pixel coordinate shifted right by
// three. That block is painted, in priority order, as
//   border   - the outermost ring of blocks (an 8-pixel frame),
//   head     - the snake's first segment,
//   body     - any other segment within the current length, shown only while
//              `body_visible` is high (the game-over flashing),
//   apple    - the target block,
//   background.
// The body test compares the block against all MAX_LEN segment registers in
// parallel, masked by the current length. Outside the active area the output
// is black, as a VGA monitor expects during blanking.
//
// Output is 8-bit RGB 3:3:2 (red [7:5], green [4:2], blue [1:0]), registered
// on the pixel enable, so it lags `px`/`py` by one pixel clock (matching
// vga_sync's sync outputs). The 8x8 blocks, 80x60 matrix, border width and a
// bluish background follow the project report; the exact colour values are this
// design's choice.
module vga_render
  import snake_pkg::*;
#(
  parameter logic [7:0] COL_BG     = 8'b001_011_11,  // bright bluish
  parameter logic [7:0] COL_BORDER = 8'b111_111_11,  // white
  parameter logic [7:0] COL_HEAD   = 8'b111_010_11,  // pink
  parameter logic [7:0] COL_BODY   = 8'b000_111_00,  // green
  parameter logic [7:0] COL_APPLE  = 8'b111_000_00   // red
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 pix_ce,
  input  logic                 video_on,
  input  logic [9:0]           px,
  input  logic [9:0]           py,
  input  cell_t [MAX_LEN-1:0]  body,
  input  logic [LEN_W-1:0]     len,
  input  logic                 body_visible,
  input  cell_t                apple,
  output logic [7:0]           rgb
);
  cell_t blk;
  logic  on_head, on_body, on_apple, on_border;
  logic [7:0] col;

  assign blk.x = px[9:3];
  assign blk.y = py[8:3];

  always_comb begin
    on_body = 1'b0;
    for (int i = 1; i < MAX_LEN; i++) begin
      if ((LEN_W'(i) < len) && (body[i] == blk)) on_body = 1'b1;
    end
  end

  assign on_head   = (len != '0) && (body[0] == blk);
  assign on_apple  = (apple == blk);
  assign on_border = is_border(blk);

  always_comb begin
    if (!video_on)                    col = 8'h00;
    else if (on_border)               col = COL_BORDER;
    else if (on_head && body_visible) col = COL_HEAD;
    else if (on_body && body_visible) col = COL_BODY;
    else if (on_apple)                col = COL_APPLE;
    else                              col = COL_BG;
  end

  always_ff @(posedge clk) begin
    if (rst)         rgb <= 8'h00;
    else if (pix_ce) rgb <= col;
  end
endmodule
