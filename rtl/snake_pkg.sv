// snake_pkg: types and constants shared by the snake game.
//
// The screen is 640x480 pixels cut into 8x8-pixel blocks, giving a playfield
// grid of 80 x 60 blocks; all game objects (snake segments, apple) live on that
// grid. A grid cell is a packed {x, y} pair. The snake body is held in at most
// 50 cells and starts with 3. The outermost ring of blocks is the border.
// The movement direction is a 5-bit one-hot code: four headings plus a
// "stopped" code for the stationary snake shown before a game starts.
package snake_pkg;

  localparam int unsigned GRID_W   = 80;  // blocks per row    (640 / 8)
  localparam int unsigned GRID_H   = 60;  // blocks per column (480 / 8)
  localparam int unsigned BLOCK_PX = 8;   // pixels per block side
  localparam int unsigned MAX_LEN  = 50;  // longest snake, in blocks
  localparam int unsigned INIT_LEN = 3;   // snake length at game start
  localparam int unsigned LEN_W    = 6;   // bits to count 0..MAX_LEN

  localparam int unsigned X_W = 7;        // bits of a block column (0..79)
  localparam int unsigned Y_W = 6;        // bits of a block row    (0..59)

  typedef struct packed {
    logic [X_W-1:0] x;
    logic [Y_W-1:0] y;
  } cell_t;

  // Snake heading, one-hot.
  typedef enum logic [4:0] {
    DIR_STOP  = 5'b00001,
    DIR_UP    = 5'b00010,
    DIR_DOWN  = 5'b00100,
    DIR_LEFT  = 5'b01000,
    DIR_RIGHT = 5'b10000
  } dir_t;

  // Game controller state.
  typedef enum logic [1:0] {
    GS_READY = 2'd0,   // after reset: snake shown stationary, waiting for start
    GS_RUN   = 2'd1,   // playing
    GS_OVER  = 2'd2    // lethal collision: frozen, body flashing
  } game_state_t;

  // Initial snake: head in the middle of the field, body trailing to the left.
  localparam cell_t START_HEAD = '{x: 7'd40, y: 6'd30};

  // One block step in direction d (STOP gives the same cell).
  function automatic cell_t step_cell(cell_t c, dir_t d);
    cell_t n;
    n = c;
    unique case (d)
      DIR_UP:    n.y = c.y - 1'b1;
      DIR_DOWN:  n.y = c.y + 1'b1;
      DIR_LEFT:  n.x = c.x - 1'b1;
      DIR_RIGHT: n.x = c.x + 1'b1;
      default:   n = c;
    endcase
    return n;
  endfunction

  // A cell on the one-block border ring around the field.
  function automatic logic is_border(cell_t c);
    return (c.x == '0) || (c.x == X_W'(GRID_W - 1)) ||
           (c.y == '0) || (c.y == Y_W'(GRID_H - 1));
  endfunction

endpackage
