// tetris_pkg: types and constants shared by the Tetris game modules.
//
// The playing field is tile-mapped: 20 rows by 10 columns of tiles, each tile one bit
// (occupied or empty) and drawn as a 20x20 pixel square. Row 0 is the top row and column
// 0 the left column, so tile (0,0) is the top-left corner and (19,9) the bottom-right one.
// A falling piece is a 4x4 tile block placed by its centre tile K. Inside the block,
// rows run from y=+1 (block row 0) down to y=-2 (block row 3) and columns from x=-2
// (block column 0) to x=+1 (block column 3); K is at block row 1, column 2. The field
// size, tile size, the seven piece numbers and the eight FSM state names follow the game
// description; the state encoding and the spawn position are this design's choice.
package tetris_pkg;

  localparam int ROWS    = 20;  // field height in tiles
  localparam int COLS    = 10;  // field width in tiles
  localparam int TILE_PX = 20;  // tile edge in pixels

  // Row and column of a piece centre; signed so that off-field targets can be formed.
  localparam int POS_W = 6;
  typedef logic signed [POS_W-1:0] pos_t;

  // Where a new piece appears: K in the second row, just right of the middle, so that
  // every rotation of a new piece still fits inside the top of the field.
  localparam pos_t SPAWN_ROW = 6'sd1;
  localparam pos_t SPAWN_COL = 6'sd5;

  // One row of tiles, bit c = column c; the field, index r = row r.
  typedef logic [COLS-1:0] row_t;
  typedef row_t [ROWS-1:0] field_t;

  // 4x4 piece block: [block row][block column], block row 0 = y=+1, block column 0 = x=-2.
  typedef logic [0:3][0:3] block_t;

  // The seven tetrominoes, numbered as in the game description (1 = O ... 7 = T).
  typedef enum logic [2:0] {
    P_NONE = 3'd0,
    P_O    = 3'd1,
    P_I    = 3'd2,
    P_S    = 3'd3,
    P_Z    = 3'd4,
    P_L    = 3'd5,
    P_J    = 3'd6,
    P_T    = 3'd7
  } piece_t;

  // The eight states of the main game FSM.
  typedef enum logic [2:0] {
    ST_ZERO   = 3'd0,
    ST_RIGHT  = 3'd1,
    ST_LEFT   = 3'd2,
    ST_TURN   = 3'd3,
    ST_DOWN   = 3'd4,
    ST_CHANGE = 3'd5,
    ST_MINUS  = 3'd6,
    ST_HOLD   = 3'd7
  } state_t;

  // 3-bit colours {R,G,B} used by the pixel generator.
  localparam logic [2:0] C_BLACK = 3'b000;
  localparam logic [2:0] C_WHITE = 3'b111;
  localparam logic [2:0] C_BLUE  = 3'b001;

endpackage
