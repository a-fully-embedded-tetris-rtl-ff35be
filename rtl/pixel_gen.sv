// pixel_gen: tile-mapped colour of each screen pixel.
//
// The screen is not stored pixel by pixel. The playing field is a 200x400 pixel area
// cut into 20x20 pixel tiles, 10 across and 20 down, and each tile takes the colour of
// one bit of the 20x10 'field' array (falling piece already merged in): blue when
// occupied, white when empty. A 4x4 tile box to the left of the field shows the next
// piece the same way from 'next_block'. Everything else, and the blanking interval, is
// black. The output is a 3-bit {R,G,B} colour for the pixel at (x, y). Tile size, field
// size, the 4x4 next-piece box on the left and blue pieces on a light background follow
// the game's screens; the exact screen positions are this design's. Purely
// combinational.
module pixel_gen
  import tetris_pkg::*;
#(
  parameter int FIELD_X0 = 220,  // left edge of the playing field
  parameter int FIELD_Y0 = 40,   // top edge of the playing field
  parameter int NEXT_X0  = 80,   // left edge of the next-piece box
  parameter int NEXT_Y0  = 160   // top edge of the next-piece box
) (
  input  logic       video_on,
  input  logic [9:0] x,
  input  logic [9:0] y,
  input  field_t     field,
  input  block_t     next_block,
  output logic [2:0] rgb
);

  localparam int FIELD_W = COLS * TILE_PX;
  localparam int FIELD_H = ROWS * TILE_PX;
  localparam int NEXT_W  = 4 * TILE_PX;

  logic [9:0] fx, fy, nx, ny;
  logic [4:0] t_row;
  logic [3:0] t_col;
  logic [1:0] n_row, n_col;
  logic       in_field, in_next;

  always_comb begin
    fx       = x - 10'(FIELD_X0);
    fy       = y - 10'(FIELD_Y0);
    nx       = x - 10'(NEXT_X0);
    ny       = y - 10'(NEXT_Y0);
    in_field = x >= 10'(FIELD_X0) && x < 10'(FIELD_X0 + FIELD_W) &&
               y >= 10'(FIELD_Y0) && y < 10'(FIELD_Y0 + FIELD_H);
    in_next  = x >= 10'(NEXT_X0) && x < 10'(NEXT_X0 + NEXT_W) &&
               y >= 10'(NEXT_Y0) && y < 10'(NEXT_Y0 + NEXT_W);
    t_row    = 5'(fy / 10'(TILE_PX));
    t_col    = 4'(fx / 10'(TILE_PX));
    n_row    = 2'(ny / 10'(TILE_PX));
    n_col    = 2'(nx / 10'(TILE_PX));

    rgb = C_BLACK;
    if (video_on) begin
      if (in_field)     rgb = field[t_row][t_col]      ? C_BLUE : C_WHITE;
      else if (in_next) rgb = next_block[n_row][n_col] ? C_BLUE : C_WHITE;
    end
  end

endmodule
