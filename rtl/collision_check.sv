// collision_check: are a piece's target tiles inside the field and empty?
//
// Places the 4x4 block of a piece, rotation and centre position (K at row, col) on the
// 20x10 field. Block tile (br, bc) lands on field row row+br-1 and column col+bc-2.
// 'fits' is 1 when every occupied block tile is within the field boundaries and lands on
// an empty field tile; 'cells' is the piece drawn on an otherwise empty field (tiles that
// fall outside are dropped), used both to show the falling piece and to write it into
// the field when it comes to rest. The game checks the target tiles of each move
// (right, left, rotate, down) this way before making it; the placement arithmetic is this
// design's. Purely combinational.
module collision_check
  import tetris_pkg::*;
(
  input  field_t     field,
  input  piece_t     piece,
  input  logic [1:0] rot,
  input  pos_t       row,
  input  pos_t       col,
  output logic       fits,
  output field_t     cells
);

  block_t     block;
  logic [2:0] n_rot_unused;

  piece_shape u_shape (
    .piece (piece),
    .rot   (rot),
    .block (block),
    .n_rot (n_rot_unused)
  );

  always_comb begin
    pos_t fr, fc;
    fits  = 1'b1;
    cells = '0;
    for (int br = 0; br < 4; br++) begin
      for (int bc = 0; bc < 4; bc++) begin
        fr = row + pos_t'(br) - pos_t'(1);
        fc = col + pos_t'(bc) - pos_t'(2);
        if (block[br][bc]) begin
          if (fr < 0 || fr >= pos_t'(ROWS) || fc < 0 || fc >= pos_t'(COLS)) begin
            fits = 1'b0;
          end else begin
            if (field[fr[4:0]][fc[3:0]]) fits = 1'b0;
            cells[fr[4:0]][fc[3:0]] = 1'b1;
          end
        end
      end
    end
  end

endmodule
