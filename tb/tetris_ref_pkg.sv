// tetris_ref_pkg: reference Tetris rules for the testbenches.
//
// Written from the game rules alone, in a different form from the RTL: each tetromino
// is a list of four (x, y) tile offsets from its centre K (x to the right, y upwards) in
// its first orientation, and the other orientations are made by turning that list
// counterclockwise, (x, y) -> (-y, x). A field is 20 rows of 10 bits, row 0 at the top.
// Functions: number of orientations, tile offsets, fit test, placing a piece, deleting
// the lowest full row and drawing the 4x4 next-piece box.
package tetris_ref_pkg;

  typedef bit [9:0] ref_row_t;
  typedef ref_row_t [19:0] ref_field_t;

  function automatic int ref_nrot(int piece);
    case (piece)
      1:       return 1;
      2, 3, 4: return 2;
      default: return 4;
    endcase
  endfunction

  // Tile offsets of piece 1..7 (O I S Z L J T) in orientation rot.
  function automatic void ref_cells(input int piece, input int rot,
                                    output int xs[4], output int ys[4]);
    int base_x[4], base_y[4], t;
    case (piece)
      1: begin base_x = '{-1, 0, -1, 0};  base_y = '{0, 0, -1, -1}; end
      2: begin base_x = '{-2, -1, 0, 1};  base_y = '{0, 0, 0, 0};   end
      3: begin base_x = '{0, 1, -1, 0};   base_y = '{0, 0, -1, -1}; end
      4: begin base_x = '{-1, 0, 0, 1};   base_y = '{0, 0, -1, -1}; end
      5: begin base_x = '{-1, 0, 1, -1};  base_y = '{0, 0, 0, -1};  end
      6: begin base_x = '{-1, 0, 1, 1};   base_y = '{0, 0, 0, -1};  end
      default: begin base_x = '{-1, 0, 1, 0}; base_y = '{0, 0, 0, -1}; end
    endcase
    xs = base_x;
    ys = base_y;
    for (int k = 0; k < (rot % ref_nrot(piece)); k++) begin
      for (int i = 0; i < 4; i++) begin
        t     = xs[i];
        xs[i] = -ys[i];
        ys[i] = t;
      end
    end
  endfunction

  function automatic bit ref_fits(ref_field_t f, int piece, int rot, int row, int col);
    int xs[4], ys[4], r, c;
    ref_cells(piece, rot, xs, ys);
    for (int i = 0; i < 4; i++) begin
      r = row - ys[i];
      c = col + xs[i];
      if (r < 0 || r > 19 || c < 0 || c > 9) return 0;
      if (f[r][c]) return 0;
    end
    return 1;
  endfunction

  function automatic ref_field_t ref_place(ref_field_t f, int piece, int rot, int row, int col);
    int xs[4], ys[4], r, c;
    ref_field_t g = f;
    ref_cells(piece, rot, xs, ys);
    for (int i = 0; i < 4; i++) begin
      r = row - ys[i];
      c = col + xs[i];
      if (r >= 0 && r <= 19 && c >= 0 && c <= 9) g[r][c] = 1'b1;
    end
    return g;
  endfunction

  // Deletes the lowest full row; returns 1 if there was one.
  function automatic bit ref_clear(ref_field_t f, output ref_field_t g);
    g = f;
    for (int r = 19; r >= 0; r--) begin
      if (f[r] == 10'h3FF) begin
        for (int k = r; k > 0; k--) g[k] = f[k-1];
        g[0] = '0;
        return 1;
      end
    end
    return 0;
  endfunction

  function automatic int ref_full_rows(ref_field_t f);
    int n = 0;
    for (int r = 0; r < 20; r++) if (f[r] == 10'h3FF) n++;
    return n;
  endfunction

  // Next-piece box: bit [4*br + bc], br = 1 - y, bc = x + 2.
  function automatic bit [15:0] ref_box(int piece);
    int xs[4], ys[4];
    bit [15:0] b = '0;
    if (piece < 1 || piece > 7) return b;
    ref_cells(piece, 0, xs, ys);
    for (int i = 0; i < 4; i++) b[4 * (1 - ys[i]) + (xs[i] + 2)] = 1'b1;
    return b;
  endfunction

endpackage
