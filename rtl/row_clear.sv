// row_clear: finds a completed row of the field and deletes it.
//
// A row is complete when all ten of its tiles are occupied. 'any_full' flags that at
// least one such row exists and 'full_row' gives the lowest one (largest row index).
// 'field_out' is the field with that single row removed: every row above it moves down
// by one and the top row becomes empty; rows below it are unchanged. The game deletes
// one row per pass and checks again, so several completed rows are removed in turn.
// Deleting the lowest row first is this design's choice. Purely combinational.
module row_clear
  import tetris_pkg::*;
(
  input  field_t     field,
  output logic       any_full,
  output logic [4:0] full_row,
  output field_t     field_out
);

  always_comb begin
    any_full = 1'b0;
    full_row = '0;
    for (int r = 0; r < ROWS; r++) begin
      if (&field[r]) begin
        any_full = 1'b1;
        full_row = 5'(r);
      end
    end
  end

  always_comb begin
    field_out = field;
    if (any_full) begin
      for (int r = 1; r < ROWS; r++) begin
        if (5'(r) <= full_row) field_out[r] = field[r-1];
      end
      field_out[0] = '0;
    end
  end

endmodule
