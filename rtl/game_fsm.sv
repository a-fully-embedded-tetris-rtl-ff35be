// game_fsm: the main game code, an eight-state FSM over a tile-mapped field.
//
// The settled tiles live in a 20x10 one-bit array ('field'); the falling piece is kept
// as a piece number, a rotation index and the field position of its centre tile K. The
// FSM takes one step per game tick (4 Hz):
//   zero   - read the keys: key 0 -> right, else key 2 -> left, else key 1 -> turn,
//            no key -> down.
//   right / left - if the target tiles one column over are inside the field and empty,
//            move there and go to zero; otherwise stay and go to down.
//   turn   - if the tiles of the piece turned 90 degrees counterclockwise are free,
//            turn and go to zero; otherwise go to change.
//   down   - if the tiles one row below are free, move down and go to zero; otherwise
//            (bottom boundary or collision) go to change.
//   change - write the piece into the field, bring in the waiting next piece at the top
//            and draw a new next piece from 'new_piece'; go to minus.
//   minus  - if a row is complete, delete it (rows above move down) and go to hold;
//            otherwise go to zero.
//   hold   - go back to minus to look for a further complete row.
// Reset returns to zero with an empty field. All target-tile checks run in parallel, one
// collision_check per candidate move, so each step needs one clock cycle when its tick
// comes. The states, their order of key priority and all transitions follow the game's
// state diagram and transition table, including that a blocked turn ends the piece's
// fall. The end of the game, when a freshly brought-in piece already overlaps the stack,
// is this design's reading: 'game_over' is raised in zero and the FSM then stays frozen
// until reset. 'display' is the field with the falling piece drawn in, for the screen.
module game_fsm
  import tetris_pkg::*;
(
  input  logic       clk,
  input  logic       rst,         // synchronous, active high
  input  logic       tick,        // game tick: one FSM step
  input  logic       key_right,   // key 0, active high
  input  logic       key_turn,    // key 1, active high
  input  logic       key_left,    // key 2, active high
  input  piece_t     new_piece,   // random piece number 1..7
  output state_t     state,
  output field_t     field,       // settled tiles
  output field_t     display,     // settled tiles plus the falling piece
  output piece_t     cur_piece,
  output logic [1:0] cur_rot,
  output pos_t       cur_row,
  output pos_t       cur_col,
  output piece_t     next_piece,
  output logic       game_over
);

  // ---------------------------------------------------------------- target-tile checks
  logic       fit_cur, fit_right, fit_left, fit_turn, fit_down;
  field_t     cells_cur, cells_unused_r, cells_unused_l, cells_unused_t, cells_unused_d;
  block_t     block_unused;
  logic [2:0] n_rot;
  logic [1:0] turn_rot;

  piece_shape u_rot_count (
    .piece (cur_piece), .rot (cur_rot), .block (block_unused), .n_rot (n_rot)
  );

  always_comb begin
    turn_rot = (3'(cur_rot) + 3'd1 >= n_rot) ? 2'd0 : cur_rot + 2'd1;
  end

  collision_check u_chk_cur (
    .field (field), .piece (cur_piece), .rot (cur_rot),
    .row (cur_row), .col (cur_col), .fits (fit_cur), .cells (cells_cur)
  );
  collision_check u_chk_right (
    .field (field), .piece (cur_piece), .rot (cur_rot),
    .row (cur_row), .col (cur_col + pos_t'(1)), .fits (fit_right), .cells (cells_unused_r)
  );
  collision_check u_chk_left (
    .field (field), .piece (cur_piece), .rot (cur_rot),
    .row (cur_row), .col (cur_col - pos_t'(1)), .fits (fit_left), .cells (cells_unused_l)
  );
  collision_check u_chk_turn (
    .field (field), .piece (cur_piece), .rot (turn_rot),
    .row (cur_row), .col (cur_col), .fits (fit_turn), .cells (cells_unused_t)
  );
  collision_check u_chk_down (
    .field (field), .piece (cur_piece), .rot (cur_rot),
    .row (cur_row + pos_t'(1)), .col (cur_col), .fits (fit_down), .cells (cells_unused_d)
  );

  // ---------------------------------------------------------------- completed rows
  logic       any_full;
  logic [4:0] full_row_unused;
  field_t     field_cleared;

  row_clear u_rows (
    .field (field), .any_full (any_full), .full_row (full_row_unused),
    .field_out (field_cleared)
  );

  // ---------------------------------------------------------------- state register
  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= ST_ZERO;
      field      <= '0;
      cur_piece  <= new_piece;
      next_piece <= new_piece;
      cur_rot    <= '0;
      cur_row    <= SPAWN_ROW;
      cur_col    <= SPAWN_COL;
      game_over  <= 1'b0;
    end else if (tick && !game_over) begin
      unique case (state)
        ST_ZERO: begin
          if (!fit_cur)       game_over <= 1'b1;
          else if (key_right) state <= ST_RIGHT;
          else if (key_left)  state <= ST_LEFT;
          else if (key_turn)  state <= ST_TURN;
          else                state <= ST_DOWN;
        end
        ST_RIGHT: begin
          if (fit_right) begin
            cur_col <= cur_col + pos_t'(1);
            state   <= ST_ZERO;
          end else begin
            state   <= ST_DOWN;
          end
        end
        ST_LEFT: begin
          if (fit_left) begin
            cur_col <= cur_col - pos_t'(1);
            state   <= ST_ZERO;
          end else begin
            state   <= ST_DOWN;
          end
        end
        ST_TURN: begin
          if (fit_turn) begin
            cur_rot <= turn_rot;
            state   <= ST_ZERO;
          end else begin
            state   <= ST_CHANGE;
          end
        end
        ST_DOWN: begin
          if (fit_down) begin
            cur_row <= cur_row + pos_t'(1);
            state   <= ST_ZERO;
          end else begin
            state   <= ST_CHANGE;
          end
        end
        ST_CHANGE: begin
          field      <= field | cells_cur;
          cur_piece  <= next_piece;
          next_piece <= new_piece;
          cur_rot    <= '0;
          cur_row    <= SPAWN_ROW;
          cur_col    <= SPAWN_COL;
          state      <= ST_MINUS;
        end
        ST_MINUS: begin
          if (any_full) begin
            field <= field_cleared;
            state <= ST_HOLD;
          end else begin
            state <= ST_ZERO;
          end
        end
        ST_HOLD: state <= ST_MINUS;
        default: state <= ST_ZERO;
      endcase
    end
  end

  assign display = field | cells_cur;

  // The field only ever holds tiles that were free when the piece was written.
  a_no_overlap_on_write: assert property (
    @(posedge clk) disable iff (rst)
      (tick && !game_over && state == ST_CHANGE) |-> ((field & cells_cur) == '0)
  );

endmodule
