// random_piece: pseudo-random choice of the next tetromino.
//
// A 16-bit maximal-length Fibonacci LFSR (taps 16, 14, 13, 11) advances on every clock
// cycle, and every cycle the 'piece' register loads (LFSR mod 7) + 1, a piece number
// 1..7 (1 = O ... 7 = T) with all seven almost equally likely. Because the LFSR runs at the system clock while the game asks for a new
// piece only a few times a second, the moment a player's moves end decides which piece
// comes next. 'piece' is never 0. The LFSR itself and its seed are this design's choice;
// the game only asks for a random number mapped onto the seven pieces.
module random_piece
  import tetris_pkg::*;
#(
  parameter logic [15:0] SEED = 16'hACE1  // any non-zero value
) (
  input  logic   clk,
  input  logic   rst,    // synchronous, active high
  output piece_t piece
);

  logic [15:0] lfsr;

  always_ff @(posedge clk) begin
    if (rst) begin
      lfsr  <= SEED;
      piece <= P_T;
    end else begin
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      piece <= piece_t'(3'(lfsr % 16'd7) + 3'd1);
    end
  end

  // The game never asks for "no piece", and an all-zero LFSR would stick.
  a_piece_valid: assert property (@(posedge clk) disable iff (rst) piece != P_NONE);
  a_lfsr_alive:  assert property (@(posedge clk) disable iff (rst) lfsr != '0);

endmodule
