// piece_shape: the 4x4 tile block of each tetromino in each rotation.
//
// For a piece number (1..7: O, I, S, Z, L, J, T) and a rotation index it returns the
// block of occupied tiles around the centre tile K, and how many distinct rotations the
// piece has (O: 1; I, S, Z: 2; L, J, T: 4). Rotation index k+1 is rotation k turned 90
// degrees counterclockwise about K; the index wraps at n_rot, so I, S and Z flip between
// their two orientations and never leave the 4x4 block. The shapes are those drawn for
// the game; the numbering of rotations is this design's. Piece 0 (none) gives an empty
// block. Purely combinational.
module piece_shape
  import tetris_pkg::*;
(
  input  piece_t     piece,
  input  logic [1:0] rot,
  output block_t     block,  // [block row y=+1..-2][block column x=-2..+1]
  output logic [2:0] n_rot   // number of distinct rotations
);

  always_comb begin
    block = '0;
    n_rot = 3'd1;
    unique case (piece)
      P_O: begin
        n_rot = 3'd1;
        block = {4'b0000, 4'b0110, 4'b0110, 4'b0000};
      end
      P_I: begin
        n_rot = 3'd2;
        if (rot[0]) block = {4'b0010, 4'b0010, 4'b0010, 4'b0010};
        else        block = {4'b0000, 4'b1111, 4'b0000, 4'b0000};
      end
      P_S: begin
        n_rot = 3'd2;
        if (rot[0]) block = {4'b0010, 4'b0011, 4'b0001, 4'b0000};
        else        block = {4'b0000, 4'b0011, 4'b0110, 4'b0000};
      end
      P_Z: begin
        n_rot = 3'd2;
        if (rot[0]) block = {4'b0001, 4'b0011, 4'b0010, 4'b0000};
        else        block = {4'b0000, 4'b0110, 4'b0011, 4'b0000};
      end
      P_L: begin
        n_rot = 3'd4;
        unique case (rot)
          2'd0:    block = {4'b0000, 4'b0111, 4'b0100, 4'b0000};
          2'd1:    block = {4'b0010, 4'b0010, 4'b0011, 4'b0000};
          2'd2:    block = {4'b0001, 4'b0111, 4'b0000, 4'b0000};
          default: block = {4'b0110, 4'b0010, 4'b0010, 4'b0000};
        endcase
      end
      P_J: begin
        n_rot = 3'd4;
        unique case (rot)
          2'd0:    block = {4'b0000, 4'b0111, 4'b0001, 4'b0000};
          2'd1:    block = {4'b0011, 4'b0010, 4'b0010, 4'b0000};
          2'd2:    block = {4'b0100, 4'b0111, 4'b0000, 4'b0000};
          default: block = {4'b0010, 4'b0010, 4'b0110, 4'b0000};
        endcase
      end
      P_T: begin
        n_rot = 3'd4;
        unique case (rot)
          2'd0:    block = {4'b0000, 4'b0111, 4'b0010, 4'b0000};
          2'd1:    block = {4'b0010, 4'b0011, 4'b0010, 4'b0000};
          2'd2:    block = {4'b0010, 4'b0111, 4'b0000, 4'b0000};
          default: block = {4'b0010, 4'b0110, 4'b0010, 4'b0000};
        endcase
      end
      default: begin
        n_rot = 3'd1;
        block = '0;
      end
    endcase
  end

endmodule
