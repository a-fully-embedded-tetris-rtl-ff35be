// piece_shape_tb: checks every tetromino in every rotation index against the reference
// tile lists (first orientation, others by turning counterclockwise), the number of
// rotations, and that piece 0 is empty. Combinational; no clock.
module piece_shape_tb;
  import tetris_pkg::*;
  import tetris_ref_pkg::*;

  piece_t     piece;
  logic [1:0] rot;
  block_t     block;
  logic [2:0] n_rot;
  int checks = 0, failures = 0;

  piece_shape dut (.piece (piece), .rot (rot), .block (block), .n_rot (n_rot));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [15:0] exp;
    int xs[4], ys[4];
    for (int p = 0; p < 8; p++) begin
      for (int r = 0; r < 4; r++) begin
        piece = piece_t'(p);
        rot   = 2'(r);
        #1;
        exp = '0;
        if (p != 0) begin
          ref_cells(p, r, xs, ys);
          for (int i = 0; i < 4; i++) exp[4 * (1 - ys[i]) + (xs[i] + 2)] = 1'b1;
        end
        for (int br = 0; br < 4; br++)
          for (int bc = 0; bc < 4; bc++) begin
            checks++;
            if (block[br][bc] !== exp[4 * br + bc]) begin
              failures++;
              $display("FAIL piece %0d rot %0d tile (%0d,%0d): got %0b", p, r, br, bc,
                       block[br][bc]);
            end
          end
        checks++;
        if (p != 0 && int'(n_rot) != ref_nrot(p)) begin
          failures++;
          $display("FAIL piece %0d n_rot %0d", p, n_rot);
        end
        checks++;
        if (p != 0 && $countones(block) != 4) begin
          failures++;
          $display("FAIL piece %0d rot %0d has %0d tiles", p, r, $countones(block));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
