// collision_check_tb: random fields, pieces, rotations and positions (including ones
// partly off the field), compared with the reference fit test and placement.
module collision_check_tb;
  import tetris_pkg::*;
  import tetris_ref_pkg::*;

  field_t     field, cells;
  piece_t     piece;
  logic [1:0] rot;
  pos_t       row, col;
  logic       fits;
  int checks = 0, failures = 0, n_fit = 0, n_block = 0;

  collision_check dut (.field (field), .piece (piece), .rot (rot), .row (row), .col (col),
                       .fits (fits), .cells (cells));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_field_t f, g;
    int p, r, rr, cc, density;
    for (int n = 0; n < 20000; n++) begin
      density = $urandom_range(0, 3);
      for (int i = 0; i < 20; i++)
        for (int j = 0; j < 10; j++)
          f[i][j] = ($urandom_range(0, 9) < density);
      p  = $urandom_range(1, 7);
      r  = $urandom_range(0, 3);
      rr = $urandom_range(0, 23) - 2;
      cc = $urandom_range(0, 13) - 2;
      field = field_t'(f);
      piece = piece_t'(p);
      rot   = 2'(r);
      row   = pos_t'(rr);
      col   = pos_t'(cc);
      #1;
      checks++;
      if (fits !== ref_fits(f, p, r, rr, cc)) begin
        failures++;
        $display("FAIL fits p%0d r%0d at (%0d,%0d): got %0b", p, r, rr, cc, fits);
      end
      if (fits) n_fit++; else n_block++;
      g = ref_place('0, p, r, rr, cc);
      checks++;
      if (cells !== field_t'(g)) begin
        failures++;
        $display("FAIL cells p%0d r%0d at (%0d,%0d)", p, r, rr, cc);
      end
    end
    checks++;
    if (n_fit < 100 || n_block < 100) begin
      failures++;
      $display("FAIL coverage fit=%0d blocked=%0d", n_fit, n_block);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
