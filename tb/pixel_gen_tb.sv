// pixel_gen_tb: sweeps every position of the 800x525 scan for several random fields and
// next-piece boxes and compares the colour with the tile map worked out here: field
// tiles 20x20 pixels from (220,40), the 4x4 next-piece box from (80,160), blue for an
// occupied tile, white for an empty one, black elsewhere and outside the visible area.
module pixel_gen_tb;
  import tetris_pkg::*;

  logic       video_on;
  logic [9:0] x, y;
  field_t     field;
  block_t     next_block;
  logic [2:0] rgb;
  int checks = 0, failures = 0, n_blue = 0, n_white = 0, n_black = 0;

  pixel_gen dut (.video_on (video_on), .x (x), .y (y), .field (field),
                 .next_block (next_block), .rgb (rgb));

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [199:0] f;
    bit [15:0]  nb;
    logic [2:0] exp;
    for (int n = 0; n < 3; n++) begin
      for (int i = 0; i < 200; i++) f[i] = $urandom_range(0, 1);
      nb = 16'($urandom());
      field = field_t'(f);
      next_block = block_t'(nb);
      for (int yy = 0; yy < 525; yy++) begin
        for (int xx = 0; xx < 800; xx++) begin
          x = 10'(xx);
          y = 10'(yy);
          video_on = (xx < 640 && yy < 480);
          #1;
          exp = 3'b000;
          if (xx < 640 && yy < 480) begin
            if (xx >= 220 && xx < 420 && yy >= 40 && yy < 440)
              exp = f[((yy - 40) / 20) * 10 + (xx - 220) / 20] ? 3'b001 : 3'b111;
            else if (xx >= 80 && xx < 160 && yy >= 160 && yy < 240)
              // block_t packs block row 0 / column 0 into the top bits.
              exp = nb[15 - (((yy - 160) / 20) * 4 + (xx - 80) / 20)] ? 3'b001 : 3'b111;
          end
          checks++;
          if (rgb !== exp) begin
            failures++;
            if (failures < 20) $display("FAIL (%0d,%0d) rgb %03b expected %03b", xx, yy, rgb, exp);
          end
          if (exp == 3'b001) n_blue++;
          else if (exp == 3'b111) n_white++;
          else n_black++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
