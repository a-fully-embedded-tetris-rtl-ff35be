// random_piece_tb: over 140,000 clocks checks that the piece number is always 1..7,
// that it follows the 16-bit LFSR worked out here (taps 16, 14, 13, 11; piece = value
// mod 7, plus 1), and that each of the seven pieces turns up
// between 12% and 17% of the time.
module random_piece_tb;
  import tetris_pkg::*;

  logic   clk = 1'b0, rst = 1'b1;
  piece_t piece;
  int checks = 0, failures = 0;
  int count[8];
  bit [15:0] model;
  int exp_piece;

  random_piece dut (.clk (clk), .rst (rst), .piece (piece));

  always #5 clk = ~clk;

  initial begin
    #(10 * 1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit fb;
    count = '{default: 0};
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    model = 16'hACE1;
    exp_piece = 7;
    @(negedge clk);
    for (int n = 0; n < 140_000; n++) begin
      checks++;
      if (int'(piece) != exp_piece || piece == P_NONE) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d piece %0d expected %0d", n, piece, exp_piece);
      end
      count[piece]++;
      exp_piece = model % 7 + 1;
      fb = model[15] ^ model[13] ^ model[12] ^ model[10];
      model = (model << 1) | 16'(fb);
      @(negedge clk);
    end
    for (int p = 1; p <= 7; p++) begin
      checks++;
      if (count[p] < 17_000 || count[p] > 23_000) begin
        failures++;
        $display("FAIL piece %0d appeared %0d times", p, count[p]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
