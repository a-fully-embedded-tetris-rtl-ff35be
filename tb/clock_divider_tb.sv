// clock_divider_tb: at the default 50 MHz / 25 MHz / 4 Hz setting, checks that the pixel
// tick is a one-cycle pulse every 2 clocks and the game tick a one-cycle pulse every
// 12,500,000 clocks (0.25 s), including the distance of the first ticks from reset.
module clock_divider_tb;
  logic clk = 1'b0, rst = 1'b1;
  logic pix_tick, game_tick;
  int checks = 0, failures = 0;
  longint cycle = 0, last_pix = 0, last_game = 0;
  int n_pix = 0, n_game = 0;

  localparam longint PIX_PERIOD  = 2;
  localparam longint GAME_PERIOD = 50_000_000 / 4;

  clock_divider dut (.clk (clk), .rst (rst), .pix_tick (pix_tick), .game_tick (game_tick));

  always #5 clk = ~clk;

  initial begin
    #(10 * 40_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst) begin
      cycle <= cycle + 1;
      if (pix_tick) begin
        checks++;
        if (cycle - last_pix != PIX_PERIOD) begin
          failures++;
          if (failures < 10) $display("FAIL pix tick spacing %0d", cycle - last_pix);
        end
        last_pix <= cycle;
        n_pix++;
      end
      if (game_tick) begin
        checks++;
        if (cycle - last_game != GAME_PERIOD) begin
          failures++;
          $display("FAIL game tick spacing %0d", cycle - last_game);
        end
        last_game <= cycle;
        n_game++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // 'cycle' counts clocks after reset; the first ticks come one period after cycle 0.
    wait (n_game == 2);
    repeat (4) @(posedge clk);
    checks++;
    if (n_pix != int'((2 * GAME_PERIOD + 4) / PIX_PERIOD) - 1) begin
      failures++;
      $display("FAIL %0d pixel ticks", n_pix);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
