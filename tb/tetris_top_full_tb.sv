// tetris_top_full_tb: the whole game at its real settings (50 MHz clock, 25 MHz pixels,
// 4 Hz game tick). From reset it presses key 0, then key 1, then nothing, so the first
// piece goes zero -> right -> zero -> turn -> zero -> down -> zero over six game ticks
// (1.5 s of play, 75 million clocks, about 89 VGA frames), while every pixel and sync
// level of every frame is checked. The game ticks must come exactly 12,500,000 clocks
// apart and the piece must have moved right, turned and dropped once each.
module tetris_top_full_tb;
  import tetris_pkg::*;

  logic       clk = 1'b0;
  logic       reset_sw;
  logic [2:0] key_n;
  logic [3:0] vga_r, vga_g, vga_b;
  logic       vga_hs, vga_vs;

  always #10 clk = ~clk;

  tetris_top dut (
    .clk_50 (clk), .reset_sw (reset_sw), .key_n (key_n),
    .vga_r (vga_r), .vga_g (vga_g), .vga_b (vga_b), .vga_hs (vga_hs), .vga_vs (vga_vs)
  );

  tetris_player #(.SCRIPTED(1'b1), .PLAY_RANDOM_EVERY(0)) player (
    .clk (clk), .rst (dut.rst), .pix_tick (dut.pix_tick), .game_tick (dut.game_tick),
    .new_piece (dut.new_piece), .vga_r (vga_r), .vga_g (vga_g), .vga_b (vga_b),
    .vga_hs (vga_hs), .vga_vs (vga_vs), .reset_sw (reset_sw), .key_n (key_n)
  );

  int extra_checks = 0, extra_failures = 0;
  longint cycle = 0, last_tick = 0;

  always @(posedge clk) begin
    if (dut.rst) begin
      cycle <= 0;
      last_tick <= 0;
    end else begin
      cycle <= cycle + 1;
      if (dut.game_tick) begin
        extra_checks++;
        if (cycle - last_tick != 12_500_000) begin
          extra_failures++;
          $display("FAIL game tick after %0d clocks", cycle - last_tick);
        end
        last_tick <= cycle;
      end
    end
  end

  initial begin
    #(64'd20 * 64'd80_000_000);
    $display("TB_RESULT checks=%0d failures=%0d", player.checks, player.failures + 1);
    $finish;
  end

  initial begin
    wait (player.ticks == 6);
    repeat (10) @(posedge clk);
    $display("ticks %0d frames %0d pixels %0d right %0d turn %0d down %0d", player.ticks,
             player.frames, player.pixels, player.n_right_ok, player.n_turn_ok,
             player.n_down_ok);
    extra_checks++;
    if (player.n_right_ok != 1 || player.n_turn_ok != 1 || player.n_down_ok != 1 ||
        player.frames < 80) begin
      extra_failures++;
      $display("FAIL expected one right move, one turn and one drop over 80+ frames");
    end
    $display("TB_RESULT checks=%0d failures=%0d", player.checks + extra_checks,
             player.failures + extra_failures);
    $finish;
  end
endmodule
