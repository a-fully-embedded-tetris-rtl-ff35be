// tetris_top_tb: end-to-end test of the whole game at a game tick of 25 kHz instead of
// 4 Hz (every 2,000 clocks, about 420 game steps per VGA frame), with the 50 MHz clock
// and 25 MHz pixel rate unchanged. The player plays several games through the
// push-buttons while every pixel and sync level is checked. Each mechanism must have
// happened at least once: moves right and left made and refused at a wall or stack,
// turns made and refused, drops and landings, piece changes, a row deletion, two rows
// deleted one after the other (minus/hold/minus), the end of a game and a reset.
module tetris_top_tb;
  import tetris_pkg::*;

  localparam int unsigned GAME_HZ = 25_000;
  localparam int MAX_TICKS = 20_000;

  logic       clk = 1'b0;
  logic       reset_sw;
  logic [2:0] key_n;
  logic [3:0] vga_r, vga_g, vga_b;
  logic       vga_hs, vga_vs;

  always #10 clk = ~clk;

  tetris_top #(.GAME_HZ(GAME_HZ)) dut (
    .clk_50 (clk), .reset_sw (reset_sw), .key_n (key_n),
    .vga_r (vga_r), .vga_g (vga_g), .vga_b (vga_b), .vga_hs (vga_hs), .vga_vs (vga_vs)
  );

  tetris_player #(.GAME_HZ(GAME_HZ)) player (
    .clk (clk), .rst (dut.rst), .pix_tick (dut.pix_tick), .game_tick (dut.game_tick),
    .new_piece (dut.new_piece), .vga_r (vga_r), .vga_g (vga_g), .vga_b (vga_b),
    .vga_hs (vga_hs), .vga_vs (vga_vs), .reset_sw (reset_sw), .key_n (key_n)
  );

  int extra_failures = 0;

  initial begin
    #(64'd20 * 64'd2000 * (MAX_TICKS + 100));
    $display("TB_RESULT checks=%0d failures=%0d", player.checks, player.failures + 1);
    $finish;
  end

  function automatic bit all_seen();
    return player.n_right_ok > 0 && player.n_right_no > 0 && player.n_left_ok > 0 &&
           player.n_left_no > 0 && player.n_turn_ok > 0 && player.n_turn_no > 0 &&
           player.n_down_ok > 0 && player.n_down_no > 0 && player.n_change > 0 &&
           player.n_clear > 0 && player.n_clear_again > 0 && player.n_over > 0 &&
           player.n_games > 0 && player.frames > 0;
  endfunction

  initial begin
    wait (player.ticks > 0);
    while (player.ticks < MAX_TICKS && !(all_seen() && player.ticks > 2000))
      @(posedge clk);
    $display("ticks %0d frames %0d pixels %0d games %0d", player.ticks, player.frames,
             player.pixels, player.n_games);
    $display("right %0d/%0d left %0d/%0d turn %0d/%0d down %0d/%0d change %0d clear %0d (again %0d) over %0d",
             player.n_right_ok, player.n_right_no, player.n_left_ok, player.n_left_no,
             player.n_turn_ok, player.n_turn_no, player.n_down_ok, player.n_down_no,
             player.n_change, player.n_clear, player.n_clear_again, player.n_over);
    if (!all_seen()) begin
      extra_failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", player.checks + 1,
             player.failures + extra_failures);
    $finish;
  end
endmodule
