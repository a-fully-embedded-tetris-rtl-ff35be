// tetris_top: a complete, memory-free Tetris game with VGA output.
//
// Three parts, all in the 50 MHz board clock domain:
//   - clock_divider turns the board clock into a 25 MHz pixel tick and a 4 Hz game tick;
//   - game_fsm (with random_piece feeding it new pieces) runs the game, one state step
//     per game tick, from the three push-buttons;
//   - vga_sync and pixel_gen draw the 20x10 tile field and the next-piece box on a
//     640x480, 60 Hz VGA screen straight from the game's registers.
// No RAM is used anywhere: the field is 200 flip-flops and the picture is computed per
// pixel from them. Push-buttons are active low, as on the usual development boards, and
// pass through two-flop synchronisers; key 0 moves right, key 1 turns the piece 90
// degrees counterclockwise and key 2 moves left. reset_sw is an active-high reset
// switch, also synchronised. The 3-bit pixel colour is widened to the board's 4-bit
// R, G and B DAC inputs by repeating each bit; colour, hsync and vsync leave through one
// register stage that loads on the pixel tick, so the picture is one pixel period behind
// the counters and all three stay aligned. The partition into clock divide, game code
// and VGA sync follows the game's block diagram; the synchronisers, the single clock
// domain with enables and the output register are this design's choices.
module tetris_top
  import tetris_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned PIX_HZ  = 25_000_000,
  parameter int unsigned GAME_HZ = 4
) (
  input  logic       clk_50,
  input  logic       reset_sw,   // active high
  input  logic [2:0] key_n,      // push-buttons, active low: 0 right, 1 turn, 2 left
  output logic [3:0] vga_r,
  output logic [3:0] vga_g,
  output logic [3:0] vga_b,
  output logic       vga_hs,
  output logic       vga_vs
);

  // ---------------------------------------------------------------- input synchronisers
  logic [1:0] rst_sync;
  logic [2:0] key_meta, key_sync;
  logic       rst;

  always_ff @(posedge clk_50) begin
    rst_sync <= {rst_sync[0], reset_sw};
    key_meta <= ~key_n;
    key_sync <= key_meta;
  end
  assign rst = rst_sync[1];

  // ---------------------------------------------------------------- clocks
  logic pix_tick, game_tick;

  clock_divider #(.CLK_HZ(CLK_HZ), .PIX_HZ(PIX_HZ), .GAME_HZ(GAME_HZ)) u_clkdiv (
    .clk (clk_50), .rst (rst), .pix_tick (pix_tick), .game_tick (game_tick)
  );

  // ---------------------------------------------------------------- game
  piece_t     new_piece, cur_piece, next_piece;
  state_t     state;
  field_t     field, display;
  logic [1:0] cur_rot;
  pos_t       cur_row, cur_col;
  logic       game_over;

  random_piece u_rand (.clk (clk_50), .rst (rst), .piece (new_piece));

  game_fsm u_game (
    .clk        (clk_50),
    .rst        (rst),
    .tick       (game_tick),
    .key_right  (key_sync[0]),
    .key_turn   (key_sync[1]),
    .key_left   (key_sync[2]),
    .new_piece  (new_piece),
    .state      (state),
    .field      (field),
    .display    (display),
    .cur_piece  (cur_piece),
    .cur_rot    (cur_rot),
    .cur_row    (cur_row),
    .cur_col    (cur_col),
    .next_piece (next_piece),
    .game_over  (game_over)
  );

  // ---------------------------------------------------------------- VGA
  logic       hsync_n, vsync_n, video_on, frame_start;
  logic [9:0] px, py;
  block_t     next_block;
  logic [2:0] next_n_rot, rgb;

  vga_sync u_sync (
    .clk (clk_50), .rst (rst), .pix_tick (pix_tick),
    .hsync_n (hsync_n), .vsync_n (vsync_n), .video_on (video_on),
    .x (px), .y (py), .frame_start (frame_start)
  );

  piece_shape u_next_shape (
    .piece (next_piece), .rot (2'd0), .block (next_block), .n_rot (next_n_rot)
  );

  pixel_gen u_pixel (
    .video_on (video_on), .x (px), .y (py),
    .field (display), .next_block (next_block), .rgb (rgb)
  );

  always_ff @(posedge clk_50) begin
    if (rst) begin
      vga_r  <= '0;
      vga_g  <= '0;
      vga_b  <= '0;
      vga_hs <= 1'b1;
      vga_vs <= 1'b1;
    end else if (pix_tick) begin
      vga_r  <= {4{rgb[2]}};
      vga_g  <= {4{rgb[1]}};
      vga_b  <= {4{rgb[0]}};
      vga_hs <= hsync_n;
      vga_vs <= vsync_n;
    end
  end

endmodule
