// tetris_player: plays the complete game through its push-buttons and checks the VGA
// output pixel by pixel; shared by the top-level testbenches.
//
// It keeps its own model of the game (tetris_ref_pkg rules, the eight-state step per
// game tick, new pieces taken from the design's random source) and its own VGA scan
// position. At every pixel tick it works out the colour and sync levels the screen must
// show for the current pixel (field tile map at (220,40), next-piece box at (80,160),
// 800x525 scan, hsync low for pixels 656..751, vsync low for lines 490..491) and compares
// them with the registered outputs one pixel later. After every game tick it compares
// nothing directly inside the game: a wrong move shows up as wrong pixels.
//
// Keys: a greedy player picks, for each new piece, the rotation and column that minimise
// stack height, holes and bumpiness and maximise full rows, and steers there (turn first,
// then left/right, then no key so the piece falls). Every PLAY_RANDOM_EVERY-th piece is
// played with random keys instead, to reach walls, refused turns and the end of a game.
// With SCRIPTED set the keys are fixed instead: key 0 for the first tick, key 1 for the
// third and none after, so the first piece moves right, turns and then falls.
// When a game ends the player waits a few ticks, checks the picture stays frozen, and
// flips the reset switch. Keys change right after a game tick, long before the next one.
module tetris_player
  import tetris_pkg::*;
  import tetris_ref_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned PIX_HZ  = 25_000_000,
  parameter int unsigned GAME_HZ = 4,
  parameter int PLAY_RANDOM_EVERY = 4,
  parameter bit SCRIPTED = 1'b0   // fixed keys instead: right, turn, then none
) (
  input  logic       clk,
  input  logic       rst,          // the design's synchronised reset
  input  logic       pix_tick,     // the design's pixel tick
  input  logic       game_tick,    // the design's game tick
  input  logic [2:0] new_piece,    // the design's random piece
  input  logic [3:0] vga_r,
  input  logic [3:0] vga_g,
  input  logic [3:0] vga_b,
  input  logic       vga_hs,
  input  logic       vga_vs,
  output logic       reset_sw,
  output logic [2:0] key_n
);

  int checks = 0, failures = 0, pixels = 0, frames = 0, ticks = 0;
  int n_right_ok, n_right_no, n_left_ok, n_left_no, n_turn_ok, n_turn_no;
  int n_down_ok, n_down_no, n_change, n_clear, n_clear_again, n_over, n_games;

  // ------------------------------------------------------------------ game model
  state_t     m_state;
  ref_field_t m_field;
  int         m_cur, m_next, m_rot, m_row, m_col;
  bit         m_over;
  int         serial = 0, chosen = -1;
  int         t_rot, t_col;
  ref_field_t disp;        // field with the falling piece, as the screen must show it
  bit [15:0]  box;         // next-piece box
  int         over_wait = 0;

  function automatic void m_step(bit kr, bit kt, bit kl, int np);
    ref_field_t g;
    int nr;
    if (m_over) return;
    case (m_state)
      ST_ZERO:
        if (!ref_fits(m_field, m_cur, m_rot, m_row, m_col)) begin
          m_over = 1; n_over++;
        end
        else if (kr) m_state = ST_RIGHT;
        else if (kl) m_state = ST_LEFT;
        else if (kt) m_state = ST_TURN;
        else         m_state = ST_DOWN;
      ST_RIGHT:
        if (ref_fits(m_field, m_cur, m_rot, m_row, m_col + 1)) begin
          m_col++; m_state = ST_ZERO; n_right_ok++;
        end else begin
          m_state = ST_DOWN; n_right_no++;
        end
      ST_LEFT:
        if (ref_fits(m_field, m_cur, m_rot, m_row, m_col - 1)) begin
          m_col--; m_state = ST_ZERO; n_left_ok++;
        end else begin
          m_state = ST_DOWN; n_left_no++;
        end
      ST_TURN: begin
        nr = (m_rot + 1) % ref_nrot(m_cur);
        if (ref_fits(m_field, m_cur, nr, m_row, m_col)) begin
          m_rot = nr; m_state = ST_ZERO; n_turn_ok++;
        end else begin
          m_state = ST_CHANGE; n_turn_no++;
        end
      end
      ST_DOWN:
        if (ref_fits(m_field, m_cur, m_rot, m_row + 1, m_col)) begin
          m_row++; m_state = ST_ZERO; n_down_ok++;
        end else begin
          m_state = ST_CHANGE; n_down_no++;
        end
      ST_CHANGE: begin
        m_field = ref_place(m_field, m_cur, m_rot, m_row, m_col);
        m_cur = m_next; m_next = np;
        m_rot = 0; m_row = 1; m_col = 5;
        m_state = ST_MINUS; n_change++; serial++;
      end
      ST_MINUS:
        if (ref_clear(m_field, g)) begin
          m_field = g; m_state = ST_HOLD; n_clear++;
          if (ref_full_rows(g) > 0) n_clear_again++;
        end else begin
          m_state = ST_ZERO;
        end
      default: m_state = ST_MINUS;
    endcase
  endfunction

  // ------------------------------------------------------------------ greedy choice
  function automatic int score(ref_field_t f);
    int h[10], agg = 0, holes = 0, bump = 0, lines;
    lines = ref_full_rows(f);
    for (int c = 0; c < 10; c++) begin
      h[c] = 0;
      for (int r = 19; r >= 0; r--) if (f[r][c]) h[c] = 20 - r;
      for (int r = 20 - h[c]; r < 20; r++) if (!f[r][c]) holes++;
      agg += h[c];
      if (c > 0) bump += (h[c] > h[c-1]) ? h[c] - h[c-1] : h[c-1] - h[c];
    end
    return 76 * lines - 51 * agg - 36 * holes - 18 * bump;
  endfunction

  function automatic void choose(ref_field_t f, int piece, output int brot, output int bcol);
    int best = -1_000_000, s, row;
    brot = 0;
    bcol = 5;
    for (int r = 0; r < ref_nrot(piece); r++) begin
      if (!ref_fits(f, piece, r, 1, 5)) continue;
      for (int c = -2; c < 12; c++) begin
        if (!ref_fits(f, piece, r, 1, c)) continue;
        row = 1;
        while (ref_fits(f, piece, r, row + 1, c)) row++;
        s = score(ref_place(f, piece, r, row, c));
        if (s > best) begin
          best = s; brot = r; bcol = c;
        end
      end
    end
  endfunction

  function automatic ref_field_t m_display();
    return ref_place(m_field, m_cur, m_rot, m_row, m_col);
  endfunction

  // ------------------------------------------------------------------ VGA expectation
  int h = 0, v = 0;
  bit have_exp = 0;
  logic [13:0] exp_out;  // {r, g, b, hs, vs}

  function automatic logic [13:0] expect_pixel(int x, int y);
    logic [2:0] c = 3'b000;
    if (x < 640 && y < 480) begin
      if (x >= 220 && x < 420 && y >= 40 && y < 440)
        c = disp[(y - 40) / 20][(x - 220) / 20] ? 3'b001 : 3'b111;
      else if (x >= 80 && x < 160 && y >= 160 && y < 240)
        c = box[((y - 160) / 20) * 4 + (x - 80) / 20] ? 3'b001 : 3'b111;
    end
    return {{4{c[2]}}, {4{c[1]}}, {4{c[0]}}, !(x >= 656 && x < 752), !(y >= 490 && y < 492)};
  endfunction

  // ------------------------------------------------------------------ per-clock work
  bit kr = SCRIPTED, kt = 0, kl = 0;

  initial begin
    reset_sw = 1'b1;
    key_n    = ~{kl, kt, kr};
    repeat (4) @(posedge clk);
    reset_sw <= 1'b0;
  end

  always @(posedge clk) begin
    int k;
    if (rst) begin
      h = 0; v = 0; have_exp = 0;
      m_state = ST_ZERO; m_field = '0;
      m_cur = int'(new_piece); m_next = int'(new_piece);
      m_rot = 0; m_row = 1; m_col = 5; m_over = 0;
      serial++;
      disp = m_display();
      box  = ref_box(m_next);
    end else begin
      if (pix_tick) begin
        if (have_exp) begin
          checks++;
          pixels++;
          if ({vga_r, vga_g, vga_b, vga_hs, vga_vs} !== exp_out) begin
            failures++;
            if (failures < 10)
              $display("FAIL pixel (%0d,%0d) got %h/%b/%b expected %h/%b/%b", h, v,
                       {vga_r, vga_g, vga_b}, vga_hs, vga_vs, exp_out[13:2], exp_out[1],
                       exp_out[0]);
          end
        end
        exp_out = expect_pixel(h, v);
        have_exp = 1;
        if (h == 799) begin
          h = 0;
          if (v == 524) begin v = 0; frames++; end
          else v = v + 1;
        end else begin
          h = h + 1;
        end
      end
      if (game_tick) begin
        m_step(kr, kt, kl, int'(new_piece));
        disp = m_display();
        box  = ref_box(m_next);
        ticks++;
        if (serial != chosen) begin
          choose(m_field, m_cur, t_rot, t_col);
          chosen = serial;
        end
        // Decide the keys for the next tick.
        kr = 0; kt = 0; kl = 0;
        if (m_over) begin
          over_wait++;
          if (over_wait == 4) begin
            over_wait = 0;
            n_games++;
            reset_sw <= 1'b1;
          end
        end else if (SCRIPTED) begin
          kt = (ticks == 2);
        end else if (PLAY_RANDOM_EVERY > 0 && serial % PLAY_RANDOM_EVERY == 0) begin
          k = $urandom_range(0, 5);
          kr = (k == 1); kl = (k == 2); kt = (k == 3 || k == 4);
        end else if (m_state == ST_ZERO) begin
          if (m_rot != t_rot)      kt = 1;
          else if (m_col < t_col)  kr = 1;
          else if (m_col > t_col)  kl = 1;
        end
        key_n <= ~{kl, kt, kr};
      end
      if (reset_sw && !game_tick && over_wait == 0 && n_games > 0) reset_sw <= 1'b0;
    end
  end

endmodule
