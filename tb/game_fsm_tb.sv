// game_fsm_tb: runs the main game FSM against a reference model of the game rules and
// compares every output after every game tick (and checks that nothing moves between
// ticks).
//
// Phase 1 steers a fixed sequence of pieces to chosen columns: I, I, I, I and an O fill
// the two bottom rows at once (a double row deletion through minus/hold/minus/hold), then
// I, I, O and I, I give two single deletions, then pieces are pushed against the right
// and left walls. Phase 2 plays five games with random keys and random pieces until each
// ends, checks that a finished game stays frozen, and resets. Every mechanism of the
// state diagram (moves made and refused in each direction, turns made and refused, drops,
// piece changes, single and repeated row deletions, end of game) is counted and must
// occur at least once.
module game_fsm_tb;
  import tetris_pkg::*;
  import tetris_ref_pkg::*;

  logic       clk = 1'b0, rst = 1'b1, tick = 1'b0;
  logic       key_right = 1'b0, key_turn = 1'b0, key_left = 1'b0;
  piece_t     new_piece = P_I;
  state_t     state;
  field_t     field, display;
  piece_t     cur_piece, next_piece;
  logic [1:0] cur_rot;
  pos_t       cur_row, cur_col;
  logic       game_over;

  game_fsm dut (.clk (clk), .rst (rst), .tick (tick), .key_right (key_right),
                .key_turn (key_turn), .key_left (key_left), .new_piece (new_piece),
                .state (state), .field (field), .display (display),
                .cur_piece (cur_piece), .cur_rot (cur_rot), .cur_row (cur_row),
                .cur_col (cur_col), .next_piece (next_piece), .game_over (game_over));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #(10 * 3_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ reference model
  state_t     m_state;
  ref_field_t m_field;
  int         m_cur, m_next, m_rot, m_row, m_col;
  bit         m_over;

  // mechanism counters
  int n_right_ok, n_right_no, n_left_ok, n_left_no, n_turn_ok, n_turn_no;
  int n_down_ok, n_down_no, n_change, n_clear, n_clear_again, n_over, n_frozen;

  function automatic void m_reset(int np);
    m_state = ST_ZERO;
    m_field = '0;
    m_cur   = np;
    m_next  = np;
    m_rot   = 0;
    m_row   = 1;
    m_col   = 5;
    m_over  = 0;
  endfunction

  function automatic void m_step(bit kr, bit kt, bit kl, int np);
    ref_field_t g;
    int nr;
    if (m_over) return;
    case (m_state)
      ST_ZERO: begin
        if (!ref_fits(m_field, m_cur, m_rot, m_row, m_col)) begin
          m_over = 1;
          n_over++;
        end
        else if (kr) m_state = ST_RIGHT;
        else if (kl) m_state = ST_LEFT;
        else if (kt) m_state = ST_TURN;
        else         m_state = ST_DOWN;
      end
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
        m_state = ST_MINUS; n_change++;
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

  task automatic compare(string when);
    checks++;
    if (state !== m_state || field !== field_t'(m_field) ||
        display !== field_t'(ref_place(m_field, m_cur, m_rot, m_row, m_col)) ||
        int'(cur_piece) != m_cur || int'(next_piece) != m_next ||
        int'(cur_rot) != m_rot || int'(cur_row) != m_row || int'(cur_col) != m_col ||
        game_over !== m_over) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: state %s/%s piece %0d/%0d next %0d/%0d rot %0d/%0d pos (%0d,%0d)/(%0d,%0d) over %0b/%0b field %0b",
                 when, state.name(), m_state.name(), cur_piece, m_cur, next_piece, m_next,
                 cur_rot, m_rot, cur_row, cur_col, m_row, m_col, game_over, m_over,
                 field === field_t'(m_field));
    end
  endtask

  // One game tick with the given inputs, then a compare; a few idle clocks in between.
  task automatic step(bit kr, bit kt, bit kl, int np, string when);
    @(negedge clk);
    key_right = kr; key_turn = kt; key_left = kl; new_piece = piece_t'(np);
    repeat ($urandom_range(0, 2)) begin
      @(negedge clk);
      compare({when, " idle"});
    end
    tick = 1'b1;
    @(negedge clk);
    tick = 1'b0;
    m_step(kr, kt, kl, np);
    compare(when);
  endtask

  task automatic do_reset(int np);
    @(negedge clk);
    rst = 1'b1;
    new_piece = piece_t'(np);
    @(negedge clk);
    @(negedge clk);
    rst = 1'b0;
    m_reset(np);
    compare("reset");
  endtask

  // ------------------------------------------------------------------ stimulus
  typedef struct { int piece; int target; } plan_t;
  plan_t plan[$];

  initial begin
    int feed, cur_t, next_t, np, steps, k;
    bit kr, kt, kl;
    plan = '{'{2, 2}, '{2, 6}, '{2, 6}, '{1, 9},
             '{2, 2}, '{2, 6}, '{1, 9}, '{2, 2}, '{2, 6},
             '{1, 12}, '{2, -5}, '{1, 5}, '{1, 5}};

    // Phase 1: steered pieces.
    do_reset(plan[0].piece);
    feed = 1; cur_t = plan[0].target; next_t = plan[0].target;
    while (feed <= plan.size()) begin
      np = (feed < plan.size()) ? plan[feed].piece : 1;
      kr = 0; kt = 0; kl = 0;
      if (m_state == ST_ZERO) begin
        kr = (m_col < cur_t);
        kl = (m_col > cur_t);
      end else begin
        k = $urandom_range(0, 3);
        kr = (k == 1); kt = (k == 2); kl = (k == 3);
      end
      if (m_state == ST_CHANGE) begin
        cur_t = next_t;
        next_t = (feed < plan.size()) ? plan[feed].target : 5;
        feed++;
      end
      step(kr, kt, kl, np, "steered");
      if (m_over) begin
        failures++;
        $display("FAIL steered game ended");
        break;
      end
    end
    // The steered sequence leaves an empty field (three rows deleted) before the wall tests.
    checks++;
    if (n_clear < 3 || n_clear_again < 1) begin
      failures++;
      $display("FAIL steered deletions %0d (repeated %0d)", n_clear, n_clear_again);
    end

    // Phase 2: random games.
    for (int game = 0; game < 5; game++) begin
      do_reset($urandom_range(1, 7));
      steps = 0;
      while (!m_over && steps < 20000) begin
        k = $urandom_range(0, 9);
        kr = (k == 1 || k == 2); kl = (k == 3 || k == 4); kt = (k == 5 || k == 6);
        if ($urandom_range(0, 3) == 0) begin kr = 1; kl = 1; kt = 1; end
        step(kr, kt, kl, $urandom_range(1, 7), "random");
        steps++;
      end
      repeat (5) begin
        step(1, 1, 1, $urandom_range(1, 7), "frozen");
        n_frozen++;
      end
    end

    $display("right %0d/%0d left %0d/%0d turn %0d/%0d down %0d/%0d change %0d clear %0d (again %0d) over %0d",
             n_right_ok, n_right_no, n_left_ok, n_left_no, n_turn_ok, n_turn_no,
             n_down_ok, n_down_no, n_change, n_clear, n_clear_again, n_over);
    checks++;
    if (n_right_ok == 0 || n_right_no == 0 || n_left_ok == 0 || n_left_no == 0 ||
        n_turn_ok == 0 || n_turn_no == 0 || n_down_ok == 0 || n_down_no == 0 ||
        n_change == 0 || n_clear == 0 || n_clear_again == 0 || n_over < 5) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
