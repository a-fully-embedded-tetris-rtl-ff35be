// clock_divider: pixel and game timing from the board clock.
//
// Two free-running counters divide the 50 MHz board clock. One gives a pixel tick every
// CLK_HZ/PIX_HZ cycles (every second cycle: 25 MHz, the VGA pixel rate); the other gives
// a game tick every CLK_HZ/GAME_HZ cycles (4 Hz, one step of the game FSM). Both are
// one-cycle enable pulses in the board clock domain rather than separate clocks, so the
// whole design runs on a single clock; that, and the synchronous reset, are this design's
// choice. The 50 MHz, 25 MHz and 4 Hz numbers are the game's own. The first pixel tick
// comes CLK_HZ/PIX_HZ cycles after reset, the first game tick CLK_HZ/GAME_HZ cycles after.
module clock_divider #(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned PIX_HZ  = 25_000_000,
  parameter int unsigned GAME_HZ = 4
) (
  input  logic clk,
  input  logic rst,        // synchronous, active high
  output logic pix_tick,   // 25 MHz enable
  output logic game_tick   // 4 Hz enable
);

  localparam int unsigned PIX_DIV  = CLK_HZ / PIX_HZ;
  localparam int unsigned GAME_DIV = CLK_HZ / GAME_HZ;
  localparam int PIX_W  = (PIX_DIV  > 1) ? $clog2(PIX_DIV)  : 1;
  localparam int GAME_W = (GAME_DIV > 1) ? $clog2(GAME_DIV) : 1;

  logic [PIX_W-1:0]  pix_cnt;
  logic [GAME_W-1:0] game_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      pix_cnt   <= '0;
      pix_tick  <= 1'b0;
    end else if (pix_cnt == PIX_W'(PIX_DIV - 1)) begin
      pix_cnt   <= '0;
      pix_tick  <= 1'b1;
    end else begin
      pix_cnt   <= pix_cnt + 1'b1;
      pix_tick  <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      game_cnt  <= '0;
      game_tick <= 1'b0;
    end else if (game_cnt == GAME_W'(GAME_DIV - 1)) begin
      game_cnt  <= '0;
      game_tick <= 1'b1;
    end else begin
      game_cnt  <= game_cnt + 1'b1;
      game_tick <= 1'b0;
    end
  end

  // Both outputs are single-cycle pulses whenever the division is by more than one.
  a_pix_pulse:  assert property (@(posedge clk) disable iff (rst)
                                 (PIX_DIV > 1 && pix_tick) |=> !pix_tick);
  a_game_pulse: assert property (@(posedge clk) disable iff (rst)
                                 (GAME_DIV > 1 && game_tick) |=> !game_tick);

endmodule
