// vga_sync: 640x480, 60 Hz VGA timing.
//
// A horizontal counter runs over the 800 pixel periods of a line and a vertical counter
// over the 525 lines of a frame, both advancing on the 25 MHz pixel tick
// (800 x 525 x 60 Hz ~ 25 MHz). Each line is 640 visible pixels, then the front porch,
// the sync pulse and the back porch; each frame likewise in lines. hsync and vsync are
// active low during the sync pulse. x and y are the pixel coordinates of the current
// counter values and video_on is high in the visible 640x480 area; all outputs are
// decoded from the counter registers, so they change one clock after a pixel tick.
// frame_start pulses for one pixel tick at pixel (0,0). The 640x480 / 800x525 totals are
// the game's; the split into porches and sync (16/96/48 pixels, 10/2/33 lines) is the
// usual industry timing for this mode.
module vga_sync #(
  parameter int H_DISPLAY = 640,
  parameter int H_FRONT   = 16,
  parameter int H_SYNC    = 96,
  parameter int H_BACK    = 48,
  parameter int V_DISPLAY = 480,
  parameter int V_FRONT   = 10,
  parameter int V_SYNC    = 2,
  parameter int V_BACK    = 33
) (
  input  logic       clk,
  input  logic       rst,         // synchronous, active high
  input  logic       pix_tick,    // advance one pixel
  output logic       hsync_n,
  output logic       vsync_n,
  output logic       video_on,
  output logic [9:0] x,
  output logic [9:0] y,
  output logic       frame_start
);

  localparam int H_TOTAL = H_DISPLAY + H_FRONT + H_SYNC + H_BACK;
  localparam int V_TOTAL = V_DISPLAY + V_FRONT + V_SYNC + V_BACK;

  logic [9:0] h_cnt, v_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      h_cnt <= '0;
      v_cnt <= '0;
    end else if (pix_tick) begin
      if (h_cnt == 10'(H_TOTAL - 1)) begin
        h_cnt <= '0;
        v_cnt <= (v_cnt == 10'(V_TOTAL - 1)) ? '0 : v_cnt + 1'b1;
      end else begin
        h_cnt <= h_cnt + 1'b1;
      end
    end
  end

  always_comb begin
    hsync_n     = !(h_cnt >= 10'(H_DISPLAY + H_FRONT) &&
                    h_cnt <  10'(H_DISPLAY + H_FRONT + H_SYNC));
    vsync_n     = !(v_cnt >= 10'(V_DISPLAY + V_FRONT) &&
                    v_cnt <  10'(V_DISPLAY + V_FRONT + V_SYNC));
    video_on    = (h_cnt < 10'(H_DISPLAY)) && (v_cnt < 10'(V_DISPLAY));
    x           = h_cnt;
    y           = v_cnt;
    frame_start = pix_tick && h_cnt == '0 && v_cnt == '0;
  end

  // Counters stay inside the scan.
  a_h_range: assert property (@(posedge clk) disable iff (rst) h_cnt < 10'(H_TOTAL));
  a_v_range: assert property (@(posedge clk) disable iff (rst) v_cnt < 10'(V_TOTAL));

endmodule
