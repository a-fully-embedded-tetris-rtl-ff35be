// vga_sync_tb: runs two and a bit frames with the pixel tick every second clock and
// compares every output with its own line/frame position counters: hsync low for pixels
// 656..751 of each 800-pixel line, vsync low for lines 490..491 of each 525-line frame,
// video_on in the 640x480 area, x/y and the frame_start pulse. Also measures the hsync
// and vsync periods in clocks.
module vga_sync_tb;
  logic       clk = 1'b0, rst = 1'b1, pix_tick = 1'b0;
  logic       hsync_n, vsync_n, video_on, frame_start;
  logic [9:0] x, y;
  int checks = 0, failures = 0;
  int h = 0, v = 0, frames = 0;
  longint cycle = 0, hs_fall = -1, vs_fall = -1;
  logic hs_q = 1'b1, vs_q = 1'b1;

  vga_sync dut (.clk (clk), .rst (rst), .pix_tick (pix_tick), .hsync_n (hsync_n),
                .vsync_n (vsync_n), .video_on (video_on), .x (x), .y (y),
                .frame_start (frame_start));

  always #5 clk = ~clk;

  initial begin
    #(10 * 4_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at h=%0d v=%0d", what, h, v);
    end
  endtask

  always @(posedge clk) begin
    if (!rst) begin
      cycle <= cycle + 1;
      pix_tick <= ~pix_tick;
      if (pix_tick) begin
        check(hsync_n == !(h >= 656 && h < 752), "hsync");
        check(vsync_n == !(v >= 490 && v < 492), "vsync");
        check(video_on == (h < 640 && v < 480), "video_on");
        check(int'(x) == h && int'(y) == v, "x/y");
        check(frame_start == (h == 0 && v == 0), "frame_start");
        if (h == 0 && v == 0) frames++;
        if (h == 799) begin
          h <= 0;
          v <= (v == 524) ? 0 : v + 1;
        end else begin
          h <= h + 1;
        end
      end
      hs_q <= hsync_n;
      vs_q <= vsync_n;
      if (hs_q && !hsync_n) begin
        if (hs_fall >= 0) check(cycle - hs_fall == 1600, "hsync period");
        hs_fall <= cycle;
      end
      if (vs_q && !vsync_n) begin
        if (vs_fall >= 0) check(cycle - vs_fall == 1600 * 525, "vsync period");
        vs_fall <= cycle;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (frames == 3);
    repeat (10) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
