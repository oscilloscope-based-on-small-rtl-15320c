// tb_vga_signal_generator: runs two full frames at the default 1024 x 768
// timing. Checks the pixel address against the testbench's own counters,
// the line and frame lengths (1344 and 806 x 1344 clocks, i.e. 60 Hz at
// 65 MHz), the sync pulse widths and positions on the delayed outputs, and
// that a colour fed back after PIXEL_LATENCY clocks comes out aligned with
// the sync, blanked outside the visible area.
module tb_vga_signal_generator;
  import osc_pkg::*;
  logic clk = 0;
  always #1 clk = ~clk;
  logic rst_n, frame_start, hsync, vsync;
  pix_addr_t pix;
  rgb_t pixel, rgb;
  int checks = 0, failures = 0;

  vga_signal_generator dut (.clk, .rst_n, .pix, .frame_start, .pixel,
    .vga_rgb (rgb), .vga_hsync (hsync), .vga_vsync (vsync));

  initial begin
    #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // feed back a colour derived from the address, PIXEL_LATENCY clocks late
  pix_addr_t hist [PIXEL_LATENCY + 2];
  always_ff @(posedge clk) begin
    hist[0] <= pix;
    for (int i = 1; i < PIXEL_LATENCY + 2; i++) hist[i] <= hist[i - 1];
  end
  assign pixel = hist[PIXEL_LATENCY - 1].col[2:0] ^ hist[PIXEL_LATENCY - 1].row[2:0];

  int h, v, n_addr_err, n_out_err, n_frames;
  int hs_fall_col, hs_len, vs_len, line_len, last_hs_fall, vs_lines;
  int t;
  initial begin
    rst_n = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    h = 1; v = 0; t = 1;   // one clock edge has passed since reset was released
    n_addr_err = 0; n_out_err = 0; n_frames = 0; last_hs_fall = -1; hs_len = 0; vs_len = 0;
    repeat (2 * 1344 * 806 + 10) begin
      @(negedge clk);
      // address generated by the counters
      if (pix.col != 11'(h) || pix.row != 11'(v) || pix.active != (h < 1024 && v < 768)) n_addr_err++;
      if (frame_start != (h == 0 && v == 0)) n_addr_err++;
      if (frame_start) n_frames++;
      // outputs belong to the address PIXEL_LATENCY + 1 clocks ago
      begin
        int oh, ov; bit act, hs, vs;
        oh = h - (PIXEL_LATENCY + 1); ov = v;
        if (oh < 0) begin oh += 1344; ov = (v == 0) ? 805 : v - 1; end
        if (t >= PIXEL_LATENCY + 1) begin
          act = oh < 1024 && ov < 768;
          hs = oh >= 1048 && oh < 1184;
          vs = ov >= 771 && ov < 777;
          if (hsync != !hs || vsync != !vs) n_out_err++;
          if (rgb != (act ? rgb_t'(oh[2:0] ^ ov[2:0]) : 3'b000)) n_out_err++;
        end
      end
      t++;
      h++;
      if (h == 1344) begin h = 0; v++; if (v == 806) v = 0; end
    end
    checks += 3;
    if (n_addr_err != 0) failures++;
    if (n_out_err != 0) failures++;
    if (n_frames != 2) failures++;
    $display("address errors %0d, output errors %0d, frames %0d", n_addr_err, n_out_err, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pulse widths and periods measured on the outputs
  int hs_low, vs_low_clocks, hs_period, hs_prev, n_hs, hs_bad, vs_bad, vs_prev, vs_period;
  logic hs_q = 1'b1, vs_q = 1'b1;
  initial begin hs_low = 0; vs_low_clocks = 0; hs_prev = -1; n_hs = 0; hs_bad = 0; vs_bad = 0; vs_prev = -1; end
  int tc;
  always @(posedge clk) if (rst_n) begin
    tc++;
    if (!hsync) hs_low++;
    if (!vsync) vs_low_clocks++;
    if (hs_q && !hsync) begin
      if (hs_prev >= 0 && tc - hs_prev != 1344) hs_bad++;
      hs_prev = tc;
    end
    if (!hs_q && hsync && hs_low != 136) hs_bad++;
    if (hsync) hs_low = 0;
    if (vs_q && !vsync) begin
      if (vs_prev >= 0 && tc - vs_prev != 1344 * 806) vs_bad++;
      vs_prev = tc;
    end
    if (!vs_q && vsync && vs_low_clocks != 6 * 1344) vs_bad++;
    if (vsync) vs_low_clocks = 0;
    hs_q <= hsync; vs_q <= vsync;
  end
  initial begin
    @(posedge rst_n);
    repeat (2 * 1344 * 806) @(posedge clk);
    checks += 2;
    if (hs_bad != 0) failures++;
    if (vs_bad != 0 || vs_prev < 0) failures++;
  end
endmodule
