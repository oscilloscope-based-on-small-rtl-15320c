// tb_vga_module: the whole VGA module at its default 1024 x 768 timing.
// The testbench fills the three plot memories and the text memory and sets
// gains, offsets, trigger row and colours over Avalon-MM, then captures two
// complete frames from the VGA outputs and compares every visible pixel with
// a reference picture computed here: text window over plot 0, 1, 2 over the
// trigger line over the grid over the background. The second frame uses
// other settings (a plot and the grid switched off, other colours). Pixel
// (c, r) must leave through PIXEL_LATENCY + 1 register stages after the
// counters addressed it, and every blanked pixel must be black.
module tb_vga_module;
  import osc_pkg::*;
  logic clk = 0, clk_pix = 0;
  always #10 clk = ~clk;           // 50 MHz
  always #7.692 clk_pix = ~clk_pix; // 65 MHz
  logic rst_n, read, write, hsync, vsync, frame_start;
  logic [12:0] address;
  logic [31:0] writedata, readdata;
  rgb_t rgb;
  int checks = 0, failures = 0;

  vga_module dut (.clk, .rst_n, .avs_address (address), .avs_read (read), .avs_write (write),
    .avs_writedata (writedata), .avs_readdata (readdata), .clk_pix,
    .vga_rgb (rgb), .vga_hsync (hsync), .vga_vsync (vsync), .frame_start);

  initial begin
    #100_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(int a, int d);
    @(negedge clk); address = 13'(a); writedata = 32'(d); write = 1;
    @(negedge clk); write = 0;
  endtask

  // reference state
  logic [11:0] smp [3][1024];
  logic [31:0] txt [1024];
  int gain [3], offset [3], trig_row;
  bit [5:0] en;
  rgb_t col_plot [3], col_text, col_trig, col_grid, col_bg;

  function automatic rgb_t ref_pixel(int c, int r);
    bit g;
    if (en[3] && r < 32 && txt[r * 32 + c / 32][c % 32]) return col_text;
    for (int k = 0; k < 3; k++)
      if (en[k] && offset[k] - ((int'(smp[k][c]) * gain[k]) >>> 8) == r) return col_plot[k];
    if (en[4] && r == trig_row) return col_trig;
    g = ((c % 128 == 0 || c == 1023) && r % 2 == 0) || ((r % 96 == 0 || r == 767) && c % 2 == 0);
    if (en[5] && g) return col_grid;
    return col_bg;
  endfunction

  task automatic apply_settings();
    wr(VGA_REG_ENABLE, int'(en));
    for (int k = 0; k < 3; k++) begin
      wr(int'(VGA_REG_GAIN0) + k, gain[k]);
      wr(int'(VGA_REG_OFFSET0) + k, offset[k]);
    end
    wr(VGA_REG_TRIG, trig_row);
    wr(VGA_REG_COLOUR, int'({col_bg, col_grid, col_trig, col_text, col_plot[2], col_plot[1], col_plot[0]}));
  endtask

  int hist [rgb_t];
  task automatic check_frame();
    int bad, blank_bad;
    bad = 0; blank_bad = 0;
    for (int k = 0; k < 8; k++) hist[rgb_t'(k)] = 0;
    // the edge that ends the cycle of address (0, 0), then PIXEL_LATENCY more:
    // PIXEL_LATENCY + 1 register stages in all
    @(posedge clk_pix iff frame_start);
    repeat (PIXEL_LATENCY) @(posedge clk_pix);
    for (int r = 0; r < 806; r++) begin
      for (int c = 0; c < 1344; c++) begin
        #1;
        if (c < 1024 && r < 768) begin
          rgb_t e;
          e = ref_pixel(c, r);
          hist[rgb]++;
          if (rgb !== e) begin
            bad++;
            if (bad < 5) $display("pixel (%0d,%0d): %0d expected %0d", c, r, rgb, e);
          end
        end else if (rgb !== 3'b000) blank_bad++;
        @(posedge clk_pix);
      end
    end
    checks += 2;
    if (bad != 0) failures++;
    if (blank_bad != 0) failures++;
    $display("frame: %0d wrong pixels, %0d lit blanking pixels", bad, blank_bad);
  endtask

  initial begin
    @(negedge clk);
    rst_n = 0; read = 0; write = 0; address = 0; writedata = 0;
    repeat (3) @(negedge clk); rst_n = 1;

    // plot 0: slow sine-like triangle, plot 1: random, plot 2: ramp
    for (int c = 0; c < 1024; c++) begin
      smp[0][c] = 12'(c < 512 ? c * 8 : (1023 - c) * 8);
      smp[1][c] = 12'($urandom);
      smp[2][c] = 12'(c * 4);
    end
    for (int w = 0; w < 1024; w++) txt[w] = (w % 7 == 0) ? $urandom : 32'h0;
    for (int k = 0; k < 3; k++)
      for (int c = 0; c < 1024; c++) wr((k + 1) * 1024 + c, int'(smp[k][c]));
    for (int w = 0; w < 1024; w++) wr(4 * 1024 + w, int'(txt[w]));

    en = 6'b111111;
    gain = '{48, 40, 24}; offset = '{767, 700, 600}; trig_row = 300;
    col_plot = '{3'b110, 3'b011, 3'b101}; col_text = 3'b111; col_trig = 3'b100;
    col_grid = 3'b001; col_bg = 3'b000;
    apply_settings();
    repeat (10) @(negedge clk);
    check_frame();
    checks++;
    if (hist[3'b110] == 0 || hist[3'b011] == 0 || hist[3'b101] == 0 || hist[3'b111] == 0
        || hist[3'b100] == 0 || hist[3'b001] == 0) failures++;

    en = 6'b001011;                  // plot 2, trigger line and grid off
    gain = '{96, 40, 24}; offset = '{500, 700, 600}; trig_row = 10;
    col_plot = '{3'b010, 3'b011, 3'b101}; col_text = 3'b110; col_bg = 3'b001;
    apply_settings();
    repeat (10) @(negedge clk);
    check_frame();
    checks++;
    if (hist[3'b010] == 0 || hist[3'b101] != 0 || hist[3'b100] != 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
