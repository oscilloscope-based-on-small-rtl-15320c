// tb_oscilloscope_top: end-to-end run of the whole oscilloscope at its
// default sizes (1024-sample acquisition, 1024 x 768 at 60 Hz), with the
// ADC modelled and the processor's work done by testbench tasks.
//
// Sequence: (1) single-channel acquisition at 1 MS/s, rising-edge trigger
// with hysteresis; (2) dual-channel chop acquisition triggered on channel 2's
// falling edge, at a sampling period too short for two conversions, so
// overruns occur; (3) forced trigger on a flat input. After each one the
// samples read over the bus must equal the samples the ADC returned after
// the trigger. After (2) the "software" separates the channels, computes the
// arithmetic channel (ch1 + ch2) / 2, writes the three plots, a text pattern
// and the trigger line into the VGA module, and one whole frame is compared
// pixel by pixel with a reference picture.
//
// Every mechanism must happen at least once: hysteresis trigger, forced
// trigger, rising and falling edge, single and dual mode, overrun,
// interrupt, text/plot/trigger/grid pixels, and a priority decision (two
// generators on one pixel).
module tb_oscilloscope_top;
  import osc_pkg::*;
  logic clk = 0, clk_pix = 0;
  always #10 clk = ~clk;
  always #7.692 clk_pix = ~clk_pix;
  logic rst_n;
  avmm_req_t avs_req;
  logic [31:0] avs_readdata;
  logic irq, cmd_valid, cmd_sop, cmd_eop, cmd_ready, rsp_valid;
  logic [4:0] cmd_channel, rsp_channel;
  logic [11:0] rsp_data;
  logic vga_r, vga_g, vga_b, vga_hsync, vga_vsync;
  logic ev_trigger, ev_done, ev_overrun, ev_frame;
  logic [11:0] analog [2];
  int unsigned conversions;
  int checks = 0, failures = 0;

  oscilloscope_top dut (.clk, .clk_pix, .rst_n, .avs_req, .avs_readdata, .irq,
    .adc_cmd_valid (cmd_valid), .adc_cmd_channel (cmd_channel), .adc_cmd_sop (cmd_sop),
    .adc_cmd_eop (cmd_eop), .adc_cmd_ready (cmd_ready),
    .adc_rsp_valid (rsp_valid), .adc_rsp_channel (rsp_channel), .adc_rsp_data (rsp_data),
    .vga_r, .vga_g, .vga_b, .vga_hsync, .vga_vsync,
    .ev_trigger, .ev_done, .ev_overrun, .ev_frame);

  adc_model adc (.clk, .rst_n, .analog, .cmd_valid, .cmd_channel, .cmd_ready,
    .rsp_valid, .rsp_channel, .rsp_data, .conversions);

  initial begin
    #200_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------------------------------------------------------- inputs
  int unsigned cyc;
  bit flat;
  always_ff @(posedge clk) cyc <= cyc + 1;
  function automatic logic [11:0] tri_wave(int unsigned t, int unsigned half, int noise);
    int unsigned p; int v;
    p = t % (2 * half);
    v = 300 + int'((p < half ? p : 2 * half - p) * 3400 / half);
    v += int'($urandom_range(2 * noise)) - noise;
    return 12'(v < 0 ? 0 : v > 4095 ? 4095 : v);
  endfunction
  always_ff @(posedge clk) begin
    analog[0] <= flat ? 12'd2000 : tri_wave(cyc, 20000, 80);
    analog[1] <= flat ? 12'd2000 : tri_wave(cyc + 7000, 30000, 80);
  end

  // ------------------------------------------------------- mechanism counts
  int n_trig, n_done, n_overrun, n_irq, n_frames, n_forced, n_rising, n_falling;
  int n_single, n_dual, n_text_px, n_plot_px, n_trig_px, n_grid_px, n_overlap;
  logic irq_q;
  always @(posedge clk) begin
    if (ev_trigger) n_trig++;
    if (ev_done) n_done++;
    if (ev_overrun) n_overrun++;
    if (irq && !irq_q) n_irq++;
    irq_q <= irq;
  end
  always @(posedge clk_pix) if (ev_frame) n_frames++;

  // samples the ADC returned after the trigger, by the storage rule
  bit rec_on, rec_dual;
  logic [11:0] rec [$];
  always @(posedge clk) begin
    if (rec_on && rsp_valid && rec.size() < 1024) begin
      bit second;
      second = rec_dual && rsp_channel == 5'd2;
      if (!rec_dual || second == rec.size() % 2) rec.push_back(rsp_data);
    end
    if (ev_trigger) rec_on = 1;
  end

  // ------------------------------------------------------------ bus master
  task automatic wr(int a, int d);
    @(negedge clk);
    avs_req.address = 14'(a); avs_req.writedata = 32'(d); avs_req.write = 1;
    @(negedge clk); avs_req.write = 0;
  endtask
  task automatic rd(int a, output logic [31:0] d);
    @(negedge clk); avs_req.address = 14'(a); avs_req.read = 1;
    @(negedge clk); avs_req.read = 0; d = avs_readdata;
  endtask
  localparam int VGA = 1 << 13;

  logic [11:0] acq [1024];
  task automatic acquire(bit d, bit src, bit fall, int level, int hyst, int per, bit force_it);
    logic [31:0] v;
    int bad;
    rec.delete(); rec_on = 0; rec_dual = d;
    wr(SEQ_REG_CONFIG, int'({11'd0, 5'd2, 3'd0, 5'd1, 5'd0, fall, src, d}));
    wr(SEQ_REG_LEVEL, level);
    wr(SEQ_REG_HYST, hyst);
    wr(SEQ_REG_PERIOD, per);
    wr(SEQ_REG_IRQEN, 1);
    wr(SEQ_REG_CTRL, 1);
    if (force_it) begin
      repeat (2000) @(negedge clk);
      wr(SEQ_REG_CTRL, 2);
      n_forced++;
    end
    wait (irq);
    @(negedge clk);
    checks++;
    if (rec.size() != 1024) begin failures++; $display("recorded %0d samples", rec.size()); end
    bad = 0;
    for (int i = 0; i < 1024; i++) begin
      rd(1024 + i, v);
      acq[i] = v[11:0];
      checks++;
      if (i >= rec.size() || v !== 32'(rec[i])) begin
        bad++; failures++;
        if (bad < 4) $display("sample %0d: read %0d", i, v);
      end
    end
    // just after a rising (falling) trigger the trigger channel is above (below) the level
    if (!force_it) begin
      int first;
      first = int'(acq[d && src ? 1 : 0]);
      checks++;
      if (fall ? first > level : first < level) begin
        failures++; $display("first sample %0d on the wrong side of %0d", first, level);
      end
      if (fall) n_falling++; else n_rising++;
    end
    if (d) n_dual++; else n_single++;
    wr(SEQ_REG_IRQ, 1);
    checks++; if (irq !== 0) failures++;
  endtask

  // ------------------------------------------------------ display reference
  logic [11:0] plot [3][1024];
  logic [31:0] txt [1024];
  int gain [3], offset [3], trig_row;
  rgb_t col_plot [3], col_text, col_trig, col_grid;

  function automatic rgb_t ref_pixel(int c, int r, output int hits);
    rgb_t p; bit g;
    p = 3'b000; hits = 0;
    g = ((c % 128 == 0 || c == 1023) && r % 2 == 0) || ((r % 96 == 0 || r == 767) && c % 2 == 0);
    if (g) begin p = col_grid; hits++; end
    if (r == trig_row) begin p = col_trig; hits++; end
    for (int k = 2; k >= 0; k--)
      if (offset[k] - ((int'(plot[k][c]) * gain[k]) >>> 8) == r) begin p = col_plot[k]; hits++; end
    if (r < 32 && txt[r * 32 + c / 32][c % 32]) begin p = col_text; hits++; end
    return p;
  endfunction

  task automatic show_and_check();
    int bad, hits;
    // software: channel separation, arithmetic channel, plots, text, settings
    for (int c = 0; c < 1024; c++) begin
      plot[0][c] = acq[(c / 2) * 2];
      plot[1][c] = acq[(c / 2) * 2 + 1];
      plot[2][c] = 12'((int'(plot[0][c]) + int'(plot[1][c])) / 2);
    end
    for (int w = 0; w < 1024; w++) txt[w] = (w % 5 == 1) ? $urandom : 32'h0;
    gain = '{48, 48, 24}; offset = '{767, 767, 700};
    trig_row = 767 - ((1800 * 48) >>> 8);
    col_plot = '{3'b110, 3'b011, 3'b101}; col_text = 3'b111; col_trig = 3'b100; col_grid = 3'b001;
    for (int k = 0; k < 3; k++) begin
      for (int c = 0; c < 1024; c++) wr(VGA + (k + 1) * 1024 + c, int'(plot[k][c]));
      wr(VGA + int'(VGA_REG_GAIN0) + k, gain[k]);
      wr(VGA + int'(VGA_REG_OFFSET0) + k, offset[k]);
    end
    for (int w = 0; w < 1024; w++) wr(VGA + 4 * 1024 + w, int'(txt[w]));
    wr(VGA + int'(VGA_REG_TRIG), trig_row);
    wr(VGA + int'(VGA_REG_COLOUR),
       int'({3'b000, col_grid, col_trig, col_text, col_plot[2], col_plot[1], col_plot[0]}));
    wr(VGA + int'(VGA_REG_ENABLE), 6'b111111);
    repeat (10) @(negedge clk);
    // capture one frame from the pins
    bad = 0;
    @(posedge clk_pix iff ev_frame);
    repeat (PIXEL_LATENCY) @(posedge clk_pix);
    for (int r = 0; r < 806; r++) begin
      for (int c = 0; c < 1344; c++) begin
        rgb_t got, e;
        #1;
        got = {vga_r, vga_g, vga_b};
        if (c < 1024 && r < 768) begin
          e = ref_pixel(c, r, hits);
          if (hits > 1) n_overlap++;
          if (e == col_text && hits > 0 && r < 32 && txt[r * 32 + c / 32][c % 32]) n_text_px++;
          else if (e == col_trig && r == trig_row) n_trig_px++;
          else if (hits > 0 && e != col_grid) n_plot_px++;
          else if (hits > 0) n_grid_px++;
          if (got !== e) begin
            bad++;
            if (bad < 5) $display("pixel (%0d,%0d): %0d expected %0d", c, r, got, e);
          end
        end else if (got !== 3'b000) bad++;
        @(posedge clk_pix);
      end
    end
    checks++;
    if (bad != 0) failures++;
    $display("frame compared: %0d wrong pixels", bad);
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never happened: %s", what); end
    else $display("%-26s %0d", what, n);
  endtask

  initial begin
    @(negedge clk);
    rst_n = 0; avs_req = '0; flat = 0; cyc = 0; irq_q = 0;
    repeat (3) @(negedge clk); rst_n = 1;

    acquire(0, 0, 0, 2048, 150, 50, 0);      // single, rising, 1 MS/s
    acquire(1, 1, 1, 1800, 150, 60, 0);      // dual chop, ch2 falling, overrunning period
    show_and_check();
    flat = 1;
    acquire(0, 0, 0, 3500, 20, 50, 1);       // flat input: forced trigger

    need("trigger", n_trig);
    need("hysteresis trigger, rising", n_rising);
    need("hysteresis trigger, falling", n_falling);
    need("forced trigger", n_forced);
    need("single-channel acquisition", n_single);
    need("dual-channel acquisition", n_dual);
    need("sampling overrun", n_overrun);
    need("end-of-acquisition irq", n_irq);
    need("frames", n_frames);
    need("text pixels", n_text_px);
    need("plot pixels", n_plot_px);
    need("trigger line pixels", n_trig_px);
    need("grid pixels", n_grid_px);
    need("priority decisions", n_overlap);
    checks++;
    if (n_done != 3 || n_irq != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
