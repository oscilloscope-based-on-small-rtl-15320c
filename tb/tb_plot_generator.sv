// tb_plot_generator: fills the plot memory with random samples (on its own
// write clock), then sweeps the pixel address over the whole visible area
// for several gain/offset settings, and compares every pixel request, three
// clocks after its address, with y = offset - (sample * gain >> 8) == row.
// Also checks that blanking and the enable input suppress requests.
module tb_plot_generator;
  import osc_pkg::*;
  logic clk = 0, wclk = 0;
  always #1 clk = ~clk;
  always #3 wclk = ~wclk;
  logic wr_en, enable, req;
  logic [9:0] wr_addr;
  logic [11:0] wr_data, offset;
  logic [15:0] gain;
  pix_addr_t pix;
  logic [11:0] samples [1024];
  int checks = 0, failures = 0;

  plot_generator dut (.wr_clk (wclk), .wr_en, .wr_addr, .wr_data, .clk, .pix, .enable,
                      .gain, .offset, .req);

  initial begin
    #100_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit exp_q [$];
  int n_req, n_err;
  task automatic sweep(int rows_from, int rows_to, bit blank);
    exp_q.delete();
    for (int r = rows_from; r < rows_to; r++) begin
      for (int c = 0; c < 1024 + 4; c++) begin
        bit act, e; int y;
        @(negedge clk);
        // check the answer for the address of three clocks ago
        if (exp_q.size() == GEN_LATENCY) begin
          e = exp_q.pop_front();
          checks++;
          if (req !== e) begin
            n_err++;
            if (n_err < 5) $display("row %0d col %0d: req %0b expected %0b", r, c, req, e);
          end
          if (req) n_req++;
        end
        act = c < 1024 && !blank;
        pix = '{col: 11'(c), row: 11'(r), active: act};
        y = int'(offset) - ((c < 1024 ? int'(samples[c]) : 0) * int'(gain) >>> 8);
        exp_q.push_back(enable && act && y == r);
      end
    end
  endtask

  initial begin
    wr_en = 0; enable = 1; gain = 48; offset = 767; n_req = 0; n_err = 0;
    pix = '{col: 0, row: 0, active: 0};
    for (int i = 0; i < 1024; i++) begin
      @(negedge wclk);
      samples[i] = 12'($urandom);
      if (i < 4) samples[i] = 12'(4095 * i / 3);       // extremes
      wr_en = 1; wr_addr = 10'(i); wr_data = samples[i];
    end
    @(negedge wclk); wr_en = 0;
    repeat (5) @(negedge wclk);

    sweep(0, 768, 0);                           // full scale
    gain = 256; offset = 700; sweep(0, 768, 0); // gain 1, codes above 700 off screen
    gain = 24;  offset = 500; sweep(100, 600, 0);
    sweep(0, 20, 1);                            // blanking
    enable = 0; sweep(0, 768, 0);
    checks++;
    if (n_err != 0) failures += n_err;
    checks++;
    if (n_req < 1024) failures++;               // the plot was actually drawn
    $display("pixel requests %0d, errors %0d", n_req, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
