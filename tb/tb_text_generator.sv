// tb_text_generator: writes a random bit pattern into the graphic memory of
// a text window placed away from the corner (X0 = 64, Y0 = 100, 256 x 16
// pixels), sweeps the pixel address over and around the window, and checks
// every request three clocks later against the pattern: inside the window,
// bit (col - X0) % 32 of word (row - Y0) * 8 + (col - X0) / 32.
module tb_text_generator;
  import osc_pkg::*;
  localparam int X0 = 64, Y0 = 100, TW = 256, TH = 16, WORDS = TW / 32 * TH;
  logic clk = 0, wclk = 0;
  always #1 clk = ~clk;
  always #4 wclk = ~wclk;
  logic wr_en, enable, req;
  logic [6:0] wr_addr;
  logic [31:0] wr_data;
  logic [31:0] pattern [WORDS];
  pix_addr_t pix;
  int checks = 0, failures = 0;

  text_generator #(.X0(X0), .Y0(Y0), .TEXT_W(TW), .TEXT_H(TH)) dut (
    .wr_clk (wclk), .wr_en, .wr_addr, .wr_data, .clk, .pix, .enable, .req);

  initial begin
    #20_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit exp_q [$];
  int n_req, n_err;
  task automatic sweep();
    exp_q.delete();
    for (int r = Y0 - 3; r < Y0 + TH + 3; r++) begin
      for (int c = 0; c < 400; c++) begin
        bit e, in_win;
        @(negedge clk);
        if (exp_q.size() == GEN_LATENCY) begin
          e = exp_q.pop_front();
          checks++;
          if (req !== e) begin
            n_err++;
            if (n_err < 5) $display("row %0d col %0d: req %0b expected %0b", r, c, req, e);
          end
          if (req) n_req++;
        end
        pix = '{col: 11'(c), row: 11'(r), active: 1'b1};
        in_win = c >= X0 && c < X0 + TW && r >= Y0 && r < Y0 + TH;
        exp_q.push_back(enable && in_win && pattern[(r - Y0) * (TW / 32) + (c - X0) / 32][(c - X0) % 32]);
      end
    end
  endtask

  initial begin
    wr_en = 0; enable = 1; n_req = 0; n_err = 0;
    pix = '{col: 0, row: 0, active: 0};
    for (int i = 0; i < WORDS; i++) begin
      @(negedge wclk);
      pattern[i] = $urandom;
      wr_en = 1; wr_addr = 7'(i); wr_data = pattern[i];
    end
    @(negedge wclk); wr_en = 0;
    repeat (3) @(negedge wclk);
    sweep();
    enable = 0; sweep();
    checks++;
    failures += n_err;
    if (n_req < TW * TH / 4) failures++;
    $display("pixel requests %0d, errors %0d", n_req, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
