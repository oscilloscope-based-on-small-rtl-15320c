// tb_grid_generator: sweeps one whole frame, blanking included, and checks
// each request (three clocks after its address) against the graticule:
// dotted vertical lines at columns 0, 128, ..., 896 and 1023, dotted
// horizontal lines at rows 0, 96, ..., 672 and 767.
module tb_grid_generator;
  import osc_pkg::*;
  logic clk = 0;
  always #1 clk = ~clk;
  logic enable, req;
  pix_addr_t pix;
  int checks = 0, failures = 0;

  grid_generator dut (.clk, .pix, .enable, .req);

  initial begin
    #50_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic bit is_vline(int c);
    return c == 0 || c == 128 || c == 256 || c == 384 || c == 512 || c == 640
        || c == 768 || c == 896 || c == 1023;
  endfunction
  function automatic bit is_hline(int r);
    return r == 0 || r == 96 || r == 192 || r == 288 || r == 384 || r == 480
        || r == 576 || r == 672 || r == 767;
  endfunction

  bit exp_q [$];
  int n_req, n_err;
  task automatic sweep(bit en);
    exp_q.delete();
    n_req = 0;
    enable = en;
    for (int r = 0; r < 806; r++) begin
      for (int c = 0; c < 1344; c++) begin
        bit act, e;
        @(negedge clk);
        if (exp_q.size() == GEN_LATENCY) begin
          checks++;
          e = exp_q.pop_front();
          if (req !== e) n_err++;
          if (req) n_req++;
        end
        act = c < 1024 && r < 768;
        pix = '{col: 11'(c), row: 11'(r), active: act};
        exp_q.push_back(en && act
          && ((is_vline(c) && r % 2 == 0) || (is_hline(r) && c % 2 == 0)));
      end
    end
  endtask

  initial begin
    n_err = 0; pix = '{col: 0, row: 0, active: 0};
    repeat (2) @(negedge clk);
    sweep(1); checks++; if (n_req != 8000) failures++;   // 3456 + 4608 - 64 crossings
    $display("grid pixels %0d", n_req);
    sweep(0); checks++; if (n_req != 0) failures++;
    failures += n_err;
    $display("errors %0d", n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
