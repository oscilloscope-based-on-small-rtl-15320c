// tb_trigger_generator: sweeps the whole frame, blanking included, for a
// few trigger rows and checks that exactly the visible pixels of that row
// are requested, three clocks after their address.
module tb_trigger_generator;
  import osc_pkg::*;
  logic clk = 0;
  always #1 clk = ~clk;
  logic enable, req;
  logic [11:0] trig_row;
  pix_addr_t pix;
  int checks = 0, failures = 0;

  trigger_generator dut (.clk, .pix, .enable, .trig_row, .req);

  initial begin
    #50_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit exp_q [$];
  int n_req, n_err;
  task automatic sweep(bit en, int tr);
    exp_q.delete();
    n_req = 0;
    enable = en; trig_row = 12'(tr);
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
        exp_q.push_back(en && act && r == tr);
      end
    end
  endtask

  initial begin
    n_err = 0; pix = '{col: 0, row: 0, active: 0};
    repeat (2) @(negedge clk);
    sweep(1, 384); checks++; if (n_req != 1024) failures++;
    sweep(1, 0);   checks++; if (n_req != 1024) failures++;
    sweep(1, 790); checks++; if (n_req != 0) failures++;   // below the visible area
    sweep(0, 100); checks++; if (n_req != 0) failures++;
    failures += n_err;
    $display("errors %0d", n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
