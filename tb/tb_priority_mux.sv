// tb_priority_mux: random requests and colours; the output one clock later
// must be the colour of the lowest-numbered requesting input, or the
// background colour when none requests.
module tb_priority_mux;
  import osc_pkg::*;
  localparam int N = 6;
  logic clk = 0;
  always #1 clk = ~clk;
  logic [N-1:0] req;
  rgb_t [N-1:0] colour;
  rgb_t bg, pixel, expected;
  int checks = 0, failures = 0;

  priority_mux #(.N(N)) dut (.clk, .req, .colour, .bg_colour (bg), .pixel);

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int hits [N + 1];
    for (int k = 0; k <= N; k++) hits[k] = 0;
    req = 0; colour = 0; bg = 0;
    for (int i = 0; i < 20000; i++) begin
      int winner;
      @(negedge clk);
      req = N'($urandom) & N'($urandom);
      colour = (N * 3)'($urandom);
      bg = 3'($urandom);
      winner = N;
      for (int k = N - 1; k >= 0; k--) if (req[k]) winner = k;
      expected = (winner == N) ? bg : colour[winner];
      hits[winner]++;
      @(negedge clk);
      checks++;
      if (pixel !== expected) begin
        failures++;
        if (failures < 5) $display("req %b: pixel %0d expected %0d", req, pixel, expected);
      end
    end
    for (int k = 0; k <= N; k++) begin
      checks++; if (hits[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
