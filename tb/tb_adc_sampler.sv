// tb_adc_sampler: runs the sampler against the ADC model. Checks the tick
// spacing (one tick per `period` clocks), the command order and packet
// framing in single and dual (chop) mode, that channel 2 is converted one
// conversion time after channel 1, the tagging of returned samples, and the
// overrun flag when the period is shorter than the conversions need.
module tb_adc_sampler;
  logic clk = 0;
  always #10 clk = ~clk;   // 50 MHz
  logic rst_n, enable, dual;
  logic [4:0] ch1_sel, ch2_sel;
  logic [23:0] period;
  logic cmd_valid, cmd_sop, cmd_eop, cmd_ready, rsp_valid;
  logic [4:0] cmd_channel, rsp_channel;
  logic [11:0] rsp_data, smp_data;
  logic smp_valid, smp_second, tick, overrun;
  logic [11:0] analog [2];
  int unsigned conversions;
  int checks = 0, failures = 0;

  adc_sampler dut (.clk, .rst_n, .enable, .dual, .ch1_sel, .ch2_sel, .period,
    .cmd_valid, .cmd_channel, .cmd_sop, .cmd_eop, .cmd_ready,
    .rsp_valid, .rsp_channel, .rsp_data,
    .smp_valid, .smp_data, .smp_second, .tick, .overrun);

  adc_model #(.CONV_CYCLES(50)) adc (.clk, .rst_n, .analog,
    .cmd_valid, .cmd_channel, .cmd_ready, .rsp_valid, .rsp_channel, .rsp_data, .conversions);

  initial begin
    #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // analog inputs change every clock so that each sample is traceable
  int unsigned cyc;
  always_ff @(posedge clk) cyc <= cyc + 1;
  assign analog[0] = 12'(cyc);
  assign analog[1] = 12'(cyc) ^ 12'hA00;

  // monitors
  int last_tick, n_ticks, n_cmd, n_smp, n_second, n_overrun, last_ch1_accept;
  int gap_errors, order_errors, tag_errors, chop_errors;
  bit expect_ch2;
  int expected_period;
  always @(posedge clk) if (rst_n) begin
    if (tick) begin
      if (n_ticks > 0 && cyc - last_tick != expected_period) gap_errors++;
      last_tick = cyc; n_ticks++;
    end
    if (overrun) n_overrun++;
    if (cmd_valid && cmd_ready) begin
      n_cmd++;
      if (!expect_ch2) begin
        if (cmd_channel != ch1_sel || !cmd_sop || cmd_eop != !dual) order_errors++;
        last_ch1_accept = cyc;
        expect_ch2 = dual;
      end else begin
        if (cmd_channel != ch2_sel || cmd_sop || !cmd_eop) order_errors++;
        if (cyc - last_ch1_accept != 50) chop_errors++;
        expect_ch2 = 0;
      end
    end
    if (smp_valid) begin
      n_smp++;
      if (smp_second) n_second++;
      if (smp_second != (dual && rsp_channel == ch2_sel)) tag_errors++;
      if (smp_data != rsp_data) tag_errors++;
    end
  end

  task automatic run(bit d, int per, int cycles);
    @(negedge clk);
    enable = 0; dual = d; period = 24'(per); expected_period = per;
    repeat (120) @(negedge clk);
    n_ticks = 0; n_cmd = 0; n_smp = 0; n_second = 0; n_overrun = 0;
    gap_errors = 0; order_errors = 0; tag_errors = 0; chop_errors = 0; expect_ch2 = 0;
    enable = 1;
    repeat (cycles) @(negedge clk);
    enable = 0;
    repeat (120) @(negedge clk);
  endtask

  initial begin
    rst_n = 0; enable = 0; dual = 0; ch1_sel = 1; ch2_sel = 2; period = 50; cyc = 0;
    repeat (3) @(negedge clk); rst_n = 1;

    // single channel, 1 MS/s: 100 ticks in 5000 clocks
    run(0, 50, 5000);
    checks += 5;
    if (n_ticks != 100) failures++;
    if (gap_errors != 0) failures++;
    if (order_errors != 0) failures++;
    if (n_overrun != 0) failures++;
    if (n_smp != 100 || n_second != 0) failures++;
    $display("single: ticks %0d cmds %0d samples %0d", n_ticks, n_cmd, n_smp);

    // dual channel chop, 500 kS/s per channel: 50 pairs in 5000 clocks
    run(1, 100, 5000);
    checks += 6;
    if (n_ticks != 50) failures++;
    if (gap_errors != 0) failures++;
    if (order_errors != 0) failures++;
    if (chop_errors != 0) failures++;
    if (n_overrun != 0) failures++;
    if (n_smp != 100 || n_second != 50 || tag_errors != 0) failures++;
    $display("dual: ticks %0d cmds %0d samples %0d second %0d", n_ticks, n_cmd, n_smp, n_second);

    // slow time base
    run(0, 1000, 10000);
    checks += 2;
    if (n_ticks != 10 || gap_errors != 0) failures++;
    if (n_smp != 10) failures++;

    // dual at 50-clock period cannot keep up: overrun reported
    run(1, 50, 5000);
    checks += 2;
    if (n_overrun == 0) failures++;
    if (order_errors != 0) failures++;
    $display("overrun: %0d", n_overrun);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
