// tb_sequencer: the acquisition module with the ADC model, at full depth
// (1024 samples). A reference model watches the ADC response stream, decides
// independently where the hysteresis trigger fires, and records the samples
// that must be stored. The testbench then reads the memory back over
// Avalon-MM and compares. Cases: single channel at 1 MS/s on a rising edge
// (also checks that the 1024 samples take 1024 x 50 clocks), dual channel
// chop mode triggered on channel 2's falling edge, and a forced trigger on a
// flat input that would never trigger.
module tb_sequencer;
  import osc_pkg::*;
  logic clk = 0;
  always #10 clk = ~clk;
  logic rst_n;
  logic [10:0] address;
  logic read, write;
  logic [31:0] writedata, readdata;
  logic irq, cmd_valid, cmd_sop, cmd_eop, cmd_ready, rsp_valid;
  logic [4:0] cmd_channel, rsp_channel;
  logic [11:0] rsp_data;
  logic ev_trigger, ev_done, ev_overrun;
  logic [11:0] analog [2];
  int unsigned conversions;
  int checks = 0, failures = 0;

  sequencer dut (.clk, .rst_n, .avs_address (address), .avs_read (read), .avs_write (write),
    .avs_writedata (writedata), .avs_readdata (readdata), .irq,
    .cmd_valid, .cmd_channel, .cmd_sop, .cmd_eop, .cmd_ready,
    .rsp_valid, .rsp_channel, .rsp_data, .ev_trigger, .ev_done, .ev_overrun);

  adc_model adc (.clk, .rst_n, .analog, .cmd_valid, .cmd_channel, .cmd_ready,
    .rsp_valid, .rsp_channel, .rsp_data, .conversions);

  initial begin
    #50_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // analog signals: noisy triangles of different periods
  int unsigned cyc;
  bit flat;
  always_ff @(posedge clk) cyc <= cyc + 1;
  function automatic logic [11:0] tri_wave(int unsigned t, int unsigned half, int noise);
    int unsigned p; int v;
    p = t % (2 * half);
    v = 200 + int'((p < half ? p : 2 * half - p) * 3600 / half);
    v += int'($urandom_range(2 * noise)) - noise;
    return 12'(v < 0 ? 0 : v > 4095 ? 4095 : v);
  endfunction
  always_ff @(posedge clk) begin
    analog[0] <= flat ? 12'd1000 : tri_wave(cyc, 9000, 60);
    analog[1] <= flat ? 12'd1000 : tri_wave(cyc + 3000, 13000, 60);
  end

  // reference model on the response stream
  bit ref_dual, ref_src, ref_fall, ref_active, ref_armed, ref_fired;
  int ref_level, ref_hyst;
  logic [11:0] expected [$];
  int trig_cycle, done_cycle;
  always @(posedge clk) if (rst_n && rsp_valid && ref_active) begin
    bit second; int x; int hi, lo;
    second = ref_dual && rsp_channel == 5'd2;
    x = int'(rsp_data);
    hi = ref_level + ref_hyst; lo = ref_level - ref_hyst;
    if (ref_fired) begin
      if (expected.size() < 1024 && (!ref_dual || second == expected.size() % 2))
        expected.push_back(rsp_data);
    end else if (second == (ref_dual && ref_src)) begin
      if (ref_armed && (ref_fall ? x <= lo : x >= hi)) begin
        ref_fired = 1; trig_cycle = int'(cyc);
      end else if (ref_fall ? x >= hi : x <= lo) ref_armed = 1;
    end
  end
  always @(posedge clk) if (ev_done) done_cycle = int'(cyc);

  task automatic wr(int a, int d);
    @(negedge clk); address = 11'(a); writedata = 32'(d); write = 1;
    @(negedge clk); write = 0;
  endtask
  task automatic rd(int a, output logic [31:0] d);
    @(negedge clk); address = 11'(a); read = 1;
    @(negedge clk); read = 0; d = readdata;
  endtask

  int n_trig_events, n_done_events;
  always @(posedge clk) begin
    if (ev_trigger) n_trig_events++;
    if (ev_done) n_done_events++;
  end

  task automatic acquire(bit d, bit src, bit fall, int level, int hyst, int per, bit force_it);
    logic [31:0] v;
    int mism;
    ref_dual = d; ref_src = src; ref_fall = fall; ref_level = level; ref_hyst = hyst;
    ref_armed = 0; ref_fired = 0; expected.delete();
    wr(SEQ_REG_CONFIG, int'({11'd0, 5'd2, 3'd0, 5'd1, 5'd0, fall, src, d}));
    wr(SEQ_REG_LEVEL, level);
    wr(SEQ_REG_HYST, hyst);
    wr(SEQ_REG_PERIOD, per);
    wr(SEQ_REG_IRQEN, 1);
    ref_active = 1;
    wr(SEQ_REG_CTRL, 1);
    if (force_it) begin
      repeat (500) @(negedge clk);
      ref_fired = 1; trig_cycle = int'(cyc);
      wr(SEQ_REG_CTRL, 2);
    end
    wait (irq);
    @(negedge clk);
    ref_active = 0;
    checks++;
    if (expected.size() != 1024) begin
      failures++; $display("reference collected %0d samples", expected.size());
    end
    // rate: 1024 samples at `per` clocks each (pairs in dual mode)
    checks++;
    begin
      int span, nominal;
      span = done_cycle - trig_cycle;
      nominal = d ? 512 * per : 1024 * per;
      if (span < nominal - 2 * per || span > nominal + 2 * per) begin
        failures++; $display("acquisition took %0d clocks, expected about %0d", span, nominal);
      end
    end
    mism = 0;
    for (int i = 0; i < 1024; i++) begin
      rd(1024 + i, v);
      checks++;
      if (i < expected.size() && v !== 32'(expected[i])) begin
        failures++; mism++;
        if (mism < 5) $display("sample %0d: %0d expected %0d", i, v, expected[i]);
      end
    end
    rd(SEQ_REG_CTRL, v);
    checks++; if (v !== 32'(1 << ST_DONE)) failures++;
    wr(SEQ_REG_IRQ, 1);
    checks++; if (irq !== 0) failures++;
  endtask

  initial begin
    rst_n = 0; address = 0; read = 0; write = 0; writedata = 0; flat = 0; cyc = 0;
    ref_active = 0;
    repeat (3) @(negedge clk); rst_n = 1;

    acquire(0, 0, 0, 2048, 150, 50, 0);      // single, rising, 1 MS/s
    acquire(1, 1, 1, 1500, 150, 100, 0);     // dual chop, ch2 falling, 500 kS/s
    flat = 1;
    acquire(0, 0, 0, 3000, 10, 50, 1);       // flat signal: forced trigger
    checks++;
    if (n_trig_events != 3 || n_done_events != 3) failures++;
    $display("trigger events %0d, completed acquisitions %0d", n_trig_events, n_done_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
