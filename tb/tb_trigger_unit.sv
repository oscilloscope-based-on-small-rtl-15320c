// tb_trigger_unit: drives noisy and clean sample sequences into the trigger
// and compares every trigger pulse with a reference model written as a
// crossing detector over the band [T-H, T+H]. Also checks the case the
// hysteresis exists for: a noisy signal around T fires many times with H = 0
// and once per real edge with H large enough; plus falling edge, forced
// trigger, rearm and channel selection.
module tb_trigger_unit;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, rearm, smp_valid, smp_sel, falling, force_trig, armed, trig;
  logic [11:0] smp, level, hyst;
  int checks = 0, failures = 0;

  trigger_unit dut (.clk, .rst_n, .rearm, .smp_valid, .smp_sel, .smp_data (smp),
                    .level, .hyst, .falling, .force_trig, .armed, .trig);

  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Reference: state "was outside on the arming side since the last fire".
  int ref_state;  // 0 unknown, 1 armed
  function automatic bit ref_step(int x, int t, int h, bit fall);
    int hi, lo;
    bit fire;
    hi = (t + h > 4095) ? 4095 : t + h;
    lo = (t - h < 0) ? 0 : t - h;
    fire = 0;
    if (!fall) begin
      if (ref_state == 1 && x >= hi) begin fire = 1; ref_state = 0; end
      else if (x <= lo) ref_state = 1;
    end else begin
      if (ref_state == 1 && x <= lo) begin fire = 1; ref_state = 0; end
      else if (x >= hi) ref_state = 1;
    end
    return fire;
  endfunction

  int fired;
  task automatic send(int x, bit sel = 1);
    bit exp_fire;
    @(negedge clk);
    smp = 12'(x); smp_valid = 1; smp_sel = sel;
    exp_fire = sel ? ref_step(x, int'(level), int'(hyst), falling) : 0;
    @(negedge clk);
    smp_valid = 0;
    checks++;
    if (trig !== exp_fire) begin
      failures++;
      $display("sample %0d: trig %0b expected %0b", x, trig, exp_fire);
    end
    if (trig) fired++;
  endtask

  task automatic do_rearm();
    @(negedge clk); rearm = 1; @(negedge clk); rearm = 0; ref_state = 0;
  endtask

  // noisy sine-like signal: slow triangle plus noise
  function automatic int noisy(int i, int amp_noise);
    int tri_v;
    tri_v = (i % 200) < 100 ? 1000 + (i % 200) * 20 : 1000 + (200 - (i % 200)) * 20;
    return tri_v + int'($urandom_range(2 * amp_noise)) - amp_noise;
  endfunction

  int fired_nohyst, fired_hyst;
  initial begin
    rst_n = 0; rearm = 0; smp_valid = 0; smp_sel = 0; falling = 0; force_trig = 0;
    smp = 0; level = 2000; hyst = 0; ref_state = 0;
    repeat (3) @(negedge clk); rst_n = 1;

    // 1000 samples, 5 periods, noise +-150 around a 1000..3000 triangle
    hyst = 0; fired = 0; do_rearm();
    for (int i = 0; i < 1000; i++) send(noisy(i, 150));
    fired_nohyst = fired;
    hyst = 200; fired = 0; do_rearm();
    for (int i = 0; i < 1000; i++) send(noisy(i, 150));
    fired_hyst = fired;
    checks++;
    if (!(fired_hyst == 5 && fired_nohyst > fired_hyst)) begin
      failures++;
    end
    $display("rising triggers: H=0 -> %0d, H=200 -> %0d", fired_nohyst, fired_hyst);

    // falling edge
    falling = 1; fired = 0; do_rearm();
    for (int i = 0; i < 1000; i++) send(noisy(i, 150));
    checks++; if (fired != 5) failures++;

    // samples of the other channel are ignored
    falling = 0; do_rearm();
    send(100, 0); send(4000, 0);
    send(100, 1); send(4000, 0); send(4000, 1);

    // random everything
    for (int k = 0; k < 20; k++) begin
      level = 12'($urandom); hyst = 12'($urandom_range(400)); falling = 1'($urandom);
      do_rearm();
      for (int i = 0; i < 200; i++) send(int'($urandom_range(4095)), 1'($urandom_range(3) != 0));
    end

    // forced trigger, and rearm clears the armed state
    do_rearm();
    @(negedge clk); force_trig = 1; @(negedge clk); force_trig = 0;
    checks++; if (trig !== 1) failures++;
    level = 2000; hyst = 100; falling = 0;
    send(1000);                                 // arms
    checks++; if (armed !== 1) failures++;
    do_rearm();
    checks++; if (armed !== 0) failures++;
    send(3000);                                 // no fire: disarmed by rearm

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
