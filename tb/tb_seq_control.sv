// tb_seq_control: drives the sequencer control unit directly. Checks the
// register write/read-back with one clock of read latency, the state
// sequence IDLE -> ARMED -> STORING -> DONE with the status bits, that
// storage starts only after the trigger, the even/odd channel interleave in
// dual mode (including skipping a channel 2 sample that would start the
// record), the interrupt with its enable and clear, stop, and forced trigger.
module tb_seq_control;
  import osc_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0;
  always #10 clk = ~clk;
  logic rst_n;
  logic [10:0] address;
  logic read, write;
  logic [31:0] writedata, readdata;
  logic irq, dual, trig_falling, trig_src, sampling, trig_rearm, trig_force, trig;
  logic [4:0] ch1_sel, ch2_sel;
  logic [23:0] period;
  logic [11:0] trig_level, trig_hyst, smp_data, mem_wr_data, mem_rd_data;
  logic smp_valid, smp_second, mem_wr_en, mem_rd_en, done_pulse, trig_accept;
  logic [3:0] mem_wr_addr, mem_rd_addr;
  int checks = 0, failures = 0;

  seq_control #(.DEPTH(DEPTH)) dut (.clk, .rst_n,
    .avs_address (address), .avs_read (read), .avs_write (write),
    .avs_writedata (writedata), .avs_readdata (readdata), .irq,
    .dual, .ch1_sel, .ch2_sel, .period, .trig_level, .trig_hyst, .trig_falling, .trig_src,
    .sampling, .trig_rearm, .trig_force, .trig,
    .smp_valid, .smp_second, .smp_data,
    .mem_wr_en, .mem_wr_addr, .mem_wr_data, .mem_rd_en, .mem_rd_addr, .mem_rd_data,
    .done_pulse, .trig_accept);

  // memory model: stores writes, answers reads one clock later
  logic [11:0] mem [DEPTH];
  int n_writes;
  always @(posedge clk) begin
    if (mem_wr_en) begin mem[mem_wr_addr] <= mem_wr_data; n_writes++; end
    if (mem_rd_en) mem_rd_data <= mem[mem_rd_addr] ;
  end

  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(int a, int d);
    @(negedge clk); address = 11'(a); writedata = 32'(d); write = 1;
    @(negedge clk); write = 0;
  endtask
  task automatic rd(int a, output logic [31:0] d);
    @(negedge clk); address = 11'(a); read = 1;
    @(negedge clk); read = 0; d = readdata;
  endtask
  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask
  task automatic sample(int v, bit second);
    @(negedge clk); smp_valid = 1; smp_data = 12'(v); smp_second = second;
    @(negedge clk); smp_valid = 0;
    repeat (2) @(negedge clk);
  endtask

  logic [31:0] d;
  initial begin
    rst_n = 0; address = 0; read = 0; write = 0; writedata = 0; trig = 0;
    smp_valid = 0; smp_second = 0; smp_data = 0; n_writes = 0;
    repeat (3) @(negedge clk); rst_n = 1;

    // reset values and read-back
    rd(SEQ_REG_PERIOD, d); expect_eq("period reset", d, 50);
    rd(SEQ_REG_LEVEL, d);  expect_eq("level reset", d, 2048);
    wr(SEQ_REG_PERIOD, 1234); rd(SEQ_REG_PERIOD, d); expect_eq("period", d, 1234);
    wr(SEQ_REG_LEVEL, 777);   rd(SEQ_REG_LEVEL, d);  expect_eq("level", d, 777);
    wr(SEQ_REG_HYST, 55);     rd(SEQ_REG_HYST, d);   expect_eq("hyst", d, 55);
    wr(SEQ_REG_CONFIG, 32'h0003_0506);
    rd(SEQ_REG_CONFIG, d); expect_eq("config", d, 32'h0003_0506);
    expect_eq("config outputs", {dual, trig_src, trig_falling, ch1_sel, ch2_sel},
              {1'b0, 1'b1, 1'b1, 5'd5, 5'd3});
    expect_eq("outputs", {period, trig_level, trig_hyst}, {24'd1234, 12'd777, 12'd55});
    rd(SEQ_REG_CTRL, d); expect_eq("idle status", d, 0);
    expect_eq("idle not sampling", sampling, 0);

    // single-channel acquisition
    wr(SEQ_REG_IRQEN, 1);
    wr(SEQ_REG_CONFIG, 32'h0002_0100);
    wr(SEQ_REG_CTRL, 1);
    rd(SEQ_REG_CTRL, d); expect_eq("armed status", d, 1 << ST_ARMED);
    expect_eq("sampling", sampling, 1);
    for (int i = 0; i < 5; i++) sample(100 + i, 0);       // before trigger: not stored
    expect_eq("no writes before trigger", n_writes, 0);
    @(negedge clk); trig = 1; @(negedge clk); trig = 0;
    rd(SEQ_REG_CTRL, d); expect_eq("storing status", d, 1 << ST_STORING);
    for (int i = 0; i < DEPTH; i++) begin
      expect_eq("no irq while storing", irq, 0);
      sample(1000 + i, 0);
    end
    rd(SEQ_REG_CTRL, d); expect_eq("done status", d, 1 << ST_DONE);
    expect_eq("irq", irq, 1);
    expect_eq("not sampling after done", sampling, 0);
    sample(5, 0);
    expect_eq("write count", n_writes, DEPTH);
    for (int i = 0; i < DEPTH; i++) begin
      rd(1024 + i, d); expect_eq("sample", d, 1000 + i);
    end
    rd(SEQ_REG_IRQ, d); expect_eq("irq pending", d, 1);
    wr(SEQ_REG_IRQ, 1);
    expect_eq("irq cleared", irq, 0);

    // dual-channel: storage starts on a channel 1 sample
    n_writes = 0;
    wr(SEQ_REG_CONFIG, 32'h0002_0101);
    wr(SEQ_REG_CTRL, 1);
    sample(1, 0);
    @(negedge clk); trig = 1; @(negedge clk); trig = 0;
    sample(2222, 1);                      // channel 2 first: skipped
    for (int i = 0; i < DEPTH / 2; i++) begin
      sample(200 + i, 0);
      sample(300 + i, 1);
    end
    expect_eq("dual write count", n_writes, DEPTH);
    for (int i = 0; i < DEPTH; i++) begin
      rd(1024 + i, d);
      expect_eq("dual sample", d, (i % 2 == 0) ? 200 + i / 2 : 300 + i / 2);
    end
    expect_eq("irq 2", irq, 1);
    wr(SEQ_REG_IRQ, 1);

    // interrupt disabled: pending but no irq
    wr(SEQ_REG_IRQEN, 0);
    wr(SEQ_REG_CONFIG, 0);
    wr(SEQ_REG_CTRL, 1);
    n_force = 0;
    wr(SEQ_REG_CTRL, 2);                  // forced trigger
    expect_eq("one force pulse", n_force, 1);
    rd(SEQ_REG_CTRL, d); expect_eq("forced", d, 1 << ST_ARMED);  // trigger unit not modelled: still armed
    // the control unit passes the force request to the trigger, which answers
    @(negedge clk); trig = 1; @(negedge clk); trig = 0;
    for (int i = 0; i < DEPTH; i++) sample(i, 0);
    expect_eq("irq masked", irq, 0);
    rd(SEQ_REG_IRQ, d); expect_eq("pending while masked", d, 1);

    // stop
    wr(SEQ_REG_CTRL, 1);
    wr(SEQ_REG_CTRL, 4);
    rd(SEQ_REG_CTRL, d); expect_eq("stopped", d, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the force request is a one-clock pulse while armed
  int n_force;
  always @(posedge clk) if (trig_force) n_force++;
endmodule
