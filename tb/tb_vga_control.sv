// tb_vga_control: writes and reads back every setting register (one clock
// read latency), checks the settings outputs and their reset values, and
// checks that writes to the plot and text regions reach exactly one memory
// write port with the right address and data, and never change a register.
module tb_vga_control;
  import osc_pkg::*;
  logic clk = 0;
  always #10 clk = ~clk;
  logic rst_n, read, write, text_wr_en;
  logic [12:0] address;
  logic [31:0] writedata, readdata, text_wr_data;
  vga_cfg_t cfg;
  logic [2:0] plot_wr_en;
  logic [9:0] plot_wr_addr, text_wr_addr;
  logic [11:0] plot_wr_data;
  int checks = 0, failures = 0;

  vga_control dut (.clk, .rst_n, .avs_address (address), .avs_read (read), .avs_write (write),
    .avs_writedata (writedata), .avs_readdata (readdata), .cfg,
    .plot_wr_en, .plot_wr_addr, .plot_wr_data, .text_wr_en, .text_wr_addr, .text_wr_data);

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask
  task automatic rd(int a, output logic [31:0] d);
    @(negedge clk); address = 13'(a); read = 1;
    @(negedge clk); read = 0; d = readdata;
  endtask

  // write strobes seen on the memory ports
  int n_plot [3], n_text;
  logic [9:0] last_addr; logic [31:0] last_data;
  always @(posedge clk) begin
    for (int k = 0; k < 3; k++) if (plot_wr_en[k]) begin
      n_plot[k]++; last_addr = plot_wr_addr; last_data = 32'(plot_wr_data);
    end
    if (text_wr_en) begin n_text++; last_addr = text_wr_addr; last_data = text_wr_data; end
  end

  task automatic wr(int a, int d);
    @(negedge clk); address = 13'(a); writedata = 32'(d); write = 1;
    @(negedge clk); write = 0;
  endtask

  logic [31:0] d;
  vga_cfg_t cfg_saved;
  initial begin
    @(negedge clk);
    rst_n = 0; read = 0; write = 0; address = 0; writedata = 0;
    for (int k = 0; k < 3; k++) n_plot[k] = 0;
    n_text = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    expect_eq("reset enable", 64'(cfg.enable), 6'b111111);
    expect_eq("reset gain", 64'(cfg.gain[1]), 48);
    expect_eq("reset offset", 64'(cfg.offset[2]), 767);
    expect_eq("reset trig", 64'(cfg.trig_row), 384);
    rd(VGA_REG_GAIN0, d); expect_eq("read gain0", 64'(d), 48);

    wr(VGA_REG_ENABLE, 6'b010101);   rd(VGA_REG_ENABLE, d); expect_eq("enable", 64'(d), 6'b010101);
    expect_eq("cfg enable", 64'(cfg.enable), 6'b010101);
    for (int k = 0; k < 3; k++) begin
      wr(int'(VGA_REG_GAIN0) + k, 100 + k);
      wr(int'(VGA_REG_OFFSET0) + k, 600 + k);
    end
    for (int k = 0; k < 3; k++) begin
      rd(int'(VGA_REG_GAIN0) + k, d);   expect_eq("gain", 64'(d), 100 + k);
      rd(int'(VGA_REG_OFFSET0) + k, d); expect_eq("offset", 64'(d), 600 + k);
      expect_eq("cfg gain", 64'(cfg.gain[k]), 100 + k);
      expect_eq("cfg offset", 64'(cfg.offset[k]), 600 + k);
    end
    wr(VGA_REG_TRIG, 222); rd(VGA_REG_TRIG, d); expect_eq("trig", 64'(d), 222);
    wr(VGA_REG_COLOUR, 21'o1234567);
    rd(VGA_REG_COLOUR, d); expect_eq("colours", 64'(d), 21'o1234567);
    expect_eq("plot colours", 64'(cfg.plot_colour), 9'o567);
    expect_eq("text colour", 64'(cfg.text_colour), 3'o4);
    expect_eq("trig colour", 64'(cfg.trig_colour), 3'o3);
    expect_eq("grid colour", 64'(cfg.grid_colour), 3'o2);
    expect_eq("bg colour", 64'(cfg.bg_colour), 3'o1);

    // memory regions
    cfg_saved = cfg;
    for (int k = 0; k < 3; k++) begin
      wr((k + 1) * 1024 + 17 * (k + 1), 32'hABC0 + k);
      expect_eq("plot strobe", 64'(n_plot[k]), 1);
      expect_eq("plot addr", 64'(last_addr), 17 * (k + 1));
      expect_eq("plot data", 64'(last_data), (32'hABC0 + k) & 12'hFFF);
    end
    wr(4 * 1024 + 1000, 32'hDEADBEEF);
    expect_eq("text strobe", 64'(n_text), 1);
    expect_eq("text addr", 64'(last_addr), 1000);
    expect_eq("text data", 64'(last_data), 32'hDEADBEEF);
    for (int k = 0; k < 3; k++) expect_eq("one strobe per plot", 64'(n_plot[k]), 1);
    expect_eq("registers untouched", 64'(cfg == cfg_saved), 1);
    rd(1024 + 17, d); expect_eq("memory reads return 0", 64'(d), 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
