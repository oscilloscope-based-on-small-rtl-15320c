// tb_avalon_decoder: random reads and writes from the master side. Checks
// that strobes reach only the slave selected by address bit 13, that
// address and data pass unchanged, and that a read returns the selected
// slave's data one clock later (the two slave models answer with different
// functions of the address).
module tb_avalon_decoder;
  import osc_pkg::*;
  logic clk = 0;
  always #10 clk = ~clk;
  logic rst_n;
  avmm_req_t m_req, seq_req, vga_req;
  logic [31:0] m_readdata, seq_readdata, vga_readdata;
  int checks = 0, failures = 0;

  avalon_decoder dut (.clk, .rst_n, .m_req, .m_readdata, .seq_req, .seq_readdata,
                      .vga_req, .vga_readdata);

  // slave models, read latency 1
  always_ff @(posedge clk) begin
    if (seq_req.read) seq_readdata <= {18'h1111, seq_req.address};
    if (vga_req.read) vga_readdata <= {18'h2222, vga_req.address} ^ 32'hFFFF_0000;
  end

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n_seq, n_vga;
    n_seq = 0; n_vga = 0;
    @(negedge clk);
    rst_n = 0; m_req = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      bit is_read, to_vga;
      logic [31:0] exp;
      @(negedge clk);
      is_read = 1'($urandom);
      m_req.address = 14'($urandom);
      m_req.writedata = $urandom;
      m_req.read = is_read; m_req.write = !is_read;
      to_vga = m_req.address[13];
      #1;
      checks++;
      if (seq_req.read != (is_read && !to_vga) || seq_req.write != (!is_read && !to_vga)
          || vga_req.read != (is_read && to_vga) || vga_req.write != (!is_read && to_vga)
          || seq_req.address != m_req.address || vga_req.writedata != m_req.writedata)
        failures++;
      exp = to_vga ? {18'h2222, m_req.address} ^ 32'hFFFF_0000 : {18'h1111, m_req.address};
      if (to_vga) n_vga++; else n_seq++;
      @(negedge clk);
      // the next request may already address the other slave
      m_req.read = 0; m_req.write = 0; m_req.address[13] = !m_req.address[13];
      #1;
      if (is_read) begin
        checks++;
        if (m_readdata !== exp) failures++;
      end
    end
    checks++; if (n_vga < 100 || n_seq < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
