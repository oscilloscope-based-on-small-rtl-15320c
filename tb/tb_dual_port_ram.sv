// tb_dual_port_ram: writes random words on one clock and reads them back on
// an unrelated clock, checking the data against a reference array and that
// the read data arrives one read-clock edge after the address.
module tb_dual_port_ram;
  localparam int W = 12, D = 1024;
  logic wclk = 0, rclk = 0;
  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  logic we, re;
  logic [9:0] wa, ra;
  logic [W-1:0] wd, rd;
  logic [W-1:0] ref_mem [D];
  int checks = 0, failures = 0;

  dual_port_ram #(.WIDTH(W), .DEPTH(D)) dut (
    .wr_clk (wclk), .wr_en (we), .wr_addr (wa), .wr_data (wd),
    .rd_clk (rclk), .rd_en (re), .rd_addr (ra), .rd_data (rd));

  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; re = 0; wa = 0; ra = 0; wd = 0;
    for (int i = 0; i < D; i++) ref_mem[i] = '0;
    // initial contents are zero
    for (int i = 0; i < 8; i++) begin
      @(negedge rclk); re = 1; ra = 10'(i * 97);
      @(posedge rclk); #1;
      checks++; if (rd !== '0) failures++;
    end
    re = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge wclk);
      we = 1; wa = 10'($urandom); wd = W'($urandom);
      ref_mem[wa] = wd;
    end
    @(negedge wclk); we = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge rclk);
      re = 1; ra = 10'($urandom);
      @(posedge rclk); #1;
      checks++;
      if (rd !== ref_mem[ra]) begin
        failures++;
        $display("mismatch addr %0d: %h != %h", ra, rd, ref_mem[ra]);
      end
    end
    // rd_en low holds the output
    @(negedge rclk); re = 0; ra = ra + 1'b1;
    begin
      logic [W-1:0] held;
      held = rd;
      @(posedge rclk); #1;
      checks++; if (rd !== held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
