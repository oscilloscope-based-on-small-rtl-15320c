// vga_control: control unit of the VGA module.
//
// Avalon-MM slave on the processor clock. Word address[12:10] selects a
// region: 0 the setting registers, 1..3 the plot memories of channels 0..2
// (address[9:0] = column), 4 the text graphic memory (address[9:0] = word).
// Writes to a memory region are forwarded to that memory's write port in the
// same clock; the memories cannot be read back over the bus (reads return
// 0). Registers (map in osc_pkg): display enables, per-plot gain (8.8 fixed
// point) and offset (screen row of code 0), trigger line row, and the
// colours of every generator and of the background. They can be read back,
// with one clock of read latency and no wait states.
//
// Reset values show all three plots full-scale (gain 48/256 maps codes
// 0..4095 onto rows 767..0), the trigger line mid-screen, the text and grid
// on, on a black background.
//
// From the source design: a control unit on the Avalon bus writing the plot
// memories, text memory and trigger value, and holding the gain and offset
// used by the frame generation. This design's own choices: the register map,
// reset values and write-only memories.
module vga_control
  import osc_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic [12:0]   avs_address,
  input  logic          avs_read,
  input  logic          avs_write,
  input  logic [31:0]   avs_writedata,
  output logic [31:0]   avs_readdata,
  output vga_cfg_t      cfg,
  output logic [2:0]    plot_wr_en,
  output logic [9:0]    plot_wr_addr,
  output logic [SAMPLE_W-1:0] plot_wr_data,
  output logic          text_wr_en,
  output logic [9:0]    text_wr_addr,
  output logic [31:0]   text_wr_data
);

  logic [2:0] region;
  logic [3:0] reg_idx;
  assign region  = avs_address[12:10];
  assign reg_idx = avs_address[3:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.enable      <= 6'b111111;
      cfg.gain        <= {3{16'd48}};
      cfg.offset      <= {3{12'd767}};
      cfg.trig_row    <= 12'd384;
      cfg.plot_colour <= {3'b101, 3'b011, 3'b110};  // magenta, cyan, yellow
      cfg.text_colour <= 3'b111;
      cfg.trig_colour <= 3'b100;
      cfg.grid_colour <= 3'b001;
      cfg.bg_colour   <= 3'b000;
    end else if (avs_write && region == VGA_RGN_REGS) begin
      unique case (reg_idx)
        VGA_REG_ENABLE:  cfg.enable   <= avs_writedata[5:0];
        4'd1, 4'd2, 4'd3: cfg.gain[reg_idx - VGA_REG_GAIN0] <= avs_writedata[15:0];
        4'd4, 4'd5, 4'd6: cfg.offset[reg_idx - VGA_REG_OFFSET0] <= avs_writedata[11:0];
        VGA_REG_TRIG:    cfg.trig_row <= avs_writedata[11:0];
        VGA_REG_COLOUR:  {cfg.bg_colour, cfg.grid_colour, cfg.trig_colour, cfg.text_colour,
                          cfg.plot_colour} <= avs_writedata[20:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    for (int k = 0; k < 3; k++)
      plot_wr_en[k] = avs_write && region == VGA_RGN_PLOT0 + 3'(k);
    plot_wr_addr = avs_address[9:0];
    plot_wr_data = avs_writedata[SAMPLE_W-1:0];
    text_wr_en   = avs_write && region == VGA_RGN_TEXT;
    text_wr_addr = avs_address[9:0];
    text_wr_data = avs_writedata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      avs_readdata <= '0;
    end else if (avs_read) begin
      avs_readdata <= '0;
      if (region == VGA_RGN_REGS) begin
        unique case (reg_idx)
          VGA_REG_ENABLE:   avs_readdata <= 32'(cfg.enable);
          4'd1, 4'd2, 4'd3: avs_readdata <= 32'(cfg.gain[reg_idx - VGA_REG_GAIN0]);
          4'd4, 4'd5, 4'd6: avs_readdata <= 32'(cfg.offset[reg_idx - VGA_REG_OFFSET0]);
          VGA_REG_TRIG:     avs_readdata <= 32'(cfg.trig_row);
          VGA_REG_COLOUR:   avs_readdata <= 32'({cfg.bg_colour, cfg.grid_colour, cfg.trig_colour,
                                                 cfg.text_colour, cfg.plot_colour});
          default: ;
        endcase
      end
    end
  end

endmodule
