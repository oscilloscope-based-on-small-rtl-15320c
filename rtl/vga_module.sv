// vga_module: generates the oscilloscope picture on the fly.
//
// A 1024 x 768 frame with 3-bit colour does not fit in the FPGA's block RAM,
// so no frame buffer is kept. Instead the VGA signal generator's column and
// row counters (the pixel address) are sent to six frame generators in
// parallel: three plot generators (channel 1, channel 2 and the arithmetic
// channel, each with its own 1024-sample plot memory), the text generator
// (graphic-mode window), the trigger line generator and the grid generator.
// Each raises a pixel request when it has a foreground pixel at that
// address; the priority multiplexer picks one colour, or the background, and
// the signal generator sends it out with the sync pulses.
//
// Two clock domains: the Avalon side (`clk`, processor clock) holds the
// control unit and writes the memories; the picture side (`clk_pix`, 65 MHz)
// reads them. The settings cross into the pixel domain through two registers;
// they are changed rarely and a setting that changes mid-frame only affects
// that frame. The pixel-domain reset is released synchronously to clk_pix.
//
// Interface: Avalon-MM slave (see vga_control for the map), VGA outputs
// one bit per colour. Output timing: the sync and colour outputs are
// registered and aligned with each other.
module vga_module
  import osc_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 1024,
  parameter int unsigned H_FP     = 24,
  parameter int unsigned H_SYNC   = 136,
  parameter int unsigned H_BP     = 160,
  parameter int unsigned V_ACTIVE = 768,
  parameter int unsigned V_FP     = 3,
  parameter int unsigned V_SYNC   = 6,
  parameter int unsigned V_BP     = 29
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [12:0] avs_address,
  input  logic        avs_read,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  input  logic        clk_pix,
  output rgb_t        vga_rgb,
  output logic        vga_hsync,
  output logic        vga_vsync,
  output logic        frame_start
);

  localparam int unsigned N_GEN = 6;

  vga_cfg_t             cfg_sys, cfg_meta, cfg;
  logic [2:0]           plot_wr_en;
  logic [9:0]           plot_wr_addr, text_wr_addr;
  logic [SAMPLE_W-1:0]  plot_wr_data;
  logic                 text_wr_en;
  logic [31:0]          text_wr_data;
  logic [1:0]           rst_pix_q;
  logic                 rst_pix_n;
  pix_addr_t            pix;
  logic [N_GEN-1:0]     req;
  rgb_t [N_GEN-1:0]     colour;
  rgb_t                 pixel;

  vga_control u_ctrl (
    .clk, .rst_n,
    .avs_address, .avs_read, .avs_write, .avs_writedata, .avs_readdata,
    .cfg (cfg_sys),
    .plot_wr_en, .plot_wr_addr, .plot_wr_data,
    .text_wr_en, .text_wr_addr, .text_wr_data
  );

  // Pixel-domain reset and settings
  always_ff @(posedge clk_pix or negedge rst_n) begin
    if (!rst_n) rst_pix_q <= '0;
    else        rst_pix_q <= {rst_pix_q[0], 1'b1};
  end
  assign rst_pix_n = rst_pix_q[1];

  always_ff @(posedge clk_pix) begin
    cfg_meta <= cfg_sys;
    cfg      <= cfg_meta;
  end

  vga_signal_generator #(
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)
  ) u_sig (
    .clk (clk_pix), .rst_n (rst_pix_n),
    .pix, .frame_start, .pixel, .vga_rgb, .vga_hsync, .vga_vsync
  );

  text_generator u_text (
    .wr_clk (clk), .wr_en (text_wr_en), .wr_addr (text_wr_addr), .wr_data (text_wr_data),
    .clk (clk_pix), .pix, .enable (cfg.enable[3]), .req (req[0])
  );

  for (genvar k = 0; k < 3; k++) begin : g_plot
    plot_generator u_plot (
      .wr_clk (clk), .wr_en (plot_wr_en[k]), .wr_addr (plot_wr_addr), .wr_data (plot_wr_data),
      .clk (clk_pix), .pix, .enable (cfg.enable[k]),
      .gain (cfg.gain[k]), .offset (cfg.offset[k]), .req (req[1 + k])
    );
  end

  trigger_generator u_trig (
    .clk (clk_pix), .pix, .enable (cfg.enable[4]), .trig_row (cfg.trig_row), .req (req[4])
  );

  grid_generator #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE)) u_grid (
    .clk (clk_pix), .pix, .enable (cfg.enable[5]), .req (req[5])
  );

  assign colour = {cfg.grid_colour, cfg.trig_colour, cfg.plot_colour, cfg.text_colour};

  priority_mux #(.N(N_GEN)) u_mux (
    .clk (clk_pix), .req, .colour, .bg_colour (cfg.bg_colour), .pixel
  );

endmodule
