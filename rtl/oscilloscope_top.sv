// oscilloscope_top: the logic of a single-FPGA oscilloscope with VGA output.
//
// The FPGA's built-in ADC, driven by its control core, samples one or two
// inputs. The sequencer paces the conversions, waits for a trigger with
// hysteresis, stores 1024 samples and interrupts the processor. The
// processor (outside this module) reads the samples, separates the channels,
// computes the arithmetic channel and writes the three plots, text and
// settings into the VGA module, which draws the picture on the fly at
// 1024 x 768, 60 Hz.
//
// Ports: the processor's Avalon-MM master (word address bit 13 selects the
// sequencer or the VGA module, read latency 1) and its interrupt input; the
// command and response Avalon-ST streams of the ADC control core; the VGA
// pins. Clocks: `clk` 50 MHz for the processor, bus, sequencer and ADC
// control core streams, `clk_pix` 65 MHz for the picture; both come from the
// PLL, as does the ADC's own 10 MHz clock, which does not enter this module.
// `rst_n` is an asynchronous active-low reset.
module oscilloscope_top
  import osc_pkg::*;
(
  input  logic                clk,
  input  logic                clk_pix,
  input  logic                rst_n,
  // Avalon-MM slave port, from the processor
  input  avmm_req_t           avs_req,
  output logic [31:0]         avs_readdata,
  output logic                irq,
  // ADC control core, command stream
  output logic                adc_cmd_valid,
  output logic [CHAN_W-1:0]   adc_cmd_channel,
  output logic                adc_cmd_sop,
  output logic                adc_cmd_eop,
  input  logic                adc_cmd_ready,
  // ADC control core, response stream
  input  logic                adc_rsp_valid,
  input  logic [CHAN_W-1:0]   adc_rsp_channel,
  input  logic [SAMPLE_W-1:0] adc_rsp_data,
  // VGA connector
  output logic                vga_r,
  output logic                vga_g,
  output logic                vga_b,
  output logic                vga_hsync,
  output logic                vga_vsync,
  // events, for monitoring
  output logic                ev_trigger,
  output logic                ev_done,
  output logic                ev_overrun,
  output logic                ev_frame
);

  avmm_req_t   seq_req, vga_req;
  logic [31:0] seq_readdata, vga_readdata;
  rgb_t        rgb;

  avalon_decoder u_bus (
    .clk, .rst_n,
    .m_req (avs_req), .m_readdata (avs_readdata),
    .seq_req, .seq_readdata,
    .vga_req, .vga_readdata
  );

  sequencer u_seq (
    .clk, .rst_n,
    .avs_address   (seq_req.address[10:0]),
    .avs_read      (seq_req.read),
    .avs_write     (seq_req.write),
    .avs_writedata (seq_req.writedata),
    .avs_readdata  (seq_readdata),
    .irq,
    .cmd_valid (adc_cmd_valid), .cmd_channel (adc_cmd_channel),
    .cmd_sop (adc_cmd_sop), .cmd_eop (adc_cmd_eop), .cmd_ready (adc_cmd_ready),
    .rsp_valid (adc_rsp_valid), .rsp_channel (adc_rsp_channel), .rsp_data (adc_rsp_data),
    .ev_trigger, .ev_done, .ev_overrun
  );

  vga_module u_vga (
    .clk, .rst_n,
    .avs_address   (vga_req.address[12:0]),
    .avs_read      (vga_req.read),
    .avs_write     (vga_req.write),
    .avs_writedata (vga_req.writedata),
    .avs_readdata  (vga_readdata),
    .clk_pix,
    .vga_rgb (rgb), .vga_hsync, .vga_vsync,
    .frame_start (ev_frame)
  );

  assign {vga_r, vga_g, vga_b} = rgb;

endmodule
