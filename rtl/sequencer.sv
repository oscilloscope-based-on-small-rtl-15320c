// sequencer: the acquisition module between the ADC and the processor.
//
// Made of the four parts of its block diagram: the ADC sampling unit
// (adc_sampler), the trigger (trigger_unit), the acquisition memory
// (dual_port_ram, 1024 x 12 bit) and the control unit (seq_control), which is
// also the Avalon-MM slave. While an acquisition is armed the ADC is sampled
// continuously at the programmed rate; after the trigger, 1024 samples are
// written to the memory (even/odd addresses for channels 1/2 in dual mode),
// after which the interrupt is raised and the processor reads the samples
// through the Avalon-MM port. Everything runs on one clock, the Avalon clock
// of the ADC control core's streams (50 MHz). Register map: see osc_pkg and
// seq_control.
module sequencer
  import osc_pkg::*;
#(
  parameter int unsigned DEPTH        = ACQ_DEPTH,
  parameter int unsigned PERIOD_W     = 24,
  parameter int unsigned PERIOD_RESET = 50
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [10:0]         avs_address,
  input  logic                avs_read,
  input  logic                avs_write,
  input  logic [31:0]         avs_writedata,
  output logic [31:0]         avs_readdata,
  output logic                irq,
  // Avalon-ST command stream to the ADC control core
  output logic                cmd_valid,
  output logic [CHAN_W-1:0]   cmd_channel,
  output logic                cmd_sop,
  output logic                cmd_eop,
  input  logic                cmd_ready,
  // Avalon-ST response stream from the ADC control core
  input  logic                rsp_valid,
  input  logic [CHAN_W-1:0]   rsp_channel,
  input  logic [SAMPLE_W-1:0] rsp_data,
  // events, for monitoring
  output logic                ev_trigger,
  output logic                ev_done,
  output logic                ev_overrun
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic                dual, trig_falling, trig_src, sampling, trig_rearm, trig_force, trig;
  logic [CHAN_W-1:0]   ch1_sel, ch2_sel;
  logic [PERIOD_W-1:0] period;
  logic [SAMPLE_W-1:0] trig_level, trig_hyst;
  logic                smp_valid, smp_second;
  logic [SAMPLE_W-1:0] smp_data;
  logic                mem_wr_en, mem_rd_en;
  logic [AW-1:0]       mem_wr_addr, mem_rd_addr;
  logic [SAMPLE_W-1:0] mem_wr_data, mem_rd_data;

  adc_sampler #(.PERIOD_W(PERIOD_W)) u_sampler (
    .clk, .rst_n,
    .enable (sampling),
    .dual, .ch1_sel, .ch2_sel, .period,
    .cmd_valid, .cmd_channel, .cmd_sop, .cmd_eop, .cmd_ready,
    .rsp_valid, .rsp_channel, .rsp_data,
    .smp_valid, .smp_data, .smp_second,
    .tick (), .overrun (ev_overrun)
  );

  trigger_unit u_trigger (
    .clk, .rst_n,
    .rearm      (trig_rearm),
    .smp_valid  (smp_valid && sampling),
    .smp_sel    (smp_second == (dual && trig_src)),
    .smp_data,
    .level      (trig_level),
    .hyst       (trig_hyst),
    .falling    (trig_falling),
    .force_trig (trig_force),
    .armed      (),
    .trig
  );

  seq_control #(.DEPTH(DEPTH), .PERIOD_W(PERIOD_W), .PERIOD_RESET(PERIOD_RESET)) u_ctrl (
    .clk, .rst_n,
    .avs_address, .avs_read, .avs_write, .avs_writedata, .avs_readdata, .irq,
    .dual, .ch1_sel, .ch2_sel, .period, .trig_level, .trig_hyst, .trig_falling, .trig_src,
    .sampling, .trig_rearm, .trig_force, .trig,
    .smp_valid, .smp_second, .smp_data,
    .mem_wr_en, .mem_wr_addr, .mem_wr_data, .mem_rd_en, .mem_rd_addr, .mem_rd_data,
    .done_pulse (ev_done),
    .trig_accept (ev_trigger)
  );

  dual_port_ram #(.WIDTH(SAMPLE_W), .DEPTH(DEPTH)) u_acq_mem (
    .wr_clk (clk), .wr_en (mem_wr_en), .wr_addr (mem_wr_addr), .wr_data (mem_wr_data),
    .rd_clk (clk), .rd_en (mem_rd_en), .rd_addr (mem_rd_addr), .rd_data (mem_rd_data)
  );

endmodule
