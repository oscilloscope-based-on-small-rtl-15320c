// adc_sampler: paces ADC conversions and tags the returned samples.
//
// A period counter, running on the system clock, produces one sampling tick
// every `period` clocks while `enable` is high. On each tick the module sends
// conversion commands to the ADC control core over an Avalon-ST command
// stream: one command for channel 1 in single-channel mode, or a packet of
// two commands (channel 1, then channel 2) in dual-channel chop mode. The ADC
// converts them back to back, so the channel 2 sample is taken one conversion
// time (1 us at 1 MS/s) after channel 1. Results come back on the Avalon-ST
// response stream, which has no backpressure, and leave as `smp_*` with
// `smp_second` telling channel 2 apart by its channel number.
//
// A tick that arrives while the previous command packet has not yet been
// accepted is dropped and reported on `overrun` for one clock.
//
// From the source design: the Avalon-ST command and response streams, the
// single/dual (chop) modes and the programmable sampling rate. This design's
// own choices: the period counter, the packet framing of a command pair, and
// that channels 1 and 2 must be different ADC inputs in dual mode.
module adc_sampler
  import osc_pkg::*;
#(
  parameter int unsigned PERIOD_W = 24
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable,
  input  logic                dual,
  input  logic [CHAN_W-1:0]   ch1_sel,
  input  logic [CHAN_W-1:0]   ch2_sel,
  input  logic [PERIOD_W-1:0] period,     // clocks per tick, 0 and 1 both mean every clock
  // Avalon-ST command source
  output logic                cmd_valid,
  output logic [CHAN_W-1:0]   cmd_channel,
  output logic                cmd_sop,
  output logic                cmd_eop,
  input  logic                cmd_ready,
  // Avalon-ST response sink
  input  logic                rsp_valid,
  input  logic [CHAN_W-1:0]   rsp_channel,
  input  logic [SAMPLE_W-1:0] rsp_data,
  // tagged samples
  output logic                smp_valid,
  output logic [SAMPLE_W-1:0] smp_data,
  output logic                smp_second,
  output logic                tick,
  output logic                overrun
);

  typedef enum logic [1:0] {S_IDLE, S_CH1, S_CH2} state_t;
  state_t state;

  logic [PERIOD_W-1:0] count;

  // Sampling tick
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
    end else if (!enable || count == 0) begin
      count <= (period > 1) ? period - 1'b1 : '0;
    end else begin
      count <= count - 1'b1;
    end
  end
  assign tick = enable && count == 0;

  // Command stream
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      overrun <= 1'b0;
    end else begin
      overrun <= 1'b0;
      unique case (state)
        S_IDLE: if (tick) state <= S_CH1;
        S_CH1:  if (cmd_ready) state <= dual ? S_CH2 : S_IDLE;
        S_CH2:  if (cmd_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
      if (tick && state != S_IDLE) overrun <= 1'b1;
    end
  end

  always_comb begin
    cmd_valid   = state != S_IDLE;
    cmd_channel = (state == S_CH2) ? ch2_sel : ch1_sel;
    cmd_sop     = state == S_CH1;
    cmd_eop     = state == S_CH2 || (state == S_CH1 && !dual);
  end

  // Response stream
  always_comb begin
    smp_valid  = rsp_valid;
    smp_data   = rsp_data;
    smp_second = dual && rsp_channel == ch2_sel;
  end

  // Avalon-ST: a command, once offered, stays stable until it is accepted.
  property p_cmd_stable;
    @(posedge clk) disable iff (!rst_n)
      cmd_valid && !cmd_ready |=> cmd_valid && $stable(cmd_channel) && $stable(cmd_sop);
  endproperty
  a_cmd_stable: assert property (p_cmd_stable);

endmodule
