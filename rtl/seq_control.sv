// seq_control: control unit of the sequencer (acquisition module).
//
// Holds the sequencer's Avalon-MM registers and runs one acquisition at a
// time:
//   IDLE    -> ARMED   on a write of CTRL.start; the ADC samples continuously
//                      and the trigger watches the trigger channel
//   ARMED   -> STORING on the trigger or on CTRL.force
//   STORING -> DONE    after ACQ_DEPTH samples have been written
// A new CTRL.start restarts from any state; CTRL.stop returns to IDLE.
// Storage starts with the first sample after the trigger. In dual-channel
// mode the write address is even for channel 1 and odd for channel 2, and a
// sample that does not fit that order is skipped, so storage starts on a
// channel 1 sample and the pairs stay aligned. Reaching DONE sets the
// interrupt pending flag; `irq` is pending AND enabled, and writing 1 to bit 0
// of the IRQ register clears it.
//
// Avalon-MM slave, simple transfers with a fixed read latency of one clock
// and no wait states. Word address[10] = 1 reads the acquisition memory
// (address[9:0] is the sample index), address[10] = 0 selects a register
// (map in osc_pkg). Readdata is zero-extended.
//
// From the source design: the selectable sampling rate, trigger settings,
// forced trigger, reading the samples, the interrupt at the end of the
// acquisition, post-trigger storage of 1024 samples and the even/odd channel
// interleave. This design's own choices: register map, reset values (1 MS/s at
// a 50 MHz clock, level at mid-scale) and the state machine above.
module seq_control
  import osc_pkg::*;
#(
  parameter int unsigned DEPTH    = ACQ_DEPTH,
  parameter int unsigned AW       = $clog2(DEPTH),
  parameter int unsigned PERIOD_W = 24,
  parameter int unsigned PERIOD_RESET = 50   // 1 MS/s at 50 MHz
) (
  input  logic                clk,
  input  logic                rst_n,
  // Avalon-MM slave
  input  logic [10:0]         avs_address,
  input  logic                avs_read,
  input  logic                avs_write,
  input  logic [31:0]         avs_writedata,
  output logic [31:0]         avs_readdata,
  output logic                irq,
  // settings to the sampler and the trigger
  output logic                dual,
  output logic [CHAN_W-1:0]   ch1_sel,
  output logic [CHAN_W-1:0]   ch2_sel,
  output logic [PERIOD_W-1:0] period,
  output logic [SAMPLE_W-1:0] trig_level,
  output logic [SAMPLE_W-1:0] trig_hyst,
  output logic                trig_falling,
  output logic                trig_src,      // 0: channel 1, 1: channel 2
  output logic                sampling,      // ADC sampling enabled
  output logic                trig_rearm,
  output logic                trig_force,
  input  logic                trig,
  // tagged samples from the sampler
  input  logic                smp_valid,
  input  logic                smp_second,
  input  logic [SAMPLE_W-1:0] smp_data,
  // acquisition memory
  output logic                mem_wr_en,
  output logic [AW-1:0]       mem_wr_addr,
  output logic [SAMPLE_W-1:0] mem_wr_data,
  output logic                mem_rd_en,
  output logic [AW-1:0]       mem_rd_addr,
  input  logic [SAMPLE_W-1:0] mem_rd_data,
  output logic                done_pulse,
  output logic                trig_accept    // trigger taken by an armed acquisition
);

  typedef enum logic [1:0] {IDLE, ARMED, STORING, DONE} state_t;
  state_t state;

  logic          irq_en, irq_pending;
  logic [AW:0]   wr_count;
  logic          reg_write, start_cmd, force_cmd, stop_cmd;
  logic          rd_mem_q;
  logic [31:0]   reg_rdata;

  assign reg_write = avs_write && !avs_address[10];
  assign start_cmd = reg_write && avs_address[2:0] == SEQ_REG_CTRL && avs_writedata[0];
  assign force_cmd = reg_write && avs_address[2:0] == SEQ_REG_CTRL && avs_writedata[1];
  assign stop_cmd  = reg_write && avs_address[2:0] == SEQ_REG_CTRL && avs_writedata[2];

  // Settings registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dual         <= 1'b0;
      trig_src     <= 1'b0;
      trig_falling <= 1'b0;
      ch1_sel      <= CHAN_W'(1);
      ch2_sel      <= CHAN_W'(2);
      period       <= PERIOD_W'(PERIOD_RESET);
      trig_level   <= SAMPLE_W'(1 << (SAMPLE_W - 1));
      trig_hyst    <= SAMPLE_W'(16);
      irq_en       <= 1'b0;
    end else if (reg_write) begin
      unique case (avs_address[2:0])
        SEQ_REG_CONFIG: begin
          dual         <= avs_writedata[0];
          trig_src     <= avs_writedata[1];
          trig_falling <= avs_writedata[2];
          ch1_sel      <= avs_writedata[8 +: CHAN_W];
          ch2_sel      <= avs_writedata[16 +: CHAN_W];
        end
        SEQ_REG_PERIOD: period     <= avs_writedata[PERIOD_W-1:0];
        SEQ_REG_LEVEL:  trig_level <= avs_writedata[SAMPLE_W-1:0];
        SEQ_REG_HYST:   trig_hyst  <= avs_writedata[SAMPLE_W-1:0];
        SEQ_REG_IRQEN:  irq_en     <= avs_writedata[0];
        default: ;
      endcase
    end
  end

  // Acquisition state machine and storage
  logic store_ok;
  assign store_ok = smp_valid && (!dual || smp_second == wr_count[0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= IDLE;
      wr_count    <= '0;
      irq_pending <= 1'b0;
    end else begin
      if (start_cmd) begin
        state    <= ARMED;
        wr_count <= '0;
      end else if (stop_cmd) begin
        state <= IDLE;
      end else begin
        unique case (state)
          IDLE:    ;
          ARMED:   if (trig) begin
                     state    <= STORING;
                     wr_count <= '0;
                   end
          STORING: if (store_ok) begin
                     wr_count <= wr_count + 1'b1;
                     if (wr_count == (AW+1)'(DEPTH - 1)) state <= DONE;
                   end
          DONE:    ;
          default: state <= IDLE;
        endcase
      end
      if (state == STORING && store_ok && wr_count == (AW+1)'(DEPTH - 1))
        irq_pending <= 1'b1;
      else if (reg_write && avs_address[2:0] == SEQ_REG_IRQ && avs_writedata[0])
        irq_pending <= 1'b0;
    end
  end

  assign done_pulse  = state == STORING && store_ok && wr_count == (AW+1)'(DEPTH - 1);
  assign trig_accept = state == ARMED && trig && !start_cmd && !stop_cmd;
  assign sampling    = state == ARMED || state == STORING;
  assign trig_rearm  = start_cmd;
  assign trig_force  = force_cmd && state == ARMED;
  assign irq         = irq_pending && irq_en;

  assign mem_wr_en   = state == STORING && store_ok && !start_cmd && !stop_cmd;
  assign mem_wr_addr = wr_count[AW-1:0];
  assign mem_wr_data = smp_data;

  // Avalon-MM reads, one clock latency
  assign mem_rd_en   = avs_read && avs_address[10];
  assign mem_rd_addr = avs_address[AW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_rdata <= '0;
      rd_mem_q  <= 1'b0;
    end else begin
      rd_mem_q <= avs_address[10];
      if (avs_read) begin
        unique case (avs_address[2:0])
          SEQ_REG_CTRL:   reg_rdata <= 32'({state == DONE, state == STORING, state == ARMED});
          SEQ_REG_CONFIG: reg_rdata <= 32'({ch2_sel, 3'b0, ch1_sel, 5'b0, trig_falling, trig_src, dual});
          SEQ_REG_PERIOD: reg_rdata <= 32'(period);
          SEQ_REG_LEVEL:  reg_rdata <= 32'(trig_level);
          SEQ_REG_HYST:   reg_rdata <= 32'(trig_hyst);
          SEQ_REG_IRQEN:  reg_rdata <= 32'(irq_en);
          SEQ_REG_IRQ:    reg_rdata <= 32'(irq_pending);
          default:        reg_rdata <= '0;
        endcase
      end
    end
  end

  assign avs_readdata = rd_mem_q ? 32'(mem_rd_data) : reg_rdata;

  // The write address always follows the even/odd channel rule in dual mode.
  a_interleave: assert property (@(posedge clk) disable iff (!rst_n)
      mem_wr_en && dual |-> mem_wr_addr[0] == smp_second);

endmodule
