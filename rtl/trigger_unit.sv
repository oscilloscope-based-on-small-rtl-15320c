// trigger_unit: edge trigger with hysteresis on the stream of samples.
//
// A plain edge trigger fires on every crossing of the level T, so a noisy
// signal near T fires many times. With hysteresis H the trigger must first be
// armed by a sample on the far side of the band around T, and then fires when
// a sample reaches the other side:
//   rising edge : arms on a sample <= T - H, fires on a sample >= T + H
//   falling edge: arms on a sample >= T + H, fires on a sample <= T - H
// Firing disarms it. `rearm` clears the armed state (new acquisition) and
// `force_trig` fires unconditionally. `trig` is registered: it is high for one
// clock, the clock after the sample that caused it. Samples are taken into
// account only when `smp_valid` and `smp_sel` are both high, so one channel
// of an interleaved stream can be chosen.
//
// From the source design: trigger level, hysteresis, edge choice and forced
// trigger. This design's own choice: the exact arm/fire rule above, with the
// band T-H .. T+H, and saturation of T+H and T-H at the code range.
module trigger_unit
  import osc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                rearm,
  input  logic                smp_valid,
  input  logic                smp_sel,
  input  logic [SAMPLE_W-1:0] smp_data,
  input  logic [SAMPLE_W-1:0] level,
  input  logic [SAMPLE_W-1:0] hyst,
  input  logic                falling,
  input  logic                force_trig,
  output logic                armed,
  output logic                trig
);

  localparam logic [SAMPLE_W:0] CODE_MAX = {1'b0, {SAMPLE_W{1'b1}}};

  logic [SAMPLE_W:0] hi_sum, lo_diff;
  logic [SAMPLE_W-1:0] hi_th, lo_th;
  logic below, above, take;

  always_comb begin
    hi_sum  = {1'b0, level} + {1'b0, hyst};
    lo_diff = {1'b0, level} - {1'b0, hyst};
    hi_th   = (hi_sum > CODE_MAX) ? CODE_MAX[SAMPLE_W-1:0] : hi_sum[SAMPLE_W-1:0];
    lo_th   = lo_diff[SAMPLE_W] ? '0 : lo_diff[SAMPLE_W-1:0];
    below   = smp_data <= lo_th;
    above   = smp_data >= hi_th;
    take    = smp_valid && smp_sel;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed <= 1'b0;
      trig  <= 1'b0;
    end else begin
      trig <= 1'b0;
      if (rearm) begin
        armed <= 1'b0;
      end else if (force_trig) begin
        trig  <= 1'b1;
        armed <= 1'b0;
      end else if (take) begin
        if (armed && (falling ? below : above)) begin
          trig  <= 1'b1;
          armed <= 1'b0;
        end else if (falling ? above : below) begin
          armed <= 1'b1;
        end
      end
    end
  end

endmodule
