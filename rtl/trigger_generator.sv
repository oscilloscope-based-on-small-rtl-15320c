// trigger_generator: marks the trigger level on the screen.
//
// Requests every visible pixel of the row held in the trigger value register
// (`trig_row`), giving a horizontal line at the trigger level. The processor
// converts the trigger level into a screen row with the same gain and offset
// as the triggering channel's plot.
//
// Timing: `req` belongs to the pixel address of GEN_LATENCY (3) clocks
// earlier, like the other generators.
//
// From the source design: a trigger value register and a trigger generator
// among the frame generators. This design's own choice: drawing it as a
// solid full-width line at a row number written by software.
module trigger_generator
  import osc_pkg::*;
(
  input  logic        clk,
  input  pix_addr_t   pix,
  input  logic        enable,
  input  logic [11:0] trig_row,
  output logic        req
);

  logic [GEN_LATENCY-1:0] hit_d;

  always_ff @(posedge clk) begin
    hit_d <= {hit_d[GEN_LATENCY-2:0],
              enable && pix.active && 12'(pix.row) == trig_row};
  end

  assign req = hit_d[GEN_LATENCY-1];

endmodule
