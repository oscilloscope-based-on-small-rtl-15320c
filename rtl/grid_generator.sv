// grid_generator: draws the graticule.
//
// Requests the pixels of vertical lines every DIV_X columns and horizontal
// lines every DIV_Y rows, plus the right and bottom edges of the visible
// area, giving 8 x 8 divisions on a 1024 x 768 screen by default. The
// lines are dotted (every other pixel) so that they stay in the background.
// It is the lowest-priority generator, so waveforms, text and the trigger
// line are drawn over it.
//
// Timing: `req` belongs to the pixel address of GEN_LATENCY (3) clocks
// earlier, like the other generators.
//
// From the source design: a grid generator among the frame generators. This
// design's own choices: division sizes and dotted style.
module grid_generator
  import osc_pkg::*;
#(
  parameter int unsigned DIV_X    = 128,
  parameter int unsigned DIV_Y    = 96,
  parameter int unsigned H_ACTIVE = 1024,
  parameter int unsigned V_ACTIVE = 768
) (
  input  logic      clk,
  input  pix_addr_t pix,
  input  logic      enable,
  output logic      req
);

  logic on_vline, on_hline;
  logic [GEN_LATENCY-1:0] hit_d;

  always_comb begin
    on_vline = (32'(pix.col) % DIV_X == 0 || 32'(pix.col) == H_ACTIVE - 1) && !pix.row[0];
    on_hline = (32'(pix.row) % DIV_Y == 0 || 32'(pix.row) == V_ACTIVE - 1) && !pix.col[0];
  end

  always_ff @(posedge clk) begin
    hit_d <= {hit_d[GEN_LATENCY-2:0], enable && pix.active && (on_vline || on_hline)};
  end

  assign req = hit_d[GEN_LATENCY-1];

endmodule
