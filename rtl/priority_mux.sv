// priority_mux: picks one colour for the current pixel.
//
// Each frame generator raises a request when it has a foreground pixel at
// the current position. The multiplexer takes the colour of the requesting
// input with the lowest index and otherwise the background colour. The
// result is registered: one clock of latency.
//
// In the VGA module the inputs are, from highest priority: text, plot 0,
// plot 1, plot 2 (the arithmetic channel), trigger line, grid.
//
// From the source design: a priority multiplexer fed by pixel requests. This
// design's own choice: the priority order.
module priority_mux
  import osc_pkg::*;
#(
  parameter int unsigned N = 6
) (
  input  logic           clk,
  input  logic [N-1:0]   req,
  input  rgb_t [N-1:0]   colour,
  input  rgb_t           bg_colour,
  output rgb_t           pixel
);

  rgb_t sel;

  always_comb begin
    sel = bg_colour;
    for (int i = N - 1; i >= 0; i--) begin
      if (req[i]) sel = colour[i];
    end
  end

  always_ff @(posedge clk) pixel <= sel;

endmodule
