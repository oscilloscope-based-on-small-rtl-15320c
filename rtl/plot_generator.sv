// plot_generator: draws one channel's waveform on the fly.
//
// The plot memory holds one sample per screen column (1024 samples). For
// each pixel the generator reads the sample addressed by the column counter,
// scales it to a screen row and compares that row with the row counter; on a
// match it requests the pixel (`req`), and the priority multiplexer paints
// it in the channel's colour. No frame buffer is needed: only the samples are
// stored.
//
// Scaling: y = offset - ((sample * gain) >> 8), with `gain` an unsigned 8.8
// fixed-point number and `offset` the screen row of sample code 0, so higher
// codes appear higher on the screen. The memory is written on the Avalon
// clock (`wr_*`) and read on the pixel clock.
//
// Timing: `req` belongs to the pixel address `pix` of GEN_LATENCY (3) clocks
// earlier: memory read, scaling, compare.
//
// From the source design: per-channel plot memory addressed by the column
// counter, row compare, gain and offset applied in the frame generator, three
// such channels. This design's own choice: the scaling formula above and
// its widths.
module plot_generator
  import osc_pkg::*;
#(
  parameter int unsigned DEPTH  = ACQ_DEPTH,
  parameter int unsigned AW     = $clog2(DEPTH),
  parameter int unsigned GAIN_W = 16
) (
  input  logic                wr_clk,
  input  logic                wr_en,
  input  logic [AW-1:0]       wr_addr,
  input  logic [SAMPLE_W-1:0] wr_data,
  input  logic                clk,
  input  pix_addr_t           pix,
  input  logic                enable,
  input  logic [GAIN_W-1:0]   gain,
  input  logic [11:0]         offset,
  output logic                req
);

  localparam int unsigned PROD_W = SAMPLE_W + GAIN_W;

  logic [SAMPLE_W-1:0] sample;
  pix_addr_t           pix1, pix2;
  logic signed [PROD_W:0] y2;

  dual_port_ram #(.WIDTH(SAMPLE_W), .DEPTH(DEPTH)) u_plot_mem (
    .wr_clk, .wr_en, .wr_addr, .wr_data,
    .rd_clk (clk), .rd_en (1'b1), .rd_addr (pix.col[AW-1:0]), .rd_data (sample)
  );

  logic [PROD_W-1:0] prod;
  assign prod = PROD_W'(sample) * PROD_W'(gain);

  always_ff @(posedge clk) begin
    pix1 <= pix;
    pix2 <= pix1;
    y2   <= $signed({{(PROD_W-11){1'b0}}, offset}) - $signed({9'b0, prod[PROD_W-1:8]});
    req  <= enable && pix2.active && pix2.col < PIX_W'(DEPTH)
            && y2 == $signed({{(PROD_W+1-PIX_W){1'b0}}, pix2.row});
  end

endmodule
