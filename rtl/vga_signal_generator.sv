// vga_signal_generator: VGA timing, pixel address and output stage.
//
// Column and row counters run on the pixel clock and sweep the whole frame,
// blanking included; their value is sent to the frame generators as the
// pixel address (`pix`, with `active` high inside the visible area). The
// generators answer with a colour PIXEL_LATENCY clocks later (`pixel`);
// hsync, vsync and blanking are delayed by the same amount so that colour
// and sync leave aligned, through one more output register. The outputs are
// thus valid LATENCY+1 clocks after the counters.
//
// The defaults give 1024 x 768 at 60 Hz from a 65 MHz pixel clock, the
// resolution and clock of the source design: 1344 x 806 clocks per frame,
// 65 MHz / (1344 * 806) = 60.0 Hz. The porch and sync lengths and the
// negative sync polarity are the usual ones for that mode, not given by the
// source design.
module vga_signal_generator
  import osc_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 1024,
  parameter int unsigned H_FP     = 24,
  parameter int unsigned H_SYNC   = 136,
  parameter int unsigned H_BP     = 160,
  parameter int unsigned V_ACTIVE = 768,
  parameter int unsigned V_FP     = 3,
  parameter int unsigned V_SYNC   = 6,
  parameter int unsigned V_BP     = 29,
  parameter bit          SYNC_NEG = 1'b1,
  parameter int unsigned LATENCY  = PIXEL_LATENCY
) (
  input  logic      clk,
  input  logic      rst_n,
  output pix_addr_t pix,
  output logic      frame_start,   // first clock of a frame (col 0, row 0)
  input  rgb_t      pixel,
  output rgb_t      vga_rgb,
  output logic      vga_hsync,
  output logic      vga_vsync
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic [PIX_W-1:0] col, row;
  logic hs, vs, act;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0;
      row <= '0;
    end else if (col == PIX_W'(H_TOTAL - 1)) begin
      col <= '0;
      row <= (row == PIX_W'(V_TOTAL - 1)) ? '0 : row + 1'b1;
    end else begin
      col <= col + 1'b1;
    end
  end

  always_comb begin
    act = col < PIX_W'(H_ACTIVE) && row < PIX_W'(V_ACTIVE);
    hs  = col >= PIX_W'(H_ACTIVE + H_FP) && col < PIX_W'(H_ACTIVE + H_FP + H_SYNC);
    vs  = row >= PIX_W'(V_ACTIVE + V_FP) && row < PIX_W'(V_ACTIVE + V_FP + V_SYNC);
    pix = '{col: col, row: row, active: act};
    frame_start = col == '0 && row == '0;
  end

  // Delay line for sync and blanking, matching the generators' latency.
  logic [LATENCY-1:0] hs_d, vs_d, act_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hs_d      <= '0;
      vs_d      <= '0;
      act_d     <= '0;
      vga_rgb   <= '0;
      vga_hsync <= SYNC_NEG;
      vga_vsync <= SYNC_NEG;
    end else begin
      hs_d      <= {hs_d[LATENCY-2:0], hs};
      vs_d      <= {vs_d[LATENCY-2:0], vs};
      act_d     <= {act_d[LATENCY-2:0], act};
      vga_rgb   <= act_d[LATENCY-1] ? pixel : 3'b000;
      vga_hsync <= hs_d[LATENCY-1] ^ SYNC_NEG;
      vga_vsync <= vs_d[LATENCY-1] ^ SYNC_NEG;
    end
  end

endmodule
