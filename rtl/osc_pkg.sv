// osc_pkg: types and constants shared by the oscilloscope modules.
//
// The ADC sample width (12 bits) is that of the MAX10 built-in ADC; the
// acquisition depth (1024 samples) and the 1024x768 frame are the design's
// main configuration. The Avalon-MM slave bundle is a packed struct so that
// the same request can be routed from the bus decoder to each slave. Register
// maps of the sequencer and the VGA module are collected here so that
// testbenches and software use the same numbers.
package osc_pkg;

  localparam int unsigned SAMPLE_W  = 12;    // MAX10 ADC resolution
  localparam int unsigned ACQ_DEPTH = 1024;  // samples stored per acquisition
  localparam int unsigned ACQ_AW    = 10;    // log2(ACQ_DEPTH)
  localparam int unsigned CHAN_W    = 5;     // ADC control core channel field

  typedef logic [2:0] rgb_t;                 // 1 bit per colour: {r, g, b}

  // Avalon-MM simple transfer: shared address, separate read/write data,
  // fixed read latency of one clock, no wait states.
  typedef struct packed {
    logic [13:0] address;     // word address, widest slave map
    logic        read;
    logic        write;
    logic [31:0] writedata;
  } avmm_req_t;

  // Sequencer register map (word addresses, address[10] = 0).
  localparam logic [2:0] SEQ_REG_CTRL   = 3'd0; // W: b0 start, b1 force, b2 stop.  R: status
  localparam logic [2:0] SEQ_REG_CONFIG = 3'd1; // b0 dual, b1 trig_src, b2 falling, b3 trig_en, [12:8] ch1, [20:16] ch2
  localparam logic [2:0] SEQ_REG_PERIOD = 3'd2; // sample period in clock cycles
  localparam logic [2:0] SEQ_REG_LEVEL  = 3'd3; // trigger level T
  localparam logic [2:0] SEQ_REG_HYST   = 3'd4; // hysteresis H
  localparam logic [2:0] SEQ_REG_IRQEN  = 3'd5; // b0 interrupt enable
  localparam logic [2:0] SEQ_REG_IRQ    = 3'd6; // R: b0 pending; W: 1 clears

  // Status bits returned by reading SEQ_REG_CTRL.
  localparam int unsigned ST_ARMED   = 0;
  localparam int unsigned ST_STORING = 1;
  localparam int unsigned ST_DONE    = 2;

  // VGA module map (word addresses): address[12:10] selects the region.
  localparam logic [2:0] VGA_RGN_REGS  = 3'd0;
  localparam logic [2:0] VGA_RGN_PLOT0 = 3'd1;
  localparam logic [2:0] VGA_RGN_PLOT1 = 3'd2;
  localparam logic [2:0] VGA_RGN_PLOT2 = 3'd3;
  localparam logic [2:0] VGA_RGN_TEXT  = 3'd4;

  localparam logic [3:0] VGA_REG_ENABLE  = 4'd0; // b0..2 plots, b3 text, b4 trigger, b5 grid
  localparam logic [3:0] VGA_REG_GAIN0   = 4'd1; // 1..3: gain of plot k, 8.8 fixed point
  localparam logic [3:0] VGA_REG_OFFSET0 = 4'd4; // 4..6: offset of plot k, screen row of code 0
  localparam logic [3:0] VGA_REG_TRIG    = 4'd7; // trigger line row
  localparam logic [3:0] VGA_REG_COLOUR  = 4'd8; // 3 bits each: plot0,1,2,text,trig,grid,bg

  // Settings of the frame generators, held by the VGA control unit.
  typedef struct packed {
    logic [5:0]        enable;
    logic [2:0][15:0]  gain;
    logic [2:0][11:0]  offset;
    logic [11:0]       trig_row;
    rgb_t [2:0]        plot_colour;
    rgb_t              text_colour;
    rgb_t              trig_colour;
    rgb_t              grid_colour;
    rgb_t              bg_colour;
  } vga_cfg_t;

  // Pixel address from the VGA counters to the frame generators.
  localparam int unsigned PIX_W = 11;
  typedef struct packed {
    logic [PIX_W-1:0] col;
    logic [PIX_W-1:0] row;
    logic             active;   // inside the 1024 x 768 visible area
  } pix_addr_t;

  // Clocks from the pixel address entering the generators to their request
  // output; the priority multiplexer adds one more.
  localparam int unsigned GEN_LATENCY   = 3;
  localparam int unsigned PIXEL_LATENCY = GEN_LATENCY + 1;

endpackage
