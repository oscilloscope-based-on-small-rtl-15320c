// dual_port_ram: simple dual-port RAM with independent write and read clocks.
//
// One write port and one read port, each on its own clock, so that a buffer
// can be filled in one clock domain and read in another: the sequencer's
// acquisition memory (ADC side writes, Avalon side reads), and the VGA
// module's plot and text memories (Avalon side writes, pixel clock reads).
// The read data is registered: it appears one rd_clk edge after rd_en with
// rd_addr. Written as an array so that synthesis maps it to block RAM. The
// contents are cleared at start-up to give a known picture before the first
// write; block RAM in FPGAs powers up the same way.
module dual_port_ram #(
  parameter int unsigned WIDTH = 12,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             wr_clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_clk,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge wr_clk) begin
    if (wr_en && 32'(wr_addr) < DEPTH) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge rd_clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
