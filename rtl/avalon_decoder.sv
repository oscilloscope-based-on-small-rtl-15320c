// avalon_decoder: the Avalon-MM bus between the processor and the two
// oscilloscope slaves.
//
// The master's word address bit 13 selects the slave: 0 the sequencer
// (address[10:0]), 1 the VGA module (address[12:0]). Read and write strobes
// go only to the selected slave; address and write data are shared. Both
// slaves answer a read one clock later with no wait states, so the decoder
// registers which slave was read and returns that slave's readdata in the
// next clock (read latency 1, waitrequest never asserted).
//
// From the source design: Avalon-MM simple transfers with separate read and
// write data and shared address lines. This design's own choices: the
// address map and the fixed read latency.
module avalon_decoder
  import osc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  avmm_req_t   m_req,
  output logic [31:0] m_readdata,
  output avmm_req_t   seq_req,
  input  logic [31:0] seq_readdata,
  output avmm_req_t   vga_req,
  input  logic [31:0] vga_readdata
);

  logic sel_vga, rd_vga_q;
  assign sel_vga = m_req.address[13];

  always_comb begin
    seq_req       = m_req;
    seq_req.read  = m_req.read  && !sel_vga;
    seq_req.write = m_req.write && !sel_vga;
    vga_req       = m_req;
    vga_req.read  = m_req.read  && sel_vga;
    vga_req.write = m_req.write && sel_vga;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          rd_vga_q <= 1'b0;
    else if (m_req.read) rd_vga_q <= sel_vga;
  end

  assign m_readdata = rd_vga_q ? vga_readdata : seq_readdata;

  a_one_strobe: assert property (@(posedge clk) disable iff (!rst_n)
      !(m_req.read && m_req.write));

endmodule
