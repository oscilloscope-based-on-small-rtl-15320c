// adc_model: behavioural model of the FPGA's built-in ADC with its control
// core, as seen from the Avalon-ST command and response streams.
//
// A command is accepted when the converter is idle or in the last clock of
// a conversion (cmd_ready high). The
// analog value of the addressed channel is held at that moment and the
// 12-bit result comes back on the response stream CONV_CYCLES clocks later,
// so conversions follow one another at most every CONV_CYCLES clocks (50 at
// 50 MHz gives the 1 MS/s aggregate rate). ADC channel 1 reads `analog[0]`,
// channel 2 reads `analog[1]`, any other channel reads 0. Not synthesizable
// intent: simulation only.
module adc_model #(
  parameter int unsigned CONV_CYCLES = 50
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [11:0] analog [2],
  input  logic        cmd_valid,
  input  logic [4:0]  cmd_channel,
  output logic        cmd_ready,
  output logic        rsp_valid,
  output logic [4:0]  rsp_channel,
  output logic [11:0] rsp_data,
  output int unsigned conversions
);

  int unsigned busy;
  logic [4:0]  chan_q;
  logic [11:0] hold_q;

  assign cmd_ready = busy <= 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 0;
      rsp_valid   <= 1'b0;
      rsp_channel <= '0;
      rsp_data    <= '0;
      conversions <= 0;
      chan_q      <= '0;
      hold_q      <= '0;
    end else begin
      rsp_valid <= 1'b0;
      if (busy != 0) busy <= busy - 1;
      if (busy == 1) begin
        rsp_valid   <= 1'b1;
        rsp_channel <= chan_q;
        rsp_data    <= hold_q;
        conversions <= conversions + 1;
      end
      if (cmd_ready && cmd_valid) begin
        busy   <= CONV_CYCLES;
        chan_q <= cmd_channel;
        hold_q <= cmd_channel == 5'd1 ? analog[0] : cmd_channel == 5'd2 ? analog[1] : 12'd0;
      end
    end
  end

endmodule
