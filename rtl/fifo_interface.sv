// FIFO write path: the FIFOMachine plus a 9-bit 8:1 size multiplexer
// (selected by the token) and a 32-bit 8:1 data multiplexer with enable
// (selected by the data-aligned channel). When the data multiplexer is not
// enabled it outputs the packet separator 0xAAAAAAAA. The document runs this
// block at half the processing clock; here it shares the processing clock
// and reads one 32-bit word per cycle.
module fifo_interface
  import greta_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] data_ch [8],
  input  logic [8:0]  size_ch [8],
  output logic [8:0]  prebuffer_address,
  output logic [7:0]  prebuffer_enable,
  output logic [7:0]  prebuffer_ack,
  input  logic [7:0]  prebuffer_ready,
  input  logic        fifo_pafneg,
  output logic [31:0] fifo_data,
  output logic        fifo_wenneg
);
  logic [2:0] token, channel_select;
  logic       enable;
  fifo_machine u_fm (.clk, .rst, .prebuffer_ready, .fifo_pafneg, .size(size_ch[token]),
                     .prebuffer_address, .prebuffer_enable, .prebuffer_ack, .fifo_wenneg,
                     .token, .channel_select, .enable);
  assign fifo_data = enable ? data_ch[channel_select] : FIFO_SEPARATOR;
endmodule
