// Eight-channel processing block: the DEBUG source, eight channel chains
// and the FIFO interface. All channels share the programming bus; each
// channel (and the debug source) acknowledges every request, and PROG_ACK
// pulses once all nine have acknowledged the current request. PROG_DONE
// holds those nine acknowledge bits (channels 7-0, debug in bit 8) for the
// "programming done" status register. A channel's trigger input is its own
// VALIDATE line or GLOBAL_VALIDATE. GLOBAL_TRIGGER is the OR of the LED
// triggers, BUSY the OR of the channels' busy lines, EVENT_READ the
// channel whose pre-buffer is being copied to the FIFO. The block structure
// is the document's; the acknowledge combining is this design's choice.
module eight_channel
  import greta_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [11:0] adc_data [8],
  output logic [15:0] status_reg [8],
  input  logic [15:0] prog_data,
  input  logic [5:0]  prog_add,
  input  logic        prog_flag,
  output logic        prog_ack,
  output logic [8:0]  prog_done,
  input  logic        synch,
  input  logic [12:0] board_id,
  input  logic [7:0]  validate,
  input  logic        global_validate,
  input  logic        fifo_pafneg,
  output logic [31:0] fifo_data,
  output logic        fifo_wenneg,
  output logic [7:0]  led_trigger,
  output logic        global_trigger,
  output logic [7:0]  event_read,
  output logic        busy
);
  logic [15:0] debug_data;
  logic [7:0]  debug_flags, ch_ack, busy_ch, pb_ready, pb_ack;
  logic        dbg_ack, flag_q, all_q;
  logic [31:0] data_ch [8];
  logic [8:0]  size_ch [8];
  logic [8:0]  rd_addr;

  debug_mem u_dbg (.clk, .rst, .debug_flags, .prog_data, .prog_add, .prog_flag,
                   .prog_ack(dbg_ack), .debug_data);

  for (genvar i = 0; i < 8; i++) begin : g_ch
    channel u_ch (
      .clk, .rst, .synch, .board_id, .channel_id(3'(i)), .prog_data, .prog_add, .prog_flag,
      .prog_ack(ch_ack[i]), .adc_data(adc_data[i]), .debug_data,
      .validate(validate[i] || global_validate), .rd_addr, .rd_data(data_ch[i]),
      .led_trigger(led_trigger[i]), .busy(busy_ch[i]), .status_reg(status_reg[i]),
      .prebuffer_ack(pb_ack[i]), .prebuffer_ready(pb_ready[i]), .size(size_ch[i]),
      .debug_mode(debug_flags[i]));
  end

  fifo_interface u_fifo (.clk, .rst, .data_ch, .size_ch, .prebuffer_address(rd_addr),
                         .prebuffer_enable(event_read), .prebuffer_ack(pb_ack),
                         .prebuffer_ready(pb_ready), .fifo_pafneg, .fifo_data, .fifo_wenneg);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      prog_done <= '0; flag_q <= 1'b0; all_q <= 1'b0;
    end else begin
      flag_q <= prog_flag;
      if (prog_flag && !flag_q) prog_done <= '0;
      else                      prog_done <= prog_done | {dbg_ack, ch_ack};
      all_q <= &prog_done;
    end
  end
  assign prog_ack = (&prog_done) && !all_q;
  assign global_trigger = |led_trigger;
  assign busy = |busy_ch;
endmodule
