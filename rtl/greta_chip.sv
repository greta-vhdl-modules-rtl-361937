// Chip top: the eight-channel processing block and the DAC controller.
// The VME interface that would sit beside them (it decodes VME cycles
// through an external chipset) is not part of this RTL; its side of the
// programming bus and of the FIFO write port are ports of this module.
// Programming addresses are 7 bits: 0xxxxxx goes to the processing block
// (6-bit register map), 100xxxx to the DAC controller; any other address is
// acknowledged at once and ignored. PROG_ACK is the OR of the
// acknowledges. FIFO_WCLK is the processing clock (the document uses a
// half-rate FIFO clock from a clock manager).
module greta_chip (
  input  logic        clk,
  input  logic        rst,
  input  logic        synch,
  input  logic [12:0] board_id,
  input  logic [11:0] adc_data [8],
  input  logic [15:0] prog_data,
  input  logic [6:0]  prog_add,
  input  logic        prog_flag,
  output logic        prog_ack,
  output logic [9:0]  prog_done,      // channels 7-0, debug, DACs
  output logic [15:0] status_reg [8],
  input  logic        fifo_pafneg,
  output logic [31:0] fifo_data,
  output logic        fifo_wenneg,
  output logic        fifo_wclk,
  input  logic [7:0]  validate,
  input  logic        global_validate,
  output logic [7:0]  led_trigger,
  output logic        global_trigger,
  output logic [7:0]  event_read,
  output logic [7:0]  enable_status,
  output logic        busy,
  output logic        dac_din,
  output logic        dac_cs_ld0,
  output logic        dac_cs_ld1,
  output logic        dac_sck
);
  logic ec_ack, dac_ack, other_ack, flag_q, dac_done;
  logic [8:0] ec_done;

  eight_channel u_ec (
    .clk, .rst, .adc_data, .status_reg, .prog_data, .prog_add(prog_add[5:0]),
    .prog_flag(prog_flag && !prog_add[6]), .prog_ack(ec_ack), .prog_done(ec_done),
    .synch, .board_id, .validate, .global_validate, .fifo_pafneg, .fifo_data,
    .fifo_wenneg, .led_trigger, .global_trigger, .event_read, .busy);

  dac_control u_dac (.clk, .rst, .prog_data, .prog_add, .prog_flag, .prog_ack(dac_ack),
                     .dac_din, .dac_csld0(dac_cs_ld0), .dac_csld1(dac_cs_ld1), .dac_sck);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      flag_q <= 1'b0; other_ack <= 1'b0; dac_done <= 1'b0;
    end else begin
      flag_q    <= prog_flag;
      other_ack <= prog_flag && !flag_q && prog_add[6] && (prog_add[5:4] != 2'b00);
      if (prog_flag && !flag_q) dac_done <= 1'b0;
      else if (dac_ack)         dac_done <= 1'b1;
    end
  end

  assign prog_ack  = ec_ack || dac_ack || other_ack;
  assign prog_done = {dac_done, ec_done};
  assign fifo_wclk = clk;
  for (genvar i = 0; i < 8; i++) begin : g_en
    assign enable_status[i] = status_reg[i][0];
  end
endmodule
