// Full processing chain of one channel.
// The input sample is the ADC word or, in debug mode, the debug data (low
// 12 bits), registered once. It runs through four tap delays in series:
// TD1 (length k), TD2 (m), TD3 (k), TD4 (m), so their outputs are x(n-k),
// x(n-k-m), x(n-2k-m), x(n-2k-2m). The LED differentiates x(n) - TD1; the
// CFD differentiates TD2 - TD3; the ENERGY trapezoid takes TD1, TD2, TD3,
// TD4 as Xn, Xn-m, Xn-m-k, Xn-2m-k; TD4 also supplies the raw points. The
// taps of each block follow the channel data-flow figure; which delay gets
// m and which gets k is this design's reading of it (the register map only
// provides m and k). ProcCore writes packets into the pre-buffer, whose
// 32-bit read port (rd_addr -> rd_data, one cycle) is read by the FIFO
// interface. The energy search is cleared, and its direction set from the
// LED sign, when an event is accepted; the CFD is cleared at the end of
// each event and while the channel is stopped. Tap delay reset lengths are
// the register reset values (m = k = 450, CFD delay 63). The LED's
// ACTIVE_EVENT and ProcCore's SIGN_EVENT, pile-up and abort flags are kept
// as named internal signals for observation; nothing in the channel reads
// them.
module channel
  import greta_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        synch,
  input  logic [12:0] board_id,
  input  logic [2:0]  channel_id,
  input  logic [15:0] prog_data,
  input  logic [5:0]  prog_add,
  input  logic        prog_flag,
  output logic        prog_ack,
  input  logic [11:0] adc_data,
  input  logic [15:0] debug_data,
  input  logic        validate,
  input  logic [8:0]  rd_addr,
  output logic [31:0] rd_data,
  output logic        led_trigger,
  output logic        busy,
  output logic [15:0] status_reg,
  input  logic        prebuffer_ack,
  output logic        prebuffer_ready,
  output logic [8:0]  size,
  output logic        debug_mode
);
  logic signed [11:0] x, td1, td2, td3, td4;
  logic [15:0] prog_q;
  logic load_m, load_k, load_cfd_a, load_cfd_th, load_cfd_tap, load_led_th, load_led_timer;
  logic reset_event, latch_timestamp, sign_event, clear, event_pileup, pc_abort;
  logic st1, st2, st3, st4, cfd_tap_status;
  logic active_event, max_minb, led_timestamp;
  logic signed [15:0] cfd_one, cfd_two;
  logic cfd_valid, cfd_timestamp;
  logic signed [22:0] energy_max;
  logic [9:0]  pb_addr;
  logic [15:0] pb_data;
  logic        pb_en;

  // The four delays are chained, so each one's STATUS can rise before the
  // delay ahead of it delivers real samples. FILL counts 2047 cycles (more
  // than four full 511-tap delays) after reset or any m/k change; until
  // then the trapezoid is held at zero and no trigger is accepted.
  logic [10:0] fill;
  logic        filled;
  always_ff @(posedge clk or posedge rst)
    if (rst)                 fill <= '0;
    else if (load_m || load_k) fill <= '0;
    else if (!filled)        fill <= fill + 1'b1;
  assign filled = &fill;

  always_ff @(posedge clk or posedge rst)
    if (rst) x <= '0;
    else     x <= debug_mode ? debug_data[11:0] : adc_data;

  tap_delay #(.ADDR_W(9), .DATA_W(12), .RESET_LEN(int'(RST_COLLECT_K))) u_td1 (
    .clk, .rst, .load(load_k), .length(prog_q[8:0]), .data_in(x),   .data_out(td1), .status(st1));
  tap_delay #(.ADDR_W(9), .DATA_W(12), .RESET_LEN(int'(RST_INTEG_M))) u_td2 (
    .clk, .rst, .load(load_m), .length(prog_q[8:0]), .data_in(td1), .data_out(td2), .status(st2));
  tap_delay #(.ADDR_W(9), .DATA_W(12), .RESET_LEN(int'(RST_COLLECT_K))) u_td3 (
    .clk, .rst, .load(load_k), .length(prog_q[8:0]), .data_in(td2), .data_out(td3), .status(st3));
  tap_delay #(.ADDR_W(9), .DATA_W(12), .RESET_LEN(int'(RST_INTEG_M))) u_td4 (
    .clk, .rst, .load(load_m), .length(prog_q[8:0]), .data_in(td3), .data_out(td4), .status(st4));

  led u_led (.clk, .rst, .clear, .xn(x), .xn_k(td1), .load_vth(load_led_th),
             .vth(prog_q[14:0]), .load_noise(load_led_timer), .win_noise(prog_q[6:0]),
             .active_event, .max_minb, .led_timestamp);

  cfd u_cfd (.clk, .rst, .clear(clear || reset_event), .load_threshold(load_cfd_th),
             .threshold(prog_q[4:0]), .load_a(load_cfd_a), .a(prog_q[6:5]),
             .load_tap_length(load_cfd_tap), .tap_length(prog_q[12:7]), .xn(td2), .xn_k(td3),
             .cfd_one, .cfd_two, .tap_status(cfd_tap_status), .cfd_valid, .cfd_timestamp);

  energy u_energy (.clk, .rst, .xn(td1), .xn_m(td2), .xn_m_k(td3), .xn_2m_k(td4),
                   .restart(!filled),
                   .clear(latch_timestamp), .sign(max_minb), .max(energy_max));

  proc_core u_core (
    .clk, .rst, .synch, .board_id, .channel_id, .prog_data, .prog_add, .prog_flag, .prog_ack,
    .prog_q, .tap_valid({st4 && filled, st3, st2, st1, cfd_tap_status}), .raw_data(td4),
    .energy(energy_max), .cfd1(cfd_one), .cfd2(cfd_two), .cfd_timestamp, .cfd_valid,
    .led_timestamp, .led_sign(max_minb), .validate, .load_m, .load_k, .load_cfd_a,
    .load_cfd_th, .load_cfd_tap, .load_led_th, .load_led_timer, .status_reg, .reset_event,
    .latch_timestamp, .sign_event, .prebuffer_ack, .prebuffer_ready,
    .prebuffer_address(pb_addr), .prebuffer_data(pb_data), .size, .prebuffer_en(pb_en),
    .clear, .debug_mode, .busy, .event_pileup, .event_abort(pc_abort));

  prebuffer u_pb (.clk, .we(pb_en), .waddr(pb_addr), .wdata(pb_data), .raddr(rd_addr),
                  .rdata(rd_data));

  assign led_trigger = led_timestamp;
endmodule
