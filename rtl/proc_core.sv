// Processing core of one channel: event filtering and packet generation.
// It combines the TimerMachine (programming and trigger acceptance), the
// PacketMachine (packet writing), the WaitCounter (windows and packet
// address), the PileupCounter (fed with every LED trigger through one
// register) and the 48-bit TIMER, and drives the pre-buffer through the
// registered 16:1 packet multiplexer. The LED/external timestamp is latched
// on LATCH_TIMESTAMP (one cycle after the trigger, from a one-cycle-old copy
// of the timer), the CFD timestamp on CFD_TIMESTAMP, so both hold the timer
// value of the cycle in which their trigger was high; the energy is latched
// on ComputedDone, so the header is written from stable values. The write
// address and enable are delayed one cycle to line up with the multiplexer
// register. Packet words (16-bit, low half of each 32-bit word first):
//   0 {BOARD_ID, CHANNEL_ID}   1 size in 32-bit words
//   2-4 LED/external timestamp bits 15:0, 31:16, 47:32
//   5 energy 15:0   6 {P, C, E, S, 5'b0, energy 22:16}
//   7-9 CFD timestamp   10 CFD point 1   11 CFD point 2
//   12.. raw points {4'b0, sample 11:0}
// The layout is the document's packet table; the unused bits are zero.
// C is forced to 0 for external triggers, whose packets carry no CFD time.
module proc_core
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
  output logic [15:0] prog_q,
  input  logic [4:0]  tap_valid,
  input  logic [11:0] raw_data,
  input  logic [22:0] energy,
  input  logic [15:0] cfd1,
  input  logic [15:0] cfd2,
  input  logic        cfd_timestamp,
  input  logic        cfd_valid,
  input  logic        led_timestamp,
  input  logic        led_sign,
  input  logic        validate,
  output logic        load_m,
  output logic        load_k,
  output logic        load_cfd_a,
  output logic        load_cfd_th,
  output logic        load_cfd_tap,
  output logic        load_led_th,
  output logic        load_led_timer,
  output logic [15:0] status_reg,
  output logic        reset_event,
  output logic        latch_timestamp,
  output logic        sign_event,
  input  logic        prebuffer_ack,
  output logic        prebuffer_ready,
  output logic [9:0]  prebuffer_address,
  output logic [15:0] prebuffer_data,
  output logic [8:0]  size,
  output logic        prebuffer_en,
  output logic        clear,
  output logic        debug_mode,
  output logic        busy,
  output logic        event_pileup,
  output logic        event_abort
);
  logic load_validation_wait, load_pileup_wait, load_external_wait, load_raw_length,
        load_sliding_wait, start_external_wait, start_internal_wait, start_validation,
        min_deadtime_done, ext_event, run_enable, pileup_drop;
  logic [1:0] trig_mode;
  logic add_enable, start_sliding_wait, start_add_wait, mux_enable;
  logic raw_add, raw_sliding_done, ext_validation, computed_done;
  logic [9:0] address;
  mux_sel_t mux_select;
  logic led_ts_q;
  logic [47:0] time_now, time_q, led_ts, cfd_ts;
  logic [22:0] energy_q;
  logic [15:0] words [16];

  timer_machine u_tm (
    .clk, .rst, .channel_id, .prog_data, .prog_add, .prog_flag, .prog_ack, .prog_q,
    .tap_valid, .led_timestamp, .validate, .led_sign, .prebuffer_ready,
    .latch_timestamp, .sign_event, .ext_event, .load_validation_wait, .load_pileup_wait,
    .load_external_wait, .load_m, .load_k, .load_raw_length, .load_sliding_wait,
    .load_cfd_a, .load_cfd_th, .load_cfd_tap, .load_led_th, .load_led_timer,
    .status_reg, .start_external_wait, .start_internal_wait, .start_validation,
    .min_deadtime_done, .event_abort, .event_done(reset_event), .clear, .trig_mode,
    .run_enable, .pileup_drop, .debug_mode, .busy);

  packet_machine u_pm (
    .clk, .rst, .trig_mode, .enable(run_enable), .pileup(pileup_drop), .event_pileup,
    .prebuffer_ack, .raw_sliding_done, .ext_validation, .computed_done, .raw_add,
    .validate, .latch_timestamp, .add_enable, .start_sliding_wait, .start_add_wait,
    .prebuffer_ready, .mux_select, .mux_enable, .reset_event, .event_abort);

  wait_counter u_wc (
    .clk, .rst, .load_validation_wait, .validation_wait(prog_q[10:0]),
    .load_external_wait, .external_wait(prog_q[10:0]), .load_m, .m(prog_q[8:0]),
    .load_k, .k(prog_q[8:0]), .load_raw_length, .raw_length(prog_q[9:0]),
    .load_sliding_wait, .sliding_wait(prog_q[10:0]), .start_external_wait,
    .start_internal_wait, .start_validation, .start_sliding_wait, .start_add_wait,
    .add_enable, .address, .raw_add, .raw_sliding_done, .ext_validation,
    .min_deadtime_done, .computed_done, .size);

  always_ff @(posedge clk or posedge rst)
    if (rst) led_ts_q <= 1'b0; else led_ts_q <= led_timestamp;

  pileup_counter u_pu (
    .clk, .rst, .load_pileup_wait, .pileup_wait(prog_q[10:0]),
    .start_pileup(led_ts_q), .start_event(latch_timestamp), .pileup_event(event_pileup));

  timer48 u_timer (.clk, .rst, .synch, .time_now);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      time_q <= '0; led_ts <= '0; cfd_ts <= '0; energy_q <= '0;
      prebuffer_address <= '0; prebuffer_en <= 1'b0;
    end else begin
      time_q <= time_now;
      if (latch_timestamp) led_ts <= time_q;
      if (cfd_timestamp)   cfd_ts <= time_now;
      if (computed_done)   energy_q <= energy;
      prebuffer_address <= address;
      prebuffer_en      <= mux_enable;
    end
  end

  always_comb begin
    words[SEL_BOARD] = {board_id, channel_id};
    words[SEL_SIZE]  = {7'b0, size};
    words[SEL_TS1]   = led_ts[15:0];
    words[SEL_TS2]   = led_ts[31:16];
    words[SEL_TS3]   = led_ts[47:32];
    words[SEL_E1]    = energy_q[15:0];
    words[SEL_E2]    = {event_pileup, cfd_valid && !ext_event, ext_event, sign_event, 5'b0, energy_q[22:16]};
    words[SEL_CTS1]  = cfd_ts[15:0];
    words[SEL_CTS2]  = cfd_ts[31:16];
    words[SEL_CTS3]  = cfd_ts[47:32];
    words[SEL_CFD1]  = cfd1;
    words[SEL_CFD2]  = cfd2;
    words[SEL_RAW]   = {4'b0, raw_data};
    words[13] = '0; words[14] = '0; words[15] = '0;
  end

  mux16_16to1 u_mux (.clk, .rst, .enable(mux_enable), .sel(mux_select), .inputs(words),
                     .data_out(prebuffer_data));
endmodule
