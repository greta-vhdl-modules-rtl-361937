// Timing / programming state machine of a channel (Idle, Program, Trigger).
// Idle -> Program on a new programming request (rising edge of PROGFlag,
// remembered until served): the address is decoded, the matching LOAD
// pulses are issued for one cycle with the data on prog_q, PROG_ACK pulses
// and the machine returns to Idle. Global registers (0x02-0x07) load every
// channel; per-channel registers (0x08+ch ... 0x28+ch) only the channel
// whose CHANNEL_ID matches. The control register (0x08+ch) lives here.
// Idle -> Trigger when all tap delays are valid, the channel is started and
// an LED trigger of an allowed polarity arrives (internal and validation
// modes) or a VALIDATE pulse arrives (external mode): LATCH_TIMESTAMP
// pulses, the computation window (internal or external) and, in validation
// mode, the validation window are started, and the event sign is latched.
// Trigger -> Idle once the packet machine has finished or aborted the
// event and the wait counter reports the minimum dead time. Triggers in
// Trigger are discarded. CLEAR (to the LED) is high while the channel is
// stopped. States and conditions follow the document's chart; the
// rising-edge handshake on PROGFlag and the exact end condition of Trigger
// are this design's choice.
module timer_machine
  import greta_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [2:0]  channel_id,
  input  logic [15:0] prog_data,
  input  logic [5:0]  prog_add,
  input  logic        prog_flag,
  output logic        prog_ack,
  output logic [15:0] prog_q,
  input  logic [4:0]  tap_valid,      // {TD4, TD3, TD2, TD1, CFD tap}
  input  logic        led_timestamp,
  input  logic        validate,
  input  logic        led_sign,
  input  logic        prebuffer_ready,
  output logic        latch_timestamp,
  output logic        sign_event,
  output logic        ext_event,
  output logic        load_validation_wait,
  output logic        load_pileup_wait,
  output logic        load_external_wait,
  output logic        load_m,
  output logic        load_k,
  output logic        load_raw_length,
  output logic        load_sliding_wait,
  output logic        load_cfd_a,
  output logic        load_cfd_th,
  output logic        load_cfd_tap,
  output logic        load_led_th,
  output logic        load_led_timer,
  output logic [15:0] status_reg,
  output logic        start_external_wait,
  output logic        start_internal_wait,
  output logic        start_validation,
  input  logic        min_deadtime_done,
  input  logic        event_abort,
  input  logic        event_done,
  output logic        clear,
  output logic [1:0]  trig_mode,
  output logic        run_enable,
  output logic        pileup_drop,
  output logic        debug_mode,
  output logic        busy
);
  typedef enum logic [1:0] {S_IDLE, S_PROGRAM, S_TRIGGER} state_t;
  state_t state;
  logic flag_q, pending, done_seen;
  logic [1:0] polarity;
  logic pol_ok, accept, is_ext;

  assign is_ext = (trig_mode == TRIG_EXT);
  assign pol_ok = led_sign ? polarity[1] : polarity[0];
  assign accept = (state == S_IDLE) && !pending && (&tap_valid) && run_enable &&
                  (is_ext ? validate : (led_timestamp && pol_ok));

  assign status_reg = {prebuffer_ready, 3'b000, polarity, tap_valid, trig_mode,
                       pileup_drop, debug_mode, run_enable};
  assign busy = (state == S_TRIGGER);

  function automatic logic own(input logic [5:0] add, input logic [5:0] base,
                               input logic [2:0] ch);
    return (add[5:3] == base[5:3]) && (add[2:0] == ch);
  endfunction

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state <= S_IDLE; flag_q <= 1'b0; pending <= 1'b0; done_seen <= 1'b0;
      prog_ack <= 1'b0; prog_q <= '0;
      polarity <= 2'b11; trig_mode <= 2'b00; pileup_drop <= 1'b1;
      debug_mode <= 1'b0; run_enable <= 1'b0;
      latch_timestamp <= 1'b0; sign_event <= 1'b0; ext_event <= 1'b0;
      {load_validation_wait, load_pileup_wait, load_external_wait, load_m, load_k,
       load_raw_length, load_sliding_wait, load_cfd_a, load_cfd_th, load_cfd_tap,
       load_led_th, load_led_timer} <= '0;
      start_external_wait <= 1'b0; start_internal_wait <= 1'b0; start_validation <= 1'b0;
      clear <= 1'b1;
    end else begin
      flag_q <= prog_flag;
      prog_ack <= 1'b0;
      latch_timestamp <= 1'b0;
      start_external_wait <= 1'b0; start_internal_wait <= 1'b0; start_validation <= 1'b0;
      {load_validation_wait, load_pileup_wait, load_external_wait, load_m, load_k,
       load_raw_length, load_sliding_wait, load_cfd_a, load_cfd_th, load_cfd_tap,
       load_led_th, load_led_timer} <= '0;
      clear <= !run_enable;
      if (prog_flag && !flag_q) pending <= 1'b1;
      if (event_done || event_abort) done_seen <= 1'b1;

      unique case (state)
        S_IDLE: begin
          if (pending) begin
            state <= S_PROGRAM;
          end else if (accept) begin
            state <= S_TRIGGER;
            done_seen <= 1'b0;
            latch_timestamp <= 1'b1;
            sign_event <= is_ext ? 1'b0 : led_sign;
            ext_event <= is_ext;
            start_external_wait <= is_ext;
            start_internal_wait <= !is_ext;
            start_validation <= (trig_mode == TRIG_VALID);
          end
        end
        S_PROGRAM: begin
          state <= S_IDLE;
          pending <= prog_flag && !flag_q;
          prog_ack <= 1'b1;
          prog_q <= prog_data;
          load_validation_wait <= (prog_add == A_EXT_WIN);
          load_pileup_wait     <= (prog_add == A_PILEUP_WIN);
          load_led_timer       <= (prog_add == A_NOISE_WIN);
          load_external_wait   <= (prog_add == A_EXT_SLIDE);
          load_k               <= (prog_add == A_COLLECT_K);
          load_m               <= (prog_add == A_INTEG_M);
          load_led_th          <= own(prog_add, A_LEDTH_BASE, channel_id);
          load_cfd_tap         <= own(prog_add, A_CFD_BASE, channel_id);
          load_cfd_a           <= own(prog_add, A_CFD_BASE, channel_id);
          load_cfd_th          <= own(prog_add, A_CFD_BASE, channel_id);
          load_sliding_wait    <= own(prog_add, A_RAWSL_BASE, channel_id);
          load_raw_length      <= own(prog_add, A_RAWLEN_BASE, channel_id);
          if (own(prog_add, A_CTRL_BASE, channel_id)) begin
            polarity    <= prog_data[11:10];
            trig_mode   <= prog_data[4:3];
            pileup_drop <= prog_data[2];
            debug_mode  <= prog_data[1];
            run_enable  <= prog_data[0];
          end
        end
        S_TRIGGER: begin
          if ((done_seen || event_done || event_abort) && min_deadtime_done && !start_internal_wait
              && !start_external_wait && !latch_timestamp)
            state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
