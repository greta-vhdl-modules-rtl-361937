// Packet state machine: writes one event packet into the pre-buffer.
// Idle waits for ComputedDone. The event is then aborted (EVENT_ABORT and
// RESETEvent pulse) if the channel is stopped, if it piled up while
// pile-up drop-out is enabled, or if the pre-buffer still holds an unread
// packet. Otherwise the twelve header states BoardID, SIZE, LEDTMSTP1-3,
// ENERGY1-2, CFDTMSTP1-3, CFD1, CFD2 each write one 16-bit word (MUX_SELECT
// picks the field, AddEnable advances the address), SLIDING waits for the
// raw-data sliding window, RAW_DATA writes raw points while RawAdd is high
// and, in validation mode, EXT_VALID waits until a VALIDATE pulse has been
// seen inside the validation window (packet kept) or the window closes
// (packet aborted). A kept packet raises PREBUFFER_READY until
// PREBUFFER_ACK. RESETEvent pulses at the end of every event. START pulses
// to the wait counter are issued combinationally on the transition edge.
// The state sequence is the document's; the abort rules and the
// ready/acknowledge handshake are this design's reading of it.
module packet_machine
  import greta_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] trig_mode,
  input  logic       enable,
  input  logic       pileup,          // pile-up drop-out enabled
  input  logic       event_pileup,
  input  logic       prebuffer_ack,
  input  logic       raw_sliding_done,
  input  logic       ext_validation,
  input  logic       computed_done,
  input  logic       raw_add,
  input  logic       validate,
  input  logic       latch_timestamp,
  output logic       add_enable,
  output logic       start_sliding_wait,
  output logic       start_add_wait,
  output logic       prebuffer_ready,
  output mux_sel_t   mux_select,
  output logic       mux_enable,
  output logic       reset_event,
  output logic       event_abort
);
  typedef enum logic [4:0] {
    P_IDLE, P_BOARD, P_SIZE, P_TS1, P_TS2, P_TS3, P_E1, P_E2, P_CTS1, P_CTS2,
    P_CTS3, P_CFD1, P_CFD2, P_SLIDING, P_RAW, P_EXT_VALID
  } state_t;
  state_t state;
  logic validated, drop, header, finish_ok, finish_bad;

  assign drop   = !enable || (pileup && event_pileup) || prebuffer_ready;
  assign header = (state >= P_BOARD) && (state <= P_CFD2);

  always_comb begin
    mux_select = SEL_RAW;
    unique case (state)
      P_BOARD: mux_select = SEL_BOARD;
      P_SIZE:  mux_select = SEL_SIZE;
      P_TS1:   mux_select = SEL_TS1;
      P_TS2:   mux_select = SEL_TS2;
      P_TS3:   mux_select = SEL_TS3;
      P_E1:    mux_select = SEL_E1;
      P_E2:    mux_select = SEL_E2;
      P_CTS1:  mux_select = SEL_CTS1;
      P_CTS2:  mux_select = SEL_CTS2;
      P_CTS3:  mux_select = SEL_CTS3;
      P_CFD1:  mux_select = SEL_CFD1;
      P_CFD2:  mux_select = SEL_CFD2;
      default: mux_select = SEL_RAW;
    endcase
    mux_enable         = header || (state == P_RAW && raw_add);
    add_enable         = mux_enable;
    start_add_wait     = (state == P_IDLE) && computed_done && !drop;
    start_sliding_wait = (state == P_CFD2);
    finish_ok  = ((state == P_RAW) && !raw_add && (trig_mode != TRIG_VALID)) ||
                 ((state == P_EXT_VALID) && validated);
    finish_bad = ((state == P_IDLE) && computed_done && drop) ||
                 ((state == P_EXT_VALID) && !validated && !ext_validation);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state <= P_IDLE; validated <= 1'b0; prebuffer_ready <= 1'b0;
      reset_event <= 1'b0; event_abort <= 1'b0;
    end else begin
      reset_event <= finish_ok || finish_bad;
      event_abort <= finish_bad;
      if (latch_timestamp) validated <= 1'b0;
      else if (validate && ext_validation) validated <= 1'b1;
      if (finish_ok) prebuffer_ready <= 1'b1;
      else if (prebuffer_ack) prebuffer_ready <= 1'b0;
      unique case (state)
        P_IDLE:      if (start_add_wait) state <= P_BOARD;
        P_SLIDING:   if (raw_sliding_done) state <= P_RAW;
        P_RAW:       if (!raw_add) state <= (trig_mode == TRIG_VALID) ? P_EXT_VALID : P_IDLE;
        P_EXT_VALID: if (validated || !ext_validation) state <= P_IDLE;
        default:     state <= state_t'(state + 1'b1);   // header words, CFD2 -> SLIDING
      endcase
    end
  end
endmodule
