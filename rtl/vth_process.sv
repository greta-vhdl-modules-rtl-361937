// LED trigger state machine (IDLE / ACTIVE) with registered outputs.
// IDLE -> ACTIVE on a new crossing (CROSSING high where it was low the
// cycle before, i.e. the signal came from the in-range band) while CLEAR
// is low: LED_TIMESTAMP pulses for one cycle, ACTIVEEvent rises and
// MaxMinb takes SIGN. ACTIVE -> IDLE on CLEAR or when the noise window
// has been released; the first ACTIVE cycle (LED_TIMESTAMP high) ignores
// DISABLED because the noise timer only starts on that pulse. Output values
// on each transition follow the document's state chart; the edge detection
// on CROSSING is this design's reading of "crossing from medium range".
module vth_process (
  input  logic clk,
  input  logic rst,
  input  logic clear,
  input  logic disabled,
  input  logic crossing,
  input  logic sign,
  output logic max_minb,
  output logic active_event,
  output logic led_timestamp
);
  typedef enum logic {IDLE, ACTIVE} state_t;
  state_t state;
  logic   crossing_q;
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state <= IDLE; crossing_q <= 1'b0; max_minb <= 1'b0;
      active_event <= 1'b0; led_timestamp <= 1'b0;
    end else begin
      crossing_q <= crossing;
      unique case (state)
        IDLE: if (crossing && !crossing_q && !clear) begin
                state <= ACTIVE; active_event <= 1'b1;
                led_timestamp <= 1'b1; max_minb <= sign;
              end else begin
                active_event <= 1'b0; led_timestamp <= 1'b0;
              end
        ACTIVE: begin
                led_timestamp <= 1'b0; active_event <= 1'b1;
                if (clear || (!disabled && !led_timestamp)) state <= IDLE;
              end
      endcase
    end
  end
endmodule
