// Channel window counters.
// * Computation window: STARTInternalWait runs it for 2m+k+COMP_MARGIN
//   cycles (the time the trapezoid needs to reach the end of its flat top),
//   STARTExternalWait for the external sliding length; ComputedDone pulses
//   when it ends. One counter serves both since only one is ever in use.
// * Validation window: STARTValidation holds ExtValidation high for the
//   external validation length.
// * Sliding window: STARTSlidingWait pulses RawSlidingDone after the raw
//   data sliding length (+1) cycles.
// * Packet address: STARTAddWait clears Address and loads the raw point
//   count; AddEnable advances Address, and once past the 12 header words
//   each advance consumes one raw point. RawAdd is high while raw points
//   remain. Size is the packet length in 32-bit words, header included.
// MinDeadtimeDone is high when no window is running and no raw point is
// pending. The three counters, their inputs and outputs are the
// document's; window lengths beyond the programmed values (the computation
// margin, the +1 of each window) are this design's choice. The raw length
// is limited to 1010 points so a packet fits the 1024-word pre-buffer and
// the 9-bit size. Reset values follow the register table.
module wait_counter
  import greta_pkg::*;
#(
  parameter int COMP_MARGIN = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load_validation_wait,
  input  logic [10:0] validation_wait,
  input  logic        load_external_wait,
  input  logic [10:0] external_wait,
  input  logic        load_m,
  input  logic [8:0]  m,
  input  logic        load_k,
  input  logic [8:0]  k,
  input  logic        load_raw_length,
  input  logic [9:0]  raw_length,
  input  logic        load_sliding_wait,
  input  logic [10:0] sliding_wait,
  input  logic        start_external_wait,
  input  logic        start_internal_wait,
  input  logic        start_validation,
  input  logic        start_sliding_wait,
  input  logic        start_add_wait,
  input  logic        add_enable,
  output logic [9:0]  address,
  output logic        raw_add,
  output logic        raw_sliding_done,
  output logic        ext_validation,
  output logic        min_deadtime_done,
  output logic        computed_done,
  output logic [8:0]  size
);
  localparam logic [9:0] RAW_MAX = 10'd1010;
  logic [10:0] val_len, ext_len, slide_len;
  logic [8:0]  m_q, k_q;
  logic [9:0]  raw_len;
  logic [11:0] comp_cnt;
  logic        comp_run;
  logic [10:0] val_cnt, slide_cnt;
  logic        slide_run;
  logic [9:0]  raw_left;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      val_len <= RST_EXT_WIN; ext_len <= RST_EXT_SLIDE; slide_len <= RST_RAW_SLIDE;
      m_q <= RST_INTEG_M; k_q <= RST_COLLECT_K; raw_len <= RST_RAW_LEN;
    end else begin
      if (load_validation_wait) val_len <= validation_wait;
      if (load_external_wait)   ext_len <= external_wait;
      if (load_m)               m_q <= m;
      if (load_k)               k_q <= k;
      if (load_raw_length)      raw_len <= (raw_length > RAW_MAX) ? RAW_MAX : raw_length;
      if (load_sliding_wait)    slide_len <= sliding_wait;
    end
  end

  // computation window
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      comp_cnt <= '0; comp_run <= 1'b0; computed_done <= 1'b0;
    end else begin
      computed_done <= 1'b0;
      if (start_internal_wait) begin
        comp_cnt <= 12'(2 * m_q) + 12'(k_q) + 12'(COMP_MARGIN); comp_run <= 1'b1;
      end else if (start_external_wait) begin
        comp_cnt <= 12'(ext_len); comp_run <= 1'b1;
      end else if (comp_run) begin
        if (comp_cnt == '0) begin
          comp_run <= 1'b0; computed_done <= 1'b1;
        end else comp_cnt <= comp_cnt - 1'b1;
      end
    end
  end

  // validation window
  always_ff @(posedge clk or posedge rst) begin
    if (rst) val_cnt <= '0;
    else if (start_validation) val_cnt <= val_len;
    else if (val_cnt != '0) val_cnt <= val_cnt - 1'b1;
  end
  assign ext_validation = (val_cnt != '0);

  // sliding window
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      slide_cnt <= '0; slide_run <= 1'b0; raw_sliding_done <= 1'b0;
    end else begin
      raw_sliding_done <= 1'b0;
      if (start_sliding_wait) begin
        slide_cnt <= slide_len; slide_run <= 1'b1;
      end else if (slide_run) begin
        if (slide_cnt == '0) begin
          slide_run <= 1'b0; raw_sliding_done <= 1'b1;
        end else slide_cnt <= slide_cnt - 1'b1;
      end
    end
  end

  // packet address and raw point count
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      address <= '0; raw_left <= '0;
    end else if (start_add_wait) begin
      address <= '0; raw_left <= raw_len;
    end else if (add_enable) begin
      address <= address + 1'b1;
      if (address >= 10'(HEADER_WORDS) && raw_left != '0) raw_left <= raw_left - 1'b1;
    end
  end
  assign raw_add = (raw_left != '0);
  assign size = 9'((11'(HEADER_WORDS) + 11'(raw_len) + 11'd1) >> 1);
  assign min_deadtime_done = !comp_run && !slide_run && !raw_add && !ext_validation;
endmodule
