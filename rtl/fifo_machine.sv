// FIFO write scheduler: a token visits the eight channels in turn.
// SCAN: if the token's pre-buffer is ready and the FIFO is not almost full
// (FIFO_PAFneg high), the 9-bit counter is loaded with that channel's
// packet size and READ starts; otherwise the token moves on next cycle.
// READ: one pre-buffer address per cycle (0 .. size-1). After the last one
// the separator word is written (SEP), the channel gets PREBUFFER_ACK, and
// the token moves on even if the same channel is ready again, so a lone
// active channel is revisited only after a full turn. The pre-buffer read
// port has one cycle of latency, so FIFO_WENneg, CHANNEL_SELECT and ENABLE
// are delayed one cycle to line up with the data. TOKEN (undelayed) selects
// the channel's size. State sequence and counter are the document's; the
// separator write and the once-per-packet almost-full check are this
// design's choice.
module fifo_machine (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] prebuffer_ready,
  input  logic       fifo_pafneg,
  input  logic [8:0] size,
  output logic [8:0] prebuffer_address,
  output logic [7:0] prebuffer_enable,
  output logic [7:0] prebuffer_ack,
  output logic       fifo_wenneg,
  output logic [2:0] token,
  output logic [2:0] channel_select,
  output logic       enable
);
  typedef enum logic [1:0] {F_SCAN, F_READ, F_SEP} phase_t;
  phase_t phase;
  logic [8:0] cnt;
  logic rd_d, sep_d;
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      phase <= F_SCAN; token <= '0; cnt <= '0; prebuffer_address <= '0;
      prebuffer_ack <= '0; rd_d <= 1'b0; sep_d <= 1'b0; channel_select <= '0;
    end else begin
      prebuffer_ack  <= '0;
      rd_d           <= (phase == F_READ);
      sep_d          <= (phase == F_SEP);
      channel_select <= token;
      unique case (phase)
        F_SCAN: begin
          if (prebuffer_ready[token] && fifo_pafneg && size != '0) begin
            phase <= F_READ; cnt <= size; prebuffer_address <= '0;
          end else token <= token + 1'b1;
        end
        F_READ: begin
          prebuffer_address <= prebuffer_address + 1'b1;
          cnt <= cnt - 1'b1;
          if (cnt == 9'd1) phase <= F_SEP;
        end
        F_SEP: begin
          prebuffer_ack[token] <= 1'b1;
          token <= token + 1'b1;
          phase <= F_SCAN;
        end
        default: phase <= F_SCAN;
      endcase
    end
  end
  assign prebuffer_enable = (phase == F_READ) ? (8'b1 << token) : 8'b0;
  assign fifo_wenneg = !(rd_d || sep_d);
  assign enable = rd_d;
endmodule
