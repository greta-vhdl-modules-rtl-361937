// CFD zero-crossing state machine (IDLE / ACTIVE), registered outputs.
// The 20-bit CFD signal is truncated to its upper 16 bits. In IDLE, when
// ENABLE is high, CLEAR is low and the sign of the current value differs
// from the value one cycle earlier (either direction), CFD_TIMESTAMP pulses,
// CFDOne takes the earlier value and CFDTwo the current one. While ACTIVE,
// CFD_VALID is high and the points are held; CLEAR returns to IDLE and
// zeroes the points. Transitions and output values follow the document's
// state chart.
module cfd_process (
  input  logic               clk,
  input  logic               rst,
  input  logic               clear,
  input  logic               enable,
  input  logic signed [19:0] cfd_data,
  output logic signed [15:0] cfd_one,
  output logic signed [15:0] cfd_two,
  output logic               cfd_valid,
  output logic               cfd_timestamp
);
  typedef enum logic {IDLE, ACTIVE} state_t;
  state_t state;
  logic signed [15:0] cur, prev;
  assign cur = cfd_data[19:4];
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state <= IDLE; prev <= '0; cfd_one <= '0; cfd_two <= '0;
      cfd_valid <= 1'b0; cfd_timestamp <= 1'b0;
    end else begin
      prev <= cur;
      unique case (state)
        IDLE: begin
          cfd_valid <= 1'b0;
          if (!clear && enable && (cur[15] != prev[15])) begin
            state <= ACTIVE; cfd_timestamp <= 1'b1;
            cfd_one <= prev; cfd_two <= cur;
          end else begin
            cfd_timestamp <= 1'b0;
          end
        end
        ACTIVE: begin
          cfd_timestamp <= 1'b0;
          if (clear) begin
            state <= IDLE; cfd_valid <= 1'b0; cfd_one <= '0; cfd_two <= '0;
          end else begin
            cfd_valid <= 1'b1;
          end
        end
      endcase
    end
  end
endmodule
