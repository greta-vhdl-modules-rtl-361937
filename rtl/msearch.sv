// Extremum search: tracks the maximum (SIGN = 0) or minimum (SIGN = 1) of
// the incoming 23-bit samples. CLEAR zeroes the stored extremum and latches
// SIGN as the direction for the next tracking. Otherwise, each cycle the
// COMPARE block decides whether the new sample replaces the stored one.
// One cycle of latency; the CLEAR/SIGN behaviour follows the document.
module msearch (
  input  logic               clk,
  input  logic               rst,
  input  logic signed [22:0] xn,
  input  logic               clear,
  input  logic               sign,
  output logic signed [22:0] max
);
  logic sign_q, update;
  compare #(.W(23)) u_cmp (.input1(xn), .input2(max), .sign(sign_q), .update);
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      max <= '0; sign_q <= 1'b0;
    end else if (clear) begin
      max <= '0; sign_q <= sign;
    end else if (update) begin
      max <= xn;
    end
  end
endmodule
