// Trapezoidal filter recursion
//   Yn = Yn-1 + ((Xn + Xn-2m-k) - (Xn-m + Xn-m-k)).
// The delayed samples come from external tap delays. Pipeline as in the
// document: clock 1 holds the two 13-bit sums, clock 2 their 14-bit
// difference, clock 3 the 23-bit accumulator, so Yn appears three cycles
// after its samples. The accumulator wraps modulo 2^23.
// RESTART (this design's addition) holds the pipeline and accumulator at
// zero; the channel drives it while its tap delays are not yet filled, so
// the recursion does not keep forever the offset of whatever the delay
// memories held at power-up or after a length change.
module trapz_fil (
  input  logic               clk,
  input  logic               rst,
  input  logic signed [11:0] xn,
  input  logic signed [11:0] xn_m,
  input  logic signed [11:0] xn_m_k,
  input  logic signed [11:0] xn_2m_k,
  input  logic               restart,
  output logic signed [22:0] yn
);
  logic signed [12:0] sum1, sum2;
  logic signed [13:0] sub1;
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sum1 <= '0; sum2 <= '0; sub1 <= '0; yn <= '0;
    end else if (restart) begin
      sum1 <= '0; sum2 <= '0; sub1 <= '0; yn <= '0;
    end else begin
      sum1 <= 13'(xn) + 13'(xn_2m_k);
      sum2 <= 13'(xn_m) + 13'(xn_m_k);
      sub1 <= 14'(sum1) - 14'(sum2);
      yn   <= yn + 23'(sub1);
    end
  end
endmodule
