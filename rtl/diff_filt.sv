// Differentiation filter: Yn = Xn - Xn_k in two's complement.
// The subtraction is done one bit wider than the inputs (sign extension) so
// it cannot overflow, and the result is registered: one cycle of latency,
// as in the document's pipeline chart.
module diff_filt #(
  parameter int IN_W = 12
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic signed [IN_W-1:0] xn,
  input  logic signed [IN_W-1:0] xn_k,
  output logic signed [IN_W:0]   yn
);
  always_ff @(posedge clk or posedge rst)
    if (rst) yn <= '0;
    else     yn <= (IN_W+1)'(xn) - (IN_W+1)'(xn_k);
endmodule
