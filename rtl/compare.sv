// Signed comparison for the extremum search (combinational).
// UPDATE is high when the new sample INPUT1 is strictly beyond the stored
// INPUT2 in the search direction: above it for a maximum search (SIGN = 0),
// below it for a minimum search (SIGN = 1). The document's carry-chain
// versions compute the sign of the 23-bit difference; the polarity of SIGN
// matches the LED sign convention (1 = negative pulse).
module compare #(
  parameter int W = 23
) (
  input  logic signed [W-1:0] input1,
  input  logic signed [W-1:0] input2,
  input  logic                sign,
  output logic                update
);
  assign update = sign ? (input1 < input2) : (input1 > input2);
endmodule
