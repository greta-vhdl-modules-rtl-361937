// Three-point Gaussian filter Yn = X(n) + 2 X(n-1) + X(n-2), output two
// bits wider than the input (gain of 4).
// Structure from the document: two delay registers hold X(n-1), X(n-2);
// a first adder forms X(n) + X(n-2) into a one-bit-wider SUM register and a
// second adder adds the doubled X(n-2) register (which by then holds the
// next older sample) into the output register. Output at cycle t is
// x(t-2) + 2 x(t-3) + x(t-4): the oldest sample is four cycles old, which
// matches the four-clock step per stage in the document's pipeline charts.
// IN_W = 13 is the first stage (GauFilt1), IN_W = 15 the second (GauFilt2).
module gau_filt #(
  parameter int IN_W = 13
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic signed [IN_W-1:0] xn,
  output logic signed [IN_W+1:0] yn
);
  logic signed [IN_W-1:0] x1, x2;
  logic signed [IN_W:0]   sum;
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      x1 <= '0; x2 <= '0; sum <= '0; yn <= '0;
    end else begin
      x1  <= xn;
      x2  <= x1;
      sum <= (IN_W+1)'(xn) + (IN_W+1)'(x2);
      yn  <= (IN_W+2)'(sum) + ((IN_W+2)'(x2) <<< 1);
    end
  end
endmodule
