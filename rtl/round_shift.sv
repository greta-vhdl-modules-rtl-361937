// Combinational rounding of a two's complement value: drops SHIFT low bits
// with round-half-up and saturates to OUT_W = IN_W - SHIFT bits. Used where
// the filter chains "round back" to a narrower bus.
module round_shift #(
  parameter int IN_W  = 17,
  parameter int SHIFT = 4,
  parameter int OUT_W = IN_W - SHIFT
) (
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout
);
  localparam logic signed [IN_W:0] MAXV = (IN_W+1)'((1 <<< (OUT_W-1)) - 1);
  localparam logic signed [IN_W:0] MINV = -(IN_W+1)'(1 <<< (OUT_W-1));
  logic signed [IN_W:0] wide, shifted;
  always_comb begin
    wide    = (IN_W+1)'(din) + (IN_W+1)'(1 <<< (SHIFT-1));
    shifted = wide >>> SHIFT;
    if (shifted > MAXV)      dout = MAXV[OUT_W-1:0];
    else if (shifted < MINV) dout = MINV[OUT_W-1:0];
    else                     dout = shifted[OUT_W-1:0];
  end
endmodule
