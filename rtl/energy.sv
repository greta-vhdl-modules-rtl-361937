// Energy computation: trapezoidal filter (three cycles) followed by the
// extremum search (one cycle); MAX holds the extremum of the trapezoid
// since the last CLEAR, in the direction SIGN given at that CLEAR.
// RESTART zeroes the trapezoid (see trapz_fil).
module energy (
  input  logic               clk,
  input  logic               rst,
  input  logic signed [11:0] xn,
  input  logic signed [11:0] xn_m,
  input  logic signed [11:0] xn_m_k,
  input  logic signed [11:0] xn_2m_k,
  input  logic               restart,
  input  logic               clear,
  input  logic               sign,
  output logic signed [22:0] max
);
  logic signed [22:0] trap;
  trapz_fil u_trap (.clk, .rst, .xn, .xn_m, .xn_m_k, .xn_2m_k, .restart, .yn(trap));
  msearch   u_ms   (.clk, .rst, .xn(trap), .clear, .sign, .max);
endmodule
