// Leading edge discriminator (LED).
// Xn - Xn_k is differentiated (DiffFilt, 13 bits), smoothed by two Gaussian
// stages (15, 17 bits), rounded back to 13 bits, smoothed again by two
// stages, rounded to 16 bits and compared with +/-VTH (VTHCross). The
// VTHProcess state machine turns the crossing into a one-cycle
// LED_TIMESTAMP, which also starts the NoiseTimer that keeps the state
// machine busy for the noise window. Bus widths and the clock positions
// (crossing registered 18 cycles after the input samples, LED_TIMESTAMP one
// cycle later) follow the document's flow chart. Rounding is round-half-up
// with saturation (this design's choice). CLEAR forces the state machine to
// idle and stops the noise timer.
module led (
  input  logic               clk,
  input  logic               rst,
  input  logic               clear,
  input  logic signed [11:0] xn,
  input  logic signed [11:0] xn_k,
  input  logic               load_vth,
  input  logic [14:0]        vth,
  input  logic               load_noise,
  input  logic [6:0]         win_noise,
  output logic               active_event,
  output logic               max_minb,
  output logic               led_timestamp
);
  logic signed [12:0] d13, r13;
  logic signed [14:0] g1a, g1b;
  logic signed [16:0] g2a, g2b;
  logic signed [15:0] r16;
  logic sign, crossing, disabled;

  diff_filt #(.IN_W(12)) u_diff (.clk, .rst, .xn, .xn_k, .yn(d13));
  gau_filt  #(.IN_W(13)) u_g1a  (.clk, .rst, .xn(d13), .yn(g1a));
  gau_filt  #(.IN_W(15)) u_g2a  (.clk, .rst, .xn(g1a), .yn(g2a));
  round_shift #(.IN_W(17), .SHIFT(4)) u_r13 (.din(g2a), .dout(r13));
  gau_filt  #(.IN_W(13)) u_g1b  (.clk, .rst, .xn(r13), .yn(g1b));
  gau_filt  #(.IN_W(15)) u_g2b  (.clk, .rst, .xn(g1b), .yn(g2b));
  round_shift #(.IN_W(17), .SHIFT(1)) u_r16 (.din(g2b), .dout(r16));
  vth_cross u_cross (.clk, .rst, .load_vth, .vth, .data_in(r16), .sign, .crossing);
  noise_timer u_noise (.clk, .rst, .start(led_timestamp), .clear, .load_noise,
                       .win_noise, .disabled);
  vth_process u_proc (.clk, .rst, .clear, .disabled, .crossing, .sign,
                      .max_minb, .active_event, .led_timestamp);
endmodule
