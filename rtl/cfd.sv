// Constant fraction discriminator (CFD).
// Same front end as the LED (DiffFilt, GauFilt1, GauFilt2, rounded to 16
// bits, available 9 cycles after the input). The 16-bit signal g goes
// through a 64-tap TapDelayLoc and MULTMinusa, and ADD19 forms
// -2^a*g(n-L) + g(n) in 20 bits. The delay line's output register is one
// of its L stages, so the direct path carries one register to match the
// multiplier register and the two copies are exactly L samples apart.
// In parallel, g rounded to 12 bits feeds the Magnitude discriminator
// whose output is registered once more (EN) to line up with ADD19.
// CFDProcess then detects the zero crossing. Clock positions follow the
// document's chart; the rounding and the exact alignment are this
// design's choice.
module cfd (
  input  logic               clk,
  input  logic               rst,
  input  logic               clear,
  input  logic               load_threshold,
  input  logic [4:0]         threshold,
  input  logic               load_a,
  input  logic [1:0]         a,
  input  logic               load_tap_length,
  input  logic [5:0]         tap_length,
  input  logic signed [11:0] xn,
  input  logic signed [11:0] xn_k,
  output logic signed [15:0] cfd_one,
  output logic signed [15:0] cfd_two,
  output logic               tap_status,
  output logic               cfd_valid,
  output logic               cfd_timestamp
);
  logic signed [12:0] d13;
  logic signed [14:0] g15;
  logic signed [16:0] g17;
  logic signed [15:0] g16, tap_out, g16_d1;
  logic signed [11:0] g12;
  logic signed [18:0] mult;
  logic signed [19:0] add19;
  logic mag_en, en_q;

  diff_filt #(.IN_W(12)) u_diff (.clk, .rst, .xn, .xn_k, .yn(d13));
  gau_filt  #(.IN_W(13)) u_g1   (.clk, .rst, .xn(d13), .yn(g15));
  gau_filt  #(.IN_W(15)) u_g2   (.clk, .rst, .xn(g15), .yn(g17));
  round_shift #(.IN_W(17), .SHIFT(1)) u_r16 (.din(g17), .dout(g16));
  round_shift #(.IN_W(16), .SHIFT(4)) u_r12 (.din(g16), .dout(g12));
  tap_delay #(.ADDR_W(6), .DATA_W(16), .RESET_LEN(int'(greta_pkg::RST_CFD_DELAY))) u_tap (.clk, .rst, .load(load_tap_length),
      .length(tap_length), .data_in(g16), .data_out(tap_out), .status(tap_status));
  mult_minusa u_mult (.clk, .rst, .load_a, .a, .data_in(tap_out), .data_out(mult));
  magnitude u_mag (.clk, .rst, .load_threshold, .threshold, .data_in(g12), .enable(mag_en));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      g16_d1 <= '0; add19 <= '0; en_q <= 1'b0;
    end else begin
      g16_d1 <= g16;
      add19  <= 20'(mult) + 20'(g16_d1);
      en_q   <= mag_en;
    end
  end

  cfd_process u_proc (.clk, .rst, .clear, .enable(en_q), .cfd_data(add19),
                      .cfd_one, .cfd_two, .cfd_valid, .cfd_timestamp);
endmodule
