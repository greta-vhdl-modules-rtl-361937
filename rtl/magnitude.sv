// Magnitude discriminator: ENABLE is high when the 12-bit sample is
// strictly above the 5-bit unsigned threshold or strictly below its
// negative. The document derives this from a fast carry chain over the
// sign-extended threshold; here the same comparison is written directly.
// Registered output (one cycle). LOADThreshold stores the threshold
// (reset value 0x10 from the register table).
module magnitude (
  input  logic               clk,
  input  logic               rst,
  input  logic               load_threshold,
  input  logic [4:0]         threshold,
  input  logic signed [11:0] data_in,
  output logic               enable
);
  logic [4:0] th_q;
  logic signed [12:0] th_s;
  assign th_s = 13'(th_q);
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      th_q <= 5'h10; enable <= 1'b0;
    end else begin
      if (load_threshold) th_q <= threshold;
      enable <= (13'(data_in) > th_s) || (13'(data_in) < -th_s);
    end
  end
endmodule
