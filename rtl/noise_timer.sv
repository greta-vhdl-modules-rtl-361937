// Noise timer: programmable dead time after an LED trigger.
// START loads a down-counter with the stored window length; DISABLED is
// high while the counter is non-zero, so it is high for WinNoise cycles
// starting the cycle after START. CLEAR stops the counter at once.
// LOADNoise stores the 7-bit length (reset value 0x40 from the register
// table). The counting direction is this design's choice.
module noise_timer (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       clear,
  input  logic       load_noise,
  input  logic [6:0] win_noise,
  output logic       disabled
);
  logic [6:0] len_q, cnt;
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      len_q <= 7'h40; cnt <= '0;
    end else begin
      if (load_noise) len_q <= win_noise;
      if (clear)           cnt <= '0;
      else if (start)      cnt <= len_q;
      else if (cnt != '0)  cnt <= cnt - 1'b1;
    end
  end
  assign disabled = (cnt != '0);
endmodule
