// Threshold crossing detector.
// CROSSING is set when a positive sample is strictly above VTH or a negative
// sample is strictly below -VTH. The document builds this from the carry of
// INPUT + (VTH xor not INPUT15) with carry-in 0, xored with INPUT15; that
// carry is computed here directly as a 17-bit sum. SIGN is INPUT15 (1 =
// negative). Both outputs are registered (one cycle). LOADVTH latches the
// 15-bit unsigned threshold; its reset value 0x7FFF (no trigger) follows
// the register table.
module vth_cross (
  input  logic               clk,
  input  logic               rst,
  input  logic               load_vth,
  input  logic [14:0]        vth,
  input  logic signed [15:0] data_in,
  output logic               sign,
  output logic               crossing
);
  logic [14:0] vth_q;
  logic [15:0] operand;
  logic [16:0] total;
  always_comb begin
    operand = {1'b0, vth_q} ^ {16{~data_in[15]}};
    total   = {1'b0, data_in} + {1'b0, operand};
  end
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      vth_q <= 15'h7FFF; sign <= 1'b0; crossing <= 1'b0;
    end else begin
      if (load_vth) vth_q <= vth;
      sign     <= data_in[15];
      crossing <= total[16] ^ data_in[15];
    end
  end
endmodule
