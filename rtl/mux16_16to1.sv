// 16-bit wide, 16-input multiplexer with enable and a registered output:
// OUTPUT takes INPUT[S] when ENABLE is high and zero otherwise, one cycle
// later. (The document maps this onto the FPGA's wide-function muxes; here
// it is a plain indexed select.)
module mux16_16to1 (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic [3:0]  sel,
  input  logic [15:0] inputs [16],
  output logic [15:0] data_out
);
  always_ff @(posedge clk or posedge rst)
    if (rst) data_out <= '0;
    else     data_out <= enable ? inputs[sel] : 16'h0000;
endmodule
