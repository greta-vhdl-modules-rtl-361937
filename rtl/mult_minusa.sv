// Multiplication by -1, -2, -4 or -8 selected by the stored 2-bit 'a'
// (00:-1, 01:-2, 10:-4, 11:-8). The input is shifted left by 'a' through a
// 4:1 multiplexer, inverted, and 1 is added, giving the exact negation
// OUTPUT = -(2^a) * INPUT in 19 bits. Registered: one cycle of latency.
// LOADa stores 'a' (reset value 00). The single input -32768 with a = 11
// wraps, as a 19-bit result cannot hold +262144.
module mult_minusa (
  input  logic               clk,
  input  logic               rst,
  input  logic               load_a,
  input  logic [1:0]         a,
  input  logic signed [15:0] data_in,
  output logic signed [18:0] data_out
);
  logic [1:0] a_q;
  logic signed [18:0] shifted;
  always_comb begin
    unique case (a_q)
      2'b00: shifted = 19'(data_in);
      2'b01: shifted = 19'(data_in) <<< 1;
      2'b10: shifted = 19'(data_in) <<< 2;
      default: shifted = 19'(data_in) <<< 3;
    endcase
  end
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      a_q <= 2'b00; data_out <= '0;
    end else begin
      if (load_a) a_q <= a;
      data_out <= ~shifted + 19'sd1;
    end
  end
endmodule
