// Event packet pre-buffer: 1024 x 16-bit write port, 512 x 32-bit read port,
// in the manner of the block RAM configured 18-bit/36-bit. Half-word 2i is
// bits 15:0 of long word i, half-word 2i+1 bits 31:16. Both ports are
// synchronous; the read data appears one cycle after the address.
module prebuffer (
  input  logic        clk,
  input  logic        we,
  input  logic [9:0]  waddr,
  input  logic [15:0] wdata,
  input  logic [8:0]  raddr,
  output logic [31:0] rdata
);
  logic [15:0] lo [512];
  logic [15:0] hi [512];
  always_ff @(posedge clk) begin
    if (we && !waddr[0]) lo[waddr[9:1]] <= wdata;
    if (we &&  waddr[0]) hi[waddr[9:1]] <= wdata;
    rdata <= {hi[raddr], lo[raddr]};
  end
endmodule
