// Debug waveform source. A 1024 x 16 memory is loaded from the programming
// bus: a write to address 0x30 sets the load address, each write to 0x31
// stores a word there and advances the address. While at least one
// channel's debug flag is set, the memory is read out continuously, one
// word per cycle, wrapping after 1024 words; otherwise the read pointer
// rests at zero and the output is zero. Every programming request is
// acknowledged with a one-cycle PROG_ACK. The two register addresses and
// the replay condition follow the document; the auto-incrementing load
// address and the wrap-around replay are this design's choice.
module debug_mem
  import greta_pkg::*;
#(
  parameter int ADDR_W = 10
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  debug_flags,
  input  logic [15:0] prog_data,
  input  logic [5:0]  prog_add,
  input  logic        prog_flag,
  output logic        prog_ack,
  output logic [15:0] debug_data
);
  logic [15:0] mem [1 << ADDR_W];
  logic [ADDR_W-1:0] waddr, raddr;
  logic flag_q;
  logic req;
  assign req = prog_flag && !flag_q;

  always_ff @(posedge clk) begin
    if (req && prog_add == A_DBG_DATA) mem[waddr] <= prog_data;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      waddr <= '0; raddr <= '0; flag_q <= 1'b0; prog_ack <= 1'b0; debug_data <= '0;
    end else begin
      flag_q   <= prog_flag;
      prog_ack <= req;
      if (req && prog_add == A_DBG_ADDR) waddr <= prog_data[ADDR_W-1:0];
      else if (req && prog_add == A_DBG_DATA) waddr <= waddr + 1'b1;
      if (|debug_flags) begin
        debug_data <= mem[raddr];
        raddr      <= raddr + 1'b1;
      end else begin
        debug_data <= '0;
        raddr      <= '0;
      end
    end
  end
endmodule
