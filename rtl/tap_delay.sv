// Programmable free-running tap delay: DATAout(n) = DATAin(n - L).
// A dual-port memory is written at a rolling pointer and read at the same
// pointer before the write, so the word read back is the one written one
// pointer period earlier. The pointer rolls over at L-2; together with the
// registered read port the total delay is exactly L cycles. LOAD captures a
// new length, clears the pointer and drops STATUS; STATUS rises once the
// memory has been filled (first rollover). Lengths below 2 act as 2.
// RESET_LEN is the length used after reset, before any LOAD.
// ADDR_W = 9 gives the 512-tap block-RAM version, ADDR_W = 6 the 64-tap
// distributed-memory version; the circular-buffer structure, the ports and
// the load/status behaviour follow the document, the exact pointer
// arithmetic and the minimum length are this design's choice.
module tap_delay #(
  parameter int ADDR_W = 9,
  parameter int DATA_W = 16,
  parameter int RESET_LEN = 2      // delay length after reset
) (
  input  logic              clk,
  input  logic              rst,      // asynchronous, active high
  input  logic              load,
  input  logic [ADDR_W-1:0] length,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_out,
  output logic              status
);
  localparam int DEPTH = 1 << ADDR_W;
  logic [DATA_W-1:0] mem [DEPTH];
  logic [ADDR_W-1:0] ptr, last;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      ptr    <= '0;
      last   <= ADDR_W'((RESET_LEN < 2) ? 0 : RESET_LEN - 2);
      status <= 1'b0;
    end else if (load) begin
      ptr    <= '0;
      last   <= (length < 2) ? '0 : ADDR_W'(length - 2);
      status <= 1'b0;
    end else begin
      if (ptr == last) begin
        ptr    <= '0;
        status <= 1'b1;
      end else begin
        ptr <= ptr + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    data_out <= mem[ptr];
    mem[ptr] <= data_in;
  end
endmodule
