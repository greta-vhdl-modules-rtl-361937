// 48-bit free-running time counter. SYNCH (one-cycle pulse shared by all
// channels) resets it to zero so every channel counts from the same origin.
module timer48 (
  input  logic        clk,
  input  logic        rst,
  input  logic        synch,
  output logic [47:0] time_now
);
  always_ff @(posedge clk or posedge rst)
    if (rst)        time_now <= '0;
    else if (synch) time_now <= '0;
    else            time_now <= time_now + 48'd1;
endmodule
