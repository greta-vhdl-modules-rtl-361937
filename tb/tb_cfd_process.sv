// Testbench for the CFD state machine: zero crossing with ENABLE, points
// captured (upper 16 bits), VALID afterwards, held until CLEAR.
module tb_cfd_process;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  task automatic watchdog(input int cycles);
    repeat (cycles) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    finish_tb();
  endtask
  logic clear, enable, valid, ts;
  logic signed [19:0] d;
  logic signed [15:0] one, two;
  cfd_process dut (.clk, .rst, .clear, .enable, .cfd_data(d), .cfd_one(one), .cfd_two(two),
                   .cfd_valid(valid), .cfd_timestamp(ts));
  initial watchdog(1000);
  initial begin
    clear = 0; enable = 0; d = 0;
    repeat (2) @(negedge clk); rst = 0;
    d = 20'sd3200; @(negedge clk);
    d = -20'sd1600; @(negedge clk);
    check(!ts, "no crossing without ENABLE");
    enable = 1; d = 20'sd800; @(negedge clk);
    check(ts && one == -16'sd100 && two == 16'sd50, "crossing captured");
    d = -20'sd800; @(negedge clk);
    check(!ts && valid, "valid after timestamp, no second timestamp");
    repeat (3) @(negedge clk);
    check(valid && one == -16'sd100 && two == 16'sd50, "points held");
    clear = 1; @(negedge clk); clear = 0;
    check(!valid && one == 0 && two == 0, "clear resets points");
    d = 20'sd160; @(negedge clk);
    check(ts && one == -16'sd50 && two == 16'sd10, "re-armed after clear");
    finish_tb();
  end
endmodule
