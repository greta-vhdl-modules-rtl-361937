// Testbench for the 48-bit timer: counts one per cycle, SYNCH restarts it.
module tb_timer48;
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
  logic synch;
  logic [47:0] t;
  timer48 dut (.clk, .rst, .synch, .time_now(t));
  initial watchdog(2000);
  initial begin
    synch = 0;
    repeat (2) @(negedge clk); rst = 0;
    repeat (10) @(negedge clk);
    check(t == 10, "ten cycles counted");
    synch = 1; @(negedge clk); synch = 0;
    check(t == 0, "synch resets");
    for (int i = 1; i < 100; i++) begin @(negedge clk); check(t == 48'(i), "counting"); end
    force dut.time_now = 48'hFFFF_FFFF_FFFE; @(negedge clk); release dut.time_now;
    @(negedge clk); check(t == 48'hFFFF_FFFF_FFFF, "upper bits count");
    @(negedge clk); check(t == 0, "wraps at 2^48");
    finish_tb();
  end
endmodule
