// Testbench for the noise timer: DISABLED lasts exactly WinNoise cycles,
// the reset length is 0x40, CLEAR ends the window early.
module tb_noise_timer;
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
  logic start, clear, load_noise, disabled;
  logic [6:0] win;
  int n;
  noise_timer dut (.clk, .rst, .start, .clear, .load_noise, .win_noise(win), .disabled);
  initial watchdog(3000);
  initial begin
    start = 0; clear = 0; load_noise = 0; win = 0;
    repeat (2) @(negedge clk); rst = 0;
    start = 1; @(negedge clk); start = 0;
    n = 0; while (disabled) begin n++; @(negedge clk); end
    check(n == 64, "reset window 64 cycles");
    for (int w = 1; w < 128; w += 37) begin
      load_noise = 1; win = 7'(w); @(negedge clk); load_noise = 0;
      start = 1; @(negedge clk); start = 0;
      n = 0; while (disabled) begin n++; @(negedge clk); end
      check(n == w, "programmed window length");
    end
    start = 1; @(negedge clk); start = 0;
    repeat (3) @(negedge clk);
    clear = 1; @(negedge clk); clear = 0;
    check(!disabled, "clear ends the window");
    finish_tb();
  end
endmodule
