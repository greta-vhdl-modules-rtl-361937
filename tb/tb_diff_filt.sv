// Testbench for the differentiation filter: random samples, one-cycle latency.
module tb_diff_filt;
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
  logic signed [11:0] xn, xk;
  logic signed [12:0] yn;
  diff_filt dut (.clk, .rst, .xn, .xn_k(xk), .yn);
  initial watchdog(2000);
  initial begin
    xn = 0; xk = 0;
    repeat (2) @(negedge clk); rst = 0;
    xn = -12'sd2048; xk = 12'sd2047; @(negedge clk);
    check(yn == -13'sd4095, "most negative difference");
    for (int i = 0; i < 500; i++) begin
      logic signed [12:0] exp;
      xn = 12'($urandom); xk = 12'($urandom); exp = 13'(xn) - 13'(xk);
      @(negedge clk);
      check(yn == exp, "difference");
    end
    finish_tb();
  end
endmodule
