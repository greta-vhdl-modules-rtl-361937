// Testbench for the trapezoidal recursion on random inputs: three-cycle
// latency and modulo-2^23 accumulation; RESTART zeroes the accumulator
// and the recursion resumes from zero.
module tb_trapz_fil;
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
  logic signed [11:0] a, b, c, d;
  logic signed [22:0] y;
  logic restart;
  int acc;
  int inc [$];
  trapz_fil dut (.clk, .rst, .xn(a), .xn_m(b), .xn_m_k(c), .xn_2m_k(d), .restart, .yn(y));
  initial watchdog(5000);
  initial begin
    a = 0; b = 0; c = 0; d = 0; acc = 0; restart = 0;
    repeat (2) @(negedge clk); rst = 0;
    for (int i = 0; i < 3000; i++) begin
      a = 12'($urandom); b = 12'($urandom); c = 12'($urandom); d = 12'($urandom);
      if (i < 1500) begin a = 12'sd2047; d = 12'sd2047; b = -12'sd2048; c = -12'sd2048; end
      inc.push_back(int'(a) + int'(d) - int'(b) - int'(c));
      @(negedge clk);
      if (inc.size() >= 3) begin
        acc += inc[inc.size() - 3];
        check(y == 23'(acc), "accumulated trapezoid");
      end
    end
    restart = 1; repeat (3) @(negedge clk);
    check(y == 0, "restart clears the accumulator");
    a = 12'sd100; b = 0; c = 0; d = 0; restart = 0;
    repeat (5) @(negedge clk);
    check(y == 23'sd300, "recursion resumes from zero after restart");
    finish_tb();
  end
endmodule
