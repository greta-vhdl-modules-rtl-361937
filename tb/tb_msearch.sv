// Testbench for the extremum search: max and min tracking after CLEAR.
module tb_msearch;
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
  logic signed [22:0] xn, mx;
  logic clear, sign;
  int ref_v, s;
  msearch dut (.clk, .rst, .xn, .clear, .sign, .max(mx));
  initial watchdog(8000);
  initial begin
    xn = 0; clear = 0; sign = 0;
    repeat (2) @(negedge clk); rst = 0;
    for (int r = 0; r < 10; r++) begin
      s = r % 2;
      clear = 1; sign = 1'(s); xn = 23'($urandom); @(negedge clk); clear = 0;
      check(mx == 0, "cleared");
      ref_v = 0;
      for (int i = 0; i < 300; i++) begin
        xn = 23'($urandom_range(0, 200000) - 100000);
        @(negedge clk);
        if (s == 0 && int'(xn) > ref_v) ref_v = int'(xn);
        if (s == 1 && int'(xn) < ref_v) ref_v = int'(xn);
        check(int'(mx) == ref_v, s ? "minimum" : "maximum");
      end
    end
    finish_tb();
  end
endmodule
