// Testbench for COMPARE: strict greater (SIGN=0) / less (SIGN=1).
module tb_compare;
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
  logic signed [22:0] i1, i2;
  logic sign, upd;
  compare dut (.input1(i1), .input2(i2), .sign, .update(upd));
  initial watchdog(5000);
  initial begin
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      i1 = 23'($urandom); i2 = (i % 5 == 0) ? i1 : 23'($urandom); sign = 1'($urandom);
      if (i == 1) begin i1 = 23'h3FFFFF; i2 = 23'h400000; end
      #1;
      check(upd == (sign ? (i1 < i2) : (i1 > i2)), "compare");
    end
    finish_tb();
  end
endmodule
