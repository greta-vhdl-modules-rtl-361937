// Testbench for the pre-buffer: 16-bit writes, 32-bit reads.
module tb_prebuffer;
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
  logic we;
  logic [9:0] wa;
  logic [15:0] wd;
  logic [8:0] ra;
  logic [31:0] rd;
  logic [15:0] model [1024];
  prebuffer dut (.clk, .we, .waddr(wa), .wdata(wd), .raddr(ra), .rdata(rd));
  initial watchdog(6000);
  initial begin
    we = 0; wa = 0; wd = 0; ra = 0; rst = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); we = 1; wa = 10'(i); wd = 16'($urandom); model[i] = wd;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 512; i++) begin
      ra = 9'(i); @(negedge clk);
      check(rd == {model[2*i+1], model[2*i]}, "long word");
    end
    finish_tb();
  end
endmodule
