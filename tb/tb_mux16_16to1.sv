// Testbench for the registered 16:1 multiplexer with enable.
module tb_mux16_16to1;
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
  logic en;
  logic [3:0] sel;
  logic [15:0] ins [16];
  logic [15:0] q;
  mux16_16to1 dut (.clk, .rst, .enable(en), .sel, .inputs(ins), .data_out(q));
  initial watchdog(3000);
  initial begin
    en = 0; sel = 0; foreach (ins[i]) ins[i] = 0;
    repeat (2) @(negedge clk); rst = 0;
    for (int i = 0; i < 500; i++) begin
      logic [15:0] exp;
      foreach (ins[j]) ins[j] = 16'($urandom) | 16'h1;
      sel = 4'($urandom); en = (i % 7 != 0);
      exp = en ? ins[sel] : 16'h0;
      @(negedge clk);
      check(q == exp, "selected word");
    end
    finish_tb();
  end
endmodule
