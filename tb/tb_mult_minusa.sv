// Testbench for MULTMinusa: OUTPUT = -(2^a) * INPUT, one cycle, all 'a'.
module tb_mult_minusa;
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
  logic load_a;
  logic [1:0] a;
  logic signed [15:0] din;
  logic signed [18:0] dout;
  mult_minusa dut (.clk, .rst, .load_a, .a, .data_in(din), .data_out(dout));
  initial watchdog(5000);
  initial begin
    load_a = 0; a = 0; din = 0;
    repeat (2) @(negedge clk); rst = 0;
    for (int s = 0; s < 4; s++) begin
      load_a = 1; a = 2'(s); @(negedge clk); load_a = 0;
      for (int i = 0; i < 300; i++) begin
        int v;
        v = (i == 0) ? 32767 : (i == 1 && s < 3) ? -32768 : int'($signed(16'($urandom)));
        din = 16'(v);
        @(negedge clk);
        check(int'(dout) == -(v * (1 << s)), "negated multiple");
      end
    end
    finish_tb();
  end
endmodule
