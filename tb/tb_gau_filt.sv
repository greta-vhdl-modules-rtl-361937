// Testbench for the three-point Gaussian filter with 13-bit input:
// y(t) = x(t-2) + 2 x(t-3) + x(t-4) on random and extreme samples.
module tb_gau_filt;
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
  localparam int W = 13;
  logic signed [W-1:0] xn;
  logic signed [W+1:0] yn;
  logic signed [W-1:0] h [$];
  gau_filt #(.IN_W(W)) dut (.clk, .rst, .xn, .yn);
  initial watchdog(3000);
  initial begin
    xn = 0;
    repeat (2) @(negedge clk); rst = 0;
    repeat (4) h.push_back('0);
    for (int i = 0; i < 1000; i++) begin
      int n;
      xn = (i % 50 < 5) ? ((i % 2) ? {1'b0, {(W-1){1'b1}}} : {1'b1, {(W-1){1'b0}}}) : W'($urandom);
      h.push_back(xn);
      @(negedge clk);
      n = h.size() - 1;
      if (i >= 4)
        check(yn == (W+2)'(h[n-1]) + 2 * (W+2)'(h[n-2]) + (W+2)'(h[n-3]), "filter output");
    end
    finish_tb();
  end
endmodule
