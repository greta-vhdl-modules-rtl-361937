// Testbench for ENERGY: taps built from a sample history (m = 7, k = 4);
// MAX must equal the extremum of the reference trapezoid after CLEAR, for a
// positive pulse (max search) and a negative one (min search).
module tb_energy;
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
  localparam int M = 7, K = 4;
  logic signed [11:0] a0, a1, a2, a3;
  logic clear, sign;
  logic signed [22:0] mx;
  int h [$];
  int y, ext;
  energy dut (.clk, .rst, .xn(a0), .xn_m(a1), .xn_m_k(a2), .xn_2m_k(a3), .restart(1'b0), .clear, .sign, .max(mx));
  function automatic int hx(input int back);
    return (h.size() - 1 - back < 0) ? 0 : h[h.size() - 1 - back];
  endfunction
  initial watchdog(3000);
  initial begin
    a0 = 0; a1 = 0; a2 = 0; a3 = 0; clear = 0; sign = 0;
    repeat (2) @(negedge clk); rst = 0;
    for (int s = 0; s < 2; s++) begin
      clear = 1; sign = 1'(s); @(negedge clk); clear = 0;
      y = 0; ext = 0;
      for (int i = 0; i < 120; i++) begin
        int v;
        v = (i >= 10 && i < 60) ? (s ? -300 : 300) + int'($urandom_range(0, 20)) : 0;
        h.push_back(v);
        a0 = 12'(hx(0)); a1 = 12'(hx(M)); a2 = 12'(hx(M + K)); a3 = 12'(hx(2 * M + K));
        y += hx(0) + hx(2 * M + K) - hx(M) - hx(M + K);
        if (s == 0 && y > ext) ext = y;
        if (s == 1 && y < ext) ext = y;
        @(negedge clk);
      end
      repeat (6) @(negedge clk);
      check(int'(mx) == ext, s ? "minimum of trapezoid" : "maximum of trapezoid");
      $display("ext=%0d mx=%0d", ext, mx); check(s ? ext < -1000 : ext > 1000, "pulse produced a real extremum");
    end
    finish_tb();
  end
endmodule
