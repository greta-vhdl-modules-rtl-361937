// End-to-end testbench for the CFD. A reference model computes the 16-bit
// filtered signal g, the CFD signal -2^a g(n-L) + g(n) truncated to 16 bits
// and the magnitude enable; the CFD must report exactly one crossing per
// event with the model's two points, for fractions a = 0 and a = 1.
module tb_cfd;
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
  localparam int N = 400, L = 6;
  logic clear, load_th, load_a, load_tap, tap_status, valid, ts;
  logic [4:0] th; logic [1:0] a; logic [5:0] tapl;
  logic signed [11:0] xn, xk;
  logic signed [15:0] one, two;
  int x [N]; int g16 [N]; int cur [N]; int en [N];
  cfd dut (.clk, .rst, .clear, .load_threshold(load_th), .threshold(th), .load_a, .a,
           .load_tap_length(load_tap), .tap_length(tapl), .xn, .xn_k(xk), .cfd_one(one),
           .cfd_two(two), .tap_status, .cfd_valid(valid), .cfd_timestamp(ts));
  function automatic int rnd(input int v, input int s, input int w);
    int r = (v + (1 << (s - 1))) >>> s;
    int mx = (1 << (w - 1)) - 1;
    return (r > mx) ? mx : (r < -mx - 1) ? -mx - 1 : r;
  endfunction
  function automatic int at(ref int q [N], input int i);
    return (i < 0) ? 0 : q[i];
  endfunction
  task automatic model(input int sh);
    int g1 [N]; int g2 [N];
    for (int i = 0; i < N; i++) g1[i] = at(x, i) + 2 * at(x, i - 1) + at(x, i - 2);
    for (int i = 0; i < N; i++) g2[i] = at(g1, i) + 2 * at(g1, i - 1) + at(g1, i - 2);
    for (int i = 0; i < N; i++) g16[i] = rnd(g2[i], 1, 16);
    for (int i = 0; i < N; i++) begin
      int g12 = rnd(g16[i], 4, 12);
      cur[i] = (g16[i] - (at(g16, i - L) <<< sh)) >>> 4;
      en[i] = (g12 > 16 || g12 < -16);
    end
  endtask
  initial watchdog(3000);
  initial begin
    clear = 0; load_th = 0; load_a = 0; load_tap = 0; th = 0; a = 0; tapl = 0; xn = 0; xk = 0;
    repeat (2) @(negedge clk); rst = 0;
    load_tap = 1; tapl = 6'(L); @(negedge clk); load_tap = 0;
    for (int s = 0; s < 2; s++) begin
      int exp_n, seen;
      load_a = 1; a = 2'(s); @(negedge clk); load_a = 0;
      for (int i = 0; i < N; i++) x[i] = (i >= 100 && i < 140) ? 400 + 10 * (i - 100) : 0;
      model(s);
      exp_n = -1;
      for (int i = 1; i < N; i++)
        if (exp_n < 0 && en[i] && (cur[i] < 0) != (cur[i-1] < 0)) exp_n = i;
      check(exp_n > 0, "reference finds a crossing");
      clear = 1; repeat (30) @(negedge clk); clear = 0;
      check(tap_status, "tap delay filled");
      seen = 0;
      for (int i = 0; i < N; i++) begin
        xn = 12'(x[i]); @(negedge clk);
        if (ts) begin
          seen++;
          $display("i=%0d exp_n=%0d one=%0d two=%0d m1=%0d m0=%0d p=%0d", i, exp_n, one, two, cur[exp_n-1], cur[exp_n], cur[exp_n+1]);
          check(int'(one) == cur[exp_n - 1] && int'(two) == cur[exp_n], "CFD points");
        end
      end
      check(seen == 1, "one CFD timestamp per event");
      check(valid, "CFD valid held until clear");
    end
    finish_tb();
  end
endmodule
