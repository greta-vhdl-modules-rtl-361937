// End-to-end testbench for the LED chain. A reference model of the filter
// chain (difference, four 1-2-1 stages, round-half-up to 13 then 16 bits)
// predicts the first sample whose filtered value is beyond +/-VTH; the LED
// must pulse 10 cycles after that sample, with the right sign, ignore a
// pulse inside the noise window and a pulse below threshold.
module tb_led;
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
  localparam int N = 700, LAT = 10, VTH = 1000;
  logic clear, load_vth, load_noise, active, max_minb, ts;
  logic [14:0] vth;
  logic [6:0] win;
  logic signed [11:0] xn, xk;
  int x [N];
  int r16 [N];
  int got [$];
  int got_sign [$];
  led dut (.clk, .rst, .clear, .xn, .xn_k(xk), .load_vth, .vth, .load_noise, .win_noise(win),
           .active_event(active), .max_minb, .led_timestamp(ts));

  function automatic int rnd(input int v, input int s, input int w);
    int r = (v + (1 << (s - 1))) >>> s;
    int mx = (1 << (w - 1)) - 1;
    return (r > mx) ? mx : (r < -mx - 1) ? -mx - 1 : r;
  endfunction
  function automatic int at(ref int a [N], input int i);
    return (i < 0) ? 0 : a[i];
  endfunction
  task automatic model();
    int d [N]; int g1 [N]; int g2 [N]; int r13 [N]; int g3 [N]; int g4 [N];
    for (int i = 0; i < N; i++) d[i] = x[i];
    for (int i = 0; i < N; i++) g1[i] = at(d, i) + 2 * at(d, i - 1) + at(d, i - 2);
    for (int i = 0; i < N; i++) g2[i] = at(g1, i) + 2 * at(g1, i - 1) + at(g1, i - 2);
    for (int i = 0; i < N; i++) r13[i] = rnd(g2[i], 4, 13);
    for (int i = 0; i < N; i++) g3[i] = at(r13, i) + 2 * at(r13, i - 1) + at(r13, i - 2);
    for (int i = 0; i < N; i++) g4[i] = at(g3, i) + 2 * at(g3, i - 1) + at(g3, i - 2);
    for (int i = 0; i < N; i++) r16[i] = rnd(g4[i], 1, 16);
  endtask
  function automatic int first_cross(input int from, input int to);
    for (int i = from; i < to; i++) if (r16[i] > VTH || r16[i] < -VTH) return i;
    return -1;
  endfunction

  initial watchdog(3000);
  initial begin
    int e1, e2;
    clear = 0; load_vth = 0; load_noise = 0; vth = 0; win = 0; xn = 0; xk = 0;
    for (int i = 0; i < N; i++) begin
      x[i] = 0;
      if (i >= 50 && i < 70)   x[i] = 500;    // positive pulse: trigger
      if (i >= 90 && i < 105)  x[i] = 500;    // inside noise window: ignored
      if (i >= 300 && i < 320) x[i] = -500;   // negative pulse: trigger
      if (i >= 500 && i < 520) x[i] = 100;    // below threshold
    end
    model();
    e1 = first_cross(0, 200); e2 = first_cross(200, 400);
    check(first_cross(400, N) == -1, "reference: small pulse stays below threshold");
    repeat (2) @(negedge clk); rst = 0;
    load_vth = 1; vth = 15'(VTH); @(negedge clk); load_vth = 0;
    for (int i = 0; i < N; i++) begin
      xn = 12'(x[i]); xk = 12'sd0;
      @(negedge clk);
      if (ts) begin got.push_back(i); got_sign.push_back(int'(max_minb)); end
    end
    check(got.size() == 2, "exactly two LED triggers");
    if (got.size() == 2) begin
      check(got[0] == e1 + LAT, "first trigger latency");
      check(got[1] == e2 + LAT, "second trigger latency");
      check(got_sign[0] == 0 && got_sign[1] == 1, "trigger signs");
    end
    finish_tb();
  end
endmodule
