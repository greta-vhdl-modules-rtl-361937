// Testbench for the WaitCounter (each done pulse is seen N+1 clock edges
// after the start pulse for a window of N): window lengths for the computation
// (2m+k+8), external, validation and sliding windows, packet address and
// raw point count, size in 32-bit words, raw length clamp and the
// minimum dead-time flag.
module tb_wait_counter;
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
  logic lvw, lew, lm, lk, lrl, lsw, sew, siw, sv, ssw, saw, ae;
  logic [10:0] vw, ew, sw; logic [8:0] m, k; logic [9:0] rl;
  logic [9:0] address; logic raw_add, rsd, ev, mdd, cd; logic [8:0] size;
  wait_counter dut (.clk, .rst, .load_validation_wait(lvw), .validation_wait(vw),
    .load_external_wait(lew), .external_wait(ew), .load_m(lm), .m, .load_k(lk), .k,
    .load_raw_length(lrl), .raw_length(rl), .load_sliding_wait(lsw), .sliding_wait(sw),
    .start_external_wait(sew), .start_internal_wait(siw), .start_validation(sv),
    .start_sliding_wait(ssw), .start_add_wait(saw), .add_enable(ae), .address, .raw_add,
    .raw_sliding_done(rsd), .ext_validation(ev), .min_deadtime_done(mdd),
    .computed_done(cd), .size);
  // cycles from a start pulse until the done pulse is seen
  task automatic time_done(ref logic start, ref logic done, output int n);
    start = 1; @(negedge clk); start = 0; n = 0;
    while (!done && n < 5000) begin @(negedge clk); n++; end
  endtask
  initial watchdog(20000);
  initial begin
    int n, hi;
    {lvw, lew, lm, lk, lrl, lsw, sew, siw, sv, ssw, saw, ae} = '0;
    vw = 0; ew = 0; sw = 0; m = 0; k = 0; rl = 0;
    repeat (2) @(negedge clk); rst = 0;
    check(size == 9'd31 && mdd, "reset size (12+50 words) and idle dead-time flag");
    time_done(siw, cd, n);
    check(n == 2 * 450 + 450 + 8 + 1, "default computation window 2m+k+8");
    m = 9'd3; k = 9'd2; lm = 1; lk = 1; @(negedge clk); lm = 0; lk = 0;
    siw = 1; @(negedge clk); siw = 0;
    check(!mdd, "dead time not done while computing");
    n = 0; while (!cd && n < 100) begin @(negedge clk); n++; end
    check(n == 16 + 1, "programmed computation window");
    ew = 11'd20; lew = 1; @(negedge clk); lew = 0;
    time_done(sew, cd, n); check(n == 20 + 1, "external window");
    sw = 11'd4; lsw = 1; @(negedge clk); lsw = 0;
    time_done(ssw, rsd, n); check(n == 4 + 1, "sliding window");
    vw = 11'd10; lvw = 1; @(negedge clk); lvw = 0;
    sv = 1; @(negedge clk); sv = 0; hi = 0;
    repeat (20) begin if (ev) hi++; check(ev == !mdd || ev == 0, "dead time waits for validation"); @(negedge clk); end
    check(hi == 10, "validation window length");
    rl = 10'd4; lrl = 1; @(negedge clk); lrl = 0;
    check(size == 9'd8, "size (12+4+1)/2");
    saw = 1; @(negedge clk); saw = 0;
    check(address == 0 && raw_add && !mdd, "address cleared, raw points pending");
    n = 0; ae = 1;
    while (raw_add && n < 100) begin @(negedge clk); n++; end
    ae = 0;
    check(n == 16 && address == 10'd16, "12 header + 4 raw words");
    check(mdd, "dead time done after last raw point");
    rl = 10'd1023; lrl = 1; @(negedge clk); lrl = 0;
    check(size == 9'd511, "raw length clamped to 1010");
    finish_tb();
  end
endmodule
