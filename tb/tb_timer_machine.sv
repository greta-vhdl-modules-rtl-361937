// Testbench for the TimerMachine: programming handshake and register
// decode for channel 2, trigger acceptance in internal, external and
// validation modes, polarity filter, tap-valid gating, busy until the
// event ends and the dead time is over.
module tb_timer_machine;
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
  logic [15:0] prog_data, prog_q, status; logic [5:0] prog_add; logic prog_flag, prog_ack;
  logic [4:0] tap_valid; logic led_ts, validate, led_sign, pb_ready;
  logic latch, sign_event, ext_event, lvw, lpw, lew, lm, lk, lrl, lsw, la, lth, ltap, llth, llt;
  logic sew, siw, sv, mdd, event_abort, done, clear, pdrop, dbg, run, busy; logic [1:0] mode;
  int n_latch, n_lm;
  timer_machine dut (.clk, .rst, .channel_id(3'd2), .prog_data, .prog_add, .prog_flag, .prog_ack,
    .prog_q, .tap_valid, .led_timestamp(led_ts), .validate, .led_sign, .prebuffer_ready(pb_ready),
    .latch_timestamp(latch), .sign_event, .ext_event, .load_validation_wait(lvw),
    .load_pileup_wait(lpw), .load_external_wait(lew), .load_m(lm), .load_k(lk),
    .load_raw_length(lrl), .load_sliding_wait(lsw), .load_cfd_a(la), .load_cfd_th(lth),
    .load_cfd_tap(ltap), .load_led_th(llth), .load_led_timer(llt), .status_reg(status),
    .start_external_wait(sew), .start_internal_wait(siw), .start_validation(sv),
    .min_deadtime_done(mdd), .event_abort, .event_done(done), .clear, .trig_mode(mode),
    .run_enable(run), .pileup_drop(pdrop), .debug_mode(dbg), .busy);
  always @(posedge clk) if (!rst) begin n_latch += int'(latch); n_lm += int'(lm); end
  task automatic prog(input logic [5:0] a, input logic [15:0] d);
    int n = 0;
    prog_add = a; prog_data = d; prog_flag = 1;
    while (!prog_ack && n < 20) begin @(negedge clk); n++; end
    check(prog_ack && prog_q == d, "programming acknowledged with data");
    prog_flag = 0; @(negedge clk);
  endtask
  task automatic pulse_led(input logic s);
    led_ts = 1; led_sign = s; @(negedge clk); led_ts = 0;
  endtask
  task automatic finish_event();
    repeat (3) @(negedge clk);
    done = 1; @(negedge clk); done = 0; @(negedge clk);
    check(!busy, "idle after event done with dead time over");
  endtask
  initial watchdog(5000);
  initial begin
    int l0;
    prog_data = 0; prog_add = 0; prog_flag = 0; tap_valid = '1; led_ts = 0; validate = 0;
    led_sign = 0; pb_ready = 0; mdd = 1; event_abort = 0; done = 0; n_latch = 0; n_lm = 0;
    repeat (2) @(negedge clk); rst = 0; @(negedge clk);
    check(clear && !run && pdrop && status[11:10] == 2'b11, "reset control values");
    pulse_led(0); @(negedge clk);
    check(n_latch == 0, "no trigger while stopped");
    prog(6'h07, 16'd33);
    check(n_lm == 1, "INTEG_M address loads m");
    prog(6'h09, 16'h0C05);
    check(!run, "control register of another channel ignored");
    prog(6'h0A, 16'h0C05);
    check(run && pdrop && mode == 2'b00 && status[0], "control register of own channel");
    @(negedge clk); check(!clear, "clear released while running");
    tap_valid = 5'b01111; pulse_led(0); @(negedge clk);
    check(n_latch == 0, "no trigger until tap delays are valid");
    tap_valid = '1; pulse_led(1); @(negedge clk);
    check(n_latch == 1 && busy && sign_event && !ext_event, "internal trigger accepted");
    l0 = n_latch; pulse_led(0); @(negedge clk);
    check(n_latch == l0, "trigger ignored while busy");
    mdd = 0; done = 1; @(negedge clk); done = 0; repeat (3) @(negedge clk);
    check(busy, "busy until minimum dead time");
    mdd = 1; @(negedge clk); @(negedge clk);
    check(!busy, "idle after dead time");
    prog(6'h0A, 16'h0405);   // polarity 01: positive only
    pulse_led(1); @(negedge clk);
    check(n_latch == 1, "negative trigger filtered by polarity");
    pulse_led(0); @(negedge clk);
    check(n_latch == 2, "positive trigger accepted");
    finish_event();
    prog(6'h0A, 16'h0C0D);   // external mode
    pulse_led(0); @(negedge clk);
    check(n_latch == 2, "LED ignored in external mode");
    validate = 1; @(negedge clk); validate = 0; @(negedge clk);
    check(n_latch == 3 && ext_event && busy, "external trigger on VALIDATE");
    event_abort = 1; @(negedge clk); event_abort = 0; @(negedge clk); @(negedge clk);
    check(!busy, "abort ends the event");
    prog(6'h0A, 16'h0C15);   // validation mode
    led_ts = 1; led_sign = 0; @(negedge clk); led_ts = 0;
    check(siw && sv && !sew, "validation mode starts internal and validation windows");
    finish_event();
    prog(6'h0A, 16'h0C00);
    @(negedge clk); @(negedge clk);
    check(clear && !run, "stop raises clear");
    finish_tb();
  end
endmodule
