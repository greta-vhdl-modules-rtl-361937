// Testbench for ProcCore: programs a channel, triggers an event and checks
// every packet word written to the pre-buffer against values the
// testbench knows (timestamps from its own cycle count since SYNCH, energy,
// CFD points, raw samples), then checks the ready/ack handshake and the
// pile-up drop.
module tb_proc_core;
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
  localparam logic [12:0] BID = 13'h0ABC; localparam logic [2:0] CH = 3'd5;
  logic synch; logic [15:0] prog_data, prog_q, status; logic [5:0] prog_add;
  logic prog_flag, prog_ack, cfd_ts, cfd_valid, led_ts, led_sign, validate;
  logic lm, lk, la, lth, ltap, llth, llt, rev, latch, sev, ack, ready, pen, clear, dbg, busy, epu, event_abort;
  logic [11:0] raw; logic [22:0] energy; logic [15:0] cfd1, cfd2, pdata; logic [9:0] paddr; logic [8:0] size;
  logic [15:0] mem [1024];
  int tick, s_edge, n_wr, n_abort;
  proc_core dut (.clk, .rst, .synch, .board_id(BID), .channel_id(CH), .prog_data, .prog_add,
    .prog_flag, .prog_ack, .prog_q, .tap_valid(5'h1F), .raw_data(raw), .energy, .cfd1, .cfd2,
    .cfd_timestamp(cfd_ts), .cfd_valid, .led_timestamp(led_ts), .led_sign, .validate,
    .load_m(lm), .load_k(lk), .load_cfd_a(la), .load_cfd_th(lth), .load_cfd_tap(ltap),
    .load_led_th(llth), .load_led_timer(llt), .status_reg(status), .reset_event(rev),
    .latch_timestamp(latch), .sign_event(sev), .prebuffer_ack(ack), .prebuffer_ready(ready),
    .prebuffer_address(paddr), .prebuffer_data(pdata), .size, .prebuffer_en(pen), .clear,
    .debug_mode(dbg), .busy, .event_pileup(epu), .event_abort);
  always @(posedge clk) begin
    tick++;
    if (!rst && pen) begin mem[paddr] = pdata; n_wr++; end
    if (!rst && event_abort) n_abort++;
  end
  assign raw = 12'(tick);
  task automatic prog(input logic [5:0] a, input logic [15:0] d);
    int n = 0;
    prog_add = a; prog_data = d; prog_flag = 1;
    while (!prog_ack && n < 20) begin @(negedge clk); n++; end
    check(prog_ack, "programming acknowledged");
    prog_flag = 0; @(negedge clk);
  endtask
  initial watchdog(10000);
  initial begin
    longint t_led, t_cfd; int n;
    tick = 0; n_wr = 0; n_abort = 0; synch = 0; prog_data = 0; prog_add = 0; prog_flag = 0;
    cfd_ts = 0; cfd_valid = 0; led_ts = 0; led_sign = 0; validate = 0; ack = 0;
    energy = 23'h5A_1234; cfd1 = 16'hFF80; cfd2 = 16'h0040;
    repeat (2) @(negedge clk); rst = 0;
    synch = 1; @(negedge clk); synch = 0; s_edge = tick;
    prog(6'h07, 16'd3); prog(6'h06, 16'd2);
    prog(6'h28 + 6'(CH), 16'd5); prog(6'h20 + 6'(CH), 16'd4);
    prog(6'h03, 16'd40);
    prog(6'h08 + 6'(CH), 16'h0C05);
    check(status[0] && status[2] && !status[15], "status: running, pile-up drop");
    led_ts = 1; led_sign = 1; @(negedge clk); led_ts = 0; t_led = tick - s_edge - 1;
    repeat (3) @(negedge clk);
    cfd_ts = 1; cfd_valid = 1; @(negedge clk); cfd_ts = 0; t_cfd = tick - s_edge - 1;
    n = 0; while (!ready && n < 200) begin @(negedge clk); n++; end
    check(ready && status[15], "pre-buffer ready after packet");
    check(n_wr == 17, "17 words written (12 header + 5 raw)");
    check(mem[0] == {BID, CH}, "word 0 board and channel");
    check(mem[1] == 16'd9, "word 1 size (12+5+1)/2");
    check({mem[4], mem[3], mem[2]} == 48'(t_led), "LED timestamp");
    check(mem[5] == 16'h1234, "energy low");
    check(mem[6] == {1'b0, 1'b1, 1'b0, 1'b1, 5'b0, 7'h5A}, "flags and energy high");
    check({mem[9], mem[8], mem[7]} == 48'(t_cfd), "CFD timestamp");
    check(mem[10] == 16'hFF80 && mem[11] == 16'h0040, "CFD points");
    for (int i = 13; i < 17; i++) check(mem[i] == mem[i-1] + 16'd1 && mem[i][15:12] == 0, "raw samples consecutive");
    @(negedge clk); check(!busy, "channel idle after packet");
    ack = 1; @(negedge clk); ack = 0; @(negedge clk);
    check(!ready, "ack clears ready");
    // pile-up: a second LED trigger 10 cycles before the event
    cfd_valid = 0; n_wr = 0;
    repeat (60) @(negedge clk);
    led_ts = 1; @(negedge clk); led_ts = 0;   // accepted event
    repeat (10) @(negedge clk);
    led_ts = 1; @(negedge clk); led_ts = 0;   // pile-up after it
    n = 0; while (busy && n < 200) begin @(negedge clk); n++; end
    check(n_abort == 1 && n_wr == 0 && !ready, "pile-up event dropped");
    finish_tb();
  end
endmodule
