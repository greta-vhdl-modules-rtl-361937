// Testbench for the PacketMachine: 12 header words in order, sliding wait,
// raw words, pre-buffer ready/ack, drop on busy pre-buffer, pile-up and
// stop, and the validation mode (validated or timed out).
module tb_packet_machine;
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
  logic [1:0] mode; logic en, pu, epu, ack, rsd, ev, cd, raw_add, validate, latch;
  logic ae, ssw, saw, ready, men, rev, event_abort; greta_pkg::mux_sel_t sel;
  int sels [$]; int n_rev, n_abort;
  packet_machine dut (.clk, .rst, .trig_mode(mode), .enable(en), .pileup(pu), .event_pileup(epu),
    .prebuffer_ack(ack), .raw_sliding_done(rsd), .ext_validation(ev), .computed_done(cd),
    .raw_add, .validate, .latch_timestamp(latch), .add_enable(ae), .start_sliding_wait(ssw),
    .start_add_wait(saw), .prebuffer_ready(ready), .mux_select(sel), .mux_enable(men),
    .reset_event(rev), .event_abort);
  always @(posedge clk) if (!rst) begin
    if (men) sels.push_back(int'(sel));
    n_rev += int'(rev); n_abort += int'(event_abort);
  end
  // one event: computed done, sliding wait of 3, 4 raw words
  task automatic run_event();
    int n = 0;
    sels.delete();
    cd = 1; @(negedge clk); cd = 0;
    while (!ssw && n < 50) begin @(negedge clk); n++; end
    @(negedge clk); repeat (3) @(negedge clk);
    rsd = 1; raw_add = 1; @(negedge clk); rsd = 0;
    repeat (4) @(negedge clk); raw_add = 0;
    repeat (3) @(negedge clk);
  endtask
  initial watchdog(5000);
  initial begin
    int r0, a0;
    mode = 0; en = 1; pu = 1; epu = 0; ack = 0; rsd = 0; ev = 0; cd = 0; raw_add = 0;
    validate = 0; latch = 0; n_rev = 0; n_abort = 0;
    repeat (2) @(negedge clk); rst = 0;
    run_event();
    check(sels.size() == 16, "12 header + 4 raw words written");
    for (int i = 0; i < 12 && i < sels.size(); i++) check(sels[i] == i, "header word order");
    for (int i = 12; i < sels.size(); i++) check(sels[i] == 12, "raw word select");
    check(ready && n_rev == 1 && n_abort == 0, "packet complete, pre-buffer ready");
    r0 = n_rev; run_event();
    check(sels.size() == 0 && n_abort == 1 && n_rev == r0 + 1, "dropped while pre-buffer full");
    ack = 1; @(negedge clk); ack = 0;
    check(!ready, "ack frees the pre-buffer");
    epu = 1; run_event(); epu = 0;
    check(sels.size() == 0 && n_abort == 2, "pile-up event dropped");
    pu = 0; epu = 1; run_event(); epu = 0;
    check(sels.size() == 16 && ready, "pile-up kept when drop-out disabled");
    ack = 1; @(negedge clk); ack = 0;
    en = 0; run_event(); en = 1;
    check(sels.size() == 0 && n_abort == 3, "stopped channel drops");
    mode = 2'b10;
    latch = 1; @(negedge clk); latch = 0;
    ev = 1; run_event();
    check(!ready, "validation mode waits for VALIDATE");
    validate = 1; @(negedge clk); validate = 0; @(negedge clk); @(negedge clk);
    check(ready && n_abort == 3, "validated packet kept");
    ack = 1; @(negedge clk); ack = 0;
    latch = 1; @(negedge clk); latch = 0;
    a0 = n_abort; run_event(); ev = 0; repeat (3) @(negedge clk);
    check(!ready && n_abort == a0 + 1, "validation window expired: packet aborted");
    finish_tb();
  end
endmodule
