// Testbench for one CHANNEL: programs short filters (m = 20, k = 10), a
// raw length of 6 and an LED threshold, applies a 400-count step to the
// ADC and reads the packet back from the pre-buffer: header, size, energy
// (trapezoid flat top m*A = 8000), flags, raw samples; then a negative
// step and a debug-mode event replayed from DEBUG_DATA.
module tb_channel;
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
  localparam logic [12:0] BID = 13'h1234; localparam logic [2:0] CH = 3'd3;
  logic synch, pf, ack, val, trig, busy, pb_ack, ready, dbg;
  logic [15:0] pd, status, dd; logic [5:0] pa; logic [11:0] adc;
  logic [8:0] rd_addr, size; logic [31:0] rd_data; logic [15:0] w [64];
  channel dut (.clk, .rst, .synch, .board_id(BID), .channel_id(CH), .prog_data(pd), .prog_add(pa),
    .prog_flag(pf), .prog_ack(ack), .adc_data(adc), .debug_data(dd), .validate(val), .rd_addr,
    .rd_data, .led_trigger(trig), .busy, .status_reg(status), .prebuffer_ack(pb_ack),
    .prebuffer_ready(ready), .size, .debug_mode(dbg));
  task automatic prog(input logic [5:0] a, input logic [15:0] d);
    int n = 0;
    pa = a; pd = d; pf = 1;
    while (!ack && n < 20) begin @(negedge clk); n++; end
    check(ack, "programming acknowledged");
    pf = 0; @(negedge clk);
  endtask
  task automatic read_packet();
    int n = 0;
    while (!ready && n < 2000) begin @(negedge clk); n++; end
    check(ready, "packet ready");
    for (int i = 0; i < 16; i++) begin
      rd_addr = 9'(i); @(negedge clk); @(negedge clk);
      {w[2*i+1], w[2*i]} = rd_data;
    end
    pb_ack = 1; @(negedge clk); pb_ack = 0; @(negedge clk);
    check(!ready, "ready cleared by ack");
  endtask
  initial watchdog(40000);
  initial begin
    synch = 0; pf = 0; pd = 0; pa = 0; adc = 100; dd = 0; val = 0; rd_addr = 0; pb_ack = 0;
    repeat (2) @(negedge clk); rst = 0;
    prog(6'h07, 16'd20); prog(6'h06, 16'd10);
    prog(6'h28 + 6'(CH), 16'd6); prog(6'h20 + 6'(CH), 16'd2);
    prog(6'h10 + 6'(CH), 16'd300);
    prog(6'h03, 16'd40);
    prog(6'h18 + 6'(CH), 16'h0310);   // CFD delay 6, a = 0, threshold 16
    prog(6'h08 + 6'(CH), 16'h0C05);
    repeat (100) @(negedge clk);
    check(status[9] == 1'b0, "delays not reported valid before the fill time");
    repeat (2000) @(negedge clk);
    check(status[9:5] == 5'h1F, "tap delays valid");
    adc = 500; repeat (400) @(negedge clk);
    read_packet();
    check(w[0] == {BID, CH} && w[1] == 16'd9, "header id and size");
    check({w[6][6:0], w[5]} == 23'd8000, "energy = m * step");
    check(w[6][15] == 0 && w[6][14] == 1 && w[6][13] == 0 && w[6][12] == 0, "flags P=0 C=1 E=0 S=0");
    for (int i = 12; i < 18; i++) check(w[i] == 16'd100 || w[i] == 16'd500, "raw samples from ADC");
    check(w[17] == 16'd500, "raw window reaches the step");
    adc = 100; repeat (400) @(negedge clk);
    read_packet();
    check(w[6][12] == 1 && $signed({w[6][6:0], w[5]}) == -23'sd8000, "negative event: sign flag, minimum");
    // debug mode: replay a step from DEBUG_DATA
    dd = 16'd100;
    prog(6'h08 + 6'(CH), 16'h0C07);
    check(dbg, "debug mode on");
    repeat (200) @(negedge clk);
    adc = 2000; dd = 16'd700; repeat (400) @(negedge clk);
    read_packet();
    check({w[6][6:0], w[5]} == 23'd12000, "debug event energy from DEBUG_DATA");
    finish_tb();
  end
endmodule

