// Testbench for the eight-channel processing block: broadcast programming
// with the PROGDone/PROGAck handshake, channels 0 and 5 triggered by ADC
// steps, both packets read out through the token ring into the FIFO with
// separators; global trigger and event read strobes observed.
module tb_eight_channel;
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
  localparam logic [12:0] BID = 13'h0042;
  logic [11:0] adc [8]; logic [15:0] status [8]; logic [15:0] pd; logic [5:0] pa;
  logic pf, ack, synch, gval, paf, wen, gtrig, busy; logic [8:0] done; logic [7:0] val, trig, evr;
  logic [31:0] fd; logic [31:0] got [$]; int n_gtrig, n_evr;
  eight_channel dut (.clk, .rst, .adc_data(adc), .status_reg(status), .prog_data(pd), .prog_add(pa),
    .prog_flag(pf), .prog_ack(ack), .prog_done(done), .synch, .board_id(BID), .validate(val),
    .global_validate(gval), .fifo_pafneg(paf), .fifo_data(fd), .fifo_wenneg(wen),
    .led_trigger(trig), .global_trigger(gtrig), .event_read(evr), .busy);
  always @(posedge clk) if (!rst) begin
    if (!wen) got.push_back(fd);
    n_gtrig += int'(gtrig); n_evr += int'(evr != 0);
  end
  task automatic prog(input logic [5:0] a, input logic [15:0] d);
    int n = 0;
    pa = a; pd = d; pf = 1;
    while (!ack && n < 20) begin @(negedge clk); n++; end
    check(ack && done == 9'h1FF, "all nine blocks acknowledged");
    pf = 0; @(negedge clk);
  endtask
  initial watchdog(40000);
  initial begin
    int p, npk; int chs [$];
    for (int i = 0; i < 8; i++) adc[i] = 12'd50;
    pd = 0; pa = 0; pf = 0; synch = 0; gval = 0; val = 0; paf = 1; n_gtrig = 0; n_evr = 0;
    repeat (2) @(negedge clk); rst = 0;
    prog(6'h07, 16'd16); prog(6'h06, 16'd8); prog(6'h03, 16'd20);
    for (int c = 0; c < 8; c++) prog(6'h28 + 6'(c), 16'd4);
    for (int c = 0; c < 8; c++) prog(6'h10 + 6'(c), 16'd400);
    prog(6'h08, 16'h0C05); prog(6'h0D, 16'h0C05);
    check(status[0][0] && status[5][0] && !status[3][0], "only channels 0 and 5 running");
    repeat (2100) @(negedge clk);
    adc[0] = 12'd450; repeat (7) @(negedge clk); adc[5] = 12'd850;
    repeat (600) @(negedge clk);
    check(n_gtrig >= 2, "global trigger pulses");
    check(n_evr > 0, "event read strobes");
    // parse: word0 = {size, board, channel}, then size-1 words, then separator
    p = 0; npk = 0;
    while (p < got.size()) begin
      int sz;
      sz = int'(got[p][24:16]);
      chs.push_back(int'(got[p][2:0]));
      check(got[p][15:3] == BID, "board id in packet");
      check(sz == (12 + 4 + 1) / 2, "packet size");
      p += sz;
      check(p < got.size() && got[p] == 32'hAAAA_AAAA, "separator after packet");
      p++; npk++;
    end
    check(npk == 2 && chs.size() == 2 && chs[0] == 0 && chs[1] == 5, "two packets, channels 0 then 5");
    check(!busy, "all channels idle");
    finish_tb();
  end
endmodule
