// End-to-end testbench for the whole chip at default parameters and
// default register values (m = k = 450, raw length 50, sliding 450,
// pile-up window 1024, external window 2047). Only run bits, LED
// thresholds, debug memory and DAC words are programmed. A FIFO model
// collects every word written, splits packets at the 0xAAAAAAAA separator
// and checks each header. Every mechanism below is counted and the test
// fails if any of them never happened:
//   programming ack, DAC serial write, undecoded-address ack, internal
//   positive and negative events (energy = m * step), timestamp against
//   the testbench's own clock count, pile-up drop, external trigger,
//   validated event, validation time-out, debug-memory replay, pile-up
//   flag in a kept packet, FIFO almost-full stall, global trigger.
module tb_greta_chip;
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
  localparam logic [12:0] BID = 13'h0155;
  localparam int M = 450, A = 1000;
  logic synch, pf, ack, paf, wen, wclk, gval, gtrig, busy, din, cs0, cs1, sck;
  logic [11:0] adc [8]; logic [15:0] pd; logic [6:0] pa; logic [9:0] done;
  logic [15:0] status [8]; logic [31:0] fd; logic [7:0] val, trig, evr, ens;
  logic [31:0] cur [$];
  int tick, s_edge, t_step0;
  int m_prog, m_dac, m_other, m_pos, m_neg, m_ts, m_pu_drop, m_ext, m_valid, m_vtimeout;
  int m_debug, m_pu_flag, m_stall, m_gtrig, m_sep, n_pk [8];
  logic [15:0] dac_sh; int dac_n; logic [15:0] dac_words [$];

  greta_chip dut (.clk, .rst, .synch, .board_id(BID), .adc_data(adc), .prog_data(pd),
    .prog_add(pa), .prog_flag(pf), .prog_ack(ack), .prog_done(done), .status_reg(status),
    .fifo_pafneg(paf), .fifo_data(fd), .fifo_wenneg(wen), .fifo_wclk(wclk), .validate(val),
    .global_validate(gval), .led_trigger(trig), .global_trigger(gtrig), .event_read(evr),
    .enable_status(ens), .busy, .dac_din(din), .dac_cs_ld0(cs0), .dac_cs_ld1(cs1), .dac_sck(sck));

  // internal event outcome probes
  logic [7:0] aborts, pileups;
  for (genvar i = 0; i < 8; i++) begin : g_probe
    assign aborts[i]  = dut.u_ec.g_ch[i].u_ch.u_core.event_abort;
    assign pileups[i] = dut.u_ec.g_ch[i].u_ch.u_core.event_pileup;
  end
  always @(posedge clk) if (!rst) begin
    if (aborts[0] && pileups[0]) m_pu_drop++;
    if (aborts[2] && !pileups[2]) m_vtimeout++;
    m_gtrig += int'(gtrig);
  end

  // DAC serial receiver
  always @(posedge sck) if (!cs0 || !cs1) begin dac_sh = {dac_sh[14:0], din}; dac_n++; end
  always @(posedge cs0 or posedge cs1) if (!rst && dac_n > 0) begin
    if (dac_n == 16) dac_words.push_back(dac_sh);
    dac_n = 0;
  end

  // FIFO model and packet checker
  task automatic packet_done();
    logic [15:0] hw [$];
    int ch, sz, e; logic p, c, x, s; longint ts;
    foreach (cur[j]) begin hw.push_back(cur[j][15:0]); hw.push_back(cur[j][31:16]); end
    m_sep++;
    if (hw.size() < 14) begin check(0, "packet too short"); return; end
    ch = int'(hw[0][2:0]); sz = int'(hw[1]);
    check(hw[0][15:3] == BID, "board id");
    check(sz == cur.size() && sz == (12 + 50 + 1) / 2, "packet length matches size word");
    {p, c, x, s} = hw[6][15:12];
    e = int'($signed({hw[6][6:0], hw[5]}));
    ts = longint'({hw[4], hw[3], hw[2]});
    n_pk[ch]++;
    if (ch == 0 && !x && !s && e == M * A) begin
      m_pos++;
      if (m_pos == 1 && ts > longint'(t_step0 - s_edge) && ts < longint'(t_step0 - s_edge + 40)) m_ts++;
    end
    if (ch == 0 && s && e == -M * A) m_neg++;
    if (ch == 1 && x) m_ext++;
    if (ch == 2) m_valid++;
    if (ch == 3) begin m_debug++; if (p) m_pu_flag++; end
    for (int j = 12; j < 62; j++) check(hw[j][15:12] == 0, "raw word is a 12-bit sample");
  endtask
  always @(posedge wclk) begin
    tick++;
    if (!rst && !wen) begin
      if (fd == 32'hAAAA_AAAA) begin packet_done(); cur.delete(); end
      else cur.push_back(fd);
    end
  end

  task automatic prog(input logic [6:0] a, input logic [15:0] d);
    int n = 0;
    pa = a; pd = d; pf = 1;
    while (!ack && n < 3000) begin @(negedge clk); n++; end
    if (ack) m_prog++;
    check(ack, "programming acknowledged");
    pf = 0; @(negedge clk);
  endtask
  task automatic wait_cycles(input int n); repeat (n) @(negedge clk); endtask
  task automatic step(input int ch, input int v, input int hold);
    adc[ch] = 12'(v); wait_cycles(hold);
  endtask

  initial watchdog(80000);
  initial begin
    int a0, st;
    for (int i = 0; i < 8; i++) adc[i] = 0;
    {pd, pa, pf, synch, gval, val} = '0; paf = 1; tick = 0; dac_sh = 0; dac_n = 0;
    {m_prog, m_dac, m_other, m_pos, m_neg, m_ts, m_pu_drop, m_ext, m_valid, m_vtimeout} = '0;
    {m_debug, m_pu_flag, m_stall, m_gtrig, m_sep} = '0;
    foreach (n_pk[i]) n_pk[i] = 0;
    repeat (3) @(negedge clk); rst = 0;
    synch = 1; @(negedge clk); synch = 0; s_edge = tick;
    // debug memory: 0 for the first half, A for the second
    prog(7'h30, 16'd0);
    for (int i = 0; i < 1024; i++) prog(7'h31, (i < 512) ? 16'd0 : 16'(A));
    for (int c = 0; c < 4; c++) prog(7'h10 + 7'(c), 16'd300);
    prog(7'h08, 16'h0C05);                 // ch0 internal, pile-up drop
    prog(7'h09, 16'h0C0D);                 // ch1 external
    prog(7'h0A, 16'h0C15);                 // ch2 validation
    prog(7'h0B, 16'h0C03);                 // ch3 debug, pile-up kept
    check(ens == 8'h0F, "enable status");
    prog(7'h41, 16'h0155); prog(7'h48, 16'h02AA);
    m_dac = (dac_words.size() == 2 && dac_words[0] == {4'd1, 10'h155, 2'b00} &&
             dac_words[1] == {4'd8, 10'h2AA, 2'b00}) ? 1 : 0;
    pa = 7'h50; pd = 0; pf = 1;
    repeat (4) begin @(negedge clk); if (ack) m_other++; end
    pf = 0; @(negedge clk);
    wait_cycles(2100);                     // delays filled
    // internal events with a FIFO stall on the first packet
    paf = 0;
    t_step0 = tick + 1; step(0, A, 10);
    st = 0;
    while (!status[0][15] && st < 3000) begin @(negedge clk); st++; end
    a0 = m_sep;
    wait_cycles(300);
    if (status[0][15] && m_sep == a0) m_stall++;
    paf = 1;
    wait_cycles(2500);
    step(0, 0, 3000);                      // negative event
    // pile-up: second edge while the first event is being processed
    step(0, A, 300); step(0, 0, 3000);
    // external trigger on channel 1
    val[1] = 1; @(negedge clk); val[1] = 0; wait_cycles(3000);
    // validated event on channel 2, then one that times out
    step(2, A, 500); val[2] = 1; @(negedge clk); val[2] = 0; wait_cycles(3000);
    step(2, 0, 5000);
    wait_cycles(2000);
    check(m_prog > 1000, "mechanism: programming handshake");
    check(m_dac == 1, "mechanism: DAC serial words");
    check(m_other == 1, "mechanism: undecoded address acknowledged");
    check(m_pos >= 1, "mechanism: positive internal event, energy m*A");
    check(m_neg >= 1, "mechanism: negative internal event, energy -m*A");
    check(m_ts == 1, "mechanism: LED timestamp against SYNCH");
    check(m_pu_drop >= 1, "mechanism: pile-up drop");
    check(m_ext >= 1, "mechanism: external trigger");
    check(m_valid == 1, "mechanism: validated event kept");
    check(m_vtimeout >= 1, "mechanism: validation time-out");
    check(m_debug >= 1, "mechanism: debug replay packets");
    check(m_pu_flag >= 1, "mechanism: pile-up flag in kept packet");
    check(m_stall == 1, "mechanism: FIFO almost-full stall");
    check(m_gtrig >= 4, "mechanism: global trigger");
    check(n_pk[0] == 2, "channel 0: two kept packets");
    check(n_pk[4] + n_pk[5] + n_pk[6] + n_pk[7] == 0, "stopped channels silent");
    $display("packets per channel %0d %0d %0d %0d", n_pk[0], n_pk[1], n_pk[2], n_pk[3]);
    finish_tb();
  end
endmodule
