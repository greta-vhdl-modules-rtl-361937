// Testbench for the FIFOMachine token ring: channels with ready packets
// are read in token order, each read covers SIZE addresses with a one-hot
// enable, then one separator write and one ack; nothing starts while the
// FIFO is almost full.
module tb_fifo_machine;
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
  logic [7:0] ready, en, ack; logic paf, wen, enable; logic [8:0] size, addr;
  logic [2:0] token, sel;
  int order [$]; int writes, seps;
  int sizes [8] = '{3, 0, 2, 0, 0, 5, 0, 1};
  fifo_machine dut (.clk, .rst, .prebuffer_ready(ready), .fifo_pafneg(paf), .size,
    .prebuffer_address(addr), .prebuffer_enable(en), .prebuffer_ack(ack), .fifo_wenneg(wen),
    .token, .channel_select(sel), .enable);
  assign size = 9'(sizes[token]);
  int last_addr;
  always @(posedge clk) if (!rst) begin
    if (en != 0) begin
      check($onehot(en) && en == (8'b1 << token), "one-hot enable of token channel");
    end
    if (!wen) begin writes++; if (!enable) seps++; end
    for (int i = 0; i < 8; i++) if (ack[i]) begin order.push_back(i); ready[i] <= 1'b0; end
  end
  initial watchdog(3000);
  initial begin
    ready = 0; paf = 1; writes = 0; seps = 0;
    repeat (2) @(negedge clk); rst = 0;
    paf = 0; ready = 8'b1010_0101; repeat (40) @(negedge clk);
    check(writes == 0 && order.size() == 0, "no read while FIFO almost full");
    paf = 1; repeat (60) @(negedge clk);
    check(order.size() == 4, "four packets read");
    if (order.size() == 4) check(order[0] == 0 && order[1] == 2 && order[2] == 5 && order[3] == 7 ||
                                 order[0] == 2 && order[1] == 5 && order[2] == 7 && order[3] == 0 ||
                                 order[0] == 5 && order[1] == 7 && order[2] == 0 && order[3] == 2 ||
                                 order[0] == 7 && order[1] == 0 && order[2] == 2 && order[3] == 5,
                                 "token ring order");
    check(writes == 3 + 2 + 5 + 1 + 4, "data words plus one separator per packet");
    check(seps == 4, "separators");
    finish_tb();
  end
endmodule
