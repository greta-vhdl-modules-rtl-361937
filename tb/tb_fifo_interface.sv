// Testbench for the FIFOInterface: eight model pre-buffers (registered
// reads returning {channel, address}) are emptied into the FIFO; every
// packet word must arrive in order followed by the 0xAAAAAAAA separator,
// and the ack must clear the channel's ready flag.
module tb_fifo_interface;
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
  logic [31:0] data_ch [8]; logic [8:0] size_ch [8]; logic [8:0] addr;
  logic [7:0] en, ack, ready; logic paf, wen; logic [31:0] fd;
  logic [31:0] got [$];
  fifo_interface dut (.clk, .rst, .data_ch, .size_ch, .prebuffer_address(addr),
    .prebuffer_enable(en), .prebuffer_ack(ack), .prebuffer_ready(ready), .fifo_pafneg(paf),
    .fifo_data(fd), .fifo_wenneg(wen));
  for (genvar i = 0; i < 8; i++) begin : g_pb
    always @(posedge clk) if (en[i]) data_ch[i] <= {8'(i), 15'd0, addr};
    assign size_ch[i] = 9'(i + 1);
  end
  always @(posedge clk) if (!rst) begin
    if (!wen) got.push_back(fd);
    for (int i = 0; i < 8; i++) if (ack[i]) ready[i] <= 1'b0;
  end
  initial watchdog(3000);
  initial begin
    int p;
    paf = 1; ready = 0;
    for (int i = 0; i < 8; i++) data_ch[i] = 0;
    repeat (2) @(negedge clk); rst = 0;
    ready = 8'b0100_1010; repeat (60) @(negedge clk);
    check(ready == 0, "all ready channels acknowledged");
    check(got.size() == 2 + 4 + 7 + 3, "words written");
    p = 0;
    for (int c = 0; c < 8; c++) if (c == 1 || c == 3 || c == 6) begin
      for (int a = 0; a <= c; a++) begin
        check(p < got.size() && got[p] == {8'(c), 15'd0, 9'(a)}, "packet word");
        p++;
      end
      check(p < got.size() && got[p] == 32'hAAAA_AAAA, "separator after packet");
      p++;
    end
    finish_tb();
  end
endmodule
