// Testbench for DACControl: a serial receiver model samples DIN on rising
// SCK while its CS/LD is low and checks the 16-bit word {code, data, 00}
// when CS/LD rises, for both DAC chips and several channels; PROGAck must
// follow the end of each word; other addresses are ignored.
module tb_dac_control;
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
  logic [15:0] pd; logic [6:0] pa; logic pf, ack, din, cs0, cs1, sck;
  logic [15:0] sh0, sh1; int n0, n1; logic [15:0] word [$]; int chip [$];
  dac_control #(.DIV(4)) dut (.clk, .rst, .prog_data(pd), .prog_add(pa), .prog_flag(pf),
    .prog_ack(ack), .dac_din(din), .dac_csld0(cs0), .dac_csld1(cs1), .dac_sck(sck));
  always @(posedge sck) begin
    if (!cs0) begin sh0 = {sh0[14:0], din}; n0++; end
    if (!cs1) begin sh1 = {sh1[14:0], din}; n1++; end
  end
  always @(posedge cs0) if (!rst && n0 > 0) begin word.push_back(n0 == 16 ? sh0 : 16'hDEAD); chip.push_back(0); n0 = 0; end
  always @(posedge cs1) if (!rst && n1 > 0) begin word.push_back(n1 == 16 ? sh1 : 16'hDEAD); chip.push_back(1); n1 = 0; end
  task automatic prog(input logic [6:0] a, input logic [15:0] d, output int waited);
    waited = 0; pa = a; pd = d; pf = 1;
    while (!ack && waited < 2000) begin @(negedge clk); waited++; end
    pf = 0; @(negedge clk);
  endtask
  initial watchdog(20000);
  initial begin
    int w;
    pd = 0; pa = 0; pf = 0; n0 = 0; n1 = 0; sh0 = 0; sh1 = 0;
    repeat (2) @(negedge clk); rst = 0;
    check(cs0 && cs1 && !sck, "idle levels");
    for (int i = 0; i < 6; i++) begin
      logic [6:0] a; logic [15:0] d; logic [3:0] code;
      a = {3'b100, 1'(i % 2), 3'(i)};
      d = 16'($urandom_range(0, 1023));
      code = (i == 0) ? 4'd8 : 4'(i);
      prog(a, d, w);
      check(w < 2000, "DAC write acknowledged");
      check(word.size() == i + 1, "one serial word per write");
      if (word.size() == i + 1) begin
        check(word[i] == {code, d[9:0], 2'b00}, "serial word");
        check(chip[i] == i % 2, "chip select");
      end
    end
    pa = 7'h05; pf = 1; repeat (300) @(negedge clk); pf = 0;
    check(word.size() == 6 && cs0 && cs1, "processing addresses ignored");
    finish_tb();
  end
endmodule
