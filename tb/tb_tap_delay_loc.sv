// Testbench for the 64-tap local delay (ADDR_W = 6): lengths 2, 17, 63.
module tb_tap_delay_loc;
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
  logic load, status;
  logic [5:0] length;
  logic [15:0] din, dout;
  logic [15:0] hist [$];
  int lens [3] = '{2, 17, 63};
  tap_delay #(.ADDR_W(6), .DATA_W(16)) dut (.clk, .rst, .load, .length, .data_in(din),
                                           .data_out(dout), .status);
  initial watchdog(5000);
  initial begin
    load = 0; length = 0; din = 0;
    repeat (3) @(negedge clk); rst = 0;
    foreach (lens[i]) begin
      @(negedge clk); load = 1; length = 6'(lens[i]); din = 16'($urandom);
      hist.delete(); hist.push_back(din);
      @(negedge clk); load = 0;
      check(status == 0, "status low after load");
      for (int c = 0; c < lens[i] + 100; c++) begin
        if (c == lens[i]) check(status == 1, "status high once filled");
        if (c >= lens[i]) check(dout == hist[hist.size() - lens[i]], "delayed sample");
        din = 16'($urandom); hist.push_back(din);
        @(negedge clk);
      end
    end
    finish_tb();
  end
endmodule
