// Testbench for the threshold crossing: random samples and thresholds,
// strict comparison against +VTH and -VTH, edge values included.
module tb_vth_cross;
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
  logic load_vth, sign, crossing;
  logic [14:0] vth;
  logic signed [15:0] din;
  vth_cross dut (.clk, .rst, .load_vth, .vth, .data_in(din), .sign, .crossing);
  initial watchdog(5000);
  initial begin
    load_vth = 0; vth = 0; din = 0;
    repeat (2) @(negedge clk); rst = 0;
    din = 16'sh7FFF; @(negedge clk);
    check(crossing == 0, "reset threshold 0x7FFF never crossed");
    for (int i = 0; i < 2000; i++) begin
      int t, v;
      if (i % 100 == 0) begin
        load_vth = 1; vth = 15'($urandom_range(0, 2000)); @(negedge clk); load_vth = 0;
      end
      t = int'(vth);
      case (i % 4)
        0: v = t; 1: v = t + 1; 2: v = -t; default: v = -t - 1;
      endcase
      if (i % 8 >= 4) v = $urandom_range(0, 8000) - 4000;
      din = 16'(v);
      @(negedge clk);
      check(crossing == ((v > t) || (v < -t)), "crossing");
      check(sign == (v < 0), "sign");
    end
    finish_tb();
  end
endmodule
