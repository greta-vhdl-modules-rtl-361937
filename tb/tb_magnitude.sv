// Testbench for the magnitude discriminator: |INPUT| strictly above the
// 5-bit threshold, reset threshold 0x10.
module tb_magnitude;
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
  logic load_th, en;
  logic [4:0] th;
  logic signed [11:0] din;
  int t;
  magnitude dut (.clk, .rst, .load_threshold(load_th), .threshold(th), .data_in(din), .enable(en));
  initial watchdog(5000);
  initial begin
    load_th = 0; th = 0; din = 0;
    repeat (2) @(negedge clk); rst = 0;
    din = 12'sd16; @(negedge clk); check(!en, "16 not above reset threshold");
    din = 12'sd17; @(negedge clk); check(en, "17 above reset threshold");
    din = -12'sd17; @(negedge clk); check(en, "-17 below -16");
    for (int i = 0; i < 1500; i++) begin
      int v;
      if (i % 100 == 0) begin
        load_th = 1; th = 5'($urandom); t = int'(th); @(negedge clk); load_th = 0;
      end
      v = $urandom_range(0, 80) - 40;
      if (i % 10 == 0) v = int'($signed(12'($urandom)));
      din = 12'(v);
      @(negedge clk);
      check(en == ((v > t) || (v < -t)), "magnitude compare");
    end
    finish_tb();
  end
endmodule
