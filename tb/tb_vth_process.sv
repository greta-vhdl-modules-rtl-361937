// Testbench for the LED state machine: trigger on a new crossing only,
// MaxMinb takes SIGN, no retrigger while DISABLED, CLEAR returns to idle.
module tb_vth_process;
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
  logic clear, disabled, crossing, sign, max_minb, active, ts;
  int n_ts;
  vth_process dut (.clk, .rst, .clear, .disabled, .crossing, .sign, .max_minb,
                   .active_event(active), .led_timestamp(ts));
  always @(posedge clk) if (!rst && ts) n_ts++;
  initial watchdog(2000);
  initial begin
    clear = 0; disabled = 0; crossing = 0; sign = 0; n_ts = 0;
    repeat (2) @(negedge clk); rst = 0;
    crossing = 1; sign = 1; @(negedge clk);
    check(ts && active && max_minb, "trigger on new negative crossing");
    disabled = 0; @(negedge clk);
    check(!ts && active, "pulse lasts one cycle, first cycle ignores DISABLED");
    disabled = 1; repeat (5) @(negedge clk);
    check(active, "stays active during noise window");
    disabled = 0; @(negedge clk); @(negedge clk);
    check(!active, "back to idle when window released");
    repeat (5) @(negedge clk);
    check(n_ts == 1, "no retrigger while crossing stays high");
    crossing = 0; @(negedge clk); crossing = 1; sign = 0; @(negedge clk);
    check(ts && !max_minb, "new positive crossing triggers");
    @(negedge clk); clear = 1; @(negedge clk); clear = 0; @(negedge clk);
    check(!active, "clear forces idle");
    crossing = 0; @(negedge clk); clear = 1; crossing = 1; @(negedge clk);
    check(!ts, "no trigger while CLEAR");
    check(n_ts == 2, "two triggers in total");
    finish_tb();
  end
endmodule
