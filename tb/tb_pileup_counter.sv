// Testbench for the PileupCounter: the three cases of the document (trigger
// before the event inside the window, clean event, trigger after the event
// inside the window) plus a trigger after the window has closed.
module tb_pileup_counter;
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
  logic lw, sp, se, pe; logic [10:0] w;
  pileup_counter dut (.clk, .rst, .load_pileup_wait(lw), .pileup_wait(w), .start_pileup(sp),
                      .start_event(se), .pileup_event(pe));
  task automatic idle(input int n); repeat (n) @(negedge clk); endtask
  task automatic event_with_trigger(); sp = 1; se = 1; @(negedge clk); sp = 0; se = 0; endtask
  task automatic trig(); sp = 1; @(negedge clk); sp = 0; endtask
  initial watchdog(5000);
  initial begin
    lw = 0; sp = 0; se = 0; w = 0;
    repeat (2) @(negedge clk); rst = 0;
    w = 11'd50; lw = 1; @(negedge clk); lw = 0;
    event_with_trigger();
    check(!pe, "first event after reset is clean");
    idle(100); event_with_trigger();
    check(!pe, "clean event: previous trigger outside window");
    idle(20); trig();
    check(pe, "trigger after the event inside window");
    idle(100); event_with_trigger();
    check(!pe, "flag cleared by next event");
    idle(100); trig(); idle(30); event_with_trigger();
    check(pe, "trigger before the event inside window");
    idle(100); event_with_trigger(); idle(60); trig();
    check(!pe, "trigger after window closed");
    finish_tb();
  end
endmodule
