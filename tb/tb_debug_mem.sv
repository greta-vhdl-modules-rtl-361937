// Testbench for the debug memory: address/data programming with
// auto-increment, acknowledge per request, replay from address 0 while a
// debug flag is set and zero output otherwise.
module tb_debug_mem;
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
  logic [7:0] flags; logic [15:0] pd, dd; logic [5:0] pa; logic pf, ack;
  logic [15:0] ref_mem [8];
  debug_mem dut (.clk, .rst, .debug_flags(flags), .prog_data(pd), .prog_add(pa), .prog_flag(pf),
                 .prog_ack(ack), .debug_data(dd));
  task automatic prog(input logic [5:0] a, input logic [15:0] d);
    int n = 0;
    pa = a; pd = d; pf = 1;
    while (!ack && n < 10) begin @(negedge clk); n++; end
    check(ack, "debug write acknowledged");
    pf = 0; @(negedge clk);
  endtask
  initial watchdog(2000);
  initial begin
    flags = 0; pd = 0; pa = 0; pf = 0;
    repeat (2) @(negedge clk); rst = 0;
    prog(6'h30, 16'd0);
    for (int i = 0; i < 8; i++) begin ref_mem[i] = 16'($urandom); prog(6'h31, ref_mem[i]); end
    check(dd == 0, "output zero while no channel in debug mode");
    flags = 8'h10; @(negedge clk);
    for (int i = 0; i < 8; i++) begin check(dd == ref_mem[i], "replayed sample"); @(negedge clk); end
    flags = 0; @(negedge clk);
    check(dd == 0, "output zero after debug mode");
    prog(6'h30, 16'd3); prog(6'h31, 16'h0BEE);
    flags = 8'h01; repeat (4) @(negedge clk);
    check(dd == 16'h0BEE, "address register selects write position");
    finish_tb();
  end
endmodule
