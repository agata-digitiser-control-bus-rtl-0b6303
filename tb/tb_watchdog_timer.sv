// tb_watchdog_timer: with a 100-cycle time-out, busy held for 99 cycles
// must not fire; busy dropped and raised again restarts the count; busy held
// for good must fire exactly at cycle 100, once per 100 cycles.
`timescale 1ns/1ps
module tb_watchdog_timer;
  logic clk = 0, rst_n = 0, busy = 0, timeout;
  int checks = 0, failures = 0, fires = 0, fire_cycle = -1, cyc = 0;
  always #5 clk = ~clk;

  watchdog_timer #(.TIMEOUT_CYCLES(64'd100)) dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (timeout && rst_n) begin fires++; if (fire_cycle < 0) fire_cycle = cyc; end
  end

  initial begin
    int start;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    busy = 1; repeat (99) @(posedge clk); #1 busy = 0;
    repeat (5) @(posedge clk); #1;
    check(fires == 0, "99 busy cycles do not fire");
    busy = 1; repeat (60) @(posedge clk); #1 busy = 0; @(posedge clk); #1 busy = 1;
    repeat (60) @(posedge clk); #1;
    check(fires == 0, "count restarts when busy drops");
    busy = 0; @(posedge clk); #1;
    start = cyc; busy = 1;
    repeat (250) @(posedge clk); #1;
    check(fires == 2, $sformatf("two time-outs in 250 cycles (%0d)", fires));
    check(fire_cycle - start == 101, $sformatf("first after 100 busy cycles (+1 register) (%0d)", fire_cycle - start));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
