// tb_io_reset_ctrl: two devices share a modelled open-drain line. A request
// at device 0 must pull the line low for exactly the stretch time (50
// cycles here); both devices must hold their I/O reset for that time and
// release it afterwards. A line pulled low from outside must reset device 0
// without it driving the line.
`timescale 1ns/1ps
module tb_io_reset_ctrl;
  logic clk = 0, rst_n = 0, req0 = 0, req1 = 0, ext_low = 0;
  logic drv0, drv1, io0, io1;
  wire line_n = !(drv0 || drv1 || ext_low);
  int checks = 0, failures = 0, low_cycles = 0, io1_low = 0;
  always #5 clk = ~clk;

  io_reset_ctrl #(.STRETCH_CYCLES(50)) d0 (.clk, .rst_n, .req(req0), .line_n, .drive_low(drv0), .io_rst_n(io0));
  io_reset_ctrl #(.STRETCH_CYCLES(50)) d1 (.clk, .rst_n, .req(req1), .line_n, .drive_low(drv1), .io_rst_n(io1));

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (!line_n) low_cycles++;
    if (!io1) io1_low++;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    repeat (5) @(posedge clk); #1;
    check(io0 && io1 && line_n, "idle after reset");
    low_cycles = 0; io1_low = 0;
    req0 = 1; @(posedge clk); #1 req0 = 0;
    repeat (3) @(posedge clk); #1;
    check(!line_n && !io0 && !io1, "line low, both in I/O reset");
    repeat (80) @(posedge clk); #1;
    check(low_cycles == 50, $sformatf("line low for 50 cycles (%0d)", low_cycles));
    check(io1_low >= 50 && io1_low <= 54, $sformatf("device 1 reset for the pulse (%0d)", io1_low));
    check(io0 && io1 && line_n, "released");
    ext_low = 1; repeat (10) @(posedge clk); #1;
    check(!io0 && !drv0, "external low resets device 0, which does not drive");
    ext_low = 0; repeat (5) @(posedge clk); #1;
    check(io0, "released after external pulse");
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
