// tb_local_ctrl_regs: writes a pattern to every register, reads it back
// against a testbench copy, checks that out-of-range addresses report
// addr_ok = 0, read as zero and write nothing, and that reset clears.
`timescale 1ns/1ps
module tb_local_ctrl_regs;
  logic clk = 0, rst_n = 0, we = 0, addr_ok;
  logic [7:0] addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [16];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  local_ctrl_regs #(.NUM_REGS(16)) dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 16; i++) begin addr = 8'(i); #1; check(rdata == 0, "reset value"); end
    for (int i = 0; i < 16; i++) begin
      model[i] = 16'($urandom);
      addr = 8'(i); wdata = model[i]; we = 1; @(posedge clk); #1; we = 0;
    end
    addr = 8'd16; wdata = 16'hFFFF; we = 1; @(posedge clk); #1; we = 0;
    check(!addr_ok && rdata == 0, "address 16 does not exist");
    for (int i = 0; i < 16; i++) begin
      addr = 8'(i); #1;
      check(addr_ok && rdata == model[i], $sformatf("reg %0d", i));
    end
    addr = 8'hFF; #1; check(!addr_ok, "address 255 does not exist");
    rst_n = 0; #1; rst_n = 1; addr = 3; #1;
    check(rdata == 0, "cleared by reset");
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
