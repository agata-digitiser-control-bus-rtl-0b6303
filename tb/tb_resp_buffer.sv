// tb_resp_buffer: fills the buffer with a pseudo-random byte sequence and
// reads every address back against the testbench copy, then overwrites
// part of it and checks again.
`timescale 1ns/1ps
module tb_resp_buffer;
  localparam int D = 64;
  logic clk = 0, wr_en = 0;
  logic [5:0] wr_addr = 0, rd_addr = 0;
  logic [7:0] wr_data = 0, rd_data;
  logic [7:0] model [D];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  resp_buffer #(.DEPTH(D)) dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    @(posedge clk); #1;
    for (int i = 0; i < D; i++) begin
      model[i] = 8'($urandom); wr_addr = 6'(i); wr_data = model[i]; wr_en = 1; @(posedge clk); #1;
    end
    wr_en = 0;
    for (int i = 0; i < D; i++) begin rd_addr = 6'(i); #1; check(rd_data == model[i], $sformatf("byte %0d", i)); end
    for (int i = 0; i < D; i += 3) begin
      model[i] = ~model[i]; wr_addr = 6'(i); wr_data = model[i]; wr_en = 1; @(posedge clk); #1;
    end
    wr_en = 0;
    for (int i = 0; i < D; i++) begin rd_addr = 6'(i); #1; check(rd_data == model[i], $sformatf("byte %0d again", i)); end
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
