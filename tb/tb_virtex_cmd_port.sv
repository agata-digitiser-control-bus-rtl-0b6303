// tb_virtex_cmd_port: the testbench plays the Control Spartan through a
// link_port and checks every reply form of the Virtex command handler:
// simple write (register strobe, empty ACK frame), read (command echo then
// data, high byte first), multi-word read, long write (data passed to the
// lw_* stream in order, held back by the link inhibit while the sink is
// slow, empty ACK), and the failed ACK (Command 0/1 only) for a wrong SM
// code, a register out of range, a short frame, an over-long simple frame
// and an odd long write. An I/O reset must leave the registers unchanged.
`timescale 1ns/1ps
module tb_virtex_cmd_port;
  import agata_pkg::*;
  logic clk = 0, rst_n = 0, io_rst_n = 0;
  always #5 clk = ~clk;

  link_wires_t s2v, v2s;
  logic wr_en, lw_valid, lw_first, lw_ready = 1, busy;
  logic [7:0] wr_addr, lw_data, lw_cmd;
  logic [15:0] wr_data;
  logic tx_valid = 0, tx_last = 0, tx_ready, tx_busy, rx_valid, rx_eof, rx_act, rx_inh, rx_ovf, rx_ferr;
  logic [7:0] tx_data = 0, rx_data;
  int checks = 0, failures = 0;

  virtex_cmd_port #(.MODULE_SEG(1'b1), .MY_SM(3'd2), .NUM_REGS(32)) dut (
    .clk, .rst_n, .io_rst_n, .link_in(s2v), .link_out(v2s),
    .wr_en, .wr_addr, .wr_data, .lw_valid, .lw_data, .lw_cmd, .lw_first, .lw_ready, .busy);

  link_port spartan (.clk, .rst_n(io_rst_n), .tx_valid, .tx_data, .tx_last, .tx_ready,
    .tx_empty_req(1'b0), .tx_busy, .rx_valid, .rx_data, .rx_eof, .rx_ready(1'b1),
    .rx_active(rx_act), .rx_inhibit(rx_inh), .rx_overflow(rx_ovf), .rx_frame_err(rx_ferr),
    .link_out(s2v), .link_in(v2s));

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [7:0] reply [$];
  bit reply_done = 0;
  logic [7:0] lw_got [$];
  int n_wr = 0, n_inh = 0, lw_first_cnt = 0;
  logic [7:0] last_wr_addr; logic [15:0] last_wr_data;
  always @(posedge clk) if (rst_n) begin
    if (rx_valid) begin
      if (rx_eof) reply_done = 1; else reply.push_back(rx_data);
    end
    if (wr_en) begin n_wr++; last_wr_addr = wr_addr; last_wr_data = wr_data; end
    if (lw_valid && lw_ready) begin lw_got.push_back(lw_data); if (lw_first) lw_first_cnt++; end
    if (tx_busy && !v2s.frame_n) n_inh++;
  end

  task automatic request(input logic [7:0] q [$], input logic [7:0] exp [$], input string what);
    reply = {}; reply_done = 0;
    #1;
    foreach (q[i]) begin
      tx_valid = 1; tx_data = q[i]; tx_last = (i == q.size() - 1);
      do @(negedge clk); while (!tx_ready);
      @(posedge clk); #1;
    end
    tx_valid = 0;
    wait (reply_done); @(posedge clk);
    check(reply == exp, $sformatf("%s: %p expected %p", what, reply, exp));
  endtask

  initial begin
    logic [7:0] lw [$];
    repeat (3) @(posedge clk); #1 rst_n = 1; io_rst_n = 1; repeat (5) @(posedge clk);
    // Segment module (bit 7 = 1), SM = 2: Command 0 = 1000_1000 (write) / 1100_1000 (read)
    request('{8'h88, 8'h05, 8'hAB, 8'hCD}, '{}, "simple write");
    check(n_wr == 1 && last_wr_addr == 8'h05 && last_wr_data == 16'hABCD, "write strobe");
    request('{8'h88, 8'h06, 8'h12, 8'h34}, '{}, "simple write 2");
    request('{8'hC8, 8'h05, 8'h00, 8'h00}, '{8'hC8, 8'h05, 8'hAB, 8'hCD}, "read (document example 0xC8 0x05)");
    request('{8'hC8, 8'h05, 8'h00, 8'h01}, '{8'hC8, 8'h05, 8'hAB, 8'hCD, 8'h12, 8'h34}, "two-word read");
    request('{8'h8C, 8'h05, 8'h00, 8'h00}, '{8'h8C, 8'h05}, "wrong SM fails");
    request('{8'h88, 8'h40, 8'h00, 8'h00}, '{8'h88, 8'h40}, "register out of range fails");
    request('{8'h88, 8'h05, 8'h00}, '{8'h88, 8'h05}, "short frame fails");
    request('{8'h88, 8'h05, 8'h00, 8'h00, 8'h00}, '{8'h88, 8'h05}, "long simple frame fails");
    request('{8'h08, 8'h05, 8'h00, 8'h00}, '{8'h08, 8'h05}, "wrong module fails");
    check(n_wr == 2, "failed commands write nothing");
    // long write with a slow sink
    lw = {8'hA8, 8'h03};
    for (int i = 0; i < 30; i++) lw.push_back(8'(i + 100));
    fork
      request(lw, '{}, "long write");
      while (!reply_done) begin @(posedge clk); lw_ready <= ($urandom_range(0, 199) == 0); end
    join
    @(posedge clk); #1 lw_ready = 1;
    check(lw_got.size() == 30, $sformatf("30 long-write bytes (%0d)", lw_got.size()));
    begin bit ok = 1; foreach (lw_got[i]) if (lw_got[i] != 8'(i + 100)) ok = 0; check(ok, "long-write bytes in order"); end
    check(lw_first_cnt == 1, "one first byte marked");
    check(n_inh > 0, "inhibit held the Spartan");
    request('{8'hA8, 8'h03, 8'h01}, '{8'hA8, 8'h03}, "odd long write fails");
    // I/O reset keeps the registers
    #1 io_rst_n = 0; repeat (5) @(posedge clk); #1 io_rst_n = 1; repeat (5) @(posedge clk);
    request('{8'hC8, 8'h06, 8'h00, 8'h00}, '{8'hC8, 8'h06, 8'h12, 8'h34}, "register kept over I/O reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
