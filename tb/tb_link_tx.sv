// tb_link_tx: self-checking test of link_tx.
// A behavioural receiver in the testbench samples DATA on every CLOCK rising
// edge inside FRAME (MSB first) and rebuilds the bytes. Checked: byte values
// and frame boundaries, the 10 MHz bit period (10 system cycles), the
// FRAME-to-first-clock lead (>= 15 cycles = 150 ns), that no clock edge
// falls while the return FRAME (inhibit) is low, that a paused transfer
// resumes, and the empty ACK frame (FRAME low, no clocks).
`timescale 1ns/1ps
module tb_link_tx;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic s_valid, s_last, s_ready, empty_req, inhibit_n, busy, frame_n, link_clk, link_data;
  logic [7:0] s_data;
  int checks = 0, failures = 0;

  link_tx dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Receiver model
  logic [7:0] rx_bytes [$];
  logic [7:0] sh; int nb = 0;
  int cyc = 0, frame_fall = -1, first_rise = -1, last_rise = -1, min_period = 1000;
  int rises_while_inhibited = 0, frames = 0, frame_clocks = 0, last_frame_len = 0;
  logic clk_q = 0, frm_q = 1;
  always @(posedge clk) begin
    cyc++;
    clk_q <= link_clk; frm_q <= frame_n;
    if (rst_n && frm_q && !frame_n) begin frame_fall = cyc; first_rise = -1; nb = 0; frame_clocks = 0; end
    if (!frm_q && frame_n && frame_fall >= 0) begin frames++; last_frame_len = cyc - frame_fall; end
    if (link_clk && !clk_q) begin
      check(!frame_n, "clock edge outside FRAME");
      frame_clocks++;
      if (first_rise < 0) first_rise = cyc;
      else if (cyc - last_rise < min_period) min_period = cyc - last_rise;
      last_rise = cyc;
      if (!inhibit_n) rises_while_inhibited++;
      sh = {sh[6:0], link_data};
      nb++;
      if (nb == 8) begin rx_bytes.push_back(sh); nb = 0; end
    end
  end

  task automatic send(input logic [7:0] b[$], input int gap_after_first);
    #1;
    for (int i = 0; i < b.size(); i++) begin
      s_valid = 1; s_data = b[i]; s_last = (i == b.size()-1);
      do @(negedge clk); while (!s_ready);
      @(posedge clk); #1;
      s_valid = 0;
      if (i == 0) repeat (gap_after_first) @(posedge clk);
    end
  endtask

  initial begin
    s_valid = 0; s_last = 0; s_data = 0; empty_req = 0; inhibit_n = 1;
    repeat (5) @(posedge clk); rst_n = 1; repeat (5) @(posedge clk);

    // 1. plain 4-byte frame (Simple Write command 0x24 0x03 0x12 0x34)
    send('{8'h24, 8'h03, 8'h12, 8'h34}, 0);
    wait (!busy); @(posedge clk);
    check(rx_bytes.size() == 4, $sformatf("4 bytes received (%0d: %p) clocks %0d", rx_bytes.size(), rx_bytes, frame_clocks));
    if (rx_bytes.size() == 4) begin
      check(rx_bytes[0] == 8'h24 && rx_bytes[1] == 8'h03 && rx_bytes[2] == 8'h12 && rx_bytes[3] == 8'h34,
            "byte values");
    end
    check(first_rise - frame_fall >= 15, $sformatf("lead %0d >= 15 cycles", first_rise - frame_fall));
    check(min_period == 10, $sformatf("bit period %0d == 10 cycles (10 MHz)", min_period));
    check(frame_clocks == 32, "32 clock edges for 4 bytes");
    // whole frame: lead 15 + 32 bits * 10 + tail 15 => about 350 cycles
    check(last_frame_len >= 345 && last_frame_len <= 360, $sformatf("frame length %0d cycles", last_frame_len));
    rx_bytes.delete();

    // 2. inhibit after byte 0: receiver pulls return FRAME low during byte 0
    fork
      send('{8'hA5, 8'h5A, 8'hC3}, 0);
      begin
        wait (frame_clocks == 3);
        inhibit_n <= 0;
        repeat (300) @(posedge clk);
        check(frame_clocks == 8, $sformatf("transfer held after byte 0 (%0d edges)", frame_clocks));
        inhibit_n <= 1;
      end
    join
    wait (!busy); @(posedge clk);
    check(rises_while_inhibited == 5, $sformatf("only the current byte finished while inhibited (%0d)", rises_while_inhibited));
    check(rx_bytes.size() == 3 && rx_bytes[0] == 8'hA5 && rx_bytes[1] == 8'h5A && rx_bytes[2] == 8'hC3,
          "bytes after pause");
    rx_bytes.delete();

    // 3. empty frame (Good Write ACK)
    frame_clocks = 0;
    #1 empty_req = 1; @(posedge clk); #1 empty_req = 0;
    wait (!busy); @(posedge clk);
    check(frame_clocks == 0, "empty frame has no clock");
    check(last_frame_len >= 30 && last_frame_len <= 32, $sformatf("empty frame length %0d", last_frame_len));
    check(frames == 3, $sformatf("three frames (%0d)", frames));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
