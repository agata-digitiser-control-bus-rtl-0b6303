// tb_link_rx: self-checking test of link_rx. The testbench drives the link
// wires itself at 10 MHz (FRAME low, DATA changed while CLOCK low, MSB
// first) and checks: bytes and end-of-frame tokens, an empty frame arriving
// as a lone token, clock pulses outside FRAME being ignored, the inhibit
// rising when the consumer stops reading (and falling again), an overflow
// flag when a sender ignores it, a frame error on a partial byte, and that
// nothing is received while enable is low.
`timescale 1ns/1ps
module tb_link_rx;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic enable = 1, frame_n = 1, link_clk = 0, link_data = 0;
  logic m_valid, m_eof, m_ready = 1, inhibit, active, overflow, frame_err;
  logic [7:0] m_data;
  int checks = 0, failures = 0;

  link_rx #(.FIFO_DEPTH(8)) dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // consumer log
  logic [8:0] got [$];
  int n_ovf = 0, n_ferr = 0, n_inh_rise = 0;
  logic inh_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (m_valid && m_ready) got.push_back({m_eof, m_eof ? 8'h00 : m_data});
    if (overflow) n_ovf++;
    if (frame_err) n_ferr++;
    inh_q <= inhibit;
    if (inhibit && !inh_q) n_inh_rise++;
  end

  task automatic cycles(input int n); repeat (n) @(posedge clk); #1; endtask

  task automatic bits(input logic [7:0] b, input int nbits);
    for (int i = 7; i > 7 - nbits; i--) begin
      link_data = b[i]; cycles(5); link_clk = 1; cycles(5); link_clk = 0;
    end
  endtask

  task automatic frame(input logic [7:0] q [$], input int partial_bits);
    frame_n = 0; cycles(10);
    foreach (q[i]) bits(q[i], 8);
    if (partial_bits > 0) bits(8'hFF, partial_bits);
    cycles(15); frame_n = 1; cycles(20);
  endtask

  initial begin
    cycles(3); rst_n = 1; cycles(5);
    // 1. normal frame + stray clocks outside FRAME
    link_clk = 1; cycles(5); link_clk = 0; cycles(5);
    frame('{8'hC8, 8'h05, 8'h00, 8'h01}, 0);
    check(got.size() == 5, $sformatf("4 bytes and a token (%0d)", got.size()));
    if (got.size() == 5)
      check(got[0] == 9'h0C8 && got[1] == 9'h005 && got[2] == 9'h000 && got[3] == 9'h001 && got[4] == 9'h100,
            $sformatf("contents %p", got));
    got = {};
    // 2. empty frame
    frame('{}, 0);
    check(got.size() == 1 && got[0] == 9'h100, "empty frame gives a lone token");
    got = {};
    // 3. consumer stalls: inhibit must rise once FIFO has 5 entries
    m_ready = 0;
    fork
      frame('{8'h01, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06, 8'h07}, 0);
      begin
        wait (dut.count == 4); cycles(3);
        check(!inhibit, "no inhibit at 4 entries");
        wait (dut.count == 5); cycles(2);
        check(inhibit, "inhibit at 5 entries");
      end
    join
    check(n_ovf == 0, "no overflow with 7 bytes + token in 8 places");
    check(!inhibit, "inhibit released after the frame");
    m_ready = 1; cycles(10);
    check(got.size() == 8 && got[6] == 9'h007 && got[7] == 9'h100, "stalled frame delivered");
    got = {};
    // 4. overflow: 9 bytes into a stalled FIFO
    m_ready = 0;
    frame('{8'h11, 8'h12, 8'h13, 8'h14, 8'h15, 8'h16, 8'h17, 8'h18, 8'h19}, 0);
    check(n_ovf >= 1, "overflow flagged");
    m_ready = 1; cycles(10); got = {};
    // 5. partial byte
    frame('{8'hAA}, 3);
    check(n_ferr == 1, "frame error on 3 stray bits");
    check(got.size() == 2 && got[0] == 9'h0AA, "whole byte kept");
    got = {};
    // 6. disabled
    enable = 0;
    frame('{8'h55}, 0);
    check(got.size() == 0, "nothing while disabled");
    enable = 1;
    frame('{8'h5A}, 0);
    check(got.size() == 2 && got[0] == 9'h05A, "enabled again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
