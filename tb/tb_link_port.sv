// tb_link_port: two link_port instances wired back to back (A = Spartan
// end, B = Virtex end). A sends a 24-byte frame while B's consumer reads
// slowly, so B's FRAME output must act as inhibit and A must pause on byte
// boundaries; all bytes must arrive in order. Then B answers with an empty
// frame (Good Write ACK) and with a 3-byte frame, which A must receive, and
// a reply offered by B while A's frame is still open must wait for it.
`timescale 1ns/1ps
module tb_link_port;
  import agata_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic a_tx_valid = 0, a_tx_last = 0, a_tx_ready, a_tx_busy, a_rx_valid, a_rx_eof, a_rx_ready = 1;
  logic b_tx_valid = 0, b_tx_last = 0, b_tx_ready, b_tx_busy, b_rx_valid, b_rx_eof, b_rx_ready = 0;
  logic b_empty = 0;
  logic [7:0] a_tx_data = 0, b_tx_data = 0, a_rx_data, b_rx_data;
  logic a_act, a_inh, a_ovf, a_ferr, b_act, b_inh, b_ovf, b_ferr;
  link_wires_t a2b, b2a;
  int checks = 0, failures = 0;

  link_port a (.clk, .rst_n, .tx_valid(a_tx_valid), .tx_data(a_tx_data), .tx_last(a_tx_last),
    .tx_ready(a_tx_ready), .tx_empty_req(1'b0), .tx_busy(a_tx_busy), .rx_valid(a_rx_valid),
    .rx_data(a_rx_data), .rx_eof(a_rx_eof), .rx_ready(a_rx_ready), .rx_active(a_act),
    .rx_inhibit(a_inh), .rx_overflow(a_ovf), .rx_frame_err(a_ferr), .link_out(a2b), .link_in(b2a));
  link_port b (.clk, .rst_n, .tx_valid(b_tx_valid), .tx_data(b_tx_data), .tx_last(b_tx_last),
    .tx_ready(b_tx_ready), .tx_empty_req(b_empty), .tx_busy(b_tx_busy), .rx_valid(b_rx_valid),
    .rx_data(b_rx_data), .rx_eof(b_rx_eof), .rx_ready(b_rx_ready), .rx_active(b_act),
    .rx_inhibit(b_inh), .rx_overflow(b_ovf), .rx_frame_err(b_ferr), .link_out(b2a), .link_in(a2b));

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [8:0] a_got [$], b_got [$];
  int paused_cycles = 0, ovf = 0, clk_while_inh = 0;
  logic a2b_clk_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (a_rx_valid && a_rx_ready) a_got.push_back({a_rx_eof, a_rx_eof ? 8'h0 : a_rx_data});
    if (b_rx_valid && b_rx_ready) b_got.push_back({b_rx_eof, b_rx_eof ? 8'h0 : b_rx_data});
    if (b_ovf || a_ovf) ovf++;
    if (a_tx_busy && !b2a.frame_n) paused_cycles++;
  end
  always @(posedge clk) b_rx_ready <= ($urandom_range(0, 199) == 0);

  task automatic send_a(input int n);
    #1;
    for (int i = 0; i < n; i++) begin
      a_tx_valid = 1; a_tx_data = 8'(i * 13 + 5); a_tx_last = (i == n - 1);
      do @(negedge clk); while (!a_tx_ready);
      @(posedge clk); #1;
    end
    a_tx_valid = 0;
  endtask

  task automatic send_b(input logic [7:0] q [$]);
    #1;
    foreach (q[i]) begin
      b_tx_valid = 1; b_tx_data = q[i]; b_tx_last = (i == q.size() - 1);
      do @(negedge clk); while (!b_tx_ready);
      @(posedge clk); #1;
    end
    b_tx_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1; repeat (5) @(posedge clk);
    // 1. A -> B, 24 bytes, slow consumer
    send_a(24);
    wait (!a_tx_busy);
    wait (b_got.size() == 25);
    check(b_got.size() == 25 && b_got[24] == 9'h100, "24 bytes + token at B");
    begin
      static bit ok = 1;
      for (int i = 0; i < 24; i++) begin
        logic [7:0] e;
        e = 8'(i * 13 + 5);
        if (b_got[i] != {1'b0, e}) ok = 0;
      end
      check(ok, "bytes in order");
    end
    check(paused_cycles > 100, $sformatf("A was held by B's inhibit (%0d cycles)", paused_cycles));
    check(ovf == 0, "no overflow");
    b_got = {};
    b_rx_ready = 1;
    // 2. B -> A empty frame
    #1 b_empty = 1; @(posedge clk); #1 b_empty = 0;
    wait (a_got.size() == 1); repeat (5) @(posedge clk);
    check(a_got.size() == 1 && a_got[0] == 9'h100, "empty ACK frame at A");
    a_got = {};
    wait (!b_tx_busy);
    // 3. B -> A 3-byte frame
    send_b('{8'hC8, 8'h05, 8'h42});
    wait (a_got.size() == 4);
    check(a_got[0] == 9'h0C8 && a_got[1] == 9'h005 && a_got[2] == 9'h042 && a_got[3] == 9'h100, "reply frame at A");
    a_got = {};
    wait (!b_tx_busy);
    // 4. B offers a reply while A's frame is open: it must wait
    fork
      send_a(2);
      begin
        wait (b_act); repeat (20) @(posedge clk);
        send_b('{8'h99});
      end
    join
    check(b_tx_busy && a_got.size() == 0, "B's frame started after A's");
    wait (a_got.size() == 2);
    check(a_got[0] == 9'h099, "late reply received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
