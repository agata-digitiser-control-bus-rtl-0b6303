// tb_control_spartan: the Core-module controller with three Virtex command
// handlers and its main-board registers around it, plus a testbench model of
// the Segment Spartan on the backplane link. Checked against replies built
// in the testbench: chained simple writes (one Good Write ACK), a read
// (Length N+2, echo, data), a failed write that stops the chain, a failed
// read, a long write, a main-board write/read, a reply held back by the
// host (host_out not ready), and a stream for the Segment module that must
// be forwarded unchanged as one backplane frame with the Segment reply
// relayed back to the host.
`timescale 1ns/1ps
module tb_control_spartan;
  import agata_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic h_in_valid = 0, h_in_ready, h_out_valid, h_out_last, h_out_ready = 0;
  logic [7:0] h_in_data = 0, h_out_data;
  link_wires_t vx_out [3], vx_in [3], bp_out, bp_in;
  logic lr_we, lr_ok, busy;
  logic [7:0] lr_addr;
  logic [15:0] lr_wdata, lr_rdata;
  int checks = 0, failures = 0;

  control_spartan #(.MODULE_SEG(1'b0), .NUM_VIRTEX(3), .FORWARD_EN(1'b1), .RESP_DEPTH(64)) dut (
    .clk, .rst_n, .h_in_valid, .h_in_data, .h_in_ready, .h_out_valid, .h_out_data, .h_out_last,
    .h_out_ready, .vx_out, .vx_in, .bp_out, .bp_in, .lr_we, .lr_addr, .lr_wdata, .lr_rdata, .lr_ok, .busy);

  local_ctrl_regs #(.NUM_REGS(8)) regs (.clk, .rst_n, .we(lr_we), .addr(lr_addr), .wdata(lr_wdata),
    .rdata(lr_rdata), .addr_ok(lr_ok));

  logic       wr_en [3], lw_valid [3], lw_first [3];
  logic [7:0] wr_addr [3], lw_data [3], lw_cmd [3];
  logic [15:0] wr_data [3];
  logic       vbusy [3];
  for (genvar v = 0; v < 3; v++) begin : g_vx
    virtex_cmd_port #(.MODULE_SEG(1'b0), .MY_SM(3'(v)), .NUM_REGS(16)) u_vx (
      .clk, .rst_n, .io_rst_n(rst_n), .link_in(vx_out[v]), .link_out(vx_in[v]),
      .wr_en(wr_en[v]), .wr_addr(wr_addr[v]), .wr_data(wr_data[v]), .lw_valid(lw_valid[v]),
      .lw_data(lw_data[v]), .lw_cmd(lw_cmd[v]), .lw_first(lw_first[v]), .lw_ready(1'b1), .busy(vbusy[v]));
  end

  // Segment Spartan model on the backplane
  logic bp_tx_valid = 0, bp_tx_last = 0, bp_tx_ready, bp_tx_busy, bp_rx_valid, bp_rx_eof;
  logic [7:0] bp_tx_data = 0, bp_rx_data;
  logic bpa, bpi, bpo, bpf;
  link_port seg (.clk, .rst_n, .tx_valid(bp_tx_valid), .tx_data(bp_tx_data), .tx_last(bp_tx_last),
    .tx_ready(bp_tx_ready), .tx_empty_req(1'b0), .tx_busy(bp_tx_busy), .rx_valid(bp_rx_valid),
    .rx_data(bp_rx_data), .rx_eof(bp_rx_eof), .rx_ready(1'b1), .rx_active(bpa), .rx_inhibit(bpi),
    .rx_overflow(bpo), .rx_frame_err(bpf), .link_out(bp_in), .link_in(bp_out));

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [7:0] bp_frame [$];
  int bp_frames = 0, n_wr = 0, n_lw = 0;
  always @(posedge clk) if (rst_n) begin
    if (bp_rx_valid) begin if (bp_rx_eof) bp_frames++; else bp_frame.push_back(bp_rx_data); end
    for (int v = 0; v < 3; v++) begin
      if (wr_en[v]) n_wr++;
      if (lw_valid[v]) n_lw++;
    end
  end

  logic [7:0] reply [$];
  task automatic transact(input logic [7:0] s [$], input logic [7:0] exp [$], input int hold, input string what);
    int c = 0;
    #1;
    foreach (s[i]) begin
      h_in_valid = 1; h_in_data = s[i];
      do @(negedge clk); while (!h_in_ready);
      @(posedge clk); #1;
    end
    h_in_valid = 0;
    reply = {};
    repeat (hold) @(posedge clk); #1;
    h_out_ready = 1;
    forever begin
      @(negedge clk); c++;
      if (h_out_valid) begin
        reply.push_back(h_out_data);
        if (h_out_last) begin @(posedge clk); #1; break; end
      end
      if (c > 100000) break;
    end
    h_out_ready = 0;
    check(reply == exp, $sformatf("%s: %p expected %p", what, reply, exp));
  endtask

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1; repeat (5) @(posedge clk);
    transact('{8'h00, 8'h00, 8'h00, 8'h08, 8'h00, 8'h01, 8'h11, 8'h22, 8'h08, 8'h02, 8'h33, 8'h44},
             '{8'h00, 8'h00, 8'h00, 8'h00}, 0, "chained write");
    check(n_wr == 2, "two register writes");
    transact('{8'h40, 8'h00, 8'h00, 8'h04, 8'h48, 8'h02, 8'h00, 8'h00},
             '{8'h40, 8'h00, 8'h00, 8'h04, 8'h48, 8'h02, 8'h33, 8'h44}, 500, "read, host slow to take it");
    transact('{8'h00, 8'h00, 8'h00, 8'h08, 8'h04, 8'h30, 8'h00, 8'h00, 8'h00, 8'h03, 8'h00, 8'h00},
             '{8'h00, 8'h00, 8'h00, 8'h02, 8'h04, 8'h30}, 0, "failed write stops the chain");
    check(n_wr == 2, "nothing written after the failure");
    transact('{8'h40, 8'h00, 8'h00, 8'h04, 8'h54, 8'h00, 8'h00, 8'h00},
             '{8'h40, 8'h00, 8'h00, 8'h02, 8'h54, 8'h00}, 0, "failed read (reserved SM)");
    transact('{8'h40, 8'h00, 8'h00, 8'h04, 8'h04, 8'h00, 8'h00, 8'h00},
             '{8'h40, 8'h00, 8'h00, 8'h02, 8'h04, 8'h00}, 0, "command bits differ from Destination");
    transact('{8'h20, 8'h00, 8'h00, 8'h08, 8'h24, 8'h03, 8'h01, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06},
             '{8'h20, 8'h00, 8'h00, 8'h00}, 0, "long write (document example)");
    check(n_lw == 6, $sformatf("six long-write bytes (%0d)", n_lw));
    transact('{8'h00, 8'h00, 8'h00, 8'h04, 8'h0C, 8'h05, 8'hCA, 8'hFE},
             '{8'h00, 8'h00, 8'h00, 8'h00}, 0, "main board write");
    transact('{8'h40, 8'h00, 8'h00, 8'h04, 8'h4C, 8'h05, 8'h00, 8'h00},
             '{8'h40, 8'h00, 8'h00, 8'h04, 8'h4C, 8'h05, 8'hCA, 8'hFE}, 0, "main board read");
    // forwarded stream: the model answers with a canned read reply
    fork
      transact('{8'hC0, 8'h00, 8'h00, 8'h04, 8'hC8, 8'h05, 8'h00, 8'h00},
               '{8'hC0, 8'h00, 8'h00, 8'h04, 8'hC8, 8'h05, 8'h12, 8'h34}, 0, "forwarded read");
      begin
        logic [7:0] r [$];
        wait (bp_frames == 1);
        r = '{8'hC0, 8'h00, 8'h00, 8'h04, 8'hC8, 8'h05, 8'h00, 8'h00};
        check(bp_frame == r, "stream forwarded unchanged");
        r = '{8'hC0, 8'h00, 8'h00, 8'h04, 8'hC8, 8'h05, 8'h12, 8'h34};
        repeat (200) @(posedge clk); #1;
        foreach (r[i]) begin
          bp_tx_valid = 1; bp_tx_data = r[i]; bp_tx_last = (i == r.size() - 1);
          do @(negedge clk); while (!bp_tx_ready);
          @(posedge clk); #1;
        end
        bp_tx_valid = 0;
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
