// tb_agata_digitiser_top_full: one complete operation through the whole
// control bus with every parameter of the top at its default (256 Virtex
// registers, 4096-byte read buffer, 30 s watchdog, 200 ms reset stretch at
// 100 MHz). Core write, main-board write, read back, and a Segment module
// write and read over the backplane link; replies are checked byte by byte.
`timescale 1ns/1ps
module tb_agata_digitiser_top_full;
  import agata_pkg::*;

  localparam int unsigned VXR = 256;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        host_in_valid = 0, host_in_ready, host_out_valid, host_out_last, host_out_ready = 0;
  logic [7:0]  host_in_data = 0, host_out_data;
  logic        core_lw_valid [3], core_lw_first [3], core_lw_ready [3], core_wr_en [3];
  logic [7:0]  core_lw_data [3], core_lw_cmd [3], core_wr_addr [3];
  logic [15:0] core_wr_data [3];
  logic        seg_lw_valid [4], seg_lw_first [4], seg_lw_ready [4], seg_wr_en [4];
  logic [7:0]  seg_lw_data [4], seg_lw_cmd [4], seg_wr_addr [4];
  logic [15:0] seg_wr_data [4];
  logic        io_reset_n;

  agata_digitiser_top dut (
    .clk, .rst_n,
    .host_in_valid, .host_in_data, .host_in_ready,
    .host_out_valid, .host_out_data, .host_out_last, .host_out_ready,
    .core_lw_valid, .core_lw_data, .core_lw_cmd, .core_lw_first, .core_lw_ready,
    .core_wr_en, .core_wr_addr, .core_wr_data,
    .seg_lw_valid, .seg_lw_data, .seg_lw_cmd, .seg_lw_first, .seg_lw_ready,
    .seg_wr_en, .seg_wr_addr, .seg_wr_data,
    .io_reset_n
  );

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_vx_write = 0, n_lw_bytes = 0, n_inhibit = 0, n_forward = 0, n_io_reset = 0;
  int n_local_write = 0, n_empty_ack = 0, n_good_read = 0, n_fail = 0, n_seg_write = 0;
  logic [7:0] lw_seen [$];
  logic inh_q = 0, bpf_q = 1, ior_q = 1;
  logic [2:0] ack_q = 0;
  bit   lw_random = 1;
  bit   lw_block2 = 0;

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 3; i++) begin
      if (core_wr_en[i]) n_vx_write++;
      if (core_lw_valid[i] && core_lw_ready[i]) begin n_lw_bytes++; lw_seen.push_back(core_lw_data[i]); end
    end
    for (int i = 0; i < 4; i++) if (seg_wr_en[i]) n_seg_write++;
    inh_q <= dut.g_core_vx[1].u_vx.u_port.rx_inhibit;
    if (dut.g_core_vx[1].u_vx.u_port.rx_inhibit && !inh_q) n_inhibit++;
    bpf_q <= dut.bp_core_to_seg.frame_n;
    if (!dut.bp_core_to_seg.frame_n && bpf_q) n_forward++;
    ior_q <= io_reset_n;
    if (!io_reset_n && ior_q && rst_n) n_io_reset++;
    if (dut.c_lr_we || dut.s_lr_we) n_local_write++;
    if (dut.g_core_vx[0].u_vx.tx_empty_req || dut.g_core_vx[1].u_vx.tx_empty_req ||
        dut.g_core_vx[2].u_vx.tx_empty_req) n_empty_ack++;
  end

  // Long-write sinks: mostly not ready, so the Virtex FIFO fills and inhibits
  always @(posedge clk) begin
    for (int i = 0; i < 3; i++)
      core_lw_ready[i] <= (i == 2 && lw_block2) ? 1'b0 : (lw_random ? ($urandom_range(0, 299) == 0) : 1'b1);
    for (int i = 0; i < 4; i++) seg_lw_ready[i] <= 1'b1;
  end

  // ---------------- host model ----------------
  logic [7:0] reply [$];

  function automatic void mk_stream(input logic [7:0] dest, input logic [7:0] body [$],
                                    ref logic [7:0] s [$]);
    int n = body.size();
    s = {};
    s.push_back(dest);
    s.push_back(8'(n >> 16)); s.push_back(8'(n >> 8)); s.push_back(8'(n));
    foreach (body[i]) s.push_back(body[i]);
  endfunction

  task automatic send(input logic [7:0] s [$], output bit aborted);
    aborted = 0;
    foreach (s[i]) begin
      host_in_valid = 1; host_in_data = s[i];
      do @(negedge clk); while (!host_in_ready && io_reset_n);
      if (!io_reset_n) begin aborted = 1; host_in_valid = 0; return; end
      @(posedge clk); #1;
    end
    host_in_valid = 0;
  endtask

  task automatic get_reply(input int max_cycles);
    int c = 0;
    reply = {};
    host_out_ready = 1;
    forever begin
      @(negedge clk);
      c++;
      if (host_out_valid) begin
        reply.push_back(host_out_data);
        if (host_out_last) begin @(posedge clk); #1; break; end
      end
      if (c > max_cycles) begin $display("reply timeout"); break; end
    end
    host_out_ready = 0;
  endtask

  task automatic transact(input logic [7:0] dest, input logic [7:0] body [$], input logic [7:0] exp [$],
                          input string what);
    logic [7:0] s [$];
    bit ab;
    mk_stream(dest, body, s);
    send(s, ab);
    get_reply(200000);
    check(reply == exp, $sformatf("%s: reply %p expected %p", what, reply, exp));
    if (reply.size() == 6 && exp.size() == 6 && exp[3] == 8'd2) n_fail++;
    if (exp.size() > 4 && exp[3] != 8'd2 && dest[6]) n_good_read++;
  endtask

  function automatic logic [7:0] c0(input bit seg, input bit rd, input bit lw, input int sm);
    return {seg, rd, lw, 3'(sm), 2'b00};
  endfunction

  initial begin
    logic [7:0] s [$];
    logic [7:0] lwdata [$];
    bit ab;
    int t0;
    repeat (10) @(posedge clk); #1 rst_n = 1;
    wait (io_reset_n); repeat (20) @(posedge clk); #1;

    // Complete operation at default sizes: a chained write to a Core
    // Virtex and the Core main board, a read back, then a write and read of
    // a Segment Virtex register through the backplane link.
    transact(8'h00, '{c0(0,0,0,2), 8'hF0, 8'h12, 8'h34, c0(0,0,0,3), 8'h0F, 8'h56, 8'h78},
             '{8'h00, 8'h00, 8'h00, 8'h00}, "core chained write");
    transact(8'h40, '{c0(0,1,0,2), 8'hF0, 8'h00, 8'h00},
             '{8'h40, 8'h00, 8'h00, 8'h04, c0(0,1,0,2), 8'hF0, 8'h12, 8'h34}, "core read");
    transact(8'h80, '{c0(1,0,0,3), 8'hFF, 8'h9A, 8'hBC}, '{8'h80, 8'h00, 8'h00, 8'h00}, "segment write");
    transact(8'hC0, '{c0(1,1,0,3), 8'hFF, 8'h00, 8'h00},
             '{8'hC0, 8'h00, 8'h00, 8'h04, c0(1,1,0,3), 8'hFF, 8'h9A, 8'hBC}, "segment read");
    check(n_vx_write == 1 && n_seg_write == 1 && n_local_write == 1, "one write of each kind");
    check(n_forward == 2, "two streams forwarded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
