// tb_agata_workloads: the transfer sizes the control bus is meant for, run
// through the whole box with every parameter at its default (10 MHz links,
// 256 Virtex registers, 4096-byte read buffer).
//   1. EEPROM-style long write of 600 data bytes (Length 602) to the Core
//      Virtex of segment card 1, whose sink takes a byte only now and then:
//      every byte must arrive in order, the Virtex must pause the Spartan
//      with its inhibit, the host gets a Good Write reply, and the transfer
//      cannot beat the 10 MHz link rate (80 system cycles per byte).
//   2. A 200-byte long write to Segment card 4, forwarded over the backplane
//      link and then on to the Segment Virtex.
//   3. 32 chained simple writes in one stream (Length 128), then one read of
//      all 256 registers of that Virtex (qualifier 255): the reply carries
//      Length 514 and 512 data bytes through the read buffer.
//   4. The same full read of Segment card 4, forwarded over the backplane,
//      with a host that takes reply bytes slowly: the Core Spartan must
//      pause the Segment Spartan's reply with its inhibit (flow control in
//      the read direction).
// Expected data are generated here from the byte index.
`timescale 1ns/1ps
module tb_agata_workloads;
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
  logic [7:0] seg_seen [$];
  int cyc = 0;
  bit slow_reader = 0;
  int n_bp_inhibit = 0;
  logic bpi_q = 0;
  always @(posedge clk) cyc++;
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
    if (seg_lw_valid[3] && seg_lw_ready[3]) seg_seen.push_back(seg_lw_data[3]);
    bpi_q <= dut.u_core_spartan.g_port[3].u_port.rx_inhibit;
    if (dut.u_core_spartan.g_port[3].u_port.rx_inhibit && !bpi_q) n_bp_inhibit++;
    inh_q <= dut.g_core_vx[0].u_vx.u_port.rx_inhibit;
    if (dut.g_core_vx[0].u_vx.u_port.rx_inhibit && !inh_q) n_inhibit++;
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
      core_lw_ready[i] <= (i == 2 && lw_block2) ? 1'b0 : (lw_random ? ($urandom_range(0, 149) == 0) : 1'b1);
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
      if (slow_reader) host_out_ready = ($urandom_range(0, 199) == 0);
      if (host_out_valid && host_out_ready) begin
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
    get_reply(400000);
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
    logic [7:0] body [$];
    logic [7:0] exp [$];
    logic [15:0] regv [256];
    bit ab, ok;
    int t0, t1;
    repeat (10) @(posedge clk); #1 rst_n = 1;
    wait (io_reset_n); repeat (20) @(posedge clk); #1;

    // 1. long write of 600 bytes, slow sink
    body = '{c0(0,0,1,0), 8'h10};
    for (int i = 0; i < 600; i++) body.push_back(8'(i * 7 + (i >> 8)));
    lw_seen = {};
    t0 = cyc;
    transact(8'h20, body, '{8'h20, 8'h00, 8'h00, 8'h00}, "600-byte long write");
    t1 = cyc;
    check(lw_seen.size() == 600, $sformatf("600 bytes delivered (%0d)", lw_seen.size()));
    ok = (lw_seen.size() == 600);
    for (int i = 0; i < 600 && ok; i++) if (lw_seen[i] != 8'(i * 7 + (i >> 8))) ok = 0;
    check(ok, "long-write bytes in order");
    check(n_inhibit > 0, $sformatf("Virtex paused the Spartan (%0d pauses)", n_inhibit));
    check(t1 - t0 >= 602 * 80, $sformatf("no faster than 10 MHz: %0d cycles for 602 bytes", t1 - t0));

    // 2. long write to the Segment module through the backplane
    body = '{c0(1,0,1,3), 8'h22};
    for (int i = 0; i < 200; i++) body.push_back(8'(255 - i));
    seg_seen = {};
    transact(8'hA0, body, '{8'hA0, 8'h00, 8'h00, 8'h00}, "200-byte forwarded long write");
    ok = (seg_seen.size() == 200);
    for (int i = 0; i < 200 && ok; i++) if (seg_seen[i] != 8'(255 - i)) ok = 0;
    check(ok, $sformatf("200 bytes at Segment card 4 in order (%0d)", seg_seen.size()));
    check(n_forward >= 1, "stream forwarded over the backplane");

    // 3. 32 chained writes, then read all 256 registers of core Virtex 1
    foreach (regv[i]) regv[i] = 16'h0000;
    body = {};
    for (int k = 0; k < 32; k++) begin
      logic [7:0] a = 8'(k * 8 + 3);
      logic [15:0] v = 16'(16'hA000 + k * 257);
      regv[a] = v;
      body.push_back(c0(0,0,0,1)); body.push_back(a); body.push_back(v[15:8]); body.push_back(v[7:0]);
    end
    n_vx_write = 0;
    transact(8'h00, body, '{8'h00, 8'h00, 8'h00, 8'h00}, "32 chained writes");
    check(n_vx_write == 32, $sformatf("32 register writes (%0d)", n_vx_write));
    exp = '{8'h40, 8'h00, 8'h02, 8'h02, c0(0,1,0,1), 8'h00};
    for (int r = 0; r < 256; r++) begin exp.push_back(regv[r][15:8]); exp.push_back(regv[r][7:0]); end
    t0 = cyc;
    transact(8'h40, '{c0(0,1,0,1), 8'h00, 8'h00, 8'hFF}, exp, "read of 256 registers");
    t1 = cyc;
    check(reply.size() == 518, $sformatf("518 reply bytes (%0d)", reply.size()));
    check(t1 - t0 >= 514 * 80, $sformatf("read no faster than the link: %0d cycles", t1 - t0));

    // 4. forwarded read of all 256 registers of Segment card 4, host reads
    //    slowly: the Core Spartan must pause the Segment Spartan's reply
    foreach (regv[i]) regv[i] = 16'h0000;
    body = {};
    for (int k = 0; k < 8; k++) begin
      logic [7:0] a = 8'(k * 31);
      logic [15:0] v = 16'(16'h5000 + k * 4097);
      regv[a] = v;
      body.push_back(c0(1,0,0,3)); body.push_back(a); body.push_back(v[15:8]); body.push_back(v[7:0]);
    end
    transact(8'h80, body, '{8'h80, 8'h00, 8'h00, 8'h00}, "8 chained writes to Segment card 4");
    exp = '{8'hC0, 8'h00, 8'h02, 8'h02, c0(1,1,0,3), 8'h00};
    for (int r = 0; r < 256; r++) begin exp.push_back(regv[r][15:8]); exp.push_back(regv[r][7:0]); end
    slow_reader = 1;
    transact(8'hC0, '{c0(1,1,0,3), 8'h00, 8'h00, 8'hFF}, exp, "forwarded read of 256 registers, slow host");
    slow_reader = 0;
    check(n_bp_inhibit > 0, $sformatf("Core Spartan paused the backplane reply (%0d pauses)", n_bp_inhibit));
    $display("workloads: long write %0d pauses, backplane reply %0d pauses", n_inhibit, n_bp_inhibit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_500_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
