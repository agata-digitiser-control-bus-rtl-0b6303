// tb_agata_digitiser_top: end-to-end test of the digitiser control bus.
// A host model sends command streams into the Core Spartan and reads the
// replies; expected replies are built in the testbench from the stream
// format (Destination, 24-bit Length, Command 0/1, Data). Covered: chained
// simple writes (good ACK = empty Virtex frame), simple reads including a
// multi-word read, reads and writes of the main-board registers, a long
// write with link flow control (inhibit), failed write and failed read
// ACKs, streams for the Segment module forwarded over the backplane link,
// and a hung long write that the watchdog clears with an I/O reset that
// leaves register contents intact. Each mechanism is counted and a failure
// is counted for any that never happened. Time-out and reset stretch are
// shortened; the link timing is the default 10 MHz.
`timescale 1ns/1ps
module tb_agata_digitiser_top;
  import agata_pkg::*;

  localparam int unsigned VXR = 16;

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

  agata_digitiser_top #(
    .VX_REGS(VXR), .LOCAL_REGS(16), .RESP_DEPTH(256),
    .TIMEOUT_CYCLES(64'd60_000), .STRETCH_CYCLES(2000)
  ) dut (
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

    // 1. two chained simple writes, Core module, Virtex SM0 reg 3 and SM2 reg 5
    transact(8'h00, '{c0(0,0,0,0), 8'h03, 8'h12, 8'h34, c0(0,0,0,2), 8'h05, 8'hAB, 8'hCD},
             '{8'h00, 8'h00, 8'h00, 8'h00}, "chained simple write");
    check(n_vx_write == 2, $sformatf("two Virtex register writes (%0d)", n_vx_write));

    // 2. reads back
    transact(8'h40, '{c0(0,1,0,0), 8'h03, 8'h00, 8'h00},
             '{8'h40, 8'h00, 8'h00, 8'h04, c0(0,1,0,0), 8'h03, 8'h12, 8'h34}, "read SM0 reg 3");
    transact(8'h40, '{c0(0,1,0,2), 8'h04, 8'h00, 8'h01},
             '{8'h40, 8'h00, 8'h00, 8'h06, c0(0,1,0,2), 8'h04, 8'h00, 8'h00, 8'hAB, 8'hCD},
             "two-word read SM2 reg 4..5");

    // 3. main board registers (Core: SM = 3)
    transact(8'h00, '{c0(0,0,0,3), 8'h07, 8'hBE, 8'hEF}, '{8'h00, 8'h00, 8'h00, 8'h00}, "main board write");
    transact(8'h40, '{c0(0,1,0,3), 8'h07, 8'h00, 8'h00},
             '{8'h40, 8'h00, 8'h00, 8'h04, c0(0,1,0,3), 8'h07, 8'hBE, 8'hEF}, "main board read");

    // 4. failures: register out of range (Virtex says failed), reserved SM (Spartan)
    transact(8'h00, '{c0(0,0,0,1), 8'(VXR + 2), 8'h00, 8'h01, c0(0,0,0,0), 8'h01, 8'h00, 8'h02},
             '{8'h00, 8'h00, 8'h00, 8'h02, c0(0,0,0,1), 8'(VXR + 2)}, "failed write");
    check(n_vx_write == 2, "no write after a failed command");
    transact(8'h40, '{c0(0,1,0,5), 8'h01, 8'h00, 8'h00},
             '{8'h40, 8'h00, 8'h00, 8'h02, c0(0,1,0,5), 8'h01}, "failed read, reserved SM");
    transact(8'h40, '{c0(0,1,0,1), 8'(VXR + 1), 8'h00, 8'h00},
             '{8'h40, 8'h00, 8'h00, 8'h02, c0(0,1,0,1), 8'(VXR + 1)}, "failed read in Virtex");

    // 5. long write, Core Virtex SM1 (document example 0x24 0x03), 40 data bytes,
    //    slow sink so the link inhibit is used
    lwdata = {};
    for (int i = 0; i < 40; i++) lwdata.push_back(8'(i * 7 + 1));
    lw_seen = {};
    begin
      logic [7:0] body [$];
      body = {8'h24, 8'h03};
      foreach (lwdata[i]) body.push_back(lwdata[i]);
      transact(8'h20, body, '{8'h20, 8'h00, 8'h00, 8'h00}, "long write");
    end
    check(lw_seen == lwdata, "long-write data delivered in order");
    check(n_inhibit > 0, $sformatf("link inhibit used (%0d)", n_inhibit));
    // odd number of data bytes is refused
    lw_random = 0;
    transact(8'h20, '{8'h24, 8'h03, 8'h01, 8'h02, 8'h03}, '{8'h20, 8'h00, 8'h00, 8'h02, 8'h24, 8'h03},
             "odd long write");

    // 6. Segment module via the backplane: write card 3 (SM2) reg 5, read it
    //    back with the document's example command 0xC8 0x05, main board SM=4
    transact(8'h80, '{c0(1,0,0,2), 8'h05, 8'h55, 8'hAA, c0(1,0,0,4), 8'h02, 8'h0F, 8'hF0},
             '{8'h80, 8'h00, 8'h00, 8'h00}, "segment writes");
    transact(8'hC0, '{8'hC8, 8'h05, 8'h00, 8'h00},
             '{8'hC0, 8'h00, 8'h00, 8'h04, 8'hC8, 8'h05, 8'h55, 8'hAA}, "segment read (0xC8 0x05)");
    transact(8'hC0, '{c0(1,1,0,4), 8'h02, 8'h00, 8'h00},
             '{8'hC0, 8'h00, 8'h00, 8'h04, c0(1,1,0,4), 8'h02, 8'h0F, 8'hF0}, "segment main board read");
    transact(8'hC0, '{c0(1,1,0,6), 8'h02, 8'h00, 8'h00},
             '{8'hC0, 8'h00, 8'h00, 8'h02, c0(1,1,0,6), 8'h02}, "segment failed read");
    check(n_seg_write == 1, $sformatf("one segment Virtex write (%0d)", n_seg_write));

    // 7. hung long write: sink of Core SM2 never ready. The watchdog fires,
    //    the I/O reset line drops, everything restarts, registers survive.
    lw_block2 = 1; lw_random = 0;
    begin
      logic [7:0] body [$];
      body = {c0(0,0,1,2), 8'h10};
      for (int i = 0; i < 64; i++) body.push_back(8'(i));
      mk_stream(8'h20, body, s);
    end
    t0 = $time;
    send(s, ab);
    check(ab, "hung stream cut by I/O reset");
    repeat (2) @(posedge clk); #1;
    // time-out is 60000 cycles of busy, so the reset cannot come earlier
    check(($time - t0) / 10 >= 60000, $sformatf("reset after the time-out (%0d cycles)", ($time - t0) / 10));
    check(n_io_reset == 1, $sformatf("one I/O reset (%0d)", n_io_reset));
    wait (io_reset_n); repeat (50) @(posedge clk); #1;
    lw_block2 = 0;
    transact(8'h40, '{c0(0,1,0,0), 8'h03, 8'h00, 8'h00},
             '{8'h40, 8'h00, 8'h00, 8'h04, c0(0,1,0,0), 8'h03, 8'h12, 8'h34}, "register kept over I/O reset");
    transact(8'h40, '{c0(0,1,0,3), 8'h07, 8'h00, 8'h00},
             '{8'h40, 8'h00, 8'h00, 8'h04, c0(0,1,0,3), 8'h07, 8'hBE, 8'hEF}, "main board kept over I/O reset");

    // mechanism coverage
    check(n_vx_write >= 2,     "simple writes happened");
    check(n_empty_ack >= 2,    "empty-frame ACKs happened");
    check(n_good_read >= 4,    "good reads happened");
    check(n_fail >= 4,         "failed ACKs happened");
    check(n_lw_bytes >= 40,    "long-write bytes happened");
    check(n_inhibit > 0,       "inhibits happened");
    check(n_forward >= 4,      $sformatf("backplane forwards happened (%0d)", n_forward));
    check(n_local_write >= 2,  "main-board writes happened");
    check(n_io_reset == 1,     "I/O reset happened");
    $display("mechanisms: vx_write=%0d empty_ack=%0d good_read=%0d fail=%0d lw_bytes=%0d inhibit=%0d forward=%0d local_write=%0d io_reset=%0d",
             n_vx_write, n_empty_ack, n_good_read, n_fail, n_lw_bytes, n_inhibit, n_forward, n_local_write, n_io_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
