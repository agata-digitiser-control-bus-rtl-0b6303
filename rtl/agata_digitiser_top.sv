// agata_digitiser_top: control bus of one AGATA digitiser box.
//
// The box holds two modules. The Core/Segment module (module 1, Destination
// bit 7 = 0) has a Control Spartan, three Virtex ADC devices (segment cards
// 1 and 2, core ADCs) and main-board control registers. The Segment module
// (module 2, bit 7 = 1) has a Control Spartan, four Virtex ADC devices and
// its own registers. Every Spartan-Virtex pair, and the two Spartans over
// the backplane, talk over the same framed serial link (CLOCK, DATA, FRAME
// each way, with FRAME doubling as a byte-level flow-control line).
//
// Host commands enter through the host_in byte stream (the XPORT Ethernet
// bridge side) of the Core Spartan; streams for the Segment module are
// forwarded over the backplane link, and every reply comes back on host_out.
// Long-write data reaching a Virtex leave on its lw_* stream; simple writes
// show on its wr_* strobe. All nine devices share one open-drain, active-low
// I/O RESET line, modelled as the AND of their release outputs: a device
// whose watchdog fires pulls it low for the stretch time, and every device
// then restarts its links and state machines while keeping its registers.
// io_reset_n brings the line out (the XPORT resets from it).
//
// Clocking: one system clock (100 MHz assumed) for the whole model; on the
// board each device has its own clock, which the link synchronisers allow.
// Parameters: the link clock divider, FIFO depth, register counts, read
// buffer depth, watchdog time-out (30 s) and reset stretch (200 ms), all in
// system clock cycles. Index order of the Virtex arrays follows the SM
// codes of the document: core 0 = segment card 1, 1 = segment card 2,
// 2 = core ADCs; segment 0..3 = segment cards 1..4.
module agata_digitiser_top
  import agata_pkg::*;
#(
  parameter int unsigned     HALF_PERIOD    = 5,
  parameter int unsigned     FIFO_DEPTH     = 8,
  parameter int unsigned     VX_REGS        = 256,
  parameter int unsigned     LOCAL_REGS     = 16,
  parameter int unsigned     RESP_DEPTH     = 4096,
  parameter longint unsigned TIMEOUT_CYCLES = 64'd3_000_000_000,
  parameter int unsigned     STRETCH_CYCLES = 20_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  // host (XPORT) side
  input  logic        host_in_valid,
  input  logic [7:0]  host_in_data,
  output logic        host_in_ready,
  output logic        host_out_valid,
  output logic [7:0]  host_out_data,
  output logic        host_out_last,
  input  logic        host_out_ready,
  // Core module Virtex devices: long-write streams and write strobes
  output logic        core_lw_valid [CORE_NUM_VIRTEX],
  output logic [7:0]  core_lw_data  [CORE_NUM_VIRTEX],
  output logic [7:0]  core_lw_cmd   [CORE_NUM_VIRTEX],
  output logic        core_lw_first [CORE_NUM_VIRTEX],
  input  logic        core_lw_ready [CORE_NUM_VIRTEX],
  output logic        core_wr_en    [CORE_NUM_VIRTEX],
  output logic [7:0]  core_wr_addr  [CORE_NUM_VIRTEX],
  output logic [15:0] core_wr_data  [CORE_NUM_VIRTEX],
  // Segment module Virtex devices
  output logic        seg_lw_valid  [SEG_NUM_VIRTEX],
  output logic [7:0]  seg_lw_data   [SEG_NUM_VIRTEX],
  output logic [7:0]  seg_lw_cmd    [SEG_NUM_VIRTEX],
  output logic        seg_lw_first  [SEG_NUM_VIRTEX],
  input  logic        seg_lw_ready  [SEG_NUM_VIRTEX],
  output logic        seg_wr_en     [SEG_NUM_VIRTEX],
  output logic [7:0]  seg_wr_addr   [SEG_NUM_VIRTEX],
  output logic [15:0] seg_wr_data   [SEG_NUM_VIRTEX],
  // shared I/O reset line (low = reset)
  output logic        io_reset_n
);

  // Devices on the I/O reset line
  localparam int unsigned D_CORE = 0;
  localparam int unsigned D_SEG  = 1;
  localparam int unsigned D_CVX  = 2;                       // 2..4
  localparam int unsigned D_SVX  = D_CVX + CORE_NUM_VIRTEX; // 5..8
  localparam int unsigned ND     = D_SVX + SEG_NUM_VIRTEX;

  logic dev_busy   [ND];
  logic dev_tmo    [ND];
  logic dev_drive  [ND];
  logic dev_io_rst_n [ND];

  // Wired-AND of the open-drain drivers with the pull-up
  always_comb begin
    io_reset_n = 1'b1;
    for (int i = 0; i < ND; i++) if (dev_drive[i]) io_reset_n = 1'b0;
  end

  for (genvar d = 0; d < ND; d++) begin : g_rst
    watchdog_timer #(.TIMEOUT_CYCLES(TIMEOUT_CYCLES)) u_wd (
      .clk, .rst_n(dev_io_rst_n[d]), .busy(dev_busy[d]), .timeout(dev_tmo[d])
    );
    io_reset_ctrl #(.STRETCH_CYCLES(STRETCH_CYCLES)) u_ior (
      .clk, .rst_n, .req(dev_tmo[d]), .line_n(io_reset_n),
      .drive_low(dev_drive[d]), .io_rst_n(dev_io_rst_n[d])
    );
  end

  // ---------------- Core/Segment module ----------------
  link_wires_t core_vx_out [CORE_NUM_VIRTEX];
  link_wires_t core_vx_in  [CORE_NUM_VIRTEX];
  link_wires_t bp_core_to_seg, bp_seg_to_core;
  logic        c_lr_we, c_lr_ok;
  logic [7:0]  c_lr_addr;
  logic [15:0] c_lr_wdata, c_lr_rdata;

  control_spartan #(
    .MODULE_SEG(1'b0), .NUM_VIRTEX(CORE_NUM_VIRTEX), .FORWARD_EN(1'b1),
    .RESP_DEPTH(RESP_DEPTH), .HALF_PERIOD(HALF_PERIOD), .FIFO_DEPTH(FIFO_DEPTH)
  ) u_core_spartan (
    .clk, .rst_n(dev_io_rst_n[D_CORE]),
    .h_in_valid(host_in_valid), .h_in_data(host_in_data), .h_in_ready(host_in_ready),
    .h_out_valid(host_out_valid), .h_out_data(host_out_data),
    .h_out_last(host_out_last), .h_out_ready(host_out_ready),
    .vx_out(core_vx_out), .vx_in(core_vx_in),
    .bp_out(bp_core_to_seg), .bp_in(bp_seg_to_core),
    .lr_we(c_lr_we), .lr_addr(c_lr_addr), .lr_wdata(c_lr_wdata),
    .lr_rdata(c_lr_rdata), .lr_ok(c_lr_ok),
    .busy(dev_busy[D_CORE])
  );

  local_ctrl_regs #(.NUM_REGS(LOCAL_REGS)) u_core_regs (
    .clk, .rst_n, .we(c_lr_we), .addr(c_lr_addr), .wdata(c_lr_wdata),
    .rdata(c_lr_rdata), .addr_ok(c_lr_ok)
  );

  for (genvar v = 0; v < CORE_NUM_VIRTEX; v++) begin : g_core_vx
    virtex_cmd_port #(
      .MODULE_SEG(1'b0), .MY_SM(3'(v)), .NUM_REGS(VX_REGS),
      .HALF_PERIOD(HALF_PERIOD), .FIFO_DEPTH(FIFO_DEPTH)
    ) u_vx (
      .clk, .rst_n, .io_rst_n(dev_io_rst_n[D_CVX+v]),
      .link_in(core_vx_out[v]), .link_out(core_vx_in[v]),
      .wr_en(core_wr_en[v]), .wr_addr(core_wr_addr[v]), .wr_data(core_wr_data[v]),
      .lw_valid(core_lw_valid[v]), .lw_data(core_lw_data[v]), .lw_cmd(core_lw_cmd[v]),
      .lw_first(core_lw_first[v]), .lw_ready(core_lw_ready[v]),
      .busy(dev_busy[D_CVX+v])
    );
  end

  // ---------------- Segment module ----------------
  link_wires_t seg_vx_out [SEG_NUM_VIRTEX];
  link_wires_t seg_vx_in  [SEG_NUM_VIRTEX];
  link_wires_t seg_bp_unused_out;
  logic        s_lr_we, s_lr_ok;
  logic [7:0]  s_lr_addr;
  logic [15:0] s_lr_wdata, s_lr_rdata;

  // Segment end of the backplane link: its receive stream is the Segment
  // Spartan's host input (end-of-frame tokens dropped), its transmit stream
  // carries the Segment Spartan's replies.
  logic        bp_rx_valid, bp_rx_eof, bp_rx_ready;
  logic [7:0]  bp_rx_data;
  logic        sh_in_ready, sh_out_valid, sh_out_last, sh_out_ready;
  logic [7:0]  sh_out_data;
  logic        bp_tx_busy, bp_rx_active, bp_rx_inhibit, bp_rx_ovf, bp_rx_ferr;
  logic        s_sp_busy;

  link_port #(.HALF_PERIOD(HALF_PERIOD), .FIFO_DEPTH(FIFO_DEPTH)) u_seg_bp (
    .clk, .rst_n(dev_io_rst_n[D_SEG]),
    .tx_valid(sh_out_valid), .tx_data(sh_out_data), .tx_last(sh_out_last),
    .tx_ready(sh_out_ready), .tx_empty_req(1'b0), .tx_busy(bp_tx_busy),
    .rx_valid(bp_rx_valid), .rx_data(bp_rx_data), .rx_eof(bp_rx_eof),
    .rx_ready(bp_rx_ready),
    .rx_active(bp_rx_active), .rx_inhibit(bp_rx_inhibit),
    .rx_overflow(bp_rx_ovf), .rx_frame_err(bp_rx_ferr),
    .link_out(bp_seg_to_core), .link_in(bp_core_to_seg)
  );
  assign bp_rx_ready = bp_rx_eof || sh_in_ready;

  control_spartan #(
    .MODULE_SEG(1'b1), .NUM_VIRTEX(SEG_NUM_VIRTEX), .FORWARD_EN(1'b0),
    .RESP_DEPTH(RESP_DEPTH), .HALF_PERIOD(HALF_PERIOD), .FIFO_DEPTH(FIFO_DEPTH)
  ) u_seg_spartan (
    .clk, .rst_n(dev_io_rst_n[D_SEG]),
    .h_in_valid(bp_rx_valid && !bp_rx_eof), .h_in_data(bp_rx_data), .h_in_ready(sh_in_ready),
    .h_out_valid(sh_out_valid), .h_out_data(sh_out_data),
    .h_out_last(sh_out_last), .h_out_ready(sh_out_ready),
    .vx_out(seg_vx_out), .vx_in(seg_vx_in),
    .bp_out(seg_bp_unused_out), .bp_in(LINK_IDLE),
    .lr_we(s_lr_we), .lr_addr(s_lr_addr), .lr_wdata(s_lr_wdata),
    .lr_rdata(s_lr_rdata), .lr_ok(s_lr_ok),
    .busy(s_sp_busy)
  );
  assign dev_busy[D_SEG] = s_sp_busy;

  local_ctrl_regs #(.NUM_REGS(LOCAL_REGS)) u_seg_regs (
    .clk, .rst_n, .we(s_lr_we), .addr(s_lr_addr), .wdata(s_lr_wdata),
    .rdata(s_lr_rdata), .addr_ok(s_lr_ok)
  );

  for (genvar v = 0; v < SEG_NUM_VIRTEX; v++) begin : g_seg_vx
    virtex_cmd_port #(
      .MODULE_SEG(1'b1), .MY_SM(3'(v)), .NUM_REGS(VX_REGS),
      .HALF_PERIOD(HALF_PERIOD), .FIFO_DEPTH(FIFO_DEPTH)
    ) u_vx (
      .clk, .rst_n, .io_rst_n(dev_io_rst_n[D_SVX+v]),
      .link_in(seg_vx_out[v]), .link_out(seg_vx_in[v]),
      .wr_en(seg_wr_en[v]), .wr_addr(seg_wr_addr[v]), .wr_data(seg_wr_data[v]),
      .lw_valid(seg_lw_valid[v]), .lw_data(seg_lw_data[v]), .lw_cmd(seg_lw_cmd[v]),
      .lw_first(seg_lw_first[v]), .lw_ready(seg_lw_ready[v]),
      .busy(dev_busy[D_SVX+v])
    );
  end

endmodule
