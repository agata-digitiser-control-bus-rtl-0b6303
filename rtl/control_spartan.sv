// control_spartan: command controller of one digitiser module.
//
// The host byte stream (from the XPORT Ethernet bridge, or over the
// backplane link from the other module) carries: Destination byte, Length
// 0..2 (24 bits, Length 0 most significant, counting the bytes after the
// Length field), then commands. The controller handles them one at a time:
//   * the SM field of Command byte 0 picks the item: SM < NUM_VIRTEX is a
//     Virtex, reached over its own serial link (link_port); SM == NUM_VIRTEX
//     is the main board, whose local_ctrl_regs are accessed directly; larger
//     codes are reserved. This matches both SM tables of the document (Core:
//     three Virtex then Main board at 3; Segment: four Virtex then 4);
//   * simple write: Command 0, Command 1, Data 0, Data 1 are sent to the
//     Virtex as one frame and its ACK awaited; simple writes may be chained
//     in one stream and are executed in order;
//   * long write: Command 0, Command 1 and the remaining Length-2 bytes are
//     streamed straight from the host into one frame (the link inhibit
//     throttles the host stream);
//   * read: the 4-byte request is sent, the reply frame is stored in the
//     response buffer (the module SRAM) and then returned behind a header.
// Replies to the host: Good Write = Destination echoed, Length 0; failed
// write or read = Destination, Length 2, Command 0, Command 1 of the failing
// command; good read = Destination, Length N+2, Command 0, Command 1, N data
// bytes. After the first failing command the rest of the stream is read and
// discarded (this design's choice; the document reports one failing command).
// A command fails when its top three bits differ from the Destination, its
// module bit is not this module's, a reserved bit is set, its SM code is
// reserved, it is too short, it is a long write to the main board, the
// Virtex replies with a failed ACK, or a read reply overflows the buffer.
//
// With FORWARD_EN (the Core module), a stream whose Destination bit 7 names
// the other module is passed whole, as one frame, over the backplane link,
// and the other module's reply frame is relayed back to the host. This is
// how this design lets the single XPORT entry reach the Segment module over
// the backplane link shown in the document's block diagram.
//
// Interface: host in/out byte streams with valid/ready (h_out_last marks the
// last byte of a reply), Virtex link wires, backplane link wires, the local
// register port and busy (high while a stream is in progress, for the
// watchdog). rst_n is the I/O reset of the module.
module control_spartan
  import agata_pkg::*;
#(
  parameter bit          MODULE_SEG  = 1'b0,
  parameter int unsigned NUM_VIRTEX  = 3,
  parameter bit          FORWARD_EN  = 1'b1,
  parameter int unsigned RESP_DEPTH  = 4096,
  parameter int unsigned HALF_PERIOD = 5,
  parameter int unsigned FIFO_DEPTH  = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        h_in_valid,
  input  logic [7:0]  h_in_data,
  output logic        h_in_ready,
  output logic        h_out_valid,
  output logic [7:0]  h_out_data,
  output logic        h_out_last,
  input  logic        h_out_ready,
  output link_wires_t vx_out [NUM_VIRTEX],
  input  link_wires_t vx_in  [NUM_VIRTEX],
  output link_wires_t bp_out,
  input  link_wires_t bp_in,
  output logic        lr_we,
  output logic [7:0]  lr_addr,
  output logic [15:0] lr_wdata,
  input  logic [15:0] lr_rdata,
  input  logic        lr_ok,
  output logic        busy
);

  localparam int unsigned NP  = NUM_VIRTEX + 1;     // index NUM_VIRTEX = backplane
  localparam int unsigned BP  = NUM_VIRTEX;
  localparam int unsigned PW  = $clog2(NP);
  localparam int unsigned BAW = $clog2(RESP_DEPTH);

  typedef enum logic [4:0] {
    S_DEST, S_LEN, S_FWD, S_RELAY, S_CMD0, S_CMD1, S_CHECK,
    S_LOC_D0, S_LOC_D1, S_LOC_EXEC, S_VX_HDR, S_VX_BODY, S_VX_RESP,
    S_DRAIN, S_REPLY
  } sstate_t;

  typedef enum logic [1:0] {R_GOODW, R_FAIL, R_LOCRD, R_VXRD} reply_t;

  sstate_t      state;
  reply_t       rkind;
  dest_t        dest;
  logic [23:0]  len, rem, rcnt, rlen_relay;
  logic [23:0]  ridx;
  logic [1:0]   hidx;
  cmd0_t        c0;
  logic [7:0]   c1;
  logic [15:0]  dword;
  logic [PW-1:0] sel;
  logic         bovf;
  logic [2:0]   fidx;
  logic [7:0]   fwd_hdr_byte;

  // Per-port signals
  logic         p_tx_valid [NP];
  logic         p_tx_ready [NP];
  logic         p_tx_busy  [NP];
  logic         p_rx_valid [NP];
  logic [7:0]   p_rx_data  [NP];
  logic         p_rx_eof   [NP];
  logic         p_rx_ready [NP];
  logic         tx_valid, tx_last;
  logic [7:0]   tx_data;
  link_wires_t  p_out [NP];
  link_wires_t  p_in  [NP];

  for (genvar i = 0; i < NP; i++) begin : g_port
    logic unused_active, unused_inh, unused_ovf, unused_ferr;
    link_port #(.HALF_PERIOD(HALF_PERIOD), .FIFO_DEPTH(FIFO_DEPTH)) u_port (
      .clk, .rst_n,
      .tx_valid(p_tx_valid[i]), .tx_data(tx_data), .tx_last(tx_last),
      .tx_ready(p_tx_ready[i]), .tx_empty_req(1'b0), .tx_busy(p_tx_busy[i]),
      .rx_valid(p_rx_valid[i]), .rx_data(p_rx_data[i]), .rx_eof(p_rx_eof[i]),
      .rx_ready(p_rx_ready[i]),
      .rx_active(unused_active), .rx_inhibit(unused_inh),
      .rx_overflow(unused_ovf), .rx_frame_err(unused_ferr),
      .link_out(p_out[i]), .link_in(p_in[i])
    );
    assign p_tx_valid[i] = tx_valid && (sel == PW'(i));
  end

  for (genvar i = 0; i < NUM_VIRTEX; i++) begin : g_vx
    assign vx_out[i] = p_out[i];
    assign p_in[i]   = vx_in[i];
  end
  assign bp_out    = FORWARD_EN ? p_out[BP] : LINK_IDLE;
  assign p_in[BP]  = FORWARD_EN ? bp_in : LINK_IDLE;

  // Selected port
  wire        s_tx_ready = p_tx_ready[sel];
  wire        s_rx_valid = p_rx_valid[sel];
  wire [7:0]  s_rx_data  = p_rx_data[sel];
  wire        s_rx_eof   = p_rx_eof[sel];
  logic       s_rx_ready;

  always_comb begin
    for (int i = 0; i < NP; i++) p_rx_ready[i] = s_rx_ready && (sel == PW'(i));
  end

  // Response buffer (module SRAM)
  logic [7:0] buf_rd_data;
  wire        buf_wr = (state == S_VX_RESP) && s_rx_valid && !s_rx_eof && (rcnt < 24'(RESP_DEPTH));
  wire [23:0] ridx_pl = ridx - 24'd4;

  resp_buffer #(.DEPTH(RESP_DEPTH)) u_buf (
    .clk,
    .wr_en(buf_wr), .wr_addr(rcnt[BAW-1:0]), .wr_data(s_rx_data),
    .rd_addr(ridx_pl[BAW-1:0]), .rd_data(buf_rd_data)
  );

  // Command check made once Command 0 and 1 are known
  wire cmd_valid = (c0[7:5] == dest[7:5]) && (c0.rsvd == 2'b00) && (dest.rsvd == 5'd0) &&
                   (c0.segment == MODULE_SEG) && (32'(c0.sm) <= NUM_VIRTEX) &&
                   !(c0.read && c0.long_wr) && (c0.long_wr || rem >= 24'd2) &&
                   !(c0.long_wr && 32'(c0.sm) == NUM_VIRTEX);

  wire forward = FORWARD_EN && (dest.segment != MODULE_SEG);

  // Reply length
  logic [23:0] rlen;
  always_comb begin
    unique case (rkind)
      R_GOODW: rlen = 24'd0;
      R_FAIL:  rlen = 24'd2;
      R_LOCRD: rlen = 24'd4;
      default: rlen = rcnt;
    endcase
  end

  // Byte streams
  always_comb begin
    h_in_ready  = 1'b0;
    h_out_valid = 1'b0;
    h_out_data  = '0;
    h_out_last  = 1'b0;
    tx_valid    = 1'b0;
    tx_data     = '0;
    tx_last     = 1'b0;
    s_rx_ready  = 1'b0;
    unique case (state)
      S_DEST, S_LEN, S_CMD0, S_CMD1, S_LOC_D0, S_LOC_D1:
        h_in_ready = !(state == S_CMD0 && rem == '0);
      S_DRAIN: h_in_ready = (rem != '0);
      S_FWD: begin
        if (fidx == 3'd4) begin
          // body, straight from the host stream
          tx_valid   = h_in_valid;
          tx_data    = h_in_data;
          tx_last    = (rem == 24'd1);
          h_in_ready = s_tx_ready;
        end else begin
          // Destination and Length, from registers
          tx_valid = 1'b1;
          tx_data  = fwd_hdr_byte;
          tx_last  = (fidx == 3'd3) && (len == '0);
        end
      end
      S_RELAY: begin
        h_out_valid = s_rx_valid && !s_rx_eof;
        h_out_data  = s_rx_data;
        h_out_last  = (ridx == 24'd3) ? (s_rx_data == 8'd0 && rlen_relay[15:0] == 16'd0)
                                      : (ridx > 24'd3 && ridx == rlen_relay + 24'd3);
        s_rx_ready  = s_rx_eof || h_out_ready;
      end
      S_VX_HDR: begin
        tx_valid = 1'b1;
        tx_data  = (hidx == 2'd0) ? c0 : c1;
        tx_last  = (hidx == 2'd1) && c0.long_wr && (rem == '0);
      end
      S_VX_BODY: begin
        tx_valid   = h_in_valid;
        tx_data    = h_in_data;
        tx_last    = c0.long_wr ? (rem == 24'd1) : (hidx == 2'd1);
        h_in_ready = s_tx_ready;
      end
      S_VX_RESP: s_rx_ready = 1'b1;
      S_REPLY: begin
        h_out_valid = 1'b1;
        h_out_last  = (ridx == rlen + 24'd3);
        case (ridx)
          24'd0: h_out_data = dest;
          24'd1: h_out_data = rlen[23:16];
          24'd2: h_out_data = rlen[15:8];
          24'd3: h_out_data = rlen[7:0];
          default: begin
            if (rkind == R_VXRD) h_out_data = buf_rd_data;
            else begin
              case (ridx_pl[1:0])
                2'd0:    h_out_data = c0;
                2'd1:    h_out_data = c1;
                2'd2:    h_out_data = dword[15:8];
                default: h_out_data = dword[7:0];
              endcase
            end
          end
        endcase
      end
      default: ;
    endcase
  end

  // Forward header byte fidx (Destination, Length 0..2)
  always_comb begin
    case (fidx[1:0])
      2'd1:    fwd_hdr_byte = len[23:16];
      2'd2:    fwd_hdr_byte = len[15:8];
      2'd3:    fwd_hdr_byte = len[7:0];
      default: fwd_hdr_byte = dest;
    endcase
  end

  assign busy = (state != S_DEST);

  wire h_in_fire  = h_in_valid && h_in_ready;
  wire h_out_fire = h_out_valid && h_out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_DEST;
      rkind      <= R_GOODW;
      dest       <= '0;
      len        <= '0;
      rem        <= '0;
      rcnt       <= '0;
      rlen_relay <= '0;
      ridx       <= '0;
      hidx       <= '0;
      c0         <= '0;
      c1         <= '0;
      dword      <= '0;
      sel        <= '0;
      bovf       <= 1'b0;
      fidx       <= '0;
      lr_we      <= 1'b0;
      lr_addr    <= '0;
      lr_wdata   <= '0;
    end else begin
      lr_we <= 1'b0;
      unique case (state)
        S_DEST: if (h_in_fire) begin
          dest  <= h_in_data;
          hidx  <= 2'd0;
          state <= S_LEN;
        end
        S_LEN: if (h_in_fire) begin
          len  <= {len[15:0], h_in_data};
          hidx <= hidx + 1'b1;
          if (hidx == 2'd2) begin
            rem  <= {len[15:0], h_in_data};
            hidx <= 2'd0;
            ridx <= '0;
            fidx <= '0;
            if (forward) begin
              sel   <= PW'(BP);
              state <= S_FWD;
            end else state <= S_CMD0;
          end
        end
        S_FWD: begin
          if (fidx != 3'd4) begin
            if (s_tx_ready) begin
              fidx <= fidx + 1'b1;
              if (tx_last) begin
                ridx  <= '0;
                state <= S_RELAY;
              end
            end
          end else if (h_in_fire) begin
            rem <= rem - 1'b1;
            if (tx_last) begin
              ridx  <= '0;
              state <= S_RELAY;
            end
          end
        end
        S_RELAY: if (s_rx_valid && s_rx_ready) begin
          if (s_rx_eof) begin
            state <= S_DEST;
          end else begin
            ridx <= ridx + 1'b1;
            if (ridx >= 24'd1 && ridx <= 24'd3) rlen_relay <= {rlen_relay[15:0], s_rx_data};
          end
        end
        S_CMD0: begin
          if (rem == '0) begin
            rkind <= R_GOODW;
            ridx  <= '0;
            state <= S_REPLY;
          end else if (h_in_fire) begin
            c0    <= h_in_data;
            rem   <= rem - 1'b1;
            state <= S_CMD1;
          end
        end
        S_CMD1: if (h_in_fire) begin
          c1    <= h_in_data;
          rem   <= rem - 1'b1;
          state <= S_CHECK;
        end
        S_CHECK: begin
          hidx <= 2'd0;
          if (!cmd_valid) begin
            rkind <= R_FAIL;
            state <= S_DRAIN;
          end else if (32'(c0.sm) == NUM_VIRTEX) begin
            state <= S_LOC_D0;
          end else begin
            sel   <= PW'(c0.sm);
            state <= S_VX_HDR;
          end
        end
        S_LOC_D0: if (h_in_fire) begin
          dword[15:8] <= h_in_data;
          rem         <= rem - 1'b1;
          state       <= S_LOC_D1;
        end
        S_LOC_D1: if (h_in_fire) begin
          dword[7:0] <= h_in_data;
          rem        <= rem - 1'b1;
          lr_addr    <= c1;
          state      <= S_LOC_EXEC;
        end
        S_LOC_EXEC: begin
          if (!lr_ok) begin
            rkind <= R_FAIL;
            state <= S_DRAIN;
          end else if (c0.read) begin
            dword <= lr_rdata;
            rkind <= R_LOCRD;
            state <= S_DRAIN;
          end else begin
            lr_we    <= 1'b1;
            lr_wdata <= dword;
            state    <= S_CMD0;
          end
        end
        S_VX_HDR: if (s_tx_ready) begin
          hidx <= hidx + 1'b1;
          if (hidx == 2'd1) begin
            hidx <= 2'd0;
            rcnt <= '0;
            bovf <= 1'b0;
            state <= (c0.long_wr && rem == '0) ? S_VX_RESP : S_VX_BODY;
          end
        end
        S_VX_BODY: if (h_in_fire) begin
          rem  <= rem - 1'b1;
          hidx <= hidx + 1'b1;
          if (tx_last) state <= S_VX_RESP;
        end
        S_VX_RESP: if (s_rx_valid) begin
          if (s_rx_eof) begin
            if (c0.read) begin
              rkind <= (rcnt > 24'd2 && !bovf) ? R_VXRD : R_FAIL;
              state <= S_DRAIN;
            end else if (rcnt != '0) begin
              rkind <= R_FAIL;
              state <= S_DRAIN;
            end else if (c0.long_wr) begin
              rkind <= R_GOODW;
              state <= S_DRAIN;
            end else begin
              state <= S_CMD0;
            end
          end else begin
            rcnt <= rcnt + 1'b1;
            if (rcnt >= 24'(RESP_DEPTH)) bovf <= 1'b1;
          end
        end
        S_DRAIN: begin
          ridx <= '0;
          if (rem == '0) state <= S_REPLY;
          else if (h_in_fire) begin
            rem <= rem - 1'b1;
            if (rem == 24'd1) state <= S_REPLY;
          end
        end
        S_REPLY: if (h_out_fire) begin
          ridx <= ridx + 1'b1;
          if (h_out_last) state <= S_DEST;
        end
        default: state <= S_DEST;
      endcase
    end
  end

endmodule
