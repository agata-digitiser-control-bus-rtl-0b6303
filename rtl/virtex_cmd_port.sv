// virtex_cmd_port: command handler on the Virtex side of a Spartan-Virtex
// link.
//
// Each request from the Control Spartan arrives as one frame: Command 0,
// Command 1, then Data 0 and Data 1 for a simple write or a read, or any
// number of data bytes for a long write. The handler acts only once the
// frame has ended, and only then replies, as the document requires:
//   * simple write: the 16-bit value (Data 0 = high byte) is written to
//     register Command 1 and announced on wr_en/wr_addr/wr_data; the reply
//     is an empty frame (Good Write ACK);
//   * long write: the data bytes are passed on, as they arrive, to the
//     lw_* byte stream (towards EEPROM or look-up-table loading logic). When
//     lw_ready is low the receive FIFO fills and the link inhibit stops the
//     Spartan on a byte boundary. Reply: empty frame, or the failed ACK if
//     the number of data bytes is odd (data are 16-bit words);
//   * read: the reply frame echoes Command 0 and Command 1, followed by
//     register words, high byte first. The data word of the read is taken as
//     the qualifier the document mentions: it asks for that many further
//     consecutive registers (0 = one word), capped at NUM_REGS words;
//   * any request not understood (wrong module bit or SM address, nonzero
//     reserved bits, register number out of range, a frame of the wrong
//     length) is answered with a frame holding Command 0 and Command 1 only
//     (failed Read or Write ACK).
// The register bank (NUM_REGS 16-bit words, 256 by default as Command 1 is
// eight bits) stands in for the Virtex application, whose commands the
// document leaves to each device's designer; the frame decoding and the
// three reply forms follow the document. Registers reset only on rst_n; the
// link and the state machine also reset on io_rst_n (the shared I/O reset).
// busy is high whenever a request is being handled, for the watchdog.
module virtex_cmd_port
  import agata_pkg::*;
#(
  parameter bit          MODULE_SEG  = 1'b0,
  parameter logic [2:0]  MY_SM       = 3'd0,
  parameter int unsigned NUM_REGS    = 256,
  parameter int unsigned HALF_PERIOD = 5,
  parameter int unsigned FIFO_DEPTH  = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        io_rst_n,
  input  link_wires_t link_in,
  output link_wires_t link_out,
  output logic        wr_en,
  output logic [7:0]  wr_addr,
  output logic [15:0] wr_data,
  output logic        lw_valid,
  output logic [7:0]  lw_data,
  output logic [7:0]  lw_cmd,
  output logic        lw_first,
  input  logic        lw_ready,
  output logic        busy
);

  typedef enum logic [3:0] {
    V_C0, V_C1, V_D0, V_D1, V_EXTRA, V_LW, V_EVAL, V_SEND, V_ACK, V_WAIT
  } vstate_t;

  localparam int unsigned RW = (NUM_REGS > 1) ? $clog2(NUM_REGS) : 1;

  vstate_t     state;
  cmd0_t       c0;
  logic [7:0]  c1;
  logic [15:0] dword;
  logic        err;
  logic        lw_odd, lw_started;
  logic [17:0] tx_idx, tx_len;
  logic [15:0] regs [NUM_REGS];

  logic        rx_valid, rx_eof, rx_ready;
  logic [7:0]  rx_data;
  logic        tx_valid, tx_ready, tx_last, tx_empty_req, tx_busy;
  logic [7:0]  tx_data;
  logic        rx_active, rx_inhibit, rx_overflow, rx_frame_err;

  link_port #(.HALF_PERIOD(HALF_PERIOD), .FIFO_DEPTH(FIFO_DEPTH)) u_port (
    .clk, .rst_n(io_rst_n),
    .tx_valid, .tx_data, .tx_last, .tx_ready, .tx_empty_req, .tx_busy,
    .rx_valid, .rx_data, .rx_eof, .rx_ready,
    .rx_active, .rx_inhibit, .rx_overflow, .rx_frame_err,
    .link_out, .link_in
  );

  // Does this handler understand the command in c0/c1?
  function automatic logic cmd_ok(input cmd0_t c, input logic [7:0] a);
    return (c.segment == MODULE_SEG) && (c.sm == MY_SM) && (c.rsvd == 2'b00) &&
           (c.long_wr || (32'(a) < NUM_REGS)) && !(c.read && c.long_wr);
  endfunction

  wire [RW-1:0] base = RW'(c1);

  // Word number k of a read reply, wrapped inside the bank
  function automatic logic [15:0] rd_word(input logic [17:0] k);
    logic [31:0] a;
    a = (32'(base) + 32'(k)) % NUM_REGS;
    return regs[a[RW-1:0]];
  endfunction

  // Receive side: which bytes are taken
  always_comb begin
    rx_ready = 1'b0;
    lw_valid = 1'b0;
    case (state)
      V_C0, V_C1, V_D0, V_D1, V_EXTRA: rx_ready = 1'b1;
      V_LW: begin
        if (rx_valid && rx_eof)          rx_ready = 1'b1;
        else if (rx_valid && err)        rx_ready = 1'b1;
        else begin
          lw_valid = rx_valid;
          rx_ready = lw_ready;
        end
      end
      default: ;
    endcase
  end
  assign lw_data  = rx_data;
  assign lw_cmd   = c1;
  assign lw_first = !lw_started;

  // Transmit side: reply bytes
  always_comb begin
    logic [15:0] w;
    w = rd_word((tx_idx - 18'd2) >> 1);
    tx_valid = (state == V_SEND);
    tx_last  = (tx_idx == tx_len - 1'b1);
    if (tx_idx == 18'd0)      tx_data = c0;
    else if (tx_idx == 18'd1) tx_data = c1;
    else                      tx_data = tx_idx[0] ? w[7:0] : w[15:8];
  end

  assign busy = (state != V_C0) || rx_valid;

  always_ff @(posedge clk or negedge io_rst_n) begin
    if (!io_rst_n) begin
      state        <= V_C0;
      c0           <= '0;
      c1           <= '0;
      dword        <= '0;
      err          <= 1'b0;
      lw_odd       <= 1'b0;
      lw_started   <= 1'b0;
      tx_idx       <= '0;
      tx_len       <= '0;
      tx_empty_req <= 1'b0;
    end else begin
      tx_empty_req <= 1'b0;
      unique case (state)
        V_C0: if (rx_valid && !rx_eof) begin   // a lone token is ignored
          c0         <= rx_data;
          c1         <= '0;
          dword      <= '0;
          err        <= 1'b0;
          lw_odd     <= 1'b0;
          lw_started <= 1'b0;
          state      <= V_C1;
        end
        V_C1: if (rx_valid) begin
          if (rx_eof) begin
            err   <= 1'b1;
            state <= V_EVAL;
          end else begin
            c1 <= rx_data;
            if (c0.long_wr && !c0.read) begin
              err   <= !cmd_ok(c0, rx_data);
              state <= V_LW;
            end else state <= V_D0;
          end
        end
        V_D0: if (rx_valid) begin
          if (rx_eof) begin err <= 1'b1; state <= V_EVAL; end
          else begin dword[15:8] <= rx_data; state <= V_D1; end
        end
        V_D1: if (rx_valid) begin
          if (rx_eof) begin err <= 1'b1; state <= V_EVAL; end
          else begin dword[7:0] <= rx_data; state <= V_EXTRA; end
        end
        V_EXTRA: if (rx_valid) begin
          if (rx_eof) state <= V_EVAL;
          else        err   <= 1'b1;        // simple frames are exactly 4 bytes
        end
        V_LW: if (rx_valid && rx_ready) begin
          if (rx_eof) state <= V_EVAL;
          else begin
            lw_odd     <= !lw_odd;
            lw_started <= 1'b1;
          end
        end
        V_EVAL: begin
          tx_idx <= '0;
          if (err || !cmd_ok(c0, c1) || (c0.long_wr && lw_odd)) begin
            tx_len <= 18'd2;
            state  <= V_SEND;
          end else if (c0.read) begin
            tx_len <= 18'd2 + 18'((32'(dword) + 1 > NUM_REGS) ? 2 * NUM_REGS : 2 * (32'(dword) + 1));
            state  <= V_SEND;
          end else begin
            tx_empty_req <= 1'b1;
            state        <= V_ACK;
          end
        end
        V_SEND: if (tx_ready) begin
          tx_idx <= tx_idx + 1'b1;
          if (tx_last) state <= V_ACK;
        end
        V_ACK:  if (tx_busy)  state <= V_WAIT;
        V_WAIT: if (!tx_busy) state <= V_C0;
        default: state <= V_C0;
      endcase
    end
  end

  // Register bank: written only by a good simple write
  wire do_write = (state == V_EVAL) && !err && cmd_ok(c0, c1) && !c0.read && !c0.long_wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
    end else if (do_write) begin
      regs[base] <= dword;
    end
  end

  always_ff @(posedge clk or negedge io_rst_n) begin
    if (!io_rst_n) begin
      wr_en   <= 1'b0;
      wr_addr <= '0;
      wr_data <= '0;
    end else begin
      wr_en   <= do_write;
      wr_addr <= c1;
      wr_data <= dword;
    end
  end

endmodule
