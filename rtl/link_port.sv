// link_port: one end of a digitiser serial link, five wires in each
// direction (CLOCK and DATA pairs plus FRAME; the pairs are one logic level
// each here).
//
// The port joins a link_tx and a link_rx. The outgoing FRAME wire has two
// jobs, as the document describes: while this end sends, it is the frame of
// the outgoing transfer; while the far end sends (incoming FRAME low and this
// end not sending), it is the RTS/CTS-style inhibit of the incoming transfer,
// pulled low when the local receive FIFO is nearly full. Symmetrically, the
// incoming FRAME wire is this transmitter's inhibit input while it sends,
// and the receiver is kept disabled during that time so the far end's
// inhibit pulses are never taken for a frame. Command/response order (a
// reply starts only after the request frame has ended) is the job of the
// logic above the port; as a safeguard the port also holds a new outgoing
// frame until an incoming one has closed (an empty-frame request made
// during that time is dropped, so it must come after the request frame).
//
// Interface: tx byte stream (tx_valid/tx_ready/tx_data/tx_last), tx_empty_req
// for an empty frame, rx byte stream with end-of-frame tokens
// (rx_valid/rx_ready/rx_data/rx_eof), status, and the two wire bundles.
module link_port
  import agata_pkg::*;
#(
  parameter int unsigned HALF_PERIOD = 5,
  parameter int unsigned FIFO_DEPTH  = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tx_valid,
  input  logic [7:0]  tx_data,
  input  logic        tx_last,
  output logic        tx_ready,
  input  logic        tx_empty_req,
  output logic        tx_busy,
  output logic        rx_valid,
  output logic [7:0]  rx_data,
  output logic        rx_eof,
  input  logic        rx_ready,
  output logic        rx_active,
  output logic        rx_inhibit,
  output logic        rx_overflow,
  output logic        rx_frame_err,
  output link_wires_t link_out,
  input  link_wires_t link_in
);

  logic tx_frame_n, tx_ready_int;

  // A reply may not start while a frame is still arriving: an idle
  // transmitter is held until the incoming frame has ended.
  wire hold = rx_active && !tx_busy;
  assign tx_ready = tx_ready_int && !hold;

  link_tx #(.HALF_PERIOD(HALF_PERIOD)) u_tx (
    .clk, .rst_n,
    .s_valid(tx_valid && !hold), .s_data(tx_data), .s_last(tx_last), .s_ready(tx_ready_int),
    .empty_req(tx_empty_req && !hold),
    .inhibit_n(link_in.frame_n),
    .busy(tx_busy),
    .frame_n(tx_frame_n),
    .link_clk(link_out.clk),
    .link_data(link_out.data)
  );

  link_rx #(.FIFO_DEPTH(FIFO_DEPTH)) u_rx (
    .clk, .rst_n,
    .enable(!tx_busy),
    .frame_n(link_in.frame_n),
    .link_clk(link_in.clk),
    .link_data(link_in.data),
    .m_valid(rx_valid), .m_data(rx_data), .m_eof(rx_eof), .m_ready(rx_ready),
    .inhibit(rx_inhibit),
    .active(rx_active),
    .overflow(rx_overflow),
    .frame_err(rx_frame_err)
  );

  // Outgoing FRAME: own frame while sending, else inhibit of the incoming one.
  always_comb begin
    if (tx_busy)        link_out.frame_n = tx_frame_n;
    else if (rx_active) link_out.frame_n = !rx_inhibit;
    else                link_out.frame_n = 1'b1;
  end

endmodule
