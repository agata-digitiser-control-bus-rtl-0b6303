// link_rx: receive half of a digitiser serial link.
//
// CLOCK, DATA and FRAME are brought into the system clock domain by two-flop
// synchronisers (the system clock must be several times the 10 MHz maximum
// link clock; 100 MHz by default). While enabled and FRAME is low, every
// rising edge of the link CLOCK shifts in one DATA bit; eight bits make a
// byte, which is pushed into a small FIFO. When FRAME returns high an
// end-of-frame token is pushed behind the last byte, so the consumer sees
// a frame as its bytes followed by one token (m_eof=1, m_data unused). A
// frame with no bytes, the Good Write ACK, therefore arrives as a lone token.
// Clock edges outside FRAME are ignored, as the document requires.
//
// Handshake: inhibit is raised while a frame is open and the FIFO has fewer
// than three free places. The owner drives it back as the active-low return
// FRAME so the transmitter holds its next byte. Three places cover the byte
// the transmitter may already be sending, one more it may start before the
// synchronised inhibit reaches it, and the end token. FIFO_DEPTH (default 8)
// is this design's choice; the document says only that the receiver stops
// the sender when its buffer is full. overflow pulses if a byte arrives with
// the FIFO full (a sender that ignored the inhibit); the byte is dropped.
// frame_err pulses at the end of a frame whose bit count was not a whole
// number of bytes. enable low (while the owner transmits on the same link)
// keeps the receiver idle, because the incoming FRAME wire then carries the
// far end's inhibit, not a frame.
module link_rx #(
  parameter int unsigned FIFO_DEPTH = 8,
  parameter bit          MSB_FIRST  = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic       frame_n,
  input  logic       link_clk,
  input  logic       link_data,
  output logic       m_valid,
  output logic [7:0] m_data,
  output logic       m_eof,
  input  logic       m_ready,
  output logic       inhibit,
  output logic       active,
  output logic       overflow,
  output logic       frame_err
);

  localparam int unsigned AW = $clog2(FIFO_DEPTH);

  logic [1:0] s_clk, s_dat, s_frm;
  logic       clk_d;
  logic [7:0] shreg;
  logic [2:0] bitn;

  logic [8:0]   mem [FIFO_DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [AW:0]   count;

  logic       push, pop;
  logic [8:0] push_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_clk <= '0;
      s_dat <= '0;
      s_frm <= 2'b11;
      clk_d <= 1'b0;
    end else begin
      s_clk <= {s_clk[0], link_clk};
      s_dat <= {s_dat[0], link_data};
      s_frm <= {s_frm[0], frame_n};
      clk_d <= s_clk[1];
    end
  end

  wire rise     = s_clk[1] && !clk_d;
  wire frm_low  = !s_frm[1];
  wire [7:0] next_sh = MSB_FIRST ? {shreg[6:0], s_dat[1]} : {s_dat[1], shreg[7:1]};

  // Frame tracking and bit assembly
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      shreg     <= '0;
      bitn      <= '0;
      frame_err <= 1'b0;
    end else begin
      frame_err <= 1'b0;
      if (!active) begin
        bitn <= '0;
        if (enable && frm_low) active <= 1'b1;
      end else if (!frm_low) begin
        active    <= 1'b0;
        frame_err <= (bitn != 3'd0);
      end else if (rise) begin
        shreg <= next_sh;
        bitn  <= bitn + 1'b1;
      end
    end
  end

  always_comb begin
    push      = 1'b0;
    push_word = '0;
    if (active && !frm_low) begin
      push      = 1'b1;
      push_word = {1'b1, 8'h00};
    end else if (active && frm_low && rise && bitn == 3'd7) begin
      push      = 1'b1;
      push_word = {1'b0, next_sh};
    end
  end

  wire full = (count == (AW+1)'(FIFO_DEPTH));
  assign pop     = m_valid && m_ready;
  assign m_valid = (count != '0);
  assign m_data  = mem[rptr][7:0];
  assign m_eof   = mem[rptr][8];

  always_ff @(posedge clk) begin
    if (push && !full) mem[wptr] <= push_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= push && full;
      if (push && !full) wptr <= (wptr == AW'(FIFO_DEPTH-1)) ? '0 : wptr + 1'b1;
      if (pop)           rptr <= (rptr == AW'(FIFO_DEPTH-1)) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(push && !full) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inhibit <= 1'b0;
    else        inhibit <= active && (count + (AW+1)'(push) >= (AW+1)'(FIFO_DEPTH - 3));
  end

  initial begin
    assert (FIFO_DEPTH >= 4) else $error("link_rx: FIFO_DEPTH must be at least 4");
  end

endmodule
