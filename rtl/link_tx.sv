// link_tx: transmit half of a digitiser serial link (one CLOCK, one DATA,
// one active-low FRAME wire).
//
// A frame opens when the first byte is offered on the byte stream and closes
// after the byte marked s_last. FRAME goes low first; DATA changes while
// CLOCK is low and is sampled by the receiver on the CLOCK rising edge, so
// each bit has half a link clock period of setup and hold. The link clock is
// the system clock divided by 2*HALF_PERIOD (defaults: 100 MHz system clock,
// 10 MHz link clock, the maximum the document allows). The document gives
// FRAME-low to first CLOCK edge of at least 150 ns (LEAD_CYCLES) and a
// FRAME-high delay after the last CLOCK edge of 50/100 ns (TAIL_CYCLES is
// 150 ns here to cover both); CLOCK and DATA appear only inside FRAME.
//
// Handshake: inhibit_n is the far end's returned FRAME wire. It is sampled
// (after a two-flop synchroniser) at every byte boundary; while it is low the
// next byte is held back, so transfers pause only on whole bytes, as the
// document requires. Gaps between bytes are also allowed when the byte
// stream has nothing ready.
//
// empty_req sends a frame with no CLOCK and no DATA: FRAME low for
// LEAD_CYCLES+TAIL_CYCLES. This is the Good Write ACK of the document.
// After every frame FRAME stays high for GAP_CYCLES before busy drops, so
// the far end has released its inhibit before this end listens again.
//
// Bit order inside a byte is not stated in the document; MSB_FIRST=1 (the
// default) sends bit 7 first. Interface: s_valid/s_ready/s_data/s_last byte
// stream (a byte is taken when both valid and ready are high), empty_req
// (taken when idle and no byte is offered), busy, and the three wires.
module link_tx #(
  parameter int unsigned HALF_PERIOD = 5,
  parameter int unsigned LEAD_CYCLES = 15,
  parameter int unsigned TAIL_CYCLES = 15,
  parameter int unsigned GAP_CYCLES  = 10,
  parameter bit          MSB_FIRST   = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       s_valid,
  input  logic [7:0] s_data,
  input  logic       s_last,
  output logic       s_ready,
  input  logic       empty_req,
  input  logic       inhibit_n,
  output logic       busy,
  output logic       frame_n,
  output logic       link_clk,
  output logic       link_data
);

  typedef enum logic [2:0] {
    T_IDLE, T_LEAD, T_BIT_LO, T_BIT_HI, T_NEXT, T_TAIL, T_GAP
  } tstate_t;

  localparam int unsigned CW = $clog2(LEAD_CYCLES + TAIL_CYCLES + GAP_CYCLES + HALF_PERIOD + 2);

  tstate_t        state;
  logic [CW-1:0]  cnt;
  logic [7:0]     shreg;
  logic [2:0]     bitn;
  logic           last_q;
  logic [1:0]     inh_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inh_sync <= 2'b11;
    else        inh_sync <= {inh_sync[0], inhibit_n};
  end

  // A new byte may be taken at the start of a frame or on a byte boundary
  // when the receiver is not holding us off.
  always_comb begin
    s_ready = 1'b0;
    if (state == T_IDLE)                                   s_ready = 1'b1;
    else if (state == T_NEXT && !last_q && inh_sync[1])    s_ready = 1'b1;
  end

  assign busy = (state != T_IDLE);

  function automatic logic first_bit(input logic [7:0] b);
    return MSB_FIRST ? b[7] : b[0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= T_IDLE;
      cnt       <= '0;
      shreg     <= '0;
      bitn      <= '0;
      last_q    <= 1'b0;
      frame_n   <= 1'b1;
      link_clk  <= 1'b0;
      link_data <= 1'b0;
    end else begin
      unique case (state)
        T_IDLE: begin
          link_clk  <= 1'b0;
          link_data <= 1'b0;
          if (s_valid) begin
            shreg   <= s_data;
            last_q  <= s_last;
            frame_n <= 1'b0;
            cnt     <= CW'(LEAD_CYCLES - HALF_PERIOD - 1);
            state   <= T_LEAD;
          end else if (empty_req) begin
            frame_n <= 1'b0;
            cnt     <= CW'(LEAD_CYCLES + TAIL_CYCLES - 1);
            state   <= T_TAIL;
          end
        end
        T_LEAD: begin
          if (cnt == '0) begin
            link_data <= first_bit(shreg);
            bitn      <= 3'd0;
            cnt       <= CW'(HALF_PERIOD - 1);
            state     <= T_BIT_LO;
          end else cnt <= cnt - 1'b1;
        end
        T_BIT_LO: begin
          if (cnt == '0) begin
            link_clk <= 1'b1;
            cnt      <= CW'(HALF_PERIOD - 1);
            state    <= T_BIT_HI;
          end else cnt <= cnt - 1'b1;
        end
        T_BIT_HI: begin
          if (cnt == '0) begin
            link_clk <= 1'b0;
            if (bitn == 3'd7) begin
              state <= T_NEXT;
            end else begin
              shreg     <= MSB_FIRST ? {shreg[6:0], 1'b0} : {1'b0, shreg[7:1]};
              link_data <= MSB_FIRST ? shreg[6] : shreg[1];
              bitn      <= bitn + 1'b1;
              cnt       <= CW'(HALF_PERIOD - 1);
              state     <= T_BIT_LO;
            end
          end else cnt <= cnt - 1'b1;
        end
        T_NEXT: begin
          if (last_q) begin
            cnt   <= CW'(TAIL_CYCLES - 1);
            state <= T_TAIL;
          end else if (s_valid && inh_sync[1]) begin
            shreg     <= s_data;
            last_q    <= s_last;
            link_data <= first_bit(s_data);
            bitn      <= 3'd0;
            cnt       <= CW'(HALF_PERIOD - 1);
            state     <= T_BIT_LO;
          end
        end
        T_TAIL: begin
          link_data <= 1'b0;
          if (cnt == '0) begin
            frame_n <= 1'b1;
            cnt     <= CW'(GAP_CYCLES - 1);
            state   <= T_GAP;
          end else cnt <= cnt - 1'b1;
        end
        T_GAP: begin
          if (cnt == '0) state <= T_IDLE;
          else           cnt   <= cnt - 1'b1;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  // The link clock only toggles inside a frame.
  a_clk_in_frame: assert property (@(posedge clk) disable iff (!rst_n) link_clk |-> !frame_n);

endmodule
