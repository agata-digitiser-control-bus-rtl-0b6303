// watchdog_timer: time-out on a hung command state machine.
//
// While busy is high a counter runs; whenever busy is low it is cleared.
// If busy stays high for TIMEOUT_CYCLES cycles, timeout pulses for one
// cycle and the counter restarts. The owner feeds the pulse to its
// io_reset_ctrl, which resets the I/O of the whole box. The document gives
// the time-out as about 30 s (still under review); at the 100 MHz system
// clock assumed here that is 3,000,000,000 cycles.
module watchdog_timer #(
  parameter longint unsigned TIMEOUT_CYCLES = 64'd3_000_000_000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic busy,
  output logic timeout
);

  localparam int unsigned CW = $clog2(TIMEOUT_CYCLES + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      timeout <= 1'b0;
    end else begin
      timeout <= 1'b0;
      if (!busy) begin
        cnt <= '0;
      end else if (cnt == CW'(TIMEOUT_CYCLES - 1)) begin
        cnt     <= '0;
        timeout <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
