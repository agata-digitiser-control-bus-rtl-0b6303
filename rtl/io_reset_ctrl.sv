// io_reset_ctrl: one device's connection to the box-wide I/O RESET line.
//
// The line is open drain (or tri-state) with pull-ups, active low, shared
// by every Spartan, Virtex and XPORT of the box. A request from this device
// (its watchdog time-out) makes it pull the line low (drive_low = 1) for
// STRETCH_CYCLES cycles: 200 ms at the 100 MHz clock assumed here, the
// minimum the XPORT needs. Every device watches the line through a
// two-flop synchroniser and holds io_rst_n low while the line is low or while
// it is itself pulling, so all I/O circuits (links and command state
// machines) restart together. Configured registers are not on io_rst_n and
// keep their values, as the document requires. The wired-AND of all
// drive_low outputs and the pull-up are outside this module.
module io_reset_ctrl #(
  parameter int unsigned STRETCH_CYCLES = 20_000_000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic req,
  input  logic line_n,
  output logic drive_low,
  output logic io_rst_n
);

  localparam int unsigned CW = $clog2(STRETCH_CYCLES + 1);

  logic [CW-1:0] cnt;
  logic [1:0]    sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      drive_low <= 1'b0;
      sync      <= 2'b11;
      io_rst_n  <= 1'b0;
    end else begin
      sync <= {sync[0], line_n};
      if (req && !drive_low) begin
        drive_low <= 1'b1;
        cnt       <= CW'(STRETCH_CYCLES - 1);
      end else if (drive_low) begin
        if (cnt == '0) drive_low <= 1'b0;
        else           cnt       <= cnt - 1'b1;
      end
      io_rst_n <= sync[1] && !drive_low && !req;
    end
  end

endmodule
