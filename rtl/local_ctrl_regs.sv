// local_ctrl_regs: main-board control register bank of one digitiser
// module, reached by the Control Spartan directly (no serial link) when the
// SM field of Command byte 0 selects "Main board".
//
// NUM_REGS 16-bit registers addressed by Command byte 1. A write takes
// effect on the clock edge where we is high; reads are combinational.
// addr_ok tells the Spartan whether an address exists, so a command for a
// missing register can be answered with the failed ACK. Contents reset only
// on rst_n: the document asks that an I/O reset leaves configured settings
// unchanged. The document names these registers but does not list them;
// the count (16) is this design's choice.
module local_ctrl_regs #(
  parameter int unsigned NUM_REGS = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [7:0]  addr,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  output logic        addr_ok
);

  localparam int unsigned RW = (NUM_REGS > 1) ? $clog2(NUM_REGS) : 1;

  logic [15:0] regs [NUM_REGS];

  assign addr_ok = (32'(addr) < NUM_REGS);
  assign rdata   = addr_ok ? regs[RW'(addr)] : 16'h0000;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
    end else if (we && addr_ok) begin
      regs[RW'(addr)] <= wdata;
    end
  end

endmodule
