// resp_buffer: byte buffer (the module SRAM) holding a read response from a
// Virtex while it is being received.
//
// The reply to the host must carry its 24-bit Length ahead of the data, but
// the Spartan learns the length only when the Virtex frame ends. The
// response bytes are therefore written here in order (wr_en/wr_addr/wr_data)
// and read back by address once the length is known. Write is synchronous;
// read is combinational (rd_addr to rd_data in the same cycle). DEPTH, 4096
// bytes by default, is this design's choice: the document shows an SRAM
// beside each Control Spartan but gives no size.
module resp_buffer #(
  parameter int unsigned DEPTH = 4096
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [7:0]               wr_data,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [7:0]               rd_data
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  assign rd_data = mem[rd_addr];

endmodule
