// shared_buffer: the Widget board's 256 KB Shared Buffer SRAM.
//
// 2K lines of 128 bytes, seen as 32K doublewords on a 64-bit port. An access
// takes two cycles: the address (and write data) is registered in the first,
// the read data is registered in the second and is valid the cycle after.
// Writes take effect at the first edge. The document gives the size and line
// organisation and the two-cycle off-chip read; the single port and the
// register placement are this model's choice. Written as a plain array.
module shared_buffer #(
  parameter int unsigned DEPTH = 32768,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [63:0]   wdata,
  output logic [63:0]   rdata
);
  logic [63:0]   mem [DEPTH];
  logic [AW-1:0] addr_q;

  always_ff @(posedge clk) begin
    if (en) begin
      addr_q <= addr;
      if (we) mem[addr] <= wdata;
    end
    rdata <= mem[addr_q];
  end
endmodule
