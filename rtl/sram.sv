// sram: the on-chip data store that feeds the I/O coding path.
//
// A single-port synchronous RAM of 2**ADDR_W words of DATA_W bits. A write (we) stores
// wdata at addr on the rising clock edge. A read (re, with we low) registers the word at
// addr, so rdata holds it from the next edge until the next read; write wins if both are
// asserted. The 8-bit word width is the one the design uses between the SRAM and the coder;
// the depth and the port protocol are this design's own choices, since only the function
// (store any pattern and read it out) is given. In silicon this is an SRAM macro; here it is
// an array that synthesis maps to a memory.
module sram #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              we,
  input  logic              re,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) begin
      mem[addr] <= wdata;
    end else if (re) begin
      rdata <= mem[addr];
    end
  end

endmodule
