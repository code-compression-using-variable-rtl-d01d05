// line_address_table: the LAT, which maps the index of an uncompressed fetch
// packet to the byte address of its compressed block in program memory.
//
// Branches and calls name uncompressed addresses; because compressed blocks
// vary in length, the decompressor needs this table to find where a block
// starts. The published scheme names the table and its job only; here it is the
// simplest thing that does it: a RAM with one entry per fetch packet, filled
// by the program loader through the write port. Blocks are byte aligned, so
// an entry is a plain byte address.
//
// Timing: synchronous read, the entry for rd_idx appears on rd_addr the cycle
// after rd_en. Entry count (2^IDX_BITS = 1024 packets, i.e. 32 KB of
// uncompressed code) and address width (16 bits) are this design's choices.
module line_address_table #(
  parameter int unsigned IDX_BITS  = 10,
  parameter int unsigned ADDR_BITS = 16
) (
  input  logic                 clk,
  input  logic                 wr_en,
  input  logic [IDX_BITS-1:0]  wr_idx,
  input  logic [ADDR_BITS-1:0] wr_addr,
  input  logic                 rd_en,
  input  logic [IDX_BITS-1:0]  rd_idx,
  output logic [ADDR_BITS-1:0] rd_addr
);

  logic [ADDR_BITS-1:0] lat [2**IDX_BITS];

  always_ff @(posedge clk) begin
    if (wr_en) lat[wr_idx] <= wr_addr;
    if (rd_en) rd_addr <= lat[rd_idx];
  end

endmodule
