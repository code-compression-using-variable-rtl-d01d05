// decoder_table: the Markov V2F decoder table, a single-port-read /
// single-port-write RAM of 2^ADDR_BITS words of WIDTH bits.
//
// At the defaults it holds 128 codebooks (one per Markov state) of 16 entries
// (one per 4-bit codeword), 24 bits each: 2048 x 24 bits = 6 KB, the size the
// published scheme gives. The address is {state, codeword}. The table is application
// specific, so it is a RAM written through the write port before decoding
// starts (the scheme allows RAM or ROM).
//
// Timing: a read presented with rd_en at a clock edge returns its word on
// rd_data after that edge (synchronous read, one cycle of latency); rd_data
// holds its value while rd_en is low. A write and a read of the same address
// in the same cycle return the old word. The table has no reset; the
// synchronous read and the lack of a reset are this design's choices.
module decoder_table #(
  parameter int unsigned ADDR_BITS = v2fcc_pkg::STATE_BITS + v2fcc_pkg::CW_BITS,
  parameter int unsigned WIDTH     = $bits(v2fcc_pkg::dec_entry_t)
) (
  input  logic                 clk,
  // load port
  input  logic                 wr_en,
  input  logic [ADDR_BITS-1:0] wr_addr,
  input  logic [WIDTH-1:0]     wr_data,
  // lookup port
  input  logic                 rd_en,
  input  logic [ADDR_BITS-1:0] rd_addr,
  output logic [WIDTH-1:0]     rd_data
);

  logic [WIDTH-1:0] mem [2**ADDR_BITS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
