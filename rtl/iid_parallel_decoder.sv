// iid_parallel_decoder: one-cycle decompressor for V2F code built with the
// static iid model.
//
// With a static iid model every N-bit codeword (N = CW_BITS_P = 4) decodes
// through the same 16-entry codebook, independently of its neighbours. So
// the whole compressed block of a fetch packet is cut into N-bit chunks and
// all of them are decoded at once: each lane looks its chunk up in its own
// copy of the codebook, a prefix sum of the run lengths gives every lane's
// bit offset in the packet, and each run is shifted to its offset and ORed
// into the packet. Bits past PACKET_BITS_P (the encoder's padding) fall off
// the end.
//
// The codebook is a constant table built at elaboration from the model
// probability P0_Q8_P (Prob(0) in 1/256 units, default 0.75) by the interval
// splitting rule in v2fcc_pkg::iid_run; codeword w decodes to the bit path
// of unit interval [w, w+1). RUN_BITS, the width of a codebook run, defaults
// to the longest run of that codebook (8 bits for N = 4 and 0.75; 15 for
// N = 7, 17 for N = 8).
//
// Interface: blk_data holds MAX_CHUNKS codewords, the first one in the top
// CW_BITS_P bits; bits after the block's end are ignored. MAX_CHUNKS defaults
// to the worst case, PACKET_BITS_P divided by the shortest run in the
// codebook (128 for the defaults). pkt_data returns the fetch packet, first
// bit at the MSB; pkt_bytes is the byte-aligned size of the compressed
// block, i.e. how far the next block starts; pkt_short flags a block whose
// codewords decode to fewer than PACKET_BITS_P bits.
//
// Timing: one block per clock cycle; outputs are registered, so a block
// presented at one edge is on pkt_* after it.
//
// From the scheme: the 4-bit codewords, the parallel decoding of all chunks
// in one cycle, the 0.75 probability, the codeword-to-interval assignment,
// the padding and byte alignment rules. This design's choices: the exact
// rounding rule (chosen because it reproduces the scheme's published
// codebook statistics), the prefix-sum/shift assembly, the block bus width
// and the output flags.
module iid_parallel_decoder
  import v2fcc_pkg::*;
#(
  parameter int unsigned PACKET_BITS_P = v2fcc_pkg::PACKET_BITS,
  parameter int unsigned CW_BITS_P     = v2fcc_pkg::CW_BITS,
  parameter int unsigned P0_Q8_P       = v2fcc_pkg::P0_Q8,
  parameter int unsigned MAX_CHUNKS    = iid_worst_chunks(PACKET_BITS_P, P0_Q8_P, CW_BITS_P),
  parameter int unsigned RUN_BITS      = iid_max_run(P0_Q8_P, CW_BITS_P)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            blk_valid,
  input  logic [MAX_CHUNKS*CW_BITS_P-1:0] blk_data,
  output logic                            pkt_valid,
  output logic [PACKET_BITS_P-1:0]        pkt_data,
  output logic [$clog2(MAX_CHUNKS*CW_BITS_P/8+1)-1:0] pkt_bytes,
  output logic                            pkt_short
);

  localparam int unsigned NCW       = 2 ** CW_BITS_P;
  localparam int unsigned LENW      = $clog2(RUN_BITS + 1);
  localparam int unsigned ENTRY     = LENW + RUN_BITS;
  localparam int unsigned OFF_BITS  = $clog2(MAX_CHUNKS * RUN_BITS + 1);
  localparam int unsigned BYTE_BITS = $clog2(MAX_CHUNKS * CW_BITS_P / 8 + 1);
  localparam int unsigned WIDE      = PACKET_BITS_P + RUN_BITS;

  typedef struct packed {
    logic [LENW-1:0]     len;
    logic [RUN_BITS-1:0] bits;  // first decoded bit at the MSB
  } entry_t;

  function automatic logic [NCW*ENTRY-1:0] build_codebook();
    logic [NCW*ENTRY-1:0] t;
    run_t r;
    for (int unsigned w = 0; w < NCW; w++) begin
      r = iid_run(P0_Q8_P, CW_BITS_P, w);
      t[w*ENTRY +: ENTRY] = {LENW'(r.len), r.bits[63 -: RUN_BITS]};
    end
    return t;
  endfunction

  localparam logic [NCW*ENTRY-1:0] CODEBOOK = build_codebook();

  entry_t               lane   [MAX_CHUNKS];
  logic [OFF_BITS-1:0]  offset [MAX_CHUNKS+1];
  logic [WIDE-1:0]      packet_wide;
  logic [OFF_BITS-1:0]  used_chunks;
  logic [BYTE_BITS-1:0] used_bytes;
  logic                 enough;

  always_comb begin
    offset[0]   = '0;
    packet_wide = '0;
    used_chunks = '0;
    enough      = 1'b0;
    for (int i = 0; i < MAX_CHUNKS; i++) begin
      lane[i] = CODEBOOK[blk_data[(MAX_CHUNKS-1-i)*CW_BITS_P +: CW_BITS_P]*ENTRY +: ENTRY];
      offset[i+1] = offset[i] + OFF_BITS'(lane[i].len);
      packet_wide = packet_wide | ({lane[i].bits, {PACKET_BITS_P{1'b0}}} >> offset[i]);
      // the block ends with the first codeword that reaches PACKET_BITS_P
      if (!enough && offset[i+1] >= OFF_BITS'(PACKET_BITS_P)) begin
        enough      = 1'b1;
        used_chunks = OFF_BITS'(i + 1);
      end
    end
    if (!enough) used_chunks = OFF_BITS'(MAX_CHUNKS);
    used_bytes = BYTE_BITS'((used_chunks * CW_BITS_P + 7) / 8);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pkt_valid <= 1'b0;
      pkt_data  <= '0;
      pkt_bytes <= '0;
      pkt_short <= 1'b0;
    end else begin
      pkt_valid <= blk_valid;
      if (blk_valid) begin
        pkt_data  <= packet_wide[WIDE-1 -: PACKET_BITS_P];
        pkt_bytes <= used_bytes;
        pkt_short <= !enough;
      end
    end
  end

endmodule
