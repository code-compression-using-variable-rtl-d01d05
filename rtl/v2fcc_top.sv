// v2fcc_top: instruction decompression unit for variable-to-fixed (V2F)
// compressed VLIW code, placed between compressed program memory and the
// instruction cache. It produces 256-bit fetch packets.
//
// It holds the two decompressors of the scheme side by side, each with its
// own ports:
//   * Markov path (the scheme's best-compressing configuration, 32x4 Markov
//     model, 4-bit codewords): block_fetch turns a packet request into a LAT
//     lookup and a byte stream from program memory; markov_v2f_decoder decodes
//     it one codeword per cycle through its 6 KB decoder table.
//   * Static-iid path: iid_parallel_decoder decodes a whole compressed block
//     in one cycle with the fixed 16-entry codebook (Prob(0) = 0.75).
// The Markov path fetches from memory itself; the iid path takes a block that
// the surrounding system has already gathered (its bus carries the largest
// block possible), and reports the block's byte size.
//
// Timing: see the submodules. Markov path: packet ready roughly one cycle per
// codeword plus three cycles after the request; iid path: one block per
// cycle, result one cycle later.
module v2fcc_top
  import v2fcc_pkg::*;
#(
  parameter int unsigned LAT_IDX_BITS = 10,
  parameter int unsigned MEM_ADDR_BITS = 16,
  parameter int unsigned IID_CHUNKS = iid_worst_chunks(PACKET_BITS, P0_Q8, CW_BITS)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // ---- Markov path -------------------------------------------------------
  input  logic                       tbl_wr_en,
  input  logic [STATE_BITS+CW_BITS-1:0] tbl_wr_addr,
  input  dec_entry_t                 tbl_wr_data,
  input  logic                       lat_wr_en,
  input  logic [LAT_IDX_BITS-1:0]    lat_wr_idx,
  input  logic [MEM_ADDR_BITS-1:0]   lat_wr_addr,
  input  logic                       req_valid,
  input  logic [LAT_IDX_BITS-1:0]    req_idx,
  output logic                       req_ready,
  output logic                       mem_rd_en,
  output logic [MEM_ADDR_BITS-1:0]   mem_addr,
  input  logic [7:0]                 mem_rdata,
  output logic                       mk_pkt_valid,
  output logic [PACKET_BITS-1:0]     mk_pkt_data,
  input  logic                       mk_pkt_ready,
  // ---- static-iid path ---------------------------------------------------
  input  logic                       iid_blk_valid,
  input  logic [IID_CHUNKS*CW_BITS-1:0] iid_blk_data,
  output logic                       iid_pkt_valid,
  output logic [PACKET_BITS-1:0]     iid_pkt_data,
  output logic [$clog2(IID_CHUNKS*CW_BITS/8+1)-1:0] iid_pkt_bytes,
  output logic                       iid_pkt_short
);

  logic       dec_restart, dec_valid, dec_ready, dec_blk_done;
  logic [7:0] dec_data;

  block_fetch #(.IDX_BITS(LAT_IDX_BITS), .ADDR_BITS(MEM_ADDR_BITS)) u_fetch (
    .clk          (clk),
    .rst_n        (rst_n),
    .lat_wr_en    (lat_wr_en),
    .lat_wr_idx   (lat_wr_idx),
    .lat_wr_addr  (lat_wr_addr),
    .req_valid    (req_valid),
    .req_idx      (req_idx),
    .req_ready    (req_ready),
    .mem_rd_en    (mem_rd_en),
    .mem_addr     (mem_addr),
    .mem_rdata    (mem_rdata),
    .dec_restart  (dec_restart),
    .dec_valid    (dec_valid),
    .dec_data     (dec_data),
    .dec_ready    (dec_ready),
    .dec_blk_done (dec_blk_done)
  );

  markov_v2f_decoder u_markov (
    .clk         (clk),
    .rst_n       (rst_n),
    .restart     (dec_restart),
    .tbl_wr_en   (tbl_wr_en),
    .tbl_wr_addr (tbl_wr_addr),
    .tbl_wr_data (tbl_wr_data),
    .in_valid    (dec_valid),
    .in_data     (dec_data),
    .in_ready    (dec_ready),
    .pkt_valid   (mk_pkt_valid),
    .pkt_data    (mk_pkt_data),
    .pkt_ready   (mk_pkt_ready),
    .blk_done    (dec_blk_done)
  );

  iid_parallel_decoder #(.MAX_CHUNKS(IID_CHUNKS)) u_iid (
    .clk       (clk),
    .rst_n     (rst_n),
    .blk_valid (iid_blk_valid),
    .blk_data  (iid_blk_data),
    .pkt_valid (iid_pkt_valid),
    .pkt_data  (iid_pkt_data),
    .pkt_bytes (iid_pkt_bytes),
    .pkt_short (iid_pkt_short)
  );

endmodule
