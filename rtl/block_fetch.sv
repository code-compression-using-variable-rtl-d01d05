// block_fetch: random-access front end of the Markov decompression path.
//
// A fetch-packet request names an uncompressed packet index. The unit reads
// the packet's compressed start address from the line address table (LAT),
// restarts the decoder so that decoding begins in Markov state 0, and then
// streams the block's bytes from compressed program memory to the decoder
// until the decoder reports the packet complete. Blocks are byte aligned, so
// a LAT entry is a byte address and the stream simply counts up from it; the
// block's length need not be known, since the decoder itself finds the end.
//
// Interfaces:
//   lat_*   LAT load port (one byte address per fetch packet).
//   req_*   packet requests, valid/ready; ready only while idle.
//   mem_*   compressed program memory read port: mem_rd_en with mem_addr at
//           one edge, the byte on mem_rdata after it, held until the next
//           read (a synchronous-read memory).
//   dec_*   byte stream, restart and completion pulse of markov_v2f_decoder.
//
// Timing: the LAT is read in the cycle the request is accepted, the first
// memory read is issued the cycle after, and from the cycle after that a
// byte is offered on dec_* every cycle the decoder takes one; the next byte
// is read in the cycle the current one is taken.
//
// The published scheme names the LAT and puts the decompressor between program
// memory and the cache; the sequencing, the handshakes and the memory timing
// are this design's choices.
module block_fetch #(
  parameter int unsigned IDX_BITS  = 10,
  parameter int unsigned ADDR_BITS = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // LAT load port
  input  logic                 lat_wr_en,
  input  logic [IDX_BITS-1:0]  lat_wr_idx,
  input  logic [ADDR_BITS-1:0] lat_wr_addr,
  // packet requests
  input  logic                 req_valid,
  input  logic [IDX_BITS-1:0]  req_idx,
  output logic                 req_ready,
  // compressed program memory
  output logic                 mem_rd_en,
  output logic [ADDR_BITS-1:0] mem_addr,
  input  logic [7:0]           mem_rdata,
  // decoder side
  output logic                 dec_restart,
  output logic                 dec_valid,
  output logic [7:0]           dec_data,
  input  logic                 dec_ready,
  input  logic                 dec_blk_done
);

  typedef enum logic [1:0] {S_IDLE, S_LAT, S_STREAM} fetch_state_e;

  fetch_state_e         state_q;
  logic [ADDR_BITS-1:0] addr_q;
  logic [ADDR_BITS-1:0] lat_addr;

  line_address_table #(.IDX_BITS(IDX_BITS), .ADDR_BITS(ADDR_BITS)) u_lat (
    .clk     (clk),
    .wr_en   (lat_wr_en),
    .wr_idx  (lat_wr_idx),
    .wr_addr (lat_wr_addr),
    .rd_en   (req_valid && req_ready),
    .rd_idx  (req_idx),
    .rd_addr (lat_addr)
  );

  always_comb begin
    req_ready   = (state_q == S_IDLE);
    dec_restart = req_valid && req_ready;
    dec_valid   = (state_q == S_STREAM) && !dec_blk_done;
    dec_data    = mem_rdata;
    mem_rd_en   = 1'b0;
    mem_addr    = addr_q;
    case (state_q)
      S_LAT: begin
        mem_rd_en = 1'b1;
        mem_addr  = lat_addr;
      end
      S_STREAM: mem_rd_en = dec_valid && dec_ready;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      addr_q  <= '0;
    end else begin
      case (state_q)
        S_IDLE:   if (req_valid) state_q <= S_LAT;
        S_LAT: begin
          addr_q  <= lat_addr + 1'b1;
          state_q <= S_STREAM;
        end
        S_STREAM: begin
          if (mem_rd_en) addr_q <= addr_q + 1'b1;
          if (dec_blk_done) state_q <= S_IDLE;
        end
        default:  state_q <= S_IDLE;
      endcase
    end
  end

endmodule
