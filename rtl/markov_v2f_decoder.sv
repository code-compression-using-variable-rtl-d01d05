// markov_v2f_decoder: table-driven decompression core for Markov
// variable-to-fixed (V2F) coded programs.
//
// The compressed block of one fetch packet is a byte-aligned run of N-bit
// codewords (N = CW_BITS = 4). Each Markov state has its own codebook, so a
// codeword can only be decoded once the previous one has told which state
// (codebook) comes next. The core keeps the current state, forms the table
// address {state, codeword} (the state shifted left by N bits with the
// codeword in the low bits), and reads one decoder_table entry: the number of
// decoded bits, the decoded bits themselves and the next state. No comparison
// is needed. The decoded bits are appended to a fetch-packet accumulator.
//
// Every block starts in state 0. When the packet has PACKET_BITS bits, the
// bits beyond that (padding the encoder added to reach a unit interval) are
// dropped, the packet is handed out, the state returns to 0, and whatever is
// left of the current byte (byte-alignment padding) is discarded, so the
// next byte begins the next block.
//
// Interfaces:
//   tbl_*   load port of the decoder table (address {state, codeword}).
//   in_*    compressed bytes, valid/ready; the codeword in the high nibble is
//           decoded first (first stream bit = byte MSB).
//   pkt_*   decoded fetch packets, valid/ready; the first decoded bit is
//           pkt_data[PACKET_BITS-1]. pkt_data holds while pkt_valid is high.
//   restart abandons the block in progress (used on a jump to another block).
//   blk_done pulses in the cycle a completed packet first shows on pkt_*.
//
// Timing: one codeword lookup per clock cycle, with at most one lookup in
// flight: the table word read at one edge feeds the address of the next read
// in the same cycle. A packet that needs K codewords is on pkt_* K+1 clock
// edges after the edge that accepted its first byte, if bytes arrive without
// gaps. In a continuous stream packets complete K cycles apart, plus one
// cycle when the previous block ended in an alignment nibble. The packet
// register lets the next block be decoded while a packet waits on pkt_ready.
//
// From the published scheme: table layout, address formation, state-0 start,
// truncation of padding bits and byte alignment. This design's choices: the
// synchronous-read table, the byte-wide input, the bit order, the
// valid/ready handshakes, restart, and the output register.
module markov_v2f_decoder
  import v2fcc_pkg::*;
#(
  parameter int unsigned PACKET_BITS_P = v2fcc_pkg::PACKET_BITS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     restart,
  // decoder table load port
  input  logic                     tbl_wr_en,
  input  logic [STATE_BITS+CW_BITS-1:0] tbl_wr_addr,
  input  dec_entry_t               tbl_wr_data,
  // compressed byte stream
  input  logic                     in_valid,
  input  logic [7:0]               in_data,
  output logic                     in_ready,
  // decoded fetch packets
  output logic                     pkt_valid,
  output logic [PACKET_BITS_P-1:0] pkt_data,
  input  logic                     pkt_ready,
  output logic                     blk_done   // pulses as a packet completes
);

  localparam int unsigned CHUNKS_PER_BYTE = 8 / CW_BITS;
  localparam int unsigned IDX_BITS = (CHUNKS_PER_BYTE > 1) ? $clog2(CHUNKS_PER_BYTE) : 1;
  localparam int unsigned CNT_BITS = $clog2(PACKET_BITS_P + 1);

  // input byte holding register
  logic [7:0]          byte_q;
  logic                byte_vld;
  logic [IDX_BITS-1:0] chunk_idx;    // next codeword of byte_q to decode

  // lookup state
  logic                   rd_pend;   // a table word arrives this cycle
  logic [STATE_BITS-1:0]  st_q;      // state when no word arrives
  dec_entry_t             ent;
  logic [STATE_BITS+CW_BITS-1:0] rd_addr;

  // packet assembly
  logic [PACKET_BITS_P-1:0] acc;
  logic [CNT_BITS-1:0]      cnt;

  logic [CNT_BITS-1:0]      room, take;
  logic                     done;
  logic [STATE_BITS-1:0]    state_now;
  logic                     drop_rest, byte_avail, slot_ok, issue, last_chunk;
  logic                     byte_leaving;
  logic [CW_BITS-1:0]       chunk;
  logic [PACKET_BITS_P-1:0] acc_next;

  decoder_table u_table (
    .clk     (clk),
    .wr_en   (tbl_wr_en),
    .wr_addr (tbl_wr_addr),
    .wr_data (tbl_wr_data),
    .rd_en   (issue),
    .rd_addr (rd_addr),
    .rd_data (ent)
  );

  always_comb begin
    room      = CNT_BITS'(PACKET_BITS_P) - cnt;
    done      = rd_pend && (CNT_BITS'(ent.len) >= room);
    take      = done ? room : CNT_BITS'(ent.len);
    state_now = !rd_pend ? st_q : (done ? '0 : ent.next_state);
    // rest of the byte after the block's last codeword is alignment padding
    drop_rest  = done && byte_vld && (chunk_idx != '0);
    byte_avail = byte_vld && !drop_rest && !restart;
    slot_ok    = !pkt_valid || pkt_ready;
    issue      = byte_avail && slot_ok;
    chunk      = byte_q[8-CW_BITS*(int'(chunk_idx)+1) +: CW_BITS];
    rd_addr    = {state_now, chunk};
    last_chunk = (int'(chunk_idx) == CHUNKS_PER_BYTE - 1);
    byte_leaving = (issue && last_chunk) || drop_rest;
    in_ready   = !restart && (!byte_vld || byte_leaving);
    // append `take` decoded bits, first decoded bit towards the MSB
    acc_next   = PACKET_BITS_P'(({acc, ent.bits} << take) >> SEQ_BITS);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      byte_q    <= '0;
      byte_vld  <= 1'b0;
      chunk_idx <= '0;
      rd_pend   <= 1'b0;
      st_q      <= '0;
      acc       <= '0;
      cnt       <= '0;
      pkt_valid <= 1'b0;
      pkt_data  <= '0;
      blk_done  <= 1'b0;
    end else begin
      blk_done <= !restart && done;
      if (pkt_valid && pkt_ready) pkt_valid <= 1'b0;
      if (restart) begin
        byte_vld  <= 1'b0;
        chunk_idx <= '0;
        rd_pend   <= 1'b0;
        st_q      <= '0;
        acc       <= '0;
        cnt       <= '0;
      end else begin
        rd_pend <= issue;
        st_q    <= state_now;
        if (rd_pend) begin
          if (done) begin
            pkt_data  <= acc_next;
            pkt_valid <= 1'b1;
            acc       <= '0;
            cnt       <= '0;
          end else begin
            acc <= acc_next;
            cnt <= cnt + take;
          end
        end
        if (issue) chunk_idx <= last_chunk ? '0 : chunk_idx + 1'b1;
        if (drop_rest) chunk_idx <= '0;
        if (byte_leaving) byte_vld <= 1'b0;
        if (in_valid && in_ready) begin
          byte_q   <= in_data;
          byte_vld <= 1'b1;
        end
      end
    end
  end

  // A table entry in use must decode to at least one bit.
  assert property (@(posedge clk) disable iff (!rst_n) rd_pend |-> ent.len != '0)
    else $error("decoder table entry with zero length");
  // The packet stays put until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   pkt_valid && !pkt_ready |=> pkt_valid && $stable(pkt_data))
    else $error("fetch packet dropped before pkt_ready");

endmodule
