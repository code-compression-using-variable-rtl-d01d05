// tb_iid_parallel_decoder: self-checking test of the one-cycle static-iid
// decoder.
//
// Part 1 uses a small instance with 2-bit codewords and 8-bit packets and
// Prob(0) = 0.75 to check the worked codebook example: codewords 00, 01, 10,
// 11 decode to 000, 001, 01, 1, so the byte 01 001 000 is coded 10 01 00,
// and a packet ending in 00 needs a padding 1 (001 -> 01).
// Part 2 uses the full-size instance (4-bit codewords, 256-bit packets):
// random packets are compressed by the reference encoder, one block is
// presented every cycle with unrelated bits after its end, and each result
// must appear the next cycle with the right packet and byte count.
module tb_iid_parallel_decoder;
  import v2f_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // small instance: N = 2, 8-bit packets, at most 8 codewords
  logic        s_valid = 0, s_pvalid, s_short;
  logic [15:0] s_blk = '0;
  logic [7:0]  s_pkt;
  logic [$clog2(16/8+1)-1:0] s_bytes;
  iid_parallel_decoder #(.PACKET_BITS_P(8), .CW_BITS_P(2), .P0_Q8_P(192), .MAX_CHUNKS(8))
    u_small (.clk, .rst_n, .blk_valid(s_valid), .blk_data(s_blk), .pkt_valid(s_pvalid),
             .pkt_data(s_pkt), .pkt_bytes(s_bytes), .pkt_short(s_short));

  // full-size instance
  localparam int MC = 128;
  logic          f_valid = 0, f_pvalid, f_short;
  logic [MC*4-1:0] f_blk = '0;
  logic [255:0]  f_pkt;
  logic [$clog2(MC*4/8+1)-1:0] f_bytes;
  iid_parallel_decoder u_full (.clk, .rst_n, .blk_valid(f_valid), .blk_data(f_blk),
                               .pkt_valid(f_pvalid), .pkt_data(f_pkt), .pkt_bytes(f_bytes),
                               .pkt_short(f_short));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [255:0] expq [$];
  int           bytq [$];
  int n_pad_bits = 0, n_pad_nib = 0, n_short = 0;

  initial begin
    if (u_full.MAX_CHUNKS != 128) begin
      failures++; $display("worst-case chunk count %0d, expected 128", u_full.MAX_CHUNKS);
    end
    checks++;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---- worked example: 01 001 000 -> 10 01 00 (+ unrelated bits)
    @(negedge clk);
    s_valid = 1; s_blk = 16'b10_01_00_11_10_11_01_00;
    @(negedge clk);
    s_valid = 0;
    check(s_pvalid && s_pkt == 8'b01001000, $sformatf("example decode %b", s_pkt));
    check(s_bytes == 1 && !s_short, "example byte count");
    // ---- padding example: 111111 00 -> 11x6, then 00+pad 1 -> 01
    @(negedge clk);
    s_valid = 1; s_blk = 16'b11_11_11_11_11_11_01_00;
    @(negedge clk);
    s_valid = 0;
    check(s_pvalid && s_pkt == 8'b11111100, $sformatf("padding decode %b", s_pkt));
    check(s_bytes == 2 && !s_short, "padding byte count");

    // ---- full size, back-to-back blocks
    make_model(1'b1, 0, 0, 1'b0);
    for (int i = 0; i < 60; i++) begin
      logic [7:0] b [];
      logic [255:0] p;
      p = (i == 0) ? '0 : (i == 1) ? '1 : random_packet(128 + $urandom % 100);
      void'(encode(p, b));
      if (last_pad_bits > 0) n_pad_bits++;
      if (last_pad_nibble != 0) n_pad_nib++;
      @(negedge clk);
      if (f_valid) begin
        check(f_pvalid && f_pkt == expq[0], $sformatf("packet %0d", i - 1));
        check(int'(f_bytes) == bytq[0] && !f_short, $sformatf("byte count %0d vs %0d", f_bytes, bytq[0]));
        void'(expq.pop_front()); void'(bytq.pop_front());
      end
      f_valid = 1;
      for (int k = 0; k < MC * 4; k++) f_blk[k] = 1'($urandom);
      foreach (b[k]) f_blk[MC*4-1-8*k -: 8] = b[k];
      expq.push_back(p); bytq.push_back(b.size());
    end
    @(negedge clk);
    check(f_pvalid && f_pkt == expq[0], "last packet");
    check(int'(f_bytes) == bytq[0], "last byte count");
    f_valid = 1;
    f_blk = '0;                         // 128 codewords 0000 -> far more than 256 bits
    @(negedge clk);
    check(!f_short, "long block not short");
    f_blk = '1;                         // 128 codewords 1111 -> "11" each = 256 bits
    @(negedge clk);
    check(f_pkt == '1 && f_bytes == 64 && !f_short, "all-ones block");
    f_valid = 0;
    @(negedge clk);
    check(!f_pvalid, "valid follows blk_valid");
    check(n_pad_bits > 0 && n_pad_nib > 0, "padding bits and alignment nibbles seen");
    $display("padding bits %0d, alignment nibbles %0d", n_pad_bits, n_pad_nib);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
