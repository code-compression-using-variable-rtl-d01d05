// tb_v2fcc_top: end-to-end test of the decompression unit at its default
// (full) size.
//
// Markov path: a 32x4 Markov model with random per-state probabilities and
// shuffled codeword assignment is built by the reference model; all 2048
// decoder-table words are loaded; 64 fetch packets drawn from the same model
// (the first all zeros) are compressed
// and laid out back to back from byte address 5 of a program-memory model
// whose start addresses go into the LAT. Packets are then requested in
// sequential runs and random jumps; each returned packet is compared with the
// original, and the packet must be on the outputs codewords + 3 clock edges
// after the edge that accepted the request.
// Static-iid path: 64 random packets with Prob(0) = 0.75 are compressed with
// the fixed codebook
// and decoded one per cycle.
// Counted mechanisms (each must occur): end-of-packet padding bits and
// alignment nibbles on both paths, output back-pressure, and jumps to a
// non-sequential packet.
module tb_v2fcc_top;
  import v2fcc_pkg::*;
  import v2f_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tbl_wr_en = 0;
  logic [10:0] tbl_wr_addr = '0;
  dec_entry_t tbl_wr_data = '0;
  logic lat_wr_en = 0;
  logic [9:0] lat_wr_idx = '0, req_idx = '0;
  logic [15:0] lat_wr_addr = '0, mem_addr;
  logic req_valid = 0, req_ready, mem_rd_en;
  logic [7:0] mem_rdata;
  logic mk_pkt_valid, mk_pkt_ready = 0;
  logic [255:0] mk_pkt_data;
  logic iid_blk_valid = 0, iid_pkt_valid, iid_pkt_short;
  logic [511:0] iid_blk_data = '0;
  logic [255:0] iid_pkt_data;
  logic [6:0] iid_pkt_bytes;

  v2fcc_top dut (.*);

  logic [7:0] mem [65536];
  always @(posedge clk) if (mem_rd_en) mem_rdata <= mem[mem_addr];

  localparam int NPKT = 64;
  logic [255:0] pkt [NPKT];
  int chunks [NPKT];
  int checks = 0, failures = 0;
  int n_pad_bits = 0, n_pad_nib = 0, n_stall = 0, n_jump = 0, n_seq = 0;
  int n_iid_pad_bits = 0, n_iid_pad_nib = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int a, prev;
    foreach (mem[i]) mem[i] = 8'($urandom);
    mem_rdata = '0;
    make_model(1'b0, 26, 230, 1'b1);
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---- load the decoder table
    for (int s = 0; s < NSTATES; s++)
      for (int c = 0; c < 16; c++) begin
        @(negedge clk);
        tbl_wr_en = 1; tbl_wr_addr = 11'(s * 16 + c); tbl_wr_data = table_word(s, c);
      end
    @(negedge clk) tbl_wr_en = 0;

    // ---- compress the program, fill memory and the LAT
    a = 5;
    for (int i = 0; i < NPKT; i++) begin
      logic [7:0] b [];
      pkt[i] = (i == 0) ? '0 : model_packet();
      void'(encode(pkt[i], b));
      chunks[i] = last_chunks;
      if (last_pad_bits > 0) n_pad_bits++;
      if (last_pad_nibble != 0) n_pad_nib++;
      foreach (b[k]) mem[a + k] = b[k];
      @(negedge clk);
      lat_wr_en = 1; lat_wr_idx = 10'(i); lat_wr_addr = 16'(a);
      a += b.size();
    end
    @(negedge clk) lat_wr_en = 0;
    $display("program: %0d packets, %0d bytes compressed from %0d (%0d%%)",
             NPKT, a - 5, NPKT * 32, (a - 5) * 100 / (NPKT * 32));

    // ---- Markov path: fetch packets
    prev = -1;
    for (int r = 0; r < 150; r++) begin
      int k, lat_cyc;
      k = ($urandom % 3 == 0 || prev < 0 || prev == NPKT - 1) ? $urandom % NPKT : prev + 1;
      if (prev >= 0 && k != prev + 1) n_jump++; else n_seq++;
      prev = k;
      @(negedge clk);
      req_valid = 1; req_idx = 10'(k);
      #1 check(req_ready, "request accepted");
      lat_cyc = 0;
      @(negedge clk);
      req_valid = 0;
      while (!mk_pkt_valid && lat_cyc < 400) begin
        @(negedge clk);
        lat_cyc++;
      end
      check(lat_cyc == chunks[k] + 3,
            $sformatf("packet %0d latency %0d, %0d codewords", k, lat_cyc, chunks[k]));
      // processor takes the packet after a random delay
      forever begin
        mk_pkt_ready = ($urandom % 3 == 0);
        #1;
        if (mk_pkt_valid && !mk_pkt_ready) n_stall++;
        if (mk_pkt_valid && mk_pkt_ready) break;
        @(negedge clk);
      end
      check(mk_pkt_data == pkt[k], $sformatf("packet %0d data", k));
      @(negedge clk);
      mk_pkt_ready = 0;
      while (!req_ready) @(negedge clk);
    end

    // ---- static-iid path
    make_model(1'b1, 0, 0, 1'b0);
    for (int i = 0; i <= NPKT; i++) begin
      logic [7:0] b [];
      logic [255:0] p;
      p = random_packet(192);
      void'(encode(p, b));
      if (last_pad_bits > 0) n_iid_pad_bits++;
      if (last_pad_nibble != 0) n_iid_pad_nib++;
      if (i > 0) begin
        #1 check(iid_pkt_valid && iid_pkt_data == pkt[i-1] && !iid_pkt_short,
                 $sformatf("iid packet %0d", i - 1));
        check(iid_pkt_bytes == 7'(chunks[i-1]), "iid byte count");
      end
      if (i == NPKT) break;
      pkt[i] = p; chunks[i] = b.size();
      iid_blk_valid = 1;
      for (int k = 0; k < 512; k++) iid_blk_data[k] = 1'($urandom);
      foreach (b[k]) iid_blk_data[511 - 8*k -: 8] = b[k];
      @(negedge clk);
    end
    iid_blk_valid = 0;

    check(n_pad_bits > 0 && n_pad_nib > 0 && n_stall > 0 && n_jump > 0 && n_seq > 0,
          "Markov mechanisms exercised");
    check(n_iid_pad_bits > 0 && n_iid_pad_nib > 0, "iid mechanisms exercised");
    $display("Markov: padding bits %0d, alignment nibbles %0d, stall cycles %0d, jumps %0d, sequential %0d",
             n_pad_bits, n_pad_nib, n_stall, n_jump, n_seq);
    $display("iid: padding bits %0d, alignment nibbles %0d", n_iid_pad_bits, n_iid_pad_nib);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
