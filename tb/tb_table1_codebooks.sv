// tb_table1_codebooks: static-iid codebooks for codeword lengths N = 2..8,
// the trade-off study behind the choice of N = 4.
//
// For each N an iid_parallel_decoder with Prob(0) = 0.75 and 256-bit packets
// is built. The testbench has its own model of the codebook, computed with
// real arithmetic (left part = size*0.75 rounded to nearest, halves down,
// kept within 1..size-1). Checks per N:
//   * the model's mean run length per codeword for an iid source with
//     Prob(0) = 0.75 equals the published value for that N (2.312, 3.488,
//     4.752, 5.973, 7.216, 8.442, 9.681 bits) to 0.0005;
//   * every codeword, followed by copies of the all-ones codeword, decodes in
//     hardware to the model's runs;
//   * 40 random packets with Prob(0) = 0.75, compressed by the model, decode
//     to the original, with the right byte count.
// It prints the measured compressed size relative to the original for each
// N (the published N/mean ratio is 0.865 ... 0.826, before byte alignment).
module tb_table1_codebooks;
  import v2fcc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int finished = 0;
  localparam real AVE [7] = '{2.312, 3.488, 4.752, 5.973, 7.216, 8.442, 9.681};

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (finished == 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar N = 2; N <= 8; N++) begin : g_n
    localparam int MC = int'(iid_worst_chunks(256, 192, N));
    logic               blk_valid = 0, pkt_valid, pkt_short;
    logic [MC*N-1:0]    blk_data = '0;
    logic [255:0]       pkt_data;
    logic [$clog2(MC*N/8+1)-1:0] pkt_bytes;

    iid_parallel_decoder #(.CW_BITS_P(N)) u_dec (
      .clk, .rst_n, .blk_valid, .blk_data, .pkt_valid, .pkt_data, .pkt_bytes, .pkt_short);

    int          run_len  [1 << N];
    logic [63:0] run_bits [1 << N];   // first bit at bit 63

    // model codebook and mean run length
    function automatic real build_model();
      real ave;
      ave = 0.0;
      for (int w = 0; w < (1 << N); w++) begin
        int lo, size, l;
        real pr;
        lo = 0; size = 1 << N; pr = 1.0;
        run_len[w] = 0; run_bits[w] = '0;
        while (size > 1) begin
          l = int'($ceil(size * 0.75 - 0.5));
          if (l < 1) l = 1;
          if (l > size - 1) l = size - 1;
          if (w < lo + l) begin
            size = l; pr = pr * 0.75;
          end else begin
            run_bits[w][63 - run_len[w]] = 1'b1;
            lo += l; size -= l; pr = pr * 0.25;
          end
          run_len[w]++;
        end
        ave += pr * run_len[w];
      end
      return ave;
    endfunction

    // model decode of a codeword sequence into a 256-bit packet
    function automatic logic [255:0] model_decode(int cws [$]);
      logic [255:0] p;
      int pos;
      p = '0; pos = 0;
      foreach (cws[i])
        for (int k = 0; k < run_len[cws[i]] && pos < 256; k++) begin
          p[255 - pos] = run_bits[cws[i]][63 - k];
          pos++;
        end
      return p;
    endfunction

    task automatic present(int cws [$], output logic [255:0] got, output int bytes);
      @(negedge clk);
      blk_valid = 1;
      for (int k = 0; k < MC * N; k++) blk_data[k] = 1'($urandom);
      foreach (cws[i]) blk_data[MC*N-1 - i*N -: N] = N'(cws[i]);
      @(negedge clk);
      blk_valid = 0;
      got = pkt_data; bytes = int'(pkt_bytes);
    endtask

    initial begin : run
      real ave;
      int total_bytes;
      ave = build_model();
      checks++;
      if (ave < AVE[N-2] - 0.0005 || ave > AVE[N-2] + 0.0005) begin
        failures++; $display("N=%0d: mean run %f, published %f", N, ave, AVE[N-2]);
      end
      wait (rst_n);
      // every codeword, then all-ones codewords
      for (int w = 0; w < (1 << N); w++) begin
        int cws [$];
        logic [255:0] got;
        int bytes;
        cws.delete();
        cws.push_back(w);
        while (cws.size() < MC) cws.push_back((1 << N) - 1);
        present(cws, got, bytes);
        checks++;
        if (got !== model_decode(cws)) begin
          failures++; $display("N=%0d codeword %0d decodes wrong", N, w);
        end
      end
      // random packets
      total_bytes = 0;
      for (int t = 0; t < 40; t++) begin
        logic [255:0] pkt, got;
        int cws [$];
        int pos, lo, size, l, bytes;
        for (int i = 0; i < 256; i++) pkt[i] = (($urandom % 4) == 0);
        cws.delete();
        pos = 0;
        while (pos < 256) begin
          lo = 0; size = 1 << N;
          while (size > 1) begin
            bit b;
            b = (pos < 256) ? pkt[255 - pos] : 1'b1;   // pad with 1s
            pos++;
            l = int'($ceil(size * 0.75 - 0.5));
            if (l < 1) l = 1;
            if (l > size - 1) l = size - 1;
            if (!b) size = l; else begin lo += l; size -= l; end
          end
          cws.push_back(lo);
        end
        present(cws, got, bytes);
        checks++;
        if (got !== pkt || bytes != (cws.size() * N + 7) / 8) begin
          failures++; $display("N=%0d packet %0d: bytes %0d/%0d", N, t, bytes, (cws.size() * N + 7) / 8);
        end
        total_bytes += bytes;
      end
      $display("N=%0d: mean run %.3f bits, N/mean %.3f, measured size %.1f%% of original",
               N, ave, N / ave, 100.0 * total_bytes * 8 / (40 * 256));
      finished++;
    end
  end
endmodule
