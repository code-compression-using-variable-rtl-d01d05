// tb_markov_v2f_decoder: self-checking test of the Markov V2F decoder.
//
// Builds a 32x4 Markov model with random per-state probabilities and random
// codeword assignment, loads the 2048-word decoder table, compresses random
// fetch packets with the reference encoder and streams the bytes through the
// decoder. Every packet is compared with its original. Phase 1 uses random
// input gaps and output back-pressure; phase 2 streams without gaps and
// checks the rate: one codeword per cycle, so a packet completes as many
// cycles after the previous one as it has codewords, plus one if the previous
// block ended in an alignment nibble (that byte is dropped in the cycle the
// block completes). Phase 3 abandons a block half way with
// restart and checks that the next block still decodes. Phase 4 replays
// the lookup printed in the decoder figure (state 0010011, codeword 0100,
// entry address 00100110100, decoded bits 001001, next state 0100101). Counts how often the
// end-of-packet padding bits, the alignment nibble and back-pressure occurred.
//
// Inputs are driven at the falling edge; a handshake is sampled 1 ns later,
// when everything the next rising edge will see is settled.
module tb_markov_v2f_decoder;
  import v2fcc_pkg::*;
  import v2f_ref_pkg::*;

  logic clk = 0, rst_n = 0, restart = 0;
  logic tbl_wr_en = 0;
  logic [10:0] tbl_wr_addr = '0;
  dec_entry_t tbl_wr_data = '0;
  logic in_valid = 0, in_ready;
  logic [7:0] in_data = '0;
  logic pkt_valid, pkt_ready = 0, blk_done;
  logic [255:0] pkt_data;

  int checks = 0, failures = 0;
  int n_pad_bits = 0, n_pad_nib = 0, n_stall = 0, n_rate = 0;

  always #5 clk = ~clk;

  markov_v2f_decoder dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0]   byteq [$];
  logic [255:0] expq  [$];
  int           lenq  [$];   // codewords of each expected packet
  int           padq  [$];   // 1 if its block ends with an alignment nibble
  int           prev_pad = 0;
  bit gaps = 1, bp = 1, rate_on = 0;
  int got = 0, cycle = 0, last_done = -1;

  initial begin
    bit in_fire;
    forever begin
      @(negedge clk);
      cycle++;
      if (in_fire) void'(byteq.pop_front());
      in_valid  = (byteq.size() > 0) && (!gaps || ($urandom % 4 != 0));
      in_data   = (byteq.size() > 0) ? byteq[0] : 8'h00;
      pkt_ready = !bp || ($urandom % 3 != 0);
      #1;
      in_fire = in_valid && in_ready && !restart;
      if (blk_done) begin
        // packet completed at the previous rising edge
        if (rate_on && last_done >= 0) begin
          checks++; n_rate++;
          if (cycle - last_done != lenq[0] + prev_pad) begin
            failures++;
            $display("rate: %0d cycles for a %0d-codeword block", cycle - last_done, lenq[0]);
          end
        end
        last_done = cycle;
      end
      if (pkt_valid && !pkt_ready) n_stall++;
      if (pkt_valid && pkt_ready) begin
        checks++; got++;
        if (expq.size() == 0) begin
          failures++; $display("unexpected packet");
        end else begin
          if (pkt_data !== expq[0]) begin
            failures++;
            $display("packet %0d mismatch\n got %h\n exp %h", got, pkt_data, expq[0]);
          end
          void'(expq.pop_front());
          void'(lenq.pop_front());
          prev_pad = padq.pop_front();
        end
      end
    end
  end

  task automatic add_packet(logic [255:0] p);
    logic [7:0] b [];
    void'(encode(p, b));
    if (last_pad_bits > 0) n_pad_bits++;
    if (last_pad_nibble != 0) n_pad_nib++;
    foreach (b[i]) byteq.push_back(b[i]);
    expq.push_back(p);
    lenq.push_back(last_chunks);
    padq.push_back(last_pad_nibble);
  endtask

  initial begin
    make_model(1'b0, 26, 230, 1'b1);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NSTATES; s++)
      for (int c = 0; c < 16; c++) begin
        @(negedge clk);
        tbl_wr_en = 1; tbl_wr_addr = 11'(s * 16 + c); tbl_wr_data = table_word(s, c);
      end
    @(negedge clk) tbl_wr_en = 0;

    // phase 1: random gaps and back-pressure
    add_packet('0);
    add_packet('1);
    for (int i = 0; i < 30; i++) add_packet(random_packet(64 + $urandom % 180));
    wait (expq.size() == 0);
    repeat (5) @(posedge clk);

    // phase 2: continuous stream, rate check
    gaps = 0; bp = 0; last_done = -1; rate_on = 1;
    @(negedge clk);
    for (int i = 0; i < 20; i++) add_packet(random_packet(64 + $urandom % 180));
    wait (expq.size() == 0);
    rate_on = 0;
    repeat (5) @(posedge clk);

    // phase 3: restart in the middle of a block
    gaps = 1; bp = 1;
    begin
      logic [7:0] b [];
      void'(encode(random_packet(192), b));
      for (int i = 0; i < b.size() / 2; i++) byteq.push_back(b[i]);
      wait (byteq.size() == 0);
      @(posedge clk);
      @(negedge clk);
      #2 restart = 1;
      @(negedge clk);
      #2 restart = 0;
    end
    add_packet(random_packet(150));
    wait (expq.size() == 0);
    repeat (5) @(posedge clk);

    // phase 4: the worked lookup of the decoder figure. State 0 codeword 0
    // leads to state 0010011; there codeword 0100 reads entry 00100110100,
    // which decodes to 001001 and leads to state 0100101; that state's
    // codewords give 13-bit runs until the packet is full.
    begin
      logic [255:0] exp;
      logic [12:0]  run;
      logic [511:0] w;
      int nb;
      @(negedge clk);
      tbl_wr_en = 1; tbl_wr_addr = 11'h000;
      tbl_wr_data = '{len: 4'd10, bits: 13'b1011001110_000, next_state: 7'b0010011};
      @(negedge clk);
      tbl_wr_addr = 11'b0010011_0100;
      tbl_wr_data = '{len: 4'd6, bits: 13'b001001_0000000, next_state: 7'b0100101};
      for (int c = 0; c < 16; c++) begin
        @(negedge clk);
        tbl_wr_addr = {7'b0100101, 4'(c)};
        tbl_wr_data = '{len: 4'd13, bits: 13'h1A5B ^ 13'(c * 77), next_state: 7'b0100101};
      end
      @(negedge clk) tbl_wr_en = 0;
      // 10 + 6 + 19*13 = 263 bits: 21 codewords, 11 bytes
      w = '0; nb = 0;
      w[511 -: 16] = 16'b1011001110_001001; nb = 16;
      byteq.push_back(8'h04);
      for (int i = 0; i < 19; i++) begin
        logic [3:0] c;
        c = 4'($urandom);
        run = 13'h1A5B ^ 13'(int'(c) * 77);
        w[511 - nb -: 13] = run; nb += 13;
        if (i % 2 == 0) byteq.push_back({c, 4'h0});
        else byteq[$] = {byteq[$][7:4], c};
      end
      exp = w[511 -: 256];
      expq.push_back(exp); lenq.push_back(21); padq.push_back(1);
      wait (expq.size() == 0);
      repeat (3) @(posedge clk);
    end

    checks++;
    if (got != 32 + 20 + 1 + 1) begin failures++; $display("got %0d packets", got); end
    checks++;
    if (n_pad_bits == 0 || n_pad_nib == 0 || n_stall == 0 || n_rate < 19) begin
      failures++;
      $display("mechanism not exercised");
    end
    $display("padding bits %0d, alignment nibbles %0d, stall cycles %0d, rate checks %0d",
             n_pad_bits, n_pad_nib, n_stall, n_rate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
