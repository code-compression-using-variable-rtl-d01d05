// tb_block_fetch: self-checking test of the packet fetch front end.
//
// A byte-array model of compressed program memory holds blocks of random
// length at increasing addresses, whose starts are loaded into the LAT. The
// testbench plays the decoder: it takes bytes with random back-pressure and,
// once it has taken all bytes of the requested block, pulses blk_done a
// cycle later. Checks: restart pulses exactly when a request is accepted,
// the bytes are those of the requested block in order, the first byte is
// offered two cycles after the request is accepted, and the unit is ready
// for the next request after blk_done. Requests jump between blocks at
// random, as branches do.
module tb_block_fetch;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic lat_wr_en = 0;
  logic [9:0] lat_wr_idx = '0, req_idx = '0;
  logic [15:0] lat_wr_addr = '0, mem_addr;
  logic req_valid = 0, req_ready, mem_rd_en;
  logic [7:0] mem_rdata, dec_data;
  logic dec_restart, dec_valid, dec_ready = 0, dec_blk_done = 0;

  block_fetch dut (.*);

  logic [7:0] mem [65536];
  always @(posedge clk) if (mem_rd_en) mem_rdata <= mem[mem_addr];

  int checks = 0, failures = 0, n_bp = 0;
  int start [1024], len [1024];

  initial begin
    repeat (100000) @(posedge clk);
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
    int a;
    foreach (mem[i]) mem[i] = 8'($urandom);
    mem_rdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    a = 3;
    for (int i = 0; i < 1024; i++) begin
      start[i] = a; len[i] = 20 + $urandom % 45; a += len[i];
      @(negedge clk);
      lat_wr_en = 1; lat_wr_idx = 10'(i); lat_wr_addr = 16'(start[i]);
    end
    @(negedge clk) lat_wr_en = 0;

    for (int r = 0; r < 200; r++) begin
      int k, got, wait_cyc, first_at, cyc;
      k = (r == 0) ? 1023 : $urandom % 1024;
      // request
      @(negedge clk);
      req_valid = 1; req_idx = 10'(k);
      #1 check(req_ready && dec_restart, "request accepted with restart");
      @(negedge clk);
      req_valid = 0;
      got = 0; cyc = 0; first_at = -1;
      while (got < len[k]) begin
        dec_ready = ($urandom % 3 != 0);
        #1;
        check(!dec_restart, "no restart while streaming");
        if (dec_valid && first_at < 0) first_at = cyc;
        if (dec_valid && !dec_ready) n_bp++;
        if (dec_valid && dec_ready) begin
          check(dec_data == mem[start[k] + got],
                $sformatf("block %0d byte %0d: %h vs %h", k, got, dec_data, mem[start[k] + got]));
          got++;
        end
        @(negedge clk);
        cyc++;
        if (cyc > 1000) break;
      end
      check(first_at == 1, $sformatf("first byte offered %0d cycles after accept", first_at + 1));
      // the decoder reports the block done one cycle after its last byte
      dec_ready = 1;
      #1;
      check(!req_ready, "busy until blk_done");
      dec_blk_done = 1;
      @(negedge clk);
      dec_blk_done = 0;
      #1 check(req_ready && !dec_valid, "idle after blk_done");
    end
    check(n_bp > 0, "back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
