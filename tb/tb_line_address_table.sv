// tb_line_address_table: self-checking test of the LAT at full size (1024
// entries of 16-bit byte addresses). Fills it with increasing block start
// addresses, as a loader would, and reads entries back in random order
// checking the one-cycle read latency.
module tb_line_address_table;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0;
  logic [9:0] wr_idx = '0, rd_idx = '0;
  logic [15:0] wr_addr = '0, rd_addr;
  int checks = 0, failures = 0;
  logic [15:0] model [1024];

  line_address_table dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned a;
    a = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      wr_en = 1; wr_idx = 10'(i); wr_addr = 16'(a); model[i] = 16'(a);
      a += 20 + $urandom % 40;      // compressed block sizes in bytes
    end
    @(negedge clk) wr_en = 0;
    for (int i = 0; i < 2000; i++) begin
      int k;
      k = $urandom % 1024;
      @(negedge clk);
      rd_en = 1; rd_idx = 10'(k);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (rd_addr !== model[k]) begin
        failures++; $display("idx %0d: %h vs %h", k, rd_addr, model[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
