// tb_decoder_table: self-checking test of the decoder-table RAM at full
// size (2048 x 24 bits). Writes every word with a pseudo-random value,
// reads all back in random order checking the one-cycle read latency,
// checks that rd_data holds while rd_en is low and that a read in the cycle
// of a write to the same address returns the old word.
module tb_decoder_table;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0;
  logic [10:0] wr_addr = '0, rd_addr = '0;
  logic [23:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0;
  logic [23:0] model [2048];

  decoder_table dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2048; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 11'(a); wr_data = 24'($urandom); model[a] = wr_data;
    end
    @(negedge clk) wr_en = 0;
    for (int i = 0; i < 3000; i++) begin
      int a;
      a = $urandom % 2048;
      @(negedge clk);
      rd_en = 1; rd_addr = 11'(a);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (rd_data !== model[a]) begin
        failures++; $display("addr %0d: %h vs %h", a, rd_data, model[a]);
      end
    end
    // hold while rd_en is low
    begin
      logic [23:0] held;
      held = rd_data;
      @(negedge clk) rd_addr = rd_addr + 11'd1;
      @(negedge clk);
      checks++;
      if (rd_data !== held) begin failures++; $display("rd_data not held"); end
    end
    // read during write of the same address returns the old word
    @(negedge clk);
    rd_en = 1; rd_addr = 11'd77; wr_en = 1; wr_addr = 11'd77; wr_data = ~model[77];
    @(negedge clk);
    rd_en = 0; wr_en = 0;
    checks++;
    if (rd_data !== model[77]) begin failures++; $display("read-during-write"); end
    model[77] = ~model[77];
    @(negedge clk) rd_en = 1;
    @(negedge clk) rd_en = 0;
    checks++;
    if (rd_data !== model[77]) begin failures++; $display("write lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
