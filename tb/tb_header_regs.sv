// tb_header_regs: self-checking test of the header and threshold registers:
// every word written lands in the right field and reads back, other words
// are untouched, wr_en = 0 writes nothing, reset clears all.
module tb_header_regs;
  import miner_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [4:0] wr_idx = 0, rd_idx = 0;
  logic [31:0] wr_data = 0, rd_data;
  header_t header;
  logic [255:0] threshold;
  logic [31:0] model [28];

  header_regs dut (.clk, .rst_n, .wr_en, .wr_idx, .wr_data, .rd_idx, .rd_data, .header, .threshold);

  always #5 clk = ~clk;

  // check every output against the word model
  task automatic check_all();
    logic [639:0] h;
    logic [255:0] t;
    for (int i = 0; i < 20; i++) h[639 - 32*i -: 32] = model[i];
    for (int i = 0; i < 8; i++)  t[255 - 32*i -: 32] = model[20 + i];
    checks++;
    if (header !== h || threshold !== t) begin
      failures++;
      $display("FAIL header/threshold mismatch");
    end
    checks++;
    if (header.version !== model[0] || header.nonce !== model[19] || header.bits !== model[18]
        || header.timestamp !== model[17] || header.prev_hash[255:224] !== model[1]
        || header.merkle_root[31:0] !== model[16]) failures++;
    for (int i = 0; i < 28; i++) begin
      rd_idx = 5'(i);
      #1;
      checks++;
      if (rd_data !== model[i]) begin
        failures++;
        $display("FAIL read word %0d = %h expected %h", i, rd_data, model[i]);
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (model[i]) model[i] = 0;
    #1 check_all();
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      wr_en   = ($urandom % 4) != 0;
      wr_idx  = 5'($urandom % 28);
      wr_data = $urandom;
      @(posedge clk);
      if (wr_en) model[wr_idx] = wr_data;
      #1;
      if (n % 10 == 0) check_all();
    end
    wr_en = 0;
    #1 check_all();
    rst_n = 0;
    @(posedge clk); #1;
    foreach (model[i]) model[i] = 0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
