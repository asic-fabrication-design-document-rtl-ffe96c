// tb_double_sha256: self-checking test of the three-unit double SHA-256.
// Hashes the Bitcoin genesis block header and compares with its published
// block hash, then hashes random headers and nonces against the reference
// model, with and without mid-hash reuse, checking the latency (197 edges
// with the mid hash recomputed, 131 with it reused) and the mid hash.
module tb_double_sha256;
  import sha256_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, reuse_mid = 0;
  logic [1023:0] block;
  logic busy, valid_out, mid_valid;
  logic [255:0] mid_hash, digest;

  double_sha256 dut (.clk, .rst_n, .start, .reuse_mid, .block, .busy, .valid_out,
                     .mid_valid, .mid_hash, .digest);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [639:0] hdr, bit reuse, int exp_lat);
    int cyc;
    block = {hdr, 1'b1, 319'd0, 64'd640};
    reuse_mid = reuse; start = 1;
    @(posedge clk); #1;
    start = 0;
    cyc = 1;
    while (!valid_out && cyc < 400) begin
      @(posedge clk); #1;
      cyc++;
    end
    checks++;
    if (cyc - 1 != exp_lat) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cyc - 1, exp_lat);
    end
    checks++;
    if (digest !== ref_dsha(hdr)) begin
      failures++;
      $display("FAIL digest %h expected %h", digest, ref_dsha(hdr));
    end
    checks++;
    if (mid_hash !== ref_midstate(hdr) || !mid_valid) failures++;
  endtask

  initial begin
    logic [639:0] hdr;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // reuse requested but no mid hash yet: full computation
    run(GENESIS, 1'b1, 197);
    checks++;
    if (ref_bswap(digest) !== GENESIS_HASH) begin
      failures++;
      $display("FAIL genesis hash %h", ref_bswap(digest));
    end
    for (int n = 0; n < 4; n++) begin
      for (int i = 0; i < 20; i++) hdr[32*i +: 32] = $urandom;
      run(hdr, 1'b0, 197);
      for (int j = 0; j < 3; j++) begin
        hdr[31:0] = hdr[31:0] + 1;       // next nonce, same first 512 bits
        run(hdr, 1'b1, 131);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
