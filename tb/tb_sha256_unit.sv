// tb_sha256_unit: self-checking test of one SHA-256 unit. Hashes the padded
// message "abc" against its published digest, then random blocks with random
// chaining values against the reference model, and checks that done rises
// exactly 65 clock edges after the edge that sampled start.
module tb_sha256_unit;
  import sha256_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [511:0] block;
  logic [255:0] h_in, digest;
  logic busy, done;

  sha256_unit dut (.clk, .rst_n, .start, .block, .h_in, .busy, .done, .digest);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [511:0] b, logic [255:0] h, logic [255:0] exp);
    int cyc;
    block = b; h_in = h; start = 1;
    @(posedge clk); #1;
    start = 0;
    block = ~b; h_in = ~h;          // inputs are sampled only at start
    cyc = 1;
    while (!done && cyc < 200) begin
      @(posedge clk); #1;
      cyc++;
    end
    checks++;
    if (cyc - 1 != 65) begin
      failures++;
      $display("FAIL latency %0d edges", cyc - 1);
    end
    checks++;
    if (digest !== exp) begin
      failures++;
      $display("FAIL digest %h expected %h", digest, exp);
    end
    @(posedge clk); #1;
    checks++;
    if (done !== 0 || busy !== 0 || digest !== exp) failures++;   // one-cycle done, digest holds
  endtask

  initial begin
    logic [511:0] b;
    logic [255:0] h;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    checks++; if (busy !== 0 || done !== 0) failures++;
    // "abc"
    run({24'h616263, 1'b1, 423'd0, 64'd24}, ref_iv(),
        256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad);
    for (int n = 0; n < 8; n++) begin
      for (int i = 0; i < 16; i++) b[32*i +: 32] = $urandom;
      for (int i = 0; i < 8; i++) h[32*i +: 32] = $urandom;
      run(b, h, ref_compress(h, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
