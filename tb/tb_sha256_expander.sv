// tb_sha256_expander: self-checking test of the message expander. Loads
// random blocks and compares the 64 schedule words it produces, one per
// advance, with the full-schedule reference model; also checks that w_t
// holds while advance is low.
module tb_sha256_expander;
  import sha256_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, load = 0, advance = 0;
  logic [511:0] block;
  logic [31:0] w_t;

  sha256_expander dut (.clk, .load, .block, .advance, .w_t);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < 16; i++) block[32*i +: 32] = $urandom;
      load = 1;
      @(posedge clk); #1;
      load = 0;
      for (int t = 0; t < 64; t++) begin
        checks++;
        if (w_t !== ref_schedule(block, t)) begin
          failures++;
          $display("FAIL block %0d t=%0d w=%h expected %h", n, t, w_t, ref_schedule(block, t));
        end
        advance = (t % 7 != 3);      // a few idle cycles in between
        @(posedge clk); #1;
        if (!advance) begin
          checks++;
          if (w_t !== ref_schedule(block, t)) failures++;
          advance = 1;
          @(posedge clk); #1;
        end
      end
      advance = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
