// tb_sha256_compressor: self-checking test of the message compressor: loads
// a random chaining value, applies rounds with random constants and words,
// and compares a..h after every round with the reference round function;
// checks that the state holds when round is low.
module tb_sha256_compressor;
  import sha256_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, load = 0, round = 0;
  logic [255:0] h_in, state, model;
  logic [31:0] k, w;

  sha256_compressor dut (.clk, .load, .h_in, .round, .k, .w, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < 8; i++) h_in[32*i +: 32] = $urandom;
      load = 1;
      @(posedge clk); #1;
      load = 0;
      model = h_in;
      checks++; if (state !== model) failures++;
      for (int t = 0; t < 64; t++) begin
        k = $urandom; w = $urandom;
        round = ($urandom % 8) != 0;
        @(posedge clk); #1;
        if (round) model = ref_round(model, k, w);
        checks++;
        if (state !== model) begin
          failures++;
          $display("FAIL n=%0d t=%0d state=%h expected %h", n, t, state, model);
        end
      end
      round = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
