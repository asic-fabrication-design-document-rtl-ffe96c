// tb_nonce_incrementer: self-checking test of the nonce counter: zero after
// reset, +1 per cycle with inc, hold without, load priority, wrap-around.
module tb_nonce_incrementer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, inc = 0;
  logic [31:0] load_value = 0, nonce, model;

  nonce_incrementer dut (.clk, .rst_n, .load, .load_value, .inc, .nonce);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inc = 1;
    @(posedge clk); #1;
    checks++; if (nonce !== 0) failures++;
    rst_n = 1;
    model = 0;
    for (int i = 0; i < 1000; i++) begin
      inc  = 1'($urandom);
      load = ($urandom % 50) == 0;
      load_value = (i == 500) ? 32'hFFFF_FFFE : $urandom;
      if (i == 500) load = 1;
      @(posedge clk);
      if (load) model = load_value;
      else if (inc) model = model + 1;
      #1;
      checks++;
      if (nonce !== model) begin
        failures++;
        $display("FAIL step %0d nonce=%h expected %h", i, nonce, model);
      end
    end
    // three increments in a row from 2^32-2 wrap to 1
    load = 1; load_value = 32'hFFFF_FFFE; inc = 0;
    @(posedge clk); #1;
    load = 0; inc = 1;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (nonce !== 32'd1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
