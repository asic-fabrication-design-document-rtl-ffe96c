// tb_nbit_register: self-checking test of the n-bit register: clear on
// reset, write with we = 1, hold with we = 0, for 32 and 256 bits.
module tb_nbit_register;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0;
  logic [31:0] d, q;
  logic [255:0] d2, q2;
  logic [31:0] model;
  logic [255:0] model2;

  nbit_register #(.WIDTH(32))  dut  (.clk, .rst_n, .we, .d(d),  .q(q));
  nbit_register #(.WIDTH(256)) dut2 (.clk, .rst_n, .we, .d(d2), .q(q2));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 32'hDEAD_BEEF; d2 = {8{32'hCAFE_F00D}};
    we = 1;
    @(posedge clk); #1;
    checks++; if (q !== 0 || q2 !== 0) failures++;   // reset wins over we
    rst_n = 1;
    model = 0; model2 = 0;
    for (int i = 0; i < 500; i++) begin
      we = 1'($urandom);
      d  = $urandom;
      for (int j = 0; j < 8; j++) d2[32*j +: 32] = $urandom;
      @(posedge clk);
      if (we) begin model = d; model2 = d2; end
      #1;
      checks++;
      if (q !== model || q2 !== model2) begin
        failures++;
        $display("FAIL step %0d q=%h expected %h", i, q, model);
      end
    end
    rst_n = 0;
    @(posedge clk); #1;
    checks++; if (q !== 0 || q2 !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
