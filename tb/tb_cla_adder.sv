// tb_cla_adder: self-checking test of the carry-lookahead adder. Checks
// corner cases (all ones, carry through every group, carry-in) and random
// operands against the + operator, for the 32-bit default and an 8-bit copy.
module tb_cla_adder;
  int checks = 0, failures = 0;
  logic [31:0] a, b, s;
  logic cin, cout;
  logic [7:0] a8, b8, s8;
  logic cout8;

  cla_adder #(.WIDTH(32)) dut (.a(a), .b(b), .cin(cin), .sum(s), .cout(cout));
  cla_adder #(.WIDTH(8))  dut8 (.a(a8), .b(b8), .cin(cin), .sum(s8), .cout(cout8));

  task automatic check32(logic [31:0] x, logic [31:0] y, logic ci);
    logic [32:0] exp;
    a = x; b = y; cin = ci;
    #1;
    exp = {1'b0, x} + {1'b0, y} + 33'(ci);
    checks++;
    if ({cout, s} !== exp) begin
      failures++;
      $display("FAIL %h + %h + %b = %b_%h, expected %h", x, y, ci, cout, s, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check32(32'hFFFF_FFFF, 32'h0000_0001, 1'b0);
    check32(32'hFFFF_FFFF, 32'h0000_0000, 1'b1);
    check32(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    check32(32'h0FFF_FFFF, 32'h0000_0001, 1'b0);
    check32(32'h8000_0000, 32'h8000_0000, 1'b0);
    check32(32'h0, 32'h0, 1'b0);
    for (int i = 0; i < 2000; i++) check32($urandom, $urandom, 1'($urandom));
    for (int i = 0; i < 500; i++) begin
      logic [8:0] e;
      a8 = 8'($urandom); b8 = 8'($urandom); cin = 1'($urandom);
      #1;
      e = {1'b0, a8} + {1'b0, b8} + 9'(cin);
      checks++;
      if ({cout8, s8} !== e) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
