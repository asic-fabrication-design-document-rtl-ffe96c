// tb_comparator: self-checking test of the 256-bit target comparator:
// valid = target > hash, hash passed through, with equal values, values that
// differ only in the lowest or highest bit, and random values.
module tb_comparator;
  int checks = 0, failures = 0;
  logic [255:0] target, hash, hash_out;
  logic valid;

  comparator dut (.target, .hash, .hash_out, .valid);

  // ordering worked out word by word, most significant first
  function automatic bit less(logic [255:0] x, logic [255:0] y);
    for (int i = 7; i >= 0; i--) begin
      if (x[32*i +: 32] < y[32*i +: 32]) return 1;
      if (x[32*i +: 32] > y[32*i +: 32]) return 0;
    end
    return 0;
  endfunction

  task automatic check(logic [255:0] t, logic [255:0] h);
    target = t; hash = h;
    #1;
    checks++;
    if (valid !== less(h, t) || hash_out !== h) begin
      failures++;
      $display("FAIL target=%h hash=%h valid=%b", t, h, valid);
    end
  endtask

  function automatic logic [255:0] rnd();
    logic [255:0] r;
    for (int i = 0; i < 8; i++) r[32*i +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] r;
    check('0, '0);
    check('1, '1);
    r = rnd();
    check(r, r);
    check(r | 256'd1, r & ~256'd1);
    check(r & ~256'd1, r | 256'd1);
    check({1'b1, 255'd0}, {1'b0, {255{1'b1}}});
    check({1'b0, {255{1'b1}}}, {1'b1, 255'd0});
    for (int i = 0; i < 1000; i++) begin
      r = rnd();
      check(r, (i % 3 == 0) ? (r ^ (256'd1 << ($urandom % 256))) : rnd());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
