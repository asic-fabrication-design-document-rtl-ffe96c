// tb_miner_fsm: self-checking test of the miner controller. Walks the state
// machine through reset, wait, load, compute, several target misses, a hit,
// output and done, driving valid_out and hit like the hash datapath would,
// and checks every state and strobe on the way.
module tb_miner_fsm;
  import miner_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, la_start = 0, valid_out = 0, hit = 0, done = 0;
  miner_state_e state;
  logic write_allow, sha_start, reuse_mid, nonce_load, nonce_inc, result_we, found;
  logic [31:0] tries;
  int starts = 0, reuses = 0, incs = 0, loads = 0, stores = 0;

  miner_fsm dut (.clk, .rst_n, .la_start, .valid_out, .hit, .done, .state, .write_allow,
                 .sha_start, .reuse_mid, .nonce_load, .nonce_inc, .result_we, .found, .tries);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (sha_start) begin starts++; if (reuse_mid) reuses++; end
    if (nonce_inc) incs++;
    if (nonce_load) loads++;
    if (result_we) stores++;
  end

  task automatic expect_state(miner_state_e s, string what);
    checks++;
    if (state !== s) begin
      failures++;
      $display("FAIL %s: state %s expected %s", what, state.name(), s.name());
    end
  endtask

  task automatic step(int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // one hash: wait some cycles, then pulse valid_out with the given hit
  task automatic one_hash(bit h);
    expect_state(ST_COMPUTE, "compute");
    checks++; if (!sha_start) failures++;       // start on the first compute cycle
    step(5);
    checks++; if (sha_start) failures++;
    valid_out = 1; step(); valid_out = 0;
    expect_state(ST_CHECK, "check");
    hit = h;
    #1;
    checks++; if (nonce_inc !== !h || result_we !== h) failures++;
    step(); hit = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    step(2);
    expect_state(ST_RESET, "held in reset");
    rst_n = 1;
    step();
    expect_state(ST_WAIT, "after reset");
    step(3);
    expect_state(ST_WAIT, "wait holds");
    checks++; if (write_allow) failures++;
    la_start = 1; step();
    expect_state(ST_LOAD, "load");
    step(4);
    expect_state(ST_LOAD, "load holds");
    checks++; if (!write_allow) failures++;
    la_start = 0;
    #1;
    checks++; if (!nonce_load) failures++;
    step();
    for (int i = 0; i < 3; i++) one_hash(0);
    one_hash(1);
    expect_state(ST_OUTPUT, "output");
    checks++; if (!found || tries !== 4) begin failures++; $display("FAIL tries %0d", tries); end
    step(3);
    expect_state(ST_OUTPUT, "output holds");
    done = 1; step(); done = 0;
    expect_state(ST_WAIT, "back to wait");
    checks++; if (found) failures++;
    checks++;
    if (starts != 4 || reuses != 3 || incs != 3 || loads != 1 || stores != 1) begin
      failures++;
      $display("FAIL counts starts=%0d reuses=%0d incs=%0d loads=%0d stores=%0d",
               starts, reuses, incs, loads, stores);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
