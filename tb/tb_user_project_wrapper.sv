// tb_user_project_wrapper: end-to-end test of the Bitcoin miner, at its
// default (full) size, driven the way the management firmware drives it:
// Wishbone writes and reads plus logic-analyzer bit 0.
//
// Run 1 mines the Bitcoin genesis block: the header is loaded with its nonce
// three below the winning one and the threshold expanded from its "bits"
// field; the miner must miss three times, find nonce 0x1dac2b7c and return
// the published genesis block hash. Run 2 mines a random header against an
// easy threshold and compares the winning nonce, hash and try count with the
// reference model. Run 3 mines Bitcoin block 125552 against its real target,
// starting two nonces early. All runs check the cycle count per nonce, the status
// register, the GPIO flag and the logic-analyzer probes. The test counts how
// often each mechanism happened (rejected header write, header load, mid-hash
// computation, mid-hash reuse, nonce increment, target miss, target hit,
// return to wait on done) and fails if one never did.
module tb_user_project_wrapper;
  import sha256_ref_pkg::*;
  import miner_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst = 1;
  logic stb = 0, cyc = 0, we = 0;
  logic [3:0] sel = 4'hF;
  logic [31:0] dat_i = 0, adr = 0, dat_o;
  logic ack;
  logic [127:0] la_in = '0, la_out, la_oenb = '1;
  logic [37:0] io_out, io_oeb;

  user_project_wrapper dut (
    .wb_clk_i(clk), .wb_rst_i(rst), .wbs_stb_i(stb), .wbs_cyc_i(cyc), .wbs_we_i(we),
    .wbs_sel_i(sel), .wbs_dat_i(dat_i), .wbs_adr_i(adr), .wbs_ack_o(ack), .wbs_dat_o(dat_o),
    .la_data_in(la_in), .la_data_out(la_out), .la_oenb(la_oenb), .io_out(io_out), .io_oeb(io_oeb)
  );

  always #5 clk = ~clk;

  // mechanism counters, observed at the block boundaries inside the design
  int n_rejected = 0, n_loaded = 0, n_mid = 0, n_reuse = 0, n_inc = 0;
  int n_miss = 0, n_hit = 0, n_done = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_dsha.start1) n_mid++;
    if (dut.u_dsha.start2 && dut.u_dsha.skip1) n_reuse++;
    if (dut.nonce_inc) n_inc++;
    if (dut.state == ST_CHECK && !dut.hit) n_miss++;
    if (dut.state == ST_CHECK && dut.hit) n_hit++;
    if (dut.state == ST_OUTPUT && dut.done_pulse) n_done++;
    if (dut.wr_en) n_loaded++;
  end

  task automatic wb(bit w, logic [7:0] off, logic [31:0] d, output logic [31:0] r);
    int n;
    @(negedge clk);
    cyc = 1; stb = 1; we = w; adr = BASE_ADDR + {24'd0, off}; dat_i = d;
    n = 0;
    @(posedge clk); #1;
    while (!ack && n < 20) begin @(posedge clk); #1; n++; end
    if (!ack) begin failures++; $display("FAIL no ACK"); end
    r = dat_o;
    @(negedge clk);
    cyc = 0; stb = 0; we = 0;
  endtask

  task automatic wb_write(logic [7:0] off, logic [31:0] d);
    logic [31:0] r;
    wb(1, off, d, r);
  endtask

  task automatic wb_read(logic [7:0] off, output logic [31:0] r);
    wb(0, off, 0, r);
  endtask

  // reference: first nonce from hdr.nonce whose hash is below thr
  function automatic int ref_tries(logic [639:0] hdr, logic [255:0] thr, int limit);
    for (int i = 1; i <= limit; i++) begin
      if (ref_bswap(ref_dsha(hdr)) < thr) return i;
      hdr[31:0] = hdr[31:0] + 1;
    end
    return 0;
  endfunction

  task automatic mine(logic [639:0] hdr, logic [255:0] thr, int exp_tries, logic [255:0] exp_hash);
    logic [31:0] r;
    int cyc_n, exp_cyc;
    logic [639:0] win;
    win = hdr;
    win[31:0] = hdr[31:0] + 32'(exp_tries - 1);

    // a write before the load window opens is dropped
    wb_read(8'h00, r);
    wb_write(8'h00, ~r);
    begin
      logic [31:0] r2;
      wb_read(8'h00, r2);
      checks++;
      if (r2 !== r) failures++; else n_rejected++;
    end
    // WAIT -> LOAD
    la_oenb[0] = 0;
    la_in[0] = 1;
    repeat (2) @(posedge clk);
    wb_read(A_STATUS, r);
    checks++; if (r[2:0] !== 3'(ST_LOAD)) begin failures++; $display("FAIL status %h", r); end
    for (int i = 0; i < HDR_WORDS; i++) wb_write(8'(4 * i), hdr[639 - 32*i -: 32]);
    for (int i = 0; i < THR_WORDS; i++) wb_write(8'(A_THR + 4 * i), thr[255 - 32*i -: 32]);
    for (int i = 0; i < HDR_WORDS; i++) begin
      wb_read(8'(4 * i), r);
      checks++; if (r !== hdr[639 - 32*i -: 32]) failures++;
    end
    // LOAD -> COMPUTE, then wait for the GPIO flag
    @(negedge clk);
    la_in[0] = 0;
    cyc_n = 0;
    @(posedge clk); #1;
    while (!io_out[0] && cyc_n < 100000) begin @(posedge clk); #1; cyc_n++; end
    exp_cyc = 200 + 134 * (exp_tries - 1);
    checks++;
    if (cyc_n != exp_cyc) begin failures++; $display("FAIL %0d cycles to found, expected %0d", cyc_n, exp_cyc); end
    checks++; if (io_oeb[0] !== 0) failures++;
    wb_read(A_STATUS, r);
    checks++; if (r[2:0] !== 3'(ST_OUTPUT) || r[4] !== 1) failures++;
    wb_read(A_NONCE, r);
    checks++; if (r !== win[31:0]) begin failures++; $display("FAIL nonce %h expected %h", r, win[31:0]); end
    wb_read(A_TRIES, r);
    checks++; if (r !== 32'(exp_tries)) begin failures++; $display("FAIL tries %0d expected %0d", r, exp_tries); end
    for (int i = 0; i < 8; i++) begin
      wb_read(8'(A_RESULT + 4 * i), r);
      checks++;
      if (r !== exp_hash[255 - 32*i -: 32]) begin
        failures++;
        $display("FAIL result word %0d = %h expected %h", i, r, exp_hash[255 - 32*i -: 32]);
      end
    end
    // probes: nonce, H0 of the last double hash, H0 of the mid hash, found
    checks++;
    if (la_out[31:0] !== win[31:0] || la_out[63:32] !== ref_dsha(win) >> 224
        || la_out[95:64] !== ref_midstate(hdr) >> 224 || la_out[99] !== 1) begin
      failures++;
      $display("FAIL probes %h", la_out[101:0]);
    end
    // the result holds in OUTPUT, done returns to WAIT
    repeat (20) @(posedge clk);
    checks++; if (!io_out[0]) failures++;
    wb_write(A_CTRL, 32'h1);
    wb_read(A_STATUS, r);
    checks++; if (r[2:0] !== 3'(ST_WAIT) || io_out[0]) failures++;
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [639:0] hdr;
    logic [255:0] thr;
    logic [31:0] r;
    int t;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (2) @(posedge clk);
    wb_read(A_STATUS, r);
    checks++; if (r[2:0] !== 3'(ST_WAIT)) failures++;

    // run 1: genesis block, starting three nonces early
    hdr = GENESIS;
    hdr[31:0] = hdr[31:0] - 3;
    thr = ref_target(hdr[63:32]);
    mine(hdr, thr, 4, GENESIS_HASH);

    // run 2: random header, threshold 2^250 (one nonce in 64 on average)
    thr = 256'd1 << 250;
    do begin
      for (int i = 0; i < 20; i++) hdr[32*i +: 32] = $urandom;
      t = ref_tries(hdr, thr, 200);
    end while (t < 2);
    begin
      logic [639:0] w;
      w = hdr;
      w[31:0] = hdr[31:0] + 32'(t - 1);
      mine(hdr, thr, t, ref_bswap(ref_dsha(w)));
    end

    // run 3: Bitcoin block 125552, starting two nonces early, real target
    hdr = BLOCK_125552;
    hdr[31:0] = hdr[31:0] - 2;
    mine(hdr, ref_target(hdr[63:32]), 3, BLOCK_125552_HASH);

    checks++;
    if (n_rejected == 0 || n_loaded == 0 || n_mid == 0 || n_reuse == 0 || n_inc == 0
        || n_miss == 0 || n_hit == 0 || n_done == 0) failures++;
    $display("mechanisms: rejected_write=%0d header_word_load=%0d mid_hash=%0d mid_reuse=%0d nonce_inc=%0d miss=%0d hit=%0d done=%0d",
             n_rejected, n_loaded, n_mid, n_reuse, n_inc, n_miss, n_hit, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
