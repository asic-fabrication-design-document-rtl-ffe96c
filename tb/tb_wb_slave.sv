// tb_wb_slave: self-checking test of the Wishbone slave. A bus-functional
// master issues classic single writes and reads; the test checks the
// one-cycle ACK, the decoded write strobes (index, byte-lane merge, gating by
// write_allow), the done pulse from CTRL, and the read multiplexer (header
// words, status, nonce, tries, result words, unmapped addresses).
module tb_wb_slave;
  import miner_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic stb = 0, cyc = 0, we = 0;
  logic [3:0] sel = 0;
  logic [31:0] dat_i = 0, adr = 0, dat_o;
  logic ack;
  logic write_allow = 0, wr_en, done_pulse;
  logic [4:0] wr_idx, rd_idx;
  logic [31:0] wr_data, rd_data;
  logic [4:0] status = 5'h15;
  logic [31:0] nonce = 32'h1234_5678, tries = 32'd77;
  logic [255:0] result;
  logic [31:0] mem [28];
  int acks_seen = 0, done_seen = 0;

  wb_slave dut (
    .wb_clk_i(clk), .wb_rst_i(rst), .wbs_stb_i(stb), .wbs_cyc_i(cyc), .wbs_we_i(we),
    .wbs_sel_i(sel), .wbs_dat_i(dat_i), .wbs_adr_i(adr), .wbs_ack_o(ack), .wbs_dat_o(dat_o),
    .write_allow, .wr_en, .wr_idx, .wr_data, .rd_idx, .rd_data,
    .done_pulse, .status, .nonce, .tries, .result
  );

  always #5 clk = ~clk;

  // a simple register file standing in for the header registers
  assign rd_data = (rd_idx < 28) ? mem[rd_idx] : 32'h0;
  always @(posedge clk) begin
    if (wr_en) mem[wr_idx] <= wr_data;
    if (done_pulse) done_seen++;
  end

  task automatic bus(bit w, logic [31:0] a, logic [31:0] d, logic [3:0] s, output logic [31:0] r);
    int n;
    @(negedge clk);
    cyc = 1; stb = 1; we = w; adr = a; dat_i = d; sel = s;
    n = 0;
    @(posedge clk); #1;
    while (!ack && n < 10) begin @(posedge clk); #1; n++; end
    checks++;
    if (!ack || n != 0) begin
      failures++;
      $display("FAIL ack after %0d extra cycles", n);
    end
    r = dat_o;
    @(negedge clk);
    cyc = 0; stb = 0; we = 0;
    @(posedge clk); #1;
    checks++;
    if (ack) failures++;            // ACK lasts one cycle
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    for (int i = 0; i < 8; i++) result[255 - 32*i -: 32] = 32'hA000_0000 + i;
    foreach (mem[i]) mem[i] = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    // writes outside the load window are acknowledged and dropped
    bus(1, BASE_ADDR + 32'h00, 32'hFFFF_FFFF, 4'hF, r);
    checks++; if (mem[0] !== 0) failures++;
    write_allow = 1;
    for (int i = 0; i < 28; i++) bus(1, BASE_ADDR + 32'(4 * i), 32'hC0DE_0000 + i, 4'hF, r);
    for (int i = 0; i < 28; i++) begin
      bus(0, BASE_ADDR + 32'(4 * i), 0, 4'hF, r);
      checks++;
      if (r !== 32'hC0DE_0000 + i) begin
        failures++;
        $display("FAIL read word %0d = %h", i, r);
      end
    end
    // byte-lane write: only lanes 0 and 2
    bus(1, BASE_ADDR + 32'h44, 32'h11223344, 4'b0101, r);
    checks++; if (mem[17] !== 32'hC022_0044) begin failures++; $display("FAIL sel merge %h", mem[17]); end
    // unmapped address: no write, reads 0
    bus(1, 32'h2000_0000, 32'h5555_5555, 4'hF, r);
    bus(0, 32'h2000_0000, 0, 4'hF, r);
    checks++; if (r !== 0 || mem[0] !== 32'hC0DE_0000) failures++;
    write_allow = 0;
    bus(0, BASE_ADDR + {24'd0, A_STATUS}, 0, 4'hF, r);
    checks++; if (r !== 32'h15) failures++;
    bus(0, BASE_ADDR + {24'd0, A_NONCE}, 0, 4'hF, r);
    checks++; if (r !== 32'h1234_5678) failures++;
    bus(0, BASE_ADDR + {24'd0, A_TRIES}, 0, 4'hF, r);
    checks++; if (r !== 32'd77) failures++;
    for (int i = 0; i < 8; i++) begin
      bus(0, BASE_ADDR + {24'd0, A_RESULT} + 32'(4 * i), 0, 4'hF, r);
      checks++;
      if (r !== 32'hA000_0000 + i) begin failures++; $display("FAIL result word %0d = %h", i, r); end
    end
    // CTRL: bit 0 = 1 gives one done pulse, 0 gives none
    bus(1, BASE_ADDR + {24'd0, A_CTRL}, 32'h0, 4'hF, r);
    bus(1, BASE_ADDR + {24'd0, A_CTRL}, 32'h1, 4'hF, r);
    @(posedge clk); #1;
    checks++; if (done_seen != 1) begin failures++; $display("FAIL done pulses %0d", done_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
