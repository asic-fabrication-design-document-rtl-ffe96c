// double_sha256: the Bitcoin double SHA-256 of a padded 1024-bit block
// header, built from three SHA-256 units as in the three-unit datapath:
//   unit 1: first 512 bits of the header, chaining value = IV  -> mid hash
//   unit 2: second 512 bits (holds the nonce), chaining value = mid hash
//   unit 3: {unit 2 digest, 256-bit padding+length}, chaining value = IV
// digest = SHA-256(SHA-256(header)).
//
// The first 512 bits do not contain the nonce, so the mid hash is the same
// for every nonce of one header. start with reuse_mid = 1, when a mid hash of
// the same header is already held (mid_valid), skips unit 1 and starts at
// unit 2; reuse_mid = 0 always recomputes it. The units run one after the
// other, each started by the previous unit's done pulse. valid_out is high
// for one cycle when digest is ready; digest holds until unit 3 restarts.
// Latency from the start edge to valid_out: 3*66-1 = 197 edges, or
// 2*66-1 = 131 edges with the mid hash reused. The block must stay stable
// from start to valid_out. The three-unit split follows the design; running
// them in sequence with mid-hash reuse is this design's choice.
module double_sha256
  import sha256_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          reuse_mid,
  input  logic [1023:0] block,
  output logic          busy,
  output logic          valid_out,
  output logic          mid_valid,
  output hash_t         mid_hash,
  output hash_t         digest
);
  logic  start1, start2, start3;
  logic  busy1, busy2, busy3;
  logic  done1, done2, done3;
  hash_t digest2;
  logic  skip1;

  assign skip1  = reuse_mid && mid_valid;
  assign start1 = start && !skip1;
  assign start2 = (start && skip1) || done1;
  assign start3 = done2;

  sha256_unit u_sha1 (
    .clk(clk), .rst_n(rst_n), .start(start1), .block(block[1023:512]), .h_in(IV),
    .busy(busy1), .done(done1), .digest(mid_hash)
  );

  sha256_unit u_sha2 (
    .clk(clk), .rst_n(rst_n), .start(start2), .block(block[511:0]), .h_in(mid_hash),
    .busy(busy2), .done(done2), .digest(digest2)
  );

  sha256_unit u_sha3 (
    .clk(clk), .rst_n(rst_n), .start(start3), .block({digest2, miner_pkg::HASH_PAD}), .h_in(IV),
    .busy(busy3), .done(done3), .digest(digest)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)      mid_valid <= 1'b0;
    else if (start1) mid_valid <= 1'b0;
    else if (done1)  mid_valid <= 1'b1;
  end

  assign valid_out = done3;
  assign busy      = busy1 || busy2 || busy3 || done1 || done2;
endmodule
