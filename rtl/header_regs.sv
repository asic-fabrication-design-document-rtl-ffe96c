// header_regs: input registers of the miner, holding the block header and
// the 256-bit threshold that the firmware writes over the 32-bit bus.
//
// Two kinds of n-bit registers are used, as the design describes: 32-bit
// registers for version, timestamp, target ("bits") and nonce, and 256-bit
// registers for the previous-block hash and the Merkle root. The 256-bit
// threshold that the comparator uses is a third 256-bit register. A write
// (wr_en = 1) stores wr_data into word wr_idx on the next clock edge:
//   0 version, 1-8 previous hash, 9-16 Merkle root, 17 timestamp,
//   18 bits, 19 nonce, 20-27 threshold   (word 0 of a 256-bit field is its
//   most significant word)
// A 256-bit register is updated one 32-bit word at a time by writing it back
// with that one word replaced. rd_data shows word rd_idx combinationally.
// All registers clear to zero on reset. The word numbering is this design's
// choice.
module header_regs
  import miner_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [4:0]   wr_idx,
  input  logic [31:0]  wr_data,
  input  logic [4:0]   rd_idx,
  output logic [31:0]  rd_data,
  output header_t      header,
  output logic [255:0] threshold
);
  // replace 32-bit word i (0 = most significant) of a 256-bit value
  function automatic logic [255:0] put_word(logic [255:0] v, logic [2:0] i, logic [31:0] w);
    logic [255:0] r;
    r = v;
    r[255 - 32*i -: 32] = w;
    return r;
  endfunction

  logic         we_version, we_prev, we_merkle, we_time, we_bits, we_nonce, we_thr;
  logic [255:0] d_prev, d_merkle, d_thr;
  logic [2:0]   sub;

  always_comb begin
    we_version = wr_en && (wr_idx == 5'd0);
    we_prev    = wr_en && (wr_idx >= 5'd1)  && (wr_idx <= 5'd8);
    we_merkle  = wr_en && (wr_idx >= 5'd9)  && (wr_idx <= 5'd16);
    we_time    = wr_en && (wr_idx == 5'd17);
    we_bits    = wr_en && (wr_idx == 5'd18);
    we_nonce   = wr_en && (wr_idx == 5'd19);
    we_thr     = wr_en && (wr_idx >= 5'd20) && (wr_idx <= 5'd27);
    // word position inside a 256-bit field
    if (we_prev)        sub = 3'(wr_idx - 5'd1);
    else if (we_merkle) sub = 3'(wr_idx - 5'd9);
    else                sub = 3'(wr_idx - 5'd20);
    d_prev   = put_word(header.prev_hash,   sub, wr_data);
    d_merkle = put_word(header.merkle_root, sub, wr_data);
    d_thr    = put_word(threshold,          sub, wr_data);
  end

  nbit_register #(.WIDTH(32))  r_version (.clk, .rst_n, .we(we_version), .d(wr_data),  .q(header.version));
  nbit_register #(.WIDTH(256)) r_prev    (.clk, .rst_n, .we(we_prev),    .d(d_prev),   .q(header.prev_hash));
  nbit_register #(.WIDTH(256)) r_merkle  (.clk, .rst_n, .we(we_merkle),  .d(d_merkle), .q(header.merkle_root));
  nbit_register #(.WIDTH(32))  r_time    (.clk, .rst_n, .we(we_time),    .d(wr_data),  .q(header.timestamp));
  nbit_register #(.WIDTH(32))  r_bits    (.clk, .rst_n, .we(we_bits),    .d(wr_data),  .q(header.bits));
  nbit_register #(.WIDTH(32))  r_nonce   (.clk, .rst_n, .we(we_nonce),   .d(wr_data),  .q(header.nonce));
  nbit_register #(.WIDTH(256)) r_thr     (.clk, .rst_n, .we(we_thr),     .d(d_thr),    .q(threshold));

  logic [HDR_WORDS*32-1:0] hdr_flat;
  assign hdr_flat = header;

  always_comb begin
    if (rd_idx < 5'(HDR_WORDS))     rd_data = hdr_flat[HDR_WORDS*32-1 - 32*rd_idx -: 32];
    else if (rd_idx < 5'(WR_WORDS)) rd_data = threshold[255 - 32*32'(rd_idx - 5'(HDR_WORDS)) -: 32];
    else                            rd_data = '0;
  end
endmodule
