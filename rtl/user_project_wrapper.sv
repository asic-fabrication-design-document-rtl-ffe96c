// user_project_wrapper: Bitcoin mining core for the user area of an
// open-shuttle SoC harness, loaded and read by the management processor.
//
// The firmware raises logic-analyzer bit 0, writes the 640-bit block header
// and a 256-bit threshold over Wishbone (one 32-bit word per bus cycle), then
// lowers bit 0. The controller copies the header's nonce into the nonce
// counter and hashes the header, padded to 1024 bits, with the three-unit
// double SHA-256. The digest, read as Bitcoin's little-endian 256-bit number,
// goes to the comparator: if threshold > hash the hash is stored in the
// result register, GPIO 0 goes high and the controller waits for the
// firmware to read RESULT and write CTRL.done; otherwise the nonce is
// incremented and the next header is hashed, reusing the mid hash of the
// first 512 bits.
//
// Ports: the digital subset of the harness's user-area pins (Wishbone
// slave, 128 logic-analyzer lines, 38 GPIOs). wb_rst_i is active high; all
// logic runs on wb_clk_i. la_data_in[0] counts as set only while la_oenb[0]
// is low (the management side drives the line). Probes on la_data_out:
//   [31:0] current nonce, [63:32] H0 of the latest double hash,
//   [95:64] H0 of the mid hash, [98:96] state, [99] found, [100] hash valid,
//   [101] hash busy, [102] mid hash held.
// io_out[0] (enabled by io_oeb[0] = 0) is the found flag; other GPIOs are
// left as inputs. Timing, at one SHA-256 round per cycle: found rises 200
// clock edges after the edge that sees la_data_in[0] low if the first nonce
// wins, and 134 edges later for every further nonce tried.
// The block structure (Wishbone, input registers, double SHA-256, comparator
// with threshold, nonce incrementer, GPIO flag) and the state machine follow
// the design; the register map, the probe assignment, the byte order of the
// compare and the mid-hash reuse are this design's choices.
module user_project_wrapper
  import miner_pkg::*;
(
  input  logic         wb_clk_i,
  input  logic         wb_rst_i,
  input  logic         wbs_stb_i,
  input  logic         wbs_cyc_i,
  input  logic         wbs_we_i,
  input  logic [3:0]   wbs_sel_i,
  input  logic [31:0]  wbs_dat_i,
  input  logic [31:0]  wbs_adr_i,
  output logic         wbs_ack_o,
  output logic [31:0]  wbs_dat_o,
  input  logic [127:0] la_data_in,
  output logic [127:0] la_data_out,
  input  logic [127:0] la_oenb,
  output logic [37:0]  io_out,
  output logic [37:0]  io_oeb
);
  logic         clk, rst_n;
  logic         la_start;
  header_t      header;
  logic [255:0] threshold;
  logic         wr_en;
  logic [4:0]   wr_idx, rd_idx;
  logic [31:0]  wr_data, rd_data;
  logic         done_pulse;
  miner_state_e state;
  logic         write_allow, sha_start, reuse_mid, nonce_load, nonce_inc;
  logic         result_we, found;
  logic [31:0]  tries, nonce;
  logic         sha_busy, valid_out, mid_valid;
  logic [255:0] mid_hash, digest, cmp_hash, result;
  logic         hit;
  header_t      hdr_live;

  assign clk      = wb_clk_i;
  assign rst_n    = !wb_rst_i;
  assign la_start = la_data_in[0] && !la_oenb[0];

  wb_slave u_wb (
    .wb_clk_i, .wb_rst_i, .wbs_stb_i, .wbs_cyc_i, .wbs_we_i, .wbs_sel_i,
    .wbs_dat_i, .wbs_adr_i, .wbs_ack_o, .wbs_dat_o,
    .write_allow, .wr_en, .wr_idx, .wr_data, .rd_idx, .rd_data,
    .done_pulse, .status({found, sha_busy, state}), .nonce, .tries, .result
  );

  header_regs u_regs (
    .clk, .rst_n, .wr_en, .wr_idx, .wr_data, .rd_idx, .rd_data,
    .header, .threshold
  );

  nonce_incrementer u_nonce (
    .clk, .rst_n, .load(nonce_load), .load_value(header.nonce), .inc(nonce_inc), .nonce
  );

  always_comb begin
    hdr_live       = header;
    hdr_live.nonce = nonce;
  end

  double_sha256 u_dsha (
    .clk, .rst_n, .start(sha_start), .reuse_mid, .block({hdr_live, HDR_PAD}),
    .busy(sha_busy), .valid_out, .mid_valid, .mid_hash, .digest
  );

  comparator u_cmp (
    .target(threshold), .hash(byte_reverse256(digest)), .hash_out(cmp_hash), .valid(hit)
  );

  nbit_register #(.WIDTH(256)) u_result (
    .clk, .rst_n, .we(result_we), .d(cmp_hash), .q(result)
  );

  miner_fsm u_fsm (
    .clk, .rst_n, .la_start, .valid_out, .hit, .done(done_pulse),
    .state, .write_allow, .sha_start, .reuse_mid, .nonce_load, .nonce_inc,
    .result_we, .found, .tries
  );

  always_comb begin
    la_data_out          = '0;
    la_data_out[31:0]    = nonce;
    la_data_out[63:32]   = digest[255:224];
    la_data_out[95:64]   = mid_hash[255:224];
    la_data_out[98:96]   = state;
    la_data_out[99]      = found;
    la_data_out[100]     = valid_out;
    la_data_out[101]     = sha_busy;
    la_data_out[102]     = mid_valid;
    io_out               = '0;
    io_out[0]            = found;
    io_oeb               = '1;
    io_oeb[0]            = 1'b0;
  end
endmodule
