// wb_slave: 32-bit Wishbone (classic cycle) slave through which the
// management processor loads the block header and threshold and reads back
// the status, the nonce and the winning hash.
//
// Every cycle with CYC and STB high is acknowledged exactly one clock later
// with a one-cycle ACK pulse, which is the handshake that tells the firmware
// a word was stored and the next may follow. A write lands on the edge that
// raises ACK; a read returns DAT_O with ACK. Addresses are decoded from bits
// [7:0] when bits [31:8] match BASE[31:8] (see miner_pkg for the map); other
// addresses are acknowledged, read as 0 and ignore writes, so the bus never
// hangs. Header and threshold writes are passed on only while write_allow is
// high (the controller's load state); at other times they are acknowledged
// and dropped. SEL byte lanes are honoured by merging with the stored word.
// A write of 1 to bit 0 of CTRL produces a one-cycle done pulse.
// The Wishbone signal set follows the Wishbone master/slave diagram; the
// register map, the one-cycle ACK and the write gating are this design's
// choices.
module wb_slave
  import miner_pkg::*;
#(
  parameter logic [31:0] BASE = miner_pkg::BASE_ADDR
) (
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
  // to the header registers
  input  logic         write_allow,
  output logic         wr_en,
  output logic [4:0]   wr_idx,
  output logic [31:0]  wr_data,
  output logic [4:0]   rd_idx,
  input  logic [31:0]  rd_data,
  // to the controller
  output logic         done_pulse,
  // read-only values
  input  logic [4:0]   status,
  input  logic [31:0]  nonce,
  input  logic [31:0]  tries,
  input  logic [255:0] result
);
  logic       req, hit;
  logic [7:0] off;
  logic       is_reg;    // header or threshold word
  logic [31:0] merged;
  logic [31:0] rdata;

  assign req    = wbs_cyc_i && wbs_stb_i && !wbs_ack_o;
  assign hit    = (wbs_adr_i[31:8] == BASE[31:8]);
  assign off    = wbs_adr_i[7:0];
  assign is_reg = hit && (off < 8'(4 * WR_WORDS)) && (off[1:0] == 2'b00);
  assign rd_idx = off[6:2];

  always_comb begin
    for (int i = 0; i < 4; i++)
      merged[8*i +: 8] = wbs_sel_i[i] ? wbs_dat_i[8*i +: 8] : rd_data[8*i +: 8];
  end

  assign wr_en   = req && wbs_we_i && is_reg && write_allow;
  assign wr_idx  = off[6:2];
  assign wr_data = merged;
  assign done_pulse = req && wbs_we_i && hit && (off == A_CTRL) && wbs_sel_i[0] && wbs_dat_i[0];

  always_comb begin
    rdata = '0;
    if (hit) begin
      if (is_reg)                      rdata = rd_data;
      else if (off == A_STATUS)        rdata = {27'd0, status};
      else if (off == A_NONCE)         rdata = nonce;
      else if (off == A_TRIES)         rdata = tries;
      else if (off >= A_RESULT && off <= A_RESULT + 8'h1C && off[1:0] == 2'b00)
        rdata = result[255 - 32*(off[4:2]) -: 32];
    end
  end

  always_ff @(posedge wb_clk_i) begin
    if (wb_rst_i) begin
      wbs_ack_o <= 1'b0;
      wbs_dat_o <= '0;
    end else begin
      wbs_ack_o <= req;
      if (req && !wbs_we_i) wbs_dat_o <= rdata;
    end
  end

  // Wishbone rules: ACK only answers an active cycle, and lasts one clock.
  a_ack_answers: assert property (@(posedge wb_clk_i) disable iff (wb_rst_i)
    wbs_ack_o |-> $past(wbs_cyc_i && wbs_stb_i));
  a_ack_single: assert property (@(posedge wb_clk_i) disable iff (wb_rst_i)
    wbs_ack_o |=> !wbs_ack_o);
endmodule
