// sha256_expander: message expander (message schedule) of one SHA-256 unit.
//
// It holds a sliding window of the 16 most recent schedule words. load
// copies the 512-bit message block into the window, word 0 (block[511:480])
// first. w_t always shows the word for the current round (window[0]). Each
// clock edge with advance = 1 shifts the window down by one and appends
// W[t+16] = s1(W[t+14]) + W[t+9] + s0(W[t+1]) + W[t], so rounds 0..15 see the
// block words and rounds 16..63 the expanded ones. The three additions are
// carry-lookahead adders. Only 16 words are stored instead of 64; this
// sliding-window structure is this design's choice.
module sha256_expander
  import sha256_pkg::*;
(
  input  logic   clk,
  input  logic   load,
  input  block_t block,
  input  logic   advance,
  output word_t  w_t
);
  word_t win [16];
  word_t s0, s1, sum_a, sum_b, w_new;

  assign s0 = small_sigma0(win[1]);
  assign s1 = small_sigma1(win[14]);

  cla_adder #(.WIDTH(32)) u_add_a (.a(s1),    .b(win[9]), .cin(1'b0), .sum(sum_a), .cout());
  cla_adder #(.WIDTH(32)) u_add_b (.a(s0),    .b(win[0]), .cin(1'b0), .sum(sum_b), .cout());
  cla_adder #(.WIDTH(32)) u_add_c (.a(sum_a), .b(sum_b),  .cin(1'b0), .sum(w_new), .cout());

  always_ff @(posedge clk) begin
    if (load) begin
      for (int i = 0; i < 16; i++) win[i] <= block[511 - 32*i -: 32];
    end else if (advance) begin
      for (int i = 0; i < 15; i++) win[i] <= win[i+1];
      win[15] <= w_new;
    end
  end

  assign w_t = win[0];
endmodule
