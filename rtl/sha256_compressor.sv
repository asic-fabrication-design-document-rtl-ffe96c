// sha256_compressor: message compressor (round datapath) of one SHA-256 unit.
//
// It holds the eight working variables a..h. load sets them to the chaining
// value h_in (a = h_in[255:224] ... h = h_in[31:0]). Each clock edge with
// round = 1 performs one SHA-256 round with the round constant k and the
// schedule word w:
//   T1 = h + S1(e) + Ch(e,f,g) + k + w,  T2 = S0(a) + Maj(a,b,c)
//   (a,b,c,d,e,f,g,h) <= (T1+T2, a, b, c, d+T1, e, f, g)
// state shows a..h packed in the same order as h_in. All seven additions are
// carry-lookahead adders. One round per cycle is this design's choice.
module sha256_compressor
  import sha256_pkg::*;
(
  input  logic  clk,
  input  logic  load,
  input  hash_t h_in,
  input  logic  round,
  input  word_t k,
  input  word_t w,
  output hash_t state
);
  word_t a, b, c, d, e, f, g, h;
  word_t hs1, chk, t1a, t1, t2, a_new, e_new;

  cla_adder #(.WIDTH(32)) u_hs1 (.a(h),   .b(big_sigma1(e)),  .cin(1'b0), .sum(hs1),   .cout());
  cla_adder #(.WIDTH(32)) u_chk (.a(ch(e, f, g)), .b(k),      .cin(1'b0), .sum(chk),   .cout());
  cla_adder #(.WIDTH(32)) u_t1a (.a(hs1), .b(chk),            .cin(1'b0), .sum(t1a),   .cout());
  cla_adder #(.WIDTH(32)) u_t1  (.a(t1a), .b(w),              .cin(1'b0), .sum(t1),    .cout());
  cla_adder #(.WIDTH(32)) u_t2  (.a(big_sigma0(a)), .b(maj(a, b, c)), .cin(1'b0), .sum(t2), .cout());
  cla_adder #(.WIDTH(32)) u_e   (.a(d),   .b(t1),             .cin(1'b0), .sum(e_new), .cout());
  cla_adder #(.WIDTH(32)) u_a   (.a(t1),  .b(t2),             .cin(1'b0), .sum(a_new), .cout());

  always_ff @(posedge clk) begin
    if (load) begin
      {a, b, c, d, e, f, g, h} <= h_in;
    end else if (round) begin
      {a, b, c, d, e, f, g, h} <= {a_new, a, b, c, e_new, e, f, g};
    end
  end

  assign state = {a, b, c, d, e, f, g, h};
endmodule
