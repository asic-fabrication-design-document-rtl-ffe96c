// sha256_unit: one SHA-256 compression of a 512-bit block, built from a
// message expander and a message compressor (one "SHA-256" box of the
// double-hash datapath).
//
// A start pulse samples the block and the chaining value h_in. The unit then
// runs the 64 rounds, one per clock cycle, and finally adds the working
// variables to h_in word by word (eight carry-lookahead adders). done is high
// for one cycle when digest is ready; digest then holds until the next start.
// busy is high from the start edge until done. A start while busy restarts
// the unit. Latency: done rises UNIT_LATENCY (65) clock edges after the
// edge that sampled start. Padding is not done here: the caller supplies
// complete, padded blocks. The iterative one-round-per-cycle schedule and
// the start/done handshake are this design's choice.
module sha256_unit
  import sha256_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t block,
  input  hash_t  h_in,
  output logic   busy,
  output logic   done,
  output hash_t  digest
);
  typedef enum logic [1:0] {S_IDLE, S_ROUND, S_FINAL} ustate_e;

  ustate_e     st;
  logic [5:0]  t;
  hash_t       h_keep;
  hash_t       state;
  hash_t       sum;
  word_t       w_t;
  logic        in_round;

  assign in_round = (st == S_ROUND);

  sha256_expander u_exp (
    .clk(clk), .load(start), .block(block), .advance(in_round), .w_t(w_t)
  );

  sha256_compressor u_cmp (
    .clk(clk), .load(start), .h_in(h_in), .round(in_round),
    .k(K[t]), .w(w_t), .state(state)
  );

  for (genvar i = 0; i < 8; i++) begin : g_final
    cla_adder #(.WIDTH(32)) u_fin (
      .a(h_keep[32*i +: 32]), .b(state[32*i +: 32]), .cin(1'b0),
      .sum(sum[32*i +: 32]), .cout()
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      t      <= '0;
      done   <= 1'b0;
      digest <= '0;
      h_keep <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        st     <= S_ROUND;
        t      <= '0;
        h_keep <= h_in;
      end else begin
        unique case (st)
          S_IDLE:  ;
          S_ROUND: begin
            t <= t + 6'd1;
            if (t == 6'(ROUNDS - 1)) st <= S_FINAL;
          end
          S_FINAL: begin
            digest <= sum;
            done   <= 1'b1;
            st     <= S_IDLE;
          end
          default: st <= S_IDLE;
        endcase
      end
    end
  end

  assign busy = (st != S_IDLE);
endmodule
