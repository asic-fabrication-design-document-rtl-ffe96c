// miner_fsm: controller of the Bitcoin miner, the mining state machine.
//
// States and transitions (miner_pkg::miner_state_e):
//   RESET   -> WAIT                  once reset is released
//   WAIT    -> LOAD     when la_start = 1 (logic-analyzer bit 0)
//   LOAD    stays while la_start = 1; header writes are allowed here
//           -> COMPUTE  when la_start = 0; the nonce counter loads the
//                       header's nonce field
//   COMPUTE issues one start to the double SHA-256 on its first cycle
//           (the mid hash is recomputed for the first nonce of a header and
//           reused after that); stays until valid_out = 1, then -> CHECK
//   CHECK   hit (digest < target): store the hash, -> OUTPUT
//           miss: nonce++ and -> COMPUTE
//   OUTPUT  found = 1; stays until done = 1, then -> WAIT
// tries counts the nonces checked since the last LOAD. All outputs except
// state, found and tries are one-cycle strobes decoded from the state.
// The states and their conditions follow the mining state-machine diagram;
// the strobe timing and the tries counter are this design's choices.
module miner_fsm
  import miner_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         la_start,
  input  logic         valid_out,
  input  logic         hit,
  input  logic         done,
  output miner_state_e state,
  output logic         write_allow,
  output logic         sha_start,
  output logic         reuse_mid,
  output logic         nonce_load,
  output logic         nonce_inc,
  output logic         result_we,
  output logic         found,
  output logic [31:0]  tries
);
  logic launch;   // the next COMPUTE cycle must start the hash
  logic first;    // first hash of this header: recompute the mid hash

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= ST_RESET;
      launch <= 1'b0;
      first  <= 1'b0;
      tries  <= '0;
    end else begin
      unique case (state)
        ST_RESET: state <= ST_WAIT;
        ST_WAIT:  if (la_start) state <= ST_LOAD;
        ST_LOAD:  if (!la_start) begin
                    state  <= ST_COMPUTE;
                    launch <= 1'b1;
                    first  <= 1'b1;
                    tries  <= '0;
                  end
        ST_COMPUTE: begin
                    if (launch) begin
                      launch <= 1'b0;
                      first  <= 1'b0;
                    end
                    if (valid_out) state <= ST_CHECK;
                  end
        ST_CHECK: begin
                    tries <= tries + 32'd1;
                    if (hit) state <= ST_OUTPUT;
                    else begin
                      state  <= ST_COMPUTE;
                      launch <= 1'b1;
                    end
                  end
        ST_OUTPUT: if (done) state <= ST_WAIT;
        default:   state <= ST_RESET;
      endcase
    end
  end

  assign write_allow = (state == ST_LOAD);
  assign nonce_load  = (state == ST_LOAD) && !la_start;
  assign sha_start   = (state == ST_COMPUTE) && launch;
  assign reuse_mid   = !first;
  assign nonce_inc   = (state == ST_CHECK) && !hit;
  assign result_we   = (state == ST_CHECK) && hit;
  assign found       = (state == ST_OUTPUT);

  // a hash is started only from COMPUTE, and the result is stored only on a hit
  a_start_in_compute: assert property (@(posedge clk) disable iff (!rst_n)
    sha_start |-> state == ST_COMPUTE);
  a_one_start: assert property (@(posedge clk) disable iff (!rst_n)
    sha_start |=> !sha_start);
endmodule
