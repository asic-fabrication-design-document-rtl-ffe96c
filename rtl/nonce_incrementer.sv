// nonce_incrementer: 32-bit nonce counter of the miner.
//
// After reset the nonce is 0. On each rising clock edge where inc = 1 the
// nonce grows by exactly 1 (wrapping from 2^32-1 to 0); with inc = 0 it
// holds. nonce always shows the stored value. Reset-to-zero, the one-bit
// increment control and the exact +1 step follow the design's requirements.
// The load port, which copies the nonce field of the block header into the
// counter before a search starts, is this design's addition so that a search
// can begin at any nonce; load has priority over inc.
module nonce_incrementer #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] load_value,
  input  logic             inc,
  output logic [WIDTH-1:0] nonce
);
  always_ff @(posedge clk) begin
    if (!rst_n)     nonce <= '0;
    else if (load)  nonce <= load_value;
    else if (inc)   nonce <= nonce + WIDTH'(1);
  end
endmodule
