// comparator: 256-bit target check of the miner.
//
// hash_out always repeats the hash input. valid is 1 when target > hash,
// meaning the hash is a solution, and 0 otherwise, meaning the nonce must be
// incremented and the header hashed again. Both operands are unsigned 256-bit
// numbers. Purely combinational. The two outputs and the strict "target >
// hash" rule follow the design's requirements; the miner stores hash_out in
// its result register only when valid is 1.
module comparator #(
  parameter int unsigned WIDTH = 256
) (
  input  logic [WIDTH-1:0] target,
  input  logic [WIDTH-1:0] hash,
  output logic [WIDTH-1:0] hash_out,
  output logic             valid
);
  assign hash_out = hash;
  assign valid    = (target > hash);
endmodule
