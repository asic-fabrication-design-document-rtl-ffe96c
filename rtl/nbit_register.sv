// nbit_register: WIDTH-bit storage register with a single write-enable bit
// and a synchronous clear, the building block of the block-header storage and
// of the result register that keeps the winning hash.
//
// q always shows the stored value. On a rising clock edge with we = 1 the
// register takes d; with we = 0 it holds. rst_n = 0 clears it to zero. These
// four properties (readable output, n-bit write, one-bit write enable, clear
// to zero) are the register requirements of the design; the synchronous,
// active-low reset is this design's choice.
module nbit_register #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n)  q <= '0;
    else if (we) q <= d;
  end
endmodule
