// cla_adder: WIDTH-bit two-level carry-lookahead adder, the adder type chosen
// for every modular addition inside the SHA-256 units.
//
// Bits are grouped four at a time. Each bit forms generate g = a&b and
// propagate p = a^b; each group forms a group generate G and group propagate
// P. The carry into every group is then computed directly from the G/P of the
// groups below it and the carry-in (the lookahead equation
// c[j+1] = G[j] | P[j]G[j-1] | ... | P[j]..P[0]c0), and the carries inside a
// group are computed the same way from its bit g/p. Nothing ripples.
// Interface: sum = a + b + cin (mod 2^WIDTH), cout is the carry out.
// Purely combinational. The choice of a carry-lookahead adder follows the
// adder trade-off study; the 4-bit grouping is this design's choice.
module cla_adder #(
  parameter int unsigned WIDTH = 32  // must be a multiple of 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned GROUPS = WIDTH / 4;

  logic [WIDTH-1:0]  g, p;
  logic [GROUPS-1:0] gg, gp;
  logic [GROUPS:0]   gc;     // carry into each group, gc[GROUPS] = cout
  logic [WIDTH-1:0]  c;      // carry into each bit

  assign g = a & b;
  assign p = a ^ b;

  // group generate / propagate
  always_comb begin
    for (int j = 0; j < GROUPS; j++) begin
      gg[j] = g[4*j+3]
            | (p[4*j+3] & g[4*j+2])
            | (p[4*j+3] & p[4*j+2] & g[4*j+1])
            | (p[4*j+3] & p[4*j+2] & p[4*j+1] & g[4*j]);
      gp[j] = &p[4*j +: 4];
    end
  end

  // second level: carry into each group from the lookahead equation
  always_comb begin
    for (int j = 0; j <= GROUPS; j++) begin
      logic term;
      logic acc;
      acc = 1'b0;
      for (int i = 0; i < j; i++) begin
        term = gg[i];
        for (int k = i + 1; k < j; k++) term = term & gp[k];
        acc = acc | term;
      end
      term = cin;
      for (int k = 0; k < j; k++) term = term & gp[k];
      gc[j] = acc | term;
    end
  end

  // first level: carries inside each group
  always_comb begin
    for (int j = 0; j < GROUPS; j++) begin
      c[4*j]   = gc[j];
      c[4*j+1] = g[4*j] | (p[4*j] & gc[j]);
      c[4*j+2] = g[4*j+1] | (p[4*j+1] & g[4*j]) | (p[4*j+1] & p[4*j] & gc[j]);
      c[4*j+3] = g[4*j+2] | (p[4*j+2] & g[4*j+1]) | (p[4*j+2] & p[4*j+1] & g[4*j])
               | (p[4*j+2] & p[4*j+1] & p[4*j] & gc[j]);
    end
  end

  assign sum  = p ^ c;
  assign cout = gc[GROUPS];

endmodule
