// rpg: random permutation generator. It supplies the g-bit control word c of
// the g-layer shuffle network. During the first 2L cycles of an iteration c is
// zero (identity permutation); during the last L cycles it is a hash
// f(r) of the cycle index. The architecture only asks for some fixed,
// randomly chosen function f: {2L..3L-1} -> {0..2^g-1}. Here f is an
// integer mixing function of j = r - 2L and the code seed:
//   h = (j + SEED) * 0x9E3779B1;  h ^= h >> 15;  h *= 0x85EBCA6B;  c = h[31:32-G]
// which is a fixed combinational circuit (no state). The choice of this
// particular hash is this design's own.
module rpg #(
  parameter int L    = 64,
  parameter int G    = 3,
  parameter int SEED = 1,
  localparam int AW  = (L > 1) ? $clog2(L) : 1
) (
  input  logic          active,  // high during the last L cycles
  input  logic [AW-1:0] j,       // r - 2L
  output logic [G-1:0]  c
);
  logic [31:0] h0, h1, h2;

  always_comb begin
    h0 = (32'(j) + 32'(SEED)) * 32'h9E37_79B1;
    h1 = h0 ^ (h0 >> 15);
    h2 = h1 * 32'h85EB_CA6B;
    c  = active ? h2[31 -: G] : '0;
  end
endmodule
