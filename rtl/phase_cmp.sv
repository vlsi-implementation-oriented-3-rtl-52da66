// phase_cmp: the comparator of the decoder. From the cycle index r within a
// decoding iteration it produces c_-1 = 1 while r < L (the 1-layer shuffle
// network then applies pi_-1) and 0 otherwise. It also gives which third of
// the iteration r is in (seg = 0, 1, 2 for the RAMs E1, E2, E3) and a pulse at
// r = 0, L, 2L where the address generators are preset. Purely combinational.
// c_-1 and the three thirds follow the architecture; bundling the third and
// the preset pulse into this unit is this design's choice.
module phase_cmp #(
  parameter int L = 64,
  localparam int RW = $clog2(3 * L + 4)
) (
  input  logic [RW-1:0] r,
  output logic          c_m1,
  output logic [1:0]    seg,
  output logic          seg_start
);
  always_comb begin
    c_m1      = (int'(r) < L);
    seg       = (int'(r) < L) ? 2'd0 : (int'(r) < 2 * L) ? 2'd1 : 2'd2;
    seg_start = (int'(r) == 0) || (int'(r) == L) || (int'(r) == 2 * L);
  end
endmodule
