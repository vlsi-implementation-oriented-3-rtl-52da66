// shuffle_net: the g-layer shuffle network, g 1-layer networks in cascade,
// layer i applying its fixed permutation pi_i when control bit c[i] is set.
// The overall permutation is pi = pi_{g-1}^c{g-1} o ... o pi_0^c0: the data
// pass layer 0 first. With INVERSE = 1 the network undoes that permutation
// (layers g-1 down to 0, each inverted), for the unshuffle path.
// Combinational. The permutations themselves are drawn from SEED, as the
// architecture leaves them random.
module shuffle_net #(
  parameter int K       = 6,
  parameter int W       = 7,
  parameter int G       = 3,
  parameter int SEED    = 1,
  parameter bit INVERSE = 1'b0
) (
  input  logic [G-1:0] c,
  input  logic [W-1:0] din  [K*K],
  output logic [W-1:0] dout [K*K]
);
  for (genvar s = 0; s < G; s++) begin : g_layer
    localparam int LY = INVERSE ? G - 1 - s : s;
    logic [W-1:0] so [K*K];
    if (s == 0) begin : g_first
      shuffle_layer #(.K(K), .W(W), .KIND(1), .LAYER(LY), .SEED(SEED), .INVERSE(INVERSE)) u_layer (
        .en(c[LY]), .din(din), .dout(so));
    end else begin : g_next
      shuffle_layer #(.K(K), .W(W), .KIND(1), .LAYER(LY), .SEED(SEED), .INVERSE(INVERSE)) u_layer (
        .en(c[LY]), .din(g_layer[s-1].so), .dout(so));
    end
  end

  assign dout = g_layer[G-1].so;
endmodule
