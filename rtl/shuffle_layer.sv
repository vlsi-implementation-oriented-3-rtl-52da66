// shuffle_layer: one 1-layer shuffle network on k*k words of W bits. Under
// control bit en it applies a fixed permutation pi (output j takes input
// pi(j)); otherwise it passes the words in order (the identity permutation).
// With INVERSE = 1 it applies pi^-1 instead (output pi(j) takes input j),
// which the decoder uses to send check-to-variable messages back to the
// banks they came from. Pure wiring plus one 2:1 multiplexer per word.
// pi_-1 is the architecture's; the random layers are drawn here from a seed
// because the architecture only asks for fixed random permutations.
//   KIND = 0 : pi_-1(i) = (i mod k)*k + floor(i/k)  (the 1-layer network)
//   KIND = 1 : layer LAYER of the g-layer network, a fixed permutation drawn
//              from SEED (ldpc_pkg::layer_perm).
module shuffle_layer #(
  parameter int K       = 6,
  parameter int W       = 7,
  parameter int KIND    = 0,
  parameter int LAYER   = 0,
  parameter int SEED    = 1,
  parameter bit INVERSE = 1'b0
) (
  input  logic         en,
  input  logic [W-1:0] din  [K*K],
  output logic [W-1:0] dout [K*K]
);
  localparam ldpc_pkg::perm_t PI = (KIND == 0) ? ldpc_pkg::transpose_perm(K)
                                               : ldpc_pkg::layer_perm(K * K, LAYER, SEED);
  // Source of each output word: pi for the forward direction, pi^-1 for the
  // inverse one (output pi(j) takes input j <=> output i takes input pi^-1(i)).
  localparam ldpc_pkg::perm_t SRC = INVERSE ? ldpc_pkg::invert_perm(PI, K * K) : PI;

  for (genvar j = 0; j < K * K; j++) begin : g_word
    assign dout[j] = en ? din[SRC[j]] : din[j];
  end
endmodule
