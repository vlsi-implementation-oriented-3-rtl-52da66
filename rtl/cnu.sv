// cnu: check node processor unit for one check node of degree k, soft
// belief-propagation (sum-product) update in the log domain:
//   c2v_j = sign_j * psi( sum_{i != j} psi(|v2c_i|) ),
//   sign_j = product of the signs of the other k-1 inputs,
// with psi(m) = -ln(tanh(m/2)) from a 32-entry table (ldpc_pkg::psi). The
// sum over all k inputs is formed once and each input's own term subtracted.
// Magnitudes saturate at 31 (7.75); outputs are in [-31, 31].
// It also performs the parity check on the k estimated decoded bits: fail = 1
// when their XOR is 1. Combinational; one check node per clock.
// The table-based psi and the 6-bit message width are choices of this design
// (the width follows the precision used for the design examples).
module cnu #(
  parameter int K = 6,
  parameter int Q = 6
) (
  input  logic signed [Q-1:0] v2c  [K],
  input  logic [K-1:0]        bits,
  output logic signed [Q-1:0] c2v  [K],
  output logic                fail
);
  localparam int SW = 5 + $clog2(K + 1);

  logic [4:0]    mag  [K];
  logic [4:0]    pv   [K];
  logic [K-1:0]  sgn;
  logic [SW-1:0] sum;
  logic [SW-1:0] ext;
  logic [4:0]    om;
  logic          sall;

  if (Q != 6) begin : g_bad_q
    $error("cnu: the psi table is defined for 6-bit messages only");
  end

  always_comb begin
    sum  = '0;
    for (int i = 0; i < K; i++) begin
      sgn[i] = v2c[i][Q-1];
      if (v2c[i] < 0) mag[i] = (v2c[i] == -32) ? 5'd31 : 5'(-v2c[i]);
      else            mag[i] = 5'(v2c[i]);
      pv[i] = ldpc_pkg::psi(mag[i]);
      sum   = sum + SW'(pv[i]);
    end
    sall = ^sgn;
    for (int i = 0; i < K; i++) begin
      ext    = sum - SW'(pv[i]);
      om     = ldpc_pkg::psi((ext > SW'(31)) ? 5'd31 : ext[4:0]);
      c2v[i] = (sall ^ sgn[i]) ? -$signed({1'b0, om}) : $signed({1'b0, om});
    end
    fail = ^bits;
  end
endmodule
