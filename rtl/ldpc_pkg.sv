// ldpc_pkg: constants, message types and elaboration-time helper functions
// shared by the partly parallel (3,k)-regular LDPC decoder.
//
// Messages (intrinsic and extrinsic) are two's complement log-likelihood
// ratios, LLR = ln(P(bit=0)/P(bit=1)), with two fractional bits, so a
// negative value means the bit is more likely a one. The 6-bit width follows
// the finite-precision set-up of the design examples; the placement of the
// binary point (two fractional bits) is this design's own choice.
//
// The three "random" ingredients that select one code of the ensemble (the
// AG preset values t(x,y), the fixed permutations of the g-layer shuffle
// network and the hash function of the random permutation generator) are not
// fixed numbers: they are drawn here from a 32-bit linear congruential
// generator seeded by a parameter, so that any size (k, L, g) can be
// elaborated. t(x,y) is drawn under the two constraints the code needs:
//   1. for a given x, t(x,y1) != t(x,y2) for y1 != y2;
//   2. for a given y, t(x1,y) - t(x2,y) != (x1-x2)*y (mod L) for x1 != x2.
package ldpc_pkg;

  localparam int MAX_K2    = 64;  // largest k*k the table helpers support (k <= 8)
  localparam int MAX_K     = 8;

  typedef int perm_t [MAX_K2];

  // Numerator of the LCG x' = 1664525*x + 1013904223 (mod 2^32).
  function automatic logic [31:0] lcg_next(logic [31:0] s);
    return s * 32'd1664525 + 32'd1013904223;
  endfunction

  // Draw a value in 0..n-1 from the upper half of the LCG state.
  function automatic int lcg_pick(logic [31:0] s, int n);
    return int'(s >> 16) % n;
  endfunction

  function automatic int mod_pos(int a, int m);
    int r;
    r = a % m;
    return (r < 0) ? r + m : r;
  endfunction

  // psi(m) = -ln(tanh(m/2)) on 5-bit magnitudes with two fractional bits:
  //   psi_q(n) = min(31, floor(4 * -ln(tanh(n/8)) + 0.5)), psi_q(0) = 31.
  // psi is its own inverse, so the same table serves both directions of the
  // check-node computation.
  function automatic logic [4:0] psi(logic [4:0] m);
    case (m)
      5'd0:    return 5'd31;
      5'd1:    return 5'd8;
      5'd2:    return 5'd6;
      5'd3:    return 5'd4;
      5'd4:    return 5'd3;
      5'd5:    return 5'd2;
      5'd6:    return 5'd2;
      5'd7:    return 5'd1;
      5'd8:    return 5'd1;
      5'd9:    return 5'd1;
      5'd10:   return 5'd1;
      5'd11:   return 5'd1;
      default: return 5'd0;
    endcase
  endfunction

  // AG preset value t(x,y) (x, y counted from 1) of the code selected by seed.
  // The whole table is drawn greedily; a dead end restarts the draw.
  function automatic int t_value(int L, int K, int xs, int ys, int seed);
    int t [MAX_K2];
    logic [31:0] s;
    int cand;
    bit ok, stuck;
    s = 32'(seed) ^ 32'h5A17_C3E1;
    for (int attempt = 0; attempt < 64; attempt++) begin
      stuck = 1'b0;
      for (int x = 1; x <= K; x++) begin
        for (int y = 1; y <= K; y++) begin
          ok = 1'b0;
          for (int tries = 0; tries < 4 * L + 16 && !ok; tries++) begin
            s = lcg_next(s);
            cand = lcg_pick(s, L);
            ok = 1'b1;
            for (int y2 = 1; y2 < y; y2++)
              if (t[(x-1)*MAX_K + y2-1] == cand) ok = 1'b0;
            for (int x2 = 1; x2 < x; x2++)
              if (mod_pos(cand - t[(x2-1)*MAX_K + y-1], L) == mod_pos((x - x2) * y, L)) ok = 1'b0;
          end
          if (!ok) stuck = 1'b1;
          t[(x-1)*MAX_K + y-1] = cand;
        end
      end
      if (!stuck) return t[(xs-1)*MAX_K + ys-1];
    end
    return t[(xs-1)*MAX_K + ys-1];
  endfunction

  // Fixed permutation pi_layer of the g-layer shuffle network on n = k*k
  // positions (Fisher-Yates shuffle driven by the LCG). Convention: the layer
  // maps input sequence d to output sequence e with e[j] = d[pi(j)].
  function automatic perm_t layer_perm(int n, int layer, int seed);
    perm_t p;
    logic [31:0] s;
    int j, tmp;
    for (int i = 0; i < MAX_K2; i++) p[i] = i;
    s = 32'(seed) * 32'd2654435761 + 32'(layer) * 32'd40503 + 32'd7;
    for (int i = n - 1; i > 0; i--) begin
      s = lcg_next(s);
      j = lcg_pick(s, i + 1);
      tmp = p[i]; p[i] = p[j]; p[j] = tmp;
    end
    return p;
  endfunction

  // Inverse of permutation p on n positions: q[p[i]] = i.
  function automatic perm_t invert_perm(perm_t p, int n);
    perm_t q;
    for (int i = 0; i < MAX_K2; i++) q[i] = i;
    for (int i = 0; i < n; i++) q[p[i]] = i;
    return q;
  endfunction

  // pi_-1 of the 1-layer shuffle network: pi(i) = (i mod k)*k + floor(i/k).
  function automatic perm_t transpose_perm(int k);
    perm_t p;
    for (int i = 0; i < MAX_K2; i++) p[i] = i;
    for (int i = 0; i < k * k; i++) p[i] = (i % k) * k + i / k;
    return p;
  endfunction

endpackage
