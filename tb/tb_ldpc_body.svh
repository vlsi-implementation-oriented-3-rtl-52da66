// Shared body of the decoder end-to-end testbenches: the reference model,
// the stimulus and the checks, as task run_all(). The including module
// defines the localparams K, L, G, P, Q, MAX_ITER, SEED, NFRAMES, the clock
// clk, the reset rst_n and an instance `dut` of ldpc_decoder with those sizes.
//
// Reference model: the testbench builds the parity-check matrix itself from
// the architecture's rules (pi_-1 transpose for the first L checks of each
// CNU, AG offsets ((x-1)*y) mod L for the second, AG offsets t(x,y) and the
// g-layer permutation selected by f(r) for the third), checks that it is
// (3,k)-regular and 4-cycle free, that its first two thirds have girth 12
// with a 12-cycle through every check node, and runs a flooding belief-propagation decoder on it whose
// psi function is evaluated with real arithmetic (-ln tanh(x/2)). Every frame
// the decoded bits, the iteration count, the convergence flag and the number
// of cycles spent decoding are compared with the reference.
//
// The matrix is also reduced over GF(2) to count its redundant checks and to
// draw random codewords. Frames: random codewords (frame 1 all-zero) through
// a noisy channel at several noise levels (frame 0 noiseless, the last frame
// very noisy so that MAX_ITER is reached), with random gaps in in_valid.

  localparam int K2   = K * K;
  localparam int N    = K2 * L;
  localparam int M    = 3 * K * L;
  localparam int E    = M * K;
  localparam int QMAX = 2 ** (Q - 1) - 1;
  localparam int C2   = 2 * K * L;       // checks of the first two thirds
  localparam int NN   = N + C2;          // nodes of their Tanner graph

  int checks = 0, failures = 0;
  int evar [E];                 // variable node of each edge (edge = check*K + m)
  int vedge [N][3];             // edges of each variable node
  int vdeg [N];
  int llr [N];
  int v2c [E];
  int c2v [E];
  bit hard [N];
  int ref_iters;
  bit ref_conv;
  int psi_tab [32];
  logic [N-1:0] hrow [M];       // parity-check rows, reduced to echelon form
  int pivcol [M];
  int rank;
  bit cw [N];                   // transmitted codeword of the current frame
  // mechanism counters
  int n_pi_m1 = 0, n_glayer = 0, n_conv = 0, n_maxit = 0, n_chkfail = 0, n_stall = 0, n_vnu = 0, n_corrected = 0;

  function automatic int sat_q(int v);
    return (v > QMAX) ? QMAX : (v < -QMAX) ? -QMAX : v;
  endfunction

  // Same mixing hash the RPG is specified with.
  function automatic int hash_c(int j);
    logic [31:0] h;
    h = (32'(j) + 32'(SEED)) * 32'h9E37_79B1;
    h = h ^ (h >> 15);
    h = h * 32'h85EB_CA6B;
    return int'(h >> (32 - G));
  endfunction

  task automatic build_h();
    ldpc_pkg::perm_t pl [G];
    int p, b, x, y, a, idx, cc, cidx, ti;
    int tt [K2];
    for (int l = 0; l < G; l++) pl[l] = ldpc_pkg::layer_perm(K2, l, SEED);
    for (int i = 0; i < K2; i++) tt[i] = ldpc_pkg::t_value(L, K, (i % K) + 1, (i / K) + 1, SEED);
    // t(x,y) constraints
    for (int x1 = 1; x1 <= K; x1++)
      for (int y1 = 1; y1 <= K; y1++)
        for (int x2 = 1; x2 <= K; x2++)
          for (int y2 = 1; y2 <= K; y2++) begin
            if (x1 == x2 && y1 < y2) begin
              checks++;
              if (tt[(y1-1)*K + x1-1] == tt[(y2-1)*K + x2-1]) failures++;
            end
            if (y1 == y2 && x1 < x2) begin
              checks++;
              if (((tt[(y1-1)*K + x1-1] - tt[(y2-1)*K + x2-1]) % L + L) % L == ((x1 - x2) * y1 % L + L) % L)
                failures++;
            end
          end
    for (int n = 0; n < N; n++) vdeg[n] = 0;
    for (int s = 0; s < 3; s++)
      for (int r = 0; r < L; r++)
        for (int j = 0; j < K; j++) begin
          cidx = (s * L + r) * K + j;
          cc = hash_c(r);
          for (int m = 0; m < K; m++) begin
            p = j * K + m;
            if (s == 0) b = (p % K) * K + p / K;
            else if (s == 1) b = p;
            else begin
              idx = p;
              for (int l = G - 1; l >= 0; l--) if (cc[l]) idx = pl[l][idx];
              b = idx;
            end
            x = b % K + 1;
            y = b / K + 1;
            if (s == 0) a = r;
            else if (s == 1) a = ((x - 1) * y + r) % L;
            else a = (tt[b] + r) % L;
            evar[cidx * K + m] = b * L + a;
            ti = vdeg[b * L + a];
            if (ti < 3) vedge[b * L + a][ti] = cidx * K + m;
            vdeg[b * L + a]++;
          end
        end
    for (int n = 0; n < N; n++) begin
      checks++;
      if (vdeg[n] != 3) begin
        failures++;
        $display("variable %0d has degree %0d", n, vdeg[n]);
      end
    end
    // the code must be 4-cycle free: no two variable nodes share two checks
    for (int n = 0; n < N; n++) begin
      int seen [int];
      bit four;
      four = 0;
      for (int i = 0; i < 3; i++)
        for (int m = 0; m < K; m++) begin
          int w;
          w = evar[(vedge[n][i] / K) * K + m];
          if (w != n) begin
            if (seen.exists(w)) four = 1;
            seen[w] = 1;
          end
        end
      checks++;
      if (four) begin
        failures++;
        $display("variable %0d lies on a 4-cycle", n);
      end
    end
    for (int m = 0; m < 32; m++) begin
      real v;
      if (m == 0) psi_tab[m] = 31;
      else begin
        v = 4.0 * (-$ln($tanh(m / 8.0)));
        psi_tab[m] = (v >= 31.0) ? 31 : int'($floor(v + 0.5));
      end
    end
  endtask

  // Girth of the Tanner graph of [H0; H1] (the checks of the first two thirds):
  // it must be 12 with a 12-cycle through every check node, provided L is not
  // a product a*b with a, b < k. Breadth-first search from every check node,
  // tracking which first branch each node descends from; a non-tree edge
  // joining two branches closes a cycle through the root.
  task automatic girth_h01();
    int dd [NN];
    int br [NN];
    int par [NN];
    int q [NN];
    int qh, qt, u, w, best, girth;
    bit all12;
    girth = 1 << 30;
    all12 = 1;
    for (int root = 0; root < C2; root++) begin
      for (int i = 0; i < NN; i++) begin dd[i] = -1; br[i] = -1; par[i] = -1; end
      dd[N + root] = 0;
      qh = 0; qt = 0;
      q[qt++] = N + root;
      best = 1 << 30;
      while (qh < qt) begin
        u = q[qh++];
        for (int e = 0; e < ((u < N) ? 2 : K); e++) begin
          w = (u < N) ? N + vedge[u][e] / K : evar[(u - N) * K + e];
          if (w == par[u]) continue;
          if (dd[w] < 0) begin
            dd[w] = dd[u] + 1;
            par[w] = u;
            br[w] = (u == N + root) ? w : br[u];
            q[qt++] = w;
          end else if (br[w] != br[u] && u != N + root && w != N + root) begin
            if (dd[u] + dd[w] + 1 < best) best = dd[u] + dd[w] + 1;
          end
        end
      end
      if (best < girth) girth = best;
      if (best != 12) all12 = 0;
    end
    checks += 2;
    if (girth != 12) failures++;
    if (!all12) failures++;
    $display("[H0; H1]: girth %0d, 12-cycle through every check node: %0d", girth, all12);
  endtask

  // Gaussian elimination over GF(2) of the matrix built by build_h(). The
  // architecture guarantees at least two redundant checks (rank <= M - 2).
  task automatic reduce_h();
    logic [N-1:0] tmp;
    int p;
    for (int c = 0; c < M; c++) begin
      hrow[c] = '0;
      for (int m = 0; m < K; m++) hrow[c][evar[c*K+m]] = 1'b1;
    end
    rank = 0;
    for (int col = 0; col < N && rank < M; col++) begin
      p = -1;
      for (int i = rank; i < M; i++) if (hrow[i][col]) begin p = i; break; end
      if (p >= 0) begin
        tmp = hrow[p]; hrow[p] = hrow[rank]; hrow[rank] = tmp;
        for (int i = 0; i < M; i++) if (i != rank && hrow[i][col]) hrow[i] ^= hrow[rank];
        pivcol[rank] = col;
        rank++;
      end
    end
    checks++;
    if (rank > M - 2) failures++;
    $display("code: N = %0d, %0d checks of rank %0d, dimension %0d", N, M, rank, N - rank);
  endtask

  // Random codeword: random free bits, pivot bits solved from the echelon rows;
  // verified against the original checks.
  task automatic random_codeword(bit zero);
    logic [N-1:0] x;
    bit par;
    for (int n = 0; n < N; n++) x[n] = zero ? 1'b0 : 1'($urandom);
    for (int i = 0; i < rank; i++) x[pivcol[i]] = 1'b0;
    for (int i = 0; i < rank; i++) x[pivcol[i]] = ^(hrow[i] & x);
    for (int n = 0; n < N; n++) cw[n] = x[n];
    for (int c = 0; c < M; c++) begin
      par = 0;
      for (int m = 0; m < K; m++) par ^= cw[evar[c*K+m]];
      checks++;
      if (par) failures++;
    end
  endtask

  task automatic ref_decode();
    bit fail;
    int total, mag, sm, sgn, ext;
    for (int e = 0; e < E; e++) v2c[e] = sat_q(llr[evar[e]]);
    for (int n = 0; n < N; n++) hard[n] = llr[n] < 0;
    ref_iters = 0;
    ref_conv = 0;
    while (1) begin
      fail = 0;
      for (int c = 0; c < M; c++) begin
        bit par;
        par = 0;
        sm = 0;
        sgn = 0;
        for (int m = 0; m < K; m++) begin
          par ^= hard[evar[c*K+m]];
          mag = (v2c[c*K+m] < 0) ? -v2c[c*K+m] : v2c[c*K+m];
          if (mag > 31) mag = 31;
          sm += psi_tab[mag];
          sgn ^= int'(v2c[c*K+m] < 0);
        end
        if (par) fail = 1;
        for (int m = 0; m < K; m++) begin
          mag = (v2c[c*K+m] < 0) ? -v2c[c*K+m] : v2c[c*K+m];
          if (mag > 31) mag = 31;
          ext = sm - psi_tab[mag];
          if (ext > 31) ext = 31;
          c2v[c*K+m] = ((sgn ^ (v2c[c*K+m] < 0)) != 0) ? -psi_tab[ext] : psi_tab[ext];
        end
      end
      for (int n = 0; n < N; n++) begin
        total = llr[n] + c2v[vedge[n][0]] + c2v[vedge[n][1]] + c2v[vedge[n][2]];
        for (int i = 0; i < 3; i++) v2c[vedge[n][i]] = sat_q(total - c2v[vedge[n][i]]);
        hard[n] = total < 0;
      end
      ref_iters++;
      if (!fail) begin
        ref_conv = 1;
        break;
      end
      if (ref_iters >= MAX_ITER) break;
    end
  endtask

  // Rough Gaussian noise: sum of four uniform values.
  function automatic int noisy(int mean, int spread);
    int s;
    s = 0;
    for (int i = 0; i < 4; i++) s += int'($urandom_range(2 * spread, 0)) - spread;
    s = mean + s / 2;
    if (s > 31) s = 31;
    if (s < -32) s = -32;
    return s;
  endfunction

  // mechanism monitors
  always @(posedge clk) begin
    if (dut.v1 && dut.cm1_1) n_pi_m1++;
    if (dut.v1 && dut.c_1 != '0) n_glayer++;
    if (dut.chk_valid && dut.chk_fail) n_chkfail++;
    if (dut.v2) n_vnu++;
    if (dut_in_ready && !dut_in_valid && dut.u_ctrl.cnt != 0) n_stall++;  // gap inside a load
  end

  int spreads [4] = '{0, 8, 9, 12};

  task automatic run_all();
    int sent, t_start, got;
    int spread;
    rst_n = 0;
    dut_in_valid = 0;
    for (int b = 0; b < K2; b++) dut_in_llr[b] = '0;
    build_h();
    reduce_h();
    girth_h01();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NFRAMES; f++) begin
      spread = (f == NFRAMES - 1) ? 60 : spreads[f % 4];
      random_codeword(f == 1);
      for (int n = 0; n < N; n++) begin
        llr[n] = (f == NFRAMES - 1) ? noisy(2, spread) : noisy(8, spread);
        if (cw[n]) llr[n] = (llr[n] == -32) ? 31 : -llr[n];
      end
      ref_decode();
      // load
      sent = 0;
      while (sent < L) begin
        @(negedge clk);
        dut_in_valid = ($urandom_range(3, 0) != 0);
        for (int b = 0; b < K2; b++) dut_in_llr[b] = P'(llr[b * L + sent]);
        @(posedge clk);
        if (dut_in_valid && dut_in_ready) sent++;
      end
      @(negedge clk);
      dut_in_valid = 0;
      t_start = cyc_count;
      // wait for output and compare
      got = 0;
      while (got < L) begin
        @(posedge clk);
        #1;
        if (dut_out_valid) begin
          if (got == 0) begin
            checks++;
            if (cyc_count - t_start != ref_iters * (3 * L + 2) + 1) begin
              failures++;
              $display("frame %0d: decode took %0d cycles, expected %0d", f, cyc_count - t_start,
                       ref_iters * (3 * L + 2) + 1);
            end
          end
          checks++;
          if (int'(dut_out_addr) != got) failures++;
          for (int b = 0; b < K2; b++) begin
            checks++;
            if (dut_out_bits[b] != hard[b * L + got]) begin
              failures++;
              if (failures < 10) $display("frame %0d: bit bank %0d addr %0d got %0d exp %0d", f, b, got, dut_out_bits[b], hard[b*L+got]);
            end
          end
          checks++;
          if (dut_out_last != (got == L - 1)) failures++;
          got++;
        end
      end
      checks += 2;
      if (int'(dut_iterations) != ref_iters) begin
        failures++;
        $display("frame %0d: iterations %0d expected %0d", f, dut_iterations, ref_iters);
      end
      if (dut_converged != ref_conv) failures++;
      if (ref_conv) n_conv++; else n_maxit++;
      if (ref_conv) begin
        int errs;
        int in_errs;
        errs = 0;
        in_errs = 0;
        for (int n = 0; n < N; n++) begin
          if (hard[n] != cw[n]) errs++;
          if ((llr[n] < 0) != cw[n]) in_errs++;
        end
        if (errs == 0 && in_errs > 0) n_corrected++;
      end
      $display("frame %0d: spread %0d, %0d iterations, converged %0d", f, spread, ref_iters, ref_conv);
    end
    $display("mechanisms: pi_-1 cycles %0d, g-layer permuted cycles %0d, failed-check cycles %0d, VNU updates %0d, input stalls %0d, converged frames %0d (%0d with channel errors corrected to the sent codeword), max-iteration frames %0d",
             n_pi_m1, n_glayer, n_chkfail, n_vnu, n_stall, n_conv, n_corrected, n_maxit);
    checks += 8;
    if (n_corrected == 0) failures++;
    if (n_pi_m1 == 0) failures++;
    if (n_glayer == 0) failures++;
    if (n_chkfail == 0) failures++;
    if (n_vnu == 0) failures++;
    if (n_stall == 0) failures++;
    if (n_conv == 0) failures++;
    if (n_maxit == 0) failures++;
  endtask

  int cyc_count = 0;
  always @(posedge clk) cyc_count++;
