// tb_shuffle_net: checks the g-layer network for every control word c
// against the composition of its layer permutations (layer 0 applied first),
// that each setting is a permutation, that different control words give
// different permutations, and that the inverse network restores the input.
module tb_shuffle_net;
  localparam int K = 6, W = 7, G = 3, SEED = 1;
  localparam int K2 = K * K;
  int checks = 0, failures = 0;
  logic [G-1:0] c;
  logic [W-1:0] din [K2];
  logic [W-1:0] mid [K2];
  logic [W-1:0] back [K2];
  ldpc_pkg::perm_t pl [G];
  int outs [2**G][K2];

  shuffle_net #(.K(K), .W(W), .G(G), .SEED(SEED)) dut (.c, .din, .dout(mid));
  shuffle_net #(.K(K), .W(W), .G(G), .SEED(SEED), .INVERSE(1'b1)) dut_inv (.c, .din(mid), .dout(back));

  initial begin
    int idx, diff;
    bit used [K2];
    for (int l = 0; l < G; l++) pl[l] = ldpc_pkg::layer_perm(K2, l, SEED);
    for (int i = 0; i < K2; i++) din[i] = W'(i);
    for (int cv = 0; cv < 2 ** G; cv++) begin
      c = G'(cv);
      #1;
      for (int i = 0; i < K2; i++) used[i] = 0;
      for (int p = 0; p < K2; p++) begin
        idx = p;
        for (int l = G - 1; l >= 0; l--) if (cv[l]) idx = pl[l][idx];
        checks += 2;
        if (int'(mid[p]) != idx) failures++;
        if (back[p] != din[p]) failures++;
        used[mid[p]] = 1;
        outs[cv][p] = int'(mid[p]);
      end
      for (int i = 0; i < K2; i++) begin
        checks++;
        if (!used[i]) failures++;
      end
    end
    for (int a = 0; a < 2 ** G; a++)
      for (int b = a + 1; b < 2 ** G; b++) begin
        diff = 0;
        for (int p = 0; p < K2; p++) if (outs[a][p] != outs[b][p]) diff++;
        checks++;
        if (diff == 0) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
