// tb_shuffle_layer: checks the 1-layer network pi_-1(i) = (i mod k)*k + i/k
// word by word, its identity setting, and that the inverse instance undoes
// the forward one for random data.
module tb_shuffle_layer;
  localparam int K = 6, W = 7;
  int checks = 0, failures = 0;
  logic en;
  logic [W-1:0] din [K*K];
  logic [W-1:0] mid [K*K];
  logic [W-1:0] back [K*K];

  shuffle_layer #(.K(K), .W(W), .KIND(0)) dut (.en, .din, .dout(mid));
  shuffle_layer #(.K(K), .W(W), .KIND(0), .INVERSE(1'b1)) dut_inv (.en, .din(mid), .dout(back));

  initial begin
    for (int n = 0; n < 50; n++) begin
      for (int i = 0; i < K * K; i++) din[i] = W'($urandom);
      en = n[0];
      #1;
      for (int i = 0; i < K * K; i++) begin
        checks += 2;
        if (mid[i] != (en ? din[(i % K) * K + i / K] : din[i])) failures++;
        if (back[i] != din[i]) failures++;
      end
    end
    // the transpose maps position 1 to 6 and 7 to 7 (k = 6)
    for (int i = 0; i < K * K; i++) din[i] = W'(i);
    en = 1;
    #1;
    checks += 2;
    if (mid[1] != 7'd6) failures++;
    if (mid[7] != 7'd7) failures++;
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
