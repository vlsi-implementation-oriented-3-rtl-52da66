// tb_cnu: checks the check node unit against a sum-product model that
// evaluates psi(x) = -ln(tanh(x/2)) with real arithmetic and quantises it to
// the unit's 2-fraction-bit format, on corner cases and random inputs,
// together with the parity check of the decoded bits.
module tb_cnu;
  localparam int K = 6, Q = 6;
  int checks = 0, failures = 0;
  logic signed [Q-1:0] v2c [K];
  logic signed [Q-1:0] c2v [K];
  logic [K-1:0] bits;
  logic fail;
  int psi_tab [32];

  cnu #(.K(K), .Q(Q)) dut (.v2c, .bits, .c2v, .fail);

  task automatic apply(int v [K], logic [K-1:0] b);
    int mag [K];
    int sm, sg, ext, expv;
    sm = 0; sg = 0;
    for (int i = 0; i < K; i++) begin
      v2c[i] = Q'(v[i]);
      mag[i] = (v[i] < 0) ? -v[i] : v[i];
      if (mag[i] > 31) mag[i] = 31;
      sm += psi_tab[mag[i]];
      sg ^= (v[i] < 0);
    end
    bits = b;
    #1;
    checks++;
    if (fail != ^b) failures++;
    for (int i = 0; i < K; i++) begin
      ext = sm - psi_tab[mag[i]];
      if (ext > 31) ext = 31;
      expv = ((sg ^ (v[i] < 0)) != 0) ? -psi_tab[ext] : psi_tab[ext];
      checks++;
      if (int'(c2v[i]) != expv) begin
        failures++;
        if (failures < 10) $display("c2v[%0d] = %0d, expected %0d", i, c2v[i], expv);
      end
    end
  endtask

  initial begin
    int v [K];
    for (int m = 0; m < 32; m++) begin
      real x;
      if (m == 0) psi_tab[m] = 31;
      else begin
        x = 4.0 * (-$ln($tanh(m / 8.0)));
        psi_tab[m] = (x >= 31.0) ? 31 : int'($floor(x + 0.5));
      end
    end
    // spot values of the quantised psi
    checks += 3;
    if (psi_tab[1] != 8) failures++;
    if (psi_tab[4] != 3) failures++;
    if (psi_tab[12] != 0) failures++;
    v = '{31, 31, 31, 31, 31, 31};      apply(v, 6'b000000);
    v = '{-31, 31, 31, 31, 31, 31};     apply(v, 6'b000001);
    v = '{0, 12, -12, 4, 8, 1};         apply(v, 6'b101010);
    v = '{-32, -32, -32, -32, -32, -32}; apply(v, 6'b111111);
    v = '{2, 2, 2, 2, 2, 2};            apply(v, 6'b110000);
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < K; i++) v[i] = int'($urandom_range(63, 0)) - 32;
      apply(v, K'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
