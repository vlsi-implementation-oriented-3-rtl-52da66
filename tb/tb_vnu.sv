// tb_vnu: checks the variable node unit against an integer model on
// hand-picked corner cases (saturation, sign of the total, zero total) and
// random inputs.
module tb_vnu;
  localparam int P = 6, Q = 6;
  int checks = 0, failures = 0;
  logic signed [P-1:0] intr;
  logic signed [Q-1:0] c2v [3];
  logic signed [Q-1:0] v2c [3];
  logic bit_hat;

  vnu #(.P(P), .Q(Q)) dut (.intr, .c2v, .v2c, .bit_hat);

  function automatic int sat(int v);
    return (v > 31) ? 31 : (v < -31) ? -31 : v;
  endfunction

  task automatic apply(int i, int a, int b, int c);
    int tot;
    intr = P'(i); c2v[0] = Q'(a); c2v[1] = Q'(b); c2v[2] = Q'(c);
    #1;
    tot = i + a + b + c;
    checks++;
    if (bit_hat != (tot < 0)) begin failures++; $display("bit mismatch %0d %0d %0d %0d", i, a, b, c); end
    for (int j = 0; j < 3; j++) begin
      checks++;
      if (int'(v2c[j]) != sat(tot - ((j == 0) ? a : (j == 1) ? b : c))) begin
        failures++;
        $display("v2c[%0d] mismatch for %0d %0d %0d %0d: got %0d", j, i, a, b, c, v2c[j]);
      end
    end
  endtask

  initial begin
    apply(0, 0, 0, 0);
    apply(5, -3, 2, 7);
    apply(-32, -31, -31, -31);
    apply(31, 31, 31, 31);
    apply(-1, 0, 0, 0);
    apply(3, -1, -1, -1);
    apply(20, -31, 15, -2);
    for (int n = 0; n < 2000; n++)
      apply($urandom_range(63, 0) - 32, $urandom_range(62, 0) - 31, $urandom_range(62, 0) - 31,
            $urandom_range(62, 0) - 31);
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
