// tb_rpg: checks that the random permutation generator gives c = 0 outside
// the last third of an iteration and the specified hash inside it, and that
// the hash reaches every one of the 2^g control words over the L cycles.
module tb_rpg;
  localparam int L = 64, G = 3, SEED = 1;
  int checks = 0, failures = 0;
  logic active;
  logic [$clog2(L)-1:0] j;
  logic [G-1:0] c;
  bit seen [2**G];

  rpg #(.L(L), .G(G), .SEED(SEED)) dut (.active, .j, .c);

  function automatic int model(int jj);
    longint unsigned h;
    h = ((longint'(jj) + SEED) * 64'h9E37_79B1) & 64'hFFFF_FFFF;
    h = h ^ (h >> 15);
    h = (h * 64'h85EB_CA6B) & 64'hFFFF_FFFF;
    return int'(h >> (32 - G));
  endfunction

  initial begin
    for (int i = 0; i < L; i++) begin
      active = 0; j = $clog2(L)'(i);
      #1;
      checks++;
      if (c != 0) failures++;
      active = 1;
      #1;
      checks++;
      if (int'(c) != model(i)) begin
        failures++;
        $display("j=%0d c=%0d expected %0d", i, c, model(i));
      end
      seen[c] = 1;
    end
    for (int v = 0; v < 2 ** G; v++) begin
      checks++;
      if (!seen[v]) failures++;
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
