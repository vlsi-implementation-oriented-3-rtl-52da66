// tb_phase_cmp: sweeps the cycle index r over a whole iteration and checks
// c_-1 (1 exactly for r < L), the third of the iteration and the preset
// pulses at r = 0, L and 2L.
module tb_phase_cmp;
  localparam int L = 64;
  localparam int RW = $clog2(3 * L + 4);
  int checks = 0, failures = 0;
  logic [RW-1:0] r;
  logic c_m1, seg_start;
  logic [1:0] seg;

  phase_cmp #(.L(L)) dut (.r, .c_m1, .seg, .seg_start);

  initial begin
    for (int i = 0; i < 3 * L + 2; i++) begin
      r = RW'(i);
      #1;
      checks += 3;
      if (c_m1 != (i < L)) failures++;
      if (int'(seg) != ((i < L) ? 0 : (i < 2 * L) ? 1 : 2)) failures++;
      if (seg_start != (i == 0 || i == L || i == 2 * L)) failures++;
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
