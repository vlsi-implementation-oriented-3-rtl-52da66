// tb_addr_gen: runs the address generator of bank (x,y) = (3,4) with L = 64
// through three iterations and checks it against Eq. (1): during each third
// of an iteration the address is (D + r mod L) mod L with D = 0, (x-1)*y mod L
// and t(x,y). Also checks that each third visits every address once.
module tb_addr_gen;
  localparam int L = 64, X = 3, Y = 4, T = 61;
  localparam int U = ((X - 1) * Y) % L;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [1:0] seg = 0;
  logic [$clog2(L)-1:0] addr;
  bit seen [L];

  always #5 clk = ~clk;

  addr_gen #(.L(L), .U(U), .T(T)) dut (.clk, .rst_n, .load, .seg, .step, .addr);

  initial begin
    int d, expv;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3; it++) begin
      for (int r = 0; r < 3 * L; r++) begin
        @(negedge clk);
        seg  = 2'(r / L);
        load = (r % L) == 0;
        step = 1;
        if (r % L == 0) for (int i = 0; i < L; i++) seen[i] = 0;
        #1;
        d = (r < L) ? 0 : (r < 2 * L) ? U : T;
        expv = (d + r % L) % L;
        checks++;
        if (int'(addr) != expv) begin
          failures++;
          $display("r=%0d addr=%0d expected %0d", r, addr, expv);
        end
        seen[addr] = 1;
        if (r % L == L - 1)
          for (int i = 0; i < L; i++) begin
            checks++;
            if (!seen[i]) failures++;
          end
      end
      // idle gap between iterations: the counter must hold
      @(negedge clk);
      step = 0; load = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
