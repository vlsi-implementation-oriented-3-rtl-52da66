// tb_ldpc_ctrl: exercises the controller on its own with L = 8, MAX_ITER = 4.
// Frame 1: parity failures injected in the first two iterations only, so it
// must stop after iteration 3 with converged = 1. Frame 2: failures every
// iteration, so it must stop at MAX_ITER with converged = 0. Checks the load
// handshake and addresses, the iteration length 3L + DRAIN, the issue window,
// and the read-out addresses and last flag.
module tb_ldpc_ctrl;
  localparam int L = 8, MAX_ITER = 4, DRAIN = 2;
  localparam int AW = $clog2(L), RW = $clog2(3 * L + 4), IW = $clog2(MAX_ITER + 1);
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, load_we, issue, chk_valid = 0, chk_fail = 0;
  logic out_rd, out_last_rd, converged;
  logic [AW-1:0] load_addr, out_addr;
  logic [RW-1:0] r;
  logic [IW-1:0] iterations;

  always #5 clk = ~clk;

  ldpc_ctrl #(.L(L), .MAX_ITER(MAX_ITER), .DRAIN(DRAIN)) dut (.clk, .rst_n, .in_valid, .in_ready,
    .load_we, .load_addr, .r, .issue, .chk_valid, .chk_fail, .out_rd, .out_addr, .out_last_rd,
    .iterations, .converged);

  task automatic run_frame(int fail_iters, int exp_iters, bit exp_conv);
    int n, dec_cycles, issues, outs;
    n = 0;
    while (n < L) begin
      @(negedge clk);
      in_valid = $urandom_range(1, 0);
      #1;
      if (in_valid) begin
        checks += 3;
        if (!in_ready || !load_we) failures++;
        if (int'(load_addr) != n) failures++;
        if (issue) failures++;
        n++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    dec_cycles = 0; issues = 0;
    // decode: feed a failed check during the first fail_iters iterations
    while (!out_rd) begin
      #1;
      if (issue) begin
        issues++;
        checks++;
        if (int'(r) >= 3 * L) failures++;
      end
      chk_valid = issue;
      chk_fail  = issue && (dec_cycles / (3 * L + DRAIN) < fail_iters) && (int'(r) == 5);
      checks++;
      if (in_ready) failures++;
      @(negedge clk);
      dec_cycles++;
    end
    chk_valid = 0; chk_fail = 0;
    checks += 4;
    if (dec_cycles != exp_iters * (3 * L + DRAIN)) begin
      failures++;
      $display("decode cycles %0d expected %0d", dec_cycles, exp_iters * (3 * L + DRAIN));
    end
    if (issues != exp_iters * 3 * L) failures++;
    if (int'(iterations) != exp_iters) failures++;
    if (converged != exp_conv) failures++;
    outs = 0;
    while (out_rd) begin
      #1;
      checks += 2;
      if (int'(out_addr) != outs) failures++;
      if (out_last_rd != (outs == L - 1)) failures++;
      outs++;
      @(negedge clk);
    end
    checks++;
    if (outs != L) failures++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_frame(2, 3, 1);
    run_frame(99, MAX_ITER, 0);
    run_frame(0, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
