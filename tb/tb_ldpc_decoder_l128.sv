// tb_ldpc_decoder_l128: end-to-end test of ldpc_decoder at the second code length of the design examples
// (k = 6, L = 128, g = 3, N = 4608): several frames through a noisy channel,
// each compared bit for bit, in iteration count and in cycle count with an
// independent belief-propagation model of the code the decoder defines.
module tb_ldpc_decoder_l128;
  localparam int K = 6, L = 128, G = 3, P = 6, Q = 6, MAX_ITER = 20, SEED = 1;
  localparam int NFRAMES = 4;
  localparam int WATCHDOG = NFRAMES * (MAX_ITER * (3 * L + 2) + 10 * L) + 1000;

  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic                dut_in_valid, dut_in_ready;
  logic signed [P-1:0] dut_in_llr [K*K];
  logic                dut_out_valid, dut_out_last, dut_converged;
  logic [$clog2(L)-1:0] dut_out_addr;
  logic [K*K-1:0]      dut_out_bits;
  logic [$clog2(MAX_ITER+1)-1:0] dut_iterations;

  ldpc_decoder #(.K(K), .L(L), .G(G), .P(P), .Q(Q), .MAX_ITER(MAX_ITER), .SEED(SEED)) dut (
    .clk, .rst_n, .in_valid(dut_in_valid), .in_ready(dut_in_ready), .in_llr(dut_in_llr),
    .out_valid(dut_out_valid), .out_addr(dut_out_addr), .out_bits(dut_out_bits),
    .out_last(dut_out_last), .iterations(dut_iterations), .converged(dut_converged));

`include "tb_ldpc_body.svh"

  initial begin
    run_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
