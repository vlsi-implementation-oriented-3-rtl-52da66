// ldpc_ctrl: sequencer of the decoder. It runs four phases of a frame:
//   IDLE/LOAD : accepts L input beats (in_valid/in_ready handshake), each beat
//               holding the intrinsic messages of one address of all k*k
//               banks, and issues the load writes (load_we, load_addr);
//   DEC       : decoding iterations. The cycle index r runs 0 .. ITER_LEN-1;
//               during r < 3L (`issue`) the banks are read and the check nodes
//               processed, the remaining DRAIN cycles let the write-backs of
//               the last reads complete before the next iteration re-reads.
//               The parity-check results (chk_valid/chk_fail) of an iteration
//               are ORed; an iteration without a failed check means the bits
//               the iteration checked form a codeword and decoding stops,
//               as does reaching MAX_ITER iterations;
//   OUT       : reads RAM C address 0..L-1 (out_rd, out_addr).
// Status: iterations (iterations run for the last frame) and converged, valid
// from the first OUT cycle until the next frame starts decoding.
// The handshake, the drain cycles and MAX_ITER are this design's choices.
module ldpc_ctrl #(
  parameter int L        = 64,
  parameter int MAX_ITER = 20,
  parameter int DRAIN    = 2,
  localparam int AW      = (L > 1) ? $clog2(L) : 1,
  localparam int RW      = $clog2(3 * L + 4),
  localparam int IW      = $clog2(MAX_ITER + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  output logic          load_we,
  output logic [AW-1:0] load_addr,
  output logic [RW-1:0] r,
  output logic          issue,
  input  logic          chk_valid,
  input  logic          chk_fail,
  output logic          out_rd,
  output logic [AW-1:0] out_addr,
  output logic          out_last_rd,
  output logic [IW-1:0] iterations,
  output logic          converged
);
  localparam int ITER_LEN = 3 * L + DRAIN;

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_DEC, S_OUT} state_t;
  state_t        state;
  logic [AW-1:0] cnt;
  logic          fail_acc;
  logic          fail_now;

  assign in_ready    = (state == S_IDLE) || (state == S_LOAD);
  assign load_we     = in_ready && in_valid;
  assign load_addr   = cnt;
  assign issue       = (state == S_DEC) && (int'(r) < 3 * L);
  assign out_rd      = (state == S_OUT);
  assign out_addr    = cnt;
  assign out_last_rd = (state == S_OUT) && (int'(cnt) == L - 1);
  assign fail_now    = fail_acc || (chk_valid && chk_fail);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cnt        <= '0;
      r          <= '0;
      fail_acc   <= 1'b0;
      iterations <= '0;
      converged  <= 1'b0;
    end else begin
      case (state)
        S_IDLE, S_LOAD: begin
          if (load_we) begin
            state <= S_LOAD;
            if (int'(cnt) == L - 1) begin
              state      <= S_DEC;
              cnt        <= '0;
              r          <= '0;
              fail_acc   <= 1'b0;
              iterations <= '0;
              converged  <= 1'b0;
            end else begin
              cnt <= cnt + AW'(1);
            end
          end
        end
        S_DEC: begin
          if (int'(r) == ITER_LEN - 1) begin
            iterations <= iterations + IW'(1);
            r          <= '0;
            fail_acc   <= 1'b0;
            if (!fail_now || int'(iterations) + 1 >= MAX_ITER) begin
              converged <= !fail_now;
              state     <= S_OUT;
              cnt       <= '0;
            end
          end else begin
            r        <= r + RW'(1);
            fail_acc <= fail_now;
          end
        end
        S_OUT: begin
          if (int'(cnt) == L - 1) begin
            state <= S_IDLE;
            cnt   <= '0;
          end else begin
            cnt <= cnt + AW'(1);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The cycle index only runs while decoding.
  a_r_range: assert property (@(posedge clk) disable iff (!rst_n) int'(r) < ITER_LEN);
endmodule
