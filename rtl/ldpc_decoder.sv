// ldpc_decoder: partly parallel soft belief-propagation decoder for the
// implementation-oriented (3,k)-regular LDPC codes (code length N = L*k^2,
// 3*k*L parity checks). The hardware itself defines the code: k^2 memory
// banks, each with an address generator, k check node units (CNU), k^2
// variable node units (VNU), a 1-layer shuffle network (pi_-1 or identity,
// steered by the comparator) and a g-layer shuffle network (steered by the
// random permutation generator, RPG).
//
// One decoding iteration covers 3L issue cycles. In cycle r every bank reads
// the address its AG gives; the k^2 variable-to-check messages and decoded
// bits are shuffled, each CNU takes k consecutive words, and the
// check-to-variable results are unshuffled and written back in place:
//   r in [0, L)   : RAM E1, AG preset 0,        pi_-1 applied  -> checks of H0
//   r in [L, 2L)  : RAM E2, AG preset (x-1)y,   no shuffle     -> checks of H1
//   r in [2L, 3L) : RAM E3, AG preset t(x,y),   g-layer, c=f(r) -> checks of H2
// During the last third, each node's third check-to-variable message goes
// straight from the unshuffle network into its bank's VNU one cycle later,
// together with RAM I, E1 and E2 read at the same address; the VNU writes the
// three new variable-to-check messages to E1, E2, E3 and the new decoded bit
// to RAM C.
//
// Pipeline: bank read (1 cycle) -> shuffle, CNU, unshuffle, E1/E2 write-back
// (cycle 2) -> VNU and its write-back (cycle 3). Each iteration therefore
// takes 3L + 2 cycles: two drain cycles follow the 3L issue cycles so that
// the last VNU results of an iteration are written before the next iteration
// re-reads them. The architecture counts 3L cycles per iteration, which
// leaves this hazard to the implementation; the drain cycles, the forwarding
// of the third message to the VNU (instead of storing it in E3 and reading it
// back) and the write-through RAMs are this design's own resolution of it.
//
// Interface:
//   in_valid/in_ready : L beats; beat a carries in_llr[i] = intrinsic LLR of
//                       bank i (i = (y-1)*k + (x-1)), address a, i.e. code bit
//                       n = i*L + a. Negative LLR = bit 1.
//   out_valid         : L beats after decoding; out_bits[i] = decoded bit of
//                       bank i at address out_addr; out_last on the final beat.
//   iterations, converged : result of the last frame (valid with out_valid).
// Decoding stops when all 3kL parity checks of an iteration pass (the bits
// checked are the decisions of the previous iteration; the bits delivered are
// those written by the stopping iteration) or after MAX_ITER iterations.
module ldpc_decoder #(
  parameter int K        = 6,
  parameter int L        = 64,
  parameter int G        = 3,
  parameter int P        = 6,
  parameter int Q        = 6,
  parameter int MAX_ITER = 20,
  parameter int SEED     = 1,
  localparam int K2      = K * K,
  localparam int AW      = (L > 1) ? $clog2(L) : 1,
  localparam int RW      = $clog2(3 * L + 4),
  localparam int IW      = $clog2(MAX_ITER + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [P-1:0] in_llr [K2],
  output logic                out_valid,
  output logic [AW-1:0]       out_addr,
  output logic [K2-1:0]       out_bits,
  output logic                out_last,
  output logic [IW-1:0]       iterations,
  output logic                converged
);
  localparam int QMAX = 2 ** (Q - 1) - 1;

  // ---------------- control ----------------
  logic          load_we;
  logic [AW-1:0] load_addr;
  logic [RW-1:0] r;
  logic          issue;
  logic          chk_valid, chk_fail;
  logic          out_rd, out_last_rd;
  logic [AW-1:0] out_addr_rd;
  logic          c_m1, seg_start;
  logic [1:0]    seg;
  logic [G-1:0]  c_rpg;

  ldpc_ctrl #(.L(L), .MAX_ITER(MAX_ITER), .DRAIN(2)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .load_we, .load_addr, .r, .issue,
    .chk_valid, .chk_fail, .out_rd, .out_addr(out_addr_rd), .out_last_rd,
    .iterations, .converged);

  phase_cmp #(.L(L)) u_cmp (.r, .c_m1, .seg, .seg_start);

  rpg #(.L(L), .G(G), .SEED(SEED)) u_rpg (
    .active(issue && seg == 2'd2), .j(AW'(int'(r) - 2 * L)), .c(c_rpg));

  // ---------------- memory banks and address generators ----------------
  logic [AW-1:0]       ag_addr  [K2];
  logic signed [Q-1:0] bk_msg   [K2];
  logic                bk_bit   [K2];
  logic signed [P-1:0] bk_intr  [K2];
  logic signed [Q-1:0] bk_e1    [K2];
  logic signed [Q-1:0] bk_e2    [K2];
  logic signed [Q-1:0] c2v_bank [K2];

  // stage 1: data read in the previous cycle
  logic          v1, cm1_1;
  logic [1:0]    seg1;
  logic [G-1:0]  c_1;
  logic [AW-1:0] addr1 [K2];
  // stage 2: VNU inputs (third L cycles only)
  logic                v2;
  logic [AW-1:0]       addr2 [K2];
  logic signed [P-1:0] intr2 [K2];
  logic signed [Q-1:0] vin2  [K2][3];
  logic signed [Q-1:0] vout2 [K2][3];
  logic                bit2  [K2];

  function automatic logic signed [Q-1:0] sat_in(logic signed [P-1:0] v);
    if (int'(v) > QMAX)       return Q'(QMAX);
    else if (int'(v) < -QMAX) return Q'(-QMAX);
    else                      return Q'(v);
  endfunction

  for (genvar b = 0; b < K2; b++) begin : g_bank
    localparam int X = (b % K) + 1;
    localparam int Y = (b / K) + 1;

    logic [AW-1:0]       waddr;
    logic                we_i, we_c, wdata_c;
    logic [2:0]          we_e;
    logic signed [Q-1:0] wdata_e [3];

    addr_gen #(.L(L), .U(((X - 1) * Y) % L), .T(ldpc_pkg::t_value(L, K, X, Y, SEED))) u_ag (
      .clk, .rst_n, .load(issue && seg_start), .seg, .step(issue), .addr(ag_addr[b]));

    always_comb begin
      waddr   = addr1[b];
      we_i    = 1'b0;
      we_e    = 3'b000;
      we_c    = 1'b0;
      wdata_c = bit2[b];
      for (int j = 0; j < 3; j++) wdata_e[j] = c2v_bank[b];
      if (load_we) begin
        waddr   = load_addr;
        we_i    = 1'b1;
        we_e    = 3'b111;
        we_c    = 1'b1;
        wdata_c = in_llr[b] < 0;
        for (int j = 0; j < 3; j++) wdata_e[j] = sat_in(in_llr[b]);
      end else if (v2) begin
        waddr   = addr2[b];
        we_e    = 3'b111;
        we_c    = 1'b1;
        wdata_e = vout2[b];
      end else if (v1 && seg1 != 2'd2) begin
        we_e[seg1] = 1'b1;
      end
    end

    mem_bank #(.L(L), .P(P), .Q(Q)) u_bank (
      .clk,
      .raddr(out_rd ? out_addr_rd : ag_addr[b]), .rsel(seg),
      .cnu_msg(bk_msg[b]), .cnu_bit(bk_bit[b]),
      .vnu_intr(bk_intr[b]), .vnu_e1(bk_e1[b]), .vnu_e2(bk_e2[b]),
      .waddr, .we_i, .wdata_i(in_llr[b]), .we_e, .wdata_e, .we_c, .wdata_c);

    vnu #(.P(P), .Q(Q)) u_vnu (
      .intr(intr2[b]), .c2v(vin2[b]), .v2c(vout2[b]), .bit_hat(bit2[b]));

    always_ff @(posedge clk) begin
      addr1[b]   <= ag_addr[b];
      addr2[b]   <= addr1[b];
      intr2[b]   <= bk_intr[b];
      vin2[b][0] <= bk_e1[b];
      vin2[b][1] <= bk_e2[b];
      vin2[b][2] <= c2v_bank[b];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      v2        <= 1'b0;
      seg1      <= 2'd0;
      cm1_1     <= 1'b0;
      c_1       <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_addr  <= '0;
    end else begin
      v1        <= issue;
      v2        <= v1 && seg1 == 2'd2;
      seg1      <= seg;
      cm1_1     <= c_m1;
      c_1       <= c_rpg;
      out_valid <= out_rd;
      out_last  <= out_last_rd;
      out_addr  <= out_addr_rd;
    end
  end

  // ---------------- shuffle, CNU array, unshuffle ----------------
  logic [Q:0]   fw0 [K2];
  logic [Q:0]   fw1 [K2];
  logic [Q:0]   fw2 [K2];
  logic [Q-1:0] bw0 [K2];
  logic [Q-1:0] bw1 [K2];
  logic [Q-1:0] bw2 [K2];
  logic [K-1:0] cnu_fail;

  always_comb begin
    for (int b = 0; b < K2; b++) begin
      fw0[b]      = {bk_bit[b], bk_msg[b]};
      c2v_bank[b] = bw2[b];
    end
  end

  shuffle_layer #(.K(K), .W(Q + 1), .KIND(0)) u_pi_m1 (.en(cm1_1), .din(fw0), .dout(fw1));
  shuffle_net #(.K(K), .W(Q + 1), .G(G), .SEED(SEED)) u_gnet (.c(c_1), .din(fw1), .dout(fw2));

  for (genvar j = 0; j < K; j++) begin : g_cnu
    logic signed [Q-1:0] v2c [K];
    logic signed [Q-1:0] c2v [K];
    logic [K-1:0]        bits;
    always_comb begin
      for (int m = 0; m < K; m++) begin
        v2c[m]  = fw2[j*K + m][Q-1:0];
        bits[m] = fw2[j*K + m][Q];
        bw0[j*K + m] = c2v[m];
      end
    end
    cnu #(.K(K), .Q(Q)) u_cnu (.v2c, .bits, .c2v, .fail(cnu_fail[j]));
  end

  shuffle_net #(.K(K), .W(Q), .G(G), .SEED(SEED), .INVERSE(1'b1)) u_gnet_inv (
    .c(c_1), .din(bw0), .dout(bw1));
  shuffle_layer #(.K(K), .W(Q), .KIND(0), .INVERSE(1'b1)) u_pi_m1_inv (
    .en(cm1_1), .din(bw1), .dout(bw2));

  assign chk_valid = v1;
  assign chk_fail  = |cnu_fail;

  always_comb for (int b = 0; b < K2; b++) out_bits[b] = bk_bit[b];

  // Each bank has one write port: the schedule must never let the load, the
  // check-node write-back and the VNU write-back meet in one cycle, and the
  // read-out must not overlap decoding.
  a_wr_load: assert property (@(posedge clk) disable iff (!rst_n) load_we |-> !(v1 || v2));
  a_wr_vnu:  assert property (@(posedge clk) disable iff (!rst_n) v2 |-> !(v1 && seg1 != 2'd2));
  a_rd_out:  assert property (@(posedge clk) disable iff (!rst_n) out_rd |-> !issue);
endmodule
