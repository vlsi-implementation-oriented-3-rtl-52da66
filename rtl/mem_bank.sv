// mem_bank: MEM BANK-(x,y) of the partly parallel decoder. It holds, for the L
// variable nodes of one column block of H0, the intrinsic message (RAM I,
// P bits), the three extrinsic messages (RAMs E1, E2, E3, Q bits) and the
// estimated decoded bit (RAM C).
//
// All five RAMs share one read address (from the bank's address generator, or
// the output counter while the decoded word is read out) and one write address.
// One cycle after raddr/rsel the bank presents:
//   * cnu_msg / cnu_bit : the message of RAM E(rsel+1) and the decoded bit,
//                         bound for the check-node side;
//   * vnu_intr, vnu_e1, vnu_e2 : RAM I, E1 and E2 at the same address, bound
//                         for the variable-node unit during the third L cycles.
// Writes: we_i loads RAM I; we_e[j] writes RAM E(j+1) with wdata_e[j]; we_c
// writes RAM C. A check-to-variable message and the variable-to-check message
// of the same edge share one location, as in the architecture.
module mem_bank #(
  parameter int L = 64,
  parameter int P = 6,
  parameter int Q = 6,
  localparam int AW = (L > 1) ? $clog2(L) : 1
) (
  input  logic                clk,
  input  logic [AW-1:0]       raddr,
  input  logic [1:0]          rsel,
  output logic signed [Q-1:0] cnu_msg,
  output logic                cnu_bit,
  output logic signed [P-1:0] vnu_intr,
  output logic signed [Q-1:0] vnu_e1,
  output logic signed [Q-1:0] vnu_e2,
  input  logic [AW-1:0]       waddr,
  input  logic                we_i,
  input  logic signed [P-1:0] wdata_i,
  input  logic [2:0]          we_e,
  input  logic signed [Q-1:0] wdata_e [3],
  input  logic                we_c,
  input  logic                wdata_c
);
  logic [Q-1:0] e_rd [3];
  logic [1:0]   rsel_q;

  ldpc_ram #(.W(P), .DEPTH(L)) u_ram_i (
    .clk, .we(we_i), .waddr, .wdata(wdata_i), .raddr, .rdata(vnu_intr));

  for (genvar j = 0; j < 3; j++) begin : g_e
    ldpc_ram #(.W(Q), .DEPTH(L)) u_ram_e (
      .clk, .we(we_e[j]), .waddr, .wdata(wdata_e[j]), .raddr, .rdata(e_rd[j]));
  end

  ldpc_ram #(.W(1), .DEPTH(L)) u_ram_c (
    .clk, .we(we_c), .waddr, .wdata(wdata_c), .raddr, .rdata(cnu_bit));

  always_ff @(posedge clk) rsel_q <= rsel;

  always_comb begin
    case (rsel_q)
      2'd1:    cnu_msg = e_rd[1];
      2'd2:    cnu_msg = e_rd[2];
      default: cnu_msg = e_rd[0];
    endcase
  end

  assign vnu_e1 = e_rd[0];
  assign vnu_e2 = e_rd[1];
endmodule
