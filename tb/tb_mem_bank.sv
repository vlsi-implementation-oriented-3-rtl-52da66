// tb_mem_bank: drives random reads and writes into one memory bank and
// compares every read port with a shadow model of RAM I, E1..E3 and C:
// one-cycle read latency, write-through on a same-address read and write,
// rsel choosing which E RAM feeds the check-node output.
module tb_mem_bank;
  localparam int L = 64, P = 6, Q = 6;
  localparam int AW = $clog2(L);
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [AW-1:0] raddr, waddr;
  logic [1:0] rsel;
  logic signed [Q-1:0] cnu_msg, vnu_e1, vnu_e2;
  logic cnu_bit;
  logic signed [P-1:0] vnu_intr, wdata_i;
  logic we_i, we_c, wdata_c;
  logic [2:0] we_e;
  logic signed [Q-1:0] wdata_e [3];
  int sh_i [L], sh_e [3][L];
  bit sh_c [L];

  always #5 clk = ~clk;

  mem_bank #(.L(L), .P(P), .Q(Q)) dut (.clk, .raddr, .rsel, .cnu_msg, .cnu_bit, .vnu_intr,
    .vnu_e1, .vnu_e2, .waddr, .we_i, .wdata_i, .we_e, .wdata_e, .we_c, .wdata_c);

  initial begin
    int ra, rs;
    // fill every location
    for (int a = 0; a < L; a++) begin
      @(negedge clk);
      waddr = AW'(a); raddr = '0; rsel = 0;
      we_i = 1; we_e = 3'b111; we_c = 1;
      wdata_i = P'($urandom); wdata_c = 1'($urandom);
      for (int j = 0; j < 3; j++) wdata_e[j] = Q'($urandom);
      sh_i[a] = int'(wdata_i); sh_c[a] = wdata_c;
      for (int j = 0; j < 3; j++) sh_e[j][a] = int'(wdata_e[j]);
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      ra = $urandom_range(L - 1, 0);
      rs = $urandom_range(2, 0);
      raddr = AW'(ra); rsel = 2'(rs);
      waddr = ($urandom_range(3, 0) == 0) ? AW'(ra) : AW'($urandom);
      we_i = $urandom_range(1, 0) == 0;
      we_c = $urandom_range(1, 0) == 0;
      we_e = 3'($urandom);
      wdata_i = P'($urandom); wdata_c = 1'($urandom);
      for (int j = 0; j < 3; j++) wdata_e[j] = Q'($urandom);
      @(posedge clk);
      if (we_i) sh_i[waddr] = int'(wdata_i);
      if (we_c) sh_c[waddr] = wdata_c;
      for (int j = 0; j < 3; j++) if (we_e[j]) sh_e[j][waddr] = int'(wdata_e[j]);
      #1;
      checks += 5;
      if (int'(cnu_msg) != sh_e[rs][ra]) failures++;
      if (cnu_bit != sh_c[ra]) failures++;
      if (int'(vnu_intr) != sh_i[ra]) failures++;
      if (int'(vnu_e1) != sh_e[0][ra]) failures++;
      if (int'(vnu_e2) != sh_e[1][ra]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
