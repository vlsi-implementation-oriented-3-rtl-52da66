// ldpc_ram: two-port RAM (one synchronous read port, one write port) used for
// every memory of a decoder memory bank (RAM I, E1, E2, E3 and C).
//
// The read data appears one clock after the read address. A read and a write
// to the same address in the same cycle return the new data (write-through),
// which lets a value written by the check-node or variable-node write-back be
// read back in the cycle it is written. The write-through behaviour is a choice
// of this design; the memories are otherwise plain arrays.
module ldpc_ram #(
  parameter int W     = 6,
  parameter int DEPTH = 64,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= (we && waddr == raddr) ? wdata : mem[raddr];
  end
endmodule
