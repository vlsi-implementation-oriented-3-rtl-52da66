// addr_gen: address generator AG(x,y) of one memory bank, a modulo-L binary
// counter that is preset every L clock cycles of a decoding iteration:
//   r = 0  : preset 0                  (H0 block: identity)
//   r = L  : preset U = ((x-1)*y) mod L  (H1 block: P(x,y) = T^U(I))
//   r = 2L : preset T = t(x,y)           (H2 block, random with constraints)
// In the cycle `load` is high the address is the preset value seg selects;
// in a cycle with `step` high the counter advances (mod L) from the address
// shown. So the bank sees D + (r mod L) mod L during each third of the
// iteration, as the architecture specifies. Reset clears the counter.
module addr_gen #(
  parameter int L = 64,
  parameter int U = 0,
  parameter int T = 0,
  localparam int AW = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [1:0]    seg,
  input  logic          step,
  output logic [AW-1:0] addr
);
  logic [AW-1:0] cnt;
  logic [AW-1:0] preset;

  always_comb begin
    case (seg)
      2'd1:    preset = AW'(U % L);
      2'd2:    preset = AW'(T % L);
      default: preset = '0;
    endcase
    addr = load ? preset : cnt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cnt <= '0;
    else if (step) cnt <= (int'(addr) == L - 1) ? '0 : addr + AW'(1);
  end
endmodule
