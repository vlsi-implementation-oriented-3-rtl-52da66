// vnu: variable node processor unit for a variable node of degree 3. From the
// intrinsic message and the three check-to-variable messages it forms
//   total  = intr + c2v_0 + c2v_1 + c2v_2,
//   v2c_j  = sat(total - c2v_j)      (each outgoing message excludes its own edge),
//   bit    = (total < 0)             (estimated decoded bit, LLR convention),
// where sat clips to [-(2^(Q-1)-1), 2^(Q-1)-1]. Combinational.
// This is the standard belief-propagation variable-node update the
// architecture's VNU performs; the symmetric saturation is this design's.
module vnu #(
  parameter int P = 6,
  parameter int Q = 6
) (
  input  logic signed [P-1:0] intr,
  input  logic signed [Q-1:0] c2v [3],
  output logic signed [Q-1:0] v2c [3],
  output logic                bit_hat
);
  localparam int TW = ((P > Q) ? P : Q) + 3;
  localparam int MX = 2 ** (Q - 1) - 1;

  logic signed [TW-1:0] total;
  logic signed [TW-1:0] e;

  always_comb begin
    total = TW'(intr) + TW'(c2v[0]) + TW'(c2v[1]) + TW'(c2v[2]);
    for (int j = 0; j < 3; j++) begin
      e = total - TW'(c2v[j]);
      if (e > TW'(MX))       v2c[j] = Q'(MX);
      else if (e < TW'(-MX)) v2c[j] = Q'(-MX);
      else                   v2c[j] = Q'(e);
    end
    bit_hat = total < 0;
  end
endmodule
