# Partly parallel decoder for implementation-oriented (3,k)-regular LDPC codes

A fully parallel LDPC decoder needs one processing unit per node of the code's
Tanner graph and a wire for every edge, which is too large for most uses. A
partly parallel decoder shares a few units among many nodes, but for a random
code the memory accesses it needs do not follow any simple pattern. This design
turns the problem around: **the decoder's own wiring defines the code**. Its
memories, counters and shuffle networks produce a (3,k)-regular code with
N = L·k² bits and 3·k·L parity checks. Every code that this hardware can
produce is 4-cycle free, and two thirds of its parity-check matrix form a
structured (2,k)-regular code of girth 12. A decoding iteration therefore needs
only modulo-L counters, two small permutation networks and a hash function. No
address tables or random number generators are needed.

The default configuration is the (3,6)-regular code with L = 64: N = 2304
bits, 1152 checks, rate about 1/2. The RTL is parameterised in k, L, the number
g of shuffle layers, the message widths and the seed that picks one code out of
the ensemble.

## How the wiring defines the code

There are k² memory banks. Bank i (counted from 0) is called (x,y) with
x = (i mod k) + 1 and y = ⌊i/k⌋ + 1. It holds L variable nodes. Code bit n
belongs to bank ⌊n/L⌋ at address n mod L. There are k check node units (CNU).
In every clock cycle each CNU processes one check node, taking one message from
each of k banks.

An iteration has three thirds of L cycles each, indexed by r:

| cycles      | RAM used | address in bank (x,y), AG preset | shuffle                     | checks produced |
|-------------|----------|----------------------------------|-----------------------------|-----------------|
| 0 … L-1     | E1       | r                                | π₋₁ (transpose)             | H0              |
| L … 2L-1    | E2       | ((x-1)·y + r) mod L              | none                        | H1              |
| 2L … 3L-1   | E3       | (t(x,y) + r) mod L               | g-layer network, c = f(r)   | H2              |

- **H0.** π₋₁(i) = (i mod k)·k + ⌊i/k⌋ transposes the k×k bank array, so CNU j
  sees the banks with x = j+1. Every block of H0 is an identity matrix.
- **H1.** Without a shuffle, CNU j sees the banks with y = j+1. The address
  offset turns block (x,y) into the identity cyclically shifted right by
  ((x-1)·y) mod L. Together, H0 and H1 form a (2,k)-regular code of girth 12,
  provided L is not a product a·b with a, b < k.
- **H2.** Each address generator is preset to t(x,y). A hash f of the cycle
  index selects one of 2^g permutations, each a product of up to g fixed layer
  permutations. This third adds L·k random-looking checks. The t(x,y) obey two
  rules:
  1. t(x,y₁) ≠ t(x,y₂);
  2. t(x₁,y) − t(x₂,y) ≢ (x₁−x₂)·y (mod L).

  These rules keep H2 from closing a 4-cycle with H0 or H1.

Each AG (address generator) is a modulo-L counter, preset at r = 0, L and 2L.
Each bank is read at exactly one address per cycle. Over a third, every node of
every bank is visited exactly once, so each variable node gets one check from
each third.

**Choosing the code (`SEED`).** t(x,y), the g layer permutations and f are
random in the architecture. Here they come from `SEED` at elaboration, so every
size elaborates without a table:

- t(x,y) is drawn under the two rules above by a seeded 32-bit LCG.
- The layer permutations are drawn by a Fisher-Yates shuffle driven by the same
  LCG (`ldpc_pkg`).
- f is a small combinational integer hash (`rpg.sv`).

A code meant for deployment would be chosen by generating many seeds,
comparing their girth averages and simulating the best ones. The default seed
has not been through that selection. Encoder and decoder must agree on the
seed.

## Datapath of one cycle

```
 AG(x,y) ─► MEM BANK(x,y) ─► {v2c, bit} ─► π₋₁ / Id ─► g-layer π(c) ─► CNU 0..k-1
   (k² of each)    ▲                                                       │ c2v, parity
                   │          ◄── Id / π₋₁⁻¹ ◄── g-layer π(c)⁻¹ ◄───────────┘
                   └── E1/E2 write-back (first two thirds)
                   └── VNU(x,y) ◄── third c2v + RAM I, E1, E2  (last third)
```

Each bank contains:

- RAM I: the intrinsic LLR, P bits.
- RAMs E1, E2 and E3: one message per edge, Q bits each. Each RAM has one read
  port and one write port.
- RAM C: the current hard decision of each node.

A check-to-variable message and the variable-to-check message of the same edge
share one location. The CNU overwrites the location with c2v, and the VNU later
overwrites it with the new v2c.

The pipeline has three stages:

1. **Read.** The AG drives the bank's read address. All RAMs of the bank
   return data one cycle later.
2. **Check.** Messages and decoded bits pass through the 1-layer and g-layer
   networks. Each CNU takes k consecutive words. Its k results pass through
   the inverse networks back to the banks they came from.
   - In the first two thirds, the results are written to E1 or E2 at the
     address that was read.
   - In the last third, the result is the node's third and final
     check-to-variable message of the iteration. It goes straight into a
     register feeding the bank's VNU (variable node unit), together with
     RAM I, E1 and E2 read in stage 1 at the same address.
3. **Variable.** The VNU computes three new variable-to-check messages and the
   hard decision. It writes them to E1, E2, E3 and C.

The VNU of a bank thus runs in the cycle after that node's last
check-to-variable message appears, in parallel with the checks of other nodes.
This makes the schedule exactly flooding belief propagation: every check of
iteration n uses variable-to-check messages from iteration n-1.

**Why an iteration takes 3L + 2 cycles.** In the last third, a node can be
read in the final issue cycle. It can be needed again in the first cycle of the
next iteration, for example when t(x,y) = 1 and the node sits at address 0.
Its new message is only written two cycles after the read. The controller
therefore inserts two drain cycles after the 3L issue cycles. The RAMs are
write-through: a read and a write of the same address in one cycle return the
new data. With that, two cycles are always enough. The architecture counts 3L
cycles per iteration, which an unpipelined datapath would need to reach.

## Message arithmetic

Messages are two's-complement LLRs, ln(P(0)/P(1)), 6 bits wide with two
fractional bits, so the LSB is 0.25 and the range is ±7.75. A negative value
means "probably 1".

- **CNU.** The CNU uses the sum-product rule in the log domain:

  c2v_j = (∏_{i≠j} sign v2c_i) · ψ(Σ_{i≠j} ψ(|v2c_i|)),  where ψ(x) = −ln tanh(x/2).

  ψ is a 32-entry table:

  ψ_q(m) = min(31, ⌊4·(−ln tanh(m/8)) + 0.5⌋),  with ψ_q(0) = 31.

  The full sum over all k inputs is formed once, and each input's own term is
  subtracted from it. Magnitudes saturate at 31. The same unit XORs the k
  decoded bits; a result of 1 is a failed parity check.
- **VNU.** total = intrinsic + c2v₁ + c2v₂ + c2v₃. Each outgoing message is
  total − c2v_j, saturated to ±31. The decoded bit is total < 0.
- **Initialisation.** When a frame is loaded, E1, E2 and E3 receive the
  saturated intrinsic value and C receives its sign.

The table is defined for Q = 6 only. `cnu` stops elaboration for any other
width.

## Stopping and output

The parity checks done during iteration n see the hard decisions written at
the end of iteration n−1. If none of the 3kL checks of an iteration fails,
those decisions form a codeword and decoding stops. Decoding also stops after
`MAX_ITER` iterations. The decoder then streams RAM C out. This content holds
the decisions of the stopping iteration, one iteration later than the word
that was checked. In practice the two agree, because belief propagation stays
on a codeword once it reaches one, but the hardware does not enforce it.

## Interface and timing (`ldpc_decoder`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `in_valid` / `in_ready` | in/out | 1 | input handshake; a beat moves when both are high |
| `in_llr[k²]` | in | P each | beat a: intrinsic LLR of bank i, address a (code bit i·L + a) |
| `out_valid` | out | 1 | one beat per address after decoding (no back-pressure) |
| `out_addr` | out | log2 L | address of the beat |
| `out_bits` | out | k² | bit i = decoded bit of bank i at `out_addr` |
| `out_last` | out | 1 | last of the L output beats |
| `iterations`, `converged` | out | log2(MAX_ITER+1), 1 | result of the frame, stable while it is read out |

Timing of one frame:

1. **Load.** L accepted beats. The decoder is ready whenever it is idle or
   loading.
2. **Decode.** Decoding starts in the cycle after the last beat. It takes
   `iterations`·(3L + 2) cycles.
3. **Read-out.** The first output beat appears one cycle after decoding ends,
   and the L beats follow back to back.

With the defaults, one iteration takes 194 cycles. A frame that converges in
5 iterations uses 64 + 970 + 65 cycles.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `K` | 6 | row weight k; k² banks, k CNUs; k ≤ 8 (table helpers) |
| `L` | 64 | bank depth; N = L·k². L must not be a product a·b with a, b < k |
| `G` | 3 | layers of the random shuffle network |
| `P`, `Q` | 6, 6 | intrinsic and extrinsic message widths (Q must be 6) |
| `MAX_ITER` | 20 | iteration limit |
| `SEED` | 1 | selects t(x,y), the layer permutations and the hash |

The second code length of the original design examples is L = 128 (N = 4608),
and it works unchanged. Storage is L·(P + 3Q + 1) bits per bank: 1600 bits at
the defaults and 57,600 bits in all.

## Files

| file | block |
|------|-------|
| `rtl/ldpc_decoder.sv` | top: banks, AGs, CNUs, VNUs, both shuffle paths, pipeline |
| `rtl/ldpc_pkg.sv` | ψ table, LCG, t(x,y) draw, layer permutations |
| `rtl/mem_bank.sv`, `rtl/ldpc_ram.sv` | memory bank and its RAMs |
| `rtl/addr_gen.sv` | AG: preset modulo-L counter |
| `rtl/phase_cmp.sv` | comparator: c₋₁ = (r < L), third of the iteration |
| `rtl/rpg.sv` | random permutation generator (hash f) |
| `rtl/shuffle_layer.sv` | one permutation layer, forward or inverse |
| `rtl/shuffle_net.sv` | g-layer network, forward or inverse |
| `rtl/cnu.sv`, `rtl/vnu.sv` | check and variable node units |
| `rtl/ldpc_ctrl.sv` | load / iterate / stop / read-out sequencing |

## Verification

Every block has a self-checking testbench in `tb/`. It compares the block with
an independent model and prints `TB_RESULT checks=… failures=…`.

The end-to-end testbenches share `tb/tb_ldpc_body.svh`. Each one builds the
parity-check matrix from the rules in the table above, without using the RTL,
and checks its structure:

- it is (3,k)-regular and 4-cycle free, and t(x,y) meets its two rules;
- [H0; H1] has girth 12, with a 12-cycle through every check node;
- its GF(2) rank is at most M − 2 (at least two redundant checks).

The rank check gives a code dimension of 1154 at L = 64 and 2306 at L = 128.
That makes (2304,1154) and (4608,2306) codes.

The testbench then draws random codewords from the reduced matrix, sends them
through a noisy channel and runs a flooding belief-propagation model whose ψ
is evaluated in real arithmetic. For each frame it compares:

- every decoded bit;
- the iteration count;
- the convergence flag;
- the number of decoding cycles, iterations·(3L+2).

Frame 0 is noiseless and frame 1 is the all-zero codeword. Noise grows with
the frame number, so some frames converge and some reach `MAX_ITER`.
`in_valid` has random gaps. Each testbench also counts how often the following
happen and fails if one of them never does:

- π₋₁ active;
- a non-identity g-layer permutation;
- a failed check;
- a VNU update;
- an input stall;
- a frame with channel errors decoded back to the sent codeword;
- a frame stopped at the limit.

The three end-to-end testbenches are:

- `tb_ldpc_decoder`: default sizes, N = 2304.
- `tb_ldpc_decoder_l128`: L = 128, N = 4608.
- `tb_ldpc_decoder_small`: k = 4, L = 7, g = 2.

To simulate, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ldpc_pkg.sv rtl/*.sv \
    tb/tb_ldpc_decoder.sv --top-module tb_ldpc_decoder
./obj_dir/Vtb_ldpc_decoder
```

For a unit test, replace the testbench file and top module, for example
`tb/tb_cnu.sv` and `tb_cnu`.

## Where this design departs from the architecture, and what it lacks

- **Iteration length.** An iteration takes 3L + 2 cycles, not 3L (see above).
- **Third message forwarded.** The third check-to-variable message goes
  directly to the VNU and is not stored in E3 first. E3 then only ever holds
  variable-to-check messages. This keeps each E RAM at one read and one write
  port.
- **Code choice.** t(x,y), the permutations and f are drawn from a seed. They
  are not taken from a code selected by girth-average search and simulation.
  The error-rate results of the original design examples have not been
  reproduced.
- **Quantisation.** The ψ table and the exact quantisation (two fractional
  bits, symmetric saturation) are this design's own. The 4-bit channel
  quantiser that feeds the intrinsic values is outside the decoder.
- **Conventions.** The handshake, the reset behaviour, the output streaming,
  the bit numbering and `MAX_ITER` are this design's own conventions.
- **No encoder.** There is no encoder. The systematic encoding scheme for
  these codes permutes the columns so that a (2k−1)L × (2k−1)L block T becomes
  upper triangular with T⁻¹ = T. T is formed from the checks of H0 and of
  H1 row blocks 2…k, on banks (1,1)…(k,1) and (1,2)…(1,k). The scheme then
  needs a dense matrix G = (A·T·B + C)⁻¹ for the parity columns x_b. Which
  columns can serve as x_b depends on the code. For the default code, simply
  taking the next (k+1)L − 2 columns in bank order gives a rank-deficient
  A·T·B + C: rank 404 for 446 columns. The column choice and G must
  therefore be derived offline per code. The testbenches instead obtain
  codewords by Gaussian elimination.
- **No memory macros.** RAMs are plain arrays with write-through reads. A
  memory compiler's two-port macro would replace `ldpc_ram`, with a bypass
  added where same-cycle read-after-write matters.
