# Fully-parallel stochastic LDPC decoder

This is a fully-parallel decoder for a (1024,512) regular LDPC code with
variable-node degree 3 and check-node degree 6. It decodes with *stochastic
computation*. Messages between the nodes are not multi-bit log-likelihood
ratios. They are streams of single bits, and each stream is 1 with the
probability it stands for. Because each edge of the factor graph carries only
one wire per direction, the nodes shrink to a few gates:

* a check node is an XOR tree;
* a variable node is an equality gate with a small memory.

This keeps the routing of a 1024-bit fully-parallel decoder manageable. The
architecture follows a published FPGA design. The SystemVerilog here is
generic, synthesizable RTL that has been verified in simulation. It has not
been mapped to an FPGA.

## How one decoding cycle works

Decoding proceeds in *decoding cycles* (DCs). One DC takes one clock, and in
each DC every node of the graph works in parallel:

1. **Randomization engine.** It supplies 32 new 8-bit uniform random numbers.
2. **Channel comparator.** Each variable node has one. It compares its fixed
   8-bit channel probability `P` with a random number `R` and emits `P > R`.
   This produces a bit that is 1 with probability `P/256`.
3. **Variable node.** For each of its three outgoing edges, it looks at the
   channel bit and at the bits that arrived on the *other two* edges.
   * If all three agree, the node is *regenerative*. It sends that common
     value and also shifts it into the edge's 64-bit **edge memory** (EM).
   * If they disagree, the node is in the *hold state*. It sends a bit read
     from the EM at a random address, and the EM is left unchanged.

   The outgoing bits are registered.
4. **Check node.** Each one sends, on every edge, the XOR of the bits on its
   other five edges. This path is combinational through the interleaver, and
   it closes the loop for the next DC.
5. **Saturating counter.** Each variable node's 6-bit counter (range -31..31)
   counts up on a 1 and down on a 0. The hard decision is 1 when the count is
   not negative.

After each DC, a separate parity tree checks the hard decisions against all
512 parity checks. Decoding stops when all of them are satisfied, or after
`MAX_DC` DCs (6000 by default).

### Why edge memories matter

A stochastic variable node without memory repeats its previous output when
its inputs disagree. In a graph with cycles, the streams then become
correlated, and nodes lock into a fixed state ("latching"). The EM breaks this
up in two ways:

* it stores only regenerative bits;
* in the hold state it answers with a *random* earlier regenerative bit.

A node in the hold state therefore behaves like a re-randomised sample of what
the edge carried recently. The EM is a shift register with a selectable
output, which on an FPGA maps onto cascaded addressable shift-register LUTs.

### Starting a block: the first DC

When a block starts, the check-node bits mean nothing yet. So in the first DC
every variable node does two things:

* it sends its channel bit on all three edges;
* it writes that bit into *every* position of all three of its EMs.

This is a departure, and an important one. The published architecture
initialises the EMs to zeros. With zero-filled EMs, a node in the hold state
replays zeros for the first few hundred DCs. The check nodes spread those
zeros, and the decoder then converges to the all-zero codeword, which always
satisfies the checks. In simulation this happened for every random codeword
tried. Tests that send only the all-zero word cannot show this problem. The
`clear` path, which resets the EMs to zeros, is still present. The first DC
simply overwrites the zeros.

## Channel front end: noise-dependent scaling

The decoder takes the received BPSK samples `y` (signed Q4.4, 8 bits), with
code bit 0 sent as +1. *Noise-dependent scaling* multiplies the LLR by
`alpha*N0/Y`. This gives `L' = (4*alpha/Y) * y`, which no longer depends on
the noise level. With `alpha = 3` and `Y = 6`, the scale is exactly 2.
`nds_prob` turns `y` into

    P = clip(round(256 / (1 + exp(2y))), 0, 255)      (= 256 * Pr(bit = 1))

using a 256-entry table that is computed when the design is elaborated. There
is one table per variable node, so a block loads in a single clock.

## Randomness and how it is shared

Generating a separate random number for every one of the 1024 comparators
and 3072 EMs in every DC would be expensive. `randomization_engine` instead
runs ten 16-bit Galois LFSRs, each with its own primitive polynomial. Bit `i`
of random number `k` is the XOR of three bits from three different LFSRs,
which gives 32 8-bit numbers per DC. The numbers are shared as follows:

* comparator `v` uses number `v mod 32`;
* EM `j` of variable node `v` uses bits [7:2] of number `(v + 11(j+1)) mod 32`.

The functions `re_tap_lfsr`, `re_tap_bit`, `cmp_rand_idx` and `em_rand_idx`
in `stoch_ldpc_pkg` define all of this. The published architecture gives the
structure (ten 16-bit LFSRs, XOR mixing, 32 x 8 bits, reuse of the comparator
numbers as EM addresses). The polynomials, seeds, tap pattern and sharing
pattern are this design's own.

## The code and the interleaver

The published design does not give its parity-check matrix. This design uses
its own quasi-cyclic code:

* H is a 4 x 8 array of Z x Z blocks, with Z = 128.
* Column block `c` has a circulant permutation block in every row block
  except `c/2`. Every column therefore has weight 3 and every row weight 6.
* Block `(r,c)` connects row `i` to column `(i + QC_SHIFT[r][c]) mod Z`.
* The shifts were chosen so that the graph has no 4- or 6-cycles at Z = 128
  (girth 8) and no 4-cycles at Z = 16.
* H has rank 512, so the code is exactly (1024,512).

Wiring indices:

* Edge `j` of variable node `v` is wire `3v+j`. It goes to the `j`-th row
  block other than `c/2`.
* Slot `s` of check node `k` is wire `6k+s`. It holds the `s`-th column block
  in increasing order.

`interleaver` is only a wire permutation in each direction, built from the
package functions `cn_edge_to_vn_edge` and `cn_var`. To use a different code,
change `QC_SHIFT` (and, for a different layout, those functions). The
all-zero and all-one words are codewords of any code of this shape, because
every row has even weight.

## Interface and timing

`stochastic_ldpc_decoder` has these parameters:

| parameter | default | meaning |
| --- | --- | --- |
| `Z` | 128 | circulant size |
| `N` | 8Z | code length |
| `M` | 4Z | number of checks |
| `MAX_DC` | 6000 | DC limit |

| port | dir | meaning |
| --- | --- | --- |
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `start` | in | taken when `ready`; `rx_y` is sampled in that clock |
| `rx_y[N]` | in | received samples, signed Q4.4 |
| `ready` | out | idle |
| `done` | out | one-clock pulse at the end of a block |
| `converged` | out | all checks were satisfied |
| `dc_count` | out | DCs used |
| `dec_bits[N]` | out | decisions, valid from `done` until the next `start` |

A block takes 1 load clock, then one clock per DC, then 1 stop clock. The
clock in which the checks are found satisfied runs no DC. A block that needs
300 DCs therefore occupies 302 clocks. At the 212 MHz reported for the
published FPGA implementation, that is 1024 bits / 302 clocks, or 719 Mbps.
The decoder always runs at least one DC, even if the loaded word already
satisfies the checks.

## Measured behaviour

These results were measured in simulation, on this design's code, with
random codewords:

* At 1024 bits and Eb/N0 = 3 dB, all 6 random blocks decoded without error.
  They needed 678 DCs on average (483 to 919), which is about 319 Mbps at
  212 MHz. The published decoder reports about 300 average DCs at this point
  on its own code. The EM start-up, the random-number sharing and the counter
  input all affect this figure, and none of them was tuned.
* At 128 bits (Z = 16), 8 of 8 blocks at 6 dB decoded, in 57 to 287 DCs.
  Blocks at -4 dB ran into the DC limit.

No bit-error-rate curve was simulated. A single block at full size takes
seconds of simulation time, so the 10^-6 BER region is out of reach.

## Departures from the published design

* The EMs start each block filled with the first channel bit, not with zeros
  (see above).
* The parity-check matrix, LFSR polynomials and seeds, XOR taps and
  random-number sharing are this design's own.
* The bit fed to the counter is not specified in the published design. Here
  it is the equality of all four inputs (the channel bit and three edges)
  when they agree, and otherwise the previous value.
* The sample format (Q4.4), the BPSK mapping, the parallel load of a block,
  the start/ready/done handshake and the at-least-one-DC rule are this
  design's own.
* "6K" DCs is taken as 6000.
* NDS is done inside the decoder, with one table per variable node.
* The EMs have a clear and a fill port. On an FPGA they would therefore not
  map onto plain shift-register LUTs, which have no reset or parallel load.
  For that mapping, the fill would have to be done serially, or replaced.

## Files

| file | content |
| --- | --- |
| `rtl/stoch_ldpc_pkg.sv` | widths, types, code shifts, LFSR constants, wiring and sharing functions |
| `rtl/stochastic_ldpc_decoder.sv` | top level |
| `rtl/decode_controller.sv` | idle/decode state machine, stop rules |
| `rtl/nds_prob.sv` | noise-dependent scaling table |
| `rtl/stoch_comparator.sv` | `P > R` |
| `rtl/variable_node.sv` | degree-3 node, three EMs |
| `rtl/edge_memory.sv` | 64-bit EM |
| `rtl/check_node.sv` | degree-6 XOR node |
| `rtl/updown_counter.sv` | 6-bit saturating counter |
| `rtl/randomization_engine.sv` | ten LFSRs, 32 x 8-bit output |
| `rtl/interleaver.sv` | Tanner-graph wiring |
| `rtl/syndrome_check.sv` | parity of the hard decisions |

Every block has a self-checking testbench, `tb/tb_<block>.sv`. These are:

* `tb_stochastic_ldpc_decoder`: the whole decoder at Z = 16. It counts the
  regenerative and hold states, counter saturation at both limits, early
  stops, limit stops and NDS saturation, and fails if any of them never
  occurs.
* `tb_decoder_full`: all defaults, two blocks at 3 dB.
* `tb_workload_ber`: six random codewords at 3 dB, on a 6000-DC and a
  1000-DC decoder side by side.

`tb/tb_channel_pkg.sv` provides the BPSK/AWGN channel. Each testbench prints
`TB_RESULT checks=<n> failures=<n>`.

## Simulating

With Verilator 5:

    verilator --binary --timing -Wno-fatal --top-module tb_stochastic_ldpc_decoder \
      -y rtl -y tb +libext+.sv rtl/stoch_ldpc_pkg.sv tb/tb_channel_pkg.sv \
      tb/tb_stochastic_ldpc_decoder.sv
    ./obj_dir/Vtb_stochastic_ldpc_decoder

To run another testbench, replace the testbench name in both places. The
full-size decoder has about 200k flip-flops. It builds in under a minute and
simulates a few thousand DCs in seconds. To shrink the design, set `Z`; the
code shifts are taken mod Z. `MAX_DC` sets the DC limit.
