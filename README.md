# Semi-systolic Montgomery multiplier over GF(2^m)

This design multiplies two elements of the binary field GF(2^m), m odd, in
polynomial basis with an arbitrary field polynomial G. It computes the
Montgomery product

    T = A · B · x^-(m-1)/2  mod G

in a pipelined array of (m+1)/2 rows by m bit-cells. Each cell has two AND
gates, one three-input XOR and a latch. The default size is m = 571, the
largest NIST binary field. At that size the array is 286 × 571 cells. Any odd
m ≥ 3 can be set with the parameter `M`.

The main idea is to split the Montgomery product into two halves that do not
depend on each other. One half works from the top bit of B downward and
multiplies by x. The other works from the bottom bit upward and divides by x.
Each half needs only (m+1)/2 steps instead of m. Both halves have the same
bit-level form, so they share one array: the two halves of a product go
through it on consecutive clocks.

## The arithmetic

Write B = b_0 + b_1 x + … + b_(m-1) x^(m-1) and let h = (m-1)/2. Then

    A·B·x^-h = C + D  (mod G)
    C = A·(b_h + b_(h+1) x + … + b_(m-1) x^h)           mod G
    D = A·(b_(h-1) x^-1 + b_(h-2) x^-2 + … + b_0 x^-h)   mod G

Horner's rule gives two recurrences, each taking (m+1)/2 steps from zero:

    C_i = C_(i-1) · x    mod G + b_(m-i) · A        i = 1 … (m+1)/2
    D_i = D_(i-1) · x^-1 mod G + b_(i-1) · A        i = 1 … (m+1)/2,  b_h taken as 0

The D recurrence has one extra step that adds nothing. It only applies the
last factor x^-1, and is the reason both halves have the same length.

Bit by bit, using x^m = g_(m-1) x^(m-1) + … + g_0 and
x^-1 = x^(m-1) + g_(m-1) x^(m-2) + … + g_1 (true because g_0 = 1):

    c_i[k] = c_(i-1)[k-1] ^ (c_(i-1)[m-1] & g[k])   ^ (b & a[k])      c[-1] = 0
    d_i[j] = d_(i-1)[j+1] ^ (d_(i-1)[0]   & g[j+1]) ^ (b & a[j])      d[m]  = 0, g[m] = 1

Reverse the bit order of D, A and (g_1 … g_m), with k = m-1-j. The D line
then becomes exactly the C line. So one cell equation serves both halves:

    p_i[k] = p_(i-1)[k-1] ^ (p_(i-1)[m-1] & g'[k]) ^ (b & a'[k])

The C half uses A and G as they are. The D half uses them reversed, and its
result comes out reversed.

## Data flow through the array

A product enters the array as two *tokens*. A token is a bundle of
A′ (m bits), G′ (m bits), one multiplier bit per row, a D/C tag and a valid
bit.

| clock after acceptance | at the top of the array |
|---|---|
| 1 | D token: A and g_1…g_m reversed, row bits b_0, b_1, …, b_(h-1), 0 |
| 2 | C token: A and g_0…g_(m-1) as given, row bits b_(m-1), b_(m-2), …, b_h |

Row i (`mmm_row`) does step i of the recurrence for whichever token it holds.
- The row's MSB is broadcast to all m cells.
- The row's multiplier bit is broadcast from the left edge.
- Every other signal goes only to the neighbouring cell.

This broadcast within a row is what makes the array *semi*-systolic.

Each cell latches its new partial bit. It also latches the a′ and g′ bits it
received, for the row below, so the coefficients travel down with their
token. That is what lets a D token and a C token (of the same or different
products) sit in adjacent rows with different coefficient orders. The
multiplier bits for the rows below shift one place per row. So row i+1 gets
its bit one clock after row i got its own.

At the bottom, `mmm_combine` holds the D result for one clock and reverses
it back to natural bit order. It then XORs it with the C result, which
arrives in the next clock, and latches T.

The critical path in a cell is one AND2 and one XOR3, plus the fan-out of
the row's MSB and multiplier-bit broadcasts.

## Timing

- **Latency.** A result comes (m+7)/2 = (m+1)/2 + 3 clocks after its
  operands. These are one input latch, (m+1)/2 rows, one clock by which C
  trails D, and one output latch. Operands sampled at clock edge N give
  `out_valid` and `t` sampled at edge N + (m+7)/2. At m = 571 that is
  289 clocks.
- **Rate.** The array takes a new token every clock. A product is two
  tokens, so one product is accepted every second clock. `in_ready` drops
  for the one clock after each acceptance. After the pipeline fills, results
  leave every second clock and every cell does useful work on every clock.
  One product per clock would need twice the cells, because the two halves
  share one array. That would be, for example, a second array that takes the
  other token stream.
- **Handshake.** Input: `in_valid`/`in_ready`, and the operands are taken on
  a clock edge where both are high. Output: a one-clock `out_valid` pulse
  with `t`, and no back-pressure.
- **Reset.** `rst_n` is asynchronous and active low. It clears only the
  valid bits. The data latches are not reset, because they are never read
  without a valid bit.

## Choices made in this implementation

Some of the design follows from the architecture: the C/D split, the cell
equation, the (m+1)/2 × m array, the MSB and multiplier-bit broadcasts,
coefficients flowing down with each token, D one clock ahead of C, the final
m XOR2 and the (m+7)/2 latency. The rest are choices made here:

- The D half is mapped onto the C cell equation by reversing bit order, as
  derived above. The reversal is pure wiring in `mmm_issue` and
  `mmm_combine`.
- The latches between cells are edge-triggered flip-flops.
- The only registers outside the array are one input latch and one output
  latch. That is what reaches the (m+7)/2 latency. The array is plainly
  pipelined, with one flip-flop level per row. No further retiming is
  applied.
- The cell keeps its three-input XOR. Splitting it into two XOR2 gates, with
  a cell reorganised so that the critical path is AND2 + XOR2, would
  shorten the clock period a little. That variant is not implemented.
- The handshake, reset style and rate described under Timing.
- Storage comes to about 1.63 m² flip-flops: 3m per row for p, a′ and g′,
  plus the triangle of multiplier bits still waiting for lower rows, plus
  about 5m outside the array. At m = 571 that is about 533,000. Published
  estimates for this architecture count about 2.1 m² + 6.5 m latches. The
  extra in that count is not specified, so no additional latches are added.
- The default m = 571. Changing `M` to another odd value gives the array for
  that field. Each instance serves one m; the polynomial G stays a run-time
  input.

## Using it

- Operands are Montgomery residues: A = a·x^h mod G and B = b·x^h mod G.
  Multiplying gives the residue of a·b. To leave the Montgomery domain,
  multiply by 1. To enter it, multiply by x^(2h) mod G. Neither step needs
  more hardware.
- `g` carries g_(m-1)…g_0. The top coefficient g_m = 1 is implied.
- g_0 must be 1. This holds for every irreducible polynomial, and the
  arithmetic needs nothing more than that: G need not be irreducible, nor a
  trinomial or pentanomial.
- G is an input, not a parameter, so each product can use a different
  polynomial.

## Files

| file | contents |
|---|---|
| `rtl/mmm_pkg.sv` | token tag type `tok_kind_e`, default size |
| `rtl/mmm_cell.sv` | bit-cell: AND2, AND2, XOR3, latches for p, a′, g′ |
| `rtl/mmm_row.sv` | one row: m cells, MSB broadcast, valid/tag/multiplier-bit latches |
| `rtl/mmm_array.sv` | (m+1)/2 rows chained |
| `rtl/mmm_issue.sv` | input latch, handshake, builds the D and C tokens |
| `rtl/mmm_combine.sv` | D hold latch, bit reversal, m XOR2, output latch |
| `rtl/gf2m_mont_mult.sv` | top: issue → array → combine |
| `tb/gf2m_ref_pkg.sv` | reference arithmetic: full product, reduction, division by x |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus end-to-end ones |

## Verification

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=F`. The reference model does not reuse the
array's recurrences. It forms the full product A·B, reduces it by cancelling
leading terms, and then divides by x (m-1)/2 times.

- `tb_mmm_cell`: all 32 input combinations of a cell.
- `tb_mmm_issue`: the token contents and their order. Also checks that the
  input stalls after each acceptance (m = 7).
- `tb_mmm_array`: random C and D tokens on every clock, with bubbles. Checks
  each result and its (m+1)/2-clock delay (m = 7).
- `tb_mmm_combine`: D/C pairs with gaps. Checks T and its timing.
- `tb_gf2m_mont_mult`: end to end at m = 5, 7 and 163, with hundreds of
  random products. Checks every result and the (m+7)/2 latency. It also
  counts, and requires at least one of each:
  - input stalls;
  - back-to-back products;
  - idle gaps;
  - random field polynomials.
- `tb_gf2m_mont_mult_full`: the top at its default m = 571. Runs six
  products, a burst and one after a gap, and checks results and latency.

Simulate with Verilator, for example:

    verilator --binary --timing --assert -Irtl -Itb \
        tb/gf2m_ref_pkg.sv rtl/mmm_pkg.sv rtl/gf2m_mont_mult.sv \
        tb/tb_gf2m_mont_mult.sv --top-module tb_gf2m_mont_mult
    ./obj_dir/Vtb_gf2m_mont_mult

The other modules are found through `-Irtl`. At m = 571 the design has
163,306 cells and about 533,000 flip-flops. A Verilator lint of the full
array takes about 3 minutes and 6.7 GB of memory, and the full-size
testbench build takes several minutes more. The other testbenches use
m ≤ 163 and build in under a minute.
