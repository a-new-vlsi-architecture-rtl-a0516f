# Prime-length 2-D DST on a merged linear systolic array

This is synthesizable SystemVerilog for a 2-D discrete sine transform (DST) of an
N x N block, where N is an odd prime (default N = 7). The design has two parts:

- **Row-column decomposition.** A 1-D DST transforms the rows, a memory
  transposes the result, and a second 1-D DST transforms the columns.
- **Inside each 1-D DST.** The transform is rewritten, with the help of an
  auxiliary input sequence, as two *pseudo-cyclic convolutions* of length
  M = (N-1)/2. Both convolutions use the same M constants. A single linear
  systolic array of M processing elements (PEs) computes both at the same time.
  Each PE holds one constant. The multiplications by that constant can be done
  by a small look-up table instead of a multiplier.

The transform computed (the usual normalisation factor is omitted):

    Y(k,l) = sum_{i,j=0}^{N-1} x(i,j) s(i,k) s(j,l)
    s(i,k) = sin((2i+1) k pi / 2N)   for k = 1 .. N-1
    s(i,0) = (-1)^i                  (this is k = N; it is issued under index 0)

## 1. From the DST to two short convolutions

For one row x(0..N-1), define the **auxiliary sequence** (alternating suffix sums):

    x_a(N-1) = x(N-1),   x_a(i) = (-1)^i x(i) + x_a(i+1),   i = N-2 .. 0

Summation by parts turns the DST into

    Y(0) = Y(N) = x_a(0)
    Y(k) = x_a(0) sin(k pi/2N) + 2 cos(k pi/2N) T(k),                k = 1 .. N-1
    T(k) = sum_{i=1}^{N-1} (-1)^i x_a(i) sin(i k pi / N)

Pairing the terms i and N-i in T(k) leaves M = (N-1)/2 terms:
- For even k, each term uses the sum x_a(i) + x_a(N-i).
- For odd k, each term uses the difference x_a(i) - x_a(N-i).

Because N is prime, the indices can be ordered by a primitive root g:

- e(p) is the even member of {g^p mod N, N - g^p mod N}, for p = 0 .. M-1.
  For N = 7 and g = 3, e = (6, 4, 2).
- The operands are A(l) = x_a(e(l)) + x_a(N-e(l)) and B(l) = x_a(e(l)) - x_a(N-e(l)).
- The constants are C(p) = sin(e(p) pi / N), all positive.

With these definitions:

    T(e(j))     =  sum_l sigma(l,j) C((l+j) mod M) A(l)
    T(N - e(j)) = -sum_l sigma(l,j) C((l+j) mod M) B(l)

Here sigma(l,j) = -1 when e(l)e(j) mod 2N > N, and +1 otherwise. The outputs
T(e(j)) are the even-indexed values ("xi" sequence: 1->4, 2->2, 3->6 for N = 7).
The outputs T(N-e(j)) are the odd-indexed ones ("zeta" sequence: 3, 5, 1).

Both lines have the same index pattern and the same constants. Only the operands
and an overall sign differ, so one array serves both. `rtl/dst_pkg.sv` computes
e(p), C(p) and sigma when the design is elaborated, for any prime N and
primitive root G.

## 2. The systolic array (`pcc_array`, `pcc_pe`)

Substitute q = (l+j) mod M. Output j then needs, at the PE that holds C(q), the
operand l = (q - j) mod M. The array uses the following schedule:

- **Constants stay put.** PE p holds C(p) and the sign table sigma for its
  position.
- **Partial sums move one PE per cycle.** Output j meets PE 0 at cycle j,
  starting from zero, and meets PE p at cycle j + p.
- **Operands move one PE every two cycles.** Each PE has two operand registers.
  The operand presented to PE 0 at cycle tau is at PE p at cycle tau + 2p.
- Output j and operand tau meet at PE p when tau = j - p. So the stream at
  PE 0 must be operand index (-tau) mod M, for tau = -(M-1) .. M-1. That is
  2M-1 operands per row, in the order l = M-1, .., 1, 0, M-1, .., 1.

Schedule for N = 7 (M = 3): which output j and which operand index l are at
each PE in each cycle.

| cycle | PE 0 (C = sin 6pi/7) | PE 1 (C = sin 4pi/7) | PE 2 (C = sin 2pi/7) |
|-------|----------------------|----------------------|----------------------|
| 0     | j0 · A/B(0)          |                      |                      |
| 1     | j1 · A/B(2)          | j0 · A/B(1)          |                      |
| 2     | j2 · A/B(1)          | j1 · A/B(0)          | j0 · A/B(2)          |
| 3     |                      | j2 · A/B(2)          | j1 · A/B(1)          |
| 4     |                      |                      | j2 · A/B(0)          |

Cycles in the table are those of the operands. Each product joins its partial
sum one cycle later, after the registered table read described below.

Every partial sum carries a **tag** {valid, j}. Each PE uses j to look up its
sign: it adds or subtracts C·A into the xi lane, and does the opposite with C·B
in the zeta lane. These sign multiplexers are the only data-dependent control
in the array.

All inputs enter at the left end and all results leave at the right end. No PE
connects to anything except its neighbours. Rows can follow each other every
2M-1 cycles. The 1-D DST feeds one row every N = 2M+1 cycles.

Each PE therefore contains:
- two constant multiplications, both by its own C(p);
- two adders, with their sign multiplexers;
- operand, partial-sum and tag registers.

The constant table is read synchronously, so each product is ready one cycle
after its operand. A partial sum passing PE p in cycle t therefore receives the
product of the operand that was at PE p in cycle t-1. To keep the schedule
above, the tags pass through one register before PE 0, and a result leaves
M+1 cycles after its tag enters. As a result:
- one pipeline stage holds only the table read;
- the next stage holds only adders (combining the two table words, then the
  sign-controlled accumulate).

The clock period is therefore the longer of the table access time and the
adder delay.

### Constant multiplication (`rom_cmult`)

With `USE_ROM = 1` (the default), both products of a PE come from one table of
2^ceil(L/2) words holding C·v, where L is the operand width. Each operand is
split into a signed high half h and an unsigned low half l. The product is
computed as

    (TAB[h] - [h negative] · C · 2^H) · 2^Lo + TAB[l]

This takes four table reads per cycle: two halves for each of the two operands.
The reads are registered, and the correction and shifted add come after the
register. With `USE_ROM = 0`, two ordinary multipliers with registered outputs
are used instead. Both forms give the exact product, one cycle after the
operand.

## 3. Pre- and post-processing

- **`aux_seq_gen`.** Collects a row (at most one sample per cycle) and copies it
  to a work bank. It then evaluates the x_a recursion serially, one adder step
  per cycle, from i = N-1 down to 0. After N steps it pulses `xa_valid`.
- **`in_perm`.** Latches x_a and runs a counter over 2M-1 cycles. A pair of
  multiplexers picks x_a(e(l)) and x_a(N-e(l)), which are added and subtracted
  to form A(l) and B(l). These leave in the schedule order above, together with
  the tags and with x_a(0).
- **`postproc`.** Writes T(e(j)) and T(N-e(j)) to addresses e(j) and N-e(j) of a
  collection bank, which puts them back in natural order. When the row is
  complete it moves to an output bank. The stage then issues Y(0) = x_a(0) and
  Y(k) = x_a(0)S(k) + 2C(k)T(k), for k = 1..N-1, one per cycle. Each result is
  rounded to an integer.

## 4. 2-D datapath (`dst2d_top`, `transpose_buf`)

The data path is `dst1d` (rows) → `transpose_buf` → `dst1d` (columns). The
transposition memory has two banks of N·N words used in ping-pong fashion. One
bank is written in row-major order while the other is read in column-major
order. The second stage's input width is the first stage's output width.

## 5. Interfaces and timing

All blocks have a clock `clk` and an asynchronous active-low reset `rst_n`.
The streams use only a valid signal and have no back-pressure.

| block | input | output |
|-------|-------|--------|
| `dst2d_top` | `in_valid`, `in_data[IW]`: x(i,j) in row-major order, at most one per cycle | `out_valid`, `out_k`, `out_l`, `out_data[IW+2clog2(N)]`: Y(k,l) with l outer and k inner, N·N consecutive cycles per block |
| `dst1d` | `in_valid`, `in_data[IW]`: x(i) in natural order | `y_valid`, `y_idx`, `y_data[IW+clog2(N)]`: Y(0), Y(1), .., Y(N-1) on consecutive cycles |

- **Throughput.** `dst1d` takes one row per N cycles. `dst2d_top` takes one
  block per N·N cycles. Rows and blocks may follow each other with no idle
  cycle, and idle cycles anywhere in the input are allowed.
- **`dst1d` latency.** Y(0) of a row is presented N + 3M + 4 cycles after the
  cycle that presents the row's last sample: 20 cycles for N = 7. This is:
  - N cycles of recursion;
  - 2M-1 cycles of operand issue;
  - M+1 cycles through the array;
  - four register stages.
- **`dst2d_top` latency.** The first output of a block, (k, l) = (0, 0), is
  presented 2(N + 3M + 4) + 2N cycles after the cycle that presents the
  block's last sample: 54 cycles for N = 7 and 84 for N = 11. This is two 1-D
  latencies plus about N cycles for the row stage to emit the last row and
  N cycles for the buffer to emit the first column.

## 6. Number formats and accuracy

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 7 | transform length, an odd prime |
| `G` | 3 | primitive root of N (checked at elaboration) |
| `F` | 12 | fractional bits of every constant |
| `IW` | 8 | signed input width; use 9 for unsigned 8-bit pixels |
| `USE_ROM` | 1 | table-based (1) or multiplier-based (0) constant multiplication |

- Within a 1-D stage:
  - x_a is exact in IW + clog2(N) bits.
  - The operands are exact in one bit more.
  - Products and partial sums in the array are exact.
- Each 1-D result is rounded (half up) to IW + clog2(N) bits. That width holds
  the largest possible magnitude, N·2^(IW-1).
- The error of one 1-D result is at most
  0.5 + 2^-(F+1) (|x_a(0)| + 4 Σ_{i≥1} |x_a(i)|).
- With the defaults, the 2-D results observed in simulation are within about
  3.6 of the exact transform. The first stage's rounding errors add up over N
  terms in the second stage.

## 7. Where this RTL makes its own choices

The architecture this RTL implements fixes several things:
- the row-column structure with a transposition;
- the auxiliary sequence;
- two pseudo-cyclic convolutions, merged into one linear array of PEs;
- two constant multiplications and sign multiplexers per PE;
- tag control, with I/O only at the array ends;
- look-up-table multiplication with a 2^(L/2)-word table;
- pre-processing (recursion plus multiplexer-and-latch permutations);
- post-processing (reordering plus the final combination).

The following are this RTL's own:

- **Array schedule.** The register placement (sums at full speed, operands at
  half speed) and the operand issue order were derived here.
- **Sign functions.** The convolution formulas were re-derived from the
  definition of the DST. The index maps xi and zeta match the published ones
  for N = 7, g = 3. The sign table sigma belongs to this formulation. It does
  not reproduce the published sign functions δ and λ, which belong to a
  different choice of operand representatives.
- **Look-up table reads.** Four reads per cycle (two halves of two operands)
  replace the two-port table of the original description.
- **Index of the k = N coefficient.** It is issued as index 0. Its kernel is
  (-1)^i, which follows from the transform's definition, not a row of ones.
- **Formats and interfaces.** Word lengths, rounding, the valid-only
  interfaces, the serial one-adder recursion, the ping-pong banks and the reset
  style were all chosen here.
- **Stage timing.** The pre-processing takes one sample per cycle, so the array
  is busy 2M-1 of every N cycles.

## 8. Verification

Every module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=.. failures=..` line and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_rom_cmult` | all 4096 operand values, table and multiplier forms, against exact products one cycle later |
| `tb_pcc_pe` | random operands, sums and tags; signs computed from sin() in floating point; the one-cycle product delay and the other register delays |
| `tb_pcc_array` | bit-exact against the direct sum for T(k), which uses neither the folding nor the sign table; latency M+1; rows every N and every 2M-1 cycles |
| `tb_aux_seq_gen` | x_a against suffix sums; pulse timing; gaps in the input |
| `tb_in_perm` | operand order, tags and x_a(0) against an independently computed index map |
| `tb_postproc` | reordering and eq. Y(k) bit-exactly; latency; gapless output |
| `tb_transpose_buf` | transposition, gapless bursts, use of both banks |
| `tb_dst1d` | against the double-precision DST, with the error bound above; latency of 20; one row per 7 cycles |
| `tb_dst2d_top` | default parameters, 16 blocks, against the double-precision 2-D DST; latency of 54; counts back-to-back blocks, input gaps, bank switches, added and subtracted array terms |
| `tb_dst2d_n11` | the same 2-D check at N = 11, G = 2, with the multiplier form (`USE_ROM = 0`); largest error 11 against a bound of about 85 |

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl rtl/dst_pkg.sv tb/tb_dst2d_top.sv \
              --top-module tb_dst2d_top -Mdir obj -o sim && obj/sim

The testbenches seed their data with `$urandom`.

## 9. Changing the design

- **Another prime length.** Set `N` and a primitive root `G` on `dst2d_top`
  (for example N = 11, G = 2). All tables, index maps and widths follow.
- **Accuracy.** Raise `F`.
- **Multiplier-based datapath.** Set `USE_ROM = 0`.

The block testbenches are written for N = 7. `tb_dst2d_n11` runs the whole
datapath at N = 11 (latency 84). `tb_dst1d` and the two 2-D testbenches take
another length by changing their `N` and `G` constants.
