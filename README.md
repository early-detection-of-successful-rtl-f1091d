# Early detection of successful LDPC decoding for dual-diagonal codes

An iterative LDPC decoder normally stops when the full parity check
`H c^t = 0` holds for its current hard decisions. For the block-structured
codes of IEEE 802.16e and 802.11n, whose parity part is "dual-diagonal", this
check waits for the parity bits. These sit on degree-2 variable nodes and
converge more slowly than the data bits. This RTL implements a cheaper stopping
test for such codes, from C.-Y. Lin and M.-K. Ku, *Early detection of
successful decoding for dual-diagonal block-based LDPC codes* (Electronics
Letters, 2008). The test looks only at the data bits and at one z-bit parity
sub-block. A decoder can therefore stop as soon as the data are right, without
spending more iterations on the parity staircase.

## Why the short test works

`H` is expanded from an `mb x nb` base matrix `Hb`. Each entry is `-1` (a z x z
zero block) or a shift `p` (the z x z identity with its rows rotated right by
`p`). The columns split into `kb` data columns and `mb` parity columns. The
parity part has a fixed shape:

* the first parity column `t` has three non-zero entries: shift `d` in row 0,
  shift `0` in some middle row `x`, and shift `d` again in the last row;
* the remaining `mb-1` parity columns form a staircase of identity blocks:
  column `c` has identities in rows `c-1` and `c`.

Add the `mb` block rows of `H c^t = 0` together, modulo 2. Each staircase
column appears twice with the same identity, so every parity sub-block
`p1 .. p(mb-1)` cancels. The weight-3 column contributes `I_d + I + I_d = I`.
What remains is z equations:

```
   sum over i < mb, j < kb  of  P(i,j) * s_j   +   p0   =   0
```

Here `s_j` is the j-th data sub-block and `p0` the first parity sub-block.
Every valid codeword satisfies these equations. They are necessary, not
sufficient: they are the XOR of the real checks, so an error pattern that
cancels in the sum passes them. They also do not depend on `d`, on `x` or on
any parity sub-block other than `p0`. So the checker needs only the data part
`Hb_s` of the base matrix.

## How the checker evaluates the sum

The double sum is regrouped by column:
`sum_j (sum_i P(i,j)) s_j`. The checker handles one data column per clock:

1. Read the column's `mb` entries of `Hb_s` (`hb_mem`) and the column's z-bit
   hard-decision word (`hd_mem`). Both memories are read in the same cycle.
2. Rotate the word by every non-zero entry's shift in parallel: one
   `circ_perm_mul` per base row. Then XOR the rotations and the running z-bit
   accumulator together (`ed_accum`). Two entries with equal shifts in one column
   cancel, as they do in the algebra.
3. After the `kb` data columns, read the `p0` word (hard-decision address
   `kb`) and add it without rotation.
4. The block is declared decoded if the accumulator is all zeros.

`circ_perm_mul` implements "row r of P has its one in column (r+p) mod z".
Output bit `r` is input bit `(r+p) mod z`. z is a run-time input, so the
rotation works inside the low z bits of a 96-bit word. The word is masked,
shifted down by `p`, OR-ed with itself shifted up by `z-p`, and masked again.

The full parity check would apply `mb*kb`-sized shift work to the data plus
`2mb+1` parity blocks. The short test applies the same data-side shifts but
touches only one parity block. It also produces z check bits instead of
`mb*z`.

## Blocks

| module | role |
|---|---|
| `ed_pkg` | limits (`Z_MAX=96`, `MB_MAX=12`, `KB_MAX=20`, `NB_MAX=24`, `MAX_ITER=15`) and the `hb_entry_t` type `{valid, shift[6:0]}` |
| `circ_perm_mul` | z-bit circulant permutation multiply with run-time z |
| `ed_accum` | `MB_MAX` rotators, column XOR, z-bit accumulator, zero flag |
| `hb_mem` | `Hb_s` store, written one entry at a time, read one column (all rows) at a time, registered read |
| `hd_mem` | hard-decision buffer, one `Z_MAX`-bit word per base column, registered read |
| `ed_ctrl` | sequencer of one check: columns `0..kb-1`, then `p0` |
| `stop_ctrl` | iteration counter and stopping rule |
| `ldpc_early_detect` | top: the above wired together |

## Using the top (`ldpc_early_detect`)

The iterative decoder itself (layered or two-phase belief propagation) is not
part of this RTL. The top provides the ports a decoder connects to.

* **Code selection.** Set `cfg_z`, `cfg_mb` and `cfg_kb`, then load every entry
  of `Hb_s` with `hb_we`, `hb_wr_row`, `hb_wr_col` and `hb_wr_entry`
  (`valid=0` for `-1`). Shifts must already be reduced for the z in use.
  IEEE 802.16e scales its shift table per z, and that scaling is left to
  whoever loads the table. Rows `>= cfg_mb` and columns `>= cfg_kb` are
  ignored. Any code with z up to 96, at most 12 base rows and at most 20 data
  columns fits. That covers every 802.16e code (z = 24..96; rates 1/2, 2/3,
  3/4 and 5/6) and the 802.11n codes (z = 27, 54, 81).
* **Per code block.** Pulse `frame_start`. After each decoding iteration, write
  the hard decisions (`hd_we`, `hd_wr_addr`, `hd_wr_data`; data sub-block `j`
  at address `j`, parity sub-block `p_i` at address `kb+i`; bit `r` of a word
  is bit `r` of the sub-block). Then pulse `iter_done`. Only the data words
  and `p0` are read, so the decoder may skip the other parity words.
* **Result.** With `iter_done` in cycle 0, the check reads in cycles
  `0..kb` and `check_done` pulses in cycle `kb+2`. `check_ok` and the z-bit
  `check_lhs` (the left-hand side of the sum) are valid then. In cycle `kb+3`,
  one of two pulses follows:
  * `stop` with `decoded=1` if the check passed;
  * otherwise `next_iter`, or, after the 15th iteration, `stop` with
    `decoded=0`.

  `decoded` and `iter_count` hold until the next `frame_start`. The decision
  therefore arrives `kb+3` cycles after `iter_done`, which is 15 cycles for
  the rate-1/2 code.
* `cfg_*` must stay stable and `hd_mem` must not be written while
  `check_busy` is high. An assertion flags a write during a check.
  `iter_done` is ignored while a check is pending or after the block has
  stopped.
* Reset `rst_n` is active-low and synchronous. It clears the controllers and
  the accumulator. The memories are not reset.

## What follows the method and what is a design choice here

Taken from the method:

* the check equation;
* the use of the data sub-blocks plus `p0` only;
* the circulant definition;
* stopping as soon as the check holds;
* the 15-iteration limit used in its evaluation.

The method describes no circuit. Everything else is a choice of this design:

* the column-serial schedule with `MB_MAX` parallel rotators;
* both memories and their organisation;
* run-time selection of z, mb and kb;
* the pulse handshake with the decoder;
* the latency;
* the reset behaviour.

The limits 96/12/20/24 come from IEEE 802.16e, not from the method.

Two points need care:

* **The check can be fooled.** It is the XOR of the real checks. A hard-decision
  vector can pass it while some data bits are still wrong, if the errors
  cancel across rows. The published evaluation reports no loss in bit error
  rate on the AWGN channel. That result comes from simulations of a complete BP decoder
  and was not reproduced here.
* **Decoders and code families.** The unit sees only hard decisions, so it
  serves layered and two-phase decoders alike. The method is also proposed
  for IRA codes such as DVB-S2. This RTL, however, targets the 802.16e/802.11n
  base-matrix format only. DVB-S2 has a different parity structure and much longer blocks. It is
  not supported by these parameters.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_circ_perm_mul` | every z from 24 to 96 in steps of 4, plus random z; random and corner shifts; against a bit-by-bit reference |
| `tb_ed_accum` | random columns with zero blocks, rows beyond `mb`, raw `p0`, clear and hold; against a bit-level expansion of the circulants |
| `tb_hb_mem`, `tb_hd_mem` | write/read-back against a model; read latency and hold |
| `tb_ed_ctrl` | the exact cycle schedule for kb = 1..20; start ignored while busy |
| `tb_stop_ctrl` | stop on success, stop at iteration 15, next-iteration requests, one-cycle pulses |
| `tb_ldpc_early_detect` | end to end at the default size (see below) |
| `tb_wimax_rate_half` | end to end with the rate-1/2 base matrix of IEEE 802.16e at z = 96, 48 and 24; counts the iterations the early test saves over the full parity check |

`tb_ldpc_early_detect` runs the top at its default parameters. For each code
shape it builds a random dual-diagonal base matrix, encodes random data with
the recursive dual-diagonal encoder and confirms the codeword against the full
`H`. It then feeds iterations of hard decisions with chosen errors. The
reference is independent of the RTL's method: it computes the full `mb*z`-bit
syndrome and XOR-folds its row groups. `check_lhs` must equal that fold, and
`check_ok` must be its zero test. The testbench also checks the `kb+2` cycle
latency and the stop / next-iteration decisions. The code shapes are:

* (2304,1152), rate 1/2, z=96, and (2304,1536) and (576,384), rate 2/3:
  the three codes of the published evaluation;
* a rate-3/4 and a rate-5/6 shape, z=96.

The testbench counts, and requires, each of these events:

* an early stop while the staircase parity bits are still wrong, so the full
  parity check would have failed;
* a stop on an error-free word;
* a failed check followed by another iteration;
* a stop at the 15-iteration limit;
* rejection of a wrong `p0`;
* a switch to another code.

`tb_wimax_rate_half` uses the IEEE 802.16e rate-1/2 shift table, entered by
hand from the standard. The testbench confirms that its parity part has the
dual-diagonal shape and that encoded words satisfy the full `H`. Check the
table against the standard before treating this test as a conformance test.

To run a testbench with plain Verilator from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  -Irtl rtl/ed_pkg.sv tb/tb_ldpc_early_detect.sv --top-module tb_ldpc_early_detect
./obj_dir/Vtb_ldpc_early_detect
```

Replace the testbench name to run another. `ed_pkg.sv` must come first on the
command line.
