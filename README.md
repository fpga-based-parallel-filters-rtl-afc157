# Parallel FIR filters protected by a Hamming code

Some systems run several copies of the same filter side by side, each on its
own signal: the channels of a receiver, or the inputs of an acquisition
system. Triple modular redundancy (TMR) protects such a bank, but it costs
more than three times the area. This design protects the bank at a much lower
cost. Each filter is treated as one data bit of an error-correcting code. A
few extra **check filters** carry the parity bits. Any single faulty filter,
data or check, is then found and its output repaired.

The trick is that filtering is linear. Take K filters with the same impulse
response h. The sum of some of their outputs equals the output of one more
copy of h fed with the sum of their inputs:

    y1(n) + y2(n) + y3(n) = sum_l (x1(n-l) + x2(n-l) + x3(n-l)) h(l)

So a check filter fed with `x1+x2+x3` must agree with `y1+y2+y3` at all times.
Pick the input sums by the rows of a Hamming check matrix. The pattern of
check filters that disagree then names the faulty filter, exactly as a
Hamming syndrome names a flipped bit.

## The code

With four data filters (the default, `K = 4`) there are three check filters,
which gives a (7,4) Hamming code. Column i of the matrix tells which checks
data filter i takes part in:

| filter | check 1 | check 2 | check 3 | check filter input |
|--------|:-------:|:-------:|:-------:|--------------------|
| y1     | 1 | 1 | 1 | |
| y2     | 1 | 1 | 0 | |
| y3     | 1 | 0 | 1 | |
| y4     | 0 | 1 | 1 | |
| z1     | 1 | 0 | 0 | x1 + x2 + x3 |
| z2     | 0 | 1 | 0 | x1 + x2 + x4 |
| z3     | 0 | 0 | 1 | x1 + x3 + x4 |

Check j compares z_j with the sum of the data outputs in row j. The set of
failing checks (the syndrome) is decoded as follows:

* All zero: no error.
* Equal to a data column: that data filter is faulty. Its output is rebuilt
  from a check output and the other data outputs of one row. For example
  `y1 = z1 - y2 - y3`.
* A single one: a check filter is faulty. The data outputs are already right
  and pass unchanged.

With the parameter `K = 11` the same RTL builds four check filters, which
gives a (15,11) Hamming code. The overhead shrinks as the bank grows: 3 extra
filters for 4, and 4 extra for 11. In general the number of check filters R
is the smallest r with 2^r − r − 1 ≥ K.

The columns come from a single rule in `pfecc_pkg`. Every R-bit vector with
at least two ones is listed, by decreasing weight and then by decreasing
value, with check 1 as the most significant bit. For R = 3 this reproduces
the table above. For R = 4 the rule gives the eleven columns
1111, 1110, 1101, 1011, 0111, 1100, 1010, 1001, 0110, 0101, 0011.

## Datapath

```
x[0..K-1] ──┬──────────────────────────▶ K data FIRs ──── y ──┐
            │                                                 ├─▶ syndrome_unit ─ syn ─┐
            └─▶ check_encoder ── xc ──▶ R check FIRs ─── z ───┤                        │
                                                              └─▶ fault_corrector ◀────┘
                                                                    (3 copies + vote) ──▶ yc, flags
```

| module | role |
|--------|------|
| `pfecc_pkg` | Code construction: number of check filters, column of each data filter, row weights, the row used to repair each filter, and the check input width. |
| `fir_filter` | 16-tap direct-form FIR. It sums at full precision, then keeps the top OUT_W bits. All K + R filters use this module. |
| `check_encoder` | Forms the R check inputs. Each is the sum of its row's data inputs, built with its own adders. |
| `syndrome_unit` | Computes `diff_j = z_j − Σ_row y` and sets syndrome bit j when `|diff_j| > THRESH`. |
| `correction_element` | One copy of the syndrome decoding and the rebuilding of the faulty output. |
| `majority_voter` | Bitwise 2-of-3 vote over the three correction copies. |
| `fault_corrector` | Three `correction_element` copies, the voter, and the status flags. |
| `parallel_filter_ecc` | Top level: wires the blocks above, plus the pipeline registers and the fault-injection masks. |

### Sizes

| quantity | default | note |
|----------|---------|------|
| data filters `K` | 4 | 11 is the second configuration |
| taps `TAPS` | 16 | |
| sample / coefficient width | 8 / 8 bits | two's complement |
| data filter output `OUT_W` | 18 bits | the full-precision sum is 20 bits; 2 LSBs dropped |
| check filter input `XC_W` | 10 bits | 8 + clog2(largest row weight); 11 bits for K = 11 |
| check filter output `Z_W` | 20 bits | same LSB weight as the data outputs; 21 bits for K = 11 |
| threshold `THRESH` | 2 | largest row weight − 1; 6 for K = 11 |

## Why there is a threshold, and what it costs

This is the least obvious part of the design.

Each filter truncates its own full-precision sum. The check filter truncates
the sum of three signals once, while the data filters truncate each of the
three separately. Because floor(a+b+c) − (floor a + floor b + floor c) lies
in 0..2, the check difference `diff_j` of a fault-free bank is not zero. It
is a small residue in the range 0 to (row weight − 1). The syndrome unit
therefore treats any `|diff_j| ≤ THRESH` as agreement. THRESH defaults to
the largest possible residue, so a fault-free bank never raises a syndrome.
The testbenches confirm this on hundreds of thousands of samples.

Now let T = THRESH, and let e be the error that a fault puts on one filter's
output. For a faulty data filter i, a check of row j sees `residue_j − e`,
which gives three regimes:

* **|e| > 2T.** Every check that contains filter i fails, and no other check
  does. The syndrome names the faulty filter exactly. Its rebuilt output
  differs from the fault-free output by that row's residue, 0..T LSBs. All
  other outputs are exact.
* **0 < |e| ≤ 2T.** Some of filter i's checks may fall under the threshold.
  The error can then go unnoticed, or the syndrome can name the wrong filter.
  Either way the output damage stays small: every output is within 3T LSBs of
  its fault-free value (6 LSBs of an 18-bit output for K = 4). Small errors
  are accepted by design.
* **A faulty check filter** only ever disturbs its own syndrome bit. The
  data outputs are never touched.

The residue of each check is brought out on the `residue` port, so the margin
can be observed in a running system.

## Keeping faults in the protection logic from spreading

The encoder, the syndrome unit and the correction logic can fail too. Three
measures keep one such fault from reaching the outputs:

* **No shared adders.** Each check input sum and each syndrome difference has
  its own adder chain, so one faulty adder disturbs one check only. A
  disturbed check looks like a faulty check filter, which leaves the data
  outputs alone.
* **Triplicated correction.** The decoding and rebuilding logic exists in
  three copies (`correction_element`), followed by a bitwise majority vote.
* **Limits.** The voter itself and the status flags are not triplicated.
  A synthesis tool will also merge the identical copies and shared sub-sums
  unless told to keep them; a generic coarse synthesis does merge the three
  correction copies. For real protection, set the tool's keep or
  no-resource-sharing options on these modules.

## Interface and timing (`parallel_filter_ecc`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `in_valid` | in | 1 | all K samples on `x` are taken this clock |
| `x[K]` | in | 8 | input samples, two's complement |
| `coef[16]` | in | 8 | impulse response h(0..15), shared by all filters, not registered |
| `fi_x_mask[K+R]` | in | XC_W | fault injection: XOR mask on each filter's input (data filters use the low 8 bits) |
| `fi_coef_mask[K+R][16]` | in | 8 | fault injection: XOR mask on each filter's coefficients |
| `out_valid` | out | 1 | the outputs below belong to one sample |
| `yc[K]` | out | 18 | corrected outputs |
| `residue[R]` | out | Z_W+2 | raw check differences z_j − Σ y |
| `syndrome` | out | R | bit j set when check j+1 fails |
| `err_data`, `err_index` | out | 1, clog2 K | a data filter was found faulty, and which one (0-based) |
| `err_check` | out | 1 | a check filter was found faulty |
| `uncorrectable` | out | 1 | the syndrome matches no single filter (only possible when K is below 2^R − R − 1) |

Filter indices 0..K−1 of the mask arrays are the data filters, and K..K+R−1
the check filters. A mask on a check filter's input also stands for a fault
in that row's encoder adders. Since the rows share no adders, such a fault
reaches only one check filter. Tie all masks to zero in normal use. The encoder always
sees the clean inputs.

Timing: a sample presented with `in_valid` high in cycle n gives its
corrected output in cycle n + 2, with `out_valid` high. Cycle n + 1 is the
filter output register and cycle n + 2 is the correction output register.
The bank accepts one sample per clock. With `in_valid` low the filters hold
their state and `out_valid` drops two cycles later.

## Verification

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_fir_filter` | Random and extreme-value coefficients and samples, with `en` toggling at random, against a software convolution with the same truncation. Also checks the 1-cycle latency and that the output holds while `en` is low. |
| `tb_check_encoder` | The K = 4 sums against the three equations written out by hand, and the K = 11 sums against a hand-written column table. |
| `tb_syndrome_unit` | Zero syndrome on consistent data plus a residue of 0..2. The correct column for every faulty data or check output. The exact differences. The threshold boundary at ±2 (not flagged) and ±3 (flagged). |
| `tb_fault_corrector` | Exact repair of every data output, pass-through for check-filter syndromes and for a zero syndrome, the flags, and saturation of rebuilt values past full scale. One correction copy at a time is also forced to a wrong value, and the vote must hide it. |
| `tb_parallel_filter_ecc` | The whole bank at its default size. 7900 single-bit input faults and 7900 single-bit coefficient faults are injected into random data and check filters, with coefficients renewed every 500 faults. Every output is checked against an independent model under the rules of the section above, and the latency is checked to be 2. The run also counts, and requires, a corrected error on every data filter, a detected error on every check filter, residues absorbed by the threshold, tolerated small errors, and idle cycles. |
| `tb_parallel_filter_ecc_k11` | The same test with K = 11 (a (15,11) code). |

`pfecc_model` in `tb/` holds the stimulus, the reference model and the
checker that the two bank-level testbenches share.

To build and run with Verilator 5 from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/pfecc_pkg.sv \
          tb/tb_parallel_filter_ecc.sv --top-module tb_parallel_filter_ecc
./obj_dir/Vtb_parallel_filter_ecc
```

For another test, replace the testbench file and the top module name. The
full-size bank test runs in a few seconds.

## Design choices and departures

The following points are choices made for this RTL rather than fixed by the
scheme itself:

* **Filter structure.** The filter is direct form with one multiplier per tap
  and a registered output. Any structure with the same response would do.
  The scheme only requires that data and check filters be identical apart
  from their widths.
* **Coefficients.** They are an input port shared by all filters, rather
  than per-filter constants or registers. For coefficient fault injection,
  each filter XORs its own copy with a mask.
* **Truncation.** Quantisation to the output width is by truncation (floor).
  The check filters keep two extra MSBs instead of saturating, so that z can
  hold the sum of up to three (or seven) data outputs.
* **Threshold value.** THRESH is set to the largest residue that this
  truncation can produce. A larger threshold tolerates sloppier check
  arithmetic but lets bigger errors through unnoticed.
* **Repair row.** A faulty data filter is rebuilt from the first check row
  that contains it: y1, y2 and y3 from z1, and y4 from z2. Rebuilt values are
  clipped to the 18-bit range.
* **Sign convention.** Differences are formed as z − Σ y. The opposite sign
  gives the same syndrome, since only the magnitude is compared.
* **K = 11 widths.** For K = 11 the check inputs are 11 bits wide, because
  each row then sums seven inputs. Ten bits would overflow.
* **Additions for observation and test.** The valid/pipeline handshake, the
  status flags, the `residue` port and the fault-injection masks are
  additions for using and testing the bank.
* **Scope.** Only single-error-correcting Hamming codes are built. The scheme
  extends to other linear codes, such as multi-error BCH codes, and to IIR
  filters, but neither is implemented here.
