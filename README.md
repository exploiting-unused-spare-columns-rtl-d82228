# Extra ECC check bits from leftover repair columns

Memories ship with spare columns for yield repair, and after repair some of them are usually
still unused. Even a column that *was* replaced is mostly good: typically it has a single bad
cell, and every other row of that column still works. This design puts both kinds of leftover
cells to work. It stores additional ECC check bits in them, turning a plain SEC-DED word into a
longer code with a much lower chance of miscorrecting a multi-bit error. The catch is that the
set of usable cells differs from row to row, so every read has to know which of the additional
check bits exist for the row being read, and mask the others out of the syndrome.

The RTL is a complete memory: encoder, repair multiplexers, array with spare columns, syndrome
generator, masking, error detection and single-error correction. It also holds the two
defect-information stores that produce the per-row mask: a flag column inside the memory, and a
partitioned CAM of defective row addresses.

Default size: 1024 words x 32 data bits, 7 base check bits, 4 spare columns (a 43-bit physical
row), and a 128-word CAM.

## The code: SEC-DED plus one row per spare

The base code is a systematic odd-weight-column SEC-DED code (Hsiao style), with
`H = [P : I]`. Data columns are the first `DATA_W` values of odd weight (3, 5, ...) in numeric
order. For 32 data bits that gives 7 check bits, and for 64 data bits it gives 8. Every column
is distinct and odd, which is what makes the code SEC-DED. Unlike a full Hsiao code, the row
weights are not balanced.

Each spare column adds one row to H. An extra row covers data bits only; its check-bit part is
the identity. So with *no* extra bits available the code is exactly the base SEC-DED code, and
each extra bit that becomes available just makes the code longer. The extra rows were picked
one at a time, greedily. At each step, many random candidate rows were tried and the one that
gave the fewest 3-bit errors aliasing to a single-bit syndrome was kept. The chosen rows are
constants in `ecc_pkg::extra_row`, for 32- and 64-bit words; other widths fall back to an
unoptimised LFSR sequence. The package header gives the rule.

Fraction of 3-bit errors that are miscorrected, counted exhaustively by `tb_miscorrection`:

| extra check bits | 0 | 1 | 2 | 3 | 4 |
|---|---|---|---|---|---|
| 32-bit data, this code | 0.602 | 0.265 | 0.113 | 0.048 | 0.018 |
| 32-bit data, published reference | 0.597 | 0.276 | 0.128 | 0.059 | 0.028 |
| 64-bit data, this code | 0.573 | 0.270 | 0.126 | 0.058 | 0.027 |
| 64-bit data, published reference | 0.556 | 0.267 | 0.128 | 0.061 | 0.029 |

Each extra bit roughly halves the 3-bit miscorrection rate, and the 5-bit rate behaves the same
way. The 4-bit rate (mostly undetected errors, with a zero syndrome) stays between 0.8% and 5%.
It does not follow the published trend, because the published H-matrices are not given and
this code differs from them.

## Where each additional check bit lives

This is the part that is easiest to get wrong, so the rule is fixed and simple. **Extra check
bit `j` always belongs to spare column `j`:**

| state of spare `j` | where extra bit `j` is stored | rows in which it is valid |
|---|---|---|
| unused, defect-free | spare column `j` | all |
| used to replace regular column `c` | regular column `c` (the replaced one) | all rows except those where column `c` is defective |
| unused but itself defective | spare column `j` | all rows except those where spare `j` is defective |

The codeword bit of a replaced column `c` goes to spare `j`, and the extra bit goes into the
old column `c`. `reconfig_logic` does this with one multiplexer per column (direct
replacement), in both directions. Which cells are bad in a given row is not known to the
datapath; that is what the mask is for.

Example (the first testbench scenario): rows 1 and 5 have bad cells in columns 3 and 9.
Spares 1 and 2 replace those columns, and spare 0 is left unused. Extra bits 1 and 2 then live
in columns 3 and 9. They are valid everywhere except rows 1 and 5 respectively. Extra bit 0 is
valid in every row.

## Knowing which extra bits are valid: the mask

On every read a mask of `NSPARE` bits says which extra syndrome bits count (1 = valid). The
masked bits are cleared by one AND gate each before the error-detect OR (`error_detect`). In
the per-bit correction AND trees they are ignored by ORing the comparison with "not valid"
(`correction_logic`). `cfg_mode_i` selects where the mask comes from:

- **`MASK_SPARE_ONLY`**: the same mask for every row. Only spares that are unused and
  defect-free count. Replaced columns are not used. This is the simplest scheme and needs no
  defect information.
- **`MASK_INFO_COL`**: the last spare column stores one flag per row, set to 1 when the row
  contains any defective cell (in a replaced column or in a defective spare). Boot firmware
  writes the flags with flag-only writes (`req_info_i`). Ordinary writes never touch that
  column, because the array has per-bit write enables. `masking_info` turns the flag into a
  mask:
  - in a clean row, all extra bits except the flag column's own bit are valid, so replaced
    columns are fully used;
  - in a flagged row, only the unused, defect-free spares are valid.

  This mode costs one spare column and needs that spare to be unused and working (an assertion
  checks this). Firmware must therefore allocate repair spares from the other ones.
- **`MASK_CAM`**: `defect_cam` holds the word addresses of defective rows. The address is
  loaded into the CAM's search data register in the same cycle the array is read, so the CAM
  adds no latency. The CAM words are split into `NSPARE` contiguous partitions, whose sizes are
  set by `cfg_part_end_i`. One OR gate per partition collects its matchlines into a
  "(p+1)-bit discard" signal; there is no address encoder. `discard_encode` is a programmable OR
  network (`cfg_enc_map_i`) that turns the discard signals into mask bits:
  - rows not in the CAM use all `NSPARE` extra bits;
  - with the thermometer map (`ecc_pkg::thermo_map`), a (p+1)-bit discard drops the p+1
    highest-numbered extra bits;
  - other maps let a partition drop exactly the bits whose cells are bad in its rows, for
    instance a defective spare together with a replaced column.

  This mode needs no spare for bookkeeping and keeps more good cells. The price is a small CAM:
  128 words cover about 1.3e7 cells at a defect ratio of 1e-5.

Firmware (or test equipment) has to program all of this consistently from the repair result:

- `cfg_spare_used_i`, `cfg_spare_col_i` and `cfg_spare_bad_i`;
- the flag of every row;
- or, for the CAM, the CAM words, the partition ends and the map.

The hardware checks only that the flag column is free in `MASK_INFO_COL` mode. If two spares
name the same column, the lower-numbered one wins.

## Datapath and timing

```
write: data -> check_bit_gen -> {base, extra} -> reconfig_logic -> spare_col_array
read:  spare_col_array -> reconfig_logic -> syndrome_gen -> error_detect ----> detected
                                     |                 \-> correction_logic -> data, status
          flag column -> masking_info --\
          address -> defect_cam -> discard_encode --> mask (selected by cfg_mode_i)
```

- One request per cycle, with no stalls. A request is a data write, a flag-only write or a
  read.
- Read data, `rsp_status_o` (`detected`, `corrected`, `uncorrectable`), the mask in force and
  the CAM hit appear combinationally from the registered array output. That is one clock after
  the request, with `rsp_valid_o` high.
- Reset (`rst_n`, asynchronous, active low) clears the CAM valid bits and `rsp_valid_o`. The
  array is not reset.
- `tst_flip_i`, `tst_stuck_mask_i` and `tst_stuck_val_i` act on the physical word read from the
  array. They flip bits (soft errors) or pin them (stuck-at cell defects). They are test hooks
  of this implementation, not part of the scheme; tie them to zero in use.

## Files

| file | content |
|---|---|
| `rtl/ecc_pkg.sv` | mask mode enum, status struct, H-matrix functions and the extra-row constants |
| `rtl/check_bit_gen.sv` | base and extra check bits |
| `rtl/reconfig_logic.sv` | repair multiplexers and extra-bit placement |
| `rtl/spare_col_array.sv` | memory array, regular plus spare columns, per-bit write enable |
| `rtl/syndrome_gen.sv` | syndrome of the extended codeword |
| `rtl/error_detect.sv` | mask AND gates and the detect OR |
| `rtl/correction_logic.sv` | per-bit correction with maskable syndrome bits |
| `rtl/masking_info.sv` | mask from the flag column (and the spare-only mask) |
| `rtl/defect_cam.sv` | partitioned CAM with per-partition OR outputs |
| `rtl/discard_encode.sv` | programmable discard-to-mask encoder |
| `rtl/ecc_spare_mem.sv` | top level |

Parameters of the top: `DATA_W` (32; up to 64 covered by the package functions), `NSPARE` (4),
`WORDS` (1024) and `CAM_ENTRIES` (128). 8K-word and 64-bit configurations are reached by
parameters alone.

## Verification

Every module has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`.
The testbenches share an independent reference of the code (`tb/tb_ref_pkg.sv`).

- `tb_ecc_spare_mem` runs the top at its default size through four repair scenarios, each in
  every mode that applies:
  - two repaired regular-column defects;
  - repaired defects plus a defective unused spare;
  - no defects;
  - defects only in the spare columns.

  For each run it fills all 1024 words, writes the defect flags or programs the CAM, and reads
  every word back, checking the mask and the data. It then injects, at every valid physical
  position of 48 rows, single errors, which must be corrected. It checks that flips in masked
  cells are ignored and that double errors are detected and not corrected. It counts
  triple-error miscorrections in each mode and requires them to fall as more extra bits become
  valid (about 13%, 4.4% and 2.7% for 2, 3 and 4 bits). Read latency is checked on every access,
  and each mechanism (remap, check bit in a replaced column or a defective spare, flag-masked
  row, each CAM partition, mode switch) must occur.
- `tb_table2_sizes` runs the same scenarios at 8K x 32, 1K x 64 and 8K x 64 (parameter
  overrides), the other memory sizes of the reliability comparison.
- `tb_miscorrection` reproduces the miscorrection table above, both widths, exhaustively for 3
  bits and sampled for 4 and 5 bits.

Running one testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/ecc_pkg.sv \
          tb/tb_ecc_spare_mem.sv --top-module tb_ecc_spare_mem
./obj_dir/Vtb_ecc_spare_mem
```

(`tb_ref_pkg.sv` must also be listed first for the testbenches that import it, e.g.
`rtl/ecc_pkg.sv tb/tb_ref_pkg.sv tb/tb_check_bit_gen.sv`.) The full top-level test builds in
about 20 s and runs in about a second.

## Where this implementation departs from, or goes beyond, the published scheme

- The repair multiplexers replace a column directly instead of shifting all columns past the
  defect. The extra-bit placement rule above is this design's own fixed assignment.
- The base code is odd-weight-column SEC-DED, but its columns are chosen by a simple rule rather
  than a row-balanced Hsiao construction. The extra rows come from a greedy random search,
  which is why the miscorrection figures differ slightly from the published ones.
- All three mask sources are built, selectable at configuration time. The flag column is
  always the last spare.
- In the flag mode, the mask for a flagged row is derived from the repair configuration rather
  than stored as a separate programmed pattern. It is the same pattern the scheme describes:
  only the unused, working spares remain.
- The CAM is a register-based binary CAM with a one-cycle search, not a custom CAM macro.
  Partitions are contiguous ranges with programmable ends, and the discard encoder is a fully
  programmable OR matrix.
- Only column spares are modelled. Spare rows, which repair would use first to leave more
  columns unused, are outside this design; a row they repair simply looks defect-free here.
- The flag column itself is not protected. A soft error there changes the row's mask (the
  testbench does not inject errors into it).
- The memory is a generic synchronous array. The DRAM timing argument, where a CAM search of at
  most two clocks hides under a read latency of nine or more clocks, corresponds here to the CAM
  search sharing the array's read cycle.
- Reliability figures (maximally tolerable bit-error rate), area and energy estimates are
  analytic and are not reproduced by simulation.
