# Low-energy writes for multi-level and triple-level cell memories

Multi-level (MLC, 2 bits per cell) and triple-level (TLC, 3 bits per cell)
phase-change and resistive memories store more per cell than single-level
ones, but writing them is expensive: a cell is programmed by a sequence of
pulses and verify reads, and how much that costs depends strongly on the
state being written. In the MLC PCM cell used here, states `00, 01, 10, 11`
cost 36, 307, 547 and 20 pJ; in the TLC RRAM cell, states `0..7` cost 2, 6.7,
19.3, 35.1, 35.6, 19.6, 8.5 and 1.5 pJ. A memory that already skips cells
whose value does not change (data-comparison write) can save much more by
choosing *what* to store, and a program-and-verify loop that needs fewer
pulses saves both time and energy.

This RTL implements three such techniques, side by side under one top
module, `nvm_lowenergy_top`:

1. **Multi-level flip-n-write (MFNW, and TFNW for TLC)** — every word is
   stored in whichever of a few reversible encodings costs least to write
   over the word that is already in memory; one tag cell says which.
2. **Frequent-value encoding with k dictionaries (FVE)** — values that
   programs write often are mapped to cheap codewords. Applications are
   grouped into k clusters offline, each cluster has its own dictionary, and
   every word is written with whichever dictionary is cheapest for it.
3. **L3EP program-and-verify** — a controller for one TLC PCM cell that
   reaches an intermediate resistance state with few pulses: a predicted
   first amorphization amplitude, amplitude updates proportional to the
   error, and packs of crystallization pulses without verify in between.

The three parts share only the clock and the active-low asynchronous reset.
All sizes default to the reference configuration (512-bit memory lines,
2-bit cells for MFNW and FVE, 3-bit cells for TFNW and L3EP).

## Timing convention

All latencies below count clock cycles from the cycle in which a request is
presented (valid high, sampled at the rising edge that ends that cycle). "In
cycle n+3" means the result is visible during the third cycle after that.
L3EP uses a 1 ns clock, so its cycle counts are nanoseconds.

## Cell energy tables (`nvm_pkg`)

`nvm_pkg::state_energy(tech, state)` returns the write energy of one cell:

| `tech_e`             | states                        | unit    | used by |
|----------------------|-------------------------------|---------|---------|
| `TECH_MLC_PCM`       | 36, 307, 547, 20              | pJ      | FVE selector, array accounting |
| `TECH_MLC_PCM_SHIFT` | 4, 32, 64, 2                  | ~10 pJ  | MFNW selector |
| `TECH_TLC_RRAM`      | 20, 67, 193, 351, 356, 196, 85, 15 | 0.1 pJ | TFNW selector |

The shift table is the MLC table divided by ten, rounded, and rounded again
to a power of two, so that each weight times a count is a shift. It ranks the
states in the same order as the exact table, which is all the minimum search
needs in most cases; the array model still charges exact pJ.

The package also holds the TLC PCM resistance targets used by L3EP (see
below) and the pulse-kind enumeration `pulse_e`.

## MFNW: flip-n-write for multi-level cells

### The inversion operator

For an n-cell word `a` with m-bit cells there are `2**m` *inversions*. The
i-th inversion XORs every cell with the m-bit value `i` and records `i` in an
extra tag cell:

    inv_i(a) = { i, {n{i}} ^ a }        i = 0 .. 2**m - 1

XORing the data cells with the tag cell, replicated n times, gives `a` back,
so reading costs one XOR layer. Inversion 0 is the word itself with tag 0,
so the encoder can never do worse than writing the word plainly (counting
the tag cell). For MLC there are 4 inversions, for TLC (TFNW) 8.
`mfnw_inv_gen` builds them; it is pure wiring and XOR.

### Choosing the cheapest candidate (`min_energy_sel`)

This is the block the rest of the encoders are built around. Only cells that
differ from the stored word are programmed, so the cost of candidate `i` is

    cost(i) = sum over states j of  C(i, j) * e(j)

where `C(i, j)` counts the cells (tag cells included) that candidate `i`
would change *to* state `j`, and `e(j)` is the state energy. The selector is
a three-stage pipeline:

1. compare every candidate cell with the stored cell and count, per
   candidate and per state, the cells that change (`2**m` counters per
   candidate);
2. weight the counters and add them up (with the shift table the products
   are shifts);
3. find the minimum and register the winner, its index, its cost and its
   number of programmed cells.

A word enters every cycle and its result appears in cycle n+3. On equal
costs the lowest candidate index wins, so ties keep the unencoded form.
The selector is generic in the number of candidates, word length, cell width
and energy table; MFNW, MFNW2/3, TFNW and FVE all use it.

### Word encoder and decoder (`mfnw_encoder`, `mfnw_decoder`)

The encoder feeds the inversions of the new word and the stored word (with
its tags) to the selector. Stored words are laid out `{[xtag,] itag, data}`
with cell 0 in the least significant bits.

Two wider variants search more candidates, using reversible transformations
of the word (`mfnw_transform`) before inverting:

* `R` rotates the 16-bit word right by one bit;
* `S1` swaps MLC states `10` and `11` in every cell;
* `S2` swaps MLC states `01` and `11` in every cell.

`NUM_XFORM = 1` (MFNW2) adds one transformation (`XFORM2_SEL`, default `R`)
and a second tag cell `xtag` that holds `00` (not transformed) or `11`
(transformed) — the two cheapest MLC states. `NUM_XFORM = 3` (MFNW3) uses all
three, 16 candidates, and `xtag` holds the transformation number (`00` none,
`01` R, `10` S1, `11` S2). The decoder XORs with `itag` and then undoes the
transformation named by `xtag`; it is registered, one cycle.

TFNW is the same encoder with 3-bit cells and the TLC RRAM table;
`tfnw_codec` wraps an encoder and a decoder for an 8-cell TLC word.

Worked TLC example (also in `tb_tfnw_codec`): stored word tag 0, cells 2, 3
(octal `023`); new data `13`. The eight inversions `013, 102, 231, 320, 457,
546, 675, 764` cost 6.7, 28, 61.1, 37.1, 56.7, 63.7, 29.6 and 45.6 pJ, so
inversion 0 is written.

### Line controller, write buffer and array

`write_buffer` is an 8-entry FIFO of (address, 512-bit line) pairs with
valid/ready on both sides. `mfnw_line_ctrl` takes one request at a time, a
waiting read before a waiting write:

* **write** — the line is cut into 32 words of 8 MLC cells (16 bits). The
  old line, tags included, is read from the array in the acceptance cycle n;
  in cycle n+1 all 32 slice encoders start in parallel (one encoder per
  slice, as in a physical layout); in cycle n+4 the encoded line (32 x 9
  cells = 576 bits) is written back. `last_energy` reports the summed
  selector cost of that line. The controller is ready again in cycle n+5.
* **read** — the stored line is read in cycle n, decoded by 32 slice
  decoders, and returned in cycle n+2.

Slicing at 8 cells gives one tag cell per 8 data cells (12.5 % extra cells)
and divides the 512-bit line evenly.

`nvm_array` stands in for the memory: 64 lines (a size chosen for
simulation), one-cycle synchronous read, full-line write that changes only
the differing cells, and counters of programmed cells per state and of the
energy in pJ (`stat_clr` clears them). It does not model the analog
programming circuitry.

## FVE: frequent values and k dictionaries

### Dictionaries

A word is cut into *slices* of `FVL` bits — 8 bits (4 MLC cells) here. A
dictionary is a permutation `M(v)` of the `2**FVL` slice values. For a
cluster of applications with value frequencies known offline, the
dictionary sends the j-th most frequent value to the j-th cheapest codeword,
where the cost of a codeword is the sum of the state energies of its cells.
k = 8 clusters give 8 dictionaries.

The clustering and the frequency profiles come from offline analysis of
program traces and are not part of the hardware. The RTL therefore keeps the
dictionaries in writable tables loaded through a port (`ld_valid, ld_dict =
i, ld_value = v, ld_code = M_i(v)`), one entry per cycle; a product with
fixed dictionaries would use read-only memory instead. Each dictionary must
be a permutation and must be loaded before use. The testbenches build
synthetic ones with the same rule (see `build_dicts` in `tb_fve_encoder`):
codewords sorted by energy (stable), and cluster i's frequency order
`f_i(j) = (j * (2i + 37) + 29i) mod 256`.

### Encoder and decoder (`fve_encoder`, `fve_decoder`)

A stored word is `{tag, slice[15], ..., slice[0]}`: 16 slices of 8 bits and 2
tag cells (4 bits) holding the dictionary number (3.1 % extra cells). The
encoder looks every slice up in all k dictionaries at once, prefixes each
encoded version with its tag, and lets `min_energy_sel` (exact pJ table) pick
the version cheapest to write over the stored word — again counting only
cells that change, tags included. Latency 3 cycles, one word per cycle.

The decoder reads the tag and looks every slice up in the inverse table,
addressed by `{tag, encoded slice}`, in one registered cycle. Encoder and
decoder load from the same port, so they stay consistent.

### Shared line codec (`fve_line_codec`)

A 512-bit line holds 4 such words. One encoder and one decoder serve the
whole line: the words of an accepted line enter the pipeline one per cycle
(cycles n+1 .. n+4), the encoded line and the summed cost come out in cycle
n+WPL+4 = n+8, and a decoded line in cycle n+WPL+2 = n+6. The read latency
therefore grows with the number of words; replicating the decoder per word
would cut it to one word's latency at the cost of area.

### Other line organisations

The tag cells and words keep the same proportion for other k. With fewer
clusters (k = 2 or 4) one MLC tag cell serves a 64-bit word (8 slices), 8
words per line; with k = 16, two tag cells per 128-bit word as for k = 8.
TLC lines use 9-bit slices of three TLC cells, 19 slices (57 cells) per
word and three words per 513-bit line, with one TLC tag cell (k <= 8) or two
(k = 16). All of these are parameter settings of `fve_line_codec`
(`CELL_BITS, FVL, SLICES, K, TAG_CELLS, WPL, TECH`); the top instantiates
the MLC k = 8 organisation.

## L3EP: program-and-verify for TLC PCM

### Target states

TLC state 0 is fully amorphous (highest resistance), 7 fully crystalline.
With R7 = 15 kOhm (upper bound of state 7) and R0 = 4670 kOhm (lower bound of
state 0), intermediate state i (1..6) has lower bound
`R_i = R7 + (6 - i)(R0 - R7)/6` and upper bound `R_{i-1}`; its target is the
midpoint `R_M = (R_i + R_{i-1})/2` (403 kOhm for state 6, 3506 kOhm for
state 2). `eps` (default 370 kOhm) is the write margin around `R_M`.

### The loop (`l3ep_controller`)

For an intermediate target:

1. Sense the cell (request to the resistance estimator) and form the error
   `E = R - R_M`.
2. `|E| <= eps`: done, `converged = 1`.
3. `E < -eps` or `E > alpha * eps`: one partial **amorphization** pulse
   (8 cycles), then wait 30 cycles for the melted cell to solidify and go to 1.
   * The first amorphization of a write uses the amplitude predicted from
     `R_M` by `l3ep_regression`.
   * Later ones update the amplitude: `V <- V + M * dV`, with
     `dV = -E / 64` mV (E in kOhm) and `M = 10` if the resistance moved less
     than 40 kOhm since the previous verify, otherwise `M = 1`. Amplitudes
     are clamped to 550 .. 900 mV.
   * After an amorphization pulse `alpha` is raised to its maximum, so from
     then on only `E < -eps` triggers amorphization; closely spaced
     amorphization pulses would overheat the cell.
4. Otherwise (`eps < E <= alpha * eps`, alpha starts at 2.2): a **pack** of
   `C0` crystallization pulses, `C0 = 1` for `|E| <= 1.25 eps`, `2` up to
   `1.75 eps`, else `3`. Pulses are 8 cycles with 2 idle cycles between them
   and no verify inside the pack; the first has amplitude
   `450 + |E|/16` mV and each next one 4 mV more. After the last pulse the
   controller waits `T_SS` = 30 cycles for the steady-state resistance and
   goes to 1.

Targets 0 and 7 are written like a single-level cell: one full RESET pulse
(15 cycles) or one full SET pulse (35 cycles), no verify; `done` follows with
`op_cycles` = 15 or 35. A write that issues `MAX_PULSES` = 32 pulses stops
with `converged = 0`.

The decision structure, the predicted first amplitude, the multipliers 1
and 10, the packing with short idles, the 8-cycle pulses, the 2-cycle
idles, the 30-cycle wait after amorphization and the terminal latencies are
the method's. The constants that set *how much* (the gains 1/64 and 1/16,
450 mV, 4 mV, 40 kOhm, the `C0` thresholds, the amplitude limits, `T_SS`,
the pulse budget and raising alpha to its maximum) are choices of this
design, tuned against the behavioural cell in the testbench. For a real cell
they, and the regression coefficients, must be fitted.

### Amplitude predictor (`l3ep_regression`)

`V = sum_i beta_i * R_M^i` with `R_M` in MOhm, evaluated by Horner's rule in
fixed point (12 fractional bits), one multiply-add per cycle. `DEGREE = 3`
(cubic, default) or `1` (linear). The result is released in cycle n+9
(cubic) or n+4 (linear) after `start`, the evaluation times of the
floating-point unit the method was costed with; this design uses integer
arithmetic instead. Default coefficients: cubic `620 + 40x - 16x^2 + 3x^3`
mV, linear `600 + 34x` mV — a curve rising from about 0.6 V at 0 MOhm to about
0.8 V at 5 MOhm, monotonic; they are placeholders for a fitted model.

### Interfaces to the analog side

The resistance estimator (ADC, sample-and-hold, multiplexer) and the write
driver (DAC, sample-and-hold, voltage follower) are analog and outside this
RTL. The controller talks to them through:

* `sense_req` (1 cycle) -> `sense_valid` with `sense_kohm` any number of
  cycles later;
* `pulse_valid` (1 cycle) with `pulse_kind` (`PULSE_AMORPH`, `PULSE_CRYST`,
  `PULSE_FULL_RESET`, `PULSE_FULL_SET`), `pulse_mv` and `pulse_width`; the
  pulse occupies the following `pulse_width` cycles.

The controller never senses while a pulse is being issued (assertion
`a_pulse_idle`).

## Top level (`nvm_lowenergy_top`)

Port groups, each belonging to one part:

| prefix | part | main ports |
|--------|------|-----------|
| `m_` | MFNW memory subsystem | `m_wr_*` (valid/ready, address, 512-bit line) into the write buffer; `m_rd_*` requests and `m_rd_resp_*` responses; `m_wb_level`; statistics `m_energy_pj`, `m_cell_writes`, `m_state_writes[4]`, `m_last_line_cost`, `m_stat_clr` |
| `t_` | TFNW codec | `t_enc_*` (new 24-bit word, stored 27-bit word -> encoded word, cost in 0.1 pJ), `t_dec_*` |
| `f_` | FVE line codec | `f_ld_*` dictionary load, `f_enc_*` (new line, old line -> encoded 528-bit line, cost in pJ), `f_dec_*` |
| `l_` | L3EP controller | `l_start`, `l_target`, status, sense and pulse interfaces |

Parameters: `LINE_BITS`, `MFNW_CELLS`, `MFNW_XFORM` (0, 1, 3), `NVM_LINES`,
`WB_DEPTH`, `TFNW_CELLS`, `FVE_K`, `FVE_SLICES`, `FVE_TAGS`, `FVE_WPL`,
`L3EP_DEGREE`, `L3EP_EPS_KOHM`.

## Where this design departs from the method, or fills gaps

* Equal-cost candidates: lowest index wins (not specified by the method).
* MFNW2 uses rotation `R`; the choice among R, S1 and S2 changes the saving
  by very little. The MFNW3 tag encoding is this design's.
* TFNW word length: 8 cells, like the MLC word (not fixed by the method).
* FVE dictionaries are loadable tables, one copy shared by all slices,
  instead of fixed per-slice read-only memories; behaviour is the same.
* FVE tag cells: 2 for k = 8, i.e. the tag is wider than `log2 k` bits;
  the top tag bit is always 0.
* L3EP arithmetic is fixed point (kOhm, mV) instead of floating point; the
  tuning constants listed above are this design's.
* State midpoints use the bounds of the state itself, `(R_i + R_{i-1})/2`,
  which reproduces the reference targets 403 kOhm (state 6) and 3.5 MOhm
  (state 2).
* The array and write-buffer depths are simulation choices.
* The mapping of one L3EP controller to one cell: how many cells of a line
  are programmed in parallel is not specified, so one controller is provided.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`; each compares the RTL with an independent
model written in the testbench and checks the cycle counts above.

| testbench | what it shows |
|-----------|---------------|
| `tb_min_energy_sel` | costs, winner, tie rule, latency 3 on 20k random inputs |
| `tb_mfnw_inv_gen`, `tb_mfnw_transform` | inversions and transformations cell by cell, reversibility |
| `tb_mfnw_encoder` | MFNW, MFNW2, MFNW3 against a reference encoder; never worse than plain |
| `tb_mfnw_decoder` | decoding of all three variants, latency 1 |
| `tb_write_buffer` | order, level, full/empty, stalls |
| `tb_nvm_array` | write-only-changed-cells accounting, read-during-write |
| `tb_mfnw_line_ctrl` | line encoding, read priority, write n+4 / read n+2 |
| `tb_tfnw_codec` | the worked TLC example and random words |
| `tb_fve_encoder`, `tb_fve_decoder`, `tb_fve_line_codec` | dictionary choice, costs, round trip, line latencies |
| `tb_l3ep_regression` | predictor values (within 1 mV), 4/9-cycle latency, monotonicity |
| `tb_l3ep_controller` | every decision and amplitude against a model, with a behavioural cell; packing timing; 15/35-cycle terminal writes; reports mean latency per state |
| `tb_fve_configs` | the other FVE line organisations on a synthetic workload: MLC k = 2 and 4 (64-bit words, 1 tag cell, 8 words per line), MLC k = 16, TLC k = 8 and 16 (19 slices of 3 TLC cells, 3 words per line); same checks as the line codec, plus energy below unencoded writes |
| `tb_l3ep_variants` | L3EP with the cubic predictor, the linear predictor, and eps = 150 kOhm, side by side on random writes (helper `l3ep_variant_run`) |
| `tb_fnw_endurance` | cost-aware wear of one word rewritten with random data: MFNW, MFNW2, MFNW3 and TFNW for 2, 4 and 8 cells per word against unencoded writes (helper `fnw_wear_run`) |
| `tb_nvm_lowenergy_top` | all four parts through the top ports at default sizes; counts each mechanism and fails if one never occurs; compares MFNW energy with plain writes |

On their synthetic workloads the FVE configurations write 34-38 % (MLC)
and 44-47 % (TLC) of the energy of unencoded data-comparison writes, and
the L3EP variants need on average 81 ns (cubic predictor), 96 ns (linear)
and 129 ns (eps = 150 kOhm) per intermediate-state write, every write
converging. In the wear test a cell ages, per write, by the energy of the state
written over that of the cheapest state; relative to unencoded writes the
wear per cell (tag cells included) is 36/50/62 % for MFNW at 2/4/8 cells
per word, 21-23/33/48-49 % for MFNW2 and MFNW3, and 39/51/63 % for TFNW:
short words gain most, at the price of more tag cells. These numbers depend on the synthetic dictionaries and on the
simple cell model; they show the mechanisms working, not the savings on
real programs or devices.

The cell model inside the L3EP testbenches is deliberately simple: an
amorphization pulse sets the resistance through the inverse of the
predictor curve plus a per-write offset of up to +-600 kOhm and noise; a
crystallization pulse at V mV lowers it by about `2 (V - 400)` kOhm. It
exercises the control flow, not device physics.

To run a testbench with Verilator 5:

    verilator --binary --timing -Wno-fatal --top-module tb_mfnw_encoder \
        rtl/nvm_pkg.sv $(ls rtl/*.sv | grep -v nvm_pkg) tb/tb_mfnw_encoder.sv
    ./obj_dir/Vtb_mfnw_encoder

(`nvm_pkg.sv` must come first.) `tb_fve_configs`, `tb_l3ep_variants` and
`tb_fnw_endurance` also need their helpers, `tb/fve_cfg_check.sv`,
`tb/l3ep_variant_run.sv` and `tb/fnw_wear_run.sv`. The top-level testbench takes a few seconds.

## Size

Yosys (slang front end, generic synthesis, assertions ignored) maps the top
at its default parameters to about 22,600 cells with 16,200 flip-flop bits
and 74,000 memory bits: the 64-line array (36,864 bits), the write buffer
and the FVE encode and decode tables (16,384 bits each). The 32 MFNW slice
encoders, each with its own selector, make up most of the logic.
