# DRAF: reconfigurable logic built from DRAM subarrays

An FPGA spends most of its area and leakage on SRAM look-up tables and
routing configuration. DRAF replaces each LUT with a small **DRAM subarray**.
A row address formed from the LUT inputs activates one row. The sense-amps
latch that row, and column logic picks the output bits. DRAM cells are much
denser than SRAM, so the same subarray can hold **several configurations
(contexts)**. Each context lives in its own MAT (a slice of the subarray
columns), and all MATs share one row decoder. Switching between contexts
means changing a counter, and the new context is live from the next user
cycle.

DRAM is slow and its reads are destructive. A LUT must be precharged before
it is read, and its row must be restored afterwards. DRAF hides these costs
with a **phased user cycle**. Each LUT activates in the phase assigned to it.
Its restore, the precharge of the LUT it feeds, and the routing between the
two all overlap in one window. The cells also leak, so a **refresh** walks
all rows every 64 ms while the mapped design is paused.

This repository is synthesizable SystemVerilog for a small DRAF array: CLBs
of DRAM-LUT BLEs, a DSP block, a BRAM block, multi-context routing, and the
global context, timing and refresh logic. It comes with self-checking
testbenches for every block and for the whole array.

## The DRAM LUT

`dram_mat` is one MAT: a `2^ROW_BITS x SA_W` cell array with one row of
sense-amps. It accepts four commands (`draf_pkg::dram_cmd_e`):

| command | effect on the MAT |
|---|---|
| `PRE` | sense-amps cleared, which stands for bitlines returned to the reference level |
| `ACT` | on its first cycle the sense-amps latch `cells[row]`; the row is then *destroyed* |
| `RST` | after `T_RST` cycles the row is written back and the data counts as safe again |
| `NOP` | hold |

A command only reaches a MAT whose `ctx_en` is high. This is the AND of the
master wordline with the context enable, placed in each local wordline
driver. The model keeps destructive reads visible. A `PRE` that arrives
while the row is still destroyed clears that row in the model, sets the
sticky `restore_err` flag and fires an assertion (`$warning`). A timing
mistake in the sequencing therefore shows up in simulation as a corrupted
LUT and a flag, not as silently correct data.

`lut_subarray` holds `N_CTX` MATs on one shared row number, which stands for
the shared row decoder. On the first `ACT` cycle it latches the row address
and each output's column address. The default LUT has 7 inputs: 6 row bits
plus one column bit per output. The column address is kept for the rest of
the user cycle, so a bypassed output stays stable after the LUT inputs
change.

`col_logic` gives each output `o` its own column address. That address
selects from the sense-amp group `[o*2^COL_BITS +: 2^COL_BITS]`. In
*fractured* mode every sense-amp is an output of its own. The default
7-input, 2-output LUT then becomes four 6-input LUTs that share the row
inputs.

Default size: 8 contexts × 64 rows × 4 sense-amps = 2048 bits per LUT. With
`ROW_BITS=6, COL_BITS=2, N_OUT=4` the same RTL builds the 14-input,
4-output subarray drawn in the DRAF structure diagram.

## Phases and the user cycle

This is the part that most needs care when a design is mapped onto the
array.

The internal clock drives the DRAM peripheral logic. A **user cycle** is a
whole number of internal cycles and is split into phases. The number of
phases equals the number of LUTs on the critical path, and it is stored per
context. A phase lasts `PL = DELTA + T_ACT` internal cycles, where `DELTA`
must cover `max(tPRE, tRST, troute)`.

For a LUT configured for phase `p` (`lut_sequencer`), with `cip` the cycle
inside the current phase:

```
phase p     cip in [DELTA-T_PRE, DELTA)   PRE   (deferred to just before ACT)
phase p     cip in [DELTA, PL)            ACT   (inputs sampled at cip == DELTA)
phase p+1   cip in [0, T_RST)             RST   (output already valid, routing runs)
```

The user cycle is `nph·PL` cycles followed by a tail of `T_RST` cycles, in
which the LUTs of the last phase finish restoring. `user_clock_gen` produces
`cur_phase`, `cip`, `run` and `ucyc_end`, the last internal cycle of the
user cycle. With the defaults (`T_PRE=T_ACT=T_RST=2`, `DELTA=3`) a
two-phase context has a 12-cycle user cycle.

Mapping rules this implies:

* a LUT's phase must be greater than the phase of every LUT that feeds it,
  unless the input comes from a flip-flop;
* a LUT fed only by flip-flops or device inputs may use phase 0;
* the host changes `dev_in` right after `ucyc_end` and samples `dev_out` at
  `ucyc_end`.

## BLE and CLB

`ble` wraps one `lut_subarray` with the following:

* one `col_logic` per MAT;
* **one set of output flip-flops per context**, because storage cannot be
  shared between contexts;
* a per-output **bypass** that drives the output straight from the
  sense-amps. The sense-amp row then acts as a register that holds until
  the next precharge;
* the **context output multiplexer**, placed after the flip-flops.

Only the current context's flip-flops load, on `ucyc_end`. Those of other
contexts keep their state through switches and refreshes. The per-context
configuration word is `{frac, bypass[SA_W-1:0], phase[PH_BITS-1:0]}`.

`clb` groups `N_BLE` BLEs (default 4) with a local crossbar. Each BLE input
pin has a multi-context mux over the CLB inputs and all BLE outputs. The CLB
also holds the shared refresh row counter.

## Contexts

`context_counter` holds the live context. A switch request (`sw_valid`,
`sw_ctx`) is held until the current user cycle ends, then applied. It
decodes `ctx_en`, which is one-hot in normal operation. During refresh
`ctx_en` becomes the *used-context mask*, so unused contexts are never
refreshed. The number of phases per user cycle (`user_clock_gen`) and every
routing select are also stored per context.

## Refresh

`refresh_ctrl` counts `REF_INTERVAL` internal cycles. The default is 64 ms
at an assumed 1 GHz internal clock. It then raises `busy` and asks the
timing generator to stop at the next user-cycle boundary. While paused it
drives `PRE`, `ACT` and `RST` for each of `REF_ROWS = 256` rows, and every
used context of every subarray acts at once. Each row step advances the
CLBs' row counters. Afterwards the user cycles resume where they stopped,
and no flip-flop has changed. Outputs that use the sense-amps as registers
(bypass) are overwritten by the refresh activations. Before a refresh, the
host must copy such values into flip-flops and restore them afterwards.
The BRAM block is not refreshed here, because its cells are modelled as
plain storage. At the defaults a refresh takes 256 × 6 =
1536 cycles. With 64-row MATs the walk visits every row four times, which
keeps the refresh length independent of the LUT size.

## DSP and BRAM

`dsp_block` is a signed 25 × 18 multiplier. It samples its operands at its
configured phase, exactly like a LUT activation, and holds the product until
its next evaluation.

`bram_block` is a 36 Kbit memory (1024 × 36) whose port width is chosen per
context: 1, 2, 4, 9, 18 or 36 bits. At its phase it reads the addressed
entry into `dout` (read-first) and writes `din` when `we` is set. It is
shared by all contexts. A per-context *partition* bit replaces the top 3
bits of the word index with the context number, which splits the block
between up to 8 accelerators.

## Routing

`routing_fabric` is one channel of `N_TRACK` (default 32) tracks:

* each track has a switch mux over every source;
* each sink has a connection-box mux over every track;
* every mux is a `ctx_route_mux` that stores one select word per context
  and uses the current context's word.

A select value past the last source reads as constant 0, which gives a
tie-off. The routing is combinational. Its delay is what `DELTA` has to
cover.

## Configuration bus

All configuration uses one write bus, `cfg_wr_t {we, kind, unit, idx, ctx,
data}`:

| kind | unit | idx | data |
|---|---|---|---|
| `CFG_LUT_ROW` | BLE number (`clb*N_BLE+k`) | row | `SA_W` cell bits |
| `CFG_BLE` | BLE number | – | `{frac, bypass, phase}` |
| `CFG_LOCAL` | CLB number | `k*LUT_IN + pin` | local source: CLB inputs, then BLE outputs |
| `CFG_ROUTE` | – | track `t`, or `N_TRACK + sink` | source number, or track number |
| `CFG_DSP` | 0 | – | phase |
| `CFG_BRAM` | 0 | – | `{part, width code, phase}` |
| `CFG_GLOBAL` | – | 0: phases per user cycle; 1: used-context mask | value |

The source and sink numbering of the array is listed in the header of
`rtl/draf_top.sv`. Always write a context while another context is live.
Rewriting the live context changes LUT phases in the middle of a user cycle
and can destroy rows, which `restore_err` then reports.

## Where this departs from the DRAF description

* **Array size and layout.** DRAF is specified by device capacity, not by
  grid size. Here the array is 4 CLBs × 4 BLEs, 1 DSP, 1 BRAM and 8 device
  pins, and one routing channel stands in for the two-dimensional island
  layout with its segmented tracks. None of the benchmark accelerators used
  to evaluate DRAF fits in one context of this default array. They need
  hundreds to thousands of LUTs, and there is no mapping flow here.
* **Cycle counts.** The ordering and overlap of PRE, ACT and RST follow
  DRAF. The command lengths (2/2/2), `DELTA = 3`, the restore tail at the
  end of the user cycle and the 1 GHz internal clock are this design's
  choices.
* **Cells and sense-amps** are modelled digitally. Charge, leakage and
  retention time are not modelled.
* **Fractured mode** encoding, the BLE configuration word, the flip-flops
  having no user enable, and the configuration bus itself are this design's
  own.
* **BRAM**: single read-first port, one access per user cycle. Its internal
  DRAM row timing is not modelled.
* **DSP**: only the multiplier.
* **Not built:** the host link and driver, the CAD flow, power gating of
  unused contexts and the I/O pads. Inter-context chaining is not built
  either, as in DRAF itself.

## Simulating

Each block has a self-checking testbench `tb/tb_<block>.sv` that prints
`TB_RESULT checks=N failures=M`. Build one with verilator, package first:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/draf_pkg.sv $(ls rtl/*.sv | grep -v draf_pkg) \
    tb/tb_ble.sv --top-module tb_ble -Mdir obj_ble -o sim
./obj_ble/sim
```

The array tests share `tb/draf_top_tb_core.sv`. Add it to the file list and
pick the top module:

* `tb_draf_top` shortens the refresh interval to 3000 cycles and runs 400
  user cycles in two contexts:
  * context 0 is a LUT chain with a bypassed phase-0 LUT, a registered
    phase-1 LUT and a fractured LUT;
  * context 1 is a multiplier feeding a partitioned 9-bit BRAM;
  * the host switches context every 25 user cycles.

  It counts context switches, refresh pauses, chained, registered, bypassed
  and fractured evaluations, DSP products, BRAM writes and partitioned
  reads. It fails if any of them never happens.
* `tb_draf_top_full` runs the same traffic on the array with every parameter
  at its default. Refresh does not occur there, because the first one is due
  after 64 million cycles.

`tb/tb_draf_accum.sv` is a small kernel mapped by hand. It is an 8-bit
running sum (`acc += x`, the core of a dot product or stencil), built as a
four-LUT ripple-carry chain in one CLB:

* each fractured BLE is a 2-bit adder slice in its own phase;
* the sum bits are registered, and the carry is bypassed into the next
  phase;
* values are streamed from `dev_in` through 300 user cycles and several
  refresh pauses.

It also checks that the user cycle lasts `4·(DELTA+T_ACT)+T_RST = 22`
internal cycles. The configuration writes in this file are a worked example
of how to program the array.

Building the array takes about 1.5 minutes, and each run takes seconds.
