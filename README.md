# Low-power LFSR-reseeding test decompressor

LFSR reseeding compresses scan test data well. Each test cube is stored as a
short seed, and an on-chip LFSR expands the seed into the full scan vector.
The price is power. Only 1–5 % of the bits of a test cube are specified, and
the LFSR fills all the others with pseudo-random values. So about half of
all neighbouring scan cells differ, and the chains toggle far more during
shifting than they ever do in functional operation.

This design is a decompressor that puts a second encoding stage behind the
LFSR. It cuts down those transitions, and it often reduces the number of
bits the seed has to produce as well. Each scan chain is cut into `B` equal
blocks, and each block gets a **hold flag**:

* **Hold flag 0** (transition block): the block is loaded from the LFSR as in
  ordinary reseeding.
* **Hold flag 1** (non-transition block): the chain input is frozen. The
  block is filled with copies of the last bit that went into the chain, so
  it makes no transitions at all. The LFSR does not have to produce any of
  its specified bits.
* A block with no specified bits may take either flag.

Most blocks of a real test cube hold only 0s or only 1s. Such a block can be
held whenever the block before it ends in the same value. The hold flags
themselves are also produced by the LFSR, from the same seed. Successive
test cubes can often share one set of hold flags, so a single **update
flag** per cube tells the hardware whether to load new hold flags or to
reuse the current ones.

## How one test cube is coded

For every test cube the LFSR produces, in this order:

| cycles | content | used by |
|---|---|---|
| 1 | update flag (LFSR output 0) | controller; stored in the update-flag flip-flop |
| `B`, only if the update flag is 1 | hold flags, one per chain per cycle, block 1 first | shifted into the per-chain hold-flag shift registers (HF-SRs) |
| `L` | scan data, one bit per chain per cycle | chain input, unless the current block is held |

Example with one chain of 16 cells in 4 blocks. The first bit shifted in is
on the left:

```
cube     0XX1  X111  1X1X  XXXX      7 specified bits
flags    0     1     1     X
LFSR     0XX1  ----  ----  XXXX      3 flags + 2 data bits = 5 specified bits
chain    0??1  1111  1111  ????      blocks 2 and 3 repeat the final 1 of block 1
```

**Conversion.** A block can be held only if the block before it ends in its
value. When that last bit is a don't care, the encoder specifies it:
`X01X X0X0 ...` becomes `X010` followed by a held block of 0s. This adds one
specified bit and saves the whole block. The same trick works across a
block with no specified bits. That block gets flag 0, and only its last bit
is specified.

**Sharing hold flags.** The hold flags of one cube form a *hold cube* of
0/1/X values. Two hold cubes are compatible if they never disagree on a
specified position. The offline tool groups compatible cubes into sets and
applies each set back to back. Only the first cube of a set has update flag 1
and carries the merged hold flags. Every other cube has update flag 0 and
needs only its data bits. The shift-register design below keeps the flags
intact from one cube to the next.

Computing seeds, grouping cubes and converting don't cares are all offline
steps. The hardware only expands seeds. The end-to-end testbench contains a
complete reference implementation of the offline steps (see *Verification*).

## Hardware

```
               seed (LEN bits, valid/ready)
                     |
               +-----v------+   out[0] = update flag
               | reseed_lfsr|---------------------------+
               | + phase    |  out[c]                   |
               |  shifter   |-------+------------+      v
               +------------+       |            |  +-----------+
                                    v            |  |reseed_ctrl|  FSM + bit counter
                              +----------+       |  |           |  + update-flag FF
                  hf_shift -->|  hf_sr c |       |  +-----------+
                  hf_rotate ->| (B bits) |       |   strobes to all blocks
                              +----+-----+       |
                        active flag|  (and scan_en)
                                   v             v
                                +------------------+
             chain c, cell 0 -->| hold_mux c       |--> scan_in of chain c
             (last bit in)      | hold ? cell0:lfsr|
                                +------------------+
```

The decompressor adds this logic to every chain: one 2-to-1 multiplexer, and
one `B`-bit HF-SR whose bit 0 is the hold flag of the current block. The
whole design adds one LFSR, one controller and the update-flag flip-flop.
The held value is taken from the chain's own first cell, so no extra
flip-flop per chain is needed. All the added logic sits in front of the
chains, which stay ordinary scan chains.

### Modules (`rtl/`)

| module | role |
|---|---|
| `lp_reseed_pkg` | default sizes, the controller state type, the LFSR polynomial table `lfsr_taps()` and phase-shifter taps `ps_tap()` |
| `reseed_lfsr` | `LEN`-stage Fibonacci LFSR with parallel seed load and a phase shifter. Output `c` is the XOR of 5 stages. |
| `hf_sr` | hold-flag shift register of one chain: shifts in during the flag phase, rotates once per block |
| `hold_mux` | chain-input multiplexer: LFSR bit, or the chain's first cell when held |
| `reseed_ctrl` | controller FSM: seed load → update → `B` flag cycles → `L` shift cycles → capture |
| `lp_decompressor` | the LFSR, the controller, and `N` HF-SRs and multiplexers |
| `scan_chain` | an ordinary `L`-cell scan chain with capture. It stands in for the chains of the circuit under test. |
| `lp_reseed_top` | decompressor plus `N` scan chains. The combinational logic of the circuit under test is outside: it sees `scan_vector` and returns `response`. |

### Timing of one test cube

The controller (`reseed_ctrl`) steps through these phases:

1. **`ST_SEED`**: `seed_ready` is high. In the cycle `seed_valid` is seen,
   the seed is written into the LFSR.
2. **`ST_UPDATE`**, 1 cycle: LFSR output 0 is the update flag. It is stored
   in the update-flag flip-flop and chooses the next phase.
3. **`ST_HOLD`**, `B` cycles, only when the update flag is 1: every HF-SR
   shifts in its LFSR output. Flags enter at the top, so after `B` shifts
   the flag of block 1 sits in bit 0.
4. **`ST_DATA`**, `L` cycles: `scan_en` is high and all chains shift.
   `hf_rotate` pulses in the last cycle of each `L/B`-cycle block, which
   makes the next block's flag active. After `B` rotations the flags are
   back in load order, ready for reuse.
5. **`ST_CAPTURE`**, 1 cycle: `capture` and `cube_done` are high,
   `scan_vector` holds the complete vector, and the chains load `response`.
   The response leaves through `scan_out` while the next vector shifts in.

The LFSR steps in phases 2–4. One cube therefore takes `1 + 1 + B + L + 1`
clock cycles when its hold flags are reloaded and `1 + 1 + L + 1` when they
are reused, plus any wait for a seed. All flip-flops use an asynchronous,
active-low reset (`rst_n`) and reset to 0.

Two rules hold at the interface. The seed must stay stable while
`seed_valid` is high and `seed_ready` is low; an assertion in
`lp_decompressor` checks this. The first block of a chain should never be
given hold flag 1: it would repeat whatever the previous capture left in
cell 0.

### Computing a seed

Every LFSR output bit in every cycle is a fixed XOR of seed bits. The LFSR
has a Fibonacci feedback polynomial; with the default `LEN = 256` it is
x^256 + x^254 + x^251 + x^246 + 1. Stage 0 takes the XOR of the tapped
stages, and the other stages shift up by one. Chain `c` receives the XOR of
stages `c`, `37c+11`, `71c+97`, `113c+53` and `149c+181` (all mod `LEN`).

Given a cube, its seed is the solution of one GF(2) equation per required
bit:

* the update flag: output 0 in cycle 0;
* each specified hold flag: output `c` in cycle `1 + j` for block `j` of
  chain `c`;
* each data bit of a loaded block: output `c` in cycle
  `1 + (update ? B : 0) + k` for shift cycle `k`. Shift cycle `k` ends in
  cell `L-1-k`.

Free seed bits can take any value.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 30 | scan chains, which is also the number of hold multiplexers and HF-SRs |
| `B` | 4 | blocks per chain, which is also the HF-SR length. 30 × 4 = 120 blocks in all. |
| `L` | 56 | cells per chain; must be a multiple of `B` |
| `LEN` | 256 | LFSR length, which is also the seed size |
| `TAPS` | `lfsr_taps(LEN)` | feedback polynomial. The table has entries for 16, 32, 64, 128 and 256; other lengths must pass their own. |

The defaults are sized for the largest configuration in the published
results, the ISCAS'89 circuit s38417 with 120 blocks: 30 chains with a 4-bit
HF-SR each. 1664 scan cells (28 inputs plus 1636 flip-flops) fit in 30
chains of 56 cells. `L` was rounded up to a multiple of 4.

The published scheme leaves the LFSR length open. It only asks for the usual
reseeding rule of at least the largest number of specified bits per cube
plus about 20. 256 stages give room for the average of 76–109 specified
bits per cube reported for the two largest circuits, hold flags included.
The largest count for a single cube is not known, so a real test set may
need a longer LFSR.

More blocks cut more transitions but cost more HF-SR bits and more specified
hold flags. The published results show that trade-off: about 37 % fewer
transitions with 5–10 blocks and about 50 % with many blocks.

## Design choices beyond the published scheme

The published scheme describes the structure and the order of the LFSR
data. The following choices are this design's own:

* **Seed delivery.** One full seed per test cube arrives over a parallel
  valid/ready port. A serial seed shift or partial (dynamic) reseeding are
  not implemented.
* **Phase shifter.** A 5-tap XOR phase shifter feeds the chains from one
  LFSR. With only 3 taps, some test cubes produced linearly dependent seed
  equations.
* **Skipped flag phase.** When the update flag is 0, the `B` hold-flag
  cycles are skipped and data follows at once.
* **Circular HF-SR.** The shift register rotates instead of shifting, so
  the hold flags survive for reuse.
* **Held value from cell 0.** The held value is read back from the chain's
  first cell.
* **Capture.** There is one explicit capture cycle. Responses shift out
  uncompacted on `scan_out`.
* **Update-flag tap.** LFSR output 0 carries the update flag.
* **Block counter.** Besides the bit counter, the controller has a small
  counter of `L/B` cycles that marks the end of each block.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…` and has a watchdog.

* `tb_reseed_lfsr`: the LFSR against an independent bit-array model, with
  random seeds and random stepping.
* `tb_hf_sr`, `tb_hold_mux`, `tb_scan_chain`: flag order and reuse,
  multiplexer truth table, shift and capture.
* `tb_reseed_ctrl`: phase lengths, strobes, the rotate position and the
  cycle count per cube, for random update flags and seed gaps.
* `tb_lp_decompressor`: a cycle model of the whole scheme (4 chains, 2
  blocks, 32-bit LFSR) compared every cycle.
* `tb_lp_reseed_top`: end to end at the default size, 60 cubes.
* `tb_workload_s38417`: end to end at the default size, 376 cubes, the size
  of the s38417 test set.
* `tb_lp_reseed_examples`: the two worked examples (the 16-cell chain above
  and a conversion example), with the encoder's flags checked by hand.

The end-to-end testbenches share `tb/lp_reseed_tb_body.svh`. It acts as the
offline tool and the tester:

1. It generates test cubes. The real ATPG cubes are not available, so the
   cubes are synthetic: about 5 % of the bits are specified, with a block
   structure shared across cubes.
2. It encodes each cube with hold flags and conversion, then groups the
   cubes into compatible sets.
3. It solves every seed by Gaussian elimination over GF(2).
4. It applies the seeds with random gaps.
5. At every capture it checks each specified bit in the scan vector, the
   constancy of every held block, the cycle count and the response on
   `scan_out`.

It also solves conventional seeds for the same cubes and counts scan
transitions (neighbouring cells that differ) for both schemes. Every
mechanism has to occur at least once: hold-flag load and reuse, held and
loaded blocks, conversion, waiting for a seed, and capture.

Typical result for 376 synthetic cubes at the default size:

* 190 compatible sets;
* 42 % fewer transitions than conventional reseeding;
* about 30 % more specified bits (flags included) than the cubes themselves.

The published results with real test sets show 25–54 % fewer transitions,
with the specified-bit count roughly unchanged. The difference in specified
bits comes from the synthetic cubes, whose hold cubes are less compatible
than those of real test sets. The hardware does not cause it.

### Running a testbench

The package must be read first. The end-to-end testbenches need `-Itb` for
the shared body:

```
verilator --binary --timing --assert -Itb \
  rtl/lp_reseed_pkg.sv rtl/reseed_lfsr.sv rtl/hf_sr.sv rtl/hold_mux.sv \
  rtl/reseed_ctrl.sv rtl/lp_decompressor.sv rtl/scan_chain.sv rtl/lp_reseed_top.sv \
  tb/tb_lp_reseed_top.sv --top-module tb_lp_reseed_top -Mdir obj
./obj/Vtb_lp_reseed_top
```

The full-size end-to-end runs build and simulate in well under a minute.

## Limits

* The combinational logic of the circuit under test, and whatever stores
  the seeds (tester or on-chip memory), are not part of this RTL.
* The published scheme is also evaluated with partial LFSR reseeding after
  a pseudo-random phase. That reseeding variant is not implemented; this
  decompressor loads one complete seed per test cube.
* The ISCAS'89 test sets were not available. The numbers above come from
  synthetic cubes and are not a reproduction of the published tables.
