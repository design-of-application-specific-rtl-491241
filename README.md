# Application-specific processors for the FFT and the Hartley transform

OFDM modems spend most of their arithmetic in an FFT (or its real-valued relative, the fast
Hartley transform). A fixed-function FFT block is efficient but rigid; a general-purpose DSP
is flexible but wastes energy moving data between memory and the datapath. The processors
here sit in between: small programmable cores whose instruction set is built around one
special instruction (a complex butterfly, or a Hartley "dual butterfly") and whose register
files act as a software-managed cache, so that most butterflies never touch data memory.

Four processors are provided, side by side in `asip_top`:

| Instance   | Module           | Transform | Idea                                                        | Size      |
|------------|------------------|-----------|-------------------------------------------------------------|-----------|
| `u_cfft_s` | `cfft_s_proc`    | complex FFT | cached FFT, single issue, 32 complex cache registers      | up to 1024 |
| `u_cfft_v` | `cfft_vliw_proc` | complex FFT | cached FFT, 4-slot VLIW (four butterflies per cycle)      | up to 1024 |
| `u_fht`    | `fht_proc`       | real FHT  | plain FHT straight from a dual-port memory, with interlock  | up to 2048 |
| `u_cfht`   | `cfht_proc`      | real FHT  | cached FHT, 64 real cache registers                         | up to 2048 |

They share only clock and reset. Each has its own host port (prefixes `cs_`, `cv_`, `fh_`,
`ch_`) for loading a program and data, starting it, and reading results and performance
counters.

The architecture follows a published thesis on ASIPs for the FFT and FHT. The cycle-accurate
RTL, instruction encodings, number format and host interface are this implementation's own.
The section "Departures and choices" lists where it differs from, or adds to, that description.

---

## 1. The cached FFT

A radix-2 FFT of N = 2^n points has n stages. In stage s each butterfly combines two words
whose addresses differ only in bit s. A plain implementation reads and writes all N words
in every stage, giving N·log2N memory accesses.

The cached FFT regroups the same butterflies. Pick C = 2^c addresses that differ only in
bits s..s+c-1 and agree everywhere else (the group bits). Those C words are closed under the
butterflies of stages s..s+c-1. So load them into C registers, run c stages ("passes") on
the registers, and write them back. Doing this for all N/C groups is one epoch. Two epochs
cover all stages when N ≤ C², and the memory is read and written only twice.

- **Epoch 0:** the cache bits are the low address bits and the group bits the high ones.
- **Epoch 1:** the roles swap.

With 32 cache registers this gives 1024 points in two balanced epochs of 5 passes each. The
RTL also supports two other schedules:

- **Unbalanced:** e.g. 128 points as 4 + 3 passes.
- **Modified:** a smaller block in both epochs, e.g. 64 points as 4 + 2 passes on 16 registers.

### BFLY addressing

`BFLY rg, rp, rb, #e` reads the group, pass and butterfly number from three general-purpose
registers. `cfft_agu` then works out the operands:

1. **Cache indexes.** It inserts a place-holder bit into the butterfly number at the pass
   position. A 0 there gives the A input (and X output); a 1 gives the B input (and Y output).
2. **Twiddle address.** It forms the global DIT stage and the twiddle exponent j from the
   cache bits below the place holder. In epoch 1 it appends the group bits. It then reads
   W_1024^(j·2^(9-s)) from a 512-entry ROM.
3. **Post-increment.** It steps the butterfly register and, when that wraps, the pass
   register.

So a single `RPT k; BFLY` pair sweeps every pass of a group. `RPT` is a zero-overhead repeat:
the next instruction is issued k times while fetch and decode hold.

`CTR` describes the epoch: log2 N, passes, log2 butterflies per pass, and log2 groups.

### Moving data

- `READ` copies `DM[RP]` to the cache register `CR[CP]`. It increments CP and adds an
  immediate stride to RP.
- `WRITE` does the reverse.
- With the `br` flag set, the low log2 N bits of RP are bit-reversed on the way to memory.

The reference programs use `br` on every transfer. Each group is then read and written at
the same addresses, so the transform runs in place with **natural-order input and
bit-reversed output**. A group of epoch 0 looks like this:

```
SETRP  r0, #c        ; RP = G << c
SETCP  #0
RPT    #C  ; READ  br, #1
LDI r1,#0 ; LDI r2,#0
RPT    #passes*C/2 ; BFLY r0, r1, r2, #0
SETRP  r0, #c ; SETCP #0
RPT    #C  ; WRITE br, #1
```

The testbenches contain generators (`gen_epoch`) that produce full programs for every
supported schedule.

### Single-issue pipeline (`cfft_s_proc`)

The pipeline is FE, DC, EX1, EX2, EX3, EX4.

- **EX1** runs everything that is not a butterfly. This covers the general-purpose registers,
  the special registers, the data memory, and branches. For a butterfly, EX1 computes the
  addresses, reads both cache operands and fetches the twiddle.
- **EX2–EX4** belong to the butterfly:
  - EX2 does the four real multiplications;
  - EX3 does the two additions that give B·W;
  - EX4 does the add/subtract with A, and writes both results at the end of EX4.

One butterfly issues per cycle. Two hazards are handled in hardware:

- **Branches.** A taken `DBNZ`/`JMP` resolves in EX1 and flushes the two younger instructions.
- **Interlock.** An EX1 instruction that reads or writes a cache register still owed by a
  butterfly in EX2–EX4 waits in EX1. A `WRITE` right behind its butterfly therefore waits
  3 cycles. With a 32-register cache the passes never collide, so a full program stalls only
  at the group boundaries.

### VLIW pipeline (`cfft_vliw_proc`)

A program word is a bundle of four 24-bit instructions. Slot 0 runs everything; slots 1–3 run
only `BFLY`. The butterfly is compressed to EX1–EX3 (the add/subtract and the write-back share
EX3), so results come back one cycle sooner.

There is **no interlock and no forwarding**. The program must separate dependent passes. The
reference programs issue one `RPT` per pass and put a `NOP` before the write-back.

- A read of a register still in flight is counted on `cnt_hazard`.
- The end-to-end test runs a deliberately badly scheduled program and checks that hazards
  appear.

**Twiddle banks.** The twiddle table is split into four physically separate 128-word banks.
Each slot reaches every bank through `twiddle_xbar`, and the bank is the top 2 bits of the
twiddle address. In the reference programs the four slots start at
butterflies 0, 4, 8 and 12 of a pass, and each then post-increments its own butterfly
register. Two slots may read the same twiddle word. Two different words in one bank in the
same cycle is a conflict. It is not arbitrated, only counted on `cnt_conflict`. None of the
reference programs has one, but other schedules must avoid it themselves.

---

## 2. The fast Hartley transform

The Hartley transform H(k) = Σ x(n)·cas(2πnk/N), where cas = cos + sin, is real-to-real. The
DIT recursion is

  H(k) = H1(k) + cos(2πk/L)·H2(k) + sin(2πk/L)·H2(L/2 − k)

where H1 and H2 are the half-length transforms inside a block of length L.

The term H2(L/2 − k) couples index k with its mirror, so butterflies cannot be computed one at
a time. The pair (k, L/2 − k) is computed together as a **dual butterfly**. It has four inputs:

- X0 = H1(k) and X1 = H2(k);
- Y0 = H1(L/2−k) and Y1 = H2(L/2−k).

It has one shared cos/sin pair (c, s) and produces four outputs:

```
T1 = c·X1 + s·Y1                 T2 = s·X1 − c·Y1
X0' = (X0 + T1)/2   X1' = (X0 − T1)/2
Y0' = (Y0 + T2)/2   Y1' = (Y0 − T2)/2
```

For k = 0 and k = L/4 there is no multiplication (T1 = X1, T2 = Y1); the RTL calls this
"plain". Stages 1 and 2 have no mirrored pairs. In those stages one instruction performs two
independent plain butterflies, so the same instruction covers every stage.

`fht_agu` produces the four addresses from stage s and butterfly number b:

- IndexX is the low s−2 bits of b;
- X0 and X1 are IndexX with a 0 or a 1 inserted at bit s−1;
- Y0 and Y1 are the same with IndexY = L/2 − IndexX, or L/4 when IndexX = 0;
- the cos/sin address is IndexX·2048/L.

### FHT processor (`fht_proc`)

A dual butterfly needs four words, but the data memory has two ports. The seven-stage
pipeline therefore reads in two consecutive stages:

| FE | DE | ADR | MEM | MEM&MUL | ADD | ADD&SUB |
|----|----|-----|-----|---------|-----|---------|
| fetch | decode, RPT | registers, branches, addresses | read X0, X1, cos/sin | read Y0, Y1 | multiply-add | add/sub, write registers |

Two stalls are handled in hardware:

- **Memory-port stall.** An instruction that uses memory cannot enter MEM in the cycle a
  `DBF` moves on to MEM&MUL, because both need both ports. Back-to-back `DBF`s therefore cost one stall cycle each, which is why this processor
  is the slowest of the four.
- **Register stall.** A `STORE` waits while a `DBF` that will write its register is still in
  the pipeline.

Results do not go straight back to memory. They go to 32 data registers, and their addresses
to 32 address registers. The program issues 8 `DBF`s and then 16 `STORE`s, each of which
writes two words through the two ports.

**Order.** The input must be stored in bit-reversed order; the output comes out in natural
order.

### The cached FHT (`cfht_proc`, `cfht_agu`)

Caching the FHT is harder than caching the FFT, because a block's mirror partner L/2 − k may
lie in a different group.

**Epoch 0.** The first C0 stages work on blocks of 2^C0 consecutive words, which are closed
under the recursion. They are cached like the FFT, with C0 up to 6 and 64 registers.

**Epoch 1.** Group G is the set of addresses whose low C0 bits are {0, G}. For every stage
above C0 its mirror is the set with low bits {1, AG}, where AG = 2^(C0−1) − G.

- Both sets are loaded together, 2^R words each, into the "cache" and "auxiliary cache"
  halves of the register file.
- Two read pointers walk them: RP0 for the group and RP1 for the auxiliary group. One
  `READ2` moves one word of each through the two memory ports.
- Within a pass p:
  - the X pair of a dual butterfly lies in the group half;
  - the Y pair lies in the auxiliary half, at the butterfly number with its low p bits
    inverted;
  - the cos/sin angle is 2π·{b, 0, G}/2^(C0+1+p).
- **G = 0 is special.** Its two sets are their own mirrors. They form a short FHT of their
  own, indexed like epoch 0.

The pipeline is FE, DE, ADR, MEM, ADD, ADD&SUB:

- **MEM** reads the four operands from the cache (4 read ports) and the cos/sin pair. The
  multiply-add is formed from these and registered at the end of MEM.
- **ADD** does the add/subtract.
- **ADD&SUB** ends by writing the four results into the cache (4 write ports).

As with the FHT processor, the input is stored in bit-reversed order and the output comes
out in natural order.

Like the VLIW processor, it has **no interlock**. The reference programs issue one `RPT` per
pass followed by a `NOP`, and `cnt_hazard` counts violations. The largest size is 2048
points: 6 passes in epoch 0 and 5 in epoch 1.

---

## 3. Number format

Samples, twiddles and cos/sin values are 16-bit two's-complement Q1.15. A complex word packs
the real part in bits [31:16] and the imaginary part in [15:0].

Each butterfly does the following:

1. forms full-precision products;
2. sums them and truncates by 15 bits;
3. adds or subtracts;
4. halves the result, then saturates it to 16 bits.

The output is therefore the transform divided by N: DFT/N, or DHT/N. With inputs below 0.5 in
magnitude, nothing saturates.

The twiddle and cos/sin ROMs are computed at elaboration as round(32767·cos) and
round(±32767·sin), so +1.0 is stored as 32767. No table files are needed.

---

## 4. Programming and host interface

Every processor has the same host protocol. All memory reads are combinational and all writes
are clocked.

1. While `busy` is low, write the program with `pm_we/pm_addr/pm_wdata` and the data with
   `dm_we/dm_addr/dm_wdata`. An assertion fires if the host writes while the processor runs.
2. Pulse `start` for one cycle. Execution begins at address 0, and all counters clear.
3. After `HALT` reaches the execute stage and the butterfly pipeline drains, `busy` falls
   and `done` pulses for one cycle.
4. Read the data memory back through `dm_addr`/`dm_rdata`.

The counters `cnt_*` then hold the statistics of that run: cycles, butterflies, stall cycles,
flushes, repeated issues, hazards and bank conflicts, as each processor has them.

The instruction encodings are documented at the top of `rtl/cfft_pkg.sv` (both cached-FFT
processors) and `rtl/fht_pkg.sv` (both FHT processors). Both packages also export builder
functions such as `i_bfly(...)` and `f_dbf(...)`, so that a testbench can assemble programs.

All instructions are 24 bits wide, with a 4-bit opcode in bits [23:20]. The remaining
fields depend on the instruction:

- up to three 3-bit register numbers;
- a 16-bit immediate;
- an 8-bit branch target;
- a bit-reverse flag, a stride, or an epoch number.

---

## 5. Performance

The cycle counts below are simulated at the default sizes, for one complete transform
including the loads from memory and the write-backs.

| Processor | N = 256 | N = 1024 | N = 2048 | Source description (read off its bar charts) |
|-----------|--------:|---------:|---------:|-------------------------------------|
| CFFT single issue | 2470 | 10054 | – | ≈1900 / ≈8600 (elsewhere ≈2400 / ≈9000) |
| CFFT VLIW (modified schedule) | 1606 | 6726 | – | ≈900 / ≈5600 |
| FHT | 2276 | 11244 | 24688 | ≈2600 / ≈12800 |
| Cached FHT | 1509 | 5669 | 11205 | ≈1400 / ≈6000 |

The ordering matches the source: the cached FHT is fastest, then the cached FFT, then the FFT
and FHT without a cache. The absolute numbers for the two FHT processors fall within about
15 % of the source's.

The cached-FFT processors are 15–80 % slower than the source's charts. The gap is largest for
the VLIW processor at 256 points. Its likely causes are:

- the loop and set-up overhead of this implementation's instruction set, for example one
  `READ`/`WRITE` per word and explicit pointer set-up per group;
- the conservative pass spacing of the reference programs.

Neither processor's datapath rate is affected: both sustain one butterfly, or one bundle,
per cycle inside a pass. Energy and area are not modelled.

---

## 6. Departures and choices

Anything not listed here follows the source description.

**Dual-butterfly equations.** The source's printed equations for the Y outputs use
(−X1·cos + Y1·sin). The Hartley recursion gives (X1·sin − Y1·cos) for the mirrored index, and
the RTL follows the recursion. The FHT tests compare against a direct floating-point DHT,
which confirms this choice.

**Single-issue interlock.** The source states that the single-issue processor has no hazards
between passes. That is true for its 32-register programs. The interlock here is an addition
that also makes small caches (e.g. a 16-point FFT on a 4-word cache) safe.

**Stages 1–2 of the FHT.** One instruction performs two plain butterflies. The source counts
single butterflies there.

**Multiplier placement.**
- FHT processor: the multiplications are in ADD, not in MEM&MUL. Only the pipeline timing
  differs, not the results.
- Cached FHT: the multiply-add sits at the end of MEM.

**Special registers.** The source gives the single-issue cached-FFT processor 12 special
registers for addressing and flow control, without listing them. This design has three:

- CTR for the epoch description;
- RP, the memory pointer;
- CP, the cache pointer.

Loop control uses the general-purpose registers through `DBNZ`.

**Where stalls are decided.** The source decides the FHT memory-port stall across the DE and
ADR stages. Here it is decided in ADR alone, with the same effect: one stall cycle per
back-to-back pair.

**Register-stall check.** The `STORE`-after-`DBF` register stall of the FHT processor is an
addition.

**Instruction sets.** The instruction sets beyond the special instructions, their encodings,
`CTR`'s layout, the host port, the counters and the reset behaviour are all this
implementation's own. The special instructions are BFLY, READ/WRITE, RPT, DBF, STORE and the
two-pointer cache load.

**Sizes.**
- Memory sizes for the cached-FFT processors are the source's: program 24×256, data 32×1024,
  twiddles 32×512, and four 32×128 banks in the VLIW.
- The FHT processors' data memory (16×2048) and cos/sin table (1024 entries) are sized for
  their largest transform.
- The FHT processors' 256-word program memory is an assumption.

**Cached-FHT tables.** The cached-FHT addressing tables were reconstructed and then verified
stage by stage against the plain FHT (see `cfht_agu_tb`). The G = 0 case and the inverted
butterfly bits of the auxiliary half come from that reconstruction.

**Not built.** The LISA-based tool flow (instruction-set simulator, generated HDL, synthesis
and power scripts) and the comparison baselines of the source are not part of this RTL.

---

## 7. How far to trust it

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>`, and each has a watchdog.

**Processors.** Every output word is compared with a reference transform computed in the
testbench with the same fixed-point arithmetic, so the comparison is bit-exact.

- The reference is a plain radix-2 FFT, or a stage-by-stage FHT. It does not share the
  processors' cached addressing.
- At 64 points the FHTs are also compared with a direct floating-point DHT/N, to within
  12 LSB.

Sizes covered:

- single-issue CFFT: 16 (on a 4-word cache, so the interlock stalls), 64 (balanced and
  modified), 128 (unbalanced), 256 and 1024;
- VLIW: 64, 256 and 1024;
- FHT: 16, 64, 256, 1024 and 2048;
- cached FHT: 64, 128, 256, 1024 and 2048.

Micro-programs check timing on the single-issue processor and the FHT processor:

- the 3-cycle `BFLY`→`WRITE` interlock;
- 16 repeated `BFLY`s issuing on 16 consecutive cycles;
- N/4 dual butterflies per FHT stage, with at least one port stall per back-to-back pair;
- a `STORE` right behind its `DBF`, which must cost exactly one port stall and two register
  stalls and still store the right values.

**Address generators.** They are checked against models written in terms of global data
addresses and the transform's structure, not against the RTL's formulas. Every word must be
touched exactly once per stage, mirrors must pair correctly, and twiddle or angle addresses
must match the stage.

**Arithmetic units, ROMs, memories, crossbar.** They are checked with random and full-scale
operands and against floating point.

**End to end.** `asip_top_tb` runs all four processors concurrently at the default parameters,
using the same programs. It fails if any of the following never happens:

- an interlock stall, a flush or a repeat on each processor;
- a four-butterfly bundle;
- a hazard under a bad schedule, on the VLIW and on the cached FHT;
- an FHT port stall or register stall.

**Fault tests.** Each testbench has also been run against a deliberately broken copy of its
module, and fails there.

**Limits.**
- Only the bundled programs have been tested; other schedules are the programmer's
  responsibility on the two processors without interlock.
- Inverse transforms are not exercised. The hardware computes forward transforms only, though
  an IDFT can be obtained in software by conjugation.
- Nothing has been synthesised to gates beyond a generic synthesis check.

---

## 8. Simulating

With Verilator 5, run from the repository root. For example, the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl --top-module asip_top_tb \
    rtl/cfft_pkg.sv rtl/fht_pkg.sv tb/asip_top_tb.sv -Mdir build/top -o sim
./build/top/sim
```

`-Wno-fatal` keeps Verilator's width warnings from the testbenches' integer arithmetic
visible without stopping the build. Any other testbench works the same way: use `--top-module <block>_tb tb/<block>_tb.sv`, and
list `rtl/cfft_pkg.sv` and/or `rtl/fht_pkg.sv` first when the block imports them. Verilator
finds the remaining modules in `rtl/` through `-I`.

Lint a module with:

```
verilator --lint-only -Wall -Irtl rtl/cfft_pkg.sv rtl/fht_pkg.sv rtl/asip_top.sv
```

The lint run shows some warnings that are left on purpose:

- unused upper bits of the elaboration-time table generators;
- bits of immediates that a given configuration does not use;
- the asynchronous reset seen inside the assertions' `disable iff`.

Every test finishes in seconds.

## 9. Files

`rtl/` — one module or package per file:

- Packages:
  - `cfft_pkg`: complex type, FFT instruction set;
  - `fht_pkg`: FHT instruction set.
- Processors: `cfft_s_proc`, `cfft_vliw_proc`, `fht_proc`, `cfht_proc`, and the top
  `asip_top`.
- Address generators: `cfft_agu`, `fht_agu`, `cfht_agu`.
- Datapaths:
  - `cfft_bfly`: complex butterfly, 2- or 1-register variant;
  - `fht_dual_bfly`.
- Storage:
  - `cache_regfile`: multi-port register file;
  - `sp_ram`, `dp_ram`;
  - `twiddle_rom`, `cas_rom`.
- Interconnect: `twiddle_xbar`.

`tb/` — `<module>_tb.sv` for each of the above, plus `asip_top_tb.sv`. The top testbench
combines the four processor testbenches' program generators and reference models.
