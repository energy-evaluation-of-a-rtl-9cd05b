# Seven-stage MIPS I pipeline with a two-cycle instruction cache

This is a 32-bit, in-order, single-issue MIPS I integer processor. Its
pipeline has seven stages instead of the classic five. Instruction fetch and
data memory access each get two cycles, because in a five-stage design
those two stages hold the critical paths. The stages are:

    IF1  IF2  ID  EX  MEM1  MEM2  WB

A deeper pipeline makes branches costly, and the extra stages leave too many
instructions behind a branch to fill delay slots. So the pipeline has no
delay slot and uses a branch predictor instead: a direct-mapped branch
target buffer (BTB) with a two-bit counter per entry.

The second part of the design is an instruction cache built for the two-cycle
fetch. Its defaults are 2 kB, 4 ways and 4-word lines. IF1 reads all ways and
registers each way's hit bit and word. IF2 picks the word that hit. A miss
refills the line from main memory through a small register interface while
the pipeline is frozen.

The design can be used at two levels:

* **`mips7_core`**: the pipeline alone, with an instruction port and a data
  port to ideal one-cycle memories. This is how a seven-stage pipeline of
  this kind is usually evaluated.
* **`mips7_top`**: the pipeline with the instruction cache in front of main
  memory. The data port stays outside as an ideal memory with a stall input.

All RTL is SystemVerilog-2017 and synthesizable. Memories are written as
arrays.

## Module map

| Module | What it is |
|---|---|
| `mips7_top` | core + instruction cache; main-memory and data-memory ports brought out |
| `mips7_core` | the seven-stage pipeline |
| `decoder` | ID-stage instruction decoder, produces `mips_pkg::ctrl_t` |
| `regfile` | 32 x 32 register file, 2 read ports, 1 write port, write-through |
| `hazard_unit` | ID-stage hazard detection and forwarding selects |
| `alu` | EX-stage ALU |
| `mult_pipe3` | 3-stage 32x32 multiplier (EX, MEM1, MEM2) for MULT/MULTU |
| `branch_predictor` | direct-mapped BTB with 2-bit counters, flip-flop storage |
| `icache` | two-cycle set-associative instruction cache datapath |
| `icache_ctrl` | cache controller: FLUSH, TAGCMP, MEMREAD |
| `icache_plru` | tree pseudo-LRU replacement bits, one tree per set |
| `mem_if` | data and valid registers between main memory and the cache |
| `mips_pkg`, `icache_pkg` | shared types: opcodes, control struct, enums, cache state |

## How an instruction moves

| Stage | Work |
|---|---|
| IF1 | The PC goes to instruction memory or the cache. The BTB is looked up with the same PC, and the next PC is chosen: the predicted target or PC+4. |
| IF2 | The instruction word arrives. |
| ID | Decode. Register file and HI/LO read. `hazard_unit` decides whether to stall and where each operand will come from in EX. |
| EX | Forwarding multiplexers, ALU, address generation, real next PC of every instruction, multiplier stage 1. |
| MEM1 | Data memory request (address, byte enables, store data). Multiplier stage 2. |
| MEM2 | Load data arrives and is aligned and sign- or zero-extended. Multiplier stage 3. |
| WB | Register file and HI/LO are written. |

With nothing in the way, the first instruction leaves WB in cycle 7. From
then on one instruction retires every cycle.

### Two kinds of stall

The two kinds of stall behave very differently, and this is easy to get
wrong when changing the core.

* **Freeze (`mem_stall`)**: every pipeline register holds, including the
  multiplier and the predictor update. A cache miss, the cache flush after
  reset, and `dmem_stall` all freeze the pipeline.
  * Requests (`imem_req`, `dmem_req`) are raised only in cycles where the
    pipeline advances.
  * A memory must change its read data only on a request. That way, the word
    a frozen IF2 or MEM2 is waiting for stays on the bus.
* **Hazard stall**: IF1, IF2 and ID hold and a bubble enters EX. The older
  instructions keep moving. There are two causes:
  * **Load-use.** A load's data exists only at the end of MEM2. A consumer
    directly behind a load waits 2 cycles, one behind it waits 1, and after
    that the value is forwarded from MEM2/WB.
  * **MFHI/MFLO.** These wait while a MULT, MULTU, MTHI or MTLO is in EX,
    MEM1 or MEM2, because HI and LO are written in WB. (WB writes HI/LO and
    ID reads them in the same cycle, so the new value is passed straight
    through to ID.)

### Forwarding

The operand multiplexers are in EX. Their selects are computed one stage
earlier in ID, so EX needs no register comparators:

| Producer when the consumer is in ID | Value taken in EX from | Select |
|---|---|---|
| EX   | EX/MEM1 register | `FWD_MEM1` |
| MEM1 | MEM1/MEM2 register | `FWD_MEM2` |
| MEM2 | MEM2/WB register | `FWD_WB` |
| WB   | register file (writes through) | `FWD_NONE` |

The youngest producer wins. Register 0 is never forwarded.

### Branches and the predictor

Every instruction carries the next PC that fetch assumed for it. EX works out
the real one: PC+4, the branch or jump target, or the register for JR/JALR.
If the two differ, IF2, ID and the slot entering EX are flushed and IF1
restarts at the right PC. That costs 3 cycles. A correctly predicted taken
branch costs nothing.

`branch_predictor` (default 32 entries; 128 is the other size of interest):

* **Indexing.** PC bits [IW+1:2] index the buffer and the bits above them are
  the tag.
* **Lookup.** Combinational, with the IF1 PC. The predictor says "taken" only
  on a tag hit whose counter is 2 or 3. A transfer that is not in the buffer
  is therefore always predicted not taken.
* **Update.** One cycle after EX, from the EX/MEM1 register:
  * a taken transfer writes its tag and target and counts up; a new entry
    starts at 2 (weakly taken), so it is predicted taken the next time;
  * a not-taken transfer counts a hitting entry down;
  * a not-taken miss changes nothing.
* **Bypass.** With `BTB_BYPASS=1` every lookup misses, so every transfer is
  predicted not taken and each taken one costs 3 cycles. This is the
  "pipeline without BTB" that the source compares against.

There is no branch delay slot, and JAL/BGEZAL/BLTZAL/JALR link PC+4.

### Multiplier and HI/LO

`mult_pipe3` starts in EX and hands its 64-bit product to WB:

1. Stage 1 forms two partial products of the 33-bit sign- or zero-extended
   operands: `a*b[16:0]` and `a*b[32:17]`.
2. Stage 2 adds them.
3. Stage 3 is the output register.

The multiplier only advances when the pipeline does. Division is not
implemented.

### Memory ports

Both core ports expect a memory with one cycle of read latency. The address
and request go out in IF1/MEM1 and the word is read in IF2/MEM2.

* Data accesses are little-endian.
* Stores drive byte enables, and the store data is repeated in every byte
  lane of the access size.
* There are no exceptions: ADD/ADDI/SUB wrap, and an unknown opcode executes
  as a NOP.

## The instruction cache

### Address split (defaults)

    | tag 23 | index 5 | word offset 2 | byte offset 2 |

The index width is `log2(1024*KB / (ways * 4 bytes * words per line))`, which
gives 32 sets at the defaults. The widths are derived from the parameters:
size in kB, ways (1, 2 or 4), words per line, address width and data width.

### Memory organisation

Each way has a directory block and a data block.

* **Directory block**: 32 entries of {valid, tag}.
* **Data block**: one instruction wide and `sets * words` deep, addressed by
  {index, word offset}. A lookup reads exactly one word per way, so no
  multiplexer is needed to pick a word out of a line. A refill writes each
  word as it arrives, with nothing buffered.
* **Hit test**: each way compares its directory entry with `{1'b1, tag}`. One
  comparator checks the tag and the valid bit together.

### Two-cycle lookup

* **IF1.** All ways are read. The per-way hit bits (4 bits) and per-way words
  (4 x 32 bits) are registered, together with the request address.
* **IF2.** The OR of the hit bits is the hit. The hit bits select the word.
  A hit the pipeline consumes marks its way most recently used.

### Miss and refill

A registered request that missed raises `stall`. `icache_ctrl` then moves
from TAGCMP to MEMREAD:

1. **Victim.** The victim way is the one the pseudo-LRU tree of that set
   points at. It is latched when the miss is seen.
2. **Requests.** An issue counter requests words 0..3 of the line, one per
   cycle, and waits while `mm_busy` is high.
3. **Returns.** Main memory returns words in order, with any latency, on
   `mm_rdata`/`mm_rvalid`. `mem_if` registers each word and its valid bit.
   One cycle later a receive counter writes the word into the victim way's
   data block.
4. **Hand-over.** When the word that missed arrives, it is also written into
   the IF1/IF2 register of the victim way, and that way's hit bit is set.
   When the refill ends, IF2 already holds the right instruction and fetch
   simply continues with the next PC. The PC never has to be wound back.
5. **End.** The directory entry is written with the last word, and the
   controller returns to TAGCMP.

Example timing, with memory answering in the cycle after each request and
never busy:

    cycle  0   TAGCMP   registered request misses        stall=1
    cycle  1   MEMREAD  request word 0                    stall=1
    cycle  2            request word 1, word 0 returns    stall=1
    cycle  3..6         words 0..3 leave mem_if, written  stall=1
    cycle  7   TAGCMP   missed word is in IF2             stall=0

A miss therefore costs 7 frozen cycles with this memory. The cache does not
fetch the missed word first: refills always run from word 0.

### Flush and replacement

After reset (`rst_n` low, asynchronous) the controller is in FLUSH. A counter
walks all 32 sets, one per cycle. Each step clears every way's directory
entry and the set's pseudo-LRU bits at the same time. The flush takes 32
cycles, and the pipeline is frozen during it.

The pseudo-LRU state is a binary tree of `ways-1` bits per set.
* **Cleared tree:** points at way 0.
* **Touching a way:** turns every node on its path away from that way.
* **Victim:** found by following the pointers from the root.

## Top-level interface (`mips7_top`)

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock (rising edge), asynchronous active-low reset |
| `mm_req`, `mm_addr[31:0]` | out | request for one instruction word at a byte address (low 2 bits 0) |
| `mm_busy` | in | memory cannot take a request this cycle; the request is held |
| `mm_rdata[31:0]`, `mm_rvalid` | in | returned words, in request order, any latency |
| `dmem_req`, `dmem_we`, `dmem_be[3:0]`, `dmem_addr`, `dmem_wdata` | out | data access from MEM1 |
| `dmem_rdata[31:0]` | in | read word, valid from the next cycle until the next request |
| `dmem_stall` | in | freezes the whole pipeline |
| `perf_cycles`, `perf_retired`, `perf_hazard_stalls`, `perf_mem_stalls`, `perf_mispredicts` | out | 32-bit event counters |

The parameters are `BTB_ENTRIES` (32), `BTB_BYPASS` (0), `IC_KB` (2),
`IC_WAYS` (4), `IC_WORDS` (4) and `RESET_PC` (0).

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The testbenches drive
random stimulus with `$urandom` and compare against models written
separately from the RTL.

| Testbench | What it checks |
|---|---|
| `tb_mips7_top` | The full program through the cache, at default parameters. Main memory answers 2 cycles late, `mm_busy` and `dmem_stall` are random. Checks every result word, a 32-cycle flush, exactly 4 words fetched per miss and all from the missed line. Requires that each of these happens: miss, hit, early hand-over, busy hold-off, data stall, forwarding, hazard stall, misprediction, correct taken prediction. |
| `tb_mips7_core` | The same program on ideal memories. The first retirement is in cycle 7 and straight-line code retires 1 per cycle. Random freezes must not change any result. |
| `tb_icache` | An 8 kB random fetch stream (4x the cache, so lines are evicted) against a hashed memory. Hit in the next cycle, 7-cycle miss, 32-cycle flush. |
| `tb_icache_ctrl` | Flush sweep, request order and busy handling, fill offsets, the last-word flag, and a 5-cycle MEMREAD. |
| `tb_icache_plru` | Against a hand-written 3-bit tree model. After a flush the victim is way 0, and the victim is never the way just used. |
| `tb_branch_predictor` | Against an entry-level model: new entries start weakly taken, aliasing entries replace each other, reset empties the buffer. A bypassed instance must never hit. |
| `tb_hazard_unit` | Against a reference for forwarding priority, load-use stalls and HI/LO stalls. |
| `tb_mult_pipe3` | Signed and unsigned products with corner values, 3-edge latency, holding its value while frozen. |
| `tb_alu`, `tb_regfile`, `tb_mem_if` | Against reference models; the write-through of the register file is checked explicitly. |
| `tb_autocorr` | A larger autocorrelation run (128 samples, 32 lags; 189-word program) on three cores side by side: 32-entry BTB, 128-entry BTB, and BTB bypassed (`core_on_ideal_mem` harness). All must be correct. The two buffer sizes must match in cycle count, because the kernel's few branches never conflict in either buffer. The bypassed core must be slower. Result: 51043 cycles, 32877 instructions, 18025 hazard-stall cycles and 47 mispredictions with either buffer. Without it: 61735 cycles (21% more) and 3612 mispredictions. |
| `tb_icache_assoc` | The cache built direct-mapped (128 sets) and 2-way (64 sets), each driven by its own random fetch stream (`icache_stream` harness). Every word is checked, and each cache must hit, miss and evict. |

`tb/mips_asm_pkg.sv` assembles the test program in SystemVerilog and computes
the expected memory image independently of the RTL. The program covers:

* every implemented instruction;
* every branch kind, taken and not taken;
* loads and stores of every size;
* an autocorrelation kernel, `r[lag] = sum x[i]*x[i+lag]`.

To run a testbench with Verilator 5 from the repository root:

    verilator --binary --timing --top-module tb_mips7_top \
      -Irtl -Itb -y rtl -y tb \
      rtl/mips_pkg.sv rtl/icache_pkg.sv tb/mips_asm_pkg.sv tb/tb_mips7_top.sv
    ./obj_dir/Vtb_mips7_top

For another testbench, change the top-module name and the last file. The
package files are needed only by the testbenches that import them. One run of
`tb_mips7_top` printed:

    cycles=4383 retired=2293 hazard=1165 memstall=851 mispred=23 misses=48 hits=2366

Lint with `-Wall` reports only unused signals and constants. These are:
* package constants a file does not use;
* the two always-zero address bits of the predictor;
* unused fields of the control struct in WB;
* the predictor's `btb_hit` output, which the core leaves open. It is kept
  for debugging and for counting hits.

## Where this RTL departs from, or adds to, the original description

* **Cache with the pipeline.** The evaluated seven-stage processor ran on
  ideal memory without caches. The two-cycle instruction cache was a
  separate, unfinished design meant for it. `mips7_top` joins the two, and
  `mips7_core` alone is the cache-less configuration. There is no data
  cache.
* **Predictor placement.** The original block diagram attaches the predictor
  to IF2. Here it is looked up with the IF1 PC, so a correctly predicted
  taken branch costs no bubble.
* **Predictor contents.** The direction predictor (2-bit counters),
  direct-mapped indexing and allocation on taken are choices of this design.
  The source only requires that a taken prediction needs a known branch, a
  taken direction and a BTB hit.
* **Branch resolution.** Branches resolve in EX (3-cycle penalty). The
  resolution stage is not stated in the source; the predictor is trained
  from the EX/MEM1 register, as the block diagram shows.
* **Data address.** The data address is registered in EX/MEM1 and leaves the
  core in MEM1. The source's timing report suggests the address left
  straight from EX's address adder.
* **Hazard and forwarding rules.** The exact rules and the register-file
  write-through are this design's.
* **Multiplier.** The original used a vendor pipelined multiplier. It is
  replaced by `mult_pipe3` with the same three-stage placement.
* **BTB storage.** SRAM-macro storage for the BTB, one of the evaluated
  configurations, is not available. The BTB is flip-flops only.
* **Refill end condition.** The controller's state diagram ends a refill when
  a counter equals the associativity, while the text counts the words of a
  line. This RTL counts words; the two are equal (4) at the defaults.
* **Refill timing.** The main-memory handshake (`mm_busy`, in-order
  `mm_rvalid`), the receive counter that allows any memory latency, the
  moment the directory is written, and the refill timing are this design's.
  The original waveforms for the refill were not available.
* **Stall end after a refill.** The source says the missed instruction is
  supplied during the last cycle of the memory transfer. Here `stall` drops
  one cycle after the last word leaves `mem_if`.
* **Not implemented:** exceptions and system calls, division, and the
  five-stage baseline the design was compared with.
