# March 5n memory BIST with diagnosis and word repair

A memory built-in self-test (MBIST) engine for one embedded SRAM. It runs a
short March test on the memory — March 5n, five operations per word, or the
classic MATS++ with six — records which words failed and in which bits, and
uses that record straight away to steer failing words onto spare words. A
second test run then confirms the repaired memory.

The main idea is March 5n with *address data backgrounds*: instead of writing
all-0 and all-1 words, the test writes each word's own address (`wa`) and its
complement (`wb`), and reads them back (`ra`, `rb`). Every word holds a
different value. This catches stuck-at and address-decoder faults in five
operations per word where MATS++ needs six. The diagnosis log sits next to
the comparator, so the repair information is complete as soon as the test
ends. No second pass over the memory is needed to find the words to repair.

The default size is the 1 kb memory of 32 words of 32 bits (`AW = 5`,
`DW = 32`). The 2 kb memory of 64 words is `AW = 6`.

This RTL follows the architecture and the list of blocks of a published
March 5n MBIST design: March block, address generator, data generator,
diagnosis module and redundancy logic. The source gives the blocks' purpose
but not their insides. The element order of March 5n, all interfaces, timing,
the log format and the repair unit are this design's own choices. They are
marked as such below and in each file's header.

## Block diagram

```
             bist_start, bist_alg                    repair_program / repair_clear
                    |                                          |
            +-------v---------+  load/step/down  +-----------+  |
            | mbist_march_ctrl|----------------->| addr_gen  |  |
            |  (FSM, tables   |<-----last--------+-----+-----+  |
            |   in mbist_pkg) |                        | addr   |
            +---+---------+---+                        v        |
                | pattern | we, elem, op        +-----------+   |
                +---------|-------------------->| data_gen  |   |
                          |                     +-----+-----+   |
                          |                           | data    |
   sys_* ----------+      v                           v         v
                   |  +--------- test / system mux --------+  +-----------------+
                   +->|  (test owns the port while busy)   |->| mbist_redundancy|<--> mem_* (SRAM)
                      +------------------------------------+  |  spare words     |
                                                               +--------+--------+
                                read data (1 cycle later)               |
            +-----------+ <---------------------------------------------+
            | mbist_diag| <-- address, expected word, element, op of each read
            |  compare, |
            |  log      |--> log_* ----> (program spares)
            +-----------+
```

| File | Block | Role |
|---|---|---|
| `rtl/mbist_pkg.sv` | – | shared types; algorithm tables for March 5n and MATS++ |
| `rtl/mbist_march_ctrl.sv` | March block | FSM, one memory operation per clock cycle |
| `rtl/mbist_addr_gen.sv` | address generator | up/down counter with end-of-element flag |
| `rtl/mbist_data_gen.sv` | data generator | 0, 1, address and complement-address words |
| `rtl/mbist_diag.sv` | diagnosis module | comparator, fail count, log of failing words |
| `rtl/mbist_redundancy.sv` | redundancy logic | spare words with programmable addresses |
| `rtl/mbist_top.sv` | top | the five blocks plus the test/system access mux |

The SRAM is not part of the RTL. It sits on the `mem_*` port: single-port
and synchronous, with read data one cycle after the read. The testbenches
use a behavioural model of it with injectable faults
(`tb/sram_fault_model.sv`).

## The algorithms

Notation: `<>` means either address order (run upwards here), `^` ascending,
`v` descending. An element applies its operations, in order, to one word
before moving to the next word.

| Algorithm | Elements | Operations per word |
|---|---|---|
| March 5n | `<>(wa); ^(ra, wb); v(rb, wa)` | 5 |
| MATS++ | `<>(w0); ^(r0, w1); v(r1, w0, r0)` | 6 |

MATS++ is the textbook algorithm. For March 5n, the operation set (`wa`,
`ra`, `wb`, `rb`) and the count of five per word are given by the design
being followed, but the element order is not. The order used here is the
MATS+ layout with address backgrounds. Both tables live in
`mbist_pkg::get_elem`, which returns, for an element index, its direction,
its number of operations and the list of (read/write, background) pairs. To
change an algorithm or add one, edit that function and `num_elems`. The
controller needs no change as long as an element has at most three
operations and an algorithm at most three elements (`MAX_OPS`, `ELEM_W`).

**Address background.** The word is wider than the address. So
`mbist_data_gen` repeats the address bits across the word: bit *i* of the
`wa` word is address bit *i mod AW*, and `wb` is its complement.

### What each algorithm catches

These numbers were measured by `tb/tb_fault_coverage.sv` on the 1 kb memory.
Each run injects a single fault and starts from an all-zero array:

| Fault class | Faults injected | March 5n | MATS++ |
|---|---|---|---|
| stuck-at 0/1, every cell | 2048 | 2048 | 2048 |
| address decoder (A reaches B), every pair | 992 | 992 | 992 |
| transition rise/fall, every cell | 2048 | 1536 (75 %) | 2048 |
| inversion coupling, random cell pairs | 2000 | 1629 (81 %) | 1060 (53 %) |

With this element order, March 5n misses the falling transition of a cell
whose address-background bit is 0. That cell falls only in the last `wa`
write, which is never read back. The source states that March 5n keeps the
fault coverage of MATS++, and this order does not fully do so for transition
faults. If full transition coverage matters, run MATS++ (`bist_alg = 1`), or
change the March 5n table. For inversion coupling faults, the order used here
does better than MATS++.

## The March controller and its timing

`mbist_march_ctrl` has four states: `IDLE`, `RUN`, `DRAIN` and `DONE`.

- When `bist_start` is sampled, the controller latches `bist_alg` and loads
  the address generator for element 0.
- In `RUN` it issues one operation every cycle. After the last operation on
  a word it steps the address. After the last operation on the last address
  it loads the address generator with the next element's first address and
  direction. No cycle is lost between words or between elements.
- The address generator stores the direction on each load, so its `last`
  flag does not depend on the controller's outputs. This avoids a
  combinational loop.
- `DRAIN` waits one cycle, so that the read issued in the last `RUN` cycle is
  compared before `DONE`.

Test length, from the cycle in which `bist_start` is sampled to the rising
edge of `bist_done`: **k·2^AW + 2 cycles**, where k = 5 (March 5n) or 6
(MATS++). That is 162 and 194 cycles for the 1 kb memory, and 322 and 386
for the 2 kb memory. `bist_done` stays high until the next start. While
`bist_busy` is high, the test owns the memory and `sys_*` accesses are
ignored.

## Diagnosis

`mbist_diag` gets, with every read the controller issues, the address, the
expected word, and the element and operation index. It holds them for one
cycle and XORs the expected word with the returned data. Each set bit of the
result (the *syndrome*) is a failing bit.

- `bist_err` pulses on each failing read.
- `bist_fail` is sticky.
- `fail_count` counts failing reads, saturating at its maximum.
- The log holds up to `LOG_DEPTH` (4) **distinct** failing addresses. Each
  entry has:
  - the address;
  - the OR of all syndromes seen at that address, so one entry shows every
    failing bit of the word over the whole test;
  - the element and operation of the first failure at that address.
- A new failing address that finds the log full sets `log_overflow`.

The element/operation pair tells the fault types apart:

- A stuck-at-0 shows at the first read that expects a 1 in that bit.
- A March 5n transition fault shows at `rb` in element 2.
- An address-decoder fault usually logs two addresses, the decoded one and
  the word it actually reached, with the entry merging failures from both
  read elements.

Starting a test clears the log.

## Repair

`mbist_redundancy` holds `SPARES` (4) spare words in flip-flops, each with an
address register and a valid bit.

- **Programming.** `repair_program` copies the diagnosis log into the spares
  in one cycle: entry *i* goes to spare *i*.
- **Repair verdict.** `repair_ok` is high when nothing overflowed and every
  logged address got a spare.
- **Access.** Every access, from the test or the system port, is compared
  with the valid spare addresses. On a match, the spare serves the access
  and the SRAM is not enabled. Reads have the same one-cycle latency either
  way.
- **Re-test.** Because the test also goes through this logic, a test run
  after programming checks the repaired memory and should pass.
- **Clearing.** `repair_clear` frees all spares.

Repair works on whole words. The spares are assumed fault-free. Spare
addresses are held in registers; a product would load them from fuses at
power-up.

## Top-level use

1. Set `bist_alg` (0 = March 5n, 1 = MATS++) and pulse `bist_start`.
2. Wait for `bist_done`, then read `bist_pass`/`bist_fail`, `fail_count` and
   the `log_*` outputs.
3. If the test failed and `repair_ok` is high, pulse `repair_program`.
4. Optionally run the test again: it should pass.
5. Use the memory through `sys_en`, `sys_we`, `sys_addr`, `sys_wdata` and
   `sys_rdata`. Read data arrive one cycle after the read. `sys_remapped`
   shows accesses served by a spare.

Parameters of `mbist_top`:

| Parameter | Default | Meaning |
|---|---|---|
| `AW` | 5 | address bits; 5 for the 1 kb memory, 6 for the 2 kb memory |
| `DW` | 32 | word width |
| `LOG_DEPTH` | 4 | distinct failing addresses in the diagnosis log (own choice) |
| `SPARES` | 4 | spare words (own choice) |
| `CNT_W` | 16 | width of the failing-read counter (own choice) |

Reset `rst_n` is asynchronous and active low. All state is reset.

## Simulation

Every testbench checks its own results and ends with a line
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mbist_pkg.sv tb/sram_fault_pkg.sv tb/tb_mbist_top.sv --top-module tb_mbist_top
./obj_dir/Vtb_mbist_top
```

Concurrent assertions in the RTL check the design's own rules while it runs
(with `--assert`):
- the address generator is never loaded and stepped in the same cycle;
- the diagnosis log fills in order, and overflows only when full;
- at most one spare matches an address.

The unit testbenches (`tb_addr_gen`, `tb_data_gen`, `tb_march_ctrl`,
`tb_diag`, `tb_redundancy`) need only `rtl/mbist_pkg.sv` before them.

| Testbench | What it shows |
|---|---|
| `tb_mbist_top` | default size, end to end: exact operation sequence and length of both algorithms; diagnosis of stuck-at, both transition, coupling and decoder faults; merged log entries; overflow; repair, re-test and system use of spares; system accesses held off during the test |
| `tb_fault_coverage` | the coverage table above (about 17 000 single-fault runs, about 1 s) |
| `tb_mbist_2kb` | the 2 kb memory (`AW = 6`): lengths, diagnosis in the upper half, repair |
| `tb_march_ctrl` | operation-by-operation sequence, indices and cycle count of the FSM |
| `tb_diag`, `tb_redundancy`, `tb_addr_gen`, `tb_data_gen` | the blocks on their own |

## Departures and limits

- The element order of March 5n is a choice, not taken from the source (see
  above). Its transition-fault coverage is 75 % from a zeroed array. This is
  lower than the "no coverage loss" claimed for March 5n.
- The source evaluates speed, area and power after synthesis to a 130 nm
  library. Those figures depend on the library and constraints, and are not
  reproduced here.
- The log depth, the number of spares, the word-level repair and the
  external repair trigger are this design's choices.
- The SRAM is outside the RTL, and only its behavioural model is supplied.
