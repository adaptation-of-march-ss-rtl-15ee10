# Word-oriented March SS self-test and self-repair for a 1 KB SRAM

Embedded SRAMs are tested on chip by March algorithms: a fixed series of
writes and reads swept over all addresses, up and down, that exposes
stuck-at, transition, address-decoder, coupling and read-destructive faults.
March SS is one of the stronger ones; its double reads (`R0, R0`) catch
read-destructive faults that most other March tests miss. Classic March
tests work one bit at a time. This design applies March SS to whole 8-bit
words, with word-wide data patterns, so one 1024 x 8 memory is tested in
22 x 1024 = 22,528 word operations instead of 8 times as many bit operations.

The test finds faulty words. The design then repairs them. Up to 16 faulty
word addresses are recorded in a small fault-address memory. Each recorded
word is replaced by a spare row of a 16 x 8 redundant array: in normal
operation, reads and writes to a recorded address go to its spare row
instead of the primary memory.

The top module is `mbistr_sram` (memory built-in self-test and repair).

## The test sequence

A March element is a list of operations applied to each address in turn,
in ascending (⇑) or descending (⇓) address order. `Wk` writes pattern k into
the word; `Rk` reads the word and expects pattern k. The patterns are:

| k | Wk / Rk | k | Wk / Rk |
|---|---------|---|---------|
| 0 | 00h | 4 | 33h |
| 1 | FFh | 5 | CCh |
| 2 | 0Fh | 6 | 55h |
| 3 | F0h | 7 | AAh |

W0 and W1 detect stuck-at, transition and address-decoder faults. W2..W7
are the 4-, 2- and 1-bit checkerboards and their complements; they target
coupling and pattern-sensitive faults between bits of a word.

With P patterns (parameter `NUM_PATTERNS`) the controller runs:

```
step 1            ⇑ (W0)
steps 2 .. P+1    ⇑ (Rp, Rp, Wp, Rp, W(p+1 mod P))      p = 0 .. P-1
steps P+2 .. 2P+1 ⇓ (Rp, Rp, Wp, Rp, W(p+1 mod P))      p = 0 .. P-1
step 2P+2         ⇑ (R0)
```

That is (2 + 10P) operations per word. The default, P = 2, is the word form
of the original March SS, 22N:

```
⇑(W0) ⇑(R0,R0,W0,R0,W1) ⇑(R1,R1,W1,R1,W0) ⇓(R0,R0,W0,R0,W1) ⇓(R1,R1,W1,R1,W0) ⇑(R0)
```

P = 8 gives the 18-step, 82N extension that uses every pattern.

The test and the reference patterns are the same words. A read fails when
the word read differs from the expected pattern in any bit.

## Timing

The memory has a synchronous write and an asynchronous read. This lets the
controller perform one March operation per clock cycle: the address
generator, the write or read strobe and the pattern select all change every
cycle. The response analyser compares the read data in the same cycle.

Cycle counts for N words, measured from the cycle in which `tm` is seen high:

* 1 start cycle (S0 → S1), then (2 + 10P) x N operation cycles.
* 1 extra cycle per failing read, spent in state S7.
* `test_done` is high in the cycle after the last operation.

At the default size this is 22,529 cycles for a fault-free memory. At a
100 kHz test clock that is 225.3 ms. A stuck-at-1 bit in a word gives 7
failing reads with P = 2: three in each R0 element and the final R0.

## Self-test datapath (`mbist_sram`)

* `sram_sp`: the 2^10 x 8 memory under test.
* `mbist_mux`: four 2:1 multiplexers, A to D, steered by `tm`. They select
  write data, address, write strobe and read strobe. The functional inputs
  are selected when `tm = 0`, the self-test's when `tm = 1`.
* `pattern_regfile`: registers loaded with W0..W(P-1) at reset. One read port
  gives the write pattern, the other the reference pattern.
* `addr_gen`: a 10-bit up/down counter. `init` loads the first address of an
  element (0 going up, 3FFh going down). `last_addr` flags the element's
  final address.
* `ora`: the output response analyser. It raises `fault` on a mismatching
  test read. It also keeps a sticky `fault_indicator` for the whole test.
* `mbist_ctrl`: the FSM described below.

When a read fails, its address is captured in `faulty_addr`. In the next
cycle `fault_log` is high; this is when the repair unit records the address.

## Self-test controller (`mbist_ctrl`)

States, numbered as in the controller's state diagram:

| state | P = 2 meaning | leaves on |
|-------|---------------|-----------|
| S0 | idle, normal mode | `tm = 1` → S1 |
| S1 | ⇑(W0) | `last_addr` → S2 |
| S2, S3 | ⇑ elements with p = 0, 1 | `last_addr` after the 5th operation |
| S4, S5 | ⇓ elements with p = 0, 1 | `last_addr` after the 5th operation |
| S6 | ⇑(R0) | `last_addr` → S8 |
| S7 | fault log, one cycle | back to the interrupted state |
| S8 | test done, one cycle | → S0 |

In the RTL, S2..S5 are two enum states, `S_UP` and `S_DOWN`, plus a pattern
index. That is how the same FSM also runs the P = 8 sequence. A 3-bit
operation index walks the five operations of a word. `march_step` reports
the current step number (1 .. 2P+2).

A failing read still counts as done. The controller computes where it would
have gone next, saves that state, and spends one cycle in S7. It then
resumes with the next operation. A fault on the very last read therefore
goes S6 → S7 → S8.

S8 returns to S0. If `tm` is still high, S0 starts a new test, so the host
should lower `tm` when it sees `test_done`.

## Repair unit

* `fam`, the faulty address memory: 16 entries of 10 bits, each with a valid
  bit. All entries are visible at once.
* `fm_addr_gen`: a mod-16 counter pointing at the next free entry, plus a
  `full` flag. `fam_addr = {full, count}` reads 0..16.
* `fmu`, the fault map unit: compares one address with all valid entries in
  parallel. It returns `addr_matched` and the index of the matching entry.
* RMA, the redundant memory array: a second `sram_sp`, 16 x 8. Spare row i
  replaces the word whose address is in FAM entry i.
* `mbisr_ctrl`: the repair FSM.
* The output multiplexer: `dout_repaired` is the RMA word when the address
  is mapped, otherwise the primary memory's word.

**Recording, during the test.** The FMU compares the logged `faulty_addr`
with the FAM. In the S7 cycle the address is written at the counter's
entry, and the counter advances. This happens only if the address is not
already stored and the FAM is not full. A faulty word fails many reads but
takes only one entry. Once 16 words are stored, further faulty words are
not recorded; `fam_full` shows this. The FAM keeps its contents until reset,
across repeated tests.

**Redirecting, in normal mode.** The host presents `addr_in` with `rd` or
`wr` (and `data_in`) and holds them until `ready` is high:

| repair state | address not mapped | address mapped |
|--------------|--------------------|----------------|
| S0 | primary memory access, `ready = 1` this cycle | `ready = 0`, go to S1 |
| S1 | - | `rd_rma` / `wr_rma` follow `rd` / `wr`, `ready = 1` |
| S2 | - | wait until `rd` and `wr` are both low, then S0 |

So an unmapped access takes one cycle and can be followed immediately by
the next. A mapped access takes two cycles. After it, the host must drop
`rd` and `wr` for at least one cycle.

Writes to a mapped address also reach the primary memory. This is harmless:
the primary word is never read while it is mapped. `data_out` always shows
the primary memory; for example, after writing 55h to a word whose MSB is
stuck at 1, `data_out = D5h` while `dout_repaired = 55h`.

## Top-level ports (`mbistr_sram`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `tm` | in | 1 | 1 = run the self-test, 0 = normal mode |
| `addr_in`, `data_in`, `rd`, `wr` | in | 10, 8, 1, 1 | normal-mode request |
| `ready` | out | 1 | request completes this cycle |
| `dout_repaired` | out | 8 | read data, spare row if mapped |
| `data_out` | out | 8 | primary memory read data |
| `fault`, `fault_log`, `faulty_addr` | out | 1, 1, 10 | failing read, its log cycle, its address |
| `fault_detected` | out | 1 | some read failed in this test |
| `test_done`, `busy`, `march_step` | out | 1, 1, 5 | test progress |
| `fam_addr`, `fam_full` | out | 5, 1 | number of stored faulty addresses, all 16 used |
| `faulty_addr_matched`, `wr_rma`, `rd_rma`, `addr_rma` | out | 1, 1, 1, 4 | repair activity |

Parameters: `ADDR_W` (10), `FM_W` (4, giving 16 spare rows), `NUM_PATTERNS`
(2; 8 for the full pattern set), and the fault-injection set `FI_*`.

## Fault injection

`sram_sp` takes `FI_N` entries of (address, stuck-at-1 mask, stuck-at-0
mask) as packed parameters `FI_ADDRS`, `FI_SA1` and `FI_SA0`. The read data
of a listed word has the masked bits forced. The defaults inject nothing,
and the extra logic then reduces away. The top passes these parameters
down, so a testbench can build a faulty memory without touching the RTL.

## What is assumed

These points are this design's own choices:

* The asynchronous memory read. It gives one operation per cycle, which
  matches the expected test time of 22N cycles.
* Both "any order" elements (the first W0 and the final R0) run ascending.
* S7 lasts one cycle. S8 returns to S0, and the host lowers `tm`.
* Each faulty address is stored once. The FM counter advances only on a new
  address. It stops when full instead of wrapping and overwriting.
* The spare row of a faulty word is the index of its FAM entry.
* The request/`ready` handshake, and "access complete" meaning that `rd`
  and `wr` were released.
* The reset behaviour (control state cleared, memories not cleared). The
  valid bits of the FAM. The sticky fault flag.

Known differences from the published demonstration:

* Addresses are stored in the order the test finds them. With faults at
  000h, 003h and 3FFh this order is 000h, 003h, 3FFh. The published
  waveform shows the FAM filled as 3FFh, 000h, 003h.
* The published waveforms show a 5-bit FAM index. Here that is the
  `{full, count}` value `fam_addr`; the counter itself is 4 bits.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. Build and run one
with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/mbist_pkg.sv tb/tb_mbistr_sram.sv --top-module tb_mbistr_sram -o sim
./obj_dir/sim
```

| testbench | what it shows |
|-----------|---------------|
| `tb_mbistr_full` | top at default parameters, no faults: a 22,529-cycle test with nothing reported, then a write and read-back of all 1024 words in one cycle each |
| `tb_mbistr_sram` | end to end. Stuck-at-1 MSB faults at 000h, 003h and 3FFh: 22,528 + 1 + 21 cycles, three stored addresses, 55h written to 003h reads back as 55h (`data_out = D5h`), random traffic over all words. A second memory with 18 faulty words fills the 16 spare rows; the last two stay faulty. Counts every mechanism (failing reads, S7, FAM writes, repeat detections, up and down elements, repaired reads and writes, full map) and fails if one never happens. |
| `tb_mbist_sram` | the self-test alone at 1024 words, P = 2 and P = 8 (84,018 cycles). A reference March model in the testbench predicts every failing read and its address. |
| `tb_mbist_ctrl` | the FSM operation by operation against an independently built list of operations, with faults injected at chosen reads |
| others | one per leaf block |

The memories are not reset. Verilator's random initial values do not
matter, because the test writes every word before reading it.

## Files

`rtl/`: `mbist_pkg` (patterns, state type), `sram_sp`, `mbist_mux`,
`pattern_regfile`, `addr_gen`, `ora`, `mbist_ctrl`, `mbist_sram`,
`fm_addr_gen`, `fam`, `fmu`, `mbisr_ctrl`, `mbistr_sram` (top).
