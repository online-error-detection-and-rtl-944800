# Erratic-bit recovery for parity-protected register files

At low supply voltage some SRAM cells become *erratic*. For a while, from
microseconds to milliseconds, such a cell acts as a stuck-at-0 or stuck-at-1
cell. Then it works again. Register files are usually protected only by
parity. Parity detects the resulting single-bit error but cannot correct it.
Re-executing the producer helps only while that instruction is still in the
pipeline.

This RTL recovers the value anyway. It relies on one property of a stuck cell:
writing to it changes nothing. When a read fails parity, the register is read,
inverted, written back and read again. In the second read every healthy bit
comes back inverted. The stuck bit comes back unchanged, and after the first
inversion that is also the inverse of its correct value. So inverting the
second read gives back the original word, parity bit included. Comparing the
two reads also shows which bit is stuck, and tells an erratic bit apart from a
soft error (a one-time bit flip). The faulty register is then taken out of use
for a while and later given another chance.

Two ways of taking a register out of use are built, one per kind of core:

* `prf_protect`: cores that rename into a physical register file. The
  recovered value moves to a free register, the rename table is redirected to
  it, and the faulty register sits in a quarantine list for T cycles.
* `arf_spare`: cores with an architectural register file. The faulty register
  moves into a small spare file, into a slot chosen by the low bits of its
  number. Every T cycles the registers in the spare file move back.

`erratic_rf_top` places both side by side. They share nothing.

## The recovery sequence (`erratic_recovery`)

Words are stored raw, as `{parity, value}`. Parity is even: the whole word
always has an even number of ones. Parity is generated once, when a value is
written back from the pipeline (`parity_gen`). Recovery writes never recompute
it: the parity bit is inverted and moved like any other bit, so a stuck parity
cell is recovered the same way.

| state | action | latch |
|---|---|---|
| `RD_A` | read Rx | A |
| `CHK` | parity of A; if clean, stop: `REC_OK`, D = A | |
| `WR_B` | write B = NOT(A) into Rx | B |
| `RD_C` | read Rx again | C |
| `EVAL` | D = NOT(C), E = XNOR(A, C) | D, E |
| `DONE` | `done` pulse; E ≠ 0 → `REC_ERRATIC`, E = 0 → `REC_SOFT` | |

Worked example: an 8-bit value 00110011 with parity 0, and bit 3 stuck at 1.

```
stored / expected   00110011 (0)
A  (first read)     00111011 (0)   parity fails
B = NOT(A)          11000100 (1)   written to Rx; bit 3 stays 1
C  (second read)    11001100 (1)
E = XNOR(A, C)      00001000 (0)   ≠ 0: erratic bit, at bit 3
D = NOT(C)          00110011 (0)   the original word
```

The same faulty read caused by a particle strike behaves differently. The
cells are healthy, so C = B, E is all zeros and the value is reported lost
(`REC_SOFT`).

Why it works, and its limits:

* A stuck bit s with correct value v reads as s = NOT(v) (otherwise there is
  no error). B holds NOT(s) = v there, the cell ignores the write, and C
  holds s = NOT(v) there. Every other bit of C is NOT(original). So NOT(C) is
  the original word, and A and C agree only at the stuck bit.
* If the cell recovers between the first read and the write of B, the
  sequence sees a soft error. The value is then lost.
* Parity sees only an odd number of wrong bits. Two faults in one word, such
  as two stuck cells, or a stuck cell plus a flip, may go unseen. Several
  stuck bits in one word that parity does flag are still recovered, and E
  marks all of them.
* Latency from `start` to `done` is 6 cycles, or 3 when A turns out clean.
  The sequencer owns one read port and the write port while `busy` is high.

## Physical register file organisation (`prf_protect`)

Parts: `regfile_parity` (128 × 65 bits, two read ports, one write port),
`parity_gen` on the write path, a `parity_check` per read port,
`erratic_recovery`, `free_list`, `vccmin_list` (the quarantine list) and
`rat` (the rename table).

What happens on a failing read:

1. `rd_err[i]` and `stall` rise in the same cycle as the read. The pipeline
   must hold: `ren_grant` is forced low and writebacks are ignored while
   `stall` is high. Read port 0 is lent to the sequencer.
2. The sequence runs on the register that failed.
3. In the sequencer's `DONE` cycle the outcome is applied:
   * `REC_ERRATIC`: the lowest free register is taken. The recovered word D
     is written into it raw. Every rename-table entry that pointed to the
     faulty register now points to the new one (`rec_rat_hit` says whether
     any did). The faulty register joins the quarantine list.
   * `REC_SOFT`: nothing is moved. The value has to be regenerated by
     re-executing its producer, which works only if the producer has not yet
     left the pipeline.
   * `REC_OK`: the error was gone by the re-read; nothing to do.
4. One cycle later `rec_done` pulses with the report (`rec_result`,
   `rec_preg`, `rec_new_preg`, `rec_data`, `rec_err_mask`, ...). `flush`
   pulses for `REC_ERRATIC` and `REC_SOFT`, so the pipeline can re-execute
   from its oldest instruction. The report holds until the next recovery.

`stall` is high for 7 cycles, or 4 when the re-read is clean.

**Quarantine.** `vccmin_list` counts cycles freely. Every T cycles it hands
its whole list back to the free list in a one-cycle `vccmin_release` pulse.
A register that is still erratic is caught again on its next failing read and
quarantined again. While a register is in quarantine, a commit that returns
it (`rel_en`) is dropped.

**Remap only when needed.** A new register is taken only if some
rename-table entry points to the faulty one. Two cases skip the remap:

* The faulty register holds an older version, which only in-flight
  instructions still use.
* The free list is empty.

In both cases D is written back into the faulty register itself and nothing
is quarantined (`rec_remapped` = 0). This way no register is left allocated
with nothing pointing to it. The value is right until the stuck cell corrupts
it again, and the next failing read recovers it again.

What is left to the surrounding pipeline: draining in-flight instructions
before the recovery, flushing and re-executing, and making sure the rename
state it restores after a flush matches the redirected rename table.

## Architectural register file organisation (`arf_spare`)

Here registers cannot be renamed away. There is a normal file of NARCH
entries and a spare file of NSPARE entries. Register t may only use spare
slot `t mod NSPARE`, which is the low bits of its number, as in a
direct-mapped cache. The bit vector `in_spare` records which bank holds each
register. Every read reports that bit (`rd_bank`), and reads and writes go
straight to the right bank.

When the sequence runs on a register it works on whichever bank holds the
register. On `REC_ERRATIC`:

* **Register in the normal file.** The recovered word goes to its spare slot.
  The slot may already be in use; this is found by ORing the `in_spare` bits
  of all registers that share it. If it is, the current owner's value is
  copied back to the owner's normal entry in the same cycle, and both bits
  are updated (`rec_evicted`, `rec_evict_tag`).
* **Register in the spare file.** The spare entry itself is faulty, so the
  recovered word goes back to the register's normal entry.

`REC_SOFT` moves nothing. Both outcomes pulse `flush`.

**Re-enabling.** Every T cycles all spare residents are moved back to the
normal file, one per cycle, with `stall` high (`migrating`). A normal entry
that is still faulty is caught again when it next fails. The stall lasts 7
cycles per recovery, as in the physical organisation.

## Modelling the faults

`regfile_parity` has injection inputs. In a real array they are tied to
zero:

* `inj_stuck_we` sets a stuck mask and stuck values for one entry. A stuck
  cell keeps its value through every write. Writing a zero mask ends the
  erratic period, and the cell keeps whatever it last held.
* `inj_flip_we` flips the masked bits of one entry once. This is a soft
  error.

`prf_protect`, `arf_spare` and the top pass these inputs through. In
`arf_spare`, `inj_bank` selects the spare file, and the spare slot is
`inj_addr mod NSPARE`.

## Parameters

| parameter | default | origin |
|---|---|---|
| `NPHYS` | 128 | integer register count of the evaluated core |
| `W` (value width) | 64 | chosen; the scheme works for any width |
| `NARCH` | 16 | chosen (x86-64 integer registers) |
| `NSPARE` | 4 | chosen; must be a power of two |
| `NRD` (read ports) | 2 | chosen |
| `T` (quarantine period) | 1,000,000 cycles | chosen; only "millions of cycles" is known |

Defaults live in `erratic_pkg`.

## Departures and gaps

* Only one 128-entry file is built, the integer one. The evaluated core also
  has a 128-entry floating-point file. It would be a second `prf_protect`
  with its own width.
* There is no variant for register files without parity. Such a variant
  would verify every read on the fly, with invert/latch/XNOR hardware per
  read port and extra or shared write ports. It is left out for two reasons:
  * No procedure for it is given.
  * Without a detection bit, the invert-and-re-read sequence finds a stuck
    cell but cannot tell whether the first read was right at that bit. When
    the stuck value happens to equal the stored bit, NOT(C) is wrong there.
  Any version that recovers values would therefore be a new design.
* The host core is not included: pipeline, reorder buffer and the
  flush-and-re-execute machinery. Its side of the interface is brought out as
  ports.
* The following are this design's own choices, where the scheme leaves them
  open: the cycle timing, one state per step, the free-list and quarantine
  formats, the fallback when no register is free, the handling of a faulty
  spare entry, the one-at-a-time migration, and even parity.

## Files

`rtl/`: `erratic_pkg` (types, defaults), `parity_gen`, `parity_check`,
`regfile_parity`, `erratic_recovery`, `free_list`, `vccmin_list`, `rat`,
`prf_protect`, `arf_spare`, `erratic_rf_top`.

`tb/`: one self-checking testbench per module (`<module>_tb`), plus
`erratic_rf_top_full_tb`, which runs the top with every default parameter.

## Simulating

With Verilator 5 (`-y rtl` lets it find modules by file name):

```
verilator --binary --timing -Wno-fatal -y rtl rtl/erratic_pkg.sv \
    tb/erratic_rf_top_tb.sv --top-module erratic_rf_top_tb
./obj_dir/Verratic_rf_top_tb
```

Every testbench ends with `TB_RESULT checks=N failures=M`. Each has a
watchdog that counts a failure and stops a run that hangs.

* The unit testbenches compare against independent reference models. The
  `erratic_recovery` test includes the worked example above bit for bit. The
  unit tests also check the 6-cycle and 7-cycle latencies.
* `erratic_rf_top_tb` runs 1,500 random operations on each organisation at a
  reduced size (32 physical registers, 8 architectural, 2 spares, 16-bit
  values, T = 500). It injects stuck bits that come and go, and soft errors,
  and checks every read and every recovery against a model. It counts each
  mechanism and fails if any never happened: remap and quarantine, soft
  error, clean re-read, quarantine release, move to spare, eviction, faulty
  spare entry, migration.
* The random test keeps faults single per word, since parity cannot see
  double errors.
* `erratic_rf_top_full_tb` takes the default-size top through one recovery
  of each kind and through a full T = 1,000,000-cycle quarantine period. It
  runs in a few seconds.
