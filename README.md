# In-register duplication for a soft-error-tolerant integer register file

Most integer values a 64-bit processor produces need far fewer than 64
bits. A value that fits in 32 bits, or a 34-bit memory address, leaves the
upper half of its register as nothing but sign bits. In-register
duplication (IRD) uses that space. When such a *narrow* result leaves a
functional unit, its lower 32 bits are copied into its upper 32 bits. The
register file, the result bus and the bypass network then carry two copies
of the value. No extra register, register-file port or bus width is needed
beyond two flag bits. A per-half parity bit tells which copy is intact.
When an operand's lower half is found corrupted, the upper copy repairs it,
at the cost of one stall cycle.

This repository holds synthesizable SystemVerilog for the back end of a
superscalar integer datapath built this way. It covers the register read,
execute/bypass/parity-check and parity-encode/writeback stages for 8 ALU
lanes and 4 memory lanes over a 128-entry register file. Self-checking
testbenches come with it.

## The 66-bit IRD word

Every value is stored and moved as `{n1, n0, hi[31:0], lo[31:0]}` (`ird_word_t` in
`rtl/ird_pkg.sv`):

| n1 n0 | value class | upper half holds | restored 64-bit value |
|-------|-------------|------------------|-----------------------|
| 0 0 | regular (needs more than the patterns below) | bits 63..32 | `{hi, lo}` |
| 0 1 | 32-bit value: bits 63..31 all 0 or all 1 | copy of `lo` | `lo` sign-extended |
| 1 1 | 34-bit memory address: bits 63..33 zero, bit 32 one | copy of `lo` | `{32'h1, lo}` |
| 1 0 | reserved (treated as regular) | | |

So `n0` means "duplicated", and `n1` marks the address form. The upper half
of an address is always `0x00000001`, so it is rebuilt rather than stored.
The value is always restored from the **lower** half. Errors that hit only
the upper copy of a narrow value are therefore harmless.

Beside each word, the design keeps two **even parity bits**, `{hi, lo}`
(`ird_par_t`). Each is the XOR of its 32-bit half. The flag bits are not
covered by parity: a flipped flag goes undetected.

## Datapath and timing

```
          RR                    EX (Exec / Bypass / P_Chk)                  PE (P_Enc / WB / Dcache)
 iss_* -> regfile 66b  ----> bypass_mux -> parity_check ----------------+   result latch --> regfile write
          parity_reg 2b ---> (per operand)  operand_restore -> fu_op_a/b |   parity_enc  ---> parity_reg write
                                  ^                       fu_result -> width_detector   |        |
                                  |                                                     |        |
                                  +------ first-stage bypass: data + fresh parity <-----+--------+
                                                                  memory lanes: store_check -> st_*
```

* **RR (register read).** Both sources of each lane are read from the
  66-bit register file (`regfile`) and the 2-bit parity register
  (`parity_reg`). Both files forward a same-cycle write to a same-cycle
  read. A result written from PE is therefore visible to RR in the same
  cycle, and one bypass stage is enough.
* **EX.** `bypass_mux` picks, per operand, either a result that sits in PE
  or the value read in RR. If the operand comes from PE, the parity bits
  are the ones `parity_enc` computes for it in that same cycle.
  `parity_check` (P_Chk) regenerates both half parities and compares them
  with those bits. In parallel, `operand_restore` hands the 64-bit value to
  the external functional unit on `fu_op_a`/`fu_op_b`. The unit must
  return `fu_result` in the same cycle. `width_detector` classifies the
  result and duplicates it if it is narrow.
* **PE.** The latched 66-bit result goes out on the result bus (`wb_*`)
  and is written into the register file. `parity_enc` (P_Enc) computes its
  two parity bits, which go into the parity register through its own write
  ports. This is why the parity bits, which become ready one stage after
  the data, need neither an extra register-file write port nor a later
  writeback. On memory lanes, the store data passes `store_check` on its
  way to the cache (`st_*`).

An instruction accepted at a clock edge with `iss_ready` high is in EX for
the next cycle. Its result is on `wb_*` in the cycle after that and is
written at the end of that cycle. Dependent instructions may issue in
back-to-back cycles.

## Error detection and recovery

This is the part that needs the most care. Operands and store data use
different checks.

**Operands (P_Chk, `parity_check`).** Only parity is used, never the
comparison of the halves:

| operand | lower half parity | upper half parity | action |
|---------|-------------------|-------------------|--------|
| narrow | ok | any | none (an upper-half error is ignored) |
| narrow | bad | ok | **recover**: copy upper half into lower half, stall, replay |
| narrow | bad | bad | ERROR exception |
| regular | either half bad | | ERROR exception (no copy to recover from) |

Recovery in `ird_backend` takes exactly one extra cycle:

1. **Stall cycle.** Some lane in EX has an operand to recover (`rec_event`
   pulses). `iss_ready` goes low, so the issuer must hold its group. No
   result of any lane leaves EX. Every EX lane latches back its operands
   as resolved in this cycle. This includes operands taken from the
   bypass, whose producer is leaving PE. The repaired operand is stored
   with the upper half copied down and the upper parity bit as its new
   lower parity bit.
2. **Replay cycle.** The EX lanes run again on the captured operands. The
   bypass is not consulted, and the repaired operand now passes its check.

A lane raising an exception in the stall cycle is dropped from the replay,
so each exception is reported once. An exception never stalls by itself.
The faulting lane's result is simply not written, and `exc_event` tells
the surrounding system. The corrupted register is not rewritten by the
recovery. It stays corrupted until its next write, and every read of it
recovers again.

Limits that follow from parity: two flips in the same half pass unnoticed.
If the upper copy holds such an even-count error while the lower half has
a detected one, the "repair" copies wrong data.

**Store data (`store_check`).** Store data is checked where it enters the
data cache. This check compares the halves first, so that corrupted data
never reaches memory:

| store data | halves | lower parity | upper parity | result |
|------------|--------|--------------|--------------|--------|
| narrow | equal | ignored | ignored | store the value |
| narrow | differ | ok | any | store from the lower half |
| narrow | differ | bad | ok | store from the upper half (`st_recovered`) |
| narrow | differ | bad | bad | `st_exc` |
| regular | n/a | either half bad | | `st_exc` |

`cmp_err` reports, per operand, a narrow operand whose halves differ. This
is the plain comparison check of a duplication-only variant. In this
datapath it is for observation only and triggers nothing.

## Files

| module | role |
|--------|------|
| `rtl/ird_pkg.sv` | word and parity types, flag encoding, parity function |
| `rtl/nw_detector.sv` | three pattern detectors on bits 63..31 giving `n1n0` |
| `rtl/width_detector.sv` | detector plus duplication multiplexer, 64 to 66 bits |
| `rtl/parity_enc.sv` | P_Enc: two even parity bits |
| `rtl/parity_check.sv` | P_Chk: operand check, recovery decision, repaired operand |
| `rtl/operand_restore.sv` | 66 to 64 bits (sign extension / address form) and halves comparison |
| `rtl/store_check.sv` | comparison-first check at the data cache interface |
| `rtl/regfile.sv` | 128 x 66 register file, NRD/NWR ports, bit-flip port |
| `rtl/parity_reg.sv` | 128 x 2 parity register with its own write ports |
| `rtl/bypass_mux.sv` | first-stage bypass of data and fresh parity for one operand |
| `rtl/ird_backend.sv` | top: three stages, stall/replay control, all lanes |

Top parameters: `NUM_ALU = 8`, `NUM_MEM = 4` (lanes `NUM_ALU..` have the
store path), `NUM_PREGS = 128`, `OP_W = 8` (opaque opcode tag passed from
`iss_op` to `fu_op`). On ALU lanes the `st_*` outputs are constant zero.

### Fault-injection inputs

The top has inputs that model single-event upsets for reliability
experiments. Tie them to zero in normal use.

* `inj_rf_en/addr/bit` flip one bit cell of the register file at the
  clock edge. A write to the same entry in the same cycle wins.
* `inj_bus_mask[l]` flips wires of lane `l`'s result bus. The flip reaches
  both the register file and the bypass, but not the parity encoder, so
  the stored parity stays that of the clean value.
* `inj_byp_mask[l]` flips wires of the forwarded copy only.

## Where this RTL departs from, or adds to, the scheme

The value encoding, the three detectors, duplication on `n0`, the
per-half even parity, the check rules for operands and for store data,
parity checking overlapped with the first execute cycle, the
parity-encode stage after execution, the separate parity register, and
the forwarding of fresh parity bits are the scheme's own. The 128-entry
register file and the 8 + 4 lanes match its evaluated core.

The following are this design's choices:

* All functional units are outside the top and take one cycle. Multiply
  and divide units, load latency, the floating-point side, renaming and
  the issue queue are not included. Instructions arrive renamed on `iss_*`.
* When any lane recovers, all lanes in EX stall and replay together.
* Both register files forward same-cycle writes to reads (write before
  read). That is what lets a single bypass stage suffice.
* Store data is checked in the stage after EX, from the operand latched
  at the end of EX.
* Operand enables (`iss_use`), the opcode tag, the event outputs, the
  injection ports and synchronous active-low reset are additions.
* The reserved flag code `10` is handled as a regular value.
* No repair of the register-file copy after a recovery, and no hardware
  recovery for regular values.

## Verification

Each module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog. The expected
values are computed independently: value classes from signed ranges,
parity from a count of ones, reference arrays for the register files.

`tb/tb_ird_backend.sv` runs the top at its default size for 12,000 cycles.
It acts as issue logic, functional units and data cache, and keeps a
golden register model. It checks every result's value, encoding, parity,
lane and cycle. After a warm-up it injects register-file, result-bus and
bypass upsets. It tracks each flipped bit and predicts every recovery,
stall, exception and store outcome cycle by cycle. Each mechanism is
counted and must occur at least once: both narrow classes, bypass use,
recovery from each of the three error sites, ignored upper-half errors,
both kinds of exception, an exception during a stall, and store
recovery/exception.

`tb/tb_ird_seu_rates.sv` is a soft-error campaign on the same full-size
top. Each cycle it picks one register and one data bit uniformly and upsets
that bit with probability 1e-4 (600,000 cycles), then 1e-5 (1,200,000
cycles). The upset lands on the bypass wire if the register's new value is
being forwarded, on the result bus if the value is in flight, and in the
register-file cell otherwise. The instruction stream is random, with a
narrow-heavy value mix. The testbench checks every result and every
recovery or exception as above, and skips the value check only for results
of silently corrupted inputs. At the end it prints the share of narrow
writes and reads, the erroneous reads, and how many were detected,
recovered (truly or falsely) or raised as exceptions. On the synthetic mix
about two thirds of writes and reads are narrow. Every injected error that
reached an operand was detected, and every narrow lower-half error was
recovered from the upper copy. The run takes about a minute.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/ird_pkg.sv \
    tb/tb_ird_backend.sv --top-module tb_ird_backend -Mdir obj -o sim
./obj/sim
```

`-y rtl` lets Verilator find each module in the file of its name; the
package is named first. Replace the testbench file and top name to run a unit test, for example
`tb/tb_parity_check.sv` and `tb_parity_check`.
