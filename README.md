# Banked register file with compiler-controlled leakage reduction

A VLIW processor with several issue slots shares one large, heavily
multi-ported register file. Such a file leaks a lot, and most of the time
most of its registers hold nothing a running program needs. This design cuts
the shared register file into banks and lets each bank drop into a
low-power state (reduced supply voltage) on its own. Hardware does not guess
which banks are idle. The compiler decides:

* it assigns registers so that all operands of one instruction lie in the
  same bank, and it fills the lowest bank first, so a program with modest
  register pressure lives in one or two banks;
* in front of every basic block it inserts a *bank power instruction* that
  names the banks the block uses. Every other bank sleeps while the block runs.

The hardware side is small. It is a per-bank power state register, the decode
that sends each port only to the bank it addresses, and a flag for accesses
that break the rules. Because the compiler wakes a bank before the block that
needs it, the file never stalls.

The RTL here covers the register file subsystem of a 4-issue, 32-bit VLIW
machine. That is 128 registers with 8 read and 4 write ports (two reads and
one write per slot), in 8 banks of 16 registers. It also contains the crossbar
from each slot's ports to its functional units. 2- and 4-bank versions are
parameter overrides.

## Files

| file | module | role |
|---|---|---|
| `rtl/rf_pkg.sv` | package | sizes: 32 bits, 128 registers, 8 banks, 4 slots, 2R+1W per slot |
| `rtl/rf_bank.sv` | `rf_bank` | one bank: storage, all 8R/4W ports, gated by its power state |
| `rtl/banked_rf.sv` | `banked_rf` | the whole file: address → (bank, word) decode, per-bank enables, read-data merge |
| `rtl/bank_power_ctrl.sv` | `bank_power_ctrl` | per-bank power state, loaded by the bank power instruction |
| `rtl/slot_xbar.sv` | `slot_xbar` | full crossbar from a slot's 2 read + 1 write port to its functional units |
| `rtl/banked_rf_top.sv` | `banked_rf_top` | top: power controller + banked file + 4 slot crossbars |

## How registers map to banks

Bank `b` holds registers `b*16 … b*16+15` (in general, register `r` is word
`r % (NUM_REGS/NUM_BANKS)` of bank `r / (NUM_REGS/NUM_BANKS)`). Contiguous
banks match the compiler policy of filling the first bank first. Each bank
has all 8 read and 4 write ports. Banking does not reduce the port count per
bank here: its purpose is power gating, not a smaller bank cell.

`banked_rf` decodes each port's register number and raises that port's enable
at the one bank it addresses. A bank that is not addressed by a port drives
zeros on that port's output. The port's read data is then the OR over all
banks, which works as a one-hot multiplexer.

## Power states and the compiler contract

This is the part that needs care when using the RTL.

* **Power instruction.** `pwr_valid` for one cycle with `pwr_mask`, where bit
  `b` = 1 keeps bank `b` powered. The mask is the complete new state, not a
  set/clear delta. It takes effect at the next rising edge. So the power
  instruction occupies one cycle in front of the basic block, and the block's
  first bundle already sees the new state.
* **Reset** powers every bank. This is the behaviour of a file that knows
  nothing of banking. The program's first power instruction then turns off
  what it does not use.
* **Outputs to the supply.** `bank_lp[b]` (= `~bank_on[b]`) is the request
  to bank `b`'s voltage supply to lower the voltage. The supply is analog and
  is not part of this RTL. `on_count` is the number of powered banks.
  Summed over cycles, it gives the register file's leakage in bank-cycles.
* **Sleeping banks keep their data.** The supply is lowered, not cut, so a
  bank that is powered again returns what it held before. While asleep, a bank
  ignores writes and reads as zero.
* **Rule violations.** An access to a sleeping bank is a compiler error. The
  hardware does not stall or wake the bank. It suppresses the access and
  raises `sleep_access[b]` for that cycle. `bank_used[b]` shows every bank
  touched in the cycle, whatever its state.
* **No wake-up delay is modelled.** A bank is usable in the cycle after the
  instruction that powers it. A real voltage ramp would require the compiler
  to place the power instruction earlier. It would not change this logic.

## Ports and timing of the slots

Slot `s` uses file read ports `2s` and `2s+1` and write port `s`. Reads are
combinational. The operands reach the functional units (`fu_opa`, `fu_opb`)
in the cycle the addresses are presented. Writes happen at the rising edge.
A read in the same cycle as a write to the same register returns the old
value, and there is no bypass. If two slots write the same register in one
cycle, the higher-numbered slot wins.

The slot crossbar gives each functional unit's operand A and B a free choice
of the slot's two read ports (`opa_sel`, `opb_sel`). The write port takes the
result of the unit named by `wb_sel`. The functional units themselves depend
on the instruction set chosen for the machine. They are outside this RTL and
connect through `fu_opa`/`fu_opb`/`fu_result`. `NUM_FU` (units per slot)
defaults to 2.

## Leakage results the design reproduces

`tb/tb_leakage_workloads.sv` runs the experiment on 2-, 4- and 8-bank files.
A compiler model packs a given number of live registers into banks. The bank
power instruction names the banks that hold them, and the test measures the
powered fraction of bank-cycles. That fraction is the leakage relative to an
always-on file. Eight register-pressure profiles stand in for the evaluated
applications:

| profile (application it stands for) | live regs | 2 banks | 4 banks | 8 banks |
|---|---|---|---|---|
| adpcm_decode, g721_decode, epic | 12–14 | 0.50 | 0.25 | 0.125 |
| sha | 28 | 0.50 | 0.25 | 0.25 |
| mesa_texgen, aes, blowfishencode | 60 | 0.50 | 0.50 | 0.50 |
| mpeg2decode | 127 | 1.00 | 1.00 | 1.00 |
| average of the 8 profiles | | 0.5625 | 0.4375 | 0.3906 |

The live-register counts are not measured from the applications. They were
chosen so that the levels match the published per-application results, and
the averages then match as well. One inconsistency in those results: the
text lists mesa_texgen among the applications that gain most from 8 banks,
but its published bars are at 0.5 for all three bank counts. The profile
follows the bars. In every profile, the same number of registers assigned
without the bank rule, from a shuffled free list, uses nearly all banks.
This shows that the saving comes from the compiler's assignment rule.

The per-bank power-control logic itself costs 8 flip-flops and a few gates
(see `bank_power_ctrl`). The published area overhead is about 2% of the
register file.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal --top-module tb_banked_rf_top \
  -y rtl -y tb +libext+.sv rtl/rf_pkg.sv tb/tb_banked_rf_top.sv
./obj_dir/Vtb_banked_rf_top
```

Replace the top module and file for the other testbenches:

* `tb_rf_bank`, `tb_banked_rf`, `tb_bank_power_ctrl`, `tb_slot_xbar` are unit
  tests against reference models.
* `tb_banked_rf_top` is the end-to-end test at the default size, with no
  parameter overrides. A compiler model assigns registers bank by bank from a
  FIFO and emits a power instruction before each of 60 basic blocks.
  Behavioural functional units (add, XOR) sit in the slots. Every operand and,
  at the end, every register is checked. The test also counts each mechanism:
  a bank turned off, a bank woken with its data intact, four writes in one
  cycle, two slots writing one register, crossbar use of both ports and both
  units, and a detected access to a sleeping bank. It fails if one of them
  never happens.
* `tb_leakage_workloads` (with helper `tb/leakage_bench.sv`) is the leakage
  experiment above.

All of them finish in well under a second. The simulator used is two-state,
so the RTL resets what it reads. The register file is cleared by `rst_n`.

## Changing the configuration

The sizes live in `rf_pkg` and are the defaults of the module parameters.
`banked_rf_top` takes `NUM_REGS_P`, `NUM_BANKS_P`, `NUM_SLOTS_P`, `NUM_FU`
and `DATA_W_P`. `NUM_REGS_P` must be a multiple of `NUM_BANKS_P`, which is
checked at elaboration. The register number width follows from `NUM_REGS_P`.

## What follows the architecture and what is this design's own

Taken from the architecture: a 32-bit, 4-issue machine; a 128-entry shared
file with 8 read and 4 write ports; two reads and one write per slot; a full
crossbar inside a slot; a file split into independently accessed banks
(8, 4 or 2); per-bank low-power state by voltage scaling; and bank state set
by compiler-inserted instructions before each basic block.

Chosen here, because the architecture leaves it open:

* the bank mapping (consecutive registers);
* the power instruction as a full mask, with one-cycle effect and no wake-up
  delay;
* all banks on at reset;
* data kept in the low-power state;
* suppression and flagging of accesses to sleeping banks;
* combinational reads, no bypass, and the higher slot winning a write
  conflict;
* two functional units per slot;
* the extra observation outputs `on_count` and `bank_used`.

The architecture's drawing shows three processing slices, while its
evaluated machine has four issue slots. This RTL has four.

Not included:

* the functional units of the slots;
* the per-bank voltage supply, which is analog, has no specified interface,
  and is driven through `bank_lp`;
* the control processor, L1 instruction and data caches, unified L2 cache
  and external memory around the VLIW;
* the compiler. Its register assignment rule exists only as a model inside
  the testbenches.
