# Self-assertion checkers for a 5-stage RISC-V core

A permanent fault inside a processor (a stuck gate, a slowed path, an
inverted signal) can make the processor run on in a corrupted way. When that
processor handles secrets, for example an AES key, the corruption can push
the secret out of a port such as the serial line. This design catches such
faults early and cheaply. It does not duplicate the processor. It attaches a
set of **self-assertion-based checkers (SABC)** to signals the processor
already has.

Each checker compares two views of the same fact that come from physically
different places in the processor:

- the left-hand side is a value the processor really produced;
- the right-hand side is rebuilt by the checker from other signals, or from
  the decoded instruction type.

If the two disagree, the checker sets a sticky error flag. Any flag raises
`halt`, which is meant to stop the processor and put it in a fail-safe state
before leakage can happen.

The checkers are joined by a second, independent countermeasure: a **transition
counter** on one well-chosen internal node. A fault that changes how often
the node toggles shows up as a count different from the fault-free count.

Around both sits a **fault-emulation engine**. It runs the processor for a set
number of cycles, records what the processor did and reads the counter out
over scan chains. A managing program drives it through two 32-bit GPIO words.

The processor itself (an in-order RV32I core with fetch, decode, execute,
memory and write-back stages) is not part of this RTL. The design takes the
processor's pipeline signals as input ports.

## Block map

```
sabc_system
├── sabc_top                 countermeasure module
│   ├── op_decoder           instruction word -> one of 43 types (op_code)
│   ├── sabc_track           carries fetched word / op_code / immediate down the pipe
│   ├── rfi_sabc             Reconstitute Full Instruction
│   ├── dio_sabc             Derive Intent of Operation
│   ├── crc_sabc             datapath, ALU and branch CRC checks (7 x crc_lite)
│   ├── src_sabc             shadow register file of CRCs (2 x crc_lite)
│   └── fic_cell             transition counter + fault-injection cell
│       └── fi_cell          SA0 / SA1 / delay / inversion on one node
└── fe_engine                run control, address/serial capture, scan driver, GPIO
```

`sabc_pkg` holds the shared types:
- the `op_e` instruction-type enum;
- the control constants each type implies (`exp_ctrl`);
- the per-stage view structs;
- the reference functions used by the checkers: `crc8`, `alu_eval`, `branch_eval` and `size_mask`.

## What the checkers see

The monitored core is described by one packed struct per stage. These are sampled on the
rising clock edge:

| struct | fields |
|---|---|
| `if_view_t` | `imem_addr`, fetched `instruction`, `instr_ready` |
| `de_view_t` | decode instruction register, `immediate`, `rs1_addr`, `rs2_addr` |
| `ex_view_t` | execute-register `rs1/rs2/rd/csr` addresses, `funct3`, `alu_op`, `mem_op`, `mem_size`, `pc`, `alu_x`, `alu_y`, `alu_result`, forwarded `rs1`/`rs2` data, `branch_taken` |
| `mem_view_t` | `mem_op`, `mem_size`, `dmem_addr`, `dmem_data_out`, `mem_rd_data`, `rd_write` |
| `wb_view_t` | `wb_rd_data`, `rd_addr`, `rd_write` |

The pipeline is described by two more inputs:
- `advance` is high when the pipeline moves.
- `flush` is high, together with `advance`, when a taken branch or jump in execute discards the two younger instructions.

The register file's two read ports, `rf_rs1_data` and `rf_rs2_data`, are also inputs. The register file reads synchronously: the addresses are presented in decode and the data appears in execute.

The core's own control encodings are not known to this design, so the
structs use the package's encodings:

| field | encodings |
|---|---|
| `alu_op` | NOP, ADD, SUB, AND, OR, XOR, SLT, SLTU, SLL, SRL, SRA |
| `mem_op` | none / load / store |
| `mem_size` | word / byte / half |

Operand conventions:
- LUI is `0 + imm`.
- AUIPC is `pc + imm`.
- JAL and JALR compute the link, `pc + 4`.
- Branches compute the target, `pc + imm`.
- Loads and stores compute `rs1 + imm`.

An adapter in the core maps its own signals onto these structs.

### Following each instruction: `op_decoder` and `sabc_track`

`op_decoder` looks at the decode-stage instruction register and names one of
43 types:
- the 37 RV32I computational, memory, jump and branch instructions;
- the 6 Zicsr instructions.

Anything else is `OP_INVALID` and is not checked.

`sabc_track` is the checker side's own short pipeline. It carries, for every slot:
- the word as it came out of the instruction memory;
- its `op_code`;
- its decoded immediate.

These move through execute, memory and write-back under the same `advance`/`flush` as the core. Each checker therefore knows what the instruction in each stage was supposed to be, from a copy the core cannot have corrupted later.

## The four checkers

All four work the same way:
- Each raises a combinational `fail` in the cycle the disagreement is visible.
- `fail` sets a sticky `err` flag at the next clock.
- `halt = |err`.
- `fail` is gated by the slot being valid, so bubbles and flushed slots never fire.

### RFI — Reconstitute Full Instruction

RFI rebuilds the 32-bit instruction word from the pieces the execute stage
holds, following the format of its type (R, I, S, B, U, J or CSR):
- the register addresses, the CSR address and `funct3` from the execute register;
- the immediate that travelled with the instruction;
- for shifts by an immediate, the shift amount from `alu_y`;
- the opcode and `funct7` from the type's constants.

It then compares the result with the word originally fetched. This catches:
- decoder faults;
- corrupted execute-register fields;
- a corrupted instruction register.

### DIO — Derive Intent of Operation

DIO checks the execute stage's control signals against constants implied by the type:
- `alu_op` and `mem_op` for every type;
- `mem_size` for loads and stores.

It also checks that the fetch address is word aligned whenever an instruction is accepted. This targets control-signal faults that leave the instruction fields intact, which RFI cannot see.

### CRC — datapath and functional-unit checks

Comparing 32-bit values everywhere would be costly, so each side of a
comparison is first compressed by `crc_lite`. This is an 8-bit check built from
eight 4-input XOR gates: bit *i* of the check is
`d[i] ^ d[i+8] ^ d[i+16] ^ d[i+24]`. Any single wrong bit always changes the
check, and so does any error confined to one byte.

`crc_sabc` performs three groups of checks.

**Datapath pairs.** A value is checked where it is produced and again where it is used:
- `alu_result` in execute against `dmem_addr` in the memory stage;
- store data, `rs2` in execute, against `dmem_data_out` in the memory stage. Both sides are masked to the access size first.
- `mem_rd_data` in the memory stage against `wb_rd_data` in write-back, for every type that writes a register.

The source-side check is registered when the pipeline advances. It is compared one stage later. This catches faults in the pipeline registers and the wiring between stages.

**Redundant ALU.** A small local ALU recomputes the result of every type that uses the ALU:
- the operands come from the forwarded register values, `pc`, the immediate or the constant 4, chosen by the type, not by the core's operand multiplexers;
- its check is compared with the check of the core's `alu_result`.

Faults in the core's operand selection, forwarding network or ALU all show here.

**Redundant branch comparator.** The branch condition is recomputed from the forwarded operands and compared with the core's `branch_taken`. Jumps must always be taken, and everything else never.

`crc_cause` shows which of the three parts fired.

### SRC — Shadow Register Checker

`src_sabc` keeps a 32 × 8-bit shadow register file:
- Every write-back stores `crc_lite(wb_rd_data)` at the same address.
- When decode reads two registers, the shadow is read at the same addresses with the same timing: synchronous, write-first for a same-cycle write-back, and `x0` always zero.
- In execute, the check of each real read-port value is compared with the shadow entry.

This covers:
- the register file's cells;
- its address decoders;
- its read multiplexers.

The cost is a quarter of the storage of a full copy.

## The counter countermeasure: `fic_cell` and `fi_cell`

`fi_cell` holds a 3-bit configuration loaded over three scan chains:
- chain 0 is the enable;
- chains 1 and 2 select the fault type: `00` stuck-at-0, `01` stuck-at-1, `10` delay, `11` inversion.

The delay fault passes on the node's value from the previous clock. When disabled, the node passes through unchanged.

`fic_cell` adds two 17-bit registers.

**Cnter** counts the rising and falling transitions of the node while `cnt_en` is high:
- it saturates at all ones;
- it clears in any cycle with `scan_en` high.

**ScanCnter** follows Cnter while counting and holds otherwise. When `scan_en` is high it shifts, as the tail of the three chains:

```
chain 0: scan_in[0] -> cfg.en    -> FF[7]  ... FF[0]  -> scan_out[0]
chain 1: scan_in[1] -> cfg.type0 -> FF[15] ... FF[8]  -> scan_out[1]
chain 2: scan_in[2] -> cfg.type1 -> FF[16]            -> scan_out[2]
```

After a run, bits 0, 8 and 16 are visible before the first shift. Eight shifts bring out the rest, least significant bit first. Shifting in a new configuration clears the count for the next run. Because ScanCnter holds between shifts, the scan may be paced by software, one shift at a time.

The node best worth watching lies in the reduction logic of the branch comparator, where the register-equality test is built. Faults anywhere upstream tend to change how often that node toggles. In the testbenches the watched node is the equality of the low four bits of the two branch operands.

The counter does not decide anything by itself. Software compares the scanned count with a fault-free run of the same program.

## The fault-emulation engine: `fe_engine`

The engine is what one fault-injection experiment runs on. Its GPIO command word is:

```
gpio_cmd = {toggle, cmd[2:0], arg[27:0]}     gpio_rsp = {data[30:0], ack}
```

A command runs in the first clock after `toggle` changes, so each write runs exactly once. The response is registered one clock later, and `ack` then equals the toggle.

| cmd | name | effect / data |
|---|---|---|
| 0 | STATUS | `{serial count[15:0], history count[5:0], 2'b0, halt, err[3:0], done, running}` |
| 1 | SET_LIMIT | run length in cycles (28 bits) |
| 2 | START | clear the records and run; `core_run` and `cnt_en` stay high for exactly the limit |
| 3 | READ_HIST | address[31:1] of the arg-th newest address-bus change (0 = newest) |
| 4 | READ_SER | serial byte number arg |
| 5 | SCAN | one scan shift with `scan_in = arg[2:0]`; data = `scan_out` before the shift |
| 6 | CYCLES | cycles run so far |
| 7 | STOP | end the run now |

During a run the engine keeps two records:
- the last 50 distinct changes of the fetch address bus, in a circular buffer;
- the first 64 bytes the core writes to its serial port, plus a count of all of them.

Both records are only written while the core runs. `core_run` is the core's clock enable, and the core must hold its state while it is low.

The run limit allows a latency search. Binary search over the run length, in 1024-cycle steps, finds the first cycle at which a fault's effect shows:
- in the serial bytes;
- in the address history;
- in the error flags;
- in a counter.

A 6.7-million-cycle AES run needs 13 such runs.

`sabc_system` wires the engine to the countermeasure module:
- the engine's run window is the counter's `cnt_en`;
- its SCAN command drives the counter's chains;
- its status word reports the checkers' flags;
- its address input is the fetch address in `if_v`.

## Timing summary

- Monitored signals are sampled at the rising edge. `fail` is combinational in the same cycle. `err` and `halt` follow one clock later and stay high until reset.
- Datapath CRC pairs are compared one stage after the source value, registered when `advance` is high.
- The shadow register file is read when `advance` is high, one cycle before the data it is checked against.
- The reset `rst_n` is asynchronous and active low. The shadow file resets to all-zero checks, which is the check of a zeroed register file.

## Sizes after a generic yosys synthesis

These are cells in yosys' generic library, not the standard-cell gates of an ASIC flow.

| block | cells | flip-flop bits |
|---|---|---|
| sabc_top (all four checkers + decoder + tracking + one counter cell) | 602 | 456 |
| of which crc_sabc | 369 | 25 |
| of which src_sabc | 156 | 273 |
| of which fic_cell | 20 | 38 |
| fe_engine | 114 | 153 (+2112 memory bits) |

The published ASIC results for this scheme are:
- logic overhead of about 16% of the core for RFI+DIO+CRC and 12% for the shadow checker;
- about 2% for one counter;
- a 5.7% drop in maximum clock, from 175 to 165 MHz on an FPGA.

This RTL has not been timed.

## Where this design goes its own way

- **Signal encodings and the adapter.** The structs, the `alu_op`/`mem_op`/`mem_size` encodings and the operand conventions above are this design's. A real core needs an adapter to map onto them.
- **RFI covers every one of the 43 types.** The published scheme checks only the most common ones. RFI takes the opcode and `funct7` from the type's constants, not from a core signal.
- **DIO's fetch-address check** is word alignment. The exact relation used for the fetch address is not specified.
- **CRC checks are fewer and wider.**
  - The published scheme uses about ten CRC instances for its ALU checks. Here a single redundant ALU produces one result to check, so `crc_sabc` holds 7 instances in all.
  - The redundant ALU also covers SLT/SLTU, load/store addresses and LUI/AUIPC.
  - The redundant ALU takes its operands from the forwarded register values, `pc`, the immediate or 4, and never from the core's `alu_x`/`alu_y`. A fault in the core's operand multiplexers therefore also shows.
  - The bit grouping of the 8-bit CRC is this design's.
- **Counter width and behaviour.**
  - 17 bits follows the flip-flop numbering FF[0..16] of the published cell.
  - Saturation, and ScanCnter holding between shifts, are choices made here.
  - A node that toggles every cycle of a 6.7-million-cycle run would saturate. A saturated count still differs from a smaller fault-free count.
- **Delay fault** is modelled as one full clock of delay on the node.
- **Engine protocol.** The command set, word layout, toggle handshake and 64-byte serial buffer are invented here. So is the assumption that the GPIO words share the engine's clock.
- **Not built:**
  - the XOR-check (XRC) register-file checker, an alternative to the shadow checker that is weaker on read-multiplexer faults and would not be used beside it;
  - the fault-injection instrumentation of the whole core's gate netlist, which has tens of thousands of sites and depends on the core's netlist. One `fi_cell` and one `fic_cell` are given; their chains daisy-chain.
  - the managing software and the FPGA's processor system;
  - duplication of the four error flags and `halt`, with a comparison between the copies. A fault could otherwise hold a flag low, and the duplication would guard against that. It is an optional hardening step: add a second sticky register per checker, fed from the same `fail`.
- Both `halt` and the error flags are left for the integrator to act on. Nothing here disables the core.

## Verification

Every module has a self-checking testbench in `tb/`:
- each uses `$urandom` stimulus, a watchdog and a final `TB_RESULT checks=… failures=…` line;
- each was also confirmed to fail on an empty module and on a deliberately broken copy of its module.

`tb_rv_pkg` is the testbenches' own RV32I toolkit, written separately from the RTL package:
- an encoder;
- an immediate extractor;
- a reference ALU and branch unit;
- a control table;
- a random instruction generator whose branches, jumps, loads and stores stay inside a small program and 1 KiB of data.

| testbench | what it does |
|---|---|
| `tb_crc_lite` | walking ones and random words against a byte-XOR reference; every single-bit error changes the check, and the function is linear |
| `tb_op_decoder` | every type with random fields; FENCE, ECALL, illegal `funct7` variants and other opcodes must come out as `OP_INVALID` |
| `tb_rfi_sabc` | consistent instructions pass; one flipped bit in the fetched word, a register address, `funct3` or the immediate fails |
| `tb_dio_sabc` | consistent control passes; a wrong `alu_op`, `mem_op`, `mem_size` or misaligned fetch fails |
| `tb_crc_sabc` | a stage-by-stage pipeline model; one-bit damage on each checked path fails, and a clean flow never does |
| `tb_src_sabc` | clean traffic with bypasses; a flipped stored bit, a write steered to the wrong register or a stuck read-multiplexer bit fails |
| `tb_fi_cell` | all four fault types after a scan load, and scan-through |
| `tb_fic_cell` | random node activity; count, saturation and scan-out with random gaps between shifts |
| `tb_fe_engine` | 40 runs of random length driven only over GPIO; run length, STOP, history, serial bytes, status and scan |
| `tb_sabc_top` | see below |
| `tb_sabc_system` | see below |

The end-to-end testbenches, `tb_sabc_top` and `tb_sabc_system`, place the design beside a model of the 5-stage core. The model has these features:
- it fetches random instructions of all 43 types and executes them at fetch;
- it moves them through the five stages with random stalls, fetch bubbles, and two-slot flushes after taken branches and jumps, with wrong-path instructions in the flushed slots;
- it has a separate physical register file with synchronous reads.

The tests run these episodes:
- a 20 000-cycle fault-free run, in which no checker may ever fire;
- four damage episodes (decode-register bit, `alu_op`, ALU result, stuck register-file bit), each of which must be caught by the intended checker and raise `halt`;
- injected faults on the counter node.

`tb_sabc_system` does all of this through the GPIO engine and also checks the recorded address history and serial bytes. Each test counts every mechanism (stall, bubble, flush, load, store, serial write, each checker, halt, STOP, scan-out, fault injection) and fails if any never happened.

`tb_sabc_system` runs the top at its default parameters.

`tb_latency_search` runs the latency analysis on the full system:
- A fault-free random program runs for 6,717,440 cycles, the length of a complete AES run in the published evaluation. About 4 million instructions execute, and no checker may fire in any cycle.
- A permanent fault is a register-file bit stuck at 1. For each such fault, a binary search over the run length finds the shortest run that ends with the error flags set. The search uses only GPIO commands: set the limit, start, read the status.
- Every trial restarts from reset with the generator reseeded, so runs replay cycle for cycle.
- The search result must match a reference run that watches the checkers in every cycle.
- One search uses 1024-cycle steps over the full length, and it may take at most 13 trials. Six more use 32-cycle steps over 4096 cycles.

The whole test takes about half a minute.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal --top-module tb_sabc_system \
    -y rtl -y tb +libext+.sv rtl/sabc_pkg.sv tb/tb_rv_pkg.sv tb/tb_sabc_system.sv
./obj_dir/Vtb_sabc_system
```

Replace the testbench name to run any other. Each prints `TB_RESULT checks=N failures=0` when it passes. The system test takes well under a minute.

To change a size:
- `fe_engine` takes `HIST_DEPTH` and `SER_DEPTH`;
- `src_sabc` takes `NREGS`;
- `crc_lite` takes the bus and check widths.

The counter width is a local parameter of `fic_cell`. Its scan split assumes 17 bits.
