# Information Flow Signatures: a hardware guard for critical data

A program often has a handful of values that decide everything: the flag that
says a password was right, the name of the logged-in user, the path a server
is about to open. An attacker who can run code inside the process, such as a
malicious library, a format-string bug or an insider's backdoor, does not need
to break the algorithm. It only has to overwrite that value. This design
catches such writes in hardware, next to an unmodified in-order processor,
without slowing the processor down.

The idea is the **information flow signature** (IFS). Static analysis of the
program finds the critical data and the store instructions that may legally
write it. These are the instructions in the backward slice of the critical
value. At start-up the program hands two tables to the hardware:

* the **instruction signature**: the PCs of the trusted stores;
* the **data signature**: the addresses of the critical words and their
  trusted initial values.

From then on the hardware keeps its own copy of every critical word:

* A trusted store writes both memory and the copy.
* Any other store writes only memory.
* Every load from a critical address is compared with the copy. A difference
  means something untrusted wrote the word, and the load is trapped before it
  retires.

The same framework carries a second, reliability-oriented checker, **critical
value recomputation** (CVR). It recomputes a critical variable along the
control path the program actually took and compares the result with the value
the program produced.

Both checkers sit behind the **Reliability and Security Engine** (RSE). The
RSE taps probe signals out of the host pipeline and gives each checker a port
of its own.

```
            host pipeline (SPARC V8, 7 stages: FE DE RA EX ME XC WB)
                 | probes (rse_probe_t)                 ^ trap, de_chk_nop
                 v                                      |
   +-------------------------- rse_top ------------------------------+
   |  rse_interface: port enable, alarm -> trap, CHK decode, cause    |
   |      port 0                               port 1                 |
   |   ifs_module                             cvr_module              |
   |    FE  -> ifs_isig (PC lookup)            path tracker           |
   |    CHK -> ifs_chk_handler                 rule table, checker    |
   |    EX  -> signature control                                      |
   |    MEM (= host ME, XC, WB) -> ifs_dsig (address/data CAM)         |
   +------------------------------------------------------------------+
```

## CHK instructions: how software talks to the checkers

The program reaches the hardware only through CHK instructions. A CHK is a
SPARC V8 coprocessor-operate word (CPop1: op = 2, op3 = 0x36), and the host
executes it as a NOP. It is built as

```
word = 0x81B00000 + ((top5 & 0x1F) << 25) + (low19 & 0x7FFFF)
```

The layout of `top5` is this design's own:

* `top5[4:3]` selects the module: 0 = RSE, 1 = IFS, 2 = CVR, 3 = unused.
* `top5[2:0]` is the command.

`low19` is a 19-bit payload. An address or data word needs 32 bits, so a
`SET_HI` command first loads bits 31:19 into the module's high-bits register.
The next command takes its operand as `{hi, low19}`.

| module | code | command | payload |
|---|---|---|---|
| IFS | 0 | SET_HI | bits 31:19 of the next operand, in `[12:0]` |
| IFS | 1 | DSIG_ADDR | address of a critical word (staged) |
| IFS | 2 | ISIG_ADD | PC of a trusted store |
| IFS | 3 | DSIG_DATA | trusted value for the staged address |
| IFS | 4 | DSIG_REMOVE | address whose entry is dropped (end of a stack frame) |
| CVR | 0 | SET_HI | as for IFS |
| CVR | 1 | VAR_ADDR | address of the critical variable |
| CVR | 2 | EXPR | `[18:15]` path, `[14]` use_prev, `[13:0]` signed constant k |
| CVR | 3 | PATH | `[3:0]` the path just taken |
| CVR | 4 | CHECK | none: check now |

`rse_pkg::chk_word(top5, low19)` builds a word in SystemVerilog.
`tb/host_pkg.sv` shows complete sequences, for example `dsig_cfg` (SET_HI,
DSIG_ADDR, SET_HI, DSIG_DATA).

## The RSE interface

`rse_interface` forwards the probe bundle to each of its `NPORTS` ports. The
bundle holds three groups of signals:

* **Decode stage:** the PC and instruction word.
* **Pipeline control:** `hold` freezes the whole pipeline. `annul` squashes
  FE, DE and RA at the next edge after a taken branch or a trap.
* **Writeback stage:** the data-cache access of the instruction there, with
  its load/store flags, address, byte enables, store data and returned load
  data.

A port can be switched off with `port_en`. Its module then sees no valid
instruction and no annul, and its alarm is ignored.

The enabled alarms are ORed into `trap`. `trap` is combinational, so it is
high in the same cycle as the offending instruction sits in writeback, and
the host must not retire that instruction. `trap_port` names the lowest
alarming port. `cause_valid` and `cause_port` keep the first trap until
reset. `de_chk_nop` tells the host decoder that the word in decode is a CHK.

## The IFS pipeline

`ifs_module` is a pipeline of its own that moves in lock step with the host.
Every stage register advances on edges where `hold` is low.

| IFS stage | aligned with host | what happens |
|---|---|---|
| Fetch | DE | `ifs_isig` looks up the decode PC. A hit marks the instruction *critical*. |
| CHK handler | RA | `ifs_chk_handler` turns an IFS CHK into `{op, 32-bit operand}`. SET_HI is handled here. |
| Execute | EX | `ISIG_ADD` writes the instruction signature. Everything else travels on. |
| Memory | ME, XC, WB | Three registers. All data-signature work happens when the instruction is in WB. |

**Why the memory stage spans three host stages.** After a cache miss or a
stall, the host's load data may only arrive in XC or WB. The comparison
therefore waits until the instruction reaches WB, where its data is final.
In WB, and only if the instruction really retires (`wb_valid` high, `hold`
low):

* **Load:** if its address hits in `ifs_dsig`, the loaded bytes are compared
  with the trusted bytes. Only lanes that are both trusted and read count. A
  difference raises `alarm` in that cycle.
* **Critical store:** its bytes are merged into the data signature. A new
  address allocates an entry.
* **Non-critical store:** does nothing here. The tampering is found by the
  next load of that word.
* **DSIG_ADDR, DSIG_DATA, DSIG_REMOVE:** are applied here. This keeps one
  CAM write port and keeps the updates in program order with the stores.

**Annul.** A taken branch annuls the three younger instructions in FE, DE and
RA. The IFS clears its fetch and decode registers in the same way, so a
wrong-path `ISIG_ADD` or `SET_HI` never takes effect. The end-to-end test
deliberately places an attacker's `ISIG_ADD` on wrong paths.

**Which loads are checked.** Every load whose address is in the data
signature is checked, whatever its PC. The stated goal is to catch the
program reading tampered data, so the check does not depend on the load being
a trusted instruction.

**Timing rule for software.** An `ISIG_ADD` takes effect when the CHK is in
host EX. The trusted store it lists must come at least three instructions
later. Signature set-up at program start meets this easily.

Two assertions check the lock step:

* `a_lockstep`: the IFS writeback PC equals the host's.
* `a_annul_moves`: annul never comes with hold.

**No stalls.** The engine has no hold or stall output toward the host. It
only watches, and it interrupts the host only by requesting a trap when a
check fails. A program that passes its checks therefore runs in exactly as
many cycles as it would without the engine.

**Addresses are virtual.** PCs and data addresses are taken as the pipeline
sees them, before translation. The signatures are written with virtual
addresses, and the MMU plays no part.

## Instruction and data signatures

`ifs_isig` is a fully associative table of `ENTRIES` word PCs (default 32).
It has a combinational lookup and one add per cycle. A PC that is already
present takes no entry. An add to a full table is dropped and sets a sticky
`overflow`.

`ifs_dsig` is a CAM of `ENTRIES` words (default 32). Each entry holds
`{word address, data, 4-bit trusted-byte mask}`. It has three operations:

* `DS_WRITE`: a whole trusted word, from a CHK.
* `DS_MERGE`: only the written byte lanes, from a critical store, so `stb`
  and `sth` are handled.
* `DS_REMOVE`: drops the entry.

Lookup is combinational and updates land at the clock edge. An allocation
that finds the table full is dropped and sets `overflow`.

The table sizes are this design's choice; the source gives none.

## Critical value recomputation

`cvr_module` has a path tracker and a checker:

* **Path tracker:** `CHK PATH` records the path the program just took.
* **Rules:** each path has a rule loaded by `CHK EXPR`:
  `rec = use_prev ? prev + k : k`. After the check, `prev` takes the
  program's value. This covers loop indices and counters, such as
  "path 1: j = 0; path 2: j = i_prev + 1, then i_prev = i". Because `prev`
  follows the program, one lost increment raises one alarm, not an alarm on
  every later check.
* **Program value:** the module snoops every retiring store to the variable's
  address (`CHK VAR_ADDR`).
* **Check:** `CHK CHECK` evaluates the recorded path's rule and compares the
  result with the program's value. A difference raises `alarm` while the
  CHECK is in writeback.
* **Skipped checks:** a CHECK with no path reported since the previous one is
  skipped and counted in `checks_skipped`.

**This is a simplification.** In the original design the checker is a small
microcontroller that runs recomputation expressions produced by the compiler.
Its instruction set is not published. This fixed-form unit stands in for it,
and anything beyond "constant, or previous value plus constant" per path is
not supported.

## Top level

`rse_top` wires `rse_interface` (two ports), `ifs_module` on port 0 and
`cvr_module` on port 1. Its ports are:

* the probe bundle and the port enables;
* the trap, the CHK flag and the cause register;
* per-module status outputs: first alarm PC, address and values, signature
  fill counts, overflow flags, and CVR check counters.

Parameters: `ISIG_ENTRIES = 32`, `DSIG_ENTRIES = 32`, `CVR_PATHS = 16`.

## Host model and testbenches

The host processor is not part of the RTL. `tb/leon3_pipe_model.sv` is a
behavioural, trace-driven seven-stage pipeline with the same stage names.

* It takes a queue of instruction records (`host_pkg::host_rec_t`) and
  produces the probe bundle.
* It inserts random holds (`HOLD_PCT` percent of cycles).
* A record marked as a taken branch asserts annul in EX and kills FE, DE and
  RA. The trace puts exactly three wrong-path records after it.
* Records marked as trapped reach WB with `wb_valid` low.
* It keeps a byte memory, and it does not retire the WB instruction while
  `trap` is high.

`host_pkg::prog_gen` writes the programs. `scenario()` produces an
authentication-style workload:

* signature set-up by CHK;
* trusted word and byte stores to critical locations;
* attacker stores from untrusted PCs;
* loads of critical and ordinary data;
* trapped stores and taken branches with malicious wrong-path CHKs;
* stack-frame removal;
* a CVR-guarded counter with injected errors and unreported paths.

A byte-level reference model in the same class predicts every trap, with its
PC and port, in program order.

| testbench | what it checks |
|---|---|
| `tb_ifs_isig` | lookup against a reference set, duplicates, fill, overflow, reset |
| `tb_ifs_dsig` | write, merge and remove against a byte-level reference, masks, count, overflow |
| `tb_ifs_chk_handler` | decode of all CHK kinds against an independent decoder, SET_HI only on advance, the macro layout |
| `tb_ifs_module` | the IFS pipeline behind the host model with 25 % holds: every trap's PC, counts |
| `tb_cvr_module` | CVR behind the host model: alarms, expected and actual values, done and skipped counts |
| `tb_rse_interface` | gating, trap OR and priority, CHK flag, cause register |
| `tb_rse_top` | the whole engine at its default sizes (see below) |
| `tb_string_buffers` | critical strings of an FTP and an HTTP server: byte-wise trusted copies, a buffer overflow into a user name, a tampered file name, a full data signature |
| `tb_openssh_auth` | the password-check routine of an SSH server and a CVR-guarded list walk, on the whole engine (see below) |

`tb_rse_top` runs in two phases:

* **Phase 1, both ports on:** 1500 scenario iterations. Every trap is
  compared with the prediction in the cycle it happens. Each mechanism must
  occur at least once: hold, annul, trapped instruction, IFS alarm, CVR
  alarm, critical store, untrusted store, byte store, removal, CHK as NOP,
  and skipped check.
* **Phase 2, CVR port off:** after a reset, only IFS traps may appear, even
  though the program contains CVR errors.

`tb_openssh_auth` replays a concrete program rather than random traffic.
It is the `sys_auth_passwd` routine of an SSH server, with its trusted
stores at their real listing addresses (0x400012d8 to 0x400012f8). The
routine is called six times:

1. a clean call;
2. a system call forges the `authenticated` flag: trapped at the read of the
   flag;
3. the untrusted logging routine overwrites the saved return address:
   trapped at the return;
4. the logging routine redirects the encrypted-password pointer: trapped at
   the comparison;
5. a register error corrupts a value before a trusted store: not trapped.
   This is a known limit of signature checking; value recomputation is the
   tool for it;
6. a CHK is tampered so that it lists a load as a trusted store: no effect.

The same program walks a list index guarded by CVR. One increment is lost,
and exactly that check must trap.

`tb_string_buffers` shows what the table size means for buffers: a 32-byte
user name takes 8 entries, and a 64-byte file name plus a 64-byte request body
fill all 32. Whole path buffers of several kilobytes would not fit without a
larger `DSIG_ENTRIES`.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

To simulate one with plain Verilator (5.x):

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -Wno-fatal \
    rtl/rse_pkg.sv tb/host_pkg.sv rtl/*.sv tb/leon3_pipe_model.sv \
    tb/tb_rse_top.sv --top-module tb_rse_top -o sim
./obj_dir/sim
```

Use another `--top-module` for another testbench. The packages must come
first.

## Where this design departs from the original or fills gaps

* **Sizes.** Signature sizes (32 and 32) and the CVR path count (16) are
  assumed. The source only says the fixed-size tables suffice for
  medium-sized programs.
  * One critical word fits easily, as with a login flag.
  * A 4 KiB path buffer would need 1024 data-signature entries.
* **CHK command layout.** The split of `top5` and the command codes are
  assumed. The SET_HI mechanism follows from the 19-bit payload.
  DSIG_REMOVE is an addition.
* **Data-signature commands.** They are applied at writeback rather than in
  execute. The effect on program order is the same, and a single write port
  suffices.
* **Trusted-byte masks** in the data signature are an addition. They make
  sub-word critical stores work.
* **CVR checker.** It is a fixed recomputation rule instead of a programmable
  microcontroller. It checks the guarded variable itself. In the original
  example the check compares the array elements the two indices select, so
  there the index is checked only through the data it selects. The update of
  the previous value from the program's value follows the original.
* **Not built:**
  * the host processor itself (modelled in the testbenches);
  * the RSE's DMA controller on the system bus and its controller block,
    which are only named;
  * the proposed TLB extension for unlimited signature size.
* **Lint notes.** Verilator reports these warnings; none of them is a logic
  problem:
  * unused address bits 1:0 (word-aligned tables);
  * probe fields a module does not need;
  * the unused `full` outputs of the two signature tables inside
    `ifs_module`, which exports fill counts instead.
