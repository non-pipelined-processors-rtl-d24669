# Two non-pipelined RISC-V processors

A processor's work per instruction is always the same: fetch the instruction at
`pc`, decode it, read its source registers, execute it, access memory if it is
a load or a store, and update the register file and `pc`. This RTL builds that
loop twice, from one shared set of parts:

* **`proc_single_cycle`** does all of it in one clock cycle. It is the simplest
  possible processor, but its clock period must cover
  instruction memory + decode + register read + ALU + data memory + write-back,
  and it needs a memory that answers a read in the same cycle ("magic" memory).
* **`proc_multicycle`** splits the work into states of a small state machine.
  One clock cycle then only has to cover the slowest single step. This also
  lets it use a *realistic* memory, where a read is a request now and a response
  some cycles later, and a multicycle functional unit (here a multiplier) that
  takes many cycles for one operation.

Neither processor overlaps instructions: one instruction is finished before the
next is fetched. The early-fetch option of the multicycle processor is the only
exception. It overlaps a fetch with the end of the previous instruction.

Both implement the same RV32I subset:

| category | instructions |
|---|---|
| OP | ADD SUB SLL SLT SLTU XOR SRL SRA OR AND |
| OPIMM | ADDI SLTI SLTIU XORI ORI ANDI SLLI SRLI SRAI |
| BRANCH | BEQ BNE BLT BGE BLTU BGEU |
| jumps | JAL, JALR (target bit 0 cleared) |
| other | LUI, LW, SW (word accesses only) |
| MUL | RV32M `MUL`. Multicycle processor only. |

Every other 32-bit word is *unsupported*. This includes AUIPC, byte and halfword
loads and stores, FENCE, SYSTEM, and MUL on the single-cycle processor. An
unsupported word stops the processor (see "Starting and stopping a program").

## Shared parts

All types live in `rv_pkg`. These include `word_t` (32 bits), `rindx_t`
(5 bits), the category, ALU-function and branch-function enums, and the
records passed between the stages:

* `dinst_t`, the decoded instruction: `{itype, alu_func, br_func, dst, src1, src2, imm}`.
  `dst` is a valid bit plus an index (`maybe_rindx_t`).
* `einst_t`, the executed instruction: `{itype, dst, data, addr, next_pc}`.
* `mem_req_t`, a memory request: `{op (LD/ST), addr, data}`.

| module | what it does |
|---|---|
| `decoder` | Combinational. Finds the category, the ALU or branch function, `rd`/`rs1`/`rs2`, and the immediate. The immediate is sign-extended from its I/S/B/U/J layout. `src1`/`src2` always carry the `rs1`/`rs2` bit fields, because reading a register nobody uses is harmless. `EN_MUL` decides whether MUL is recognised. |
| `exec_unit` | Combinational. Computes write-back data, the effective address (`rs1+imm`) and the next `pc` from the decoded instruction, both register values and `pc`. It contains one ALU, shared by OP and OPIMM through a mux on the second operand, and one branch comparator. It also has separate adders for `pc+4`, `pc+imm` and `rs1+imm`: the `pc+4` adder is much cheaper than a general adder, so sharing one ALU for everything would gain little. |
| `alu` | add, sub, and, or, xor, slt, sltu, sll, srl, sra. Shifts use `b[4:0]`. |
| `alu_br` | eq, neq, lt, ge (signed), ltu, geu. |
| `rfile_2r1w` | 32×32 registers with two combinational read ports and one write port. Reset to zero. `x0` ignores writes. A read in the same cycle as a write returns the **old** value, because the write lands at the clock edge. |

## The single-cycle processor

```
 pc ─► imem ─► decoder ─► rfile (2 reads) ─► exec_unit ─► dmem ─► rfile write, pc
```

Everything left of the clock edge is one combinational path. Both memories are
`magic_mem`s. A magic memory has one port (read *or* write), a combinational
read, and a write at the rising edge when `en` is high. The design has two of
them: one for instructions, one for data. A single one-port memory cannot
deliver an instruction and a load in the same cycle. The host writes every word
to both memories, so they hold the same image. The program therefore cannot
modify its own code.

Each cycle that the processor runs, one instruction retires (`instret` counts
them).

## The multicycle processor

```
            ┌──────────────────────────── store ───────────────────┐
            ▼                                                      │
  ┌───────┐ load req(pc)  ┌─────────┐ LW: load req(addr) ┌──────────┐
  │ FETCH ├──────────────►│ EXECUTE ├───────────────────►│ LOADWAIT │
  └───────┘               └────┬────┘                    └────┬─────┘
      ▲    ALU/branch/jump/LUI │  MUL: multiplier req         │ write rd
      │ ◄──────────────────────┘      ▼                       │
      │                          ┌────────┐                   │
      ├───────── write rd ───────┤ MCWAIT │                   │
      └──────────────────────────┴────────┴───────────────────┘
```

* **FETCH** sends a load request for `pc` to the memory.
* **EXECUTE** waits until the instruction arrives as the memory response. The
  response is decoded, executed and taken in the same cycle. The decoder,
  register file and execute unit are the same ones the single-cycle processor
  uses. `pc` is updated here, whatever the instruction.
  * An ALU operation, branch, jump or LUI writes `rd` and goes to FETCH.
  * LW sends the load request and goes to LOADWAIT.
  * SW sends the store request and goes to FETCH. A store has no response.
  * MUL hands both register values to the multiplier and goes to MCWAIT.
* **LOADWAIT** and **MCWAIT** wait for their response, write it to `rd` and go
  to FETCH. The destination is kept from EXECUTE in `dst_q`. That register is
  the only state of a half-finished instruction, because `pc` has already
  moved on.

One `reqresp_mem` holds instructions and data. A request is accepted on
`req_valid && req_ready`. `LATENCY` cycles later the response shows on
`resp_valid`/`resp_data` and stays there until it is taken with `resp_deq`.
Only one load is in flight at a time. A new request may be sent in the same
cycle a waiting response is taken. Assertions check two rules: a response is
never taken when none is valid, and a response is never overwritten by a new
request.

`mc_mul` is a request/response shift-and-add multiplier. It handles one
multiplier bit per cycle, so it answers after `WIDTH` (= 32) cycles. It returns
the low word of the product, which is all that MUL needs.

### Early fetch (`EARLY_FETCH = 1`)

The FETCH state costs one cycle per instruction. With early fetch, the step
that finishes an instruction sends the fetch for the next `pc` itself and goes
straight to EXECUTE. That step is EXECUTE for ALU, branch, jump and LUI, and
also LOADWAIT and MCWAIT. A store still goes through FETCH, because the memory
port is busy with the store in that cycle. The cost is a longer path in those
states: the next `pc` from the execute unit now drives the memory request in
the same cycle.

### Cycle counts

These counts run from one instruction's first cycle to the next instruction's
first cycle, with memory latency *L* and a 32-cycle multiplier:

| instruction | `EARLY_FETCH=0` | `EARLY_FETCH=1` | with *L* = 1 (0 / 1) |
|---|---|---|---|
| ALU, branch, jump, LUI | 1 + *L* | *L* | 2 / 1 |
| SW | 1 + *L* | 1 + *L* | 2 / 2 |
| LW | 1 + 2*L* | 2*L* | 3 / 2 |
| MUL | 1 + *L* + 33 | *L* + 33 | 35 / 34 |

With early fetch there is one extra FETCH cycle after reset. It is balanced by
the final store, which halts instead of going to FETCH, so a whole program takes
exactly the sum of its instructions' costs. The testbenches check that sum
exactly.

## Starting and stopping a program

Each processor has only a host port and status outputs.

* **Loading.** While `host_en` is high, the processor holds still and the host
  owns the memory. `host_we`, `host_addr` (a byte address, word aligned) and
  `host_wdata` write a word. `host_rdata` reads the word at `host_addr`
  combinationally. Load the program from address 0, pulse `rst`, then drop
  `host_en`. Execution starts at `pc = 0`.
* **Normal end.** The program stores a word to `TOHOST_ADDR` (default
  `0x3FFC`, the last word of the default 16 KiB memory). By convention it
  stores 0. The store is performed, `halted` rises and `exit_code` holds the
  stored word.
* **Unsupported instruction.** `halted` and `illegal` rise. `bad_pc` and
  `bad_inst` name the instruction. Nothing is changed by that instruction. The
  host can then read memory to inspect the state.

Addresses above the memory size wrap around: only `addr[AW+1:2]` is decoded.

`nonpipelined_top` puts the two processors side by side. They share only `clk`
and `rst`, which is synchronous and active high. Each processor has its own
port group, `sc_*` and `mc_*`.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `nonpipelined_top`, both processors | `MEM_WORDS` | 4096 | memory size in 32-bit words |
| | `TOHOST_ADDR` | `32'h3FFC` | store address that ends a program |
| `proc_multicycle`, top | `MEM_LATENCY` | 1 | request-to-response cycles of the memory (≥ 1) |
| | `EARLY_FETCH` | 0 | overlap the next fetch with the end of an instruction |
| `rfile_2r1w` | `NREGS` | 32 | number of registers |
| `mc_mul` | `WIDTH` | 32 | operand width; also the latency in cycles |
| `decoder` | `EN_MUL` | 0 | recognise MUL (set by the multicycle processor) |

## Where this follows a reference design and where it chooses

The following come straight from the design these processors are modelled on:

* the register file (size, ports, read-before-write, hard-wired `x0`, reset to 0);
* the magic memory's behaviour;
* the decoder's categories and fields;
* the execute rules for every instruction;
* the single-cycle datapath;
* the multicycle state machine (Fetch → Execute → LoadWait/MCWait → Fetch), its
  request/response memory and functional unit, and the early-fetch refinement;
* the start at `pc = 0`, the tohost convention and the halt on unsupported
  instructions.

This implementation chose the following:

* memory sizes, the `TOHOST_ADDR` value and the memory latency;
* the memory's one outstanding request, and stores that produce no response;
* the host port and its signals;
* RISC-V `MUL` as the multicycle operation, and shift-and-add as its algorithm;
* separate instruction and data memories for the single-cycle processor;
* early fetch as a parameter that is off by default;
* all enum encodings and the synchronous reset.

Out of scope: pipelining, caches, floating-point or other multicycle units
besides the multiplier, byte and halfword memory access, AUIPC,
system instructions, interrupts.

## Simulating

Everything is plain SystemVerilog-2017. Packages must be read first. Example
for the whole design at default parameters:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/rv_pkg.sv tb/rv_tb_pkg.sv tb/tb_top_full_size.sv \
    --top-module tb_top_full_size -o sim
./obj_dir/sim
```

Any other testbench works the same way: replace the file and the top module
name. Each testbench prints `TB_RESULT checks=N failures=M` and ends. Each has a
watchdog that counts a failure if the simulation hangs.

`tb/rv_tb_pkg.sv` holds what the processor testbenches share:

* a small assembler (`ADDI(rd, rs1, imm)`, `BNE(rs1, rs2, off)`, …);
* a reference instruction-set model (`rv_iss`), written from the instruction
  definitions and independent of the RTL;
* program builders: a directed program using every instruction, and random
  programs with loads, stores, forward branches and jumps;
* the expected cost of each instruction kind on the multicycle processor.

Each program ends by storing `x1`..`x31` to `0x780` and writing 0 to tohost.
The testbenches compare that register dump, the data region at `0x2000`, the
exit code, `instret` and the exact cycle count with the model.

| testbench | covers |
|---|---|
| `tb_alu`, `tb_alu_br` | every function on corner and random operands |
| `tb_rfile_2r1w` | reset, both ports, `x0`, same-cycle read/write |
| `tb_magic_mem` | combinational read, write only on `en` |
| `tb_decoder` | every instruction kind with random fields, the two worked examples (ADD x3,x2,x1 and BNE x1,x0,-4), unsupported words, MUL only when enabled |
| `tb_exec_unit` | data, address and next `pc` for every category |
| `tb_reqresp_mem` | latency 1 and 4, held responses, back-to-back requests, host port |
| `tb_mc_mul` | products, the 32-cycle latency, busy/ready behaviour |
| `tb_proc_single_cycle` | directed and random programs, one cycle per instruction, MUL and AUIPC as unsupported |
| `tb_proc_multicycle` | three configurations side by side: default; early fetch; early fetch with latency 3 |
| `tb_nonpipelined_top` | both processors end to end, at default parameters and with early fetch and latency 2; counts each mechanism (host load, tohost halt, illegal halt, FETCH, LOADWAIT, MCWAIT, early fetch, taken and untaken branches) and fails if one never happened |
| `tb_top_full_size` | the top with no parameter overrides, full 4096-word memories |

Some testbenches read internal signals of the multicycle processor by
hierarchical name (`state`, `lw_fire`, `mc_fire`, `mreq_valid`), so that they
can count states. Keep these names if you change that module.
