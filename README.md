# Keccak co-processor for a CV-X-IF RISC-V core

Post-quantum schemes such as ML-KEM (Kyber), ML-DSA (Dilithium), SLH-DSA
(SPHINCS+) and FN-DSA (Falcon) spend much of their time in the Keccak-f[1600]
permutation behind SHA-3 and SHAKE. On a small 32-bit RISC-V core this is slow
mostly because the 1600-bit state is far larger than the register file, so the
software keeps moving state words between memory and registers.

This design is a co-processor that keeps the whole state in a register of its
own and runs the permutation at one round per clock cycle. The core reaches it
through three custom R-type instructions. They are carried by the CORE-V
eXtension Interface (CV-X-IF), a standard port through which a RISC-V core
hands instructions it does not know to an external unit. Neither the core's
pipeline nor the compiler has to change, since the instructions can be written
with the assembler's `.insn` directive.

A permutation call from software looks like this:

```
for i in 0..24:  load_state  x0, rs1=lane[i][31:0], rs2=lane[i][63:32]
start_keccak     x0, x0, x0          # returns when all 24 rounds are done
for k in 0..49:  store_state rd, x0, x0   # rd <- word k of the new state
```

SHA-3 and SHAKE padding, absorbing and squeezing stay in software. The
co-processor replaces only the permutation.

## Instruction set

All three instructions use opcode `0x4b` (custom-2), `funct3 = 4`, and a
`funct7` that selects the operation (`.insn r 0x4b, 0x04, funct7, rd, rs1, rs2`):

| funct7 | instruction    | effect                                                         | writes rd |
|--------|----------------|----------------------------------------------------------------|-----------|
| 0      | `load_state`   | next lane of the state := {rs2, rs1}                          | no        |
| 1      | `store_state`  | rd := next 32-bit word of the state                           | yes       |
| 2      | `start_keccak` | run Keccak-f[1600]; rewind both pointers to 0                 | no        |

The operands carry only data, so the co-processor addresses the state with
two pointers of its own:

- The **lane pointer** (0 to 24) advances on every `load_state`.
- The **word pointer** (0 to 49) advances on every `store_state`.

Both wrap around, and `start_keccak` sets both back to 0. A call that always
does 25 loads, a start and 50 stores therefore never has to manage them.
Calling `start_keccak` again without reloading permutes the previous result.

State layout follows FIPS 202. Lane (x, y) is lane number x + 5y. Word 2i is
the low half of lane i, and word 2i+1 is its high half. In byte terms, byte n
of the sponge state is bits 8n+7..8n.

The funct7 assignment (0/1/2 in the order load, store, start) and the
pointer scheme are choices made for this RTL. The encoding fixes only that
funct7 takes the values 0, 1 and 2.

## The CV-X-IF protocol as used here

The top module `keccak_coproc` has three CV-X-IF channels as ports. Their
payloads are packed structs from `cvxif_pkg`, a subset of the public CV-X-IF
specification (4-bit instruction id, RV32 operands):

| channel | direction | handshake | payload |
|---------|-----------|-----------|---------|
| issue   | core → co-processor | `issue_valid_i` / `issue_ready_o` | `instr`, `id`, `rs[0..1]`, `rs_valid`. The answer `issue_resp_o` = {`accept`, `writeback`} comes back combinationally in the same cycle |
| commit  | core → co-processor | `commit_valid_i` | `id`, `commit_kill` |
| result  | co-processor → core | `result_valid_o` / `result_ready_i` | `id`, `data`, `rd`, `we` |

The life of one instruction:

```
cycle      T            Tc (= T or later)        Tc+1 (Tc+25 for start_keccak)
issue      valid&ready  
           accept=1
commit                  valid, id match
state                   updated at end of Tc
result                                           valid (held until ready)
```

- On the issue handshake the decoder latches the operation, the id, rd and
  both operands. An instruction with another opcode, funct3 or funct7 gets
  `accept = 0` and is left to the core.
- Nothing happens to the state until the core commits the instruction. A
  commit with `commit_kill = 1` discards the instruction: no state change, no
  pointer step, no result. Commits carrying another id are ignored. The
  commit may come in the same cycle as the issue handshake.
- Every committed instruction returns exactly one result. `store_state` sets
  `we = 1` with the word in `data`. The other two return `we = 0`. For
  `start_keccak` the result comes only when the permutation has finished, so
  the core stalls on it and the next instruction cannot race the rounds.
- One instruction is in flight at a time. `issue_ready_o` stays low from the
  accepting handshake until the result has been taken (or the instruction was
  killed). An instruction of this co-processor is also held back until both
  `rs_valid` bits are set.

`cvxif_decoder` carries assertions for three rules: the result payload is
stable while `result_valid_o` waits for `result_ready_i`, the engine never
reports completion unless the controller waits for it, and nothing is issued
while an instruction is in flight.

## Inside the co-processor

```
            CV-X-IF                 lane write (64 b), word read (32 b)
  core <==============> cvxif_decoder <------------------> keccak_reg (1600 b)
                              |  start / done                  |      ^
                              +------------> keccak_f <--------+      |
                                               (one round, comb.) ----+ state write
```

**cvxif_decoder** decodes, tracks the id and rd, waits for the commit and
sequences everything else. It is a four-state machine: idle, waiting for
commit, permuting, and result pending. It also holds the two pointers and the
result register (about 130 flip-flops).

**keccak_reg** is the 1600-bit state register. It has three ports:

- a lane write port for `load_state`;
- a whole-state write port for the round engine, which wins if both are used
  in the same cycle;
- a combinational 32-bit word read port for `store_state`.

Reset clears it.

**keccak_f** is the round engine. It has no state copy of its own. It reads
`keccak_reg`, passes the state through one combinational `keccak_round`
(θ, ρ, π, χ, ι), and writes the result back each cycle while a 5-bit counter
selects the round constant. A start pulse arms it, and the 24 rounds are then
written on the next 24 clock edges. From the commit of `start_keccak` to its
result is therefore 25 cycles: one cycle to start and 24 rounds.

**keccak_round** is the single combinational round. Its longest path is a
5-input column parity, the θ XOR and the χ AND-XOR.

Round constants and ρ offsets are stored as FIPS 202 tables in `keccak_pkg`.

## Performance and size

- Permutation: 24 rounds, 25 cycles from the commit of `start_keccak` to its
  result.
- A whole call (25 loads, start, 50 stores) with a core that commits at
  once and takes every result immediately, driven by the testbench at one
  instruction every 3 cycles: 252 cycles. On a real core the surrounding
  software (memory loads and stores, loop overhead) adds to this; on a
  CV32E40P-class core a call in the order of 550 cycles is to be expected,
  against about 56,000 for Keccak-f written in plain C.
- Flip-flops after generic synthesis: 1738 in all. Of these, 1600 are the
  state, 132 the decoder and 6 the round engine. The 24 round constants become
  a small ROM.

## How far it can be trusted

- The permutation is checked against a separate FIPS 202 model. That model
  derives the round constants from the rc LFSR and the rotation offsets from
  the (x, y) walk, so it shares no tables with the RTL. Known answers are
  checked as well: the first lanes of Keccak-f[1600] of the zero state,
  SHA3-256 of "" and "abc", and SHAKE128 and SHAKE256 of "". The digests are
  computed through the complete co-processor.
- The protocol handling is exercised against a randomised core model. That
  model commits in the issue cycle or later, kills instructions, applies
  result back-pressure, offers foreign instructions, and tries to issue during
  a permutation. Every result's id and rd are checked.
- Not verified: operation next to a real core, timing closure at any clock
  frequency, and any CV-X-IF feature outside the subset used here (memory
  requests, exceptions, dual-register reads and writes, several instructions
  in flight).

## Choices and departures

- **CV-X-IF subset.** The structs hold only the fields this unit needs. To
  connect a full CV-X-IF core, tie the unused response fields (dual read and
  write, load/store, exception) to 0, and leave the memory channels unused.
- **issue_valid comes from the core.** `issue_valid` and `issue_ready` form
  the usual handshake, with "valid" from the core. The co-processor's "I take
  it" is `issue_resp.accept`.
- **No private state copy in the engine.** The round engine rewrites the
  shared state register in place. An implementation that copies the state into
  the permutation core first would need another 1600 flip-flops and would
  keep the same 25-cycle latency.
- **`load_state` overwrites.** It does not XOR into the state. Absorbing
  stays in software, which keeps the state in memory between calls.
- **Reset.** The reset is active-low and asynchronous, and clears all state.
- **The host core and SoC are not included.** This RTL contains no RISC-V
  core and no microcontroller platform. Its CV-X-IF ports are the top-level
  ports.
- **Reduced rounds.** `keccak_f` has a `ROUNDS` parameter (default 24). A
  smaller value runs only the first rounds and is meant for experiments.

## Files

| file | contents |
|------|----------|
| `rtl/keccak_pkg.sv` | state types, sizes, instruction encoding, round constants, ρ offsets |
| `rtl/cvxif_pkg.sv` | CV-X-IF channel structs |
| `rtl/keccak_round.sv` | one combinational Keccak round |
| `rtl/keccak_f.sv` | round engine: counter and control around `keccak_round` |
| `rtl/keccak_reg.sv` | 1600-bit state register with lane write and word read ports |
| `rtl/cvxif_decoder.sv` | CV-X-IF decode, commit tracking, pointers, result channel |
| `rtl/keccak_coproc.sv` | top: the three blocks wired together |
| `tb/keccak_ref_pkg.sv` | independent Keccak-f[1600] reference model |
| `tb/keccak_f_tb.sv`, `tb/keccak_reg_tb.sv`, `tb/cvxif_decoder_tb.sv` | block tests |
| `tb/keccak_coproc_tb.sv` | end-to-end test with a randomised core model, default parameters |
| `tb/keccak_hash_tb.sv` | SHA3-256 / SHAKE known answers and a 27-call SHAKE128 stream |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. They all
run in well under a second. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/keccak_pkg.sv rtl/cvxif_pkg.sv tb/keccak_ref_pkg.sv \
  rtl/keccak_round.sv rtl/keccak_f.sv rtl/keccak_reg.sv \
  rtl/cvxif_decoder.sv rtl/keccak_coproc.sv tb/keccak_coproc_tb.sv \
  --top-module keccak_coproc_tb -Mdir obj_top
./obj_top/Vkeccak_coproc_tb
```

Swap in `tb/keccak_hash_tb.sv` (and `--top-module keccak_hash_tb`) for the
hashing test. The block tests need only the packages, the block and its
submodules. Lint with `verilator --lint-only -Wall` and the same file list
without the `tb/` files.

Verilator reports two kinds of warning that are intended:

- UNUSEDPARAM, for package constants that a given module does not use.
- SYNCASYNCNET, because the asynchronous reset also disables the decoder's
  concurrent assertions.
