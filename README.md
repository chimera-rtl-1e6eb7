# CHIMERA: an ASCON coprocessor for a 32-bit RISC-V core

ASCON is the lightweight authenticated cipher and hash family standardised
for constrained devices. All its modes (AEAD ASCON-128/128a/80pq,
Hash/Hasha, XOF/XOFa) are sponges over a single 320-bit permutation. On a
32-bit microcontroller that permutation is the bottleneck. Its state is
five 64-bit words, which is ten 32-bit registers, so software spends its
time moving state between registers and memory and building 64-bit
rotations from 32-bit shifts.

CHIMERA attaches to the core through the CV-X-IF extension interface
(Core-V eXtension Interface). The core offloads custom instructions to it
without changes to its pipeline. The RTL here provides two versions that
trade area against speed:

* **CR (Complete Round)**: a tightly coupled accelerator. The whole 320-bit
  state lives in a register file inside the coprocessor. One instruction
  runs a complete permutation of up to 12 rounds. Software only moves
  state in and out two 32-bit words at a time, when it has to absorb or
  squeeze data.
* **BRU (Bitwise Rotation Unit)**: a tiny instruction-set extension. It
  accelerates only the linear diffusion layer, the part a 32-bit core
  handles worst. It follows the usual rule for RISC-V extensions: two
  source registers, one destination register, and no state the core
  must know about.

`chimera_top` places both versions side by side. Each has its own CV-X-IF
port set. In a real system you would use one of them, connected to the
core's extension interface.

## The ASCON round in hardware

One round (`ascon_round`) does three steps in a single combinational path:

1. **Constant addition.** Word x2 is XORed with an 8-bit constant. For
   round i of 12 the constant is `{15-i, i}` (0xf0, 0xe1, ..., 0x4b).
   p^N runs the last N rounds, i = 12-N … 11.
2. **Substitution** (`ascon_sbox`). Bit j of x0..x4 forms a 5-bit column,
   and all 64 columns pass through the same 5-bit S-box. The S-box is
   written bit-sliced, as whole-word logic:
   * first `x0^=x4, x4^=x3, x2^=x1`;
   * then the chi step `x_i ^= ~x_i & x_(i+1)`;
   * finally `x1^=x0, x0^=x4, x3^=x2, x2=~x2`.

   The result is five 64-bit layers of XOR, AND and NOT, with no table.
3. **Linear diffusion** (`ascon_linear`, five `ascon_sigma` instances).
   Each word becomes `x ^ (x >>> a) ^ (x >>> b)`, with fixed rotation
   pairs:

   | word | a | b |
   |---|---|---|
   | x0 | 19 | 28 |
   | x1 | 61 | 39 |
   | x2 | 1 | 6 |
   | x3 | 10 | 17 |
   | x4 | 7 | 41 |

   Fixed rotations are only wiring, so Sigma costs two XOR layers.

State convention: `state_t` is a packed array of five 64-bit words and
`state[0]` is x0. Within a word, bit 63 is the most significant bit, which
is the first byte of data in ASCON's big-endian view.

## CR version

```
            CV-X-IF                 chimera_cr
 core ──issue/commit──► cr_xif_controller ──exec/op/imm/rs1/rs2──► chimera_cr_core
      ◄────result─────   (cr_id_stage)                              ├ cr_regfile  REG0..REG9 (10 x 32 b)
                                                                    ├ ascon_perm  (ascon_round, 1 round/cycle)
                                                                    └ cr_commit_stage (32-bit result)
```

* **Register file** (`cr_regfile`). Ten 32-bit registers hold exactly one
  state. REG[2w] holds x_w[31:0] and REG[2w+1] holds x_w[63:32]. A load
  writes one register pair, a store reads one register, and a finished
  permutation writes all ten at once.
* **Permutation unit** (`ascon_perm`). It copies the file into its own
  320-bit working register and applies one round per clock.
  * The first round happens on the clock edge that starts the unit, so
    p^N takes exactly N cycles.
  * `done` pulses on the Nth cycle, and the register file takes the new
    state on the next edge.
  * The unit has its own copy because the file stays readable while the
    permutation runs. The controller never starts anything during that
    time anyway.
* **Commit stage** (`cr_commit_stage`). It keeps the 32-bit value for rd
  (a store's register, otherwise zero) and signals completion.
* **Controller** (`cr_xif_controller`). It runs the CV-X-IF handshake
  described below, with one instruction in flight at a time.

Flip-flops: 320 (file) + 326 (permutation: state, round counter, busy,
done) + 33 (commit) + 87 (controller).

## BRU version

```
 core ──issue──► bru_id_stage ──{rs2,rs1}, op──► bru (5 x ascon_sigma, mux, MSB register)
      ◄─result── bru_commit_stage ◄───────────── low 32 bits  /  stored high 32 bits
```

* The ID stage (`bru_id_stage`) decodes the instruction. It registers the
  64-bit operand `{rs2, rs1}`, the operation, the instruction id and rd.
* The unit (`bru`) computes all five Sigma functions on that operand and
  selects one.
* A Sigma instruction returns bits 31:0 of the result. When it retires,
  bits 63:32 go into a 32-bit register, and the sixth instruction,
  `BRU_RDH`, reads them. The 64-bit result therefore reaches the 32-bit
  core in two instructions.
* The commit stage (`bru_commit_stage`) is one flag: "this instruction
  has been committed, offer its result".

The whole BRU version is 110 flip-flops: 77 in the ID stage (including its
valid bit), 32 in the MSB register and 1 in the commit stage.

Software does the constant addition and S-box on 32-bit halves itself. For
each word it issues `BRU_SIGi` followed by `BRU_RDH`.

## Instruction encoding

All instructions use the RISC-V custom-0 major opcode (`7'b0001011`) in an
R4-type layout:

```
 31    27 26 25 24  20 19  15 14  12 11   7 6      0
 [ imm5 ][funct2][ rs2 ][ rs1 ][funct3][  rd  ][0001011]
```

`funct2` selects the unit (00 = CR, 01 = BRU). `funct3` selects the
operation. The rs3 slot carries a 5-bit immediate.
`chimera_pkg::make_instr()` builds instruction words.

| unit | funct3 | mnemonic | imm5 | effect | writes rd |
|---|---|---|---|---|---|
| CR  | 000 | `CR_LD`   | w = 0..4 | REG[2w] ← rs1, REG[2w+1] ← rs2 (x_w ← {rs2,rs1}) | no |
| CR  | 001 | `CR_ST`   | r = 0..9 | rd ← REG[r] | yes |
| CR  | 010 | `CR_PERM` | N = 1..12 | state ← p^N(state) | no |
| BRU | 000–100 | `BRU_SIG0..4` | – | rd ← Sigma_i({rs2,rs1})[31:0]; keep bits 63:32 | yes |
| BRU | 101 | `BRU_RDH` | – | rd ← bits 63:32 of the last Sigma result | yes |

The coprocessor refuses anything else (`accept = 0`), including an
immediate out of range. The core then treats it as its own, usually
illegal, instruction.

Example: absorbing one 8-byte block on the CR version takes 2 `CR_ST`, the
XOR in software, then 1 `CR_LD` and 1 `CR_PERM`.

## The CV-X-IF subset and timing

Only what these instructions need is modelled. The structs are in
`chimera_pkg`.

| channel | direction | fields | rule |
|---|---|---|---|
| issue | core → copro, `valid/ready` | `instr`, `rs1`, `rs2`, `id` | rs operands are valid with the request; `issue_resp` (`accept`, `writeback`) is valid in the same cycle |
| commit | core → copro, `valid` | `id`, `kill` | may come in the issue cycle or later; kill = drop the instruction |
| result | copro → core, `valid/ready` | `id`, `data`, `rd`, `we` | exactly one per committed, accepted instruction; held stable until taken (checked by assertion) |

A killed instruction changes nothing and produces no result. A refused
instruction needs no commit.

Both versions keep **one instruction in flight**: `issue_ready` is low from
acceptance until the result is taken or the instruction is killed. An
instruction offered behind a running permutation therefore stalls in
the issue channel. This is the CR version's only hazard mechanism.

Latency from the issue handshake to the result handshake, with commit in
the issue cycle and `result_ready` high:

| instruction | cycles |
|---|---|
| `CR_LD`, `CR_ST` | 3 |
| `CR_PERM` with N rounds | N + 3 (N in the round unit) |
| any BRU instruction | 1 |

No latency depends on data, keys or operand values, so neither version
leaks them through timing. Only the round count N of `CR_PERM` changes
how long an instruction takes.

All flip-flops use an active-low asynchronous reset, `rst_ni`. Reset clears
the state registers, the MSB register and all control state.

## Files

| file | contents |
|---|---|
| `rtl/chimera_pkg.sv` | state type, round constant, X-IF structs, encoding enums and helpers |
| `rtl/ascon_sigma.sv`, `ascon_linear.sv`, `ascon_sbox.sv`, `ascon_round.sv` | combinational round |
| `rtl/ascon_perm.sv` | iterative p^N |
| `rtl/cr_regfile.sv`, `cr_commit_stage.sv`, `chimera_cr_core.sv` | CR datapath |
| `rtl/cr_id_stage.sv`, `cr_xif_controller.sv`, `chimera_cr.sv` | CR decode, handshake, wrapper |
| `rtl/bru_id_stage.sv`, `bru.sv`, `bru_commit_stage.sv`, `chimera_bru.sv` | BRU version |
| `rtl/chimera_top.sv` | both versions side by side |
| `tb/ascon_ref_pkg.sv` | reference permutation, written differently from the RTL (table S-box, bit-by-bit rotations) |
| `tb/xif_host.sv` | core-side CV-X-IF model: issue, stall counting, commit/kill, late commit, random result backpressure; gives up and flags a hang after 1000 cycles without an answer |
| `tb/tb_*.sv` | one self-checking testbench per block, plus `tb_chimera_top` end to end |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. From the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_chimera_top -y rtl -y tb +libext+.sv \
  rtl/chimera_pkg.sv tb/ascon_ref_pkg.sv tb/tb_chimera_top.sv
./obj_dir/Vtb_chimera_top
```

Replace `tb_chimera_top` with any other `tb_*` to run that block's test.
The end-to-end test builds in under a minute and simulates about 40,000
cycles in well under a second. It runs the top at its default (and only)
configuration.

What the tests establish:

* **Round logic.** `tb_ascon_sbox`, `tb_ascon_linear` and `tb_ascon_round`
  compare the round logic with the reference model on exhaustive columns,
  single-bit words and random states.
* **Published value.** Twelve rounds on the ASCON-Hash IV reproduce the
  published initial hash state `ee9398aadb67f03d …`.
* **Permutation timing.** `tb_ascon_perm` checks p^12, p^8, p^6, p^1 and
  p^0: state, exact cycle count, and that a start while busy is ignored.
* **Full versions.** `tb_chimera_cr` and `tb_chimera_bru` run each version
  through the core model: every instruction, the latencies above,
  refusals, kills (in the issue cycle and late), late commits,
  backpressure and issue stalls.
* **End to end.** `tb_chimera_top` runs Hash, Hasha, XOF and XOFa
  (64-byte message, 32-byte output), and ASCON-128, -128a and -80pq
  encryption and decryption (128-byte plaintext, 16-byte associated
  data). Each mode runs on the reference model, through the CR version
  and through the BRU version, and the three must agree. The test also
  checks the published ASCON-128 tag for key = nonce = 00…0f with empty
  data (`e355159f292911f794cb1432a0103a8a`), and counts each mechanism
  (p^12/p^8/p^6, loads, stores, all six BRU operations, stalls, kills,
  late commits, refusals, backpressure). A mechanism that never occurs
  is a failure.
* **Resident CR software.** The same test also runs Hash, Hasha and
  ASCON-128 encryption the way CR software would. The state is loaded
  once and stays in REG0..REG9, and only the words that data or the key
  touch are read and written. A 64-byte message hashed to 32 bytes takes
  53 coprocessor instructions. ASCON-128 encryption of 128 bytes with
  16 bytes of associated data takes 105.

The mode code (padding, domain separation, key injection) in the
end-to-end test is shared by all three runs. The hardware is checked
against the independent reference permutation. The mode code itself is
anchored by the ASCON-128 known answer and by the hash initial state.
ASCON-80pq has no known-answer check here.

## What follows the published design and what is this design's own

Taken from the CHIMERA publication:

* the two versions and their split into ID stage, state register file
  REG0..REG9, ASCON round unit and commit stage (CR), or ID stage,
  rotation unit and commit stage (BRU);
* the 320-bit state held in the coprocessor for CR;
* separate load, store and "start permutation" instructions for CR;
* five fixed-rotation BRU instructions plus a sixth that reads the upper
  32 bits;
* the CV-X-IF attachment;
* the ASCON round definition, rotation amounts and round counts.

The publication reports 320 register bits for the CR register file, which
this RTL matches. It reports 109 for the whole BRU wrapper, one fewer than
this RTL's 110.

This design's own choices, because the publication does not give them:

* the instruction encoding;
* the register-to-word mapping;
* one round per clock cycle. No permutation latency is published,
  and the published cycle counts are for whole applications, which
  depend on the core and its software;
* the CV-X-IF subset, the one-in-flight policy and all latencies above;
* reset style;
* keeping the BRU's upper result half in a register updated at
  retirement.

The round constants and the S-box behaviour follow the ASCON
specification.

Not included: the RISC-V core (CV32E40PX) with its CV-X-IF dispatcher,
the instruction and data memories, and the bus of the host
microcontroller. The CV-X-IF ports of `chimera_top` are where they
connect. Application-level cycle counts, code size, FPGA utilisation and
65 nm area figures depend on that system and on the ASCON software, so
this RTL cannot reproduce them.
