# IMPRES code-integrity monitor

Code injection, and bit flips in instruction memory, both show up as a
processor executing instructions that are not the ones the compiler
produced. IMPRES (Integrated Monitoring for Processor REliability and
Security) catches both with one small mechanism, checked one basic block at
a time:

* At compile time every basic block gets a checksum of its instructions. The
  checksum goes into a new instruction, `chk`, placed at the start of the
  block.
* At load time the checksum is encrypted with a secret hardware key. A new
  key is drawn for every load, and software never sees it.
* At run time the hardware recomputes the checksum as the block's
  instructions execute, a little work per instruction. The control-flow
  instruction (CFI) that ends the block encrypts the result and compares it
  with the value `chk` carried.

Injected code has no valid `chk`, because the attacker cannot encrypt without
the key. Corrupted code no longer matches its checksum. A one-bit flag, fBB,
catches the cases the checksum cannot see: a block entered without the
previous one having left through a CFI.

This repository holds synthesizable SystemVerilog for the monitoring
hardware: the key generator, the encryption port used by the secure loader,
and the run-time monitor. It also holds testbenches that run instrumented
programs through it. The processor the monitor attaches to is not included;
it enters through the top level's ports (see "Attaching a processor").

## The run-time rules

The monitor sees every executed instruction and sorts it into one of three
classes:

| class | instructions | what the monitor does in that cycle |
|---|---|---|
| `chk` | the added instruction | copy its 32-bit field into **eChkSum**; restart **iChkSum** at 0; if fBB is clear, raise **SIGNCFI**; clear fBB |
| non-boundary | everything else | fold the instruction into iChkSum; clear fBB |
| CFI | jumps and branches | fold the instruction into iChkSum, encrypt the result with the key, compare it with eChkSum, raise **SIGCKSM** on a mismatch; set fBB |

A program load sets fBB and clears both registers, so the program's first
`chk` passes. The CFI is folded in before the comparison. That means the
checksum covers the branch's opcode and its target.

Example: a block `chk E; add; lw; bne L`, where E = encrypt(key, S) and
S = fold(fold(fold(0, add), lw), bne).

```
cycle   executed   iChkSum after              eChkSum   fBB  signal next cycle
  0     chk E      0                          E         0    SIGNCFI if fBB was 0
  1     add        fold(0,add)                E         0
  2     lw         fold(.,lw)                 E         0
  3     bne L      S   (encrypt(S) vs E)      E         1    SIGCKSM if encrypt(S) != E
```

Both signals are registered, one-cycle pulses. Each comes in the cycle after
the instruction that caused it. The monitor never stalls the processor.

### What each kind of corruption raises

This table lists how a basic block can be corrupted and which signal
catches it. Each row is exercised by `tb_impres_monitor` and
`tb_impres_top`.

| type | original | becomes | caught by |
|---|---|---|---|
| T1 | non-boundary | another non-boundary | SIGCKSM at the block's CFI |
| T2 | non-boundary | `chk` | SIGNCFI (a `chk` without a CFI before it) |
| T3 | non-boundary | CFI | SIGCKSM at that CFI |
| T4 | `chk` | `chk` with another checksum | SIGCKSM |
| T5 | `chk` | CFI | SIGCKSM (it compares against the previous block's eChkSum) |
| T6 | `chk` | non-boundary | SIGCKSM (the block is checked against the previous eChkSum) |
| T7 | CFI | another CFI | SIGCKSM (the CFI is part of the checksum) |
| T8 | CFI | other target | SIGCKSM |
| T9 | CFI | non-boundary | SIGNCFI at the next block's `chk` |
| T10 | whole block | forged block | SIGCKSM or SIGNCFI, depending on what the forgery contains |

A forged block passes only if it holds a correctly encrypted checksum.
Producing one needs the key.

## Instruction encoding

The target processor runs the SimpleScalar PISA instruction set. Its
instructions are 64 bits wide, packed as `pisa_instr_t` in `impres_pkg`:

```
 63        48 47        32 31                               0
+------------+------------+----------------------------------+
|  annote    |  opcode    |  fields (rs rt rd shamt / imm /   |
|            |            |  target)                          |
+------------+------------+----------------------------------+
```

* `chk` is opcode `16'h00F0` with a zero `annote` field. It carries the
  32-bit encrypted checksum in `fields`. It is recognised only by its whole
  upper word. Any bit flip there turns it into an ordinary instruction,
  which gets folded into the checksum and so is caught. Without this rule, a
  flip in the annotation bits of a `chk` would go unnoticed.
* CFIs are opcodes `0x01` to `0x0C`: J, JAL, JR, JALR, BEQ, BNE, BLEZ, BGTZ,
  BLTZ, BGEZ, BC1F and BC1T.
* Everything else is a non-boundary instruction.

Checksums are 32 bits. The key is 64 bits.

## Checksum and cipher

**Checksum fold** (`impres_checksum`), one step per executed instruction:

```
next = rotate_left(sum, 1) ^ instr[63:32] ^ instr[31:0]        start value 0
```

Any single-bit change in an instruction changes the result. The rotation
makes the result depend on the order of the instructions. The fold is
combinational, so a CFI can check a sum that includes itself in the cycle it
executes.

**Cipher** (`impres_cipher`) is a balanced Feistel network on 16-bit halves
(L, R). It has `ROUNDS` rounds (default 4) and is fully combinational. Each
round maps (L, R) to (R, L ^ F(R, k_i)), with:

```
k_i     = rotate_right(key, 16*i)[15:0] ^ i
F(r, k) = rotate_left16(r + k, 5) ^ (r & rotate_left16(r, 9))      (+ mod 2^16)
```

The loader port and the monitor each have an instance, and both use the same
key. Because the cipher is combinational, the comparison adds no cycles. The
CFI path gets longer by one 32-bit fold, four small rounds and a 32-bit
compare. If that is too long for a target clock, the monitor's signals could
be delayed by one more cycle without changing the scheme.

## Keys and secure loading

`impres_keygen` runs a 64-bit Galois LFSR (x^64 + x^63 + x^61 + x^60 + 1)
every cycle. It XORs `entropy_i`, a bit from an on-chip random source, into
the feedback. At `load_start_i` the current LFSR state becomes the key. The
new key is in force from the next cycle, so every load gets a different,
unpredictable key. The key never leaves the monitoring hardware.

The loader is software. It computes the plain checksums itself but cannot
encrypt them. `impres_loader_port` does that for it:

* `load_start_i` opens a *load window*, draws the new key and resets the
  monitor. `load_done_i` closes the window. `loading_o` shows whether it is
  open.
* A request (`enc_req_valid_i`, `enc_req_chk_i`) is answered one cycle later
  on `enc_rsp_valid_o` and `enc_rsp_data_o`. One request per cycle can be in
  flight.
* Outside the window the answer is `enc_rsp_err_o = 1` with data 0.
  Without this rule, code running after the load, including injected code,
  could have the port forge `chk` words for it.

A loader therefore does the following: pulse `load_start_i`, wait one cycle,
send each block's plain checksum and write the answer into that block's
`chk` word, then pulse `load_done_i`.

## Module map

```
impres_top
├── impres_keygen          secret key, new one per load
├── impres_loader_port     encryption for the loader, load window
│   └── impres_cipher
└── impres_monitor         eChkSum, fBB, SIGCKSM / SIGNCFI
    ├── impres_instr_class chk / CFI / non-boundary decode
    ├── impres_checksum    iChkSum register and fold
    └── impres_cipher
impres_pkg                 widths, opcodes, pisa_instr_t, instr_class_e
```

After coarse synthesis the whole top is about 113 word-level cells and 230
flip-flop bits. 128 of those bits are the key and the LFSR, and 67 are the
monitor's registers. The state per program is the same whatever the program
size: two 32-bit registers and one flag. No table can fill up, and relocated
code keeps working, because nothing in the check depends on addresses.

## Attaching a processor

`impres_top` ports (all synchronous to `clk_i`; `rst_ni` is an asynchronous,
active-low reset):

| port | dir | width | meaning |
|---|---|---|---|
| `entropy_i` | in | 1 | random bit for the key generator |
| `load_start_i`, `load_done_i` | in | 1 | start and end of a program load |
| `loading_o` | out | 1 | load window open |
| `enc_req_valid_i`, `enc_req_chk_i` | in | 1, 32 | loader encryption request |
| `enc_rsp_valid_o`, `enc_rsp_data_o`, `enc_rsp_err_o` | out | 1, 32, 1 | its answer, one cycle later |
| `ex_valid_i`, `ex_instr_i` | in | 1, 64 | an instruction that executes (commits) this cycle |
| `sig_cksm_o`, `sig_ncfi_o` | out | 1 | violation pulses, one cycle after the instruction |
| `fbb_o` | out | 1 | the fBB flag, for observation |

Feed `ex_valid_i` and `ex_instr_i` from the point where an instruction is
known to execute: after branch resolution and squashing, and never for
instructions on a wrong path. Wire the two signals to an exception. In the
original IMPRES processor this logic sits inside the micro-operations of
each instruction. Here it is a separate unit beside the execute stage; the
work per instruction is the same.

## Verification

Every block has a self-checking testbench that compares against independent
reference models in `tb/impres_ref_pkg.sv`.

| testbench | what it checks |
|---|---|
| `tb_impres_instr_class` | all 65536 opcodes, with zero and non-zero annotation |
| `tb_impres_checksum` | 5000 random steps with clears and gaps, checking both the fold and the register |
| `tb_impres_cipher` | 20000 random key and checksum pairs; no collisions over 4096 checksums; every key bit changes the output |
| `tb_impres_keygen` | the key follows the LFSR model under random entropy and loads, and never repeats |
| `tb_impres_loader_port` | answers inside and outside the window, and the one-cycle latency |
| `tb_impres_monitor` | T0 to T10 over 400 random programs; the exact latency of every signal |
| `tb_impres_top` | end to end at default parameters (described below) |
| `tb_impres_workloads` | the five benchmark-shaped programs (described below) |

**`tb_impres_top`** drives a behavioural processor model
(`tb/pisa_exec_model.sv`) that follows the control flow of a program in
memory. Instrumented programs are built by `tb/impres_prog_pkg.sv`. The test:

* securely loads programs with loops and runs them to completion with no
  signal;
* checks that encryption is refused outside the load window;
* checks that a reload changes the encrypted checksums, and that the old
  image then fails;
* corrupts a block in each of the ten ways of the table above;
* checks that a fresh load after an aborted run starts clean.

It counts each of these and fails if one never happens.

**`tb_impres_workloads`** rebuilds the shape of the MiBench programs IMPRES
was evaluated with. Each synthetic program has the same number of
instructions and basic blocks as the benchmark: adpcm encode and decode,
blowfish encrypt and decrypt, and crc32, with 58, 55, 139, 139 and 80
blocks. For each program, the test injects 10000 single-instruction faults
(random valid instruction, or a single-bit flip) and runs the program after
each one. Result from a run:

| program | caught by processor | SIGCKSM | SIGNCFI | missed | executed `chk` overhead |
|---|---|---|---|---|---|
| adpcm.encode | 831 | 8260 | 909 | 0 | 14 % |
| adpcm.decode | 785 | 8320 | 895 | 0 | 14 % |
| blowfish.encrypt | 736 | 8668 | 596 | 0 | 4 % |
| blowfish.decrypt | 778 | 8549 | 673 | 0 | 4 % |
| crc32.checksum | 837 | 8184 | 979 | 0 | 15 % |

Every activated fault was caught. "Caught by processor" means an illegal
opcode or address, which the processor model reports itself. The synthetic
programs execute every block, so no fault stays unexecuted. Real programs
have dead paths, where injected faults are never activated. The chk overhead
is for the synthetic programs. It has the same trend as the original
measurements: larger basic blocks mean lower overhead.

### Running the testbenches

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/impres_pkg.sv tb/impres_ref_pkg.sv tb/impres_prog_pkg.sv \
  tb/tb_impres_top.sv --top-module tb_impres_top -o sim
./obj_dir/sim
```

Replace the last file and the top module name for another testbench. Each
testbench prints `TB_RESULT checks=N failures=M`, and a watchdog ends a run
that hangs. `tb_impres_workloads` takes about a minute. Its `INJECTIONS`
parameter sets how many faults each program gets.

## Where this design departs from the original

The following choices are this design's own; the original description does
not fix them:

* the `chk` encoding, the CFI opcode list, and the checksum and key widths;
* the fold function and the cipher (the original does not name either);
* the LFSR key generator with an entropy input;
* the load window with its refusal rule, and the request/response port;
* the signal timing;
* recognising `chk` only by its whole first word.

The original builds the monitor into the micro-operations of a PISA
processor generated by an ASIP design tool. Here it is a stand-alone unit
fed with the executed-instruction stream. The processor, the compile-time
instrumentation and the loader software are not part of the RTL. The
testbenches model them.

Some things are left undefined:

* What happens after a signal. The testbench processor stops.
* The cipher's strength. Four 16-bit Feistel rounds with a 64-bit key
  resist casual forgery but are not a vetted cipher. `ROUNDS` can be raised,
  and the cipher module can be swapped for any 32-bit block cipher with the
  same ports.

The scheme protects instruction memory only. It does not detect bit flips in
data memory, or attacks that reuse existing, valid code.
