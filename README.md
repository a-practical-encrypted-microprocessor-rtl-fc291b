# An encrypted OpenRISC-subset processor

This processor runs ordinary RISC machine code on **encrypted data**. The idea is that
changing only the arithmetic is enough. Suppose every arithmetic result comes out
encrypted whenever its inputs were encrypted. Then every value the program ever leaves
in registers, on buses or in memory is a ciphertext. The privileged operator (the
supervisor-mode software and whoever controls it) can move those values around but
cannot read them.

Two encryption configurations share one architecture:

* **Rijndael (main configuration).** User data are 32-bit values encrypted into 64-bit
  Rijndael blocks. A pipelined codec inside the processor decrypts at the start of a
  run of arithmetic and encrypts at the end. In between, the ALU works on plaintext
  held in *shadow registers*, which supervisor code cannot see.
* **Paillier (keyless configuration).** Ciphertexts are 72-bit Paillier values. Adding
  two encrypted numbers means multiplying the ciphertexts modulo `m`, so the codec
  stages hold a modular multiplier instead, and nothing is ever decrypted.

The RTL implements the Rijndael configuration as a working core, with a user-mode
instruction subset plus a small supervisor subset. The Paillier adder sits beside the
core as a separate unit.

## Five data types and the two register halves

Understanding the type discipline is the key to the whole design. Each of the 32 general
purpose registers has two 64-bit halves:

| half   | seen by          | holds                                                                              |
|--------|------------------|------------------------------------------------------------------------------------|
| real   | supervisor mode  | **S** ciphertext, **a** clear supervisor value, or **\*** placeholder               |
| shadow | user mode        | **M** decrypted user value, **N** supervisor value marked as "decrypted", or **\*** |

Encodings (`kpu_pkg`):

| type | meaning                                              | 64-bit encoding                     |
|------|------------------------------------------------------|-------------------------------------|
| M    | plaintext of encrypted user data (32 bits)            | zero-extended                       |
| S    | user data encrypted                                   | any Rijndael ciphertext             |
| a    | 32-bit supervisor data in the clear                   | zero-extended                       |
| N    | supervisor data, marked                               | `0x7fff` in bits 63:48, value in 31:0 |
| \*   | placeholder: an encryption or decryption is pending   | `0x7fff_0000_0000_0000` (N of zero) |

The pairs that may occur are M/S, M/\*, \*/S and N/a, written user-view/other-half. The
supervisor sees them swapped (S/M and so on), and never sees M. Every instruction
preserves this invariant:

* **User arithmetic** needs M in both operands. It produces M in the shadow half and
  \* in the real half. Any other operand type is a *range error*: the instruction
  writes nothing and is counted.
* **User load**: a memory word of type S is decrypted by the codec and gives M/S. A
  clear word gives N/a. The placeholder gives \*/0.
* **User store**: M/S and \*/S store the S half. N/a stores a. M/\* sends the M value
  through the codec and stores the ciphertext.
* **Supervisor** instructions operate on the real halves with 64-bit arithmetic. A
  result gets its N-marked copy in the shadow half. A supervisor load of S gives S/\*.
  A supervisor store writes the real half, so it can only ever write S, a or \* to
  memory.
* Reset puts 0/N(0) (type a/N) in every register, so the invariant also holds at
  start-up. A user program must therefore set a register before using it as an operand.
  Otherwise the register still holds the reset value, which is supervisor data, and the
  instruction is a range error.

Memory tells a from S by the upper 32 bits: zero means a clear word. A ciphertext with
32 leading zero bits would be misread, but this happens with probability 2^-32.

## One codec, two configurations

Decrypting both operands and encrypting the result around every ALU operation would need
three codecs. Instead, the instruction set is changed so that each user instruction
needs the codec at most once:

* **Configuration B** is used by instructions with an encrypted immediate: `l.addi`,
  `l.andi`, `l.ori`, `l.xori`, `l.sfxxi` and the shift immediates. The codec decrypts
  the immediate before the register read and execute stages.
* **Configuration A** is used by loads and stores. Execute comes first, then the codec
  decrypts the loaded word or encrypts the stored register.

A 64-bit encrypted immediate does not fit in a 32-bit instruction. The assembler
therefore emits two **prefix** instructions ahead of it (opcode `0x1c`). Each prefix
carries 24 bits of the ciphertext:

```
prefix  E[63:40]            31:26 opcode | 25:24 fill | 23:0 fragment
prefix  E[39:16]
l.addi  rD, rA, E[15:0]     the instruction's own 16-bit field
```

`imm_assembler` joins the three fragments. Load and store offsets are ignored, so a
load at an offset becomes `l.addi r31, rB, E(off)` followed by `l.lws rD, 0(r31)`.
Overflow is never reported for destination r31, which is kept for such address
arithmetic.

In the shift-immediate instruction, bits 7:6 are both the shift kind and part of the
encrypted fragment. The assembler picks padding bits in the plaintext block until the
ciphertext bits 7:6 equal the shift kind it wants. Because the encryption is
one-to-many, such padding exists. The testbench's assembler shows how this is done.

A user plaintext block is `{32-bit padding, 32-bit value}`. Decryption keeps bits
31:0. The core encrypts stores with zero padding.

### The codec (`rijndael64_codec`)

* Rijndael with a 2-column (64-bit) state and a 128-bit key. This gives 10 rounds, one
  per pipeline stage.
* A block enters every cycle, tagged with its direction, and leaves exactly 10 cycles
  later.
* The S-box is computed as the affine map of the GF(2^8) inverse, not stored.
* Standard Rijndael defines no ShiftRows offsets for a 2-column state. Rows 1 and 3 are
  rotated by one column here.

## Data addresses: hash, then remap

User data addresses are data, so they exist in the clear only inside the core.

1. `addr_hash` turns the decrypted 32-bit address into a 64-bit keyed hash: XOR with
   the key, then the MurmurHash3 finaliser. The hash is a bijection, so two addresses
   never collide.
2. `user_tlb` maps each hash to a slot in a contiguous linear region, the upper half of
   data memory. Slots are handed out first come, first served, so addresses used close
   together in time land close together in memory.
3. The TLB holds only `TLB_ENTRIES` (16) mappings. Every slot ever handed out is also
   recorded in a *mapping database*: a RAM in the core with one entry per slot, holding
   that slot's address hash. On a TLB miss, a hardware miss handler searches the
   database from slot 0 upwards, two cycles per entry.
   * If the hash is found, its mapping goes back into the TLB through the `fill_*` port,
     and the access proceeds.
   * If not, the address is new, and the TLB hands out the next free slot.

   The search is linear, so a miss costs time proportional to the number of slots in
   use. That is acceptable for the small programs this core runs, but a real machine
   would use a hashed table. When every slot of the region is taken, an access to a new
   address is refused and counted as a range error.

## Decrypted-immediate instruction cache (`user_icache`)

User-mode fetches go through a small direct-mapped cache of 16 lines × 4 words. After
the codec has decrypted an immediate, the cache stores the plaintext next to the
instruction and turns the two cached prefixes into `l.nop`. The next time round a loop,
the instruction needs no codec use. If the three words span two lines, nothing is
patched, so that replacing one line can never leave half of a patched sequence behind.
The cache is flushed whenever a program is started.

## Decrypted-data cache (`user_dcache`)

A user load would normally need the codec to decrypt the word it reads. A small user-mode
data cache avoids this. It keeps each cached word twice: as the 64-bit ciphertext in
memory, and as its 32-bit value. A user load that hits writes both back to the register
(value in the shadow half, ciphertext in the real half) without reading memory or using
the codec.

* A user load that misses installs the pair once the codec has decrypted the word.
* A user store installs the pair when both halves are known. That is the case for an M
  value whose register still holds its ciphertext, and for a store the codec has just
  encrypted.
* Any other store to a cached word invalidates it. This covers clear supervisor data,
  placeholders and every supervisor store.

The cache is direct mapped, with 16 lines of one word each, indexed by the remapped data
memory address. It is write-through, so memory is always current, and it is flushed
when a program starts. Like the instruction cache, it lies inside the processor, so its
plaintext is never visible outside.

## Paillier adder (`paillier_add`)

This unit computes `a·b mod m` on 72-bit operands, which must satisfy `a, b < m`. It
uses interleaved shift-and-add with conditional subtraction. Eight multiplier bits are
handled per stage over 10 stages, one operation per cycle. With ciphertexts
`E(x) = (1+n)^x r^n mod n²`, its output is an encryption of `x+y`.

Two things are not implemented:

* Subtraction, which needs a modular inverse.
* Comparison, which needs an externally supplied table of signs.

## Modules

| module             | role                                                        |
|--------------------|-------------------------------------------------------------|
| `kpu_pkg`          | widths, type encodings, opcodes, statistics struct          |
| `kpu_top`          | core, instruction RAM (2^18 × 32), data RAM (2^16 × 64), Paillier unit, host port |
| `kpu_core`         | control state machine, decode, TLB miss handler and mapping database, wiring of the units below |
| `rijndael64_codec` | pipelined encrypt/decrypt                                    |
| `imm_assembler`    | prefix fragments → 64-bit encrypted immediate                |
| `shadow_regfile`   | 32 × (real, shadow) registers, view chosen per access by mode |
| `kpu_alu`          | user 32-bit ALU with type checks; supervisor 64-bit ALU      |
| `addr_hash`        | keyed address hash                                           |
| `user_tlb`         | address remapping, first come first served                   |
| `user_icache`      | user instruction cache holding decrypted immediates          |
| `user_dcache`      | user data cache holding decrypted words                      |
| `branch_pred_buffer` | 2-bit-counter branch prediction buffer                     |
| `paillier_add`     | 72-bit modular multiplier, 10 stages                         |
| `kpu_ram`          | two-port synchronous RAM                                     |

### Instructions

The core supports these instructions, using OpenRISC 1000 encodings:

* `l.add l.sub l.and l.or l.xor`, and shifts by register
* `l.addi l.andi l.ori l.xori`
* `l.slli l.srli l.srai`
* `l.sfxx` and `l.sfxxi`
* `l.lwz l.lws l.sw`
* `l.j l.bf l.bnf`, with a delay slot
* `l.nop`; `l.nop 1` halts
* the prefix instruction

In supervisor mode, immediates are the plain 16-bit field. Any other opcode retires
without effect and counts as a range error.

### Running it

The host interface works as follows:

1. Load the instruction memory through `host_imem_*`.
2. Load the data memory through `host_dmem_*`.
3. Pulse `start`, with `start_user` selecting user (encrypted) or supervisor mode.
4. Wait for `halted`.

Registers survive between runs. A supervisor program can therefore inspect what a user
program left behind, and will find only ciphertexts and placeholders. `stats` counts
cycles, retired instructions, prefixes, codec uses of each kind, icache patches and hits,
TLB hits, misses and refills from the database, data cache hits, range errors, taken
branches, and the prediction buffer's hits, misses, right and wrong predictions.

## Timing

* The codec and the Paillier adder each have a latency of 10 cycles and accept one
  input per cycle.
* The core runs **one instruction at a time**:
  * fetch: 1 cycle, plus 1 more unless the user icache hits;
  * decode: 1 cycle;
  * codec in configuration B: 10 cycles;
  * execute: 1 cycle;
  * memory: 1 cycle, plus 1 for a load that misses the user data cache;
  * TLB miss: 1 cycle if no slot is in use yet, otherwise 2 cycles per database entry
    searched, then 1 more;
  * codec in configuration A: 10 cycles;
  * write-back: 1 cycle.

  Prefixes, branches and no-ops retire at decode.
* Memories read in one cycle.

## Departures and limits

* **No overlap between instructions.** The intended machine is a superscalar 15-stage
  pipeline. In it, the codec costs little, because a new block enters every cycle. It
  also has full forwarding and speculative execution. None of that is built. The codec
  here is pipelined, but it is only given one block at a time, so cycle counts are far
  higher than such a pipeline would achieve.
* **Branch prediction without speculation.** The branch prediction buffer
  (`branch_pred_buffer`) is built: 16 direct-mapped entries with 2-bit counters, and a
  not-taken prediction for a branch it does not hold. The core looks up and trains it
  for every `l.bf` and `l.bnf`, and counts hits, misses, right and wrong predictions.
  Since nothing is fetched ahead, a prediction saves no cycles here.
* **Blocks not built:**
  * the supervisor data cache (memory answers in one cycle here, so it would add nothing);
  * exceptions, interrupts and system calls (the mode is chosen at start);
  * special purpose registers and the GPR-to-SPR save protocol for context switches;
  * multiply, divide, byte and half-word loads;
  * most of the 220 OpenRISC instructions;
  * a Paillier version of the core.
* **This design's own choices** are marked as such in each file's header. They
  include:
  * the Rijndael key length and ShiftRows offsets;
  * the a/S/M encodings in memory;
  * the hash function;
  * the sizes of the TLB, of both caches and of the prediction buffer;
  * the mapping database as a dedicated RAM searched by hardware. The intended machine
    keeps it in ordinary memory, behind a cache, with a software fault handler;
  * the prefix opcode number;
  * the Paillier algorithm.
* **Workloads.** The OpenRISC test suite programs used to measure this kind of machine
  need the full instruction set. The add test has 185 628 instructions. It fits in the
  2^18-word instruction memory, but this core cannot execute it.

## Verification

Every module in `rtl/` has a self-checking testbench in `tb/`. Each testbench compares
the module against values worked out independently, and ends with a
`TB_RESULT checks=… failures=…` line.

* `tb_rijndael64_codec` checks against a separately written reference cipher
  (`rijndael64_ref_pkg`), including throughput and the 10-cycle latency.
* `tb_paillier_add` checks against wide `%` arithmetic and the Paillier homomorphism.
* `tb_kpu_top` runs the whole design at its default sizes. It assembles and encrypts
  user and supervisor programs, runs them, and checks:
  * register halves and memory contents;
  * that the supervisor never sees user plaintext;
  * that every mechanism listed above happens at least once;
  * that each immediate decryption takes exactly 10 cycles;
  * that an array of 20 words, more than the TLB holds, is written and read back through
    mappings refilled from the database, with most loads served by the data cache.
  * the exact number of prediction buffer hits, misses and mispredictions over its
    three loops.

Example with plain Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/kpu_pkg.sv tb/rijndael64_ref_pkg.sv tb/tb_kpu_top.sv --top-module tb_kpu_top
./obj_dir/Vtb_kpu_top
```
