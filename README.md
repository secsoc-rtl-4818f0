# SecSoC security hardware in SystemVerilog

An IoT node left in the field can be opened by whoever finds it: memory can be
dumped, the bus between processor and memory snooped, code replaced, the
operating system compromised. SecSoC answers this with one rule: **a sensitive
value never leaves the chip in plaintext.** Variables that the programmer marks
as sensitive live in memory only as AES-128 ciphertext. When the program loads
one, the processor decrypts it into a hidden *shadow register*; when the program
stores one, the processor encrypts it first. All keys, and a reference hash of
every piece of code that touches sensitive data, stay inside an on-chip
*Security Management Unit* (SMU). The instruction set does not change. The
compiler brackets each group of loads or stores of a sensitive variable with two
ordinary no-op instructions. The hardware recognises these markers, checks the
code between them, and does the cryptography.

This repository holds RTL for the on-chip security hardware:

- the extensions of the RISC-V core's decode stage and register file;
- the SMU with its AES-128 engine, block hashing and secret store.

The base RISC-V pipeline is not included. It is an existing 5-stage in-order
core, and it connects to this hardware through the ports of `secsoc_chip`.

## Sensitive blocks

A sensitive variable of 32 bits is stored in memory as one 128-bit AES block.
The variable sits in the low 32 bits of the block, and the upper 96 bits are
zero. Moving the variable therefore takes four word accesses. The compiler emits
those four accesses as one *sensitive block*, marked at both ends:

```
Begin  = ADDI x0, x0, serial      # enter secure mode
  lw   x5,  0(x10)                # lane 0 of the ciphertext (most significant word)
  lw   x5,  4(x10)                # lane 1
  lw   x5,  8(x10)                # lane 2
  lw   x5, 12(x10)                # lane 3
End    = ADDI x0, x1, serial      # leave secure mode
```

Both markers write `x0`, so on any RISC-V core they change nothing. The 12-bit
immediate carries the block's serial number. A block holds either exactly four
`lw` or exactly four `sw`, and all four move the same register.

One consequence of this encoding: `ADDI x0,x0,0` is also the standard RISC-V
`nop`. Code that runs on this hardware must not contain plain `nop`s, or
serial 0 must be left unregistered so that a stray `nop` traps.

## Where a sensitive value lives

Each of the 32 registers (`secure_regfile`) has five parts:

| part | width | content |
|---|---|---|
| GPRF | 32 | the architectural register; for a sensitive register, lane 0 of the ciphertext |
| ERF  | 96 | lanes 1..3 of the ciphertext |
| SRF  | 32 | the plaintext (the shadow register) |
| S    | 1  | the register holds a sensitive value |
| M    | 1  | the plaintext changed since the ciphertext was made |

An operand read returns the SRF when S is set and the GPRF otherwise. The
program therefore computes on plaintext, but the SRF can reach memory only by
being encrypted.

**Load block.** Decode tags each of the four loads with `id_secure=1` and its
lane number. The pipeline carries these tags to write-back, where each word
lands in the GPRF (lane 0) or the ERF (lanes 1..3), S is set and M is cleared.
Decode accepts the `End`, then stalls the next instruction until three things
have happened in turn:

1. the SMU has verified the block hash;
2. all four loads have been written back and the pipeline is empty;
3. the SMU has decrypted `{GPRF, ERF}`, and bits [31:0] of the result are in
   the SRF.

**Computing.** An ALU result with at least one sensitive operand is written with
`wb_sens=1`. It goes to the SRF with S and M set, so a value derived from a
secret is itself a secret that must be re-encrypted before it is stored.
Deciding `wb_sens` takes one OR of the operands' S bits, which the register
file returns alongside the data (`rs1_sens`, `rs2_sens`).

**Store block.** Decode holds the first store in place until the pipeline is
empty, so that no write to the register is still in flight. It then reads S
and M:

- If S is set and M is clear, the ciphertext in GPRF/ERF is still current and
  is stored as it is. No encryption is needed.
- Otherwise the SMU encrypts the value, zero-extended to 128 bits. The
  ciphertext is written to GPRF/ERF, the plaintext stays in the SRF, S is set
  and M is cleared.

The four stores then read lanes 0..3 of the ciphertext through the store-data
port. After `End`, decode stalls until the hash is verified.

A plain load (outside any block) into a register clears its S bit: the register
simply stops being sensitive.

## Checks and exceptions

`decode_ext` raises `exc_valid` with a cause from `secsoc_pkg::exc_cause_e`.
After any exception the core is back in normal mode and the open block is
abandoned. The trap itself belongs to the core.

| cause | raised when |
|---|---|
| `EXC_BAD_SERIAL` | `Begin` whose serial has no valid hash in the SMU |
| `EXC_NESTED_BEGIN` | `Begin` inside an open block (its `End` is missing) |
| `EXC_END_NO_BEGIN` | `End` outside a block |
| `EXC_SERIAL_MISMATCH` | `End` serial differs from the `Begin` serial |
| `EXC_COUNT` | a block with other than four loads/stores |
| `EXC_MIXED` | loads and stores mixed, two registers, `x0`, or any other instruction inside a block |
| `EXC_HASH` | the hash of the block's six instruction words differs from the stored hash (raised after `End`, with no instruction attached) |
| `EXC_SENS_NORMAL` | `sw` of a sensitive register outside a block; the store-data port also drives zero |

The hash can only be checked once `End` has been seen. In a store block the
four stores have already gone out by then, but only as ciphertext. In a load
block nothing is decrypted until the hash has passed.

The hash check is the code-integrity mechanism. An attacker who injects or
edits a sensitive block, for example to redirect its stores to a readable
address, changes its hash. The value is then never decrypted.

## Security Management Unit

`smu` serves three kinds of request, one at a time, on a single shared
`aes128_core`:

- **Hash stream.** Decode sends every word of a block, `Begin` and `End`
  included (`hash_first` marks `Begin`). Words are packed four to a 128-bit
  chunk, first word most significant, and chained as a CBC-MAC under the
  **master key**: `H = AES(Kmaster, H xor chunk)`, with H starting at zero.
  On `fin_valid`, a final chunk is chained in. It holds the leftover words
  (0..3), zeros, and the total word count in bits [31:0]. The result is
  compared with the reference hash stored for that serial.
- **Encrypt / decrypt** one 128-bit block under the **application key**.
- **Serial query.** `ser_registered` says whether a serial has a valid hash.

`secret_store` holds the secrets:

- the master key, fixed at fabrication (parameter `MASTER_KEY`);
- the application key;
- one 128-bit reference hash and valid flag per block (`NUM_BLOCKS = 64`).

The store models an erasable nonvolatile memory, so reset does not clear it.
It is written over the `cfg_*` port at provisioning time (32-bit words,
`cfg_addr[15:14]` selects the region):

| `cfg_addr` | written |
|---|---|
| `00_xxxxxxxxxxxx_ww` | application key word `ww` (word 0 = key[127:96]) |
| `01_eeeeeeeeeeee_ww` | word `ww` of the hash of block `e` |
| `10_eeeeeeeeeeeeee` | valid flag of block `e` (`cfg_wdata[0]`) |

`cfg_lock` closes the store. Only `cfg_erase` reopens it, and erase also wipes
the application key and every valid flag. New code hashes can therefore be
provisioned only by destroying the key that protects the existing data. No
port reads the store from outside the SMU.

To provision a program, compute each block's CBC-MAC under the master key as
above, write the hashes, valid flags and application key, then lock. The
end-to-end testbench does exactly this.

## AES-128 core

`aes128_core` is a FIPS-197 AES-128 engine that does one round per clock. It
derives round keys on the fly, so no key schedule is stored.

- **Encryption** steps the key schedule forward alongside the rounds. `done`
  rises 10 clocks after the clock that samples `start`.
- **Decryption** first runs the schedule forward to round key 10, then walks
  it backward with the inverse rounds. `done` rises after 20 clocks.

The S-box is not written out as a table. `aes_pkg` computes it at elaboration:
it takes the GF(2^8) inverse as x^254 and applies the affine map
`v ^ rotl(v,1) ^ rotl(v,2) ^ rotl(v,3) ^ rotl(v,4) ^ 0x63`. The inverse S-box is
built by inverting that permutation.

## Timing seen by the core

| event | cycles |
|---|---|
| SMU encryption, accept to `crypt_done` | 11 |
| SMU decryption, accept to `crypt_done` | 21 |
| SMU hash chunk or finalisation | 11 |
| stall on `hash_ready` | 4th word of a block triggers a chunk: the 5th word waits for it |
| load block + one plain load + one add, first instruction offered to last accepted, in the end-to-end test | 60 |

The exact stall of a block depends on the pipeline depth, because a load block
waits for its loads to drain and a store block waits for an empty pipeline.

## Module map

```
secsoc_chip                 top: core-facing ports, configuration port
├── decode_ext              Begin/End, checks, secure mode, stalls, SMU sequencing
├── secure_regfile          GPRF + ERF + SRF + S + M
└── smu                     request sequencer, CBC-MAC, verify
    ├── aes128_core         iterative AES-128 enc/dec
    └── secret_store        master key, application key, block hash table
packages: secsoc_pkg (sizes, instruction decoding, exception causes), aes_pkg (AES functions)
```

### Connecting a pipeline to `secsoc_chip`

The core-facing ports of `secsoc_chip` fall into five groups.

- **Decode.** Offer the instruction with `id_valid` / `id_instr`. It is
  accepted in a cycle where `id_stall` is low.
- **Tags.** In the accepting cycle, `id_secure` / `id_lane` are tags that
  travel with the instruction. `exc_valid` / `exc_cause` in that cycle mean
  the instruction must trap instead of executing.
- **Operands.** `rs1_*` and `rs2_*` are the register read ports. Each returns
  the value and its S bit.
- **Write-back.** The `wb_*` signals carry the instruction's tags back.
  `wb_load` marks loads. `wb_sens` is the OR of the S bits of the operands the
  instruction used.
- **Store data.** `st_addr` is the store's source register, given with its
  tags. `st_data` is what goes onto the bus.

`pipe_drained` must be high when no instruction is between decode and
write-back.

All reads are combinational and all writes happen at the rising clock edge.
`rst_n` is asynchronous and active-low.

## Design choices beyond the architecture description

The architecture fixes the list of checks, the register-file structure, the
stalls, the 128-bit AES key, and the `Begin`/`End` encoding. The following
points are this implementation's own choices:

- A serial number counts as correct when the SMU has a valid stored hash for
  it.
- All four accesses of a block must use one register, and any non-load/store
  instruction inside a block traps.
- The hash is an AES CBC-MAC under the master key, and it covers `Begin` and
  `End`. The data key is a separate application key.
- Padding is zero-extension of the 32-bit variable to 128 bits. Lane 0 is the
  most significant word.
- Sensitivity propagates through the ALU (`wb_sens`). The architecture leaves
  derived variables to the compiler. Without propagation, a derived value such
  as `a = b + c` would sit in the GPRF in plaintext.
- A store block holds its first store until the pipeline is empty before it
  reads S/M and encrypts.
- The secret store has a lock/erase protocol and a configuration address map.
  The store is modelled as registers standing in for an EEPROM macro.
- Certificates are named among the secrets, but no use of them is defined, so
  none are stored.
- There is one shared AES core with an iterative, on-the-fly key schedule.

Registers saved on a context switch get no special path. A sensitive register
that has to be saved, for a call, a thread switch or an interrupt, must go
through a store block like any other store of it, because a plain `sw` of a
sensitive register traps. The M bit keeps such a save cheap when the value is
unchanged, since no encryption is needed.

Nothing checks the 96 padding bits of a decrypted block. A corrupted
ciphertext decrypts to some value and is not detected; only the code is
integrity-protected.

## Not included

- The RISC-V pipeline and its caches.
- The shared system bus.
- Main memory (DRAM), the external nonvolatile memory, and I/O devices.
- A random number generator. The SMU is meant to offer one, but no part of the
  protection flow uses random numbers, and no construction for it is
  specified.

The testbench `tb_secsoc_chip` contains a small behavioural in-order core and
a word memory in their place.

## Verification

Each testbench checks itself and ends with `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_aes128_core` | FIPS-197 vectors (App. B, C.1), 80 random enc/dec against an independent behavioural AES, cycle counts |
| `tb_secret_store` | key/hash/valid programming, lock, erase |
| `tb_smu` | CBC-MAC verification of genuine, tampered, wrongly stored and unregistered blocks; enc/dec results and latencies; lock and erase |
| `tb_secure_regfile` | 3000 random writes of every kind against a reference model; all read ports |
| `tb_decode_ext` | block flows with behavioural SMU/register file: hash stream, lane tags, stalls, encrypt/decrypt requests, skipped re-encryption, every exception cause |
| `tb_secsoc_chip` | end to end at default parameters: provisioning, a program that loads an encrypted `b`, computes `a = b + c` and `b++`, and stores both encrypted; an unmodified re-store; a sequence that raises every exception cause once. Memory is checked by decrypting with the reference AES; each mechanism (decryption, encryption, skipped encryption, stall, taint, each provoked exception) is counted and must occur |
| `tb_secsoc_random` | end to end, 150 random steps over four encrypted variables and four plain registers (load/store blocks, sensitive and plain arithmetic); every register checked after each step against a value model, all variables decrypted from memory at the end |

`tb/aes_ref_pkg.sv` is the reference AES/CBC-MAC. Its S-box comes from a
different construction, the logarithm walk over powers of 3, so it does not
share code with the RTL.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/aes_pkg.sv rtl/secsoc_pkg.sv tb/aes_ref_pkg.sv tb/tb_secsoc_chip.sv \
  --top-module tb_secsoc_chip -o sim && obj_dir/sim
```

Substitute any other testbench name. Every run takes well under a second.

Synthesised with Yosys (coarse, memories kept as memory cells), `secsoc_chip`
comes to about 1,400 word-level cells, 5,100 flip-flop bits and 9,200 memory
bits. The memory bits are the 64-entry hash table and the register file's
data arrays.
