# Flexible-key RSA engine built from additions and subtractions

This is a small RSA encryption/decryption engine whose key size is chosen at
run time, from 32 up to 1024 bits, for each message block. It computes
`C = M^E mod N` without a multiplier or a divider. One adder/subtractor,
steered by a state machine, runs three nested loops:

* exponentiation by squaring and multiplying,
* multiplication by shifting and adding,
* reduction modulo `N` by repeated subtraction.

Registers therefore stay at key width plus two guard bits. No double-width
product is ever formed. The price is run time: a 1024-bit modular
multiplication takes about 4,000 clock cycles.

Encryption and decryption are the same operation. Apply the public exponent
`e` to encrypt and the private exponent `d` to decrypt, with the same modulus
`n`.

Around the arithmetic core sit a serial-to-parallel converter, an input
buffer, an output buffer and a parallel-to-serial converter. Message blocks go
in one bit at a time and results come out the same way:

```
data_in ─► rsa_preprocess ─► rsa_prebuffer ─► rsa_core ─► rsa_postbuffer ─► rsa_postprocess ─► serial
 (serial)  serial→parallel     block FIFO      M^E mod N    block FIFO       parallel→serial
```

`rsa_combine` is the top level.

## The arithmetic core (`rsa_core`)

### Three loops

**Exponentiation, left to right.** The exponent is scanned from bit `SIZE-1`
down to bit 0:

- Leading zero bits are skipped, at one cycle each.
- At the first one bit, `C := M`.
- For every later bit, `C := C·C mod N`. If that bit is one, this is followed
  by `C := M·C mod N`.
- An all-zero exponent leaves `C = 1`.

For example, `e = 43 = 101011₂` gives `M → M² → M⁵ → M¹⁰ → M²¹ → M⁴³`.

**Modular multiplication, interleaved.** `P = A·B mod N` starts from `P = 0`.
For each of the `SIZE` bits of `B`, most significant first:

```
P := 2P mod N
if bit of B is 1:  P := P + A mod N
```

For a squaring, `A = B = C`. For the multiply step, `A = M` and `B` is the
square just computed. The loop always runs over all `SIZE` bits of `B`, even
when `B` has leading zeros.

**Reduction by subtraction.** After each doubling or addition, the core tries
`P − N`. If the difference is non-negative, it replaces `P` and the core
tries again. The first difference that goes negative is thrown away. The value
entering a reduction is below `2N` when `M < N`, so the loop succeeds at most
once and costs one or two cycles.

### Datapath

There is one `(W+2)`-bit adder/subtractor, `rsa_alu`. Subtraction adds the
one's complement with a carry-in of one. The FSM chooses its operands:

| state   | ALU operation | result goes to                          |
|---------|---------------|-----------------------------------------|
| `S_DBL` | `P + P`       | `P`                                     |
| `S_ADD` | `P + A`       | `P`                                     |
| `S_RED` | `P − N`       | `P`, if the sign bit (bit `W+1`) is 0   |
| `S_EXP` | none          | examines the exponent bit, sets up `B`  |

The two guard bits above `W` keep `2P`, `P + A` and the trial difference from
overflowing. The top bit of the trial difference is its sign.

Registers:

- `P`: `W+2` bits.
- `C`, `B` (a shift register), `M`, `N`, `E` (a shift register): `W` bits each.
- Two loop counters of `log2(W)` bits, 10 bits at 1024. One counts exponent
  bits, the other multiplier bits.

`M`, `N` and `E` are captured when `GO` is accepted, so the inputs may change
during a run.

### Cycle cost

Each state takes one clock. For one modular multiplication, each bit of `B`
costs:

- `2 + r₁` cycles (double, then reduce), plus
- `2 + r₂` more cycles when the bit is one (add, then reduce).

Here `r₁` and `r₂` are the numbers of successful subtractions, 0 or 1 when
`M < N`. Every exponent bit also costs one `S_EXP` cycle. On average a
multiplication costs about 3.75 cycles per key bit.

| operation (`rsa_core`, 20 MHz clock)                  | cycles | time      |
|-------------------------------------------------------|-------:|----------:|
| 32-bit key, exponent `0x41`                           |    825 |  41.25 µs |
| 32-bit key, exponent `0x13A0C2`                       |  3,082 | 154.10 µs |
| 1024-bit key, full-size modulus, `e = 5`              | 12,344 | 617.20 µs |
| 1024-bit key, `e = 65537` (estimate)                  | ≈ 66,000 | ≈ 3.3 ms |

The run time depends on the data, so `tb_rsa_core` does not use fixed
numbers. It works out the expected count from the formula above and checks
it to the cycle.

### Interface

| port     | dir | width | meaning                                                     |
|----------|-----|-------|-------------------------------------------------------------|
| `go`     | in  | 1     | start; accepted when `ready` is high                        |
| `m`      | in  | W     | message, or ciphertext when decrypting; must be below `n`   |
| `e`      | in  | W     | exponent (`e` or `d`)                                       |
| `n`      | in  | W     | modulus, above 1                                            |
| `size`   | in  | 3     | key-size code (see below)                                   |
| `c`      | out | W     | result, valid while `done` is high                          |
| `c_size` | out | 3     | key-size code of the result                                 |
| `done`   | out | 1     | high from the end of the run until the next `go` or reset   |
| `ready`  | out | 1     | idle or done: can accept `go`                               |

`rst` is synchronous and active high, as it is in every module.

## Key sizes and block format

`size` is a `rsa_pkg::key_size_e` code:

| code     | 0  | 1  | 2   | 3   | 4   | 5    |
|----------|----|----|-----|-----|-----|------|
| key bits | 32 | 64 | 128 | 256 | 512 | 1024 |

Codes 6 and 7 act as 1024.

Every word is `W` bits wide and right-aligned. Bits at or above the key size
are ignored on input and zero on output. The size is the number of bits
scanned in the exponent and the multiplier. It is also the number of bits
shifted in and out serially.

Each block carries its size code through both buffers. Blocks of different
sizes can therefore be in flight at once. The exponent and modulus on
`rsa_combine`'s `e` and `n` ports must stay stable while blocks are in flight.

## Serial converters and buffers

**`rsa_preprocess`.** A `start` pulse begins a block:

- The bit on `data_in` in that same cycle is bit 0.
- One more bit is taken on each following cycle, least significant first.
- `valid` rises the cycle after the last bit. It stays high, with the block on
  `data_out`, until the next `start`.

**`rsa_prebuffer`.**

- Stores a block when `valid` rises, in a 2-entry FIFO (`rsa_block_fifo`).
- Raises `go` combinationally, with the oldest block on `m`, whenever a block
  waits and the core may start. The block leaves the FIFO on that same edge.
- A block that completes while the FIFO is full is dropped and sets the sticky
  `overflow` flag. The flag clears on reset.

**`rsa_postbuffer`.**

- Stores the result when the core's `done` rises.
- Hands the oldest result to the serializer with a one-cycle `out_start` when
  the serializer is idle.
- Its `can_accept` output says whether one more result is sure to fit. It also
  counts a result being stored in the current cycle.

**`rsa_postprocess`.** `out_start` loads a result. From the next cycle,
`serial` carries one bit per clock, least significant first, with `busy`
high. `valid` (`done_complete` at the top) rises the cycle after the last bit.
Anything on `serial` after that is not part of the result, and `serial` is 0
whenever it is idle.

**Flow control.** `rsa_combine` starts the core only when both of these hold:

- the core is ready, and
- the output buffer has room (`can_accept`).

Only the core fills the output buffer, so a result is never lost. The input
side has no back-pressure. A sender must watch `prebuf_full`: a block
completed while it is high is dropped. `overflow` records that this happened.

**End-to-end latency of one block** (`b` = key bits):

- `b` cycles to shift in,
- a few cycles of handover into and out of the buffers,
- the core's run time,
- `b` cycles to shift out.

## Top-level ports (`rsa_combine`)

| port            | dir | width | meaning                                            |
|-----------------|-----|-------|----------------------------------------------------|
| `start`         | in  | 1     | first bit of a message block is on `data_in`       |
| `size`          | in  | 3     | key-size code of that block                        |
| `data_in`       | in  | 1     | message bits, LSB first                            |
| `e`, `n`        | in  | W     | exponent and modulus, held stable                  |
| `in_valid`      | out | 1     | the last block has been fully shifted in           |
| `prebuf_full`   | out | 1     | input buffer full                                  |
| `overflow`      | out | 1     | sticky: a block was dropped                        |
| `core_done`     | out | 1     | the core's `done`                                  |
| `serial`        | out | 1     | result bits, LSB first                             |
| `serial_busy`   | out | 1     | `serial` carries result bits                       |
| `done_complete` | out | 1     | the last result has been shifted out               |

Parameters:

- `W`: widest key, default 1024. It must be a power of two, at least 32.
- `DEPTH`: blocks per buffer, default 2.

## What is taken as given, and what is chosen here

These points follow the engine as originally described:

- the three algorithms;
- the single-ALU, FSM-controlled core;
- registers two bits wider than the key;
- loop counters of `log2` of the key width;
- the 1024-bit maximum key;
- the five-unit chain with its port names (`M`, `E`, `N`, `SIZE`, `GO`, `C`,
  `DONE`; `DataIn`, `Start`, `Valid`; `Done`, `Serial`).

These are choices of this implementation:

- **Key sizes.** The original lists 32/64/128/512/1024 for the core but also
  quotes a 256-bit timing. All six powers of two are supported, and the
  3-bit encoding is new.
- **State machine.** The original state diagram was not available. The states
  above were derived from the algorithms. Each state costs one clock, and a
  failed trial subtraction costs one cycle.
- **Leading exponent zeros** are skipped at one cycle each. The multiplier
  loop always runs over the full key size.
- **Captured inputs.** `M`, `N` and `E` are captured at `GO`. That means more
  registers than the four working registers of the original.
- **Handshakes.** The `ready` output and the edge-triggered buffer writes are
  new.
- **Buffers.** A depth of 2, the `can_accept` look-ahead and the drop with
  `overflow` flag are new.
- **Serial protocol.** Bits go LSB first. `data_in` is sampled in the `start`
  cycle. The `busy` output is new.
- **Top-level key input.** The exponent and modulus enter the top in parallel.
  Only the message is serial.
- **Speed.** The original rates 32-bit encryption and decryption at 19.4 µs and
  41.6 µs. This core needs 41 µs and 154 µs for the same exponents at 20 MHz,
  because its multiplication loop costs about 3.75 cycles per bit.
  For 1024-bit encryption with a short exponent it stays inside the
  original's 790.61 µs (617 µs measured).
- **Operand range.** `M < N` is required and not checked. A larger `M` is
  not reduced first. The result is still correct, unless the exponent is
  exactly 1, but each reduction then loops up to `M/N` times.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops itself through a cycle
watchdog. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/rsa_pkg.sv tb/tb_rsa_combine.sv --top-module tb_rsa_combine -o sim
./obj_dir/sim
```

| testbench            | what it covers                                                                 |
|----------------------|--------------------------------------------------------------------------------|
| `tb_rsa_combine`     | Whole engine at default size. The example `n = 63, e = 5, d = 29` (7 → 49 → 7) at every key size; random keys at 32–256 bits; a 1024-bit key-pair round trip; a congestion phase that fills both buffers, holds the core back and drops a block. Counts each of these events and fails if one never happens. About 10 s. |
| `tb_rsa_workloads`   | Core run times at 20 MHz for the rated cases; checks the 1024-bit bound.       |
| `tb_rsa_core`        | Core at `W = 64`: results against a `%`-based reference, cycle counts to the cycle, reset mid-run. |
| `tb_rsa_alu`         | Adder/subtractor at 1026 bits, including the sign bit.                         |
| `tb_rsa_preprocess`, `tb_rsa_postprocess` | Bit order, bit count, `valid` timing, restart.              |
| `tb_rsa_prebuffer`, `tb_rsa_postbuffer`, `tb_rsa_block_fifo` | Ordering, handshakes, full/empty, overflow. |

Two things to change first, if needed:

- **Buffer depth.** `DEPTH` on `rsa_combine`.
- **A faster core.** Fold the reduction into the doubling and addition states,
  using a second subtractor. That removes about half of the cycles.
