# SipHash-C-D accelerator for FPGAs

SipHash is a keyed hash: a 128-bit secret key and a message of any length
give a 64-bit tag. It is built only from 64-bit additions, rotations and
xors (ARX), which map well onto FPGA fabric. This design hashes one 64-bit
message word per clock cycle, so a long message costs 0.125 cycles per byte,
about 13.7 Gbit/s at 214 MHz. It takes messages on an AXI-Stream input,
sends hashes out on an AXI-Stream output, and has a small AXI-Lite register
file for the key, a soft reset, a hash counter and the last hash.

The defaults give SipHash-2-4: two rounds per message word (C) and four
finalization rounds (D). Setting `C_ROUNDS = 1, D_ROUNDS = 3` gives
SipHash-1-3. Any other pair works too.

## The algorithm in hardware terms

The state is four 64-bit words v0..v3.

* **Initialization.** The state starts as `v0 = k0 ^ 736f6d6570736575`,
  `v1 = k1 ^ 646f72616e646f6d`, `v2 = k0 ^ 6c7967656e657261` and
  `v3 = k1 ^ 7465646279746573`. Here k0 is the low half of the key and k1 the
  high half.
* **Compression.** The message is cut into 64-bit little-endian words. Each
  word m is absorbed as `v3 ^= m`, then C SipRounds, then `v0 ^= m`.
* **Finalization.** `v2 ^= 0xff`, then D SipRounds. The hash is
  `v0 ^ v1 ^ v2 ^ v3`.

A SipRound (`rtl/sipround.sv`) is two half-rounds. Each adds, rotates by a
fixed amount (13, 32, 16, 21, 17, 32) and xors. The additions are modulo
2^64. One SipRound is a few 64-bit adders deep, and rotations cost no logic.

**Padding is the caller's job.** A message of b bytes becomes
floor(b/8)+1 words. The last word holds the final b mod 8 bytes, then zero
bytes, with b mod 256 in its top byte (bits 63:56). For example, the 9 bytes
00..08 become the words `0706050403020100` and `0800000000000008`. An empty
message is the single word `0000000000000000`. The core does not pad. It
takes the message end from TLAST alone, so it needs no length register and
handles any length.

## Datapath

```
            k0,k1 -> init state --+
                                  v
   s_axis_tdata (m) ---------> [mux] -> v3^=m -> C x SipRound -> v0^=m -> [state reg 4x64]
                                  ^                                             |
                                  +---------------------------------------------+
                                                                                |
        [state reg] -> v2^=0xff -> SipRound -> [reg] -> ... (D stages) -> xor4 -> [hash reg]
```

**Compression loop (`siphash_compress`).** The C SipRounds are purely
combinational between the state register's output and its input. This loop
is the critical path. It cannot be pipelined, because the next word needs the
result of the current word in the very next cycle. Only the loop length C
sets the clock rate. A multiplexer in front of the loop feeds in the key-based
initial state for the first word of a message and the register for every
later word. A one-bit "first word" flag drives it. Reset sets the flag, a word
with TLAST sets it, and any other word clears it. The key inputs are only
used on a first word.

**Finalization pipeline (`siphash_finalize`).** When a message ends, the state
register holds its compressed state for exactly one cycle. The next message
may overwrite it on the following edge. The pipeline samples it in that
cycle. It has D stages of one SipRound and one 256-bit register each, then an
xor of the four words into a 64-bit output register. A valid bit travels
with the data, so the output register loads only real hashes. The pipeline
takes a new state every cycle. Back-to-back messages, even one-word ones,
never stall the input.

**Core (`siphash_core`).** This block wires the two parts to AXI-Stream.
`s_axis_tready` is high whenever the core is out of reset, and
`TVALID && TREADY` absorbs a word. The hash is offered on `m_axis_*` as a
single beat with TLAST=1, and also on `hash_o` for the registers.

### Timing

* One word is accepted per cycle, with no gap between messages.
* The clock edge that takes the TLAST word loads the final state. The hash is
  in the output register D+1 edges later (5 cycles for SipHash-2-4). Those
  edges are the D pipeline stages plus the output register.
* A message of w words therefore takes w + D + 1 cycles from its first word
  to its hash. When messages follow each other, the D+1 cycles overlap with
  the next message, and throughput goes to 8 bytes per cycle.

### Output without back-pressure

The output stream does not slow down the input. Once a hash is offered,
`m_axis_tvalid` stays high until the sink takes it. If a newer hash arrives
first, it replaces the data, and the unread hash is lost. The design assumes
every hash is read before the next one is ready, whether by logic on the
stream or by software through the register file. Hashes are small next to
the messages that produce them, so this holds for any message of more than
D+1 words or so. The master AXI-Stream assertion in `siphash_core` checks
only that TVALID is held. It does not check that the data is stable, because
an overwrite changes it on purpose.

## Register file (`siphash_regs`, AXI-Lite, 32-bit)

| offset | register | access |
|---|---|---|
| 0x00 | k0[31:0] | R/W |
| 0x04 | k0[63:32] | R/W |
| 0x08 | k1[31:0] | R/W |
| 0x0C | k1[63:32] | R/W |
| 0x10 | soft reset, bit 0, active high | R/W |
| 0x14 | number of hashes since the last reset | R |
| 0x18 | last hash [31:0] | R |
| 0x1C | last hash [63:32] | R |

* While the soft-reset bit is 1, the core is held in reset. The hash counter
  is cleared, `s_axis_tready` is low, and a partial message is dropped.
* The key registers are cleared only by the bus reset `aresetn`. A typical
  sequence is: write the key, write 1 then 0 to 0x10, then stream messages.
* A key change takes effect at the next message's first word. Do not change
  the key while a message is in flight.
* Writes to read-only registers are ignored. Byte strobes are honoured.
  Responses are always OKAY.
* Each direction has one transaction outstanding at most.
  `AWREADY`/`WREADY` rise when both address and data are valid, and the
  response follows one cycle later.

The register file and the AXI-Stream core have the same clock and reset.
Everything is synchronous to `aclk`.

## Files

| file | contents |
|---|---|
| `rtl/siphash_pkg.sv` | `state_t`, the four constants, `init_state()` |
| `rtl/sipround.sv` | one combinational SipRound |
| `rtl/siphash_compress.sv` | initial-state multiplexer, C-round loop, state registers |
| `rtl/siphash_finalize.sv` | 0xff injection, D-stage pipeline, xor, hash register |
| `rtl/siphash_core.sv` | the core with AXI-Stream in and out |
| `rtl/siphash_regs.sv` | AXI-Lite register file |
| `rtl/siphash_axi.sv` | top: core plus register file |
| `tb/siphash_ref_pkg.sv` | software model of SipHash-c-d with padding, used by all testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_siphash_workload` |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops on its own.
Each one has a cycle watchdog. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/siphash_pkg.sv tb/siphash_ref_pkg.sv tb/tb_siphash_axi.sv \
    --top-module tb_siphash_axi -Mdir obj && obj/Vtb_siphash_axi
```

Swap in the name of any other testbench in the same way.

* `tb_sipround`, `tb_siphash_compress` and `tb_siphash_finalize` compare
  each stage with the reference model, word by word. They also check the
  done pulse and the pipeline latency.
* `tb_siphash_core` runs a SipHash-2-4 core and a SipHash-1-3 core side by
  side. It checks the hash and the exact D+1 latency of every message. It
  checks that back-to-back messages take one cycle per word, and that the
  output waits for TREADY.
* `tb_siphash_regs` covers the register file. This includes byte strobes,
  address-before-data writes, read-only registers, the counter and the soft
  reset.
* `tb_siphash_axi` tests the top at its default parameters. It programs the
  key over AXI-Lite and checks the published SipHash-2-4 vector (key 00..0f,
  message 00..0e → `a129ca6149be45e5`). It then runs random messages of 0–64
  bytes, with gaps and back to back. It makes each mechanism happen and
  counts it: first-word initialization, feedback, back-to-back starts, D+1
  latency, output hold, overwrite of an unread hash, soft reset in the middle
  of a message, and a key change. It fails if any mechanism never happened.
* `tb_siphash_workload` hashes messages of 2^3 to 2^20 bytes (8 B to 1 MiB),
  and the same sizes less one byte, on SipHash-2-4 and SipHash-1-3 at once.
  It checks every hash and the cycle count w + D + 1. It prints cycles per
  byte and the throughput at 214.3 MHz. A 1 MiB message takes 131078 cycles
  (0.1250 cycles/byte, 13.7 Gbit/s). The whole run takes well under a
  minute.

The testbenches use `$urandom` for data and keys. The reference model has
been checked against the published SipHash-2-4 vectors, which are the empty
message and the 15-byte message above.

## Resources

After generic synthesis, the SipHash-2-4 top has about 1550 flip-flops:
* 256 for the state,
* 4 × 256 for the finalization pipeline,
* 64 for the hash,
* the rest for the key, the counter and AXI-Lite.

Most of the logic is the 2 + 4 SipRounds, each with four 64-bit adders.
Reported FPGA implementations of this architecture use about 1400 registers
and 2400 LUTs for SipHash-2-4 on 7-series and UltraScale+ parts, and about
1140 registers and 1600 LUTs for SipHash-1-3. Those numbers include their
own AXI wrappers and were not reproduced with this RTL.

## Where this RTL departs from the usual description, or chooses

* **The output register adds one cycle.** The hash comes D+1 cycles after
  the last word, not D. The extra cycle is the registered output.
* **The key layout follows the SipHash definition.** Initialization pairs k0
  with v0/v2 and k1 with v1/v3.
* **Arithmetic as in the SipHash definition.** The "+" in SipRound is
  addition modulo 2^64, and the constant 0xff is xored into v2 only. Both
  are needed to match the published vectors.
* **Reset, handshake and register-access details are this design's own.**
  This covers the rules above: keys that survive the soft reset, one
  outstanding AXI-Lite transaction, and output that is never back-pressured
  but is held until read.
* **Only the accelerator is in the RTL.** A measurement system around it, with
  DMA engines streaming from DRAM, an AXI interconnect, a processor and a
  free-running timer, would be vendor IP. So would placing 1 to 16
  accelerators in parallel. Several `siphash_axi` instances can sit side by
  side with no change, because each one is independent.
* **No padding unit.** Software or an upstream block must pad the last word
  as described above.
