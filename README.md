# AES-128 and PRESENT-80 coprocessors on a memory-mapped SoC bus

A block cipher in hardware is usually judged alone: its area, its clock rate, its
cycles per block. Placed in a system, it is also fed and drained by a processor
over a narrow bus, and that traffic can cost far more than the cipher itself. This
RTL reproduces a small embedded platform built to measure exactly that: a soft
processor with on-chip block RAM, a 32-bit On-chip Peripheral Bus (OPB), a
hardware timer, and a crypto coprocessor that carries either an AES-128 core or a
PRESENT-80 core behind a shell of memory-mapped registers.

The two cores differ in the way the comparison turns on. PRESENT-80 is the
lightweight cipher: a 64-bit block, an 80-bit key and a datapath of sixteen 4-bit
S-boxes, but 31 rounds, so 33 clocks per block. AES-128 is far larger (sixteen
8-bit S-boxes plus four for the key schedule, MixColumns) but finishes a 128-bit
block in 12 clocks. Per byte of plaintext, the small core works for about 5.5
times as many clocks ((33/8) / (12/16)). Both are buried under the same bus cost: with the processor model of the
end-to-end testbench, which also moves each key and plaintext through block RAM,
one encryption costs about 110 clocks on the AES system and 100 on the PRESENT
system, almost all of it bus traffic.

## Block diagram

```
              ilmb                dlmb
   +-------+ <-----> +----------+ <-----> +-------+
   |lmb_if | port A  | lmb_bram | port B  |lmb_if |     (processor's two LMBs
   +-------+         | 256 x 32 |         +-------+      are ports of crypto_soc)
                     +----------+
   processor OPB master port (m_req / m_rsp)
        |
   +---------------------------- opb_bus -----------------------------+
        |                                        |
   +-----------+                       +---------------------------------+
   | opb_timer |                       | crypto_coprocessor              |
   | (ipif +   |                       |  opb_ipif -> crypto_shell -> core|
   |  counter) |                       |  core = aes128_core or          |
   +-----------+                       |         present80_core          |
                                       +---------------------------------+
```

`soc_top` holds two complete platforms, `u_aes_sys` and `u_present_sys`
(both `crypto_soc`), which share only the clock and the reset. Each brings out
the OPB master port and the instruction and data LMB ports of its processor.
The processor and its debug module are not part of this RTL. The testbenches
stand in for the processor with tasks that issue its bus cycles.

All logic runs on one clock. Every register resets synchronously on `rst`, which is active high.

## Programming the coprocessor

This is the part to understand first, because it sets the system's
performance. The coprocessor has three 32-bit registers in a 16-byte window at
`C_BASEADDR` (default `0x8000_0000`):

| offset | register       | write                                   | read                         |
|--------|----------------|-----------------------------------------|------------------------------|
| 0x0    | `instructions` | a command, executed in the write clock  | the last command written     |
| 0x4    | `data_out`     | ignored                                 | word chosen by the last CT or STATUS |
| 0x8    | `data_in`      | operand for the next KEY or PT command  | the last word written        |
| 0xC    | none           | answered with `errack`                  | `errack`, reads 0            |

A command word carries the opcode in bits [31:28] and a word index in bits
[3:0]. Word 0 is always the least significant 32 bits.

| opcode | name   | effect |
|--------|--------|--------|
| 0x0    | NOP    | nothing |
| 0x1    | KEY i  | key word i := data_in (AES: i = 0..3, PRESENT: i = 0..2, upper 16 bits of word 2 unused) |
| 0x2    | PT i   | plaintext word i := data_in (AES: 0..3, PRESENT: 0..1) |
| 0x3    | START  | start one encryption; `ld` reaches the core in the next clock |
| 0x4    | CT i   | data_out := ciphertext word i |
| 0x5    | STATUS | data_out := {29'b0, err, busy, done}, then err := 0 |

`err` (bit 2) is set by an index beyond the operand, an unknown opcode, or a
START while an encryption runs. The command that set it has no other effect.
`busy` (bit 1) is high from the clock after START up to the clock in which the
core finishes. `done` (bit 0) means a ciphertext is ready. In the clock the core
finishes, STATUS already reads done.

A driver encrypts one block like this:

```
for i in key words:       write data_in = key[i];  write instructions = KEY i
for i in plaintext words: write data_in = pt[i];   write instructions = PT i
write instructions = START
repeat: write instructions = STATUS; read data_out    until bit 0 is set
for i in block words:     write instructions = CT i; read data_out
```

Every OPB access takes two clocks: the slave decodes the cycle in the clock
where `select` is first high and raises `xferack` in the next clock. An AES block
therefore needs 8 + 8 + 1 + 8 = 25 accesses (50 clocks) of pure transfer, plus
the status polls. PRESENT needs 6 + 4 + 1 + 4 = 15 accesses. The core's time
from START to a readable done is 13 clocks for AES and 34 for PRESENT (one clock
from START to `ld`, then 12 or 33 in the core). So even a perfect driver spends
most of the time on the bus. A real processor adds its own instruction time on
top of this.

The key and plaintext registers keep their values between encryptions. A driver
that keeps the key only has to reload the plaintext. The testbenches still load a
fresh key for every block.

## The cipher cores

Both cores have the same interface: `key`, `pt`, a one-clock `ld` pulse, and
`ct` with `done`. `done` and `ct` hold until the next `ld`. Both encrypt only;
there is no decryption.

**`present80_core`** registers the plaintext and key in the `ld` clock. It then
runs one round per clock for 31 clocks. Each round does three things:
- It XORs the top 64 key bits into the state.
- It passes all 16 nibbles through the S-box `C 5 6 B 9 0 A D 3 E F 8 4 7 1 2`.
- It moves bit i to bit 16·i mod 63, with bit 63 staying where it is.

In the same clock the key register rotates left by 61, its top nibble goes
through the S-box, and the round number (1..31) is XORed into bits [19:15]. One
more clock XORs the last round key in and registers the result. That makes 33
clocks from `ld` to `done`. `ROUNDS` is a parameter, but only 31 gives
PRESENT.

**`aes128_core`** loads `pt ^ key` in the `ld` clock (the initial
AddRoundKey) and keeps `key` as the current round key. Each of the next 10
clocks computes the next round key on the fly (RotWord, SubWord, round constant,
with the constant doubled in GF(2^8) every round). It applies SubBytes,
ShiftRows, MixColumns (left out in round 10) and AddRoundKey. One more clock
registers the result: 12 clocks from `ld` to `done`. The S-box is not a table. It
is computed as the GF(2^8) inverse (x^254, by a chain of squarings and
multiplications) followed by the affine map, in `aes_pkg`. Synthesis flattens
this into logic, and a designer targeting an FPGA may prefer a ROM. Byte 0 of the
FIPS-197 byte order is in bits [127:120] of `key`, `pt` and `ct`.

Both round paths are a single long combinational stage. For AES that stage
holds the key-expansion S-boxes and a full round in series.

## Buses

**OPB (`opb_bus`, `opb_ipif`, `opb_pkg`).** There is one master, so nothing is
arbitrated. The master's cycle (`opb_req_t`: address, byte enables, write data,
`rnw`, `select`, `seqaddr`) goes to every slave. The slaves' replies
(`opb_rsp_t`) are ORed together, so a slave that is not acknowledging drives
zeros. If `select` stays high for 16 clocks with no `xferack`, no `retry` and no
`toutsup`, the bus raises `timeout` for one clock. An assertion in `opb_bus`
flags two slaves acknowledging in one clock. The master has to hold `select`
until it sees `xferack` and then drop it. `opb_ipif` does not decode a cycle
again while acknowledging it. Bits are numbered `[31:0]` from the least
significant end, the reverse of CoreConnect's 0..31 naming.

**LMB (`lmb_if`, `lmb_bram`, `lmb_pkg`).** Each LMB cycle is one clock with
`addrstrobe`, plus `readstrobe` or `writestrobe`. The wrapper enables its RAM
port in that clock, and the RAM reads or writes at the clock edge. In the next
clock the wrapper raises `ready` and passes the read data. Every on-chip memory
access thus takes two clocks. The RAM is true dual port: port A serves the
instruction LMB and port B the data LMB. It has 256 words of 32 bits (8 Kb) and
byte write enables. Each port is read-first. If both ports write the same byte
in one clock, port B's value is kept. The contents are not initialised.

## Timer

`opb_timer` sits at `0x8001_0000` and has two registers:
- **0x0, control.** Bit 0 is run; writing bit 1 = 1 clears the count in that
  clock. Reading returns the run bit.
- **0x4, count.** A 32-bit count of the clocks during which run was set.

Measured from the decode clock of the start write to the decode clock of the stop
write, the count is exact. The testbenches check that. The timer serves only for
measurement. `crypto_soc` with `HAS_TIMER = 0` builds the platform without it,
which is how the platform is set up for power estimation.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `soc_top` | `BRAM_DEPTH` | 256 | words of block RAM in each system (8 Kb) |
| `crypto_soc` | `CIPHER` | `CIPHER_AES` | cipher of the coprocessor |
| | `COPROC_BASE` | `0x8000_0000` | coprocessor window |
| | `TIMER_BASE` | `0x8001_0000` | timer window |
| | `BRAM_DEPTH` | 256 | block RAM words |
| | `HAS_TIMER` | 1 | 0 leaves the timer out, as for power measurements; its window then times out |
| `crypto_coprocessor` | `CIPHER`, `C_BASEADDR` | AES, `0x8000_0000` | |
| `crypto_shell` | `KEY_W`, `BLK_W` | 128, 128 | set by the coprocessor from `CIPHER` (PRESENT: 80, 64) |
| `opb_ipif` | `C_BASEADDR`, `C_AWIDTH`, `NUM_REGS` | `0x8000_0000`, 4, 3 | window base, log2 window bytes, registers |
| `opb_bus` | `NUM_SLAVES`, `TIMEOUT` | 2, 16 | |
| `opb_timer` | `C_BASEADDR`, `CNT_W` | `0x8001_0000`, 32 | |
| `lmb_if` | `C_BASEADDR`, `C_AWIDTH` | 0, 10 | LMB window |
| `lmb_bram` | `DEPTH` | 256 | words |
| `present80_core` / `aes128_core` | `ROUNDS` | 31 / 10 | |

## What follows the original platform and what is this design's own choice

These parts follow the original platform description:
- The set of parts and how they are joined: processor with block RAM on two
  LMBs, timer and coprocessor on the OPB, and a coprocessor made of a bus
  interface, a control shell and a crypto core.
- The coprocessor's three registers and their addresses (0x0, 0x4, 0x8 from
  `0x8000_0000`), and the word-by-word loading of key and plaintext and
  read-out of the ciphertext.
- The 12 and 33 clocks per block, the 8 Kb of block RAM and its 2-clock access.
- The structure of PRESENT: key XOR, S-box layer, permutation layer, and a key
  schedule with a 61-bit rotation, one S-box and a round counter.

These were chosen here:
- The command encoding, the status word, the error flag and status polling.
- The two-clock OPB access, the errack for the unused word, the 16-clock bus
  timeout, and the timer's registers and address.
- The LMB and block-RAM behaviour beyond the 2-clock access: read-first ports,
  port B winning on a write collision, and no initial contents.
- The iterative structure of the AES core.

The PRESENT S-box and bit permutation are those of the cipher's published
specification. The original platform used an existing open-source AES core;
this one is a new implementation with the same interface and cycle count.

Not included:
- The processor and its debug module.
- The software that runs on the processor.
- Anything about power. The platform was evaluated mainly for energy and power,
  which RTL simulation does not give.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb_ref_pkg` holds reference
models written independently of the RTL:
- AES-128 works on byte arrays, with a fully expanded key schedule and an S-box
  found by searching for inverses.
- PRESENT-80 generates all round keys first and uses the permutation
  P(i) = 16·(i mod 4) + ⌊i/4⌋.

The AES model is itself checked against the FIPS-197 example.

| testbench | what it shows |
|-----------|---------------|
| `tb_present80_core` | the four published PRESENT-80 test vectors and 40 random blocks; 33 clocks every time |
| `tb_aes128_core` | both FIPS-197 examples and 40 random blocks; 12 clocks every time |
| `tb_crypto_shell` | word assembly, the ld pulse, busy/done/err, ciphertext read-out, read-back, illegal commands |
| `tb_opb_ipif` | one strobe per access, 2-clock acknowledge, errack, silence outside the window, no double decode |
| `tb_opb_bus` | OR-combined replies from slaves of different latency, timeout after exactly 16 clocks, toutsup, retry |
| `tb_opb_timer` | exact counts over random intervals, hold when stopped, clear |
| `tb_lmb_bram` | random dual-port traffic with byte enables against a model, read-first, collisions |
| `tb_lmb_if` | 2-clock reads and writes, byte writes, silence outside the window |
| `tb_crypto_coprocessor` | full driver sequence on AES and PRESENT; exact latency seen through the bus (STATUS 12/33 clocks after START reads busy, one clock later done) |
| `tb_crypto_soc` | the PRESENT platform end to end, with block RAM, timer, errack and timeout |
| `tb_soc_top` | both platforms at full default size, running at the same time: runs of 4, 10 and 100 encryptions each, timed by the hardware timer; counts every mechanism and fails if one never happens |

To run one with Verilator 5 from the folder that holds `rtl/` and `tb/` (replace
`tb_soc_top` by any other testbench name):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/opb_pkg.sv rtl/lmb_pkg.sv rtl/crypto_pkg.sv rtl/aes_pkg.sv tb/tb_ref_pkg.sv \
  tb/tb_soc_top.sv --top-module tb_soc_top -o sim
./obj_dir/sim
```

`tb_soc_top` runs in well under a second and prints the measured clocks per
encryption for each system. All RTL lints cleanly with `verilator --lint-only -Wall`
apart from unused-signal and unused-parameter warnings: the byte enables of the
register slaves, the `seqaddr` line, the unused upper key word bits and shared
package constants.

## Files

`rtl/`: the four packages (`opb_pkg`, `lmb_pkg`, `crypto_pkg`, `aes_pkg`) and the
modules `soc_top`, `crypto_soc`, `crypto_coprocessor`, `crypto_shell`, `opb_ipif`,
`opb_bus`, `opb_timer`, `lmb_if`, `lmb_bram`, `aes128_core`, `present80_core`.
`tb/`: one testbench per module plus `tb_ref_pkg`.
