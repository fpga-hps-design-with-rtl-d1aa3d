# MD5 hashing and a multiplier behind Avalon-MM slaves for a Cyclone V SoC

A Cyclone V SoC pairs an ARM processor system with FPGA fabric. Software on
the processor reaches custom logic in the fabric through a memory-mapped
bridge. In the fabric, each block of custom logic appears as one or more
Avalon-MM slaves: small register files that the processor reads and writes.
This RTL holds three such designs, built side by side in `coe838_top`:

* **MD5 system** (`md5_soc`). An array of MD5 compression cores, 32 by
  default. Software loads a 512-bit message block into each core and starts
  any set of cores with one register write. It then polls a done word and
  reads back the 128-bit digests. A brute-force search over password
  candidates uses it this way: many candidates are hashed at once and the
  digests are compared with a target in software.
* **Multiplier system** (`mult_soc`). A 16 x 16 multiplier that software
  drives through a control slave (start, reset, done) and a data slave
  (operands, product). This is the smallest complete example of the pattern.
* **PIO register** (`avalon_pio`). The simplest Avalon-MM slave there is: a
  16-bit register loaded on write.

The processor system and its AXI bridges are hard IP and are not part of
this RTL. Each design therefore brings its bus port out to the top level,
and the testbenches act as the processor.

## Bus conventions shared by all slaves

Every slave in this RTL uses the same reduced Avalon-MM protocol:

* The signals are `address`, `read`, `write`, `writedata[31:0]` and
  `readdata[31:0]`, with a synchronous, active-high `reset`.
* There is no `waitrequest`, so every transfer is accepted in the cycle it
  is presented.
* `readdata` is registered. It is valid on the clock after `read`, which is
  a fixed read latency of 1.
* `read` and `write` are never high together. An assertion in each slave
  checks this.

`avalon_decoder` stands in for the interconnect that the system builder
would generate. It takes **byte** addresses from one master and compares
them with the windows of two slaves. The selected slave gets a **word**
address: the byte offset inside its window divided by 4. The decoder records
which slave a read went to and returns that slave's data one clock later,
together with `readdatavalid`. If a read falls outside both windows, it
returns 0 with `readdatavalid`. A write outside both windows is dropped.
Each window must be aligned to its own size.

So software word `n` of a slave is at byte address `BASE + 4*n`.

## The MD5 core (`md5_core`, `md5_pkg`)

MD5 processes a message in 512-bit blocks. Each block is sixteen 32-bit
words `M[0..15]`. Four 32-bit variables A, B, C, D start from the current
chaining value and go through 64 steps. Step `i` computes:

    B' = B + rotl(A + F(B,C,D) + K[i] + M[g], s[i]);   A' = D; C' = B; D' = C

After the 64 steps, the chaining value is updated with
`a0 += A, b0 += B, c0 += C, d0 += D`.

The step depends on which 16-step round it is in:

| steps  | F                   | g               | s (repeats every 4 steps) |
|--------|---------------------|-----------------|---------------------------|
| 0-15   | (B & C) \| (~B & D) | i               | 7, 12, 17, 22             |
| 16-31  | (D & B) \| (~D & C) | (5i + 1) mod 16 | 5, 9, 14, 20              |
| 32-47  | B ^ C ^ D           | (3i + 5) mod 16 | 4, 11, 16, 23             |
| 48-63  | C ^ (B \| ~D)       | 7i mod 16       | 6, 10, 15, 21             |

`K[i] = floor(|sin(i+1)| * 2^32)`. `md5_pkg` stores these 64 words as a
constant table and holds F, g, s and the rotate as functions.

**Schedule.** The core does one step per clock. The datapath is one
combinational step, so the critical path is a 4-input 32-bit add, a rotate
and one more add. The timing is:

* The clock edge that samples `start` loads A..D from the chaining value.
* The next 64 edges perform steps 0..63.
* The 65th edge adds A..D into the chaining value and raises `done` for one
  clock.

`digest = {a0, b0, c0, d0}` (a0 in bits 127:96) is valid while `done` is
high. It holds until the next block finishes, or until reset.

**Multi-block messages.** The chaining value stays in the core between
blocks. To hash a long message, load and start each block in turn, with no
reset in between. `reset` does three things: it restores the MD5 initial
value `67452301 efcdab89 98badcfe 10325476`, clears the message words, and
aborts a block that is running.

**Byte order.** This is the point most easily got wrong. MD5 is defined on
bytes, and:

* Message word `M[k]` holds message bytes `4k..4k+3` **little-endian**. Byte
  `4k` is in bits 7:0.
* The hex digest string is a0, b0, c0, d0, each written out little-endian.

For example, `md5("abc")` = `900150983cd24fb0...` gives `a0 = 0x98500190`.

**Padding.** Software pads the message. It appends byte `0x80`, then zeros,
then the bit length as a 64-bit little-endian number at the end of the last
block. A message of 56 bytes or more needs a second block. The core hashes
whatever 16 words it holds.

While a block is running, the core ignores `write` and `start`.

## Driving the MD5 array (`md5_soc`)

The MD5 system has one bus port, with two slaves behind it:

| byte address            | slave        | read                        | write                                         |
|-------------------------|--------------|-----------------------------|-----------------------------------------------|
| `0x000 + 4*(16*c + w)`  | data         | digest word `w` (0..3 = a0..d0) of core `c`; 0 for `w` ≥ 4 | message word `M[w]` of core `c`                |
| `0x800`                 | control      | busy flag of each core (bit `c`) | start pulse for every core whose bit is 1 |
| `0x804`                 | control      | soft-reset register         | soft-reset register: core `c` is held in reset while bit `c` is 1 |
| `0x808`                 | control      | done flags                  | ignored                                        |

The data window is 2 KB for 32 cores (`log2(N_CORES) + 4` word-address
bits). The control window is 64 bytes. Both base addresses are parameters.

The done flags are **sticky**. A core raises `done` for only one clock, and
software polling over a bus would miss a pulse that short. So the control
slave sets the core's flag on that pulse and clears it only when the core is
started or soft-reset.

A message write reaches its core one clock after the bus write, because the
data slave registers it. A start write takes the same one clock to arrive.
So a start issued right after the last message write always sees the
complete block.

Hashing one message on core `c`:

1. Write `1<<c` to `0x804`, then write 0 to `0x804`. This resets the core to
   the MD5 initial value.
2. Write the 16 padded message words.
3. Write `1<<c` to `0x800`.
4. Poll `0x808` until bit `c` is set.
5. For a further block of the same message, go back to step 2.
6. Read the four digest words.

For parallel hashing, load all cores first, then start them all with a
single write of `0xFFFFFFFF`. All 32 results are ready one core latency
later: about 67 clocks including the slave registers.

**Sequential against parallel.** With a bus master that makes one transfer
every two clocks, `tb_md5_throughput` hashes 32 single-block messages:

| configuration | clocks for 32 hashes | clocks per hash |
|---------------|----------------------|-----------------|
| 1 core        | 3648                 | 114             |
| 32 cores      | 1354                 | 42              |

With 32 cores, the cost is almost all in loading 16 words per message over
the bus. The compute time is one 65-clock pass for the whole batch. A faster
bus, or reusing words that do not change between candidates, would help more
than more cores.

`N_CORES` may be 1 to 32, so that one control word holds a bit per core.

## The multiplier system (`mult_soc`)

| byte address | slave               | read                 | write                            |
|--------------|---------------------|----------------------|----------------------------------|
| `0x00`       | data (`mult_data`)  | product              | operand in1 (bits 15:0 kept)     |
| `0x04`       | data                | in1                  | operand in2 (bits 15:0 kept)     |
| `0x08`       | data                | in2                  | ignored                          |
| `0x40`       | control (`mult_control`) | start register  | start register (bit 0 = enable)  |
| `0x44`       | control             | reset register       | reset register (bit 0 resets the multiplier) |
| `0x48`       | control             | done (bit 0)         | ignored                          |

The software loop is:

1. Set reset, then clear it.
2. Write both operands.
3. Set start.
4. Poll `0x48` until bit 0 is set.
5. Read the product and the operands back.
6. Clear start before the next iteration.

`mult_unit` computes the unsigned product of the two 16-bit operands in one
registered step. It raises `mult_done` one clock after `enable`, and the
result and `done` hold until reset. Product, in1 and in2 are 32-bit words,
and the operands are zero-extended.

A read and a write in the same clock are not legal. If they happen anyway,
`mult_data` and `mult_control` let the read win.

## The PIO register (`avalon_pio`)

`pio_out` is a `WIDTH`-bit register (16 by default), with `write` as its
clock enable. It has no address and no read path.

## Where this RTL makes its own choices

These points are design decisions in this RTL, not fixed by the algorithm or
the bus standard. Check them before reusing the blocks:

* **MD5 core timing.** One step per clock and a 65-clock block time.
* **MD5 register map.** The control layout (start, reset, done at words
  0, 1, 2) copies the multiplier's control slave.
* **MD5 control behaviour.** Start is a self-clearing pulse, the done flags
  are sticky, and word 0 reads back busy.
* **MD5 data slave.** Data addresses are `{core, word}`. Message words
  cannot be read back.
* **Soft reset clears the message.** A soft reset also clears a core's
  message words. Software must therefore rewrite all 16 words for every new
  message, including padding words that stay the same.
* **Multiplier.** The multiplier's inside is a single registered product.
  The system reset is OR-ed into its reset, so it also starts cleared.
* **Bus.** No `waitrequest`, a read latency of 1, a 21-bit master address
  (the lightweight bridge window), and the MD5 address map.
* **PIO reset.** The PIO register has a synchronous reset.

The multiplier system follows the original lab system closely. This covers
its address map (`0x00`/`0x40` windows of 16 words), the 16-bit operand
truncation, the registered read multiplexer and the control word 2 for done.

## How far it is tested

Each module has a self-checking testbench in `tb/`:

* `tb_md5_core` compares digests with published MD5 values. These include
  the RFC 1321 strings, the 55-byte and 56-byte padding boundary, and a
  two-block message. It also checks the 65-clock latency exactly.
* The system testbenches (`tb_md5_soc`, `tb_md5_throughput`,
  `tb_coe838_top`) compare every digest with a separate behavioural MD5
  model in `tb/md5_ref.svh`. That model computes its constants from the sine
  formula at run time.
* `tb_coe838_top` runs all three designs at their default sizes
  concurrently. It exercises 32-way parallel hashing, block chaining, soft
  resets, the 30-iteration multiplier loop and PIO writes, and fails if any
  of these never happened.

Nothing has been run on hardware. No timing closure has been done for the
one-step-per-clock MD5 datapath.

## Files

| file | content |
|------|---------|
| `rtl/md5_pkg.sv` | MD5 constants, round functions, rotate |
| `rtl/md5_core.sv` | iterative MD5 core |
| `rtl/md5_ctrl_slave.sv`, `rtl/md5_data_slave.sv` | MD5 control and data slaves |
| `rtl/md5_soc.sv` | MD5 core array with slaves and decoder |
| `rtl/avalon_decoder.sv` | one-master, two-slave address decoder |
| `rtl/mult_unit.sv`, `rtl/mult_control.sv`, `rtl/mult_data.sv`, `rtl/mult_soc.sv` | multiplier system |
| `rtl/avalon_pio.sv` | PIO register |
| `rtl/coe838_top.sv` | top level |
| `tb/tb_*.sv` | one testbench per module, plus `tb_md5_throughput` |
| `tb/md5_ref.svh` | behavioural MD5 reference for testbenches |

## Simulating

Verilator 5 with timing support is enough. For example, to run the top-level
test:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_coe838_top \
        -y rtl -y tb +libext+.sv -Irtl -Itb rtl/md5_pkg.sv tb/tb_coe838_top.sv
    ./obj_dir/Vtb_coe838_top

Every testbench ends with a line `TB_RESULT checks=N failures=M` and has a
watchdog. The whole set runs in seconds.

For lint, use `verilator --lint-only -Wall -y rtl +libext+.sv rtl/md5_pkg.sv
rtl/coe838_top.sv`. Some width warnings remain about operand bits that are
deliberately unused: the upper halves of the 32-bit operand and control
registers.

The top's parameters are `N_CORES` (32), `ADDR_W` (21) and `PIO_WIDTH` (16).
`md5_soc` also takes `DATA_BASE` and `CTRL_BASE`.
