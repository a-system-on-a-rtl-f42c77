# DDST channel-estimation accelerator subsystem

Data-dependent superimposed training (DDST) is a way to estimate a wireless
channel without giving up bandwidth to pilot symbols. The transmitter adds a
known training sequence, plus a data-dependent sequence, arithmetically on top
of the data. The receiver then recovers DC offset, carrier frequency offset,
training-sequence and block synchronisation, and finally the channel taps
from cyclic statistics of the received block. Every stage must finish before
the next starts. Each stage is built from the same few expensive operations:
reshape-and-average of the sample vector, FFTs, and magnitudes (square roots)
of complex vectors.

This RTL is the hardware half of a hardware/software receiver. A small
processor runs the stages as ordinary software and keeps all the control
flow. Three coprocessors take over the operations that cost time and memory
bandwidth:

| unit         | module       | what it computes                                                   |
|--------------|--------------|--------------------------------------------------------------------|
| FFT          | `fft_accel`  | radix-2 decimation-in-time FFT, up to 1024 points, ping-pong buffers |
| norm         | `norm_accel` | `sqrt(re^2 + im^2)` of complex elements, with their sum and a stride |
| cyclic mean  | `mean_accel` | the P row means of a sample vector reshaped to P x Np                |

Each coprocessor has two ports. A **slave port** holds its parameters, the
start bit and the done flag. A **master port** lets it read and write any
memory on its own once started. The processor writes a few registers, sets
start, and polls done. Meanwhile the processor and the other coprocessors go
on working.

## System structure

```
             cpu_req/cpu_rsp (processor data master, outside this RTL)
                    |
   +----------------+-------------------------------------------+
   |            avalon_fabric  (4 masters x 10 slaves)           |
   +--+-----+-----+-----+-----+-----+-----+-----+-----+-----+----+
      |     |     |     |     |     |     |     |     |     |
   DataRam1 DataRam2 CosRam SinRam Nsamples Y  FFT   norm  mean  ext_req/ext_rsp
   (onchip_ram x 6)                           regs  regs  regs  (off-chip memory
                                                                 controller etc.)
   masters: 0 processor, 1 fft_accel, 2 norm_accel, 3 mean_accel
```

`ddst_sopc` is the top. The processor sits outside it: its data master enters
as `cpu_req`/`cpu_rsp`. Everything else on the system bus leaves through one
slave port, `ext_req`/`ext_rsp`. That covers the SDRAM controller and the
other peripherals.

### The fabric is a switch, not a bus

Every slave has its own round-robin arbiter and request multiplexer
(`avalon_fabric`). Masters that address different slaves transfer in the same
cycle. Only masters that address the same slave compete. For example, the FFT
can stream through DataRam1/DataRam2 while the mean unit reads the N samples
buffer and the processor polls a status register, all at full speed. When two
masters do want the same slave, the loser sees `waitrequest` and holds its
request. The `contention` output pulses per slave whenever that happens.

### Bus format (`ddst_pkg`)

* Each transfer moves up to 1024 bits: 32 lanes of 32 bits, each with its own
  enable bit. The mean unit reads 32 samples in one access. A memory with
  narrower words uses only the low lanes.
* A word address is 20 bits: `{slave[3:0], offset[15:0]}`. The offset counts
  in the addressed slave's own word size. The slave numbers are in
  `ddst_pkg::slave_e`:

| slave | name          | words x lanes | contents                                   |
|-------|---------------|---------------|--------------------------------------------|
| 0     | DataRam1      | 1024 x 2      | complex: lane 0 real, lane 1 imaginary     |
| 1     | DataRam2      | 1024 x 2      | complex, FFT result for even log2 N        |
| 2     | CosRam        | 512 x 1       | `round(cos(2 pi k/1024) * 2^30)`           |
| 3     | SinRam        | 512 x 1       | `round(sin(2 pi k/1024) * 2^30)`           |
| 4     | N samples     | 128 x 32      | 4096 32-bit samples, 32 per row            |
| 5     | Y             | 8 x 32        | rows of 32 cyclic means                    |
| 6,7,8 | FFT/norm/mean | registers     | see below                                  |
| 9     | external      | -             | `ext_req`/`ext_rsp`                        |

* Handshake: a master holds `read` or `write` until `waitrequest` is low in
  the same cycle. Read data comes back later with `readdatavalid`, in request
  order. The on-chip memories answer exactly one cycle after a read, the
  fixed latency of FPGA block RAM, and never stall.

## The square-root unit (`sqrt_lut4`)

The magnitude needs a square root, and that is the one costly step in it. The
unit takes a 64-bit radicand and returns a 32-bit `floor(sqrt(R))`, spending
far fewer cycles than a bit-at-a-time method:

1. **Look-up table for the top 8 root bits.** The top 16 bits of the radicand
   index a 65,536-entry table of `floor(sqrt(i))`. For an integer root this
   prefix is already exact: `floor(sqrt(R)) >> 24 == floor(sqrt(R >> 48))`.
   The table is filled at elaboration by a short loop, so no data file is
   needed.
2. **Four root bits per iteration.** The 16 candidates `root | c << s`
   (c = 0..15, where s is the position of the next 4 bits) are squared in
   parallel and subtracted from the radicand. A comparator tree keeps the
   candidate with the smallest non-negative error, and that candidate becomes
   the new partial root. Six iterations fill the remaining 24 bits.
3. **Early stop.** If the winning error is zero, the root is exact and all
   lower bits are zero, so the unit stops.

The latency is 1 cycle for the look-up plus 1 to 6 iterations.

If the radicand is read with 48 fraction bits, the root has 24 fraction bits
and 8 integer bits. In that format, 14.0625 gives 3.75 after a single
iteration, and 5 gives 2.2360679... after six. The testbench checks both
cases.

Cost: sixteen 32x32 squarers and a 16-way compare, plus a 64 KB table. A
wider table means fewer iterations, but the table grows fourfold for every
extra root bit.

## Norm unit (`norm_accel`)

For element `k = 0..COUNT-1`, the unit reads the complex word at
`SRC + k*STRIDE`. Both parts arrive in one read. It squares the two parts into
a 64-bit radicand, takes the root and adds it to a 64-bit sum. The MODE bit
then selects the output:

* **every magnitude (MODE = 0):** magnitude k goes to lane `k mod 32` of row
  `DST + k/32`, so the N samples buffer receives the magnitudes as
  consecutive 32-bit samples;
* **sum only (MODE = 1):** only the 64-bit sum is written, to lanes 0 and 1
  of row `DST`.

The sum can always be read from SUM_LO/SUM_HI. STRIDE = 4 takes elements
0, 4, 8, and so on. Elements are handled one after another. Each costs 5 + i
cycles (4 + i in sum mode), where i = 1..6 is the number of square-root
iterations.

## FFT unit (`fft_accel`)

The processor writes N = 2^LOG2N samples to DataRam1 in natural order, sets
LOG2N and starts the unit:

* **load pass:** `DataRam2[i] = DataRam1[bitrev(i)]`;
* **stage s = 0..LOG2N-1:** every butterfly reads its pair and writes the
  results to the other buffer. Even stages go DataRam2 to DataRam1, odd
  stages go DataRam1 to DataRam2.

For 1024 points, the result ends in DataRam2. For odd LOG2N it ends in
DataRam1, and STATUS bit 2 says which buffer holds it.

The butterfly is `t = b*W`, `a' = a + t`, `b' = a - t`, with
`W = cos(2 pi k/1024) - i sin(2 pi k/1024)` and `k = j * 2^(9-s)`. Every
transform size uses the same two 512-entry tables.

Arithmetic:

* Data is 32-bit two's complement.
* Twiddles have 30 fraction bits.
* Products are 64 bits wide, then arithmetically shifted right by 30.
* Sums wrap at 32 bits, and **there is no per-stage scaling**, so input
  magnitudes must stay below 2^(31-LOG2N). That is 2^21 for 1024 points.

Timing: 3 cycles per load step and 10 per butterfly (each of four reads
waits for its data, then two writes), so `3N + 10(N/2)log2N + 1` cycles.
That is 54,273 cycles for 1024 points. The CYCLES register reports it.

One unit is built, sized for 2^MAX_LOG2N points; it also runs any smaller
power of two set in LOG2N. The other way to get an N-point transform from a
2N-point unit also works: zero-pad the data to 2N and keep the even bins of
the result. The testbench checks that both ways agree for 512 points.

## Cyclic mean unit (`mean_accel`)

DDST averages the received vector over training periods. Sample n belongs to
row `n mod P` of a P x Np matrix, and `Y_i` is the mean of row i. The N
samples buffer already stores P = 32 consecutive samples per row. One wide
read therefore returns one matrix column, and 32 accumulators add it lane by
lane. No reshape is ever done.

After NP rows, each accumulator is multiplied by INV_NP, which software
computes as `floor(2^32/Np)`, and the top 32 bits of the product are kept:
`Y_i = (R_i * INV_NP) >>> 32`, rounded toward minus infinity. All 32 means
then go to one row of Y in a single write.

Reads are issued back to back, so a run takes `Np + 4` cycles on an idle
fabric. Accumulators are 32 bits and wrap. Complex data is averaged one
component (real or imaginary) per run.

## Register maps

All registers are 32 bits, in lane 0 of the coprocessor's slave. Reads return
one cycle later. Parameter registers are ignored while the unit is busy.
A start is a write of 1 to CTRL bit 0 while the unit is idle; it clears done.

| off | FFT                         | norm                    | mean               |
|-----|-----------------------------|-------------------------|--------------------|
| 0   | CTRL                        | CTRL                    | CTRL               |
| 1   | STATUS: done, busy, in-RAM2 | STATUS: done, busy      | STATUS: done, busy |
| 2   | LOG2N (1..10)               | SRC (bus address)       | SRC (row address)  |
| 3   | CYCLES                      | COUNT                   | NP                 |
| 4   |                             | STRIDE                  | INV_NP             |
| 5   |                             | DST                     | DST (Y row)        |
| 6   |                             | MODE (1 = sum only)     | CYCLES             |
| 7,8 |                             | SUM_LO, SUM_HI          |                    |
| 9   |                             | CYCLES                  |                    |

Bus addresses written to SRC/DST are full 20-bit word addresses (slave
number and offset).

## How this relates to the original system

The system was first built on an FPGA with a vendor soft processor. Its FFT
unit was generated from C code by a C-to-hardware compiler, and the other
two units were hand-written. Here all three are written directly in
SystemVerilog.

What follows the original:

* the set of memories and coprocessors, and their master/slave roles;
* the switch fabric and the 1024-bit maximum access;
* the one-cycle on-chip memories;
* radix-2 decimation in time with ping-pong buffers and cosine/sine tables;
* the mean unit's P parallel 32-bit accumulators and 1/Np multipliers;
* the norm unit's datapath: one read per complex element, 64-bit arithmetic,
  a sum, a stride, and a choice between every result and the sum;
* the square root with an 8-bit look-up prefix, 4 bits per iteration, 6
  iterations and an early exact stop.

What is this design's own choice:

* the address map, bus structs and lane placement;
* all memory depths except the 1024-point FFT;
* P = 32;
* the register maps;
* fixed-point formats;
* the explicit bit-reversed load pass;
* round-robin arbitration;
* the sequencing and timing of every unit.

Reported timings of the original system, next to this RTL:

| operation                   | original (cycles) | this RTL (cycles, idle fabric)         |
|-----------------------------|-------------------|----------------------------------------|
| 1024-point FFT              | 56,743            | 54,273                                 |
| reshape and mean            | 2,238 (N not stated) | Np + 4; 121 for 117 rows of 32       |
| norm of 1024 FFT outputs    | 138,511 (includes software) | 6 to 11 per element; 11,265 measured |

Not provided here:

* the processor and the receiver software (DC offset, CFO, synchronisation,
  channel estimation);
* the off-chip SDRAM and its controller.

The software also uses a result memory for one of the units. It appears in
no block diagram and is not described, so it is not built. The norm unit
writes to any address, by default the N samples buffer.

The CFO stage's sine and cosine evaluations remain in software and are the
bottleneck of the whole receiver. No hardware for them is described, so none
is built.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench          | covers                                                                 |
|--------------------|------------------------------------------------------------------------|
| `tb_sqrt_lut4`     | 300 random and 300 perfect-square radicands against a bit-serial root; latency = 1 + iterations; early stop |
| `tb_onchip_ram`    | lane-enable writes and 1-cycle reads against a shadow copy             |
| `tb_avalon_fabric` | 4 masters, 3 slaves (one with wait states): data, starvation bound, parallel transfers, contention |
| `tb_fft_accel`     | 8, 16 (with wait states) and 1024 points against a double-precision DFT; exact cycle count; even bins of a zero-padded 1024-point run against a 512-point run |
| `tb_mean_accel`    | Np = 2, 4, 117 against exact and real-valued means; cycle count        |
| `tb_norm_accel`    | every-magnitude, stride 4, sum-only and exact-root runs                |
| `tb_ddst_sopc`     | whole subsystem at default sizes: FFT and mean together, norm of the FFT output competing with a mean run for the N samples buffer, sum mode, stride, exact roots, external slave |

`tb_ddst_sopc` runs the top with every parameter at its default. It takes
well under a second of simulation time once built.

Run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ddst_pkg.sv tb/tb_ddst_sopc.sv \
          --top-module tb_ddst_sopc -Mdir obj && ./obj/Vtb_ddst_sopc
```

For a unit testbench, replace the testbench file and top-module name. Lint:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/ddst_pkg.sv rtl/ddst_sopc.sv --top-module ddst_sopc
```

## Limits worth knowing

* The FFT does not scale between stages. Leave log2 N bits of headroom in the
  input, or the sums wrap silently.
* The mean accumulators are 32 bits, so sample magnitude x Np must stay below
  2^31.
* INV_NP cannot represent 1/1. Np = 1 gives `(R * (2^32-1)) >> 32`, which is
  one LSB low for positive values.
* A master that addresses slave numbers 10..15 is never answered. An
  assertion in the fabric reports it.
* The coprocessors issue one access at a time, except for the mean unit's
  streamed reads. Overlapping reads would roughly halve the FFT time.
