# CaT engine: an on-chip calibration and test engine for RF transceivers

A radio transceiver in a deep-submicron process leaves the factory with DC
offsets, IQ gain and phase imbalance, second-order intermodulation and power
amplifier non-linearity. Each of these can be corrected digitally or with
analog tuning knobs, but measuring them normally needs external equipment.
This engine measures them on chip instead. It plays a known stimulus into
the transmit chain, lets the radio loop the signal back (through the RF path
or an envelope detector), captures what comes out of the transmit and
receive digital front ends, processes the samples with a small processor
that has a complex-arithmetic accelerator, and writes corrections back to the
radio's pre-/post-distorters and analog knobs. The same hardware also runs
test measurements such as RMS power, periodogram and EVM. The engine sits
beside the normal signal chain and can run at any time without getting in
the way of normal traffic.

The RTL follows the architecture published in "A Programmable
Calibration/BIST Engine for RF and Analog Blocks in SoCs Integrated in a
32nm CMOS WiFi Transceiver". That article describes what the blocks do and
how the complex datapath is built. It leaves out encodings, widths, sizes
and the processor's instruction set. Where it is silent, this RTL makes its
own choices, and the sections below say which parts are which.

## Block map

```
                  +-------------------------- cat_engine --------------------------+
 processor  ----> | IRAM (sram_sp)   DRAM (sram_sp)                                |
 (external)       |                                                                |
 data bus   ----> | address decode --+-- csr ---------> cfg_o[] to radio, tester   |
                  |                  |     |  sg_cfg                                |
                  |                  +-- sig_gen -> pa_dpd -> stim_* into Tx DFE    |
                  |                  +-- input_buffer Tx <--- tx_s_* (DFE clock)    |
                  |                  +-- input_buffer Rx <--- rx_s_* (DFE clock)    |
                  |                  +-- spm_bank (SPM0..3) <---+                   |
                  |                  +-- aes_accel (aes_core)   |                   |
                  |                  +-- i2c_master ----------- | --> SCL/SDA (AFE)  |
 custom     ----> | cplx_unit: 2 x spm_agu + cplx_datapath -----+                   |
 instructions     +----------------------------------------------------------------+
```

| Module | Role |
|---|---|
| `cat_engine` | Top level: memories, accelerators and peripherals around the processor's three ports |
| `cplx_unit` | Runs the array instructions: register set, two address generators, datapath, SPM sequencing |
| `cplx_datapath` | Four-multiplier complex pipeline with accumulators |
| `spm_agu` | One array pointer with its step |
| `spm_bank`, `spm_ram` | Four signal processing memories (SPMs) in two complex branches |
| `sig_gen` | Stimulus generator with pattern playback and interpolation |
| `pa_dpd` | Power-amplifier pre-distorter (power-indexed gain tables with memory taps) on the stimulus path |
| `input_buffer` | Dual-clock capture FIFO, one for the Tx front end and one for the Rx front end |
| `csr` | Configuration and status registers |
| `aes_core`, `aes_accel` | AES-128 encrypt/decrypt and its bus registers |
| `i2c_master` | Write-only I2C master for the analog front end's knobs |
| `sram_sp` | Instruction and data RAM |
| `cat_pkg` | Shared types, address map and operation codes |

The processor core is **not** included. The article describes it only as a
7-stage, 32-bit RISC with custom instructions, and gives no instruction set.
Its three interfaces are ports of `cat_engine`, so any core (or a
testbench) can drive them:

* `if_*`: instruction fetch from IRAM. `if_gnt` is low in a cycle where a
  data access uses the IRAM port; the fetch must then be repeated.
* `dbus_req` / `dbus_rdata`: the data bus.
* `cx_req` / `cx_rdata` / `cx_busy`: moves between the core's registers and
  the complex unit's registers. These are the custom instructions.

## The complex-array unit

This is the part of the engine that does the heavy work, and the one that
needs the most explanation.

### Two branches of SPMs

Complex vectors are kept in the SPMs, never in the data RAM. Each complex
sample is split into its real part and its imaginary part. The two parts
sit in two different SPMs at the **same address**:

| Branch | Real part | Imaginary part | Pointer |
|---|---|---|---|
| 0 | SPM0 | SPM2 | Array Ptr 1 |
| 1 | SPM1 | SPM3 | Array Ptr 2 |

All four memories are read in the same clock. The datapath therefore gets
two complex operands per cycle: `a+bj` from branch 0 and `c+dj` from
branch 1. Each pointer advances by its own step every cycle. The step is
two's complement, so an array can be walked backwards or with strides, and
addresses wrap at the end of the SPM. The address of the next operand is
computed while the current one is being read.

Every SPM has one read port and one write port. While an operation runs, the
unit reads new operands and writes back older results in the same clock.
In that time the unit owns every SPM port. Core-bus accesses to the SPMs are
then dropped, and reads return 0.

### Operations

| `op` | Name | Per element | Result goes to |
|---|---|---|---|
| 0 | DOT | `acc += (a+bj)(c-dj)` | Acc R / Acc I |
| 1 | SCALE | `(k+zj)(a+bj)` | branch 0, in place |
| 2 | VADD | `(a+bj)+(c+dj)` | branch 0, in place |
| 3 | NORM | `accR += a^2+b^2` (branch 0 only) | Acc R |
| 4 | BFLY | `x0=(c+dj)+(a+bj)(k+zj)`, `x1=(c+dj)-(a+bj)(k+zj)` | x0 to branch 1, x1 to branch 0, in place |
| 5 | CMUL | `(a+bj)(c+dj)` | branch 0, in place |

`k+zj` is the weight held in the Weight R/I registers. The dot product
conjugates the second vector, as in the article's operation table. The
article draws only two array pointers, so results cannot go to a third
array; this RTL writes them back in place. That is this design's choice.

### Pipeline and number format

The datapath follows the article's figure:

1. Operand crossbar. It also offers negated operands.
2. Four 16x16 multipliers.
3. Two adders, one for the real sum and one for the imaginary sum.
4. Four final adders. They either update the accumulators or form up to
   four words for the SPM write bus.

Number format (this design's choice):

* Samples and weights are signed 16-bit.
* Products are kept at full precision, 32 bits.
* The accumulators are 40 bits wide.
* Results written to an SPM are shifted right by `CXR_SHIFT` and saturated
  to 16 bits. A Q15 weight needs shift 15. VADD is never shifted.
* In BFLY the shift applies to the product before it is added to `c+dj`.
* Reading `CXR_ACCR` / `CXR_ACCI` returns the accumulator shifted right by
  `CXR_SHIFT`, truncated to 32 bits. A dot product with a vector of ones and
  shift `log2 N` therefore gives the mean, which is how DC offset is
  estimated.

Timing: the unit takes one element pair per clock. An operation over `N`
elements keeps `cx_busy` high for `N + 5` clocks after the clock in which
CTRL is written:

* `N` issue cycles;
* one cycle for the synchronous SPM read;
* four datapath stages.

### Register set (`cx_req.addr[3:0]`)

| # | Name | Meaning |
|---|---|---|
| 0 | CTRL | write: `[2:0]` op, `[3]` clear accumulators first; starts the operation |
| 1 | LEN | element count |
| 2, 3 | PTR1, PTR2 | array pointers; read back the current position |
| 4, 5 | STEP1, STEP2 | pointer steps |
| 6, 7 | WR, WI | weight |
| 8, 9 | ACCR, ACCI | accumulators; a write loads them |
| 10 | SHIFT | result / accumulator read shift |
| 11 | STAT | `[0]` busy |

The core must poll STAT, or watch `cx_busy`, before it writes another
register. Writes made while busy are ignored, and an assertion flags them.

A typical sequence:

1. Write LEN, PTR1, STEP1, PTR2, STEP2, and WR/WI if the operation needs a
   weight.
2. Write CTRL.
3. Wait until the unit is no longer busy.
4. Read ACCR/ACCI, or read the SPMs over the bus.

## Stimulus generator

The sample memory (1024 words by default) holds complex samples: I in
`[31:16]` and Q in `[15:0]`. The core fills it through the bus. Playback is
programmed in the CSR:

* `start`, `len`, `step`: which words make up one segment. With step 2 the
  generator uses one sample and skips the next.
* Up to four segments, set by `nseg`. Each segment has a *backward* flag and
  an *invert* flag. A backward segment begins at `start + (len-1)*step` and
  walks down.
* The segment pattern repeats for as long as `enable` is set.
* `rate_div`: one output sample every `rate_div+1` clocks.
* `interp_en`, `interp_log2`: linear interpolation by 2, 4 or 8. The k-th of
  L outputs between memory samples `s[m-1]` and `s[m]` is
  `s[m-1] + ((s[m]-s[m-1])*k >>> log2 L)`. Output therefore lags the memory
  by one sample.

A full sine needs only a quarter period in memory. Store
`round(A*sin(2*pi*(i+0.5)/(4*len)))` for `i = 0..len-1`, then play four
segments:

1. forward;
2. backward;
3. forward, inverted;
4. backward, inverted.

The half-sample phase makes the fold exact. For a non-periodic signal, such
as a recorded OFDM frame, store the frame and play a single forward
segment. `stim_valid` pulses two clocks after each internal rate tick.

## Power-amplifier pre-distorter

The PA pre-distorter is part of the transmit front end rather than the
engine proper. It sits on the stimulus path here so that a calibration loop
from generator to PA can be simulated as one unit. The engine's software
fits a truncated Volterra model of the PA, folds the power-dependent terms
into gain tables and writes the tables. The hardware then does only table
look-ups and complex multiply-adds:

```
idx(n) = top LUT_AW bits of |x(n)|^2 = I^2 + Q^2      (32-bit unsigned)
y(n)   = sum_{m=0}^{TAPS-1} G_m[idx(n)] * x(n-m)       (complex)
```

* Defaults: `TAPS = 2` memory taps, `LUT_AW = 6` (64 entries per tap).
* Gains are signed Q2.14 (`16384` = 1.0), packed `{G_q, G_i}`. The result
  is shifted right by 14 (floor) and saturated to 16 bits.
* After reset, tap 0 holds 1.0 everywhere and the other taps hold 0, so an
  enabled but unprogrammed pre-distorter is transparent.
* Enabled, each output appears 3 clocks after its input. Disabled, which is
  the reset state, the stage is a combinational bypass. The `stim_*` ports
  then carry the generator's samples unchanged.
* Tables are written through the CSR: set DPD_ADDR to `{tap, index}`, then
  write DPD_DATA once per entry. The address increments after each write.

The article says the table is indexed by the signal's power and that its
output multiplies the memory terms. This design's own choices are indexing
by the newest sample's power, and the number of taps, table size and gain
format.

## Capturing from the front ends

The two `input_buffer` instances are dual-clock FIFOs (1024 samples each by
default):

* Samples are written at the front end's own clock (`tx_s_*` / `rx_s_*`)
  and read by the core at the engine clock.
* The pointers cross between the two clocks in Gray code through two-flop
  synchronisers.
* Capture runs while the CSR's capture bit for that buffer is set.
* A sample that arrives while the buffer is full is dropped, and a sticky
  overflow flag is set. Clearing the capture bit clears the flag.
* Word 0 pops one sample; it reads 0 when the buffer is empty. Word 1 is
  status: `[31]` overflow, `[30]` empty, `[15:0]` level.

## Registers and address map

Data-bus slaves all answer one clock after the request. There are no wait
states, and only whole words are transferred.

| `addr[31:28]` | Slave |
|---|---|
| 0 | DRAM (32 KiB) |
| 1 | CSR |
| 2 | signal generator memory |
| 3 | SPMs: SPM n at `0x3000_0000 + n*0x1_0000`, one sign-extended sample per word |
| 4 | input buffers: Tx at `+0x000`, Rx at `+0x100` |
| 5 | AES |
| 6 | I2C |
| 7 | IRAM (32 KiB), for loading programs |

CSR word offsets:

| Offset | Register |
|---|---|
| 0 | SG_CTRL: `[0]` enable, `[1]` interp_en, `[3:2]` interp_log2, `[5:4]` nseg, `[9:6]` backward flags, `[13:10]` invert flags |
| 1 to 4 | SG_START, SG_LEN, SG_STEP, SG_RATE |
| 5 | capture enables: `[0]` Tx, `[1]` Rx |
| 6 | status, read only: generator active, Tx overflow, Rx overflow |
| 7 | DPD_CTRL: `[0]` PA pre-distorter enable |
| 8 | DPD_ADDR: table address `{tap, index}` for the next DPD_DATA write |
| 9 | DPD_DATA, write only: table entry `{G_q, G_i}`; increments DPD_ADDR |
| 16 to 31 | configuration words driven to the radio on `cfg_o[]` (distorter coefficients, filter settings, knob values) |
| 32 to 39 | result registers, also readable on the tester port `tst_addr` / `tst_rdata` |
| 48 to 51 | radio monitor inputs `mon_i[]`, read only |

AES (`aes_accel`) word offsets:

| Offset | Register |
|---|---|
| 0 to 3 | key, byte 0 in `[31:24]` of word 0 |
| 4 to 7 | input block |
| 8 to 11 | output block |
| 12 | control: `[0]` start, `[1]` decrypt |
| 13 | status: `[0]` busy, `[1]` done |

The core is iterative AES-128 with one round per clock and an on-the-fly key
schedule:

* Encryption takes 10 rounds.
* Decryption first runs the key schedule forward for ten clocks, then walks
  it backwards during the ten inverse rounds.
* The S-boxes are computed at elaboration from the field inverse and the
  affine map. No table is stored in the source.
* It is larger than the 7k-gate block the article mentions, whose design is
  not given.

I2C (`i2c_master`) offers one register write per transaction:

* The transaction is START, 7-bit device address + W, register byte, data
  byte, STOP.
* Word 0 is the command: `[30:24]` device, `[15:8]` register, `[7:0]` data.
* Word 1 is status: `[0]` busy, `[1]` NACK.
* A bit lasts `4*DIV` clocks; the default gives 400 kHz SCL at 120 MHz.
* The pins are open-drain enables.

## Where this RTL departs from, or goes beyond, the article

* **Processor core absent.** See above.
* **Sizes assumed.** None of these sizes is given in the article:
  * SPMs: 4 x 8192 x 16 bit. 64 KiB is the largest SPM footprint among the
    algorithms reported for the chip.
  * IRAM and DRAM: 32 KiB each.
  * Generator memory: 1024 words.
  * Input buffers: 1024 samples each.
  * CSR: 16 configuration words, 8 result words, 4 monitor words.
  * Sample width: 16 bits.
* **Not modelled.** These parts belong to the radio, not the engine, and
  the article gives no structure for them:
  * the Tx IQ-imbalance pre-distorter, the Rx post-distorters, the filter
    chains, the analog paths and loopbacks (only the PA pre-distorter is
    built, because the article outlines its structure);
  * the JTAG tester interface (a plain read port stands in);
  * power gating.
* **Pre-distorter position.** In the radio, the PA pre-distorter follows
  the Tx interpolation filters and runs at the DAC rate (480 MS/s in the
  reference chip). The engine only configures it. The filters are not built
  here, so `pa_dpd` takes the generator's samples directly and runs at the
  engine clock.
* **Signature.** The article also wants results signed for authentication.
  No MAC scheme is given, so signing is left to software built on the
  cipher.
* **Own choices.** The operation encodings, in-place write-back, the
  fixed-point scaling, the segment-list format of the generator and linear
  interpolation are all this design's choices.

## Simulating

Every module has a self-checking testbench in `tb/<module>_tb.sv`, except
`spm_ram`, which is tested through `spm_bank_tb`. Each prints `TB_RESULT checks=N failures=M` and ends with `$finish`. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/cat_pkg.sv \
          tb/cat_engine_tb.sv --top-module cat_engine_tb -o sim
./obj_dir/sim
```

Replace `cat_engine` with any other module name to run its testbench.

`cat_engine_tb` runs the whole engine at its default sizes. The testbench
plays the processor and the radio, which has a loopback that adds a DC
offset. The run has these steps:

1. Plays a sine built from a quarter-period table.
2. Captures it from both front ends.
3. Copies the samples into the SPMs.
4. Estimates the DC offset, the Tx/Rx correlation and the signal power with
   the array instructions.
5. Writes the correction to a configuration word and over I2C, and stores
   the result for the tester port.
6. Exercises the remaining array operations.
7. Covers generator interpolation, the PA pre-distorter with programmed
   tables (every output is checked against a model), a buffer overflow, AES
   encryption, and a program load with an instruction-fetch stall.

It counts each of these mechanisms and fails if one never happened.

`cat_engine_fft_tb` runs a spectrum measurement on the engine at its default
sizes. It computes a 64-point radix-2 FFT of two complex tones with the
butterfly instruction: 6 stages, 63 instructions. Each instruction runs all
butterflies that share a twiddle. Between instructions the testbench does the
processor's loads and stores:

* It puts bottom operands in branch 0 and top operands in branch 1.
* It reads back x0 from branch 1 and x1 from branch 0.

The testbench checks every butterfly bit-exactly. The spectrum must be
within 48 LSB of a floating-point DFT. The rounding analysis for that bound
is in the file header.

The periodogram peaks must fall in the right bins. The NORM instruction must
reproduce the spectrum's energy, and Parseval's relation must hold to 1 %.

## Verification status

All testbenches pass, also when every register and memory that is not
reset starts at a random value (several seeds were run). The testbenches
compare against:

* FIPS-197 vectors for AES;
* closed-form sine values for the generator;
* 64-bit integer reference models for the complex datapath and the
  pre-distorter;
* an I2C target model.

They also check the cycle counts stated above: one element per clock in the
complex unit, the generator's output spacing, the pre-distorter's 3-clock
latency, the AES latency and the I2C transaction length.

Not verified:

* gate-level behaviour;
* timing at 120 MHz;
* any real processor driving the ports.
