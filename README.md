# A bit-serial shared-memory processor for the time-varying DFT

This RTL implements a small, reprogrammable DSP building block and a
time-varying discrete Fourier transform (TVDFT) processor built from three
copies of it.

The building block is the **universal computation module (UCM)**. It has a
few bit-serial processing elements (PEs) that share two small RAMs. The
design rests on three ideas:

* **Partitioned shared memory.** The memory is split into two RAMs, so two
  words can be read in the same clock.
* **Shift registers between the RAMs and the PEs.** Each register is a
  one-word cache. It also converts between the word-parallel RAM side and the
  bit-serial PE side. Because every PE input and output is a single wire, the
  interconnection network stays small, even as a full crossbar.
* **Microprogram control.** One control vector per clock drives every
  multiplexer and enable. To change the algorithm, you rewrite the control
  memory. The hardware stays the same.

The TVDFT processor computes

    Re X = sum_n x_w(n) * cos(phi(n)),   Im X = sum_n x_w(n) * sin(phi(n))

for a phase `phi` whose frequency changes linearly over the analysis frame.
Two UCMs generate cosine and sine samples with a linearly swept frequency. A
third UCM multiplies them by the input sample and accumulates the two sums.

## The UCM

```
          IN_1  OUT_1                           IN_2  OUT_2
            |    ^                                |    ^
         +--v----+--+                          +--v----+--+
         | R1.1     |--\                  /----| R2.1     |
         | R1.2     |---+--> ICN --> PE1 -+----| R2.2     |
         | R1.3     |--/         --> PE2      | R2.3     |
         +----^-----+            --> PE3      +----^-----+
              | 16 bits (parallel)                 | 16 bits
           +--v---+                             +--v---+
           | RAM1 |  3 words                    | RAM2 |  3 words
           +------+                             +------+
                     control unit: one control vector per clock
```

`ucm` is parameterised by `NPE`, the number of PEs, from 1 to 3. The default
is 3. The TVDFT units use `NPE = 2`. There are `2*NPE` word registers:
R1.1..R1.NPE belong to bank 1 (RAM1, IN_1) and R2.1..R2.NPE to bank 2 (RAM2,
IN_2). Every select field in the control vector numbers registers as
`bank*3 + slot`:

| R1.1 | R1.2 | R1.3 | R2.1 | R2.2 | R2.3 |
|------|------|------|------|------|------|
| 0    | 1    | 2    | 3    | 4    | 5    |

### Word moves (one clock)

Each register has four modes. Each mode takes one clock.

| mode         | effect                                                       |
|--------------|--------------------------------------------------------------|
| `R_HOLD`     | keep the word                                                |
| `R_LOAD_RAM` | load `RAM_b[addr]` (asynchronous read, same clock)           |
| `R_LOAD_IN`  | load the external input `IN_b`; `in_take[b]` is high         |
| `R_SHIFT`    | shift right one bit (used by serial steps)                   |

Each RAM has one address per clock, so a bank can do one read or one write
per clock. A write stores one register of the same bank (`wsrc` = slot). It
takes effect at the clock edge, and a read in that clock still returns the
old word. `OUT_1` and `OUT_2` are output registers. Each can be loaded from
any of the six registers.

### The serial step (16 clocks)

This is the core of the design, and the part that is easiest to get wrong
when writing microprograms.

A control word with `serial = 1` is issued for 16 consecutive clocks. In each
of those clocks, every register in `R_SHIFT` mode does two things at once:

* It puts its bit 0 on its serial output.
* It shifts right and takes a new bit at bit 15.

Through the interconnection network (`ucm_icn`), each PE input selects any
register's serial output. Each register's serial input selects any PE's
output, or its own bit 0 (`sin_sel = 0`, a rotation).

The result of a serial step:

* **Operands leave least significant bit first.** After 16 clocks, a rotating
  register holds its original word again. So an operand can feed one or more
  PEs and still be there afterwards.
* **The result enters at the top and ends up aligned.** After 16 clocks, the
  destination register holds the complete result.
* **A register can be both source and destination.** At clock i it sends bit
  i and takes result bit i in the same clock. `R2.2 <- R2.1 * R2.2` therefore
  works in place.
* **All PEs work in the same 16 clocks.** Each PE performs one operation on
  its own operands.

`bit_first` from the control unit is high in the first clock of every step.
It clears the PE state (carry, multiplier sums).

### The processing element

`ucm_pe` has two serial inputs, one serial output and four operations. Each
operation takes one 16-clock step and returns the low 16 bits:

| op       | result                  | how                                        |
|----------|-------------------------|--------------------------------------------|
| `PE_ADD` | a + b                   | full adder and a carry flip-flop           |
| `PE_SUB` | a + not(b) + 1 = a - b  | same adder, b inverted, carry preset to 1  |
| `PE_NEG` | not(a) + 1 = -a         | same adder, b forced to 0                  |
| `PE_MUL` | a * b mod 2^16          | serial-serial multiplier                   |

How the multiplier works: after bit i of both operands has arrived, the
product bits below weight 2^i are final. Over the products of the bits seen
so far, the contribution of step i, relative to weight 2^i, is

    a_i * B(<i) + b_i * A(<i) + a_i * b_i * 2^i

`A(<i)` and `B(<i)` are the operand bits received so far. The PE keeps them,
and a running 16-bit sum. It adds this term, emits bit 0 of the sum as
product bit i, and shifts the sum right.

The low half of a product is the same for signed and unsigned operands, so
all arithmetic is plain 16-bit two's complement modulo 2^16. The output
depends combinationally on the current input bits. That is what lets the
result be shifted into a register in the same clock.

### Control unit and control vector

`ucm_control` holds 32 control vectors of type `ucm_ctl_t` (76 bits, defined
in `ucm_pkg`).

| field                  | meaning                                                    |
|------------------------|------------------------------------------------------------|
| `regs[6]`              | mode and serial-input select of each register              |
| `pe[3]`                | operation and the two source registers of each PE          |
| `ram[2]`               | write enable, address, source slot of each RAM             |
| `outp[2]`              | load enable and source register of OUT_1 / OUT_2           |
| `aux[2]`               | free bits, brought out of the UCM (the TVDFT input muxes)  |
| `serial`               | hold this word for 16 clocks                               |
| `jump`, `target`       | next word is `target` instead of pc+1                      |
| `stop`                 | stop after this word                                       |

The sequencer works like this:

* A `start` pulse restarts it at word 0.
* A word is issued for one clock, or for 16 clocks if `serial = 1`.
* After a word, the sequencer jumps, stops, or goes on to pc+1.
* While it is stopped, the vector is all zeros: registers hold and nothing
  is written.

On reset, the control memory is loaded from the parameter `INIT_PROG`. The
programming port (`prog_we`, `prog_addr`, `prog_data`) rewrites single words
at any time. A write to the word being issued takes effect from the next
clock.

## The TVDFT processor (`tvdft_top`)

```
 cos_in1,cos_in2 -> [UCM cos generator] --OUT_2--> mux IN_1 <-- x_in --> mux IN_2 <--OUT_1-- [UCM sin generator] <- sin_in1,sin_in2
                                                       \                  /
                                                    [UCM transform: R1 side = Re, R2 side = Im]
                                                          OUT_1 = re_out     OUT_2 = im_out
```

One `start` pulse starts all three units. Their microprograms, in
`tvdft_prog_pkg`, are written so that every unit repeats a 68-clock loop.
They stay in step without any handshake between them.

### Generator (`tvdft_generator`)

The sine is built from a parabola. If `A` counts samples within a half
period of length `M`, then `A*(M-A)` is a half sine wave of amplitude
`M*M/4`. A linearly swept frequency comes from two accumulators:

    F <- F + dF        (the phase step grows by dF per sample)
    A <- A + F
    y  = A * (M - A)

The host gives the unit its constants through the two inputs. `in_take`
shows when each word has been taken:

* `IN_1`: first the start frequency `F0`, then the step `dF` for every
  sample.
* `IN_2`: first `M`, then the start phase `A0`.

The cosine generator is the same program started a quarter period ahead
(`A0 = M/2`). The cosine generator writes OUT_2 and the sine generator writes
OUT_1 (parameter `OUT_PORT`).

Schedule (first pass of the loop shown; later passes add 68k). Clocks are counted from the first clock after `start`. RAM1[0]
holds F, RAM2[0] holds M and RAM2[1] holds A.

| clocks        | step                                                             |
|---------------|------------------------------------------------------------------|
| 0             | R1.1 <- IN_1 (F0), R2.1 <- IN_2 (M)                              |
| 1             | RAM1[0] <- R1.1, RAM2[0] <- R2.1                                 |
| 2             | R2.1 <- IN_2 (A0)                                                |
| 3             | RAM2[1] <- R2.1                                                  |
| 4 + 68k       | R1.1 <- IN_1 (dF), R1.2 <- RAM1[0], R2.1 <- RAM2[1]              |
| 5 .. 20       | serial: R1.2 <- R1.1 + R1.2 (F)                                  |
| 21            | RAM1[0] <- R1.2, R2.2 <- RAM2[0] (M)                             |
| 22 .. 37      | serial: R2.1 <- R2.1 + R1.2 (A)                                  |
| 38            | RAM2[1] <- R2.1                                                  |
| 39 .. 54      | serial: R2.2 <- R2.2 - R2.1 (M - A)                              |
| 55 .. 70      | serial: R2.2 <- R2.1 * R2.2 (y)                                  |
| 71 + 68k      | OUT <- R2.2, jump back to clock 4's word                         |

Sample k appears on the output 72 + 68k clocks after start.

### Transform (`tvdft_transform`)

Two 2:1 multiplexers sit in front of the UCM inputs. The transform
microprogram drives their selects through its `aux` bits:

* IN_1 takes `x_in` or the cosine sample.
* IN_2 takes `x_in` or the sine sample.

Schedule (first pass of the loop shown; later passes add 68j). RAM1[0] holds Re and RAM2[0] holds Im.

| clocks        | step                                                              |
|---------------|-------------------------------------------------------------------|
| 0 .. 15       | serial: R1.1 <- R1.1 - R1.1, R2.1 <- R2.1 - R2.1 (zeros)          |
| 16            | RAM1[0] <- R1.1, RAM2[0] <- R2.1 (both sums cleared)             |
| 17 .. 80      | four idle serial steps (wait for the first generator sample)     |
| 81 + 68j      | R1.1 <- x, R2.1 <- x (`x_take`)                                   |
| 82 + 68j      | R1.2 <- cos, R2.2 <- sin (`trig_take`)                            |
| 83 .. 98      | serial: R1.1 <- R1.1 * R1.2, R2.1 <- R2.1 * R2.2                  |
| 99            | R1.2 <- RAM1[0], R2.2 <- RAM2[0]                                  |
| 100 .. 115    | serial: R1.1 <- R1.1 + R1.2, R2.1 <- R2.1 + R2.2                  |
| 116 + 68j     | store both sums, OUT_1 <- Re, OUT_2 <- Im                         |
| 117 .. 148    | two idle serial steps, then back to clock 81's word               |

The transform reads generator sample j at clock 82 + 68j. That is 10 clocks
after the sample appears and well before the next one. The running sums
after sample j appear on `re_out`/`im_out` at 117 + 68j.

### Host protocol (`tvdft_top`)

1. After reset, all three control memories hold the TVDFT programs.
2. Present `F0` on `cos_in1`/`sin_in1` and `M` on `cos_in2`/`sin_in2`, then
   pulse `start`.
3. After the first `*_in_take[1]`, present the start phase: `M/2` for cosine,
   `0` for sine.
4. After the first `*_in_take[0]`, present `dF`. Each later take reads `dF`
   again.
5. Present x(0) before start. After each `x_take`, present the next sample.
6. After N samples, read `re_out`/`im_out`. Pulse `start` again to begin a
   new frame. This clears the sums.

`prog_unit` selects the control memory that the programming port writes:
0 is the cosine generator, 1 the sine generator, 2 the transform.

## Numbers and limits

* Words are 16-bit two's complement. All results are kept modulo 2^16.
  There is no fixed-point scaling. Products keep their low 16 bits, and sums
  wrap.
* The generator amplitude is `M*M/4`, so `M <= 362` keeps it in range.
* The user keeps `A` inside one half period through the choice of `M`, `F0`
  and `dF`. The full periodic form is `(-1)^k (A - kM)(M - (A - kM))` with
  `k = floor(A/M)`. Its folding and sign change need a comparison, which
  these four PE operations cannot form, so the generator does not fold.
* One frame computes one harmonic. For another order k, scale the generator
  frequency constants by k and run another frame.
* The input is the already windowed sample `x(n)*w(n)`. There is no window
  unit.
* Throughput is one input sample per 68 clocks. At the 2.69 ns minimum
  clock period the reference FPGA implementation reports, that would be about
  5.5 Msamples/s. No timing analysis has been done on this RTL.
* The control memories are 32 x 76 bits each and are reset-loaded
  flip-flops. They account for about 7,300 of the roughly 8,200 flip-flop
  bits after synthesis. For an FPGA, they could become ROM or block RAM.

## Which parts follow the reference description and which are this design's own

These parts follow the reference description:

* The UCM structure: two partitioned RAMs of three 16-bit words, `2*NPE`
  shift registers as cache and serial/parallel converters, single-wire
  interconnect, up to three bit-serial PEs.
* The PE's functions: serial addition with carry, multiplication, negation.
* Control as a rewritable microprogram.
* The three-UCM TVDFT arrangement, with its input multiplexers and which
  generator output feeds which side.
* The generator's two-accumulator and parabola method.

These are this design's own choices:

* The bit order (LSB first) and the rotate path.
* The multiplier circuit.
* The control-vector layout and the sequencing fields.
* The 32-word control memory and its programming port.
* The `in_take`/`aux` signals.
* The asynchronous-read, single-address RAM.
* The register and RAM-word allocation and the 68-clock schedules.
* Integer (unscaled) arithmetic.
* The asynchronous active-low reset, which clears all data state and
  reloads the programs.

The generator's published step list could not be used word for word. It
writes two words of one single-port RAM in one step, and it mixes operand
names between steps. The program here follows the same pattern of steps:
load, serial add, write back, serial `M + not(A)`, serial multiply, output.

## Files

| file                        | contents                                               |
|-----------------------------|--------------------------------------------------------|
| `rtl/ucm_pkg.sv`            | widths, enums, control vector `ucm_ctl_t`              |
| `rtl/tvdft_prog_pkg.sv`     | generator and transform microprograms, word builders   |
| `rtl/ucm_pe.sv`             | bit-serial PE                                          |
| `rtl/ucm_shift_reg.sv`      | word / shift register                                  |
| `rtl/ucm_ram.sv`            | bank RAM                                               |
| `rtl/ucm_icn.sv`            | bit-serial interconnection network                     |
| `rtl/ucm_control.sv`        | control memory and sequencer                           |
| `rtl/ucm.sv`                | the UCM                                                |
| `rtl/tvdft_generator.sv`    | generator unit                                         |
| `rtl/tvdft_transform.sv`    | transform unit with input multiplexers                 |
| `rtl/tvdft_top.sv`          | the three-unit TVDFT processor                         |
| `tb/tb_<module>.sv`         | one self-checking testbench per module                 |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Build and run
one with Verilator 5 from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl \
    rtl/ucm_pkg.sv rtl/tvdft_prog_pkg.sv tb/tb_tvdft_top.sv --top-module tb_tvdft_top
./obj_dir/Vtb_tvdft_top
```

Replace `tb_tvdft_top` with any other testbench name.

What the testbenches check:

* **Unit tests.** Each unit testbench compares its module against arithmetic
  worked out separately in the testbench. It also checks the cycle counts:
  16 clocks per serial step, 35 and 53 clocks for the test programs, and the
  68-clock sample period with its offsets of 72, 81 and 117.
* **`tb_tvdft_top`.** Runs the whole processor at its default size for three
  frames of 64 samples. It checks every cosine and sine sample and every
  running Re/Im sum against a reference model. Before the third frame it
  rewrites one word of the transform's control memory, so that frame
  subtracts instead of adds. It counts each mechanism and fails if one never
  occurs: input reads, multiplexer switches, restarts, reprogramming.

To run a different algorithm on a UCM, build a `ucm_prog_t` with the helper
functions in `tvdft_prog_pkg`. Pass it as `INIT_PROG`, or write it through the
programming port.
