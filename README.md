# AM short-wave receiver back end for the ADDA16 converter board

This design demodulates an amplitude-modulated short-wave signal in logic. The
analog tuner mixes the station down to a 455 kHz intermediate frequency (IF). A
16-bit ADC on an ADDA16 converter board samples that IF, and the FPGA logic turns
the samples into audio, which goes back out through the board's DACs. There is no
mixer and no filter chain in the logic. The design rests on two sampling tricks,
and they are the part worth understanding first:

1. **Sub-sampling.** The IF is sampled far below twice its frequency. The sample
   rate is chosen so that the 8 kHz-wide IF band folds down without overlapping
   itself.
2. **Delayed quadrature sampling.** At a sample rate where the carrier advances
   exactly a quarter period between samples, two neighbouring samples act as the
   cosine (in-phase) and sine (quadrature) parts of the baseband signal. The
   envelope, which is the audio, is then just the length of that vector.

The RTL covers three things:

- a hardware sequencer that runs the receiver's interrupt routine;
- the "own core" that drives the ADDA16 board's asynchronous bus;
- a CPLD bus driver between the FPGA and the board.

A separate stand-alone CPLD exerciser sits beside them and writes a ramp to a second
board.

## The signal path

### Why 140 kHz, and why decimate by 4

The board's ADC runs from an external sample clock at `f_s = 4·f_A`.

- With an IF of `f_T = 455 kHz = 13 × 35 kHz` and `f_s = 140 kHz = 4 × 35 kHz`, the
  carrier phase advances `2π·13/4` per sample, which is `π/2` modulo `2π`.
- For an IF sample `x[n] = A[n]·cos(π n/2 + φ)`, sample `4k` is then
  `A·cos(φ')` and sample `4k−1` is `A·sin(φ')`.
- Keeping every fourth sample of the direct stream and of a one-sample-delayed
  stream therefore gives the cosine and sine channels at `f_A = 35 kHz`.
- This works whenever `f_T/f_A = 1 + 4m`. Here m = 3.
- The usable audio bandwidth is limited by `f_A/2 = 17.5 kHz`. That is more than the
  4 kHz audio of an 8 kHz AM channel.

`quad_sampler` does exactly this: a one-sample delay register and a modulo-4 phase
counter. On every fourth input it outputs `cos = x[n]`, `sin = x[n−1]` one clock
later. Which channel is called cosine does not matter for the magnitude.

### Demodulation

`am_abs_demod` computes

    u_NF = 2·sqrt(re² + im²) − 1

in signed fixed point. Full scale is 1.0, represented as 2^15, so the constant 1 is
−32768 after subtraction.

- The factor 2 undoes the halving of the amplitude by the mixing.
- Subtracting 1 removes the carrier level and leaves the modulation.
- A carrier of 0.5 full scale at 100 % modulation therefore spans the full output
  range. Anything beyond that saturates, and the `saturated` flag reports it.

The square root is a restoring bit-by-bit root that produces one bit per clock. It
is exact, rounding down. `done` rises W+3 = 19 clocks after `start`.

## The ADDA16 board bus

The board is a vendor module, so it is not part of the RTL. The logic has to obey
its bus. There are four registers, selected by A3..A0:

| A3..A0 | Name  | Read          | Write                 |
|--------|-------|---------------|-----------------------|
| 0x0    | ADDA0 | ADC0 result   | DAC0 value            |
| 0x1    | ADDA1 | ADC1 result   | DAC1 value            |
| 0x4    | FS    | —             | sample-clock divider  |
| 0x5    | CFG   | —             | configuration         |

A18..A16 and A5..A4 must match the board's jumpers. One jumper is closed, so these
lines are 100 and 00. `adda16_bus_fsm` drives them from the parameters `JPA_BANK` and
`JPA_SUB`.

Start-up runs in three steps:

1. Hold nRESET low for 10 ms, which is 1,000,000 clocks at 100 MHz (`RESET_CYCLES`).
2. Write **FS = 0x00**, which selects the external sample clock.
3. Write **CFG = 0x89**, which sets three fields:
   - the sample clock is also output;
   - nINT0 means "ADC ready";
   - the DACs update together when DAC1 is written.

The receiver therefore writes DAC0 first and DAC1 second. Both analog outputs change
on the second write.

### One bus access

Every access takes the same clock pattern. BUSCLK is the 100 MHz system clock.

    clock   0     1     2     3     4     5     6     7
    state  IDLE  ADDR  SEL  STRB  STRB  HOLD  TURN  IDLE
    A3..0   x   <-------- addr --------->  0     0
    nIOSEL  1     1  \_____________________/ 1     1
    nRD/nWR 1     1     1  \___________/  1     1     1
    data           write data driven ADDR..HOLD / read data taken at end of STRB

- The address comes one clock before nIOSEL.
- nIOSEL falls one clock before the strobe.
- The strobe is low for 2 clocks (`STROBE_CYCLES`).
- nIOSEL rises one clock after the strobe.
- One idle clock follows as bus turnaround.
- Read data are captured on the edge that ends the strobe.

A new command is taken in the next IDLE clock, so back-to-back accesses come every
7 clocks. The outputs are decoded from the state register only (a Moore machine).
Assertions check two rules: a strobe is never active without nIOSEL, and nRD and
nWR are never low together.

The address returns to 0x0 when nIOSEL rises. That is a value the board ignores
while nIOSEL is high.

## The own core: a register interface for the bus

`adda16_user_logic` is the part that a processor would see as two 32-bit registers
on a peripheral bus. It uses the bus-attachment signal names `Bus2IP_*` and
`IP2Bus_*`.

| Register | Access | Meaning |
|----------|--------|---------|
| 0 | write | Command word: bit 20 is the read request, bits 19..16 the board register, bits 15..0 the write data. Byte enables apply. Each write starts one board access. |
| 0 | read  | The last command word. |
| 1 | read  | Bits 15..0 are the last word read from the board. The read is acknowledged only once no access is pending or running, so "write register 0, then read register 1" waits for the access and returns its data. |
| 1 | write | Acknowledged, no effect. |

Timing rules:

- **Write acknowledge.** A write is acknowledged `ACK_DELAY` = 5 clocks after the
  one-clock write-detect pulse. A small counter counts to 5 and stops.
- **Timeout suppression.** A free-running counter is cleared by every write detect.
  While its bit `TOUT_BIT` = 26 is 0, `IP2Bus_ToutSup` holds off the bus timeout.
  At 100 MHz that covers 0.67 s, which includes the 10 ms board reset.
- **Interrupt.** nINT0 passes through a synchroniser. Its falling edge gives a
  one-clock `IP2Bus_IntrEvent`.

## The interrupt routine in hardware

In a processor system, a small C routine runs on every ADC-ready interrupt. Here
`receiver_isr` is a state machine that issues the same sequence of register accesses
to the own core:

    start-up:   write FS, write CFG
    interrupt:  read ADC0 -> quadrature buffer -> every 4th time:
                demodulate -> write DAC0 -> write DAC1

Each board access is "write command to register 0, wait for the acknowledge, read
register 1". With the default parameters, an access takes about 17 clocks.

A demodulating interrupt takes 57 clocks from the board's conversion to the end of
the DAC1 write. That is 0.57 µs, against 7.1 µs between conversions at 140 kHz, so
the receiver keeps up with a large margin. An interrupt that arrives while the
sequencer is busy is held, one deep. A second one is counted in `missed_irqs`.

The same audio value goes to both DACs.

## The CPLD parts

- **`cpld_bus_driver`** sits between FPGA and board as a level-shifting buffer.
  - Address and control lines pass straight through.
  - The data direction follows `RnW`. When RnW = 1, the board drives the FPGA side.
    When RnW = 0, the FPGA drives the board side.
  - Tri-state buses are modelled as data plus an output enable.
- **`cpld_ramp_init`** drives the bus without any processor.
  - It reuses `adda16_bus_fsm`: after the reset and the FS/CFG writes it loops
    forever, writing a counter to DAC0 and DAC1 and then incrementing it.
  - The board's output is a sawtooth.
  - Its data bus is output-only, so `nrd` stays high.

## Top level

`am_receiver_top` wires two systems side by side on one clock and reset:

- the receiver: `receiver_isr → adda16_user_logic → cpld_bus_driver → rx_*` pins;
- the exerciser: `cpld_ramp_init → ramp_*` pins.

The FPGA's bidirectional data pad is split into `rx_d_out`/`rx_d_oe` (towards the
board) and `rx_d_in` (from the board). An assertion checks that the core and the
driver never drive the FPGA side at the same time.

Some outputs are deliberately constant or copied from an input: the jumper address
lines, BUSCLK and the exerciser's `nrd`.

## Where this design departs from, or adds to, its source

- The receiver routine runs as a hardware sequencer, not as software on a soft
  processor. The processor, its bus, its interrupt controller and its memories are
  not included. The register interface they would use is kept unchanged.
- The original core drives A3..A0 straight from command-register bits 19..16. Here
  the address is latched with the command, driven during the access, and set back
  to 0 afterwards. The board sees the same cycle.
- Bit 20 as the read request, and the "register-1 read waits for completion"
  hand-off, are this design's way to let one register pair both start accesses and
  return read data.
- One description of the start-up sequence swaps the names FS and CFG relative to
  the board's register map. The addresses and values agree with the map, and this
  design follows the map: 0x00 to 0x4, then 0x89 to 0x5.
- A source comment puts the timeout at 1.34 s. Bit 26 of a 100 MHz counter gives
  0.67 s. This design follows the bit number.
- The demodulation formula is used with the "−1" term. One equation omits it, but
  the block diagram includes it.
- The fixed-point format, the saturation, the square-root method and the
  nINT0 synchroniser are this design's own choices. So are sending the same value
  to both DACs, the ramp step of 1 and the ramp writing both DACs.

## Not included

- The converter board itself, with its ADCs, DACs and smoothing filters.
- The sample-clock generator, whose rate sets the sub-sampling.
- The tuner and the loudspeaker.
- The DSP-based variant of the receiver.
- The FPGA pad buffer.

`tb/adda16_model.sv` is a behavioural model of the board's bus side, for simulation
only. It checks the bus timing above, counts protocol errors, holds the registers,
implements the DAC update modes and pulls nINT0 low after a conversion.

## Files

| File | Contents |
|------|----------|
| `rtl/adda16_pkg.sv` | register addresses, start-up values, CFG fields, command-word layout |
| `rtl/adda16_bus_fsm.sv` | board bus state machine (reset pulse and access cycle) |
| `rtl/adda16_user_logic.sv` | own core: two registers, acknowledge, timeout, interrupt |
| `rtl/quad_sampler.sv` | delayed quadrature sampling with decimation by 4 |
| `rtl/am_abs_demod.sv` | magnitude demodulator with iterative square root |
| `rtl/receiver_isr.sv` | hardware interrupt routine |
| `rtl/cpld_bus_driver.sv` | direction-switched bus driver |
| `rtl/cpld_ramp_init.sv` | stand-alone ramp exerciser |
| `rtl/am_receiver_top.sv` | top level |
| `tb/adda16_model.sv` | behavioural board model (simulation only) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It has a
watchdog. Run one with plain verilator from the repository root:

    verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
        --top-module tb_am_receiver_top -y rtl -y tb +libext+.sv -Irtl -Itb \
        rtl/adda16_pkg.sv tb/tb_am_receiver_top.sv -o sim
    ./obj_dir/sim

Replace the top module name to run another testbench.

### What the testbenches cover

- **`tb_am_receiver_top`** runs the whole design at its default parameters,
  including the full 10 ms reset. It takes about two seconds of simulation time.
  - It feeds 128 samples of a 50 %-modulated 455 kHz carrier, sub-sampled at
    140 kHz, to the board model.
  - It checks the demodulated audio against a model computed in the testbench.
  - It counts every mechanism, and fails if any count is zero: reset, start-up
    writes, interrupts, ADC reads, decimation, DAC writes, simultaneous DAC updates,
    acknowledge hold-off, timeout suppression, both driver directions and the ramp.
- The block testbenches check the following:
  - the exact clock positions of every bus edge;
  - the acknowledge delay;
  - the timeout bit, using a reduced `TOUT_BIT`;
  - the square root against a reference over random and corner inputs;
  - the decimation phase;
  - the ramp sequence;
  - the bus-driver direction truth table.
- Some block testbenches shorten `RESET_CYCLES` so they finish quickly.
