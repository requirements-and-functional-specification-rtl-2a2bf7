# Station Board Timing FPGA

Every Station Board in the EVLA WIDAR correlator needs the same time and the
same 128 MHz clock as its neighbours. It must also send each of its 18
sub-band outputs the control streams that tell the Baseline Boards how to
rotate phase, when to dump accumulators and what time it is. This RTL is the
FPGA that does this. It takes two redundant time codes (PPSCODE A and B,
each with its own 128 MHz clock) from the Crossbar Boards. It checks them,
picks one, passes both on to the next board with the hop count
incremented, and derives the board clock, a 1 Hz PPS and a 100 Hz tick
from the chosen code. From the returned system tick it builds five serial
streams:

- PHASERR, phase-error frames from the filter FPGAs;
- PHASEMOD, phase-model frames written by the host;
- DUMPTRIG, dump-trigger frames written by the host;
- TIMECODE;
- COMMAND, for the Crossbar Board.

It packs these into one 8-lane word per sub-band and serializes each word
at 1.024 Gb/s. A 16-bit register bus (the MCB) lets the host controller
(the CMIB) configure and monitor all of it.

Everything is written in synthesizable SystemVerilog. The top is
`timing_top`. Each block has a self-checking testbench in `tb/`.

## Clocks and resets

| Domain | Clock | What runs there |
|---|---|---|
| input A / B | `clk_a`, `clk_b` (128 MHz, with each code) | PPSCODE receivers and repeaters |
| MCB | `mcb_clk` (up to 33 MHz) | all registers, source selection, clock monitors |
| system | `sclk` (128 MHz, BCLK returned by the board buffers) | everything that makes the outputs |
| serial | `clk_ser` (8 x `sclk`, same PLL) | the 18 output serializers |

The PLL that makes `sclk` and `clk_ser` is a vendor part and is not in the
RTL. The clocks come in as ports, and CONTROL PLL-Rset comes out as
`pll_rst`.

Settings cross from the MCB domain to `sclk` as one packed struct (`cfg_t`)
through two-flop synchronizers. This is safe because the host changes them
only between ticks. Monitor values go the other way as one `sts_t`.
Writes to the memory ports (PMPORT, DTPORT) and command registers cross as
pulses. The written data stays stable in the MCB register while the pulse
crosses.

There are three resets:

- `rst_n` is the board reset.
- `por_n` is the configuration reset. Only `por_n` clears CONTROL, so a
  board reset does not change how the board runs.
- CONTROL RST-SW holds the system-clock logic in reset. It does not reset
  the registers or the PPSCODE decoder, so the host can always release it.

## Time code path (`ppscode_rx`, `ppscode_decoder`, `clk_monitor`)

A PPSCODE line carries alternating preamble (`0101...`). Once a second it
carries a 23-bit frame, sent one bit per 128 MHz clock:

| bits | content |
|---|---|
| start | a 0 where the preamble would have given a 1 |
| 0 | T, the PPS epoch (always 1) |
| 1-6 | second of the minute, LSB first |
| 7-10 | fixed `1010` |
| 11-18 | hop count, LSB first |
| 19-22 | CRC-4 over bits 0-18, generator x^4+x+1 (`10011`), MSB first |

Each receiver finds the frame and pulses `pps` on the T bit. It reports
the second, the hop count, a CRC error and an overflow (hop count 255). It
also checks that the PPS period is PPSLEN+1 of its own clocks. In the same
clock domain it repeats the code 18 clocks later. The hop count is
incremented bit-serially (carry in 1) and the CRC is recomputed on the fly,
so the next board receives a valid frame. A chain of boards therefore
delays the code by 18 clocks per hop, and the host compensates with
PPSDLY = PPSDLY0 + (max hops − hop count) × 18.

Four clock monitors count edges of A, B, the board clock and the external
X clock in 4091 MCB clocks. At 128 MHz against 33.3 MHz the count should be
about 0x3D5D. A count outside 0x3D50..0x3D70 marks the clock bad.

Source selection runs in the MCB domain:

- It takes A by default, moves to B when A goes bad, and returns only when
  B fails or the host writes PCSTATE SEL-rst. An input is bad if its clock
  monitor says so, or if its last eight frames all failed.
- The board clock (`bclk`) is the X clock while X has stayed good since
  reset or the last SEL-rst. Otherwise it is the clock of the chosen code.
- PCSTATE MAN-sel forces both choices.

The chosen PPS crosses into `sclk` and is delayed by PPSDLY clocks. It then
restarts two free-running counters that give `bpps` (every PPSLEN+1
clocks) and `btick` (every TICKLEN+1 clocks). The defaults are 127,999,999
and 1,279,999, which give 1 s and 10 ms. The host may shorten both, which
the top-level testbench does. If the code stops, the counters keep
running.

## System tick (`system_tick`)

BPPS and BTICK return from the board buffers as `spps` and `stick`. This
block checks them:

- both intervals (STICK-Intv, SPPS-Intv);
- that every SPPS comes with a STICK (STICK-Mis);
- that both pulses are one clock wide (STICK-Bad, SPPS-Bad).

It delays both by SYSDLY (17 bits) to give the internal tick and PPS that
time every generator. It also counts ticks within the second (TCOUNT). It
raises the host interrupt 2 × INTDLY clocks after the internal tick
(INTDLY is in 64 MHz units). Errors found during a tick are published
together at the next internal tick, so the interrupt routine always reads
one whole interval.

## Instruction-driven generators (`pm_gen`, `dt_gen`, `crc4_inserter`)

PHASEMOD and DUMPTRIG are not fixed formats. The host writes a list of
16-bit instructions into a memory, and a small state machine (IDLE, READ,
DATA, NOP) turns it into a bit stream. While no frame is being sent, the
stream is alternating preamble.

Instruction word:

| field | bits |
|---|---|
| command | [15:11] |
| width | [10:8], sends width+1 data bits |
| data | [7:0] |
| length (NOP, NOPL) | [10:0] |

| code | command | bits sent |
|---|---|---|
| 0 | TRIG | one 1, the dump trigger (DUMPTRIG only) |
| 1 | SBIT | start bit 0; restarts the CRC |
| 2 | DATA | width+1 data bits, LSB first |
| 3 | CRC | the 4 CRC bits of the frame's data |
| 4 | END | preamble from here on; the generator goes idle |
| 5 | NOP | `length` preamble bits |
| 6 | NOPL | `length` × 2048 preamble bits (DUMPTRIG) |

The preamble keeps its phase through every instruction. This is what makes
the frames decodable downstream. A start bit must fall where the preamble
would have been 1, and a trigger where it would have been 0. Otherwise the
generator flags PMS-Err, DTS-Err or DTT-Err. The preamble's phase is fixed
at the tick:

- PHASEMOD sends a preamble 1 in the first clock after the internal tick,
  so a list may begin with SBIT.
- DUMPTRIG sends a 0 there, so a list may begin with TRIG.

The first instruction is decoded in the clock after the tick, and its
first bit leaves one clock later.

The two generators differ in how they use the memory:

- **PHASEMOD** (4k words) is refilled every tick. The host clears the
  generator, writes the next tick's frames and sets PM-En. Reading starts
  at the tick and stops at END. Running off the end of the memory sets
  PMW-Err or PMR-Err.
- **DUMPTRIG** (16 generators) is armed once and then read continuously
  as a circular buffer. It follows no later tick, so dump triggers can
  fall anywhere. The host keeps writing ahead of the reader. If the reader
  catches up with the writer, DTR-Err is set.
  - Two generators have 32k-word memories, for pulsar binning. Fourteen
    have 2k.
  - DTTRIGCNT gives the clocks from the last trigger to each tick, so the
    host can check that triggers stay aligned.
  - DTSELECT chooses which generator CONTROL's DT bits, DTPORT, DTWADDR,
    DTRADDR and DTTRIGCNT address.
  - `dt_switch` (DTSWITCH0-4) gives each of the 18 outputs a 4-bit
    generator number.

`crc4_inserter` computes CRC-4 (x^4+x+1, zero start) over the data bits
between SBIT and CRC and sends it MSB first. CONTROL PM-Err, DT-Err, TC-Err,
PE-Err and XB-Err invert the CRC bits of their stream, to test the
receiver's checking.

## Phase error generator (`perr_sync`, `perr_format`, `perr_gen`)

Each filter FPGA sends a 4-bit phase error on both clock edges, with a
tick and a sample indicator. There are 18 per baseband.

- `perr_sync` joins the two nibbles into an 8-bit phase error. CLKSEL
  chooses which edge gives the low nibble. It also checks the sample
  indicator and keeps a CRC of the received values that the host can
  read (PECRC).
- A switch (PESWCFG0-17) lets each output take any A input and any B
  input.
- `perr_format` sends 20-bit PHASERR frames back to back from every
  tick: 8 bits of A, 8 bits of B (each LSB first), then the CRC-4.
- PTICKSEL/PTICKCNT measure the PTICK period of one chosen input.
  TPESEL/TPEOUT capture one phase error at the tick.
- `interval_meter` does these measurements. It counts in half clocks,
  because events captured on the falling edge sit half a clock later.

## Time code and crossbar command outputs (`tc_gen`, `xb_cmd_gen`)

`tc_gen` sends one TIMECODE frame at every internal tick. It starts with
a start bit in the tick clock, so that the T bit lines up with the first
bit of the other streams. It then carries T, C, EPOCH, TCOUNT and a 32-bit
second count, followed by the CRC-4. In manual mode the host writes the
values each interrupt (TCSTAMP0-2). In automatic mode (TCSTAMP2 A bit) T
follows the internal PPS, TCOUNT counts ticks and the second count
advances at each PPS.

`xb_cmd_gen` sends a 16-bit command on the COMMAND lane of one sub-band
pair. The host writes the pair number to XBADDR and then the data to
XBDATA. XBADDR reads back busy [15] and address-out-of-range [14].

## Output word and serializer (`ctrl_serializer`)

Each sub-band's 8-bit word has these lanes:

| lane | signal |
|---|---|
| 0 | CONTROL TX-Bit, which should be set to 1; the receiver uses it to find the word boundary |
| 1 | TIMECODE |
| 2 | COMMAND |
| 3 | PHASERR |
| 4 | PHASEMOD |
| 5 | DUMPTRIG |
| 6, 7 | 0 |

`dt_switch` registers the DUMPTRIG streams. TIMECODE, COMMAND, PHASERR
and PHASEMOD get one matching register stage before the word is formed.
So a trigger placed first after a tick shares a clock with the TIMECODE
T bit and the first PHASEMOD and PHASERR bits. The top-level testbench
checks this for the trigger and the T bit.

The serializer shifts the word out, lane 0 first, one lane per `clk_ser`
cycle. It finds the word boundary from a flag that the `sclk` side flips
every clock. For that reason `clk_ser` must be exactly 8 × `sclk` from the
same PLL. The parallel word is also brought out as `ctrl_word` for
simulation.

## Register bus (`mcb_regs`)

The bus has 8-bit addresses and 16-bit data:

- **Write:** `mcb_cs_n` and `mcb_rd_wr_n` are both low for one clock edge.
- **Read:** the address is captured at the edge where `mcb_cs_n` is low
  and `mcb_rd_wr_n` is high. The data is then driven, with `mcb_data_oe`
  high, for as long as `mcb_cs_n` stays low.

Points worth knowing:

- STATUS0-4 read as the last written value XOR the live error bits, so the
  host can mask known errors.
- CONTROL survives `rst_n`. Its DT-Clr/DT-Arm/DT-Err bits belong to the
  generator named by DTSELECT.
- PLEN/TLEN reset to the 1 s / 10 ms values.
- INTRIND is set by the tick interrupt and cleared by any write.
  `mcb_intr` is a one-clock pulse when INTR-En is set.
- TIMER0/1 is a free-running 32-bit microsecond count.
- DESIGNID reads 0110h.
- An unused address reads 0.

`test_port_mux` routes any of 64 internal signals (numbers 00h-3Fh) to each
of the four test pins, selected by TESTPIN0/1.

## Where this design makes its own choices

The specification leaves these points open. The RTL settles them as
follows:

- The PPSCODE bit map it prints has no hop-count field, but the text
  requires one. Here the hop count sits in bits 11-18, and the CRC follows
  it and covers it.
- The source-selection rule, the "eight bad frames" limit and the X-clock
  preference are this design's.
- The BCLK clock multiplexer is combinational. A switch can shorten one
  clock cycle.
- Width code 110 sends 7 data bits, following the pattern of the other
  width codes.
- The PHASERR frame layout, the TIMECODE frame bit order and the COMMAND
  frame layout are this design's.
- Each output takes the single PHASEMOD stream and the DUMPTRIG stream its
  DTSWITCH entry names. Two of the 16 DUMPTRIG memories are 32k words and
  the rest 2k.
- SYS-Sel is stored but not used: STICK and SPPS are sampled on the
  rising edge only.
- CSRR and PCCTLSTS's control bits are stored and brought out, but nothing
  described uses them.
- The 256 MHz test signal (test pin number 02h) reads 0.

The following are not in the RTL:

- the PROTECT output, whose control bit is not defined;
- the vendor PLL, the I/O cells and the configuration/JTAG logic;
- the chopping logic that would use CSRR.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each one
has a watchdog. A testbench reads its block and the package, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dt_gen \
  -y rtl -y tb +libext+.sv -Irtl rtl/tfpga_pkg.sv tb/tb_dt_gen.sv
./obj_dir/Vtb_dt_gen
```

`tb_timing_top` runs the whole FPGA at its default sizes (about 1 ms of
simulated time, a few seconds of CPU). It shortens the second and the tick
through the registers, as the host may. It loops BCLK, BTICK and BPPS back
as the board does, and checks:

- the PPS and tick periods;
- the received hop count;
- TCOUNT, the interrupt and a test pin;
- a PHASEMOD frame and its CRC, and a DUMPTRIG trigger with DTTRIGCNT;
- the serial output against the parallel word;
- a crossbar address error;
- RST-SW.

The block testbenches cover the rest:

- the CRC-4;
- every generator command and error flag;
- PPSCODE repeating with the hop increment and the CRC recomputed;
- source failover, including a stopped clock;
- the register map;
- PERR capture on both edges;
- the serializer's lane order and latency.

## Files

- `rtl/tfpga_pkg.sv`: constants, instruction codes, register addresses,
  `cfg_t` and `sts_t`, and the CRC-4 step function.
- `rtl/timing_top.sv`: the top level, clock-domain crossings and the
  test-pin map.
- `rtl/sync_bits.sv`, `rtl/pulse_sync.sv`: clock-domain crossing helpers.
- One file per block, as named in the sections above.
- `tb/tb_<block>.sv`: the testbench of each block.
