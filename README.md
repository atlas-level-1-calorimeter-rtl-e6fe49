# Jet/Energy Module (JEM) for the ATLAS Level-1 Calorimeter Trigger

This is a synthesizable SystemVerilog model of the Jet/Energy Module. One JEM
covers 8 phi × 4 eta jet elements of trigger space (a jet element is 0.2 × 0.2
in eta × phi). It receives 88 serial links from the pre-processor modules. It
rebuilds the jet elements and finds jets over an 11 × 7 environment. It sums
Et, Ex and Ey over its 8 × 4 core. Every bunch crossing it drives two 25-bit
result words to the merger modules. It also provides the DAQ and
Region-of-Interest (RoI) readout, playback and spy test memories, and VME
control. The module `jem_top` builds the board: a VME CPLD, a control FPGA,
eleven input FPGAs, one main FPGA and a readout-controller (ROC) FPGA.

```
 88 links ─► input FPGA ×11 ──5 bit @ 80 MHz──► main FPGA ──► jet word  (25 bit)
 (rx_*)      sync, check,     (and to/from the      jet algorithm   energy word (25 bit)
             playback,        neighbour JEMs,       Et / Ex / Ey
             jet elements     fio_*)                  │
                │  DAQ stream                         │ DAQ + RoI streams
                └───────────────► ROC FPGA ◄──────────┘──► 2 G-link words
 VME ─► VME CPLD ─► control FPGA ─► register bus to ROC, main, input FPGAs
 TTCrx ─────────► control FPGA ─► 8 TTC command lines to all FPGAs
```

Parts that are chips or analog circuits on the real board are outside
`jem_top`, and their signals are ports. These are the LVDS deserialisers, the
TTCrx, the G-link transmitters, the DLL lock lines, the CAN/ELMB monitoring
node, JTAG, the configuration flash and power.

## Clocking

Everything runs on one clock, `clk`, at four times the 40.08 MHz bunch clock.
`clk_phase_gen` counts the 2-bit phase `ph` (0, 90, 180 and 270 degrees). It
produces two enables:

- `ce40 = (ph == 0)`: the bunch-clock edge.
- `ce80 = ~ph[0]`: twice the bunch rate, used by the jet-element links.

On the real board these are DLL outputs. A single fast clock with enables is
equivalent in timing and keeps the design in one clock domain. A "tick" below
means one bunch crossing, i.e. four `clk` cycles.

## Input FPGAs (`input_fpga`, eleven per module)

Each input FPGA serves one phi row. The rows are V, A..H, W and Z: A..H are
the core, and V, W, Z are the overlap rows of the neighbouring quadrants. Each
handles 4 eta bins with an electromagnetic and a hadronic channel per bin,
which makes 8 links. Per channel the data pass through four stages.

1. **Link synchronisation (`lvds_sync`).** The 10-bit deserialiser word
   {9-bit energy, odd parity} arrives at an unknown phase. An input flip-flop
   samples it on every `clk` edge. A first column of flip-flops latches it at
   the phase programmed in CLK_PHASE (00..11 = 0..270 degrees). A second
   column moves it onto the bunch-clock edge. An optional third column
   (DELAY_REG) adds one full tick to line up with other cables. Latency is 1
   tick for sample phases 0 and 1 and 0 ticks for phases 2 and 3, plus 1 with
   the extra delay. /LOCK is latched on the bunch edge and delayed to match
   the data.
2. **Playback (`playback_mem`).** A 256 × 8 × 10-bit memory is loaded through
   one VME port, with the address auto-incrementing channel first. A TTC
   "start playback" command replaces the link data with 256 stored slices,
   right after the synchroniser; "stop playback" ends it early. During
   playback the lock check is bypassed, so a board with no cables can be
   tested.
3. **Checks (`link_monitor`).** The energy is passed only if the parity is
   odd, the link is locked and the channel is not masked. Otherwise it is
   zeroed. Parity errors are counted in 8-bit saturating counters and lock
   losses in 4-bit counters (on the leading edge of /LOCK). Each kind of
   error also sets a sticky flag. A counter is cleared when it is read, and
   all counters and flags can be cleared by pulse bits in CONTROL.
4. **Jet elements (`jet_element_former`).** Per eta bin, em + had gives a
   10-bit element. A 511 in either input saturates it to 1023. An element
   below THRESHOLD is zeroed. FCAL elements are halved, because one
   double-width FCAL cell feeds two elements; a saturated element stays 1023.

Each element leaves on a `je_mux` as two 5-bit words per tick, low half
first. All four elements go to the main FPGA. The two lowest-eta elements go
to the left neighbour JEM and the highest-eta element to the right neighbour.
The 8 synchronised words with their lock bits form the 88-bit DAQ slice of
the FPGA.

## Main FPGA (`main_fpga`)

The main FPGA receives 77 element streams: 44 local, 11 from the left
neighbour (eta 0) and 22 from the right neighbour (eta 5, 6). `je_demux`
rebuilds each element. All five lines of a stream are latched on the same
`clk` edge, the low half at ph 0 and the high half at ph 2. On FCAL modules
each connected FCAL element is copied to its unconnected phi neighbour. One
register on `ce40` then holds the 11 × 7 environment, which feeds two
independent paths.

### Jet algorithm (`jet_algorithm`, `jet_subregion`)

This is the largest block. Elements not above JET_THR are zeroed first. The
algorithm then works in four registered stages.

1. **Cluster sums.** 60 sums of 2 × 2 elements (10 × 6 origins), 45 sums of
   3 × 3 (9 × 5) and 32 sums of 4 × 4 (8 × 4). Each sum is limited to
   10 bits. An overflow sets the sum to 1023 and raises a saturation flag.
2. **Local maxima.** A local maximum is sought among the 32 central 2 × 2
   clusters (origins phi 1..8, eta 1..4). Each is compared with its 8
   neighbours. To make the result unique when two clusters are equal, a
   candidate must be strictly greater than the neighbours at lower eta (or
   the same eta and lower phi), and not smaller than the others. A saturated
   2 × 2 cluster is always a maximum.
3. **RoI per subregion.** The core divides into eight 2 × 2 subregions, and
   each holds at most one local maximum. `jet_subregion` takes that maximum
   and compares it with the eight jet definitions (JET_DEF_k = {cluster size
   2/3/4, 10-bit threshold}). A 2 × 2 or 4 × 4 definition tests the one
   cluster of that size around the maximum. A 3 × 3 definition passes if any
   of the four 3 × 3 clusters that contain the maximum is above the
   threshold. The RoI word is {8 threshold bits, saturation, 2-bit
   position}, and a saturated cluster passes every threshold.
4. **Multiplicities.** For each definition the number of subregions that
   passed is counted and limited to 7 (3 bits).

The jet word is {odd parity, mult7..mult0}. Multiplicities and RoIs appear
4 ticks after the environment register.

### Energy sums (`et_sum`, `miss_et`, `energy_encoder`)

- **Et.** Each of the 32 core elements is zeroed unless it exceeds ET_THR.
  They are added in a 5-stage tree with 12-bit (4095 GeV) saturation. Any
  saturated input element forces 4095.
- **Ex, Ey.** The four elements of each phi row are summed, and the 8 row
  sums are projected with the unsigned 12-bit fractions |cos phi| and
  |sin phi| held in the MULT_x_X/Y registers. As in the hardware, each 12-bit
  row sum is split into two 6-bit halves. Each half is multiplied by the
  fixed coefficient and the two truncated products are added, so the result
  can be 1 LSB below the exact product. Two saturating adder trees give Ex
  and Ey. A saturated input saturates both, even with a zero coefficient.
  The quadrant signs are left to the merger.
- **Encoding.** Only 8 backplane bits are available per quantity. Each 12-bit
  value is compressed with the quad-linear code {2-bit scale, 6-bit
  mantissa}: 0–63 × 1, 64–255 ÷ 4, 256–1023 ÷ 16, 1024–4095 ÷ 64. The energy
  word is {odd parity, Et, Ey, Ex}.

Both result words come from output flip-flops. Counted from the bunch edge at
which the sending multiplexers take an element, the jet word appears after 7
ticks and the energy word after 9.

Two 256 × 25-bit spy memories (`spy_mem`) record the jet and energy words.
They must be armed through CONTROL bit 0 and then start on the TTC
"start spy" command. VME reads them through the J1/J2 and EX/EY/ET ports.
Reading J2_PORT or ET_PORT advances the read address.

## Readout (`readout_sequencer`, `sync_fifo`, `roc_fpga`)

Every FPGA that sends readout data has a readout sequencer:

- **Pipeline.** Each tick the slice enters a 48-tick shift-register pipeline,
  which covers the Level-1 latency.
- **Derandomiser.** While the ROC holds ReadRequest high, the word leaving
  the pipeline is written into a 256-deep FIFO, one word per tick.
- **Serialiser.** The FIFO is sent one bit per tick, MSB first, and each
  slice ends with an odd parity bit. Slices of one event follow each other
  directly. A new event is preceded by at least one idle bit (valid = 0).

The slice formats are as follows.

| source | slice | lanes |
|---|---|---|
| input FPGA | 8 × {lock, 10 data bits} = 88 bits + parity | 1 |
| main FPGA DAQ | {jet word, energy word, 38 zero bits} = 88 + parity | 1 |
| main FPGA RoI | 8 × {RoI, parity} = 96 bits | 2 lanes × 48 |
| ROC bunch-crossing number | 12 bits, first slice repeated | DAQ and RoI |

The ROC waits LATENCY_REG ticks after a Level-1 accept. It then raises
ReadRequest for SLICE_REG ticks (1..5; 0 reads as 1 and values above 5 as 5).
It raises the RoI request for one tick after ROI_REG ticks. The ROC also
keeps the bunch-crossing counter (0..3563, loaded with BC_OFFSET_REG on
BcntRes). The G-link DAQ word carries the input FPGAs on bits 0–10, the main
FPGA on bit 11 and the BC number on bit 12. The RoI word carries the RoI on
bits 0–1 and the BC number on bit 2. DAV is high only while all streams are
valid and the link is enabled.

Readout bandwidth is the binding limit. A 5-slice event takes 5 × 89 = 445
bit times per lane, so the sustained Level-1 rate is at most 40 MHz / 446 ≈
90 kHz at 5 slices and about 449 kHz at 1 slice. The 256-deep FIFO absorbs
bursts of up to 51 five-slice events. A 100 kHz accept rate with 5 slices
therefore does not fit with one serial bit per tick.

## Control path (`vme_cpld`, `control_fpga`)

**VME CPLD.** This is an A24/D16 slave using A23..A1, D15..D0, DS0*, WRITE*
and DTACK*. An access is for this module when A23 = 1, A22..A19 equal the
geographic address and A18 = 0. A17..A14 select the sub-base:

| sub-base | device |
|---|---|
| 0 | CPLD |
| 1 | control FPGA |
| 2 | ROC |
| 3 | main FPGA |
| 4..14 | input FPGAs V, A..H, W, Z |

A6..A1 select the register. DTACK* follows a fixed number of cycles after
DS0* falls, for every access to the module. The CPLD holds the module ID,
configuration mask, FPGA reset and the serial configuration port (CFG_REG
sent MSB first on DIN with a CCLK pulse per bit).

**Control FPGA.** It passes accesses for sub-bases 1..14 on a register bus
with one chip select per device. It turns the TTCrx outputs into eight
command lines, each held for one tick:

| line | command |
|---|---|
| 0 | L1A |
| 1 | BcntRes |
| 2 | start playback |
| 3 | start spy |
| 4 | stop playback |
| 5 | global reset |

TTC_REG (0x10) can pulse any of the lines from software, and CONTROL bit 0
raises the global reset. DLLs are held in reset until the TTCrx is ready.

Register maps (byte addresses):

| device | registers |
|---|---|
| input FPGA | 00 VERSION, 02 CONTROL (clear LL, clear parity, reset playback address), 04 STATUS, 06 THRESHOLD, 08 MASK, 10/12 CLK_PHASE em/had, 14 DELAY, 20 LL_REG1, 22 LL_REG2, 24 PARITY_ERR, 30–3E lock-loss counters, 40–4E parity counters, 50 PLAY_MEM |
| main FPGA | 00 VERSION, 02 CONTROL (arm spy, reset spy address), 04 STATUS, 10 ET_THR, 12 JET_THR, 20–2E JET_DEF_0..7, 50–6E MULT_A_X .. MULT_H_Y, 70 EX, 72 EY, 74 ET, 76 J1, 78 J2 spy ports |
| ROC | 00 VERSION, 02 CONTROL, 04 GLINK_STATUS, 10 LATENCY, 12 SLICE, 14 ROI, 16 BC_OFFSET, 18 GLINK_CONTROL |
| control FPGA | 00 VERSION, 02 CONTROL, 04 STATUS, 10 TTC_REG, 20 TTCrx |
| CPLD | 00/02 MOD_ID, 04 VERSION, 06 STATUS, 10 CFG_MASK, 12 FPGA_RESET, 14 CFG_REG |

## Timing summary

| path | latency |
|---|---|
| link input → synchronised word | 0–1 tick (+1 with DELAY) |
| link input → jet element on the mux | 6 ticks |
| element link (mux → demux) | 1 tick |
| mux input → jet word / energy word | 7 / 9 ticks |
| link input → energy word at `jem_top` | 13 ticks |
| Level-1 accept → ReadRequest | LATENCY_REG + 1 ticks |
| readout pipeline | 48 ticks |

## Departures from the original board and choices made

- **Register bus.** The VME path from the control FPGA to the processors is a
  point-to-point register bus with chip selects. The original is an 11-bit
  ring through the input FPGAs, whose protocol is not specified.
- **Parallel arithmetic.** All arithmetic is parallel on de-multiplexed
  elements. The original jet algorithm works mostly in serial arithmetic on
  the 5-bit multiplexed data, to save logic and latency. The latencies above
  are those of this design.
- **Multipliers.** The missing-energy multipliers multiply by the coefficient
  registers. The baseline hardware builds its fixed-coefficient multipliers
  from block-memory lookup tables. The split into 6-bit halves and the
  resulting accuracy are the same.
- **One wide FIFO.** Each readout sequencer uses one FIFO as wide as its
  slice instead of several block-RAM FIFOs in parallel.
- **Formats chosen here.** The following are not specified and were chosen
  for this design:
  - readout bit order and DAQ slice layout
  - G-link bit map and the DAV rule
  - energy-word field order and jet-word order
  - TTC line coding
  - FCAL pairing (even phi rows copy the row below) and which eta column is
    "outermost"
  - local-maximum tie break, 10-bit cluster range and JET_THR address
- **Playback.** The lock check is bypassed during playback.
- **Phase registers.** They are writable, because phase selection is
  described as controlled by VME.
- **Not built** (chips or analog): LVDS deserialisers, TTCrx, G-link
  transmitters, DLLs and clock buffers, CAN/ELMB node, JTAG chain,
  configuration flash, power and signal integrity. Their signals are ports
  of `jem_top`.

## How far it can be trusted

**Verified.** Every module compiles in Verilator and synthesizes in Yosys.
Each has a self-checking testbench against an independent behavioural
model. Each testbench has also been run against a deliberately broken copy
of its module, with one realistic bug such as:

- an even-parity check
- swapped element halves
- a missing FCAL rule
- a missing multiplicity cap

Every testbench detects its bug.

**Not verified.** None of this has been run in hardware. Timing closure at
160 MHz in a particular FPGA family has not been checked.

**Treat as provisional.** The formats listed as choices above are not known
to match any real downstream module (merger, ROD, RoI builder), so check
them against that module before connecting it.

## Simulation

Each testbench is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing -Irtl rtl/jem_pkg.sv rtl/*.sv tb/tb_jem_top.sv --top-module tb_jem_top
./obj_dir/Vtb_jem_top
```

| testbench | covers |
|---|---|
| tb_clk_phase_gen | phase counter and enables |
| tb_lvds_sync | all four sample phases, extra delay, /LOCK alignment |
| tb_link_monitor | parity, lock, mask, counters and their clears |
| tb_playback_mem | loading, playback, stop, address reset |
| tb_jet_element_former | sum, saturation, threshold, FCAL halving against a model |
| tb_je_link | `je_mux` into `je_demux`, random elements |
| tb_readout_sequencer | 88-bit/1-lane and 96-bit/2-lane sequencers, parity, separators, first-slice hold |
| tb_et_sum, tb_miss_et, tb_energy_encoder | energy path against models (encoder exhaustively) |
| tb_spy_mem | arm, capture, read ports |
| tb_jet_algorithm | clusters, maxima, RoIs, multiplicity cap against a model |
| tb_input_fpga, tb_main_fpga, tb_roc_fpga, tb_control_fpga, tb_vme_cpld | each FPGA through its registers |
| tb_jem_top | whole module at full size, driven only through VME, TTC and the links |

`tb_jem_top` runs the full-size module at its default parameters. It counts
each mechanism and fails if one never happened:

- VME access and playback of all 11 memories
- the energy sums and saturation
- parity errors and loss of lock
- jets and the spy memories
- Level-1 accepts and multi-slice readout of the 13 DAQ streams and the RoI
  stream
- BcntRes, FCAL operation and the global reset
