# Phase Aligner: a four-leg, dual-clock FIFO array for a synthetic-aperture radiometer

A thinned-array radiometer places its antenna elements along the four legs of
a cross. The front-end modules along each leg sample at the same instant and
send their samples to a central correlator over one data bus per leg. The
samples travel different distances, so the same sample time reaches the
centre at different moments from different legs. The correlator must only
ever multiply samples taken at the same instant.

The **Phase Aligner** sits between the four data buses and the correlator.
It buffers the early legs until the late ones catch up. When every leg holds
the same sample time, it raises `data_ready`. The correlator then reads all
four legs with one clock edge.

The aligner is built from 32 identical **4 x 20 dual-clock FIFOs**. Each FIFO
stores on the rising edge of its input clock and retrieves on the rising edge
of its output clock. It has FULL and EMPTY flags, and it contains no clock
gating. Most of what follows is about that FIFO: two register files, two
Gray-code address counters, and a pair of flag equations.

## Array organisation (`phase_aligner`)

| quantity | full deployment (default) | reduced deployment |
|---|---|---|
| legs (`LEGS`) | 4 | 4 |
| input bits per leg | 160 | 80 |
| FIFOs per leg (`FIFOS_PER_LEG`) | 8 | 4 |
| FIFOs in total | 32 | 16 |
| word width (`WIDTH`) | 20 | 20 |
| depth | 4 | 4 |

Each leg carries 160 bits because the bus uses 40-bit serial link chips, and
one chip serves ten front-end modules. Each module sends 2-bit in-phase and
quadrature samples, so a leg of about 36 modules needs four chips.

Clocks:

- The FIFOs of leg `l` share that leg's store clock, `leg_clk[l]`. Its rising
  edge samples `leg_data[l]`.
- All FIFOs of all legs share one retrieval clock, `cpu_clk`. Its rising edge
  puts the oldest sample of every leg on `cpu_data`. The data stays there
  until the next edge.

Flags:

- `leg_full[l]` is the OR of the FULL flags of leg `l`'s FIFOs. That leg's bus
  must not clock while the flag is high.
- `leg_empty[l]` is the OR of the leg's EMPTY flags.
- `data_ready` is high when no FIFO is empty, meaning that the oldest sample
  time has arrived on every leg. The correlator must clock `cpu_clk` only
  while `data_ready` is high.

A leg's FIFOs see the same clocks, so they move in lock step. The ORs are
there only to give one clean flag per leg.

### Why depth 4

A leg is 5 m long, and the design assumes a worst-case propagation of
5 ns/m. The worst-case skew between legs is therefore 25 ns.

- At the intended 25 MHz clock, 25 ns is 0.63 of a 40 ns period, so a depth of
  one word would do.
- Four words allow the same array to run at up to 4 / 25 ns = 160 MHz, where
  the skew is four clock periods.

## Inside one FIFO (`pa_fifo`)

```
 FIFO_IN --20--> Input Register File --80--> Output Register File --80--> Output Mux --20--> FIFO_OUT
                  (INCLK, Sel from IADDR)      (OUTCLK, Sel from OADDR)      (OR array)
 INCLK  --> IADDR (3-bit Gray) --> Enable Logic --4--> Sel (input file)
 OUTCLK --> OADDR (3-bit Gray) --> Enable Logic --4--> Sel (output file)
 IADDR, OADDR --> Flag Logic --> FULL, EMPTY
```

### Two register files instead of one RAM

The **Input Register File** (`pa_input_regfile`) holds four 20-bit registers
on INCLK. On each edge, only the register whose one-hot `Sel` line is high
loads `FIFO_IN`. All 80 stored bits are wired to the output side.

The **Output Register File** (`pa_output_regfile`) holds four registers on
OUTCLK. On each edge, the selected register copies the same-numbered input
register, and every other output register loads **zero**. Only the word just
retrieved is therefore non-zero. This lets the **Output Mux**
(`pa_output_mux`) be a plain OR of the four registers, with no select lines:
twenty 4-input OR gates.

Neither clock is ever gated. Each file has exactly one clock, and the one-hot
selects act as load enables.

### Gray-code addresses with a lap bit

IADDR and OADDR (`pa_addr_counter`) are 3-bit counters. They count through
eight states even though the FIFO has only four registers. The extra bit
records the lap, so that "four words stored" and "nothing stored" look
different. The counting order, with the bits written Q0 Q1 Q2 (`q[0]`,
`q[1]`, `q[2]`), is:

| step | Q0 Q1 Q2 | register selected |
|---|---|---|
| 0 | 000 | 0 |
| 1 | 100 | 1 |
| 2 | 110 | 2 |
| 3 | 010 | 3 |
| 4 | 011 | 0 |
| 5 | 111 | 1 |
| 6 | 101 | 2 |
| 7 | 001 | 3 |

Read as `q[2:0]`, this is the ordinary reflected Gray code with `q[2]` as the
most significant bit. Only one bit changes per step, so the flag logic, which
compares addresses from both clock domains, never sees a false intermediate
count.

The **Enable Logic** (`pa_enable_logic`) turns an address into a one-hot
select. It converts Gray to binary (`b1 = q2^q1`, `b0 = q2^q1^q0`) and
decodes `{b1,b0}`, so step k selects register k mod 4. The rule "k mod 4" is
this design's own choice. It is, however, the only assignment under which the
flag equations below mean "four stored".

### Flag equations

With `d = IADDR ^ OADDR`:

```
EMPTY = ~d0 & ~d1 & ~d2      addresses equal                 -> nothing stored
FULL  = ~d0 &  d1 &  d2      input address four steps ahead  -> four words stored
```

In the table above, two states four steps apart always agree in Q0 and differ
in Q1 and Q2. These two product terms are therefore all the logic the flags
need.

Both flags are combinational. FULL rises right after the fourth unread INCLK
edge and falls right after the next OUTCLK edge. EMPTY behaves in the same
way with the clock roles swapped. The FIFO does not block a store when full,
nor a retrieval when empty. Two assertions in `pa_fifo` report such a misuse.

### Timing summary

| event | effect |
|---|---|
| rising INCLK | stores `FIFO_IN` and advances IADDR. EMPTY falls, and FULL rises on the fourth unread word. |
| rising OUTCLK | drives the oldest word onto `FIFO_OUT`, where it stays until the next OUTCLK edge, and advances OADDR. FULL falls, and EMPTY rises if nothing is left. |
| reset (`rst_n` low) | both addresses go to 000 and all registers to 0. The FIFO is EMPTY and `FIFO_OUT` = 0. |

The original prototype was a small FPGA running at up to 25 MHz, with a 40 ns
clock period. The RTL itself has no delays.

## Departures and own choices

- **Reset.** The prototype has no reset pin: its 44 I/O pins are the 40 data
  lines, the two clocks and the two flags. It relies on the FPGA clearing
  every flip-flop at configuration. This RTL adds an asynchronous, active-low
  `rst_n` that produces the same all-zero, empty state.
- **Flag definition.** The prose describes FULL as "four INCLK edges without
  an intervening OUTCLK edge" and EMPTY in the mirror form. The RTL implements
  the address-comparison equations instead. Under them, EMPTY is high whenever
  nothing is stored, and FULL whenever four words are stored. This is what a
  FIFO needs, and the loose wording describes only the simplest sequences.
- **Output register clearing.** The specification says that only the
  selected output register responds and that the others read zero. Here the
  unselected registers load zero on the same OUTCLK edge.
- **Gray-to-one-hot mapping.** The specification calls the decoder
  straightforward without giving it. The mapping used is step k to register
  k mod 4.
- **Array level.** Each leg has one store clock and its own `leg_full`.
  `data_ready` is computed as "no FIFO empty". The specification gives the
  FIFO count, the single retrieval clock and the rule that the correlator is
  told only when every leg has delivered. The clocking granularity on the bus
  side and the flag-combining gates are this design's choices.
- **Not modelled.** The following parts are outside the aligner or have no
  logic function:
  - the correlator;
  - the serial link chips;
  - the front-end digitisers;
  - the system clock;
  - the Walsh function generator;
  - the FPGA's pad and clock buffers.
  Their connections to the aligner are the top-level ports.
- **Clock-domain crossing.** This follows the original: the flags compare
  Gray addresses across domains with no synchronisers. That is sound when,
  as in the instrument, every clock comes from one system clock, and each
  clock edge leaves time for the flags to settle before the other side
  samples them. With truly unrelated clocks, add two-flop synchronisers on
  the Gray addresses before the flag logic. Doing so would delay both flags
  by two cycles of the reading clock.

## Files

| file | contents |
|---|---|
| `rtl/pa_pkg.sv` | `WIDTH` = 20, `DEPTH` = 4, `ADDR_W` = 3, and the address and select types |
| `rtl/pa_addr_counter.sv` | IADDR / OADDR Gray counter |
| `rtl/pa_enable_logic.sv` | Gray to one-hot Sel decoder |
| `rtl/pa_input_regfile.sv` | Input Register File (INCLK) |
| `rtl/pa_output_regfile.sv` | Output Register File (OUTCLK, unselected registers cleared) |
| `rtl/pa_output_mux.sv` | OR-array output mux |
| `rtl/pa_flag_logic.sv` | FULL / EMPTY equations |
| `rtl/pa_fifo.sv` | one 4 x 20 FIFO, with usage assertions |
| `rtl/phase_aligner.sv` | top: LEGS x FIFOS_PER_LEG FIFOs and the array flags |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_phase_aligner_reduced.sv` | the top test at the reduced size (`FIFOS_PER_LEG` = 4) |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Each
has a watchdog timer. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/pa_pkg.sv rtl/pa_addr_counter.sv rtl/pa_enable_logic.sv rtl/pa_input_regfile.sv \
  rtl/pa_output_regfile.sv rtl/pa_output_mux.sv rtl/pa_flag_logic.sv rtl/pa_fifo.sv \
  rtl/phase_aligner.sv tb/tb_phase_aligner.sv --top-module tb_phase_aligner
./obj_dir/Vtb_phase_aligner
```

To run another test, swap the last file and the top-module name. Lint with
`verilator --lint-only -Wall` on the same file list, with `--top-module`
naming a module in `rtl/`. The only warnings are the following:

- an unused package constant in the smallest modules;
- `SYNCASYNCNET` on `rst_n`, which is used both by the asynchronous reset and
  by the `disable iff` of the assertions.

### What the tests check

- **Address counter.** Three laps against the Gray code of a binary count,
  with exactly one bit changing per step, and a reset in mid-count.
- **Enable logic.** All eight states select register k mod 4, one-hot.
- **Flag logic.** All 64 address pairs: EMPTY exactly when the positions are
  equal, FULL exactly when the input leads by four.
- **Register files and mux.** Random selects and data against a reference
  array. This includes the clearing of unselected output registers and the
  OR behaviour of the mux.
- **FIFO.** A directed part and a random part, both at 25 MHz.
  - Directed: reset state, FULL after exactly four stores, in-order retrieval
    with `FIFO_OUT` valid 1 ns after OUTCLK, EMPTY after four retrievals.
  - Random: 3000 periods with stores and retrievals in the same period, FULL
    and EMPTY checked against a queue model, and a check that both flags are
    reached many times.
- **Phase aligner.** 3000 samples through all 32 FIFOs, at full and at
  reduced size.
  - The legs store at different phases of a 25 MHz period, 2 to 27 ns after
    the system edge, start up to three samples apart, and pause at random and in long
    common gaps that drain the aligner.
  - The correlator reads only on `data_ready` and stalls for stretches.
  - Every retrieved word must carry the same sample number on all FIFOs, in
    sequence. Every flag is checked each period against counts of samples
    sent and retrieved.
  - The test counts these events, and each must occur:
    - a leg FULL stalling its bus;
    - the correlator waiting for a late leg;
    - the correlator stalling with data ready;
    - the whole aligner empty.
