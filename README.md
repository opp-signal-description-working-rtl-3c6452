# OPP core-side logic: cell timing, SE receive, time stamp and IPP output

The Output Port Processor (OPP) is the chip at the output of a gigabit ATM
switch fabric. On one side it sees the switch core: a 32-bit word every core
clock, delivered as four 8-bit slices by the four bit-sliced switch elements
(SE). On the other side it drives an ATM link port on the link's own clock,
and it also sends cells back to the Input Port Processor (IPP) over a 32-bit
recycle path.

Everything in the core runs in lock-step cell times. A cell is 16 words, one
word per CLK, and a global CELL_CLK pulse marks one CLK in sixteen. The
logic here is built around that rhythm:

* it works out where each CLK edge falls in the cell time;
* it uses that to find word 0 of each incoming cell, with a programmable delay
  (C_CLK_TAP);
* it samples the slow global controls (RESET, CLR_ERR, TIME_SYNC) at one fixed
  edge per cell;
* it keeps a switch-wide time stamp in step through a one-bit-per-cell serial
  protocol;
* it frames the words sent to the IPP.

This RTL covers the core-clock side of the chip. The cell store and queueing
logic, and the link transmitter, are not included (see "What is not here").

## Block structure

```
            CELL_CLK, C_CLK_TAP
                   |
             opp_cell_timing ---- phase ---------------------------+
               |         |                                          |
           rx word no.  sample strobe                               |
               |         |                                          |
D0..3_SE,  opp_se_rx   opp_ctrl_sampler <- RESET, CLR_ERR,          |
CTRL,PARI ---->|         |   |   |          TIME_SYNC               |
               |        rst clr ts_bit/ts_valid --> opp_timestamp   |
            rx_word      |   |                        -> time_stamp |
          (to cell store)|   v                                      v
               |  perr -> opp_err_flags -> opp_test_out -> TEST_IPP |
               |                                        rc_data -> opp_ipp_tx
               |                                                 -> D_OPP, SOC_OPP,
               |                                                    PARI_OPP, CLK_OPP
```

| Module | Role |
|---|---|
| `opp_pkg` | Cell and word sizes, the `rx_word_t` struct, the odd-parity function |
| `opp_cell_timing` | Phase counter, received word number, sampling strobe |
| `opp_ctrl_sampler` | Once-per-cell capture of RESET, CLR_ERR, TIME_SYNC; drives RESET_OPP |
| `opp_se_rx` | Input register for the four SE slices, per-slice parity check |
| `opp_err_flags` | Sticky parity error flags |
| `opp_test_out` | Holds the test outputs low unless TEST_EN is high |
| `opp_timestamp` | 33-bit sync shift register and 32-bit time stamp counter |
| `opp_ipp_tx` | Output register of the recycle path to the IPP |
| `opp_top` | Wires the above together |

## Cell timing and C_CLK_TAP

This is the part that takes the most care.

`opp_cell_timing` has a 4-bit counter that is loaded with 1 at every CLK edge
that sees CELL_CLK high, and counts up otherwise. From it comes `phase`: 0 at
the edge that sees CELL_CLK high, then 1 to 15 at the edges that follow. The
counter has no reset, on purpose: the chip reset is itself sampled with a
strobe made from this counter. Every CELL_CLK pulse realigns the counter, so
it is right from the first pulse on. If CELL_CLK comes early or late, the
counter simply realigns to it.

The SE data is not always aligned to CELL_CLK. With C_CLK_TAP = 0000, word 0
of a cell is at the input pins during the clock period in which CELL_CLK is
high. Each step of the tap delays the cell by one more CLK. So the word
sampled at an edge is number

    rx_word = (phase - C_CLK_TAP) mod 16

That number is registered together with the data in `opp_se_rx`. A received
word therefore carries its own position (`rx_word.word`) and a
start-of-cell mark (`rx_word.soc`). The tap is meant to be set with jumpers,
and held steady while RESET is applied.

The tap was meant to cover a cell delay through the SEs that is not a whole
number of clocks. With SEs whose delay is exactly one cell time, the tap is
left at zero.

## Once-per-cell control inputs

RESET (asserted low), CLR_ERR and TIME_SYNC need to meet setup and hold at
only one edge per cell time: two CLK edges before the edge that sees CELL_CLK
high (`phase == 14`). C_CLK_TAP has no effect on this. `opp_ctrl_sampler`
captures the three inputs there and holds them for the rest of the cell time.
This has two consequences:

* The internal reset (`core_rst`) and the internal clear change only at
  phase 15. So hold RESET or CLR_ERR for at least one full cell time. The
  recommended length is 160 CLK (ten cell times).
* Until the first sampling edge after power-up, the held values are
  arbitrary. Keep RESET asserted from power-up.

RESET_OPP, the reset passed on to the link side, is the held reset, asserted
low. It changes on CLK and is not synchronised to the link clock. Whoever
receives it must synchronise it.

## SE receive and parity

Each SE slice delivers 8 data bits, one CTRL bit and one parity bit per CLK.
Slice *s* lands on word bits 8*s*+7..8*s* and on CTRL bit *s*. Parity is odd:
the 10 bits D<7..0>, CTRL and PARI of a slice must hold an odd number of ones.
A failing slice sets `rx_word.perr[s]` for that word, and its sticky flag in
`opp_err_flags`. The flags stay set until reset or CLR_ERR. CLR_ERR clears them
without disturbing anything else in the chip.

In front of this register the real chip has analog clock-to-data deskew
circuits. They can move the data by about two clock periods, in two groups of
five input signals per slice. They are not modelled: the RTL assumes
the data meets setup and hold at the register.

## Time stamp resynchronisation

Every port processor keeps a 32-bit time stamp. When a board is hot-swapped,
its time stamp must be brought into step with the rest of the switch. A master
sends this stream on TIME_SYNC, one bit per cell time:

* a start bit `1`;
* the 32-bit time stamp, most significant bit first;
* at least 32 zero bits before the next start bit.

`opp_timestamp` shifts the sampled bits into a 33-bit register. When bit 32
(the start bit) reaches the top, the lower 32 bits are loaded into the time
stamp on the next CLK, and the shift register is cleared.

If the chip leaves reset in the middle of a sequence, a `1` inside the value
can act as a false start bit and load a wrong value. The 32-bit zero gap makes
sure that this false start cannot swallow the next real start bit.

The worst case is this: the chip just misses a start bit, and the value sent
is 0x00000001. Then 32 bits go by until the false start, 32 more until it is
flushed out, and 33 more carry a correct value. That is 97 cell times. The
testbench runs exactly this case.

Between loads the time stamp counts up once per cell time. The loaded value
is taken as sent, without adding the 33 cell times the transfer took.

## Recycle path to the IPP

`opp_ipp_tx` sends one 32-bit word per CLK on D_OPP.

* PARI_OPP is the odd parity bit of that word.
* SOC_OPP is high with word 0 of every cell, once per cell time.
* The register loads word number `phase`. So word 0 goes out at the edge that
  sees CELL_CLK high, and is on D_OPP during the next CLK period.
* The word itself comes from outside the top. `tx_word` (equal to `phase`)
  says which word is wanted, and `rc_data` must supply it in the same cycle.
* CLK_OPP is the inverted CLK, so that its rising edge falls mid-word.
* During reset D_OPP is zero, SOC_OPP is low and PARI_OPP is one.

## Test outputs

The test output pins were left undefined by the chip's designers. Here
TEST_IPP<3:0> carries the four parity error flags. The outputs are forced low
while TEST_EN is low, as the chip requires of all its test outputs.

## Where this RTL follows the chip and where it chooses

These points follow the chip's signal description: the 16-word cell and
CELL_CLK form; the C_CLK_TAP meaning; the sampling edge of RESET, CLR_ERR and
TIME_SYNC; odd parity on the SE slices and on D_OPP; SOC_OPP with word 0;
the TIME_SYNC protocol with its 33-bit shift register; the TEST_EN rule;
CLR_ERR clearing a subset of what RESET clears.

These are this design's own choices:

* **Parity field.** The SE parity covers the nine bits a slice carries
  (8 data bits plus CTRL). The chip description also mentions a "twelve-bit"
  field, which does not match the slice widths.
* **Mapping and polarity.**
  * Slice-to-bit mapping.
  * CLR_ERR is active high.
  * RESET_OPP is active low and taken from the sampled reset.
* **Timing.**
  * One register stage on the receive path.
  * The one-CLK offset of the IPP output.
  * The form of CLK_OPP.
* **Time stamp.**
  * It counts once per cell time.
  * It loads the received value without correction.
  * Reset clears both time stamp registers.
* **Test outputs.** Which flags exist, and which signals appear on TEST_IPP.

## What is not here

* **Cell store, queues and resequencing.** What the OPP does with a received
  cell is not part of this description. The pad list names outputs such as
  resequencer empty/overflow and queue occupancy, but gives no behaviour. The
  top therefore brings out the received word stream (`rx_word`) and takes the
  recycle words in (`rc_data`, `tx_word`).
* **Link interface.** This is the UTOPIA-style link port, on its own clock
  CLK_LINK: 16/32-bit width select, SOC/DAV per half, TCA handshakes,
  unassigned cells when idle, and PAD_ZERO header padding. It is specified
  elsewhere. None of its pins are on `opp_top` except RESET_OPP.
* **Input deskew circuits, memory BIST, pads, power and package.** These are
  either analog, not described, or physical only.

## Simulating

Every testbench in `tb/` checks itself and prints
`TB_RESULT checks=N failures=M`. `tb_opp_top` runs the whole top at its
default sizes. It covers:

* reset;
* all four example tap settings (0, 1, 5, 15);
* parity errors, including how TEST_EN gates them onto TEST_IPP;
* CLR_ERR;
* a TIME_SYNC load followed by counting;
* a second reset.

It checks every received and sent word cycle by cycle. It also counts each of
these mechanisms, and counts a failure for any that never happened.

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
  +libext+.sv --top-module tb_opp_top rtl/opp_pkg.sv tb/tb_opp_top.sv
./obj_dir/Vtb_opp_top
```

Replace `tb_opp_top` with `tb_opp_cell_timing`, `tb_opp_ctrl_sampler`,
`tb_opp_se_rx`, `tb_opp_err_flags`, `tb_opp_timestamp`, `tb_opp_ipp_tx` or
`tb_opp_test_out` to test a single block. The package must come first on the
command line. Each run takes well under a second.

## Changing it

* Cell length and sampling lead are parameters of `opp_cell_timing`
  (`WORDS`, `LEAD`). Their defaults come from `opp_pkg`.
* The time stamp width is `TS_W` in `opp_timestamp`, and `TS_BITS` in the top.
* The slice count and width live in `opp_pkg`. `opp_pkg::odd_parity32` and
  the IPP output assume a 32-bit word.
