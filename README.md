# Signature analysis system for a microprocessor-driven test bench

Signature analysis finds faulty parts on a clocked digital board without a
detailed understanding of the board. It compares short codes instead of
waveforms. The circuit under test (CUT) gets the same stimulus every time. A
probe touches one node. While a window set by the CUT's own start and stop
signals is open, the logic level at that node is shifted on every CUT clock
into a 16-bit linear feedback shift register. The register's residue when the
window closes is the node's *signature*, shown as four characters. A node on a
good board always gives the same signature. A different signature on a suspect
board points at the fault, and the troubleshooter follows the failing
signatures back to the part that causes them.

This RTL builds the whole closed loop on one clock:

* a test sequencer that acts as the host computer's programs;
* a parallel interface adapter (PIA) that sends the stimulus to the CUT and
  reads its response back;
* an address decoder for the interface slots;
* an SS-50 to S-100 bus converter;
* the signature module (start/stop control, signature register, display);
* the circuit under test itself, a UART parallel/serial converter built to be
  signature-analysable.

The sequencer learns the good signature of each node, then compares later runs
with it and flags the nodes that differ.

## The signature register

The register is 16 bits wide. It shifts left, and the probe bit enters at
position 1 (bit 0). The feedback is the XOR of positions 7, 9, 12 and 16, so
the characteristic polynomial is x^16 + x^12 + x^9 + x^7 + 1. These taps give a
maximum-length sequence. On every shift:

    new bit 0 = probe ^ r[6] ^ r[8] ^ r[11] ^ r[15]

`sig_register` is written with `WIDTH` and `TAPS` parameters. The default tap
mask 16'h8940 has bit i set for position i+1. The 4-bit, x^4 + x + 1 register
often used to introduce the idea is the same module with `WIDTH=4` and
`TAPS=4'b1001`.

A signature is four 4-bit digits. Each digit is shown from the set
`0123456789ACFHPU`, not ordinary hex, because every character of this set can
be drawn clearly on a 7-segment digit:

| nibble | A | B | C | D | E | F |
|--------|---|---|---|---|---|---|
| shown  | A | C | F | H | P | U |

Two reference points, both checked by the testbenches:

* From a cleared register, the 20-bit stream `11111100000111111111` (first bit
  first) leaves 16'hD953, shown `H953`.
* A node held high through a 20-clock window gives 16'hE733, shown `P733`. A
  grounded node gives `0000`.

### The window

The start and stop signals qualify the clock. This design fixes the edge
cases as follows:

* The bit at the CUT clock edge that sees the start transition is the first
  bit shifted.
* The bit at the edge that sees the stop transition is not shifted.
* After the stop, the register is frozen, and its value is copied to the
  display register one system clock later.

Each of the clock, start and stop lines has its own polarity bit. The
sequencer uses a rising clock, a rising start and a falling stop.

## How a run goes

```
             +---------------- test sequencer (diag_controller) -------------+
             |  6800-style bus: addr, rw, vma, wdata, rdata                   |
             +-----+--------------------------------------------+------------+
                   |                                            |
           io_decoder ($8000, 8 slots x 4)             bus_conv (SS-50 -> S-100)
                   | slot 6 = $8018..$801B                      | $C000..$C007
                pia6820                                  signature_module
        port B -> stimulus, CB2 -> strobe         start/stop ctrl, sig_register,
        port A <- received word, CA1 <- strobe            sig_display
                   |                                   ^    ^    ^    ^
                   v                                   |    |    |    |
                cut_board (UART, baud generator, ---> clock start stop probe
                 start/stop gates, 16 probe nodes)           nodes[probe_sel]
```

One run of the sequencer follows this order:

1. **Initialise.** Hold the signature module in reset. Set the edge
   polarities. Unblank the display. Set up the PIA: side B all outputs, side A
   all inputs.
2. **Arm.** Set *enable* and give *go* a 0→1 edge. Poll the status register
   until the module reports *ready*.
3. **Pattern.** Write the start code 8'h80 (bit 8 alone) to port B, then the
   count 8'h01, 8'h02 … 8'hFF, 8'h00. That is 257 words, one every `PAT_HOLD`
   clocks. The CUT takes bit 8 as its start signal. The all-ones word 8'hFF is
   the end-of-pattern code, and the CUT's 8-input NAND turns it into the stop
   signal.
4. **Settle and halt.** Wait `DELAY_CYC` clocks. Read whether the CUT's stop
   closed the window. Give *halt* a 0→1 edge, which closes the window only if
   the stop never came. Poll until the module reports *idle*.
5. **Collect.** Read both signature bytes and the PIA port A word. Then either
   store the signature as the good one for probe position `probe_sel`
   (`learn=1`), or compare it with the stored one (`learn=0`). A mismatch sets
   `fail` and that node's bit in `fault_map`.

A run takes about 6,000 system clocks with the default parameters.

## Signature module registers

The module has eight byte registers, at `BASE` = $C000 in the top:

| offset | name    | access | contents                                              |
|--------|---------|--------|-------------------------------------------------------|
| 0      | SIG_L   | R/W    | signature bits 15..8 (left two characters)            |
| 1      | SIG_R   | R/W    | signature bits 7..0                                   |
| 2      | DCTL    | R/W    | bit 4 blank, bits 3..0 decimal points                 |
| 3      | MCTL    | R/W    | see below; reset value 8'h06                          |
| 4, 5   | DISP_L/R| R/W    | display register; loaded from the signature on stop   |
| 7      | STATUS  | R      | bit 0 done, bit 5 window open, bit 6 idle, bit 7 ready |

A write to SIG_L or SIG_R presets that half of the signature register. An
arm clears the register, so a preset has to be written between the arm and
the start.

MCTL bits:

| bit | name    | effect                                   |
|-----|---------|------------------------------------------|
| 0   | reset   | holds the module in reset                |
| 1   | go      | a 0→1 write arms the module              |
| 2   | halt    | a 0→1 write closes the window            |
| 3   | enable  | the module accepts CUT clocks            |
| 4   | clk_neg | 1 selects the falling clock edge         |
| 5   | sta_neg | 1 selects the falling start edge         |
| 6   | sto_neg | 1 selects the falling stop edge          |

MCTL bit 7 and DCTL bits 7..5 are stored and read back but drive nothing.
The control software for such a module sets them ("wait state", "control
word on", a decimal-mode flag) without saying what they do.

The register order and the bit masks match the usual control software for
such a module. What each bit does in hardware is this design's own
definition.

## Clocking

Everything runs on one system clock `clk`. The CUT's clock, start, stop and
probe lines reach the signature module through two synchroniser flip-flops
and a third stage for edge detection. The data bit of an active clock edge is
the probe value sampled together with that edge. Start and stop transitions
are held until the next active CUT clock edge, so a start or stop pulse
shorter than a CUT clock is not lost.

The system clock must therefore run at least four times faster than the CUT
clock. The default baud divider (`BAUD_DIV = 52`) gives a ratio of 52.

## Diagnostic interface

* **pia6820** is a synchronous model of the MC6820 PIA. It has data-direction
  and output registers selected by control-register bit 2, CA1/CB1 edge flags
  with interrupt enables, and CA2/CB2 as inputs, fixed outputs or handshake
  outputs.
  * CA2 goes low after a read of port A. CB2 goes low after a write of port B.
  * With control bit 3 set, the line goes low for one clock (pulse mode).
    Otherwise the active C1 edge restores it.
  * The interrupt flags are cleared by reading the control register.
  * A port read returns the output register for output bits and the pin level
    for input bits.
* **io_decoder** divides $8000–$801F into eight 4-byte slots and drives
  `rs` from A1..A0. The PIA sits in slot 6. The slots leave room for seven
  more interfaces.

## SS-50 to S-100 bus converter

The signature module is an S-100 card and the host bus is SS-50. `bus_conv`
is the conversion card as gates:

* The address passes straight through.
* The data is inverted both ways, because SS-50 data is active low here.
* `PWR*` = NAND(R/W inverted, φ2, VMA) and `PDBIN*` = NAND(VMA, φ2, R/W).
  VMA and φ2 are active low at the card's inputs.
* `SMEMR*` is the buffered VMA line.
* *Modified R/W*, which turns the data buffers toward the host, is high only
  for a valid read with A15 = A14 = 1 and A13 = 0, i.e. in $C000–$DFFF.
* `SINP` and `SOUT` are tied low.

The top drives the converter with SS-50 polarities, and the signature module
decodes its own eight addresses inside that window.

## Circuit under test

`cut_board` is a UART (`uart_ay51013`, an AY-5-1013-style part) with a baud
generator and three small gates. It supplies the analyser with these signals:

* **clock:** the baud generator output. The same clock drives the UART at 16
  clocks per bit.
* **start:** parallel input bit 8. In the 7-bit character format bit 8 is the
  parity position and carries no data, so the host can use it alone as a
  start code.
* **stop:** an 8-input NAND of the parallel inputs. It falls on the all-ones
  end-of-pattern word.

The format pins are strapped for 7 data bits, 1 stop bit and no parity. The
even-parity select pin is also strapped high, but has no effect while parity
is off.

Two XOR gates with pull-up switches set the polarity of the data strobe into
the UART and of the data-available strobe out of it. A third XOR gate returns
a delayed data-available to the UART's reset input, so each received word
clears its own flag after `RDAV_DELAY` clocks.

The board brings 16 probe points out on `nodes`; the index names are in
`sa_pkg`. They are:

* the eight input bits;
* serial out, stop, strobe, buffer-empty, end-of-character and strobe out;
* a pulled-up pin and a grounded pin.

In the testbench the serial output is looped back to the serial input, so the
receiver runs as well.

### Unstable nodes

A node whose level changes close to the CUT clock edge can give a different
signature from run to run. Such nodes are normally marked unstable and left
out of comparisons. The sequencer reduces this by starting every pattern on a
rising CUT clock edge. Even so, the serial-output and end-of-character nodes
can still differ between fault-free runs, because the UART's internal bit
phase is not reset between runs. The end-to-end testbench relearns a node that
fails a fault-free compare and reports it as unstable.

## Where this design departs from the source description

* **CB2 strobe.** The reference software writes 8'h3E to the PIA B control
  register, which holds CB2 at a constant level. Here 8'h2E is used (the
  `CRB_RUN` parameter), so that CB2 pulses after every pattern write and
  strobes each word into the UART.
* **Clock alignment.** The first pattern write waits for a rising CUT clock
  edge. The source has no such alignment. Without it, a stable node's
  signature could change from run to run.
* **Synchronous sampling.** The source analyser is clocked directly by the
  CUT. Here the CUT lines are oversampled by the system clock (see Clocking).
* **Host in hardware.** The 6800 processor, its memory, terminal, teletype
  and disk are not built. `diag_controller` performs the same bus cycles the
  control program would. Its default timings are taken from that program:
  `PAT_HOLD` = 15 clocks per output-loop pass and `DELAY_CYC` = 2040 clocks
  for the 255-pass delay loop. Good signatures are kept in a 16-entry table,
  not in memory or on disk.
* **Choices where the source is silent.** The signature module's base
  address, its bit meanings, the window edge rule, the baud divider and the
  RC delay are this design's own choices.
* **Printed signatures.** The schematic's node signatures came from a clock
  rate and program timing that are not known. They are not reproduced, except
  `P733` for a pulled-up node over a 20-clock window.

## Parameters of the top (`sa_system`)

| parameter | default | meaning                                          |
|-----------|---------|--------------------------------------------------|
| PAT_HOLD  | 15      | system clocks between pattern words              |
| DELAY_CYC | 2040    | settle delay before the halt                     |
| BAUD_DIV  | 52      | system clocks per CUT clock (16x baud clock)     |
| NODES     | 16      | probe positions and entries in the good table    |

A start or stop word needs to be held only a few system clocks, long enough
to pass the synchronisers. Its edge is then latched until the next active CUT
clock edge. With the defaults every word is held 15 clocks and the CUT clock
period is 52 clocks, so several words go by per CUT clock. The window still
opens and closes on the edges that follow the start and stop codes.

## Files

| file                     | contents                                          |
|--------------------------|---------------------------------------------------|
| `rtl/sa_pkg.sv`          | constants, register map, character and segment tables |
| `rtl/sig_register.sv`    | signature LFSR                                     |
| `rtl/start_stop_ctrl.sv` | window state machine                               |
| `rtl/sig_display.sv`     | display register, characters, 7-segment outputs    |
| `rtl/signature_module.sv`| the analyser card with its register file           |
| `rtl/pia6820.sv`         | parallel interface adapter                         |
| `rtl/io_decoder.sv`      | interface slot decoder                             |
| `rtl/bus_conv.sv`        | SS-50 to S-100 converter                           |
| `rtl/baud_gen.sv`        | baud clock divider                                 |
| `rtl/uart_ay51013.sv`    | UART                                               |
| `rtl/cut_board.sv`       | circuit under test                                 |
| `rtl/diag_controller.sv` | test sequencer                                     |
| `rtl/sa_system.sv`       | top level                                          |

Each RTL file has a testbench `tb/tb_<name>.sv`. The package is covered by
`tb_sig_register` and `tb_sig_display`. All testbenches check themselves
against values worked out independently, have a watchdog, and end with one
`TB_RESULT checks=N failures=M` line.

`tb_sa_system` runs the full system at its default parameters:

* It learns all 16 nodes and checks each signature against its own model of
  the window.
* It compares them again fault-free.
* It forces a stuck-at-0 on stimulus bit 3 and expects that node and the stop
  node to fail while the grounded node passes.

It counts how often each mechanism happens:

* the window opened by start, closed by the CUT stop or by the host halt;
* learn, compare pass and compare fail;
* the CB2 strobe;
* UART transmit and receive;
* the port A read-back.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    --top-module tb_sa_system rtl/sa_pkg.sv tb/tb_sa_system.sv
./obj_dir/Vtb_sa_system
```

Replace `tb_sa_system` with any other testbench name to run that one.
`-Wno-fatal` is there because several testbenches pass 1- to 8-bit values to
a 16- or 32-bit compare helper, and Verilator reports each of those as a
width warning. The
testbenches use no x/z values and no constrained randomisation, so they run
on a two-state simulator. The end-to-end test takes about 50 runs of roughly
6,000 clocks each and finishes in seconds.

## Limits

* The host processor, static memory, serial terminal and teletype ports,
  floppy disk and the physical probe are not modelled. Their place is taken by
  the sequencer, and the probe by a multiplexer over the CUT nodes.
* Bus cycles are one system clock long. Real 6800 bus timing and the 35 ns
  set-up margin at the analyser are not modelled.
* The PIA, the UART and the bus converter are functional models of the parts
  as this system uses them, not cycle-exact copies of the data sheets.
