# BPSK / QPSK / 16-QAM modulator fed by a UART

This is a small digital modulator for an FPGA. A host computer types ASCII
characters into a serial (UART) line. The modulator turns the most recent character
into a passband signal, using one of three schemes picked on two switches: BPSK
(1 bit per symbol), QPSK (2 bits) or 16-QAM (4 bits). The outputs are two 16-bit
sample streams, in-phase and quadrature, one sample per clock. They are meant to be
watched on an on-chip logic analyser or fed to a DAC.

The design reproduces a published FPGA modulator (Xilinx Spartan-6, 100 MHz). The
block structure, the mode codes, the constellation tables it states, the 100-clock
carrier and the output levels follow that design. Everything it leaves open is
chosen here and listed under "Choices made here" below. Those choices include the
UART format, how symbols are paced and aligned, and the fixed-point scaling.

## Signal flow

```
 uart_rxd ─► uart_rx ─► uart_buffer ─► selector_modulator ─┬─► bpsk_modulator  ─┐
                                            ▲               ├─► qpsk_modulator  ─┼─► modulator_output ─► inphase_out
 sw_sel[1:0] ─► selector_input ── mode ─────┴───────────────┴─► qam16_modulator ─┘        ▲             quadrature_out
                                   └──────────────────────────────────────────────────────┘             out_valid
```

| Module | Job |
|---|---|
| `uart_rx` | 8N1 receiver with a 2-flop input synchronizer and mid-bit sampling; one-clock `valid` per byte |
| `uart_buffer` | holds the last character; a new one replaces it |
| `selector_input` | 2-flop synchronizer for the mode switches |
| `selector_modulator` | every symbol period, cuts the next 1/2/4 bits off the character and strobes them into the selected modulator |
| `bpsk_mapper`, `qpsk_mapper`, `qam16_mapper` | symbol bits → constellation point |
| `sincos_gen` | sine/cosine lookup, 100 samples per period, peak 8192 |
| `mixer` | coordinate × carrier, scaled back to 16 bits |
| `bpsk_modulator`, `qpsk_modulator`, `qam16_modulator` | mapper + own carrier generator + mixer(s) |
| `modulator_output` | shows the selected modulator's outputs |
| `modulator_top` | wires it all together |
| `mod_pkg` | sample type, coordinate constants, mode enum, 16-QAM axis map |

All three modulators exist side by side and keep running. Only the selected one
receives new symbols, and only its outputs reach the pins. The design uses five
multipliers: one for BPSK, two for QPSK and two for 16-QAM.

## Constellations and the naming of the two axes

Each mapper has two coordinate outputs, `data_out_real` and `data_out_imag`. In this
design the **imaginary coordinate drives the in-phase output** and the **real
coordinate drives the quadrature output**. This is unusual, and it is the main thing
to keep in mind when reading the mapper tables. It is why BPSK, whose real part is
always 0, shows up only on the in-phase output.

Coordinates are 16-bit two's complement with 1.0 = 1024 (so 3.0 = 3072).

BPSK (`data_in` → real, imag):

| bit | real | imag |
|---|---|---|
| 0 | 0 | −1 |
| 1 | 0 | +1 |

QPSK (`data_in[1:0]`). Bit 1 sets the sign of imag and bit 0 sets the sign of real
(0 means +):

| bits | real | imag |
|---|---|---|
| 00 | +1 | −1 |
| 01 | −1 | −1 |
| 10 | +1 | +1 |
| 11 | −1 | +1 |

16-QAM (`data_in[3:0]`). Each axis uses the map (sign bit, outer bit):
`00 → −1, 01 → −3, 10 → +1, 11 → +3`.
* The imaginary (in-phase) coordinate takes `data_in[1]` as sign and `data_in[0]` as
  outer bit.
* The real (quadrature) coordinate takes the other pair the other way round:
  `data_in[2]` is its sign and `data_in[3]` its outer bit.

Along each axis the order −3, −1, +1, +3 is Gray coded.

| bits | real | imag |   | bits | real | imag |
|---|---|---|---|---|---|---|
| 0000 | −1 | −1 | | 1000 | −3 | −1 |
| 0001 | −1 | −3 | | 1001 | −3 | −3 |
| 0010 | −1 | +1 | | 1010 | −3 | +1 |
| 0011 | −1 | +3 | | 1011 | −3 | +3 |
| 0100 | +1 | −1 | | 1100 | +3 | −1 |
| 0101 | +1 | −3 | | 1101 | +3 | −3 |
| 0110 | +1 | +1 | | 1110 | +3 | +1 |
| 0111 | +1 | +3 | | 1111 | +3 | +3 |

The source design states only two points: 0000 → (−1, −1) and 0001 → (−1, −3). The
rest of the table is a completion chosen here. It was chosen because it also matches
the hardware captures of the character 'a' (symbols 0110 and 0001): those show
in-phase peaks of ±24576 and quadrature peaks of ±8192. Reading the real pair in the
same order as the imaginary pair would fit the two stated points but give quadrature
peaks of ±24576 for 'a'. To change the table, edit `qam16_mapper` (axis map in
`mod_pkg::qam16_level`).

## Carrier, mixing and output levels

`sincos_gen` steps a phase counter through 0…99 and reads two constant tables:

    SIN[n] = round(8192 · sin(2πn/100)),  COS[n] = round(8192 · cos(2πn/100))

The tables are computed at elaboration by a constant function using `$sin`/`$cos`.
No data file is needed. Each `mixer` computes `(coord · carrier) >>> 10` and keeps
16 bits. The outputs are:

    inphase_out    = imag · sin
    quadrature_out = real · cos

A unit symbol peaks at ±8192. An outer 16-QAM level (±3) peaks at ±24576, which
still fits in 16 bits. These peaks match the levels seen on the original hardware.
The outputs are not summed into one real passband signal; the two streams are
brought out separately.

## Timing

* **Symbol period = one carrier period = `CARRIER_CLKS` clocks (default 100).** At
  a 10 ns clock one symbol lasts 1 µs. That gives 1 Mbit/s for BPSK, 2 Mbit/s for
  QPSK and 4 Mbit/s for 16-QAM.
* **Alignment.** `selector_modulator` runs a free counter 0…99 from reset. It
  decides the next symbol at count 99 and strobes it during count 0. Every carrier
  generator also starts at phase 0 on reset and has the same period, so each new
  symbol meets its carrier at phase 0. Nothing else keeps them aligned. If you
  replace the selector or the generators, keep both on the same reset and period.
* **Latencies.** If a strobe is in clock *t*:
  * the mapper shows the point at *t*+1;
  * the mixer output at *t*+2 is the product with carrier sample 0;
  * the pins show it at *t*+3, because `modulator_output` is registered.
  * A modulator's `valid_out` goes high at *t*+2 of its first symbol and stays high.
* **Character bits** are sent most significant bit first. For example, 'a' = 0110 0001:
  * BPSK sends 0,1,1,0,0,0,0,1;
  * QPSK sends 01,10,00,01;
  * 16-QAM sends 0110, 0001.
  The held character repeats for as long as no new one arrives.
* **UART.** The default is 868 clocks per bit (115200 baud at 100 MHz). Frames are 8N1,
  LSB first. `valid` comes in the middle of the stop bit. A frame whose stop bit is 0
  is dropped.

## Mode switching and new characters

`sw_sel` reaches `mode` two clocks later: 00 selects BPSK, 01 QPSK, 10 16-QAM, and
11 nothing.

* **Mode change.** The next symbol starts again from the most significant bit of the
  character then held. Because of this, a QPSK or 16-QAM symbol never straddles two
  characters.
* **New character.** A character that arrives mid-way is picked up at the next
  character start.
* **Idle states.** Nothing is sent before the first character or while the code is 11.
  In code 11 the outputs are 0 and `out_valid` is low.
* **Unselected modulators.** These keep modulating their last symbol. After a switch,
  the newly selected modulator shows its old symbol until its first new strobe, at most
  one symbol period later.

## Top-level interface (`modulator_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock (10 ns intended), synchronous active-high reset |
| `uart_rxd` | in | 1 | serial line from the host, idle high |
| `sw_sel` | in | 2 | mode switches |
| `inphase_out`, `quadrature_out` | out | 16 | signed samples of the selected modulator |
| `out_valid` | out | 1 | selected modulator carries a symbol |
| `rx_byte` | out | 8 | character being sent |
| `mode` | out | 2 | synchronized mode code (`mod_pkg::mode_e`) |

Parameters:
* `CLKS_PER_BIT` (868);
* `CARRIER_CLKS` (100): the carrier period and the symbol period;
* `AMPLITUDE` (8192): the carrier peak. Keep 3 · `AMPLITUDE` below 32768.

## Choices made here, and departures from the source design

* **Rates.** The source design reports bit rates of 99.85 / 199.7 / 399.4 Mbps for a
  10 ns clock, i.e. one symbol per ~10 ns. It also states a 100-clock carrier with one
  symbol per carrier period. The two cannot both hold. This design follows the
  100-clock carrier, so its rates are 100 times lower: 1 / 2 / 4 Mbit/s at 100 MHz.
  Shortening `CARRIER_CLKS` raises the rate.
* **Sine with in-phase, cosine with quadrature.** This pairing follows the order in
  which the source lists them.
* **Fixed-point scaling.** The mixer shift (>>> 10) and the carrier peak (8192) were
  chosen to reproduce the output levels of the original: ±8192 for a unit symbol and
  ±24576 for ±3.
* **Not stated by the source; chosen here:**
  * the UART baud rate, frame format and framing-error handling;
  * both synchronizers;
  * the `have_data` gating;
  * symbol pacing and alignment;
  * the restart on a mode change;
  * what code 11 does;
  * reset values.
* **BPSK mapper.** `data_out_real` is kept though it is always 0, because that is the
  mapper's interface. The BPSK modulator builds only the in-phase path.
* **Mapper simulation signals.** The original mapper simulations show extra
  delayed-valid taps and a counter whose purpose is not described. They are not
  reproduced.
* **The host computer** is outside the design. The top-level testbench includes a UART
  sender in its place.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one ends by
printing `TB_RESULT checks=N failures=M`. The leaf testbenches compare against values
computed independently in the testbench: constellation tables written out, carriers
from `$sin`/`$cos`, products from 64-bit arithmetic.

`tb_modulator_top` runs the whole design at its default parameters, with no
parameter overrides:
* it sends 'a', 'm', 'v' and four random characters over the UART;
* meanwhile it moves the switches through BPSK, QPSK, 16-QAM, 11 and back;
* a reference model predicts every output sample from the observable ports, and the
  testbench checks those samples every clock;
* it counts how often each mechanism happened: characters received, a character
  replaced mid-way, symbols in each mode, code 11, restarts on a mode change.

About 68,000 clocks are simulated, which takes a few seconds.

`tb_workload_ascii` repeats the original hardware experiment. For each of 'a', 'm'
and 'v' in each mode it does the following:
* captures 1024 output samples;
* checks the minimum and maximum of both outputs. For 'a' these are the values seen on
  the original board: BPSK in-phase ±8192, QPSK ±8192 on both outputs, 16-QAM
  in-phase ±24576 and quadrature ±8192;
* checks that the waveform repeats every 800, 400 or 200 clocks, i.e. 8, 4 or 2
  symbols of 100 clocks.

With plain Verilator, from the folder holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/mod_pkg.sv tb/tb_modulator_top.sv \
          --top-module tb_modulator_top -o sim && ./obj_dir/sim
```

Replace `modulator_top` with any module name to run that block's testbench. The
testbenches initialise every variable they read, so they also work with a
two-state simulator that randomises uninitialised state.
