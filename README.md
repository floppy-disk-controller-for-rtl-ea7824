# Floppy disk subsystem for an M6800 microcomputer

This is the glue logic of a single-density floppy disk subsystem for a 1 MHz
M6800 bus. Two boards plug into the bus:

* **The controller module** carries an MC6843 floppy disk controller (FDC), an
  MC6821 PIA that selects the drives, a 256-byte scratch-pad RAM, and the
  circuit that recovers clock and data from the drive's raw FM pulse stream.
* **The RAM/EPROM module** carries 32 Kbyte of 4116 dynamic RAM, refreshed
  invisibly in every phi1 half cycle, and up to four 2716 EPROMs at the top of
  memory.

The FDC, PIA, memory chips and drives are bought parts, so they are ports here.
The RTL covers everything the boards add around them:

* address decoding;
* buffer direction control, including DMA;
* line drivers and receivers for the drive cable;
* the data separator and phase detectors of the read PLL;
* the hidden refresh and address multiplexer of the dynamic RAM.

The analog half of the PLL (charge pump, loop filter and VCO) is a behavioural
model. It lets the loop be simulated closed.

## Memory map

| Range       | Device                              | Decoding                                      |
|-------------|-------------------------------------|-----------------------------------------------|
| 0000-7FFF   | dynamic RAM, bank 0 / bank 1 by A14 | A15 low and VMA                               |
| E000-FFFF   | four 2 Kbyte EPROMs                 | A15 A14 A13 and VMA; A12 A11 pick the EPROM   |
| EC00-EC3F   | FDC, 8 registers, 8 images          | A5-A3 ignored, RS2-RS0 = A2-A0                |
| EC40-EC7F   | PIA, 4 registers, 16 images         | A5-A2 ignored, RS1-RS0 = A1-A0                |
| EF00-EFFF   | scratch-pad RAM                     | full                                          |

**Controller decoding (`ctrl_decode`)**
- A15-A10 = 111011 with VMA enables the first half of an LS139-style decoder (`dec2to4_n`), driven by A9 and A8.
- Its output 0 (page EC) enables the second half, driven by A7 and A6. That half splits the page into four 64-byte areas: FDC, PIA and two spares.
- Output 3 of the first half (page EF) selects the scratch RAM.
- Pages ED and EE, and the two spare areas, come out as `*_spare_n`.

**EPROM selects (`mem_decode`)**
- The second EPROM socket (E800-EFFF) would collide with the controller module. Its select is therefore OR-ed with A10, which limits it to E800-EBFF.
- The strap `eprom1_full` removes that limit.
- `eprom_fit[i]` disconnects a socket altogether, like removing its jumper.

**Module buffer enables**
- RAM SELECT or any EPROM select enables a second decoder half with R/W on its A0 input.
- Output 0 is WRITE and output 1 is READ, each active low.
- A write to an EPROM address therefore enables only the write buffer, which no memory chip drives back.

## Data direction of the controller module (`bus_dir_ctrl`)

The controller module has one set of bidirectional buffers between the MPU bus
and its internal bus. `dir` = 0 drives data out onto the MPU bus (a read), and
`dir` = 1 lets data in, which is also the idle state. Five gates produce it:

```
A = not(FDC_SEL_n and TxAK_n)      -- FDC addressed or DMA acknowledged
C = not(PIA_SEL_n and RAM_SEL_n)   -- PIA or scratch RAM addressed
B = R/W and TxAK_n
D = not(A and BD)                  -- FDC's bus-direction output
E = not(B and C)
dir = D and E
```

- **No device selected:** A and C are low, so `dir` is 1.
- **PIA or RAM selected:** R/W decides.
- **FDC selected:** the FDC's own BD output decides; BD equals R/W in normal cycles.
- **DMA:** the MPU is halted and the FDC asserts TxAK. B is then forced low, so BD alone steers the buffers. BD is the inverse of R/W there, because the FDC reads memory when the MPU would write.

## Drive interface (`drive_interface`)

All drive lines are active low, open collector, and terminated with 220/330 Ω in the last drive of the daisy chain.

**Control lines** (head load, step, direction, write gate, write data, low current):
- The FDC's active-high outputs are inverted once by open-collector drivers on the way out.

**Status lines** (index, ready, write protect, track 00, raw read data):
- These are inverted once by receivers on the way in.

**Drive selection** uses four PIA port pins, PA0-PA3, through non-inverting open-collector buffers.
- After reset the PIA turns its port into inputs. The pins float high and no drive is selected. Inverting buffers would select every drive at once.
- With the `two_side` strap low, PA0-PA3 select four single-sided drives, and SIDE SELECT stays high (side 0).
- With `two_side` high, PA3 drives SIDE SELECT and three double-sided drives can be selected.
- Using PA3 for the side line and adding the strap are choices of this design.

## Read data recovery

This is the subtle part. The drive delivers single-density FM:
- one 200 ns pulse at the start of every 4 µs bit cell (the clock);
- a second pulse 2 µs later if the bit is a 1 (the data).

Address marks leave out some clock pulses on purpose. Spindle speed drifts, so the rate is only nominally 500 kHz. The FDC needs:
- RDT, a data line that is valid on both edges of DCK;
- DCK, a 250 kHz clock that keeps running through missing pulses and follows slow rate changes, but not pulse-to-pulse jitter.

### The digital part (`data_separator`)

Everything runs on an 8 MHz VCO clock, 16 periods per 2 µs half cell.

1. **Input flip-flops.** A raw pulse sets FF1 asynchronously. On the next rising VCO edge FF2 copies it. FF2 then clears FF1, so FF2 is high for exactly one VCO period per pulse, whatever the pulse width.
2. **Window counter.** While FF2 is high, the 4-bit window counter is loaded with 9 instead of counting. From 9 its MSB stays high until the count wraps from 15 to 0, which is 7 VCO periods (about 0.9 µs) after the pulse was caught. The wrap is the edge that closes the half-cell window. With no pulse, the counter just keeps counting and wraps every 16 periods. This flywheel is what carries DCK through missing clock bits.
3. **Data flip-flops.** The pulse that loads the counter also sets FF3. On the falling edge of the counter MSB, three flip-flops are clocked:
   - FF3 clears;
   - FF4 takes FF3's old value and becomes RDT;
   - FF5 toggles and becomes DCK.

   RDT is therefore 1 for a half-cell window that held a pulse and 0 for an empty one. DCK changes once per half cell, at a fixed offset from the pulses.
4. **PLL reference.**
   - R is the window counter's carry (count 15). It is phase-corrected by every pulse.
   - V is the carry of a free-running divide-by-16 counter. It is a pure image of the VCO.

### Phase detectors (`phase_detector`)

Phase detector 1 is the MC4044's phase/frequency detector, described by its behaviour rather than its gate netlist.
- A falling edge of R that comes before the matching falling edge of V sets **pump up** until V falls. The VCO is slow.
- The reverse order sets **pump down**. The VCO is fast.
- Edges that coincide leave it idle (**lock**).
- It never asserts both outputs; an assertion checks this.
- Because R and V are both made by counters on the VCO clock, the detector samples them on that clock.

Phase detector 2 is the simple combinational one, implemented from its truth table.

| R V | U2 D2 |
|-----|-------|
| 0 0 | 1 1   |
| 0 1 | 1 1   |
| 1 0 | 0 1   |
| 1 1 | 1 0   |

### The analog part (`pll_vco`, behavioural)

**Charge pump and amplifier**
- Pump up gives +0.75 V (one V_BE), pump down gives −0.75 V, and idle gives 0 V.
- This is a detector gain of about 0.12 V/rad.

**Active filter**
- The transfer function is (1 + s·R2·C) / (s·R1·C), with R1 = 1.8 kΩ, R2 = 820 Ω and C = 0.01 µF.
- With the VCO gain of 2 MHz/V (12.5·10⁶ rad/s/V) and the ÷16, this gives a natural frequency of about 7·10⁴ rad/s and a damping of about 0.3.
- The design goal behind these values is lock within six byte times.

**VCO**
- f = 8 MHz + 2 MHz/V × v, clamped to 7-9 MHz.
- The model integrates the filter every 2 ns. It recomputes the half period at every output edge.
- Real parameters make the module simulation-only. For the same reason the top level synthesizes only without it.

## Hidden refresh of the dynamic RAM (`refresh_ctrl`)

The 4116 needs each of its 128 rows refreshed every 2 ms. The M6800 moves data
only while phi2 is high, so each phi1 half cycle (about 500 ns at 1 MHz) is
free.

**Refresh in every phi1**
- When phi2 falls, the 7-bit refresh counter advances and its value replaces the CPU address on the RAM address lines.
- RAS rises for the precharge time and falls again. That is a RAS-only refresh of one row in both banks.
- All 128 rows are refreshed every 128 µs, sixteen times more often than needed, and the processor never waits.

**CPU access in phi2**
- If RAM SELECT is high when phi2 rises:
  1. RAS is precharged again.
  2. RAS falls with the CPU row address (A6-A0).
  3. The selector line S switches to the column address (A13-A7).
  4. The CAS of the bank chosen by A14 falls and stays low until shortly after phi2 falls.
- RAS is shared by both banks, so the other bank sees a harmless RAS-only cycle.
- If RAM is not selected, RAS simply stays low from the refresh through phi2, and no CAS is issued (a "refresh only" cycle).

**Timing clock**
- The board generates the delays with flip-flops wired as monostables. Here they are counts of a 20 MHz timing clock (`timing_clk`, 50 ns per tick):
  - precharge `T_RP` = 3 ticks (150 ns, inside the 150-180 ns aimed for);
  - row hold before S, `T_S` = 1 tick;
  - S to CAS, `T_CAS` = 1 tick.
- RAS to CAS is therefore 100 ns, longer than the 40 ns of the original but well inside the phi2 half cycle. Change the three parameters if your timing clock differs.
- phi2 is sampled on the timing clock, so every strobe lags phi2 by one tick.

## Top level (`fdc_top`)

`fdc_top` wires both modules onto one set of bus signals. It has no parameters.

**Bus data**
- Tri-state busses are split by direction. `cpu_wdata` is what the MPU drives.
- `ctrl_rdata` is what the controller module drives. It is valid when `ctrl_dir` is 0, and is a multiplex of scratch RAM, PIA and FDC.
- `fdc_dout` and `pia_dout` are what those chips put on the internal bus.

**Other ports**
- All FDC, PIA, drive-cable, EPROM-select and 4116 pins are ports.
- The VCO clock and both phase detectors' outputs are brought out for observation.
- `rst` clears the data separator asynchronously (like the clear pins of its flip-flops) and the refresh logic synchronously. Lint notes this mixed use; it is intended.

## Departures and open points

- **Data separator.** It is built from a prose description of the circuit, not from a schematic.
  - The clock edge taken is the falling edge of the window counter's MSB.
  - The PLL reference is taken from the counters' carries.
- **PLL analog part.** This is an idealised model, not the op-amp circuit, and it has no leakage. Real loops drift slowly during long gaps; this one holds its frequency.
- **Refresh delays.** These are clock counts instead of RC monostables (see above).
- **Straps.** The EPROM select straps and the `two_side` strap are modelled as inputs.
- **Not connected.** The optional 1 MHz oscillator and the drive's DOUBLE SIDED status line are not connected.
- **Bought chips are not modelled in `rtl/`.** This covers the MC6843, MC6821, 4116, 2716 and the drive electronics. The testbench contains a 4116 bank model that corrupts any row left unrefreshed for longer than 2 ms.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

- **Decoders:** the controller decoder is checked over all 65 536 addresses and VMA. The memory decoder is checked over every strap setting and VMA/R/W combination, with a full address sweep for one setting and every seventh address for the rest.
- **Data separator:** FM streams with and without ±400 ns jitter, including a missing-clock address mark, at a fixed 8 MHz VCO.
- **Phase detector:** against a reference model for leading, lagging and locked inputs.
- **Loop filter / VCO model:** the free-running frequency, the clamp at full pump, and the pump-down return.
- **Refresh controller:** 3 500 bus cycles against two 4116 models.
  - Checks cover RAS/CAS timing, and that CAS falls only for the addressed bank in phi2.
  - The largest row age measured is 128 µs.

`tb_fdc_top` runs the whole design at its defaults, with two processes at once:
- **Disk read.** A drive sends a complete IBM 3740 sector at a data rate 1.5 % above nominal. The sector has a gap, six 00 bytes, an ID mark, four ID bytes, the ID CRC, a gap, a data mark, 128 data bytes and the data CRC.
  - The testbench acts as the FDC. It samples RDT on both DCK edges, finds both address marks by their missing clocks, and checks every byte and both CRC-CCITT values.
  - It measures the VCO at 8.12 MHz, exactly 16 times the data rate.
- **Bus traffic, concurrently with the disk read.**
  - Scratch RAM, FDC and PIA accesses through all their images, and DMA cycles.
  - Drive selection after reset and in both PIA pin assignments, status lines and step pulses.
  - EPROM selects, and about 2.6 ms of dynamic RAM traffic, with data read back after the refresh interval.
- **Mechanism counters.** Each of these must occur at least once: pump up, pump down, lock, flywheel windows, address marks, both buffer directions, DMA, drive selection, refresh-only and access cycles, EPROM selection.

`tb_pll_capture` measures how fast the loop pulls in. It feeds the full design a continuous preamble of 00 bytes and steps the data rate: +3 %, −3 %, +5 %, then back to nominal.
- After each step it finds when the VCO, measured on its pin over 16 periods, settles within 1 % of sixteen times the new rate. The capture times measured are 84, 132, 128 and 96 µs.
- The goal is capture within six byte times (192 µs).
- Afterwards it checks that RDT reads the preamble without a single wrong window.

To run a testbench with plain Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv rtl/fdc_pkg.sv tb/tb_fdc_top.sv --top-module tb_fdc_top
./obj_dir/Vtb_fdc_top
```

- Replace `tb_fdc_top` with any other testbench name.
- The full-system test simulates about 6 ms and finishes in a few seconds.
- Every module except `pll_vco` is plain synthesizable SystemVerilog. To lint one block, run `verilator --lint-only -Wall -y rtl rtl/fdc_pkg.sv rtl/<block>.sv`.
