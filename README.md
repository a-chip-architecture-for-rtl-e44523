# CS-JTAG: compressive-sensing Trojan screening through the JTAG port

A hardware Trojan hidden in a fabricated chip may do nothing visible until it
is triggered. Its extra gates still draw a little static (leakage) power. So
one way to screen a chip is to apply many test vectors, measure the leakage
for each, and compare the result with a simulated "gold" reference.
Process variation buries a small Trojan in noise, so the number of vectors
has to be large, here all 2^16 values of a 16-bit input. Reading one power
sample per vector off the chip then takes most of the test time.

This RTL puts the measurement path on the chip and compresses it on the fly.
A generator makes the test vectors inside the chip. A leakage power sensor
digitises the current for each vector. A measurement generator folds the N
samples into M << N random linear combinations:

    y_c = Phi * (x_c - x_ref),      Phi: M x N, entries +1 / -1 (Bernoulli)

Only the M words leave the chip. Off chip, the same Phi applied to the
simulated leakage x_G gives y_G. The difference x_c - x_G is expected to be
sparse: only a few vectors show a Trojan. So it can be recovered from
y_c - y_G by sparse recovery (l1 minimisation, CoSaMP, IST). The vectors with
the largest deviation are then taken for statistical screening. Recovery and
screening are software and are not part of this RTL.

Everything is driven through the ordinary JTAG pins (clock, enable/TMS,
input/TDI, output/TDO). No pin is added. The top level also brings out
`y_ci`/`y_valid`, `trojan_enable` and `cs_busy`, but only for observation
in simulation. `cut_leak_a` stands for the analog supply current.

## Default configuration

| parameter | default | meaning |
|---|---|---|
| `N_VEC` | 65536 | test vectors per run (exhaustive 16-bit data) |
| `M` | 64 | measurements |
| `R` | 1 | frequency ratio floor(f_MG / f_LPS) |
| `BW_X` | 10 | ADC sample width |
| `BW_Y` | 16 | measurement width |
| `TROJAN` | 1 | build the CUT with (1) or without (0) its Trojan |

At the defaults, a run takes N + 16M + 7 = 66 567 clock cycles from Start to
the last output bit. That is 0.333 ms at 200 MHz. Shipping the raw samples
serially would take 65536 x 10 = 655 360 bit times, 3.28 ms. The output
shrinks from 655 360 bits to 1024.

## Block map

```
 JTAG pins ──► cs_jtag_ctrl ──enable, input, trojan_enable──► jtag_ctrl
   ▲              ▲  (instruction decode,                  │ Reset Start
   │ TDO          │   measurement serialiser)              │ Get Shift Set
   │              │ y_ci                                   ▼
   │          ┌───┴───┐   x_ci   ┌─────┐  I_leak   ┌───────────────┐
   │          │  mg   │◄─────────│ lps │◄──────────│  trojan_cut   │
   │          └───────┘          └─────┘           │  (the CUT)    │
   │                                               └───────▲───────┘
   └────────── scan out ─── tap_buffer ────────────────────┘
                               ▲ parallel vector
                              tvg
```

| file | role |
|---|---|
| `rtl/cs_jtag_pkg.sv` | TAP state type and next-state function, CUT vector struct, widths, CS opcode |
| `rtl/cs_jtag_top.sv` | top level, wiring and mode steering |
| `rtl/cs_jtag_ctrl.sv` | CS-JTAG controller: Trojan enable from an instruction; serial output of measurements |
| `rtl/jtag_ctrl.sv` | JTAG controller: TAP, normal get/shift/set decode, Trojan-mode schedule |
| `rtl/tap_fsm.sv` | the 16-state TAP state machine |
| `rtl/tap_buffer.sv` | boundary-scan chain around the CUT with parallel vector insertion |
| `rtl/tvg.sv` | test vector generator |
| `rtl/lps.sv` | leakage power sensor, **behavioural model** (analog) |
| `rtl/mg.sv` | measurement generator |
| `rtl/trojan_cut.sv` | the circuit under test: LFSR cipher + CRC-32 with an optional Trojan |

## The measurement generator (`mg.sv`)

This is the part that takes most of the area, and its schedule is the least
obvious part of the design.

Each incoming sample must update all M partial sums. The MG runs R times
faster than the sensor (R = floor(f_MG / f_LPS)), so it has R cycles per
sample. It therefore needs only H = ceil(M / R) adders. Each of the H lanes
has:

* a **circular shift register** (CSR) of R partial-sum words,
* an **LFSR** that gives one sign bit per cycle,
* a **selective adder** that adds +x or -x to the word at the head of the CSR.
  The result is written at the tail while the CSR shifts by one.

In cycle t (0 .. R-1) after a sample, lane k updates row t*H + k. After R
cycles, every word has been updated once and each CSR is back where it
started. With R = 1 this is M lanes of one register each, so every partial
sum updates every cycle. With R = M it is a single adder and a single CSR of
M words. Area trades against the sample rate through R.

The matrix entry phi(row, j) is bit 0 of lane (row mod H)'s LFSR after
j*R + floor(row / H) steps from its seed. A set bit means -1. The lanes use a
32-bit Galois LFSR (x^32 + x^22 + x^2 + x + 1). Lane k is seeded with
`seed ^ ((k+1) * 0x9E3779B9)`, or 1 if that is zero. An off-chip decoder
rebuilds Phi from `MG_SEED` with these rules. `tb/cs_jtag_run.sv` contains a
compact software model of them.

Before it is added, each 10-bit sample is biased by `x_ref` (mid-scale, 512).
With random signs the sums then grow only like the square root of N, which
keeps 16-bit measurements enough. Sums wrap in two's complement; there is no
saturation or overflow flag.

Readout: each `shift_out` returns the head of the next lane. After H outputs
all CSRs rotate by one. The order is therefore y_c1 .. y_cM.

## Control through JTAG

**Normal mode.** The enable pin (TMS) steps a standard IEEE 1149.1 TAP.
Capture-DR, Shift-DR and Update-DR produce **Get_reg**, **Shift_reg** and
**Set_reg**, which work the 129-cell tap buffer:

* 81 input cells: seed, load, data.
* 48 output cells: result bit 0 nearest TDO.

Outside Test-Logic-Reset the input register buffer, not the pins, drives the
CUT. The CUT takes one step the cycle after each Update-DR.

**Entering Trojan mode.** The CS-JTAG controller follows the TAP state from
the pins. It shifts TDI into a 4-bit instruction register during Shift-IR.
If the register holds `CS_OPCODE` (4'b1010) at Update-IR, it raises
`trojan_enable`. Another instruction or Test-Logic-Reset clears it.

**A run.** Entering Run-Test/Idle with `trojan_enable` high starts one run.
The same controller outputs now drive the new blocks:

| output | in a Trojan-mode run |
|---|---|
| Start | one pulse: clear the MG, rewind the TVG |
| Set_reg | every R cycles, N times: TVG vector loaded in parallel into the tap buffer; the CUT steps next cycle |
| Get_reg | one cycle after each Set_reg: the LPS converts the leakage of the vector now applied |
| Shift_reg | after an R+3 cycle drain, M pulses BW_Y cycles apart: MG hands over the next y_ci |

Each measurement then leaves on TDO, LSB first, one bit per cycle. `tdo_valid`
marks those bits. The words follow each other without gaps. To start another
run, leave Run-Test/Idle and come back. Leaving Run-Test/Idle during a run
aborts it.

Host sequence: TMS=1 for five cycles (reset), 0 (Run-Test/Idle), 1, 1, 0, 0
(to Shift-IR). Shift 0,1,0,1 on TDI with TMS=1 on the last bit, then 1
(Update-IR) and 0. Hold TMS low and collect the N + 16M + 7 cycles of the run.

## Leakage sensor model (`lps.sv`)

The sensor is analog and is only modelled here, with `real` arithmetic. A
current mirror copies the CUT leakage, I' = I_o. The copy flows through
R = 25 kOhm, and a unity-gain opamp presents the voltage drop to an ideal
10-bit ADC with 0.9 V full scale. The code is
floor(I * R / 0.9 V * 1024), clamped to 0 .. 1023, and appears one cycle after
the sample request. About 18 uW at 1.0 V falls at mid-scale. The model is
not synthesizable. A real chip needs an analog macro with this interface:
current in, `sample` strobe, 10-bit code and `valid` out. The top-level port
`cut_leak_a` (a `real`) stands for the CUT's supply current.

## The circuit under test (`trojan_cut.sv`)

This is a small test subject.

* A 64-bit LFSR (taps 64, 63, 61, 60) makes a pseudo random number.
* Its low 16 bits are XORed with the 16-bit data to form the cipher.
* A CRC-32 (0x04C11DB7, MSB first, initial value all ones) runs over the
  cipher words.
* The result is {cipher, CRC}, 48 bits.
* With `load` high, the LFSR loads `seed` instead of stepping.

The Trojan compares the data with a trigger pattern (16'hA5C3). On a match it
inverts the seed and forces `load`, which silently re-keys the cipher.
`TROJAN = 0` removes it.

## Departures and choices to be aware of

* The ADC width (10 bits) is chosen to match the reported bandwidth figures.
  R, VDD, full scale and the bias reference are illustrative values.
* The instruction register and opcode are this design's way of raising
  Trojan enable without a new pin. Any other unused instruction would do.
* In Trojan mode, Set_reg drives the TVG, Get_reg the sensor and Shift_reg the
  MG readout. The schedule is this design's own.
* One clock runs everything: f_MG = f_CUT, and the sensor samples every R
  cycles. A design with separate f_LPS / f_MG clock domains is not built.
* LFSR polynomials, seeds, the trigger, the modified seed, the vector order
  (counting from 0) and the load on the first vector are all choices. Change
  them together with the off-chip reference model.
* Measurement sums wrap silently at BW_Y bits.
* The off-chip parts (gold simulation with a process database, sparse
  recovery, statistical decision) are not hardware and are not included.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=F`.
Build any of them with Verilator, for example the end-to-end test at the
default size:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/cs_jtag_pkg.sv tb/cs_jtag_top_tb.sv --top-module cs_jtag_top_tb
./obj_dir/Vcs_jtag_top_tb
```

| testbench | what it covers |
|---|---|
| `cs_jtag_top_tb` | full-size chip (defaults). Boundary scan get/shift/set, instruction load, a complete 2^16-vector run, all 64 measurements against a reference, y_C differs from the Trojan-free y_G, cycle count. Takes well under a second. |
| `cs_jtag_sweep_tb` | seven chips side by side with N reduced to 1024 or 512. (M, R, BW_Y) = (8,1,16), (16,2,18), (32,4,26), (64,8,16), (128,16,16), (64,3,16), (128,128,16). Uses `tb/cs_jtag_run.sv`. |
| `mg_tb` | MG at M=10/R=3 (unused CSR words) and M=8/R=1, wrap-around, latency, order, reseeding |
| `jtag_ctrl_tb` | TAP transitions against an independent table; the Trojan-mode pulse schedule |
| `cs_jtag_ctrl_tb` | instruction decode, pass-through, serial output timing and bit order |
| `tap_buffer_tb` | random get/shift/set/parallel-load against a bit-level model |
| `tvg_tb` | vector order, seed and load, end of run, full 2^16 sweep length |
| `lps_tb` | quantiser and power read-back of the sensor model |
| `trojan_cut_tb` | cipher and CRC against a reference; the Trojan changes the output only after the trigger |

The top-level testbenches model the CUT leakage as a function of the data
applied to the CUT. There is a smooth data-dependent part, plus an extra
current on a sparse set of vectors for the Trojan-embedded chip. They read
that data by hierarchical reference (`dut.u_cut.data`).
