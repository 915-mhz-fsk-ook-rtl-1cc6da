# 64-channel neural recording SoC with mixed-signal FIR filters and an FSK/OOK transmitter

This design records 64 neural channels, filters each one with a programmable
16-tap FIR filter, and sends the results out over a 915 MHz radio link. The key
idea is that **the filter has no digital multipliers**. Every channel already
has an 8-bit SAR ADC. During the ADC's sample phase, the coefficient bits decide
which capacitors of the charge-redistribution array take charge. The ADC then
converts `x·|M|/256` instead of `x`. The only digital logic left for filtering
is sign inversion, 12-bit adders and 12-bit registers.

The SystemVerilog here covers all of the digital logic:
- the SAR logic with its multiplication gates;
- the add-and-delay lines and the controller that time-shares the ADCs;
- the configuration shift register;
- the packet serializer and the Manchester/OOK modulator;
- the divide-by-64 and the phase-frequency detector (PFD) of the PLL.

The capacitor array and comparator are given as a behavioural model. The
amplifiers, charge pump, loop filter, VCO and power amplifier are analog. They
sit outside the top module, and their signals are ports.

## How one capacitor array multiplies

In a charge-redistribution SAR ADC, the input is sampled onto a binary-weighted
array (weights 128, 64, …, 1, plus one dummy unit, 256 units in total). Then
the SAR logic searches for the code whose DAC voltage balances the stored charge.
`msar_logic` changes one thing. During the sample phase the switch of capacitor
`i` is driven by coefficient bit `m_i` instead of the SAR bit:

```
sw = sample ? m : trial          // m = all ones in raw-conversion mode
```

A capacitor that is off during sampling stores no charge. So the stored charge
is `vin · M / 256`, and the conversion that follows is an ordinary binary
search. The output code is `floor(vin/VFS · M)`. This is an 8-bit unsigned
product that is already scaled by 1/256. In raw mode all `m_i` are 1, so the
code is `floor(vin/VFS · 255)`.

`cdac_comparator` models the array and comparator ideally. The analog input is
a 12-bit code: 4096 stands for the 0.6 V full scale. The model holds
`q = vin · sw` from the last clock of the sample phase. In the hold phase it
answers `q >= T · 4096` for the trial word `T`. The model leaves out the split
capacitor (70 fF in silicon), mismatch, noise and comparator offset.

## One filter from eight shared ADCs

The coefficients are symmetric in magnitude: `|M_i| = |M_15-i|`. So a 16-tap
filter needs only eight distinct products per input sample. A bank of eight
adjacent channels shares its eight ADCs:

* In FIR mode the controller's 3-bit SELECT counter picks one channel of the
  bank. All eight ADCs sample that channel's amplifier, ADC `k` with coefficient
  magnitude `|M_k|`. One conversion therefore delivers all eight products of
  that input sample.
* Each product feeds two sign multipliers: one for tap `k` and one for tap
  `15-k`. Each ADC stores two sign bits, so the two mirrored taps may differ in
  sign. High-pass and band-pass filters need this.
* At the end of the conversion, only the add-and-delay line of the SELECTed
  channel is clocked. The line is the transposed form:

  ```
  y   = z1 + p0
  z_i <= z_(i+1) + p_i   (i = 1..14)
  z15 <= p15
  ```

  This gives `y[n] = Σ p_i[n-i]`. Every adder and register is 12 bits and
  wraps in two's complement.
* SELECT steps to the next channel. After eight conversions every line of the
  bank has advanced by one sample.

The 64-channel chip is this bank tiled eight times (`fir_bank` ×8 in
`neural_soc`). Channel `c` is ADC/line `c mod 8` of bank `c / 8`.

Because the coefficients live in the per-ADC registers, **the eight channels
of a bank share one filter response**. Different banks can have different
filters.

### Timing

Everything runs on the 14.32 MHz crystal clock, using enables.

| quantity | how it is made | value at the defaults |
|---|---|---|
| SAR clock | crystal / `rate.sar_div` (0 selects the parameter `SAR_DIV` = 23) | 622.6 kHz |
| ADC sample rate | SAR clock / 11 | 56.6 kS/s |
| FIR rate per channel, 64-channel mode | ADC rate / 8 | 7.08 kS/s (every 2024 crystal clocks) |
| FIR rate, SELECT held | ADC rate | 56.6 kS/s on one channel per bank |
| transmit bit rate | crystal / (2·`rate.half_div`) (0 selects `HALF_DIV` = 5) | 1.432 Mb/s |

Both dividers can be changed at run time through the configuration chain.
The original chip also runs its filters at 500 S/s, and its link at 1.2 Mb/s
and 10 kb/s. The matching settings are:
- `sar_div` = 325: 500 S/s per channel, for filters centred near 30 Hz;
- `half_div` = 6: 1.19 Mb/s;
- `half_div` = 716: 10.0 kb/s.

A conversion takes 11 SAR clocks:
- phase 0: sample;
- phases 1–8: decide bits 7..0;
- phase 9: load the output register and clock the SELECTed delay line;
- phase 10: idle.

A filter output for input sample `n` is in `y` 10 SAR clocks plus one crystal
clock after that sample's sample phase began. That is 231 crystal clocks,
about 0.9 of an ADC sample period. SELECT changes only after phase 10.

## Operating modes

| `fir_en` | `sel_hold` | behaviour |
|---|---|---|
| 0 | – | raw conversion: each ADC converts its own channel at 56.6 kS/s, all `m` bits forced high |
| 1 | 0 | 64 FIR filters, each at 7.08 kS/s |
| 1 | 1 | SELECT fixed at `sel_ch`: 8 FIR filters (one per bank) at 56.6 kS/s; the other lines hold their last output, and only the 8 filtered channels are transmitted |

## Configuration chain

All settings are loaded serially through `cfg_shift_reg`, MSB first, one bit
per clock while `cfg_shift` is high. The chain is 683 bits long, and its
contents are the packed struct `soc_pkg::soc_cfg_t`. From MSB to LSB:

| field | bits | meaning |
|---|---|---|
| `rf.ook` | 1 | modulation: 1 = OOK, 0 = FSK |
| `rf.lf` | 6 | loop filter: C code [5:3], R code [2:0] |
| `rf.fsk_idx` | 3 | FSK modulation index (varactor bank) |
| `rf.vco_band` | 4 | VCO centre frequency |
| `rf.pa_pwr` | 4 | PA output power, 16 levels |
| `rate.sar_div` | 10 | crystal clocks per SAR clock; 0 = `SAR_DIV` |
| `rate.half_div` | 10 | crystal clocks per half transmit bit; 0 = `HALF_DIV` |
| `mode.fir_en`, `mode.sel_hold`, `mode.sel_ch` | 1+1+3 | operating mode |
| `coef[63..0]` | 64 × 10 | per ADC: `mag[7:0]`, `sign_lo` (tap k), `sign_hi` (tap 15-k) |

The outputs come straight from the chain. There is no shadow register, so
while a new word is shifted in, the filters and the modulator see the
intermediate words. This includes the rate dividers, so the bit timing changes
while the chain shifts. Drop `tx_en` before a reload and wait for the packet in
flight to finish. Discard about 16 filter samples after a reload.

Reset clears the chain. This selects raw-conversion FSK mode with zero
coefficients, at the default rates.

## Transmit path

`packet_serializer` visits the channels round-robin (0..63). Each packet is
16 bits:
- a 6-bit channel address, then
- 10 data bits,

sent MSB first and back to back. For data, FIR mode sends `y[11:2]` and raw
mode sends `{2'b00, code}`. Each packet takes the channel's latest value. At
1.432 Mb/s a channel is sent about 1400 times per second. That is every fifth
filter output, so **the link carries a subsampled stream**, not every sample.

In held-SELECT mode the serializer skips the channels that are not filtered.
It sends `sel_ch`, `sel_ch`+8, …, `sel_ch`+56, so each of these 8 channels
goes out 8 times as often, at about 11.2 kS/s.

`manchester_mod` drives the RF front end:
- **FSK:** it sends `bit XOR half-bit clock` to the VCO's FSK varactors, with
  the PA on. Manchester coding removes the low-frequency content that the PLL
  would otherwise track out.
- **OOK:** the PLL sits on the carrier, and `pa_on` follows the plain bit.

`tx_en` gates both outputs and stops new packets.

## PLL digital parts

`freq_divider` divides the VCO clock by 64. It is six ripple-clocked
divide-by-2 stages (`div2_stage`): silicon divide-by-2/3 cells used at ratio
2. The divide-by-3 path is not built. `pfd` is the conventional three-state
detector: two flip-flops set by the reference and divider edges, cleared by
their AND. Synthesis reports this clear path as a logic loop. In RTL the clear
pulse has zero width. In silicon, the reset delay sets the minimum pulse width.

## Departures from the original chip and own choices

* The rates follow from integer division of 14.32 MHz. The SAR divider of 23
  gives 622.6 kHz, 56.6 kS/s and 7.08 kS/s, against the nominal 625 kHz,
  56.8 kS/s and 7.1–7.2 kS/s.
* The default bit rate is 1.432 Mb/s, the nearest to 1.5 Mb/s this crystal
  allows. The two dividers are 10-bit chain fields. A value of 0 selects the
  top's parameter, so a cleared chain runs at the default rates.
* Coefficients are an 8-bit magnitude plus a sign per tap (m7..m0 and two sign
  bits per ADC). The filter is therefore slightly finer than an "8-bit signed"
  coefficient.
* The VCO band field is 4 bits wide. The tank has 3 binary-weighted
  capacitors, so only 3 of its bits may matter in silicon.
* These are this design's choices:
  - the allocation of the 11 SAR phases;
  - the 12-bit wrap-around;
  - packet bit order and round-robin channel order;
  - sending only the 8 filtered channels in held-SELECT mode;
  - which 10 bits are sent;
  - Manchester polarity (1 = high then low);
  - uncoded OOK;
  - the chain layout and the lack of a shadow register;
  - the rate dividers as chain fields;
  - the active-low asynchronous reset.
* The filter latency is 231 crystal clocks (16.1 µs, 0.9 ADC sample
  periods), from the start of sampling to a valid `y`. The original chip's
  latency is given as 1.5 ADC samples and as 17.6 µs. These disagree, since
  17.6 µs is one sample period at 56.8 kS/s. This design is close to the
  17.6 µs figure.
* Not modelled: amplifier behaviour, ADC non-idealities and PA power levels.
  The analog PLL parts exist only as the testbench model in
  `tb/pll_analog_model.sv`. `neural_soc_tb` drives `vco_clk` directly.

## Files

| file | contents |
|---|---|
| `rtl/soc_pkg.sv` | shared constants, coefficient/configuration structs |
| `rtl/neural_soc.sv` | top: wires everything below |
| `rtl/cfg_shift_reg.sv` | serial configuration chain |
| `rtl/fir_timing.sv` | SAR clock, conversion phases, SELECT counter |
| `rtl/fir_bank.sv` | 8 channels: input multiplexer, 8 ADCs, 8 delay lines |
| `rtl/msar_logic.sv` | SAR logic with multiplication gates |
| `rtl/cdac_comparator.sv` | behavioural capacitor array and comparator |
| `rtl/fir_delay_line.sv` | 16-tap transposed add-and-delay line with sign multipliers |
| `rtl/packet_serializer.sv` | 16-bit packets, bit timing |
| `rtl/manchester_mod.sv` | Manchester FSK / OOK drive |
| `rtl/freq_divider.sv`, `rtl/div2_stage.sv` | divide-by-64 |
| `rtl/pfd.sv` | phase-frequency detector |
| `tb/<module>_tb.sv` | one self-checking testbench per module |
| `tb/fir_workload_tb.sv` | filtering experiments on the full chip (tones, interferer, DC offset, mains pickup) |
| `tb/link_rates_tb.sv` | the full chip at 1.19 Mb/s FSK, 10 kb/s OOK and 500 S/s filtering, set through the chain |
| `tb/fir_slow_tb.sv` | a band-pass centred near 30 Hz at 500 S/s per channel |
| `tb/pll_lock_tb.sv`, `tb/pll_analog_model.sv` | closed PLL loop: digital divider and PFD around a behavioural charge pump, loop filter and VCO |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  --top-module neural_soc_tb -y rtl -y tb +libext+.sv -Irtl \
  rtl/soc_pkg.sv tb/neural_soc_tb.sv
./obj_dir/Vneural_soc_tb
```

Replace `neural_soc_tb` with any other testbench name.

`neural_soc_tb` runs the whole chip at its default parameters (64 channels).
It takes about 10 s of wall time. It loads the chain, pausing the transmitter
around each reload. It then decodes the packets
from `fsk_mod`/`pa_on` only, and checks each channel's data against the
steady-state filter output computed in the testbench. It covers, in order:
1. raw mode;
2. 64-channel FIR with positive, negative and mixed-sign banks;
3. held-SELECT mode (the held channels take new inputs and are the only ones
   sent; the other delay lines must not move);
4. OOK;
5. the divider and PFD, with a 2% slow and a 2% fast VCO.

It also checks the filter clock period (2024 clocks, or 253 when held) and the
231-clock latency from sampling to output. It fails if any of these
mechanisms never occurred.

`fir_workload_tb` also runs the full chip at its defaults, in 64-channel FIR
mode. It uses three banks:
- Bank 0 is a 16-tap moving average. It gets a 27.6 Hz tone plus an interferer
  at 801.6 Hz that is twice as large. The interferer comes out about 20 dB
  lower relative to the tone. The testbench requires at least 15 dB, and
  both gains within 15% of the programmed response.
- Bank 1 has antisymmetric signs (taps 8–15 negated). This puts an exact zero
  at DC, so a 497.5 Hz tone on a large offset comes out with a mean within ±1 LSB.
- Bank 2 is a band-pass for the spike band: a Hann-windowed 1 kHz cosine with
  its DC term removed, taps `3 21 12 -70 -162 -125 66 255`, then mirrored. A
  small 994.9 Hz tone sits under a 55.3 Hz interferer that is 4.7 times
  larger, as with mains pickup. The testbench requires the interferer to end up
  at least 30 dB below the tone. It measures 44 dB.

Every output sample of channels 0 and 8 is checked bit-exactly.

`link_rates_tb` runs the full chip at its defaults and sets the other rates
through the chain. It decodes 70 packets at 1.19 Mb/s FSK and 3 packets at
10 kb/s OOK; the 3 OOK packets must take between 67,304 and 68,736 clocks (48 bits of
1,432 clocks, less at most one bit).
It then switches to 500 S/s FIR mode: the FIR clock must come every 28,600
crystal clocks, and the steady outputs of all 64 channels must arrive
correctly.

`fir_slow_tb` lowers the sample rate to 500 S/s (`sar_div` = 325) and loads
a band-pass centred near 30 Hz into two banks. The taps are a Hann-windowed
31.25 Hz cosine with its DC term removed, scaled to a peak of 255:
`-8 -60 -126 -150 -98 23 163 255`, then the same values mirrored. The
testbench checks:
- a 31.25 Hz tone passes within 15% of the designed gain (measured: within 1%);
- a 125 Hz tone, at a zero of the response, comes out below 3 LSB;
- a 7.8 Hz tone ends up at least 15 dB below the 31.25 Hz tone (measured:
  about 21 dB);
- every output sample matches bit-exactly.

`pll_lock_tb` closes the loop: the divider and PFD drive a behavioural model
of the charge pump, RC loop filter and VCO. The VCO gain (100 MHz/V), band step
and FSK step in the model are assumptions. Starting several MHz off frequency,
the loop locks to exactly 64 × the reference. It stays locked while
Manchester-coded FSK data move the VCO by about 200 kHz.

The unit testbenches compare against independent reference models:
- a real-valued comparator for the SAR logic;
- a direct-form convolution for the delay line and the bank;
- a packet decoder for the serializer.

Each one has been run against a deliberately broken copy of its module and
reports failures there.
