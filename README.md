# DS-CDMA indoor radio subsystem in SystemVerilog

This is the digital part of a small indoor cellular system built on direct-sequence CDMA. Base station and terminals exchange IF samples at 32768 kHz, with the carrier at 8192 kHz (a quarter of the sample rate). Everything between the information bits and those IF samples is done in synchronous logic:

- **Downlink (base station to terminal):** up to 16 users. Each user has up to four QPSK channels of 64 kb/s. The channels are separated by Walsh codes and scrambled by a cell Gold code at 4096 kchip/s, which gives a spreading factor of 128. A pilot channel and a broadcast channel share the same carrier.
- **Uplink (terminal to base station):** one QPSK signal of 256 kb/s (128 kb/s on each branch), spread by the terminal's Gold code with a spreading factor of 32. The access is asynchronous, so the base station has to search for the code phase. It receives on two antennas and keeps, symbol by symbol, the better of the two receivers.

The RTL follows the block structure of the original system description. Where that description gives the inside of a block, the RTL follows it. This is the case for the two filters it details:

- the shaping filter with two time-multiplexed multipliers;
- the half-band decimator built from distributed-arithmetic constant multipliers.

Where the description only names a block, this design fills it in with the simplest working method and says so. Examples are chip timing, code acquisition, channel estimation and the frequency-error detector. The last section lists every such choice that changes behaviour.

## Clocking and rates

The design uses a single clock of 131072 kHz, and `rate_gen` derives three clock-enable strobes from it:

| strobe     | period    | rate         | used for                             |
|------------|-----------|--------------|--------------------------------------|
| `if_stb`   | 4 clocks  | 32768 kHz    | IF samples in and out                |
| `rx_stb`   | 8 clocks  | 16384 kHz    | receiver rate after the half-band    |
| `chip_stb` | 32 clocks | 4096 kchip/s | chips                                |

All other rates follow from these:

- downlink symbols are 128 chips (32 ksym/s);
- uplink symbols are 32 chips (128 ksym/s).

The source gives no clock frequency. 131072 kHz was chosen so that every rate is an integer number of clocks, and so that the shaping filter has exactly 32 clocks per chip for its multiplexed multipliers.

Shared constants, types and coefficient functions are in the package `cdma_pkg`:

- the rates and the spreading factors `DL_SF = 128` and `UL_SF = 32`;
- `N_USERS = 16` and `N_CH = 4`;
- the types `rx_cplx_t` (12-bit complex receiver sample), `w8_t` (complex pre-RAKE weight, 64 = 1.0) and `dl_user_cfg_t` (one downlink user's configuration);
- the root-raised-cosine and half-band coefficient functions.

Filter coefficients are computed at elaboration from those functions. The roll-off of 0.22 is assumed, since the source does not give one.

## Downlink transmitter (`dl_bs_tx`)

```
user data --> [dl_user_tx] x16 --+
                                 +--> saturating sum --> [rrc_interp_fir] I --+
pilot/broadcast -> [pich_bpch] --+      (10 bit)     --> [rrc_interp_fir] Q --+--> [iq_mod_fs4] --> IF
                 [gold_gen] cell code, chip position
```

**The user slice (`dl_user_tx`).** The slice takes one 8-bit data word per symbol: two bits for each of the four channels. Bit `2c` goes to I of channel `c`, bit `2c+1` to Q, and 0 means +1.

1. `channel_map` turns the bits into antipodal symbols. Channels at or above the configured `n_ch` are silent.
2. Each channel is multiplied by its Walsh row XOR the cell code chip. A Walsh chip is the parity of `row & position`.
3. The four channels are summed.
4. The sum passes the **pre-RAKE** (`pre_rake`). This is a two-finger complex FIR, `y = (w0*s[n] + w1*s[n-2]) / 64`, saturated to 8 bits. The base station can pre-distort each user's signal with it from the terminal's channel estimates.
5. Last come the two branch weights `w_i` and `w_j`. These are read here as per-user I/Q gains, with 16 = unity: `chip = (pre * gain) >>> 2`.

**Pilot and broadcast (`pich_bpch`).**

- The pilot is a constant +32 on Walsh row 0, on I only.
- The broadcast channel carries two bits per symbol on Walsh row 1, at amplitude 8.

Both are scrambled by the cell code. The rows are reserved for these two channels, so users should use rows 2 to 127.

**Cell code (`gold_gen`).** Two 7-stage LFSRs are XORed together: x^7+x^3+1 with seed 01, and x^7+x^3+x^2+x+1 with seed 55. Both are reloaded every 128 chips, so the code repeats once per symbol. The same module, with period 32 and other seeds, spreads the uplink.

### Shaping filter with multiplexed multipliers (`rrc_interp_fir`)

This filter is the most detailed block in the source, and it is where the design saves the most logic.

The chip stream (4096 ksps) has to be shaped with a root-raised-cosine pulse and brought to 32768 ksps, an 8x interpolation. In the zero-stuffed input only one sample in eight is non-zero. So each output sample of a 64-tap filter uses only 8 taps, and which 8 depends on the output phase r = 0..7. The 64 coefficients therefore form 8 polyphase sets of 8 taps.

The fs/4 IF stage needs only some of those outputs:

- I at even output phases;
- Q at odd output phases.

Each branch filter therefore computes only 4 of the 8 phases: phases 0, 2, 4, 6 for I (`PHASE_OFS = 0`) and phases 1, 3, 5, 7 for Q (`PHASE_OFS = 1`).

Inside one filter:

- An 8-deep delay line holds the last 8 chips. It is loaded one cycle after `chip_stb`.
- Two 10x10 multipliers run in parallel, one on taps 0-3 and one on taps 4-7. A multiplexer feeds each multiplier one chip per clock.
- Two 16x10 coefficient RAMs (`ram_l`, `ram_r`) hold the coefficients. The address is `{phase, tap}`, and each RAM holds 4 phases x 4 taps.
- An accumulator adds both products. After 4 clocks one phase is complete (`y_valid`, `y_phase`). After 16 clocks all four phases are done, well within the 32 clocks of a chip.

Coefficients are RRC values scaled by 256; the centre tap is about 270. The RAMs start with the computed values and can be rewritten at run time through `cw_en/cw_side/cw_addr/cw_data`. The top brings this port out, with `cw_q` choosing the Q filter. The full output width (23 bits) is kept. Scaling to the 10-bit IF happens in the next stage.

### fs/4 IF stage (`iq_mod_fs4`)

With the carrier at a quarter of the sample rate, cos and sin only take the values 1, 0, -1, 0. The IF is then just I and Q samples interleaved with signs:

```
+I0  -Q1  -I2  +Q3  +I4  -Q5  -I6  +Q7   (8 IF samples per chip)
```

This stage uses no multiplier. The four phases of each branch are buffered as they arrive and played out over the next chip, one per `if_stb`, scaled by `>>> IF_SHIFT` (7). They are saturated to 10 bits. The output runs one chip behind the filters.

## Downlink receiver (`dl_ms_rx`)

```
IF -> [iq_demod_fs4] -> [hb_decim_fir] x2 -> [cplx_mixer] <- [nco] <- [fed]
        (32768 ksps)     (16384 ksps)           |                       ^
                                           [mf_fir] x2 -> [chip_sync] -> [code_acq] -> [cdma_demod] -> [channel_unmap] -> data
                                                                                           |  ^
                                                                              [channel_estimator]
```

**Down-conversion (`iq_demod_fs4`).** This is the mirror of the modulator. It outputs I and Q streams at 32768 ksps, each zero on every other sample: `I = x, 0, -x, 0`, `Q = 0, -x, 0, x`. Negating -512 saturates to 511.

### Half-band decimator with distributed arithmetic (`hb_decim_fir`, `da_mult`)

The second detailed filter. It has 11 taps, a Hamming-windowed half-band design with a centre tap of 2048/4096 (one half). Every second coefficient away from the centre is zero. That leaves the centre tap and three distinct non-zero values, used symmetrically.

**Transposed, symmetric structure.** Each new input sample goes to one constant multiplier per distinct non-zero coefficient, so 4 multipliers in all. The products feed a chain of registers and adders. Each product is added at the two chain positions of its mirrored taps. Zero taps need no multiplier and only pass the chain along.

**Decimation.** The chain runs at the full input rate. A toggle keeps every second output, so the output rate is 16384 ksps. Output: `>>> OUT_SHIFT` (7), saturated to 12 bits.

**The constant multipliers (`da_mult`).** There are no generic multipliers. Each one is a distributed-arithmetic multiplier for its own constant C:

1. The 10-bit two's-complement input is cut into 3-bit digits. They are taken least significant first: `x[2:0]`, `x[5:3]`, `x[8:6]`, then the sign bit `x[9]`.
2. A ROM of 8 x 14-bit words holds `d*C` for d = 0..7.
3. Each clock, the accumulator adds the ROM word for the current digit and shifts the running sum right by 3 (the 2^-3 feedback). The sign digit is subtracted, not added, because it has weight -2^9.
4. After 4 clocks the 22-bit result is `C*x/8` with 6 fraction bits. Because digits come least significant first, the right shift keeps the significant end.

The source prints a multiplier for C = 2123, which is the module's default. Inside the filter every instance gets its own coefficient. An IF sample arrives every 4 clocks, so the 4-clock multiplier keeps up.

**Timing.** A filter output follows its input by 4 clocks, when the multipliers finish.

### Frequency correction (`nco`, `cplx_mixer`, `fed`)

- **`nco`:** a 24-bit phase accumulator, advanced once per receiver sample by `freq`. A 256-entry cos/sin table of 10-bit values is computed at elaboration.
- **`cplx_mixer`:** rotates I/Q by the NCO phase. It uses four 12x10 multiplications, `>>> 9`, and a register stage. `DIR` selects the direction: de-rotation in the receiver, rotation in the uplink transmitter.
- **`fed`:** the frequency-error detector. It takes the cross product `Im(P[n] * conj(P[n-1]))` of consecutive despread pilot symbols and integrates it with gain 2^-20 into the NCO word. It runs only while the receiver is locked.

### Matched filter and chip timing (`mf_fir`, `chip_sync`)

**`mf_fir`** is a 17-tap direct-form RRC filter at 4 samples per chip (a span of 4 chips). It uses roll-off 0.22, coefficients scaled by 128, and `>>> 9`, saturated to 12 bits.

**`chip_sync`** picks one of the 4 samples per chip:

1. For each sample phase it sums `|I| + |Q|` over a window of 256 chips.
2. At the end of the window it compares the best phase with the current one.
3. If the best beats the current one by more than 1/16, the sampling phase moves **one** quarter-chip step towards it.

Why it works this way. With a small roll-off the signal power hardly depends on the sampling instant, so this measure is nearly flat near the optimum. Shorter windows, a smaller hysteresis, or jumping straight to the best phase let the phase wander: it can go through the chip boundary and lose the code.

Moving across the boundary keeps the chip count right:

- going forward from phase 3 to 0 skips one output, which would repeat the last chip;
- going back from 0 to 3 emits the current sample as an extra chip.

Without these corrections, every boundary crossing would cost the code lock.

### Code acquisition (`code_acq`)

`code_acq` is a serial search. A local Gold generator, like the transmitter's, is correlated with the incoming chips over one code period (the dwell):

- `C = sum(chip * pn)`, computed for I and Q;
- the dwell passes if `|C_I| + |C_Q|` exceeds `2^-TH_SH` times the sum of `|I| + |Q|` over the same chips. The threshold therefore follows the signal level without any AGC.

A failed dwell holds the local code for one chip (a *slip*), so the next dwell tests the next code phase. A full search costs at most SF+1 dwells. Once locked, `MISS` = 4 failed dwells in a row drop the lock.

While locked, the module gives each chip:

- `pos`, its position in the symbol;
- `pn`, the aligned code chip;
- `sym_end`, marking the last chip of a symbol;
- `chip_en`, marking the chips that were not slipped.

Thresholds: the downlink uses 1/4, the uplink 1/2 (see the uplink section).

### Despreading and decisions (`cdma_demod`, `channel_estimator`, `channel_unmap`)

**`cdma_demod`** accumulates every used chip with the sign of (Walsh row XOR code) for each channel. With `PILOT = 1` it also keeps a pilot accumulator on row 0.

At `sym_end` the symbol values D and the pilot P are registered (`sym_valid`). One clock later the decisions follow:

- `z = D * conj(h)`, with h the current channel estimate;
- the bits are the signs of Re z and Im z.

The pilot makes this detection coherent, which also removes any carrier phase.

**`channel_estimator`** smooths P recursively: `h += (P - h) >>> 4`. It restarts from the first pilot after a loss of lock.

**`channel_unmap`** packs the active channels' bits back into the user's data word. It only outputs while the receiver is locked and h is valid.

## Uplink

**Terminal transmitter (`ul_ms_tx`).**

1. A multiplexer puts one bit per symbol on each branch. I always carries traffic bit a. Q carries traffic bit b, or the control bit when `ctl_sel` is set.
2. Both branches are spread by the terminal's Gold code: period 32, seeds 01/10, amplitude 64.
3. They are rotated by an NCO (the transmit frequency adjustment; `freq` is per chip).
4. The signal is shaped by two `rrc_interp_fir` filters and put on the IF by `iq_mod_fs4`.

**Base-station receiver (`ul_bs_rx`).** The chain is the same as the downlink receiver up to the chips:

- fs/4 down-conversion;
- half-band decimation;
- matched filter;
- chip timing;
- code acquisition with the terminal's code, SF 32.

Then a single-channel `cdma_demod` without pilot decides the bits by sign. The soft values z are passed on for diversity.

Two points matter for the uplink:

- **Code choice.** The 32-chip code repeats every symbol, so its correlation side lobes must stay well below the acquisition threshold. With seeds 01/2b the side lobes reach 3/4 of the peak, and the receiver then locks onto false code phases. The seeds 01/10 keep all periodic and data-modulated side lobes at or below 1/4 of the peak. The threshold is 1/2.
- **No carrier-phase recovery.** The source describes no pilot or phase recovery for the uplink, and none is built. Decisions are correct only when the carrier phase at the despreader is near 0, which the testbenches arrange with the channel delay. A real uplink would need a phase or differential scheme here.

**Diversity (`diversity_select`).** There are two `ul_bs_rx`, one per antenna. For each symbol the selector takes the decision of the receiver with the larger `|Re z| + |Im z|`. A receiver that is not locked is never chosen. Receiver B's values are held until receiver A's symbol arrives.

**Demultiplexer (`ul_demux`).** Mirrors the terminal multiplexer. `ctl_sel` must be set the same way at both ends.

## Top level (`cdma_subsystem_top`)

The top instantiates the whole FPGA part and wires it together:

- the downlink transmitter for `N_USERS` users (default 16);
- the terminal's downlink receiver;
- the terminal's uplink transmitter;
- two uplink receivers with the diversity selector and the demultiplexer.

The radio path is analog, so it is not modelled. All IF samples are ports:

- `dl_if_tx` goes out and `dl_if_rx` comes in;
- `ul_if_tx` goes out, and `ul_if_rx_a` / `ul_if_rx_b` come in.

A testbench closes the loop. The other ports:

- **Downlink transmit side:** per-user data and configuration (`dl_cfg`: Walsh rows, channel count, pre-RAKE weights, branch gains), broadcast bits, the coefficient write port, and `dl_sym_start` (when new user data is taken).
- **Terminal receive side:** the Walsh rows and channel count to decode; the outputs lock, data, data-valid and frequency estimate.
- **Uplink:** the bits, the control bit and select, and the transmit frequency word. The base-station outputs are both lock flags, the selected bits, the control bit and which antenna was used.

## Verification

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each one:

- compares the block's outputs with values computed in the testbench: integer models, LFSR recurrences written out, and sums worked out independently;
- uses random stimulus from `$urandom`;
- has a watchdog;
- ends with a `TB_RESULT checks=N failures=M` line.

Each testbench was also run against a copy of its block with one deliberate bug and reported failures. The block tests:

| block | what is checked |
|---|---|
| `da_mult` | all 1024 inputs against C*x/8 |
| `hb_decim_fir` | against an integer model of the half-band filter and decimation, within 1 LSB |
| `rrc_interp_fir` | against an integer model of the 4 phases, including a RAM rewrite |
| `iq_mod_fs4`, `iq_demod_fs4` | the sign pattern and timing |
| `gold_gen`, `channel_map`, `channel_unmap`, `pre_rake`, `dl_user_tx`, `pich_bpch`, `dl_bs_tx` | chip for chip against models of the spreading |
| `nco`, `cplx_mixer`, `mf_fir` | numerically against real-valued models |
| `chip_sync` | follows a moving best phase and passes the right samples |
| `code_acq` | locks from a random code phase, aligns `pn` and `sym_end`, drops lock without signal and locks again |
| `cdma_demod` | exact P and z sums, and bits, under random channel gains and noise |
| `channel_estimator`, `fed`, `diversity_select`, `ul_demux` | against their update rules |
| `dl_ms_rx`, `ul_bs_rx` | driven by the real transmitters through a delay line, with two delays and a signal gap; the data must be error-free after lock |
| `ul_ms_tx` | chip signs against the Gold model; rotation magnitude and phase step with a frequency word set |

**End to end: `tb_cdma_subsystem_top`.** This runs the top at its default size: 16 users, all sending random data, and 2.4 M clocks (about 18 ms of radio time). The terminal decodes user 0 on four channels.

- Halfway through, the attenuation moves from antenna B to antenna A, control bits start on the uplink Q branch, and a coefficient is rewritten.
- The test counts slips, locks, selections of each antenna, control bits and coefficient writes, and fails if any of them never happened.
- The result is error-free data on both links after settling. The first 128 downlink symbols are skipped, because the chip timing needs a few windows to settle.

Running a test with plain Verilator (5.x):

```
verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/cdma_pkg.sv tb/tb_cdma_subsystem_top.sv \
          --top tb_cdma_subsystem_top -Mdir obj -o sim && obj/sim
```

Any other block works the same way with its testbench name. The end-to-end run takes well under a minute.

## Choices and departures from the original description

**Source inconsistencies, and which reading was followed:**

- One sentence gives the Walsh chips at "1024 Mchip/s", but the uplink section and the rates of the implementation give 4096 kchip/s. 4096 kchip/s is built.
- The capacity is given both as "64 channels of 32 kb/s" and as "16 users x 4 QPSK channels of 64 kb/s". The second is built. As a result, a user's rate moves in 64 kb/s steps (0 to 256 kb/s), not the 32 kb/s steps the service description asks for.
- In the block diagrams, the combining blocks printed without a symbol are read as adders.
- The branch weights `w_i` / `w_j` are read as per-user gains.
- "another receiver" in the uplink is read as a second antenna receiver feeding the diversity selector.

**Choices where the source is silent:**

- the single clock;
- all word widths after the filters;
- roll-off 0.22;
- the half-band length of 11 taps;
- the Gold polynomials, seeds and period;
- the pilot and broadcast rows and amplitudes;
- the pre-RAKE form (two fingers, 2-chip delay);
- the chip-timing, acquisition, estimator and frequency-loop methods and their constants;
- the uplink multiplexing rule;
- bit polarity (0 means +1).

**Departure:** the uplink NCO rotates at chip rate *before* the shaping filters, not with the I/Q stage after them as drawn. For the small offsets of a frequency correction this gives the same spectrum, and it keeps the fs/4 stage free of multipliers.

**Not built:**

- the prototyping board it ran on: eight FPGAs, a board interconnect bus, a VME bridge, local memories;
- the host processor that loads and controls the boards;
- information capture and display.

These are platform, not signal processing. Their signals (data in and out, configuration, coefficient writes) appear as plain top-level ports. Uplink carrier-phase recovery is also missing (see above). The design has not been synthesised for the original FPGAs, so its resource use has not been compared with the source's figures: about 6400 logic elements for the terminal and 99000 for the base station.
