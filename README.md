# Real-time induction-motor measurement and on-line model verification

This RTL is the FPGA side of an experimental setup for a 2.2 kW induction
motor (IM). The motor runs from an ordinary AC drive. The FPGA samples its
stator voltages, stator currents and shaft torque every 15 µs through an
eight-channel simultaneous-sampling ADC, the ADS8568. It reads the rotor
speed from a 5000-line incremental encoder. With the measured voltages and
load torque it steps a discretised rotor-flux model of the same motor in real
time. Every sample produces one record holding the measured quantities and
the model's quantities side by side. A host compares them: if the model
tracks the real motor's currents and speed, the model is verified on-line.
The same platform is meant to host speed-sensorless estimators later.

All arithmetic is IEEE-754 floating point: binary32 for the measurement
chain and the model, and binary64 for the torque low-pass filter.

## One sample, step by step

```
          enable
            |
   sample timer (SAMPLE_CYC = 1500 -> 15 us)
            |
   adc_spi_master --CONVST/BUSY/FS/SCLK/SDO x4--> ADS8568 (off-chip)
            | 8 codes, 16 bit
   7 x adc_scaler      code*10/32767*gain
     |            |             |
   clarke (v)   clarke (i)   torque_lpf (4th order, binary64)
     |  v_sa,v_sb   | i_sa,i_sb    | t_L
     +--------------|--------------+
                    |        im_model (one step, T = 15 us)
                    |              |
   speed_meter -----+------> record (rec, rec_valid)
   (encoder A/B, 1 ms gate)          |
                            eth_record_framer --60-byte frame--> Ethernet MAC (off-chip)
```

At the default 100 MHz clock the cycle budget of one sample is:

| step                                         | cycles | time     |
|----------------------------------------------|-------:|---------:|
| ADC: CONVST, 1.7 µs conversion, 32-bit read  |    317 | 3.17 µs  |
| scaling (int→float, ×10, ÷32767, ×gain)      |      3 |          |
| Clarke ‖ torque filter (the filter is longer)|     11 |          |
| motor model step                             |      6 |          |
| total, start of sample to record             |    338 | 3.38 µs  |
| frame to the MAC, if it takes a byte a cycle |     60 | 0.60 µs  |
| sample period                                |   1500 | 15 µs    |

The period is much longer than the work, as in the original setup: the
computation alone would allow about 4 µs. The slack leaves time for the
Ethernet transfer of each record to the host. Only one sample is in flight
at a time. If a period ends before its sample's record is out,
`sample_overrun` pulses and that tick is skipped.

## The ADC link (`adc_spi_master`)

The ADS8568 converts all eight channels at once. Its serial mode brings the
results out on four lines, SDO_A to SDO_D. Each line carries a 32-bit frame
holding two channels, MSB first: A0 then A1 on SDO_A, and so on. The
controller runs this sequence:

1. Raise CONVST for 40 ns.
2. Wait for BUSY to rise, then to fall. BUSY passes a two-flop synchroniser.
3. Wait at least 86 ns (9 cycles), then pull FS low.
4. Give 32 SCLK periods of 40 ns. Each bit is sampled on the system clock
   edge that drives SCLK low. At that edge the ADC still holds the bit; it
   moves on to the next bit only after the falling edge.
5. Raise FS. Wait at least 40 ns before a new CONVST can follow, then pulse
   `done`.

The ADC's limits are met with margin:

- SCLK period ≥ 22 ns
- BUSY-low to FS-low ≥ 86 ns
- FS-high to CONVST ≥ 40 ns
- CONVST low ≥ 20 ns
- acquisition ≥ 280 ns

The acquisition limit needs no counter, because the 32-bit read-out alone
takes longer than that.

Two choices here are this design's own. First, the FPGA drives FS. The
ADC's timing requirements put minimum delays on FS, which only the host can
guarantee. Second, BUSY must rise within 16 cycles and fall within 400
cycles. Otherwise the acquisition ends with `timeout`, and the codes from
the previous acquisition stay in place. The XCLK input is internal to the
ADC board and is not driven.

Channel allocation:

| ADC channel | A0 | A1 | B0 | B1 | C0 | C1 | D0 | D1 |
|---|---|---|---|---|---|---|---|---|
| signal | v_a | v_b | v_c | i_a | i_b | i_c | torque | unused |

## Scaling and the Clarke transformation

Each code becomes a voltage by the ADC's quantisation rule for the ±10 V
range, `volts = code × 10 / 32767`. The design uses a floating-point
multiplier and divider for this. A per-channel gain then turns transducer
volts into the physical quantity. The transducers put out ±5 V, so the ADC
runs on its ±10 V range for headroom.

The gains are parameters of the top level:

| parameter | default   | basis                          |
|-----------|-----------|--------------------------------|
| `V_GAIN`  | 100 V/V   | assumed                        |
| `I_GAIN`  | 2 A/V     | assumed                        |
| `TQ_GAIN` | 10 N·m/V  | a 50 N·m transducer over 5 V   |

Change them to match the actual transducers and burden resistors.

`clarke` uses all three measured phases in the amplitude-invariant form:
α = (2/3)a − (1/3)(b+c) and β = (b−c)/√3. The same block is used twice,
once for the voltages and once for the currents.

## The motor model (`im_model`)

The state is x = [i_sα, i_sβ, φ_rα, φ_rβ, ω_m]. These are the stator
currents and rotor flux linkages in the stator-fixed αβ frame, and the
mechanical speed in rad/s. The input is u = [v_sα, v_sβ]. The measured load
torque enters as a disturbance. One forward-Euler step of length T:

```
i_sα'  = a1 i_sα + a2 φ_rα + a3 ω φ_rβ + a9 v_sα
i_sβ'  = a1 i_sβ − a3 ω φ_rα + a2 φ_rβ + a9 v_sβ
φ_rα'  = a4 i_sα + a5 φ_rα − a6 ω φ_rβ
φ_rβ'  = a4 i_sβ + a6 ω φ_rα + a5 φ_rβ
ω'     = a7 (φ_rα i_sβ − φ_rβ i_sα) + a8 ω − t_L T / J_T
```

The coefficients use L_σ = σL_s and σ = 1 − L_m²/(L_s L_r):

| coefficient | value                                       |
|-------------|---------------------------------------------|
| a1          | 1 − (R_s/L_σ + L_m² R_r/(L_σ L_r²)) T       |
| a2          | L_m R_r T/(L_σ L_r²)                        |
| a3          | L_m p T/(L_σ L_r)                           |
| a4          | R_r L_m T/L_r                               |
| a5          | 1 − R_r T/L_r                               |
| a6          | p T                                         |
| a7          | 1.5 p L_m T/(L_r J_T)                       |
| a8          | 1 − β_T T/J_T                               |
| a9          | T/L_σ                                       |

They are computed at elaboration from real-valued parameters and rounded
once to binary32. The defaults describe the test motor:

| parameter | R_s    | R_r    | L_s      | L_r      | L_m     | J_T           | β_T              | p |
|-----------|--------|--------|----------|----------|---------|---------------|------------------|---|
| default   | 3.03 Ω | 2.53 Ω | 0.1466 H | 0.1524 H | 0.135 H | 0.055 kg·m²   | 0.0019 N·m·s/rad | 3 |

The time step is T = 15 µs. At the top level T follows from
`SAMPLE_CYC / CLK_HZ`, so changing the sample period keeps the model
consistent.

**Schedule.** One step takes 23 multiplications and 13 additions, spread
over four registered levels. Each level evaluates all of its operations in
parallel:

1. All coefficient × state products, plus a3·ω, a6·ω, a7·φ and t_L·T/J_T.
2. The speed-dependent cross products, such as (a3 ω)·φ_rβ and (a7 φ_rβ)·i_sα,
   and the first partial sums.
3. The new fluxes and further partial sums.
4. The new currents and speed.

A fifth stage converts ω to rpm. `start` registers the inputs; `done`
follows six cycles later. The state is held in the output registers. Reset
puts the machine at rest and unmagnetised. The order of operations is fixed,
so the model's results can be reproduced bit for bit in software; the
testbenches do exactly that.

**Behaviour.** Started direct-on-line from a 50 Hz, 310 V supply, the model
runs up to 999.6 rpm unloaded and settles at 951 rpm under 20 N·m. That is
close to the 952 rpm measured on the real motor under 19 N·m.

## Torque filter (`torque_lpf`)

The torque signal is noisy, so a fourth-order low-pass filter runs before
it drives the model. The filter is a Butterworth design at `FC_HZ` = 100 Hz.
Its coefficients come from the bilinear transform and are computed at
elaboration, as two second-order sections multiplied out. With
K = tan(π f_c / f_s), each section has

- b = K²[1 2 1]/d
- a = [1, 2(K²−1)/d, (1−K/Q+K²)/d]
- d = 1 + K/Q + K², with Q = 1/(2cos(π/8)) and 1/(2cos(3π/8))

It runs in direct form I. With the cutoff 1/667 of the sample rate, the
poles sit near z = 1. Direct form I then needs binary64, and all of the
filter's arithmetic uses it.

One binary64 multiplier and one binary64 adder are shared over the nine
taps: B0 to B4 on past inputs, and −A1 to −A4 on past outputs. A result is
ready 11 cycles after its input. The input is widened exactly from binary32;
the output is given in binary64 and rounded to binary32. A sample that
arrives while the filter is busy is dropped, and `overrun` pulses. At the
top level that cannot happen; an assertion guards it.

## Speed measurement (`speed_meter`, `quad_decoder`)

The encoder's A and B tracks reach the FPGA through a 5 V to 3.3 V level
shifter. Each track passes a synchroniser. Every state change of (B, A)
counts ±1, four counts per line, with the direction taken from the Gray
sequence. A step that changes both tracks at once is not counted and
raises `enc_glitch`.

Counts are summed over a 1 ms gate (`GATE_CYC`). From the sum c:

- n_m = c · 60 / (4 · 5000 · T_gate), in rpm
- ω_m = n_m · 2π/60

At the defaults this gives 3 rpm resolution and a new value every 1 ms.
Each record carries the latest value. The counting method and the gate
length are this design's choices.

## Floating-point units

`fp_add`, `fp_mul`, `fp_div`, `int_to_fp` and `fp_resize` are combinational
IEEE-754 units. They are parameterised by exponent and fraction width:
8/23 gives binary32 and 11/52 gives binary64. All of them:

- round to nearest, ties to even;
- read subnormal inputs as zero and flush underflow to zero;
- turn overflow into infinity;
- return a single positive quiet NaN for invalid operations.

Every value in this design stays far from the subnormal range. Because each
unit is a single combinational block, the usable clock depends on the
target. Registering inside the units, to reach 100 MHz on a given FPGA, is
left to whoever maps the design.

## Top-level interface (`im_setup_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock (100 MHz by default), asynchronous active-low reset |
| `enable` | in | runs the sample timer |
| `adc_convst`, `adc_fs_n`, `adc_sclk` | out | to the ADS8568 |
| `adc_busy`, `adc_sdo[3:0]` | in | from the ADS8568 (SDO_A in bit 0) |
| `enc_a`, `enc_b` | in | encoder tracks after level shifting |
| `rec_valid`, `rec` | out | one `im_setup_pkg::record_t` per sample, described below |
| `latency_cyc` | out | cycles from the sample tick to this record |
| `eth_tx_data[7:0]`, `eth_tx_valid`, `eth_tx_last` | out | frame bytes to the Ethernet MAC core |
| `eth_tx_ready` | in | the MAC takes the byte this cycle |
| `adc_timeout`, `sample_overrun`, `enc_glitch`, `eth_drop` | out | status pulses |

Each record holds these fields, all binary32:

- measured: v_sα, v_sβ, i_sα, i_sβ, filtered t_L, n_m;
- model: î_sα, î_sβ, φ̂_rα, φ̂_rβ, n̂_m.

## Records on the wire (`eth_record_framer`)

The records go to the host as raw Ethernet frames, one frame per record.
There is no IP or UDP layer, so a packet capture tool on the host sees them
directly. The framer builds each frame as 60 bytes, the minimum Ethernet
frame without its check sequence, so no padding is needed:

| bytes | content |
|---|---|
| 0–5 | destination address, `ETH_DST_MAC` (broadcast by default) |
| 6–11 | source address, `ETH_SRC_MAC` |
| 12–13 | EtherType, `ETH_TYPE` (0x88B5, reserved for local experiments) |
| 14–15 | sequence number of the record |
| 16–59 | the eleven record fields in the order listed above, 4 bytes each |

Every multi-byte field is big-endian, most significant byte first.

The bytes leave on a valid/ready/last stream, starting the cycle after
`rec_valid`. The MAC core is not part of this RTL: it adds the preamble
and the check sequence. Put a vendor MAC or your own on the stream, or use
`rec`/`rec_valid` directly.

On the wire a frame occupies 84 byte times, counting the check sequence,
preamble and inter-frame gap. That is 6.72 µs at 100 Mb/s, inside the
15 µs period. If the MAC stalls so long that a new record arrives while a
frame is still pending, the new record is not sent and `eth_drop` pulses.
The sequence number counts every record, sent or not, so the host sees the
loss as a gap.

Parameters:

| parameter | default | |
|---|---|---|
| `CLK_HZ` | 100e6 | system clock |
| `SAMPLE_CYC` | 1500 | sample period T in cycles (15 µs) |
| `V_GAIN`, `I_GAIN`, `TQ_GAIN` | 100, 2, 10 | transducer gains |
| `LPF_FC_HZ` | 100 | torque filter cutoff |
| `ENC_LINES` | 5000 | encoder lines per revolution |
| `GATE_CYC` | 100000 | speed gate (1 ms) |
| `ETH_DST_MAC`, `ETH_SRC_MAC`, `ETH_TYPE` | ff:ff:ff:ff:ff:ff, 02:00:00:00:00:01, 0x88B5 | frame header |

## What follows the original setup, and what does not

These parts follow the original setup:

- ADC, signal set and timing limits;
- the ±10 V quantisation rule (code × 10 / 32767);
- 16-bit codes and binary32 arithmetic for the measurements and the model;
- a fourth-order torque filter in binary64;
- a 5000-line encoder;
- the model equations and motor data;
- the 15 µs sample period.

These are this design's own choices:

- the 100 MHz clock;
- FS driven by the FPGA;
- the SPI cycle counts, the timeouts and the status outputs (one
  acquisition takes 3.17 µs here; the original took 3.28 µs);
- the channel allocation and the transducer gains;
- the Clarke form;
- the filter's type, cutoff and structure (the original coefficients are
  not available);
- the speed-measurement method and its gate;
- the model's schedule and its six-cycle latency (the original
  implementation needed 0.69 µs);
- the record format and the frame layout, with its sequence number;
- the byte-stream interface to the MAC.

Not included:

- the Ethernet MAC core itself and the host-side software;
- all analog and electromechanical parts: ADC, transducers, level shifter,
  encoder, motor, drive and brake.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Build any of them with plain Verilator;
it finds modules by file name:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/fp_pkg.sv rtl/im_setup_pkg.sv tb/fp_ref_pkg.sv tb/tb_im_setup_full.sv \
    --top-module tb_im_setup_full -o sim && ./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_fp_add`, `tb_fp_mul`, `tb_fp_div`, `tb_int_to_fp` | bit-exact agreement with the simulator's IEEE arithmetic, binary32 and binary64 |
| `tb_adc_spi_master` | codes arrive intact and in order; the ADC model's timing checks stay silent; 317 cycles per acquisition; timeout and recovery |
| `tb_adc_scaler`, `tb_clarke` | bit-exact results, latency, a balanced three-phase set maps onto a circle |
| `tb_torque_lpf` | matches an independently derived filter; DC gain 1; > 75 dB at 10 × f_c; 11-cycle latency; overrun flag |
| `tb_speed_meter` | forward, reverse and zero speed within one count; ω = n·2π/60; gate period; glitch flag |
| `tb_im_model` | one second of motor time bit-exact against a reference; run-up and loaded speed |
| `tb_im_scenario` | the setup's 30 s test run (2 million steps): 952, −1000, −953, 952 and 1000 rpm plateaus |
| `tb_eth_record_framer` | every frame decoded and compared with its record; first byte one cycle after the record; 60 bytes with `tx_last` on the last; back-pressure; drops and sequence gaps under overload |
| `tb_im_setup_top` | end to end at a 4 µs period: forward and reverse running, ADC timeouts, sample overruns, a stalled MAC (frames dropped), an encoder glitch; every frame decoded |
| `tb_im_setup_full` | end to end at the default parameters, 100 ms (6667 samples), every record and every frame checked |

The top-level testbenches use four helpers:

- `ads8568_model` is a behavioural model of the ADC's serial side, and
  checks the host's timing.
- `im_rig_stim` stands in for the motor and its transducers.
- `im_setup_checker` recomputes every record: bit for bit for the scaled
  channels, the Clarke outputs and the model step, and to 1e-4 N·m for the
  filtered torque.
- `eth_frame_monitor` decodes each frame. It checks the frame against the
  record its sequence number names, and checks that every record is either
  sent or counted as dropped.

In `tb_im_scenario` the load-step times and the drive's 50 Hz/s ramp are
this testbench's choices; the plateau speeds are the ones measured on the
real motor.
