# A fully digital electromagnetic pulse detector

Electromagnetic pulse injection (a short, strong field pulse from a small coil held over
the chip) is a cheap way to fault a circuit, and it works through the package, from the
front or from the back. This RTL implements a detector for such pulses that is built only
from standard flip-flops and a few gates, together with a small test chip that spreads 37
of these detectors over the die and reports whether any of them fired while an AES core
was ciphering.

The design follows the paper "A Fully-Digital EM Pulse Detector" (D. El-Baze,
J.-B. Rigaud, P. Maurine). The detector circuit is the paper's; the test-chip glue
(serial framing, command byte, status byte, re-arming, reset release) is this
implementation's own and is marked as such below.

## Why flip-flops make a pulse detector

The detector rests on one observation about how pulses cause faults: a flip-flop is far
more sensitive while it is switching, in a window around its clock edge, than while its
clock is stable. A pulse that arrives during that window easily makes the flip-flop take
the wrong value. Between edges only a much stronger pulse can set or reset it.

So the detector is a set of flip-flops that switch as often as possible, arranged so
that any wrong switch leaves a lasting, checkable trace. It needs no delay line and no
tuning to the clock period. Its only timing requirement is the one every flip-flop in
the design already meets. It therefore survives voltage and frequency scaling and can be
dropped into a standard-cell or FPGA flow like any other logic.

## The half detector

```
          +-[inv]-+                          +-[inv]-+
          |       |                          |       |
          +-> D Q +-- Q1 --+        +-- Q2 --+ Q D <-+
             DFF1          |        |          DFF2
  clk ----->(rising)       +-[XOR]--+        (falling) <--[inv]-- clk
                               |
                               +--> D Q --> alarm_n
                                    DFF3 (rising, reset value 1)
```

- DFF1 toggles on every rising clock edge.
- DFF2 toggles on every falling clock edge.
- After reset DFF1 holds 1 and DFF2 holds 0 (the second half detector uses the opposite
  values).

Together they keep a flip-flop switching at both edges of the clock. Just before each
rising edge, Q1 was last written at the previous rising edge and Q2 at the falling edge
in between. Q1 and Q2 are then always different. DFF3 samples `Q1 xor Q2` at the rising
edge and holds 1.

```
clk      _/~~\__/~~\__/~~\__/~~\__/~~\__
Q1       ~\_____/~~~~~\_____/~~~~~\_____     toggles on rising edges
Q2       ____/~~~~~\_____/~~~~~\_____/~~     toggles on falling edges
alarm_n  ~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~     Q1 != Q2 at every rising edge
```

Say a pulse makes DFF1 or DFF2 miss a toggle, or flips one of them between edges. The
two are then in phase, and they stay in phase because both keep toggling. DFF3 samples 0
at the next rising edge and keeps sampling 0 until the next reset. **The alarm is
therefore sticky**, which makes it easy to read out after the fact. A pulse that hits
DFF3 itself gives a 0 that lasts one clock cycle. The test-chip controller catches that
too, because it records the alarm for the whole run.

In this RTL the half detector is `half_detector`. Its two toggling flip-flops are in
`hd_sense_pair`. An EM pulse cannot be expressed in RTL. The testbenches model one by
forcing a flip-flop's output: holding it across an edge (a missed toggle), or flipping it
for 1 ns while the clock is stable (a bit set or bit reset).

## The full detector

One half detector switches its two flip-flops in fixed directions at each edge. The
direction matters, because a flip-flop may be more sensitive when its output rises than
when it falls. The full detector (`full_detector`) therefore uses two half detectors that
start in opposite phase. At every clock period the four sensing flip-flops cover all four
cases:

| edge    | HD1 (starts Q1=1, Q2=0) | HD2 (starts Q1=0, Q2=1) |
|---------|-------------------------|-------------------------|
| rising  | Q1 falls / rises        | Q1 rises / falls        |
| falling | Q2 rises / falls        | Q2 falls / rises        |

The XOR of each pair goes into an AND2, and a single alarm flip-flop (reset value 1)
samples the AND at the rising edge. The half detectors' own DFF3 is not used here
(`half_detector` with `ALARM_FF = 0`). That gives five flip-flops, six inverters (per
pair: two feedback and one clock inverter), two XORs and one AND2. The paper costs this
at about 34 NAND2 equivalents.

`alarm_n` is active low in the whole design: 1 = quiet, 0 = pulse seen.

## Releasing the reset: the one subtle point

The in-phase check only works if **the first clock edge after reset is a rising one**.
If reset is released while the clock is high, DFF2 switches first. Q1 and Q2 are then
equal at the next rising edge, and every detector raises a false alarm that never clears.
The paper draws the reset straight to the sensing flip-flops and does not discuss this.

This implementation adds `rst_release_sync`. It asserts the detector reset at once and
releases it through two flip-flops clocked on the falling edge, so the release always
falls while the clock is low. If you use `full_detector` or `half_detector` on their own,
give them a reset that meets the same rule. The end-to-end testbench deliberately
releases the chip reset while the clock is high. It checks that no false alarm follows,
and its fault test shows that removing `rst_release_sync` breaks exactly this.

## The test chip

```
 uart_rxd -> uart_rx --bytes--> test_controller --bytes--> uart_tx -> uart_txd
                                 |   |    |   ^
                aes_key/aes_pt <-+   |    |   +-- global_alarm_n <- alarm_mesh <- 37 x full_detector
                aes_start/done <-----+    |                                           ^
                       trigger <----------+-- det_rst --> rst_release_sync -----------+
```

`emp_testchip` is the top. Following the paper, it holds `N_DET = 37` full detectors
whose alarms form one global alarm, a serial (RS232) link, and a state machine that runs
one experiment at a time. The paper's chip also holds an AES-128 core. That core is not
part of this RTL: its key, plaintext, start, done and ciphertext signals are ports of the
top, so any FIPS-197 core with a start/done interface can be attached.

**Alarm mesh** (`alarm_mesh`). The global alarm is the AND of all active-low detector
alarms, registered once. One detector at 0 pulls it low one cycle later. The paper gives
only the function ("a mesh that generates a global alarm"). The AND tree and the
register are this implementation's choice.

**Controller** (`test_controller`). One experiment, as seen on the serial line (8N1,
115200 baud at a 100 MHz clock, i.e. `CLKS_PER_BIT = 868`):

| step | host -> chip                | chip                                                             |
|------|-----------------------------|------------------------------------------------------------------|
| 1    | 16 key bytes, MSB first     | stored in `aes_key`                                              |
| 2    | 16 plaintext bytes          | stored in `aes_pt`                                               |
| 3    | `0x01` (start); other bytes ignored | detectors re-armed: `det_rst` high 2 cycles, 5 cycles in all |
| 4    |                             | `trigger` pin high 4 cycles (fires the pulse generator), then a one-cycle `aes_start` |
| 5    |                             | waits for `aes_done`, takes `aes_ct`                             |
| 6    | <- 16 ciphertext bytes      | MSB first                                                        |
| 7    | <- 1 status byte            | `0x01` if the global alarm was low at any cycle from the first trigger cycle to this byte, else `0x00` |

The paper fixes only the order of this sequence: key, plaintext, start command, trigger
before the ciphering, then ciphertext and alarm state. The framing, the command and
status values, the trigger length and the re-arm step are this implementation's own. The
re-arm step is needed because detector alarms are sticky and the same position is pulsed
many times in a row. An alarm raised before the start command, for instance by a pulse
while the key is being sent, is cleared by the re-arm and not reported. The
`alarm_latched` port shows the status bit live, and `global_alarm_n` shows the mesh
output.

## Files

| file | contents |
|------|----------|
| `rtl/emp_pkg.sv` | shared constants (alarm levels, AES width, command and status bytes) and the controller state type |
| `rtl/hd_sense_pair.sv` | the two toggling flip-flops of a half detector |
| `rtl/half_detector.sv` | half detector; `INIT_Q1` selects HD1/HD2 phase, `ALARM_FF` includes DFF3 |
| `rtl/full_detector.sv` | full detector: two half detectors, XOR/AND, alarm flip-flop |
| `rtl/rst_release_sync.sv` | detector reset, released on a falling edge |
| `rtl/alarm_mesh.sv` | global alarm from `N_DET` detector alarms |
| `rtl/test_controller.sv` | experiment state machine |
| `rtl/uart_rx.sv`, `rtl/uart_tx.sv` | 8N1 serial receiver and transmitter |
| `rtl/emp_testchip.sv` | top: everything above, AES signals as ports |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Every testbench ends by printing `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/emp_pkg.sv tb/tb_emp_testchip.sv --top-module tb_emp_testchip
./obj_dir/Vtb_emp_testchip
```

Replace `tb_emp_testchip` with any other testbench name to run that one. All testbenches
drive every register through reset, so they also run with random initial values
(`+verilator+rand+reset+2`).

What the testbenches establish:

- **`tb_half_detector`, `tb_full_detector`**: the toggle pattern against an edge-counting
  model; no alarm over long quiet runs; one-edge latency to the alarm after each kind of
  upset (missed toggle at a rising edge with Q rising and with Q falling, missed toggle at
  a falling edge, bit flip while the clock is stable); the alarm stays low until reset; a
  one-cycle alarm from an upset alarm flip-flop.
- **`tb_emp_testchip`**: the full-size chip (37 detectors, 115200 baud, no parameter
  overrides) through eight complete experiments over the serial line, with a stand-in for
  the AES core. It covers clean runs, upsets in detectors 0, 17 and 36 during ciphering,
  a one-cycle alarm, an alarm before the run that the re-arm must clear, and reset
  released with the clock high. It counts each of these and fails if one never happened.
  It runs in about 10 seconds.
- **`tb_scan_position`**: one coil position of a measurement campaign, 44 pulses as in
  the paper's scans, on the full-size chip. Each run upsets zero to three random
  detectors in a random way and must be flagged exactly when something was upset. It
  takes one to two minutes.
- **Other testbenches**: the serial blocks, the mesh, the controller (exact re-arm,
  trigger and start timing, under random back-pressure) and the reset release.

Each testbench has also been run against a deliberately broken copy of its module and
fails there.

## Limits and departures

- No AES core is included. The paper takes it from the standard and describes nothing of
  its design. The top's `aes_*` ports are where one connects.
- The paper's detectors are placed by hand as FPGA hard macros to cover the die. The
  placement is a physical-design matter and is not expressed in this RTL. A synthesis
  tool sees 37 identical detectors with identical inputs and may merge them. The top
  therefore marks each `full_detector` instance with `keep_hierarchy` and `dont_touch`
  attributes. Check that your tool honours them, and place the instances apart, or the
  mesh loses its point.
- Reset is asynchronous and active high. The alarm flip-flops are loaded with 1 by reset,
  matching their stated initial value. `rst_release_sync` (see above) is an addition.
- The serial format, bit rate, command and status encoding, trigger length and re-arm
  sequence are this implementation's choices.
- How well the detector catches real pulses is an analog, physical question. The paper
  measured it on an FPGA at 100 MHz. With the coil on the die, the alarm fired at a pulse
  amplitude no higher than the one that faulted the AES in about 86 % of the cases. With
  the coil on the package, the figure was 92 %. Simulation can only show that every
  flip-flop upset of the kinds modelled above is reported.
