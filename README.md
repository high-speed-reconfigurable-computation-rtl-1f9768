# Dual-filter radiation pulse detector (APB peripheral)

This is a digital pulse-height analyser for radiation detectors, built as an AMBA APB
peripheral. An 8-bit ADC samples the preamplified detector signal at 100 MHz. The core
shapes every sample with two trapezoidal filters, finds the height of each pulse, and
throws away pulses that overlap (pile-ups). All of this runs in real time, one sample per
clock, with no dead time. Each clean pulse yields one 32-bit word. A processor on the APB
reads it and builds an energy histogram in software.

The main idea is to run two copies of the same trapezoidal filter:

* the **slow** filter has wide windows, so it averages out noise and gives an accurate height;
* the **fast** filter has narrow windows, so it reacts to each particle quickly and can tell
  when a second pulse arrives while the slow filter is still busy with the first.

A small state machine watches both filters' threshold crossings. It accepts a pulse only if
the crossings come in an order that a single isolated pulse can produce.

```
            adc_clk domain (100 MHz)                         pclk domain (40 MHz)
 adc_data  +---------------------------------------+        +--------------------------+
 ---8----->| stage 1        stage 2      stage 3   |        |  amba_control            |
           | operand_select trap_filter  peak_     | result |  6 registers, APB decode |<== APB
           | (FIFO + muxes) x2 (slow,    detect    |=valid=>|  filter control FSM      |
           |                 fast)       (FSM)     |<==ack==|  pulse retrieval FSM     |
           |      ^                                |        |  configuration sender    |
           |  cfg_receiver <====== cfg / req ======|<=======|                          |
           |                ======= ack ==========>|        |                          |
           |  sync2 x4  <------ soft_reset, start -|<-------|                          |
           +---------------------------------------+        +--------------------------+
              slow_out, fast_out (16 bit, for a DAC)
```

## The trapezoidal filter as a running sum

With window width `w` and gap `g`, the filter output is the sum of the newest `w` samples
minus the sum of `w` older samples that lie `g` samples further back. A step input
therefore produces a trapezoid: a rise over `w` samples, a flat top of `g` samples, and a
fall over `w` samples. The hardware does not divide by `w`. The host divides, which also
means the hardware keeps 16 bits of resolution.

Computing both sums from scratch every clock would cost a lot. Instead, each new output is
the previous one corrected at the four window edges:

```
O[n] = O[n-1] + WIN2_NEW - WIN2_OLD - WIN1_NEW + WIN1_OLD
```

`WIN2` is the newer window and `WIN1` the older one. The samples sit in a 256-deep shift
register (`operand_select`), with the newest at position 0. The host turns `w` and `g` into
three position pointers per filter:

| pointer  | position   | meaning                                   |
|----------|------------|-------------------------------------------|
| WIN2_NEW | 0 (fixed)  | sample entering the newer window          |
| WIN2_OLD | `w`        | sample leaving the newer window           |
| WIN1_NEW | `w + g`    | sample entering the older window          |
| WIN1_OLD | `2w + g`   | sample leaving the older window           |

In steady state the output is therefore `sum(F[0..w-1]) - sum(F[w+g .. 2w+g-1])`. The
pointers are 8 bits wide, so `2w + g` can be at most 255. With equal windows that gives
`w <= 127` when `g = 0`. Six 256:1 multiplexers pick the operands: three per filter, because
WIN2_NEW is always position 0. The pointers stay fixed during a measurement, so these wide
multiplexers are large but are not a timing path at run time.

ADC codes are offset binary (all zeros is the most negative value). Inverting the MSB turns
them into two's complement before they enter the FIFO. While the core is not running, zeros
are shifted in instead, so the filters decay to 0.

Because the output is a recursion, it is only correct if the FIFO contents and the stored
output agree. The FIFO, the operand registers and the filter feedback registers are all
cleared at reset and whenever a new configuration comes into force. Without that clear, the
filters would carry an offset after the pointers change.

## Stage 2: the carry-save filter (`trap_filter`)

The recursion adds five terms: four samples and the previous output. Each clock it runs
inside one 16-bit carry-propagate adder delay:

* The 8-bit operands are sign-extended to 16 bits. The worst case, `255*w`, fits for any legal `w`.
* The previous output is never resolved for the feedback path. It is kept as two vectors,
  `SUM` and `CARRY`. So the tree reduces **six** vectors to two.
* Four 3:2 carry-save adders in three levels do the reduction:
  ```
  CSA1(WIN2_NEW, WIN1_OLD, ~WIN2_OLD)      CSA2(~WIN1_NEW, SUM, CARRY)
  CSA3(S1, C1<<1 | 1, S2)
  CSA4(S3, C3<<1, C2<<1 | 1)      -> next SUM = S4, next CARRY = C4<<1
  ```
* Subtraction is inversion plus one. The two `+1`s go into the empty LSBs that the shifted
  carry vectors leave free, so negation costs no adder.
* One ordinary adder, `S4 + (C4<<1)`, forms the output, which is registered for stage 3.

All arithmetic wraps modulo 2^16. Wrapping is harmless because the true result always fits.

## Stage 3: peak detection and pile-up rejection (`peak_detect`)

Each filter has an upper and a lower threshold, both signed 16-bit values. Because the
hardware does not divide, the host gives them scaled by the window width. The upper
threshold starts an excursion and the lower one ends it. The gap between the two is a
hysteresis band, so noise near the peak cannot end an event early.

The FSM reacts to **crossings**, meaning a comparator output that goes from 0 to 1:
FF+ and FF- for the fast filter (crossing above its upper threshold, crossing below its
lower threshold), and SF+ and SF- for the slow filter.

```
 0 --FF+--> 1
 1 --FF- --> 2        1 --SF+--> 3        (both in one clock: --> 4)
 2 --SF+--> 4        2 --FF+--> PILE-UP
 3 --FF- --> 4        3 --SF- --> PILE-UP
 4 --SF- --> EVENT   4 --FF+--> PILE-UP
 PILE-UP, EVENT --> 0 on the next clock
```

A clean event is one fast trigger that falls back while the slow filter rises and then
falls. A second fast trigger before the slow filter has finished means two pulses overlap,
and the pair is discarded. State 0 waits for a *fresh* FF+. So the pulse that caused a
pile-up does not open a new event on its own. That pulse is discarded too, which is the
intent of pile-up rejection.

The filter's parameters decide whether pile-ups can be seen at all. If the fast filter stays
above its lower threshold for as long as the slow filter evaluates, a second pulse never
produces a new FF+ crossing. For good rejection, the fast window should be much shorter
than the slow one.

Each filter also has a running-maximum register. It loads the filter output when the output
is above the upper threshold and above the stored maximum. Both maxima restart when FF+
opens a new event. On EVENT, `{slow_max, fast_max}` is copied into a result register and
offered to the bus side with `valid`. Only the slow peak is normally used. The fast peak is
there for testing.

## Register interface and control (`amba_control`)

Word-addressed with `PADDR[4:2]`. The host code of the original system places the block at
0x8000_0500.

| word | name                   | fields                                                           |
|------|------------------------|------------------------------------------------------------------|
| 0    | configuration/status   | [5] DATA_RDY (R), [4:3] STATE (R), [2] RECONF, [1] START, [0] RESET |
| 1    | slow filter pointers   | [31:24] WIN1_OLD, [23:16] WIN1_NEW, [15:8] WIN2_OLD, [7:0] reads 0 |
| 2    | fast filter pointers   | same layout                                                      |
| 3    | slow thresholds        | [31:16] upper, [15:0] lower                                       |
| 4    | fast thresholds        | same layout                                                      |
| 5    | result (R)             | [31:16] slow peak, [15:0] fast peak; reading clears DATA_RDY      |

STATE is encoded as RESET=00, IDLE=01, RUNNING=10, RECONF=11.

Host sequence:

1. Write words 1-4.
2. Write 4 (RECONF) to word 0, then poll until RECONF reads 0 and STATE is IDLE.
3. Write 2 (START).
4. Loop: when word 0 shows DATA_RDY, read word 5.
5. Write 0 to stop.
6. To reset the core, write 1 (RESET).

Writes to words 1-4 have no effect until a RECONF.

**Filter control FSM.** It goes from RESET to IDLE after `RESET_CYCLES` bus clocks.
From IDLE:

* START moves it to RUNNING.
* RECONF moves it to RECONF, and so does RECONF from RUNNING.

In RECONF the four configuration words are sent one at a time over a 32-bit bus. Each word
takes one four-phase handshake (request up, acknowledge up, request down, acknowledge down).
After the fourth word, RECONF clears itself and the FSM goes to IDLE. From there it moves on
to RUNNING if START is still set. The datapath's `start` line is high only in RUNNING, and
its soft-reset line only in RESET.

**Pulse retrieval FSM.** It moves from IDLE to RECEIVE when the synchronised `valid` is high
and the core is running. RECEIVE loads the result register and sets DATA_RDY. ACK then holds
`ack` high until `valid` falls.

There is one result register. If the host does not read in time, the next pulse overwrites
the result. If a pulse completes while the previous result is still crossing, the datapath
drops it.

## Two clock domains

The filter side runs on the ADC clock and the bus side on the bus clock. Only a few signals
cross between them:

* `soft_reset` and `start`: two-flop synchronisers on the filter side (`sync2`).
* The configuration bus: 32 bits, guarded by `req` and `ack`, each of which goes through a
  synchroniser on its receiving side. The data stays stable from before `req` rises until
  `ack` is seen.
* The result bus: 32 bits, guarded the same way by `valid` and `ack`.

All crossing lines come straight from flip-flops.

## Timing

* A sample offered at ADC edge *k* enters the FIFO at *k*. The operands are registered at
  *k+1* and the filter output at *k+2*. Stage 3 reacts at *k+3*: a three-clock pipeline.
* Throughput is one sample per clock. Nothing ever stalls.
* `valid` rises two ADC clocks after the slow output crosses below its lower threshold in
  state 4.
* Configuration takes four handshakes. Each costs about two synchroniser delays in each
  direction. The new settings come into force all at once with the fourth word.

## Parameters and sizes

| parameter | default | where | meaning |
|---|---|---|---|
| `DEPTH` | 256 | `pulse_detector`, `filter_datapath`, `operand_select` | FIFO depth (samples) |
| `RESET_CYCLES` | 8 | `pulse_detector`, `amba_control` | length of the RESET state, bus clocks |
| `SAMPLE_W`, `ACC_W`, `PTR_W` | 8, 16, 8 | `pd_pkg` | sample, filter and pointer widths |

With these defaults, every filter setting used in the original measurements fits (`2w+g` is
at most 250):

* slow 100/15 or 100/50 with fast 50/15, 50/50 or 25/15, thresholds 1000/1000 and 256-512;
* the host's default of slow 100/30 (2048/1024) and fast 50/30 (1024/512).

## How far to trust it, and where it departs from the original description

The pipeline, the carry-save arrangement, the FSM graphs, the register map and the
crossing scheme follow the original design. The following points are this
implementation's own choices where that description is silent:

* FSM arrows are read as threshold *crossings*, not levels. In state 1, a simultaneous
  slow rise and fast fall goes to state 4.
* The peak maxima restart when an event opens. A separate result register holds
  `{slow, fast}` during the handshake. Events that complete during a handshake are dropped.
* The configuration words travel in register order, and a counter on the receiving side
  tells them apart. They take effect together, and the FIFO and filter state are cleared
  then.
* RESET and RECONF can only be set from the bus; hardware clears them.
  * Soft reset clears START, RECONF, DATA_RDY and both FSMs.
  * Soft reset keeps words 1-5.
  * Soft reset also clears the datapath's active configuration, so a RECONF is needed afterwards.
* APB has no PREADY or PSLVERR. Idle read data is 0 rather than high impedance.
* The filter outputs are brought out at 16 bits. Choosing which 8 bits drive an 8-bit DAC is
  left to the integrator.
* The 256:1 multiplexers are written behaviourally rather than as two levels of 16:1
  multiplexers.

Not included: the processor, AHB and APB bridge, memory and UART cores of the surrounding
system, the vendor/device identification words that such a system library reads from each
APB slave, the clock managers, and the ADC and DACs. The clocks and the APB slave signals are
the top's ports.

## Files

* `rtl/pd_pkg.sv`: widths, register map, state encodings, the configuration and result
  structs, and the carry-save function.
* `rtl/pulse_detector.sv`: the top.
* `rtl/filter_datapath.sv`, `operand_select.sv`, `trap_filter.sv`, `peak_detect.sv`,
  `cfg_receiver.sv`, `sync2.sv`: the ADC-clock side.
* `rtl/amba_control.sv`: the bus side.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.
* `tb/tb_histogram.sv`: measurement runs through the whole core for several filter
  settings, with a host-side pulse-height histogram.

## Simulating

Verilator 5 with `--timing`; the package goes first:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl rtl/pd_pkg.sv tb/tb_pulse_detector.sv \
          --top-module tb_pulse_detector -o sim && ./obj_dir/sim
```

Replace the testbench and top name to run any other. `tb_pulse_detector` runs the whole core
at its default size with a 100 MHz ADC clock and a 40 MHz bus clock. It acts as the host
software and covers:

* two configurations;
* clean events, checked against a sample-exact model of both filters;
* a pile-up;
* reconfiguration while running;
* a result overwritten before it is read;
* stop, and a pulse while stopped;
* soft reset.

It reports how often each of these happened.

`tb_histogram` also runs the full-size core. It takes five filter settings: the four
dual-filter settings of the Cobalt-60 measurements (fast 50/15, 50/15, 50/50 and 25/15,
slow 100/15 or 100/50, thresholds as listed earlier) and the host default. For each one it
sends 150 pulses of random height through the ADC input while polling the results:

* every pulse must give exactly one result;
* every result must match a sample-exact model of both filters;
* the histogram of slow peak / w must match the model's histogram, and is printed.

The pulses are synthetic. No recorded detector signal is used. A last run sets both
filters to window 48 and gap 16 and checks the exact trapezoid produced by a step.

The unit testbenches check:

* the filter recursion against an integer model, including extreme operands;
* operand selection against a model FIFO;
* every branch of the event FSM;
* the handshakes, including a dropped event;
* every register and state of the bus side.

Timing closure at 100 MHz and 40 MHz is not checked here. That depends on the target
technology.
