# Pixel-gang receiver for an FPGA-read pixel array detector

A hybrid pixel array detector stacks three layers: a silicon diode sensor that
turns X-ray photons into charge, an ASIC under it whose per-pixel comparators
turn that charge into one bit per pixel, and readout electronics. In the FPGA
variant of the detector the ASIC does not store or process anything itself.
It groups its pixels into *pixel gangs* of 16, and sends each gang's 16 bits
serially over one pin, through the board, to an FPGA. The FPGA then has to do
the processing in real time that would otherwise happen on an external
computer.

This repository holds the FPGA side of one such pin: a small receiver that
finds each gang in the bit stream, collects its 16 bits and hands them on as
one 16-bit word. A full detector would use one receiver per ASIC pin.

## The wire format

Each gang is sent as 18 consecutive bits, one per clock:

```
  1   0   d15 d14 ... d1 d0
  \___/   \______________/
 trigger   16 pixel bits (d15 sent first)
```

The `1, 0` pair is the *trigger*: it tells the receiver that a gang's data
starts with the next bit. Between gangs the line may carry any run of 0s
followed by any run of 1s. Such a gap never contains a 1 followed by a 0, so
it cannot fire the trigger. Gangs may also follow each other with no gap at all.

The pixel bits themselves are arbitrary and will often contain `1, 0` pairs.
These are *false triggers*. The receiver ignores them because it only looks
for a trigger while it is waiting for a gang, never while it is receiving one.
Outside a gang, on the other hand, the receiver has no protection: any 1
followed by a 0 starts a gang. The sender must keep its gaps in the form
described above.

## How the receiver works

`control` (the top) wires four blocks together:

| instance | module | job |
|---|---|---|
| `u1_statemachine` | `statemachine` | sequences idle → waiting → receiving → data_valid → waiting |
| `u2_trigger` | `trigger` | remembers the previous line bit and flags `{previous, current} == 2'b10` while armed |
| `u3_counter` | `counter` | counts the bits shifted in and flags the 16th |
| `u4_shiftregister` | `shiftregister` | 16-slot serial-in/parallel-out register with clear and output enable |

The state machine's four states:

- **idle**: entered on reset. Clears the counter and shift register, then
  goes to waiting on the next clock.
- **waiting**: arms the trigger detector. It moves to receiving on the clock
  edge where the line shows the `0` of a `1, 0` pair. The detector compares the
  stored previous bit with the live input, so no cycle is lost.
- **receiving**: `counter_enable` is high. Each clock shifts the line bit into
  bit 0 of the shift register and moves older bits up, and the counter
  increments. On the edge that takes the 16th bit, the counter's `done` moves
  the machine to data_valid.
- **data_valid**: lasts one clock. `shiftregister_out` shows the word and
  `data_valid` is high. Counter and shift register are cleared at the end of
  the cycle, and the machine returns to waiting. The line bit sampled during
  this cycle still enters the trigger detector's history, which is why the
  next gang's leading `1` may arrive in this cycle.

### Timing

- Let the last data bit be on `gang_in` in clock cycle *n*. Then `data_valid`
  is high, and `shiftregister_out` carries the word, in cycle *n+1*.
- Throughput is one gang every 18 clocks when gangs are sent back to back.
- `shiftregister_out` is all zeros in every cycle except the data_valid cycle.
- The first data bit after the trigger ends up in bit 15 of the word.

### Reset

`reset` is active high and asynchronous in every flip-flop. It returns the
receiver to idle and discards a gang that is only partly received. Idle lasts
one clock, so a trigger can be recognised from the second clock after reset is
released.

## Interface of `control`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | bit clock; `gang_in` is sampled on the rising edge |
| `reset` | in | 1 | asynchronous, active high |
| `gang_in` | in | 1 | serial stream from one ASIC pin |
| `shiftregister_out` | out | `GANG_BITS` | received word during `data_valid`, else 0 |
| `data_valid` | out | 1 | one-clock strobe per received gang |

Parameter: `GANG_BITS` (int unsigned, default 16) is the number of pixels per
gang. The trigger pattern and the state encoding are in `rtl/pad_pkg.sv`.

`control` has three assertions:

- the counter never passes `GANG_BITS`;
- a trigger seen while waiting always starts reception;
- `data_valid` never lasts two cycles.

## What follows the original design and what does not

Taken from the original design:

- the split into state machine, shift register, trigger and counter, and the
  names of those blocks;
- the port names `clk`, `reset`, `gang_in` and `shiftregister_out`, and the
  internal signal names `counter_enable`, `shiftregister_clr`,
  `shiftregister_output_enable` and `trigger_reg`;
- the four states and what each one means;
- the `10` trigger, the 16 bits per gang, and clearing counter and shift
  register after each gang;
- ignoring false triggers inside the data.

Choices made here, because the original leaves them open:

- one bit per clock and the exact cycle timing above;
- the order in which the two trigger bits arrive (1 first, then 0);
- the shift direction, which puts the first bit in the MSB;
- zero output outside data_valid;
- the extra `data_valid` output. The original brings out only the 16-bit word.
  The strobe tells a consumer when to take that word;
- asynchronous active-high reset;
- one-clock idle and data_valid states, and back-to-back gangs;
- the state encoding and the counter width.

Not implemented:

- the analog and physical layers: the diode sensor, the ASIC comparators, the
  ASIC's own gang shift register, and the board wiring;
- the FPGA I/O buffer primitives. The FPGA tools insert these themselves;
- the processing and storage path after the receiver. Autocorrelation is
  mentioned for it, but no function or interface is given.

## Files

- `rtl/pad_pkg.sv`: gang length, trigger pattern, state type.
- `rtl/trigger.sv`, `rtl/counter.sv`, `rtl/shiftregister.sv`,
  `rtl/statemachine.sv`: the four blocks.
- `rtl/control.sv`: the top.
- `tb/tb_<block>.sv`: one self-checking testbench per block. Each prints
  `TB_RESULT checks=N failures=M` and has a watchdog.
- `tb/tb_control.sv`: the end-to-end test, at the default `GANG_BITS=16`.
  It sends 400 gangs built from random words, all-ones and all-zeros words, and
  words that are alternating `10` pairs. They are mixed with random gaps,
  back-to-back sequences and a reset in the middle of a gang. The test checks
  every word and its one-cycle latency. It also counts each of those
  mechanisms and fails if any of them never happened.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl \
  rtl/pad_pkg.sv rtl/trigger.sv rtl/counter.sv rtl/shiftregister.sv \
  rtl/statemachine.sv rtl/control.sv tb/tb_control.sv --top-module tb_control
./obj_dir/Vtb_control
```

For a block test, list `rtl/pad_pkg.sv`, the block's file and its testbench.
Each test runs in well under a second.

To change the gang length, override `GANG_BITS` on `control`. The testbench
reads the value from `pad_pkg::GANG_BITS_DEFAULT`, so changing it there changes
both the design and the test.
