# UART with built-in self-test

A UART cannot easily be tested from the pins of the chip it sits in. This
design places the tester next to it: a pattern generator, a way to apply each
pattern to the UART and collect its answer, a comparator that judges the
answer, and a small controller that runs the whole sequence and raises an
interrupt when the UART misbehaves. The UART is tested through its real serial
path. Every test pattern goes into its receiver as a serial frame, and it comes
back out of its transmitter as another serial frame.

The judge needs a known-good answer. This design does not keep a table of
expected responses. A second, fault-free copy of the UART runs in lock-step
with the UART under test, and its answer is the stored good response. The
comparator also checks the tested answer against the pattern that went in, so
a fault that both copies shared would still be caught.

```
                    +------+    +-------------------+    +------+
           +------->| PISO |--->| reference UART    |--->| SIPO |---- reference_out --+
           |        +------+    | (echo)            |    +------+                      |
   +-----+ |                    +-------------------+                                  v
   | TPG |-+ pattern                                                             +-----------+
   +-----+ |        +------+    +-------------------+    +------+                |    TRA    |-- result
      ^    +------->| PISO |--->| UART under test   |--->| SIPO |-- tested_out -->| comparator|-- error
      |             +------+    | (echo, stuck-at   |    +------+                +-----------+
      |                         |  fault injection) |                                  |
      |                         +-------------------+                                  |
      |             rx_i / tx_o / byte ports reach it in normal mode                   |
      |                                                                                |
   +-------------------------------------------------------------------------------------+
   |  bist_ctrl: mode, seed load, PISO load/shift, SIPO clear/shift, compare, next,     |
   |             irq (cleared by interrupt_clear_i)                                     |
   +-------------------------------------------------------------------------------------+
```

## One test step, cycle by cycle

The controller runs the same step once per pattern. At the defaults one bit
time is 5208 clock cycles: a 50 MHz clock at 9600 baud.

1. **LOAD** (1 cycle). The low byte of the current pattern is framed as
   start bit 0, 8 data bits LSB first, then stop bit 1. The 10-bit frame is
   loaded into both PISOs. In the same cycle a registered, active-low clear
   empties both SIPOs.
2. **SEND**. Every bit time the PISOs shift one place. Their outputs
   (`doutp1`, `doutp2`) are UART lines that carry the frame and then idle
   high.
3. **Echo**. In test mode each UART sends every byte it receives straight
   back out on its transmitter. The receiver has the byte at the middle of
   the stop bit, 9.5 bit times after the frame started. The echo frame starts
   on the next cycle. The controller watches the reference UART's
   transmitter-busy signal, and its rising edge marks the echo's first cycle.
4. **CAPTURE**. Counting from that edge, the controller shifts both SIPOs at
   the middle of each of the 10 echo bits, half a bit time in and then every
   bit time. The SIPO's first stage takes the line. The start bit therefore
   ends in the top stage, with `d0` below it and the stop bit in stage 0.
5. **COMPARE** (1 cycle). The analyzer judges the two captured frames (see
   below).
6. **NEXT** (1 cycle). The generator steps. After the last pattern the
   controller goes to DONE.

One step lasts 19 bit times plus 8 cycles. That is 98 960 cycles at the
defaults, and the full 512-pattern test takes 50.67 million cycles (about
1.01 s at 50 MHz). If the reference UART never echoes, the step gives up
after 20 bit times and goes to COMPARE. The comparison then fails because
the SIPOs are still empty.

At DONE the UART under test returns to normal mode and `bist_done` is set.
`bist_done` stays set until the next `bist_start`. The test does not stop at
a failing pattern. Each failure pulses the analyzer's error, and that sets
`irq`. `irq` stays set until `interrupt_clear_i`, and a new error in the same
cycle wins over the clear.

## The judgement (`tra`)

A response passes when all of the following hold:

- the tested frame equals the reference frame, bit for bit (`mis_ref`
  flags a mismatch);
- the tested frame has a 0 start bit and a 1 stop bit;
- its data bits, read back in the reversed SIPO order, equal the byte that
  was applied (`mis_pat` flags a failure of this or of the framing check).

`result` holds the last verdict, with 1 meaning pass. It is 1 after reset.
`error` pulses for one cycle after a failed comparison.

## Pattern generator (`tpg`, `lfsr`)

The generator is 9 bits wide and, by default, a plain counter. It is 0 after
reset, loads `seed` when the test starts and counts up by one per test step.
After 511 it wraps to 0, so 512 steps cover every 9-bit value once. Only the
low 8 bits reach the UART, because a frame carries one byte. Pattern `p` and
`p + 256` therefore apply the same byte. All 9 bits are visible on
`lfsr_out`.

Setting `TPG_MODE = TPG_LFSR` on the top replaces the counter with a
Fibonacci LFSR (module `lfsr`). Each stage takes the value of the stage below
it, and stage 0 takes the XOR of the tap stages. The 9-bit default mask
`9'h108` realises x^9 + x^5 + 1 and runs through all 511 non-zero states.
Seed 0 locks it. Standing alone, `lfsr` defaults to the classic 5-stage
example: taps at stages 1 and 4, serial output from stage 4, x^5 + x^3 + 1,
period 31. Maximal-length masks for other widths are given in its header
(8, 9, 16 and 32 bits).

## The UART (`uart_top`, `uart_tx`, `uart_rx`)

- **Frame.** Idle high, one start bit (0), 8 data bits LSB first, no parity,
  one stop bit (1).
- **Transmitter.** A one-cycle `start` with `data` sends a frame. `busy`
  lasts exactly 10 bit times and `done` pulses at the end. A `start` while
  busy is ignored.
- **Receiver.** The line passes through a two-flop synchronizer. After a
  falling edge the receiver waits half a bit time. If the line is high again,
  it was a glitch and the receiver returns to idle. Otherwise it samples
  every bit time, near the middle of each bit. A good stop bit gives a
  one-cycle `valid` with the byte. A 0 stop bit gives `frame_err` instead.
- **`uart_top`.** Joins one transmitter and one receiver. With
  `loopback = 1` (test mode), each received byte is echoed. With
  `loopback = 0`, the two halves are independent.

**Fault injection.** `flt_sa0` and `flt_sa1` force bit `FAULT_BIT` (default
0) of the received byte to 0 or 1, a stuck-at fault inside the UART under
test. The forced bit goes to `rx_data` and into the echo. If both are set,
stuck-at-0 wins. The top brings them out as `inject_sa0` and `inject_sa1`.
With stuck-at-0 on bit 0, exactly the patterns with bit 0 = 1 fail. With
stuck-at-1, exactly those with bit 0 = 0 fail.

**Reversible adder.** Both bit-time counters increment through `rev_adder`.
This is a ripple-carry adder in which each full adder is two Peres gates
(`peres_gate`: p = a, q = a^b, r = ab^c):

- gate 1 takes (a, b, 0) and gives a^b and ab;
- gate 2 takes (a^b, cin, ab) and gives the sum a^b^cin on q and the carry
  on r.

The unused outputs are the gates' garbage outputs. In a netlist the adder
behaves like any adder, and the reversible structure is only visible in the
RTL.

## Normal mode

While no test runs, the UART under test is reached directly:

- serial: `rx_i` and `tx_o`;
- transmit: `tx_start_i`, `tx_data_i` and `tx_busy_o`;
- receive: `rx_data_o`, `rx_valid_o` and `rx_frame_err_o`.

During a test, `tx_o` is held idle (high), `tx_start_i` is ignored, and
`rx_valid_o` and `rx_frame_err_o` are masked.

## Top-level parameters (`uart_bist_top`)

| parameter | default | meaning |
|---|---|---|
| `CLK_HZ` | 50 000 000 | clock frequency; with `BAUD` it sets cycles per bit |
| `BAUD` | 9600 | bit rate |
| `PAT_W` | 9 | pattern width |
| `NUM_PATTERNS` | 512 | test steps per run |
| `TPG_MODE` | `TPG_COUNT` | counter or LFSR generator |
| `FAULT_BIT` | 0 | data bit hit by the injected stuck-at fault |

`CLK_HZ / BAUD` must be at least 4. The testbenches use 8 cycles per bit
(`CLK_HZ = 80`, `BAUD = 10`).

Reset (`rst`) is synchronous and active high. The one exception is the
SIPOs: they have an asynchronous active-low clear, which the controller
drives from a register. Shared types and the frame packing functions are in
`uart_bist_pkg`.

## Where this design departs from its source description, and what is its own

The structure follows the source description:

- the generator, two PISO → UART → SIPO chains and a comparator under a
  control unit;
- a 9-bit counter from 0 to 511 as the generator;
- 9600 baud, bytes sent LSB first with no parity, and mid-bit sampling;
- testing for stuck-at-0 and stuck-at-1 faults;
- an interrupt with a clear input;
- a reversible-gate adder inside the UART.

The following are choices made here:

- **Generator timing.** The source counts one step per clock. Here the
  generator steps once per test step, because each pattern needs a whole
  UART round trip.
- **Two generators described.** The source also draws the generator as an
  LFSR. That form is available as `TPG_MODE = TPG_LFSR`. Its XOR feedback and
  the 9-bit polynomial are assumed.
- **Byte width.** Only 8 of the 9 pattern bits are sent.
- **Stop bits.** One stop bit. The source's frame drawing shows two stop-bit
  slots, but its text describes one.
- **No MISR.** A signature register (MISR) is mentioned in the generic
  self-test description but not specified. Responses here are compared
  frame by frame instead.
- **Inputs not reproduced.** The source's top level shows two select inputs
  and a load input whose roles are not described. Here the seed is loaded by
  the controller on `bist_start`.
- **Choices made without guidance:**
  - the 50 MHz clock;
  - the echo mode that makes the UART answer its stimulus;
  - the place of the injected fault;
  - the choice of Peres gates;
  - the receiver synchronizer, glitch check and `frame_err`;
  - the timeout;
  - every handshake and all reset values.
- **Not modelled.** The power figures quoted for the original (reduced
  switching, 14 mW during test) are not modelled.
- **Size.** The original build used 67 flip-flops. This one synthesizes to
  about 220 flip-flop bits, which still uses a small fraction of a Spartan-3E
  XC3S500E. The extra flip-flops come from the second SIPO capture path, the
  control unit, the bit-timing counters and the normal-mode ports.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench ends by
printing `TB_RESULT checks=N failures=M`.

| testbench | what it establishes |
|---|---|
| `tb_rev_adder` | exhaustive 4-bit and random 13-bit sums |
| `tb_lfsr` | bit-level update, period 31 with distinct states, 8-bit period 255, 16-bit period 65535, 32-bit steps against its recurrence, load and enable |
| `tb_tpg` | counting, the 511 → 0 wrap and its flag, seed load, and the 511-state LFSR mode |
| `tb_piso` | serial order, idle fill, and that load beats shift |
| `tb_sipo` | stage order, `so`, and asynchronous clear between clock edges |
| `tb_uart_tx` | frame bits at mid-bit, busy exactly 10 bit times, one `done` pulse, and that `start` is ignored while busy |
| `tb_uart_rx` | random bytes with random gaps, framing error, and glitch rejection |
| `tb_uart_top` | normal-mode transfer over a wire loop, echo frames and their delay, and sa0/sa1 injection |
| `tb_tra` | pass, each failure kind, its flags, and the one-cycle error pulse |
| `tb_bist_ctrl` | sequence and spacing of every control pulse, the timeout path, and irq set and clear |
| `tb_uart_bist_top` | end-to-end (details below) |
| `tb_uart_bist_coverage` | stuck-at fault coverage (details below) |
| `tb_uart_bist_full` | the full-size test (details below) |

`tb_uart_bist_top` runs the whole design at 8 cycles per bit over 6 patterns
seeded at 508, so the generator wraps:

- a fault-free run;
- a stuck-at-0 run;
- a stuck-at-1 run;
- normal-mode transfers;
- an LFSR-mode instance running alongside.

It counts each mechanism (seed load, wrap, echo, pass, sa0 and sa1
detection, interrupt set and clear, mode switch, normal-mode transfer) and
fails if any of them never happens.

`tb_uart_bist_coverage` builds eight copies of the design, one for each data
bit. Each copy runs three tests over all 256 byte values: fault-free,
stuck-at-0 and stuck-at-1. All 16 faults are detected, each one by exactly
the 128 patterns whose bit differs from the stuck value. The fault-free runs
raise no alarm.

`tb_uart_bist_full` runs the design at its default parameters: all 512
patterns from seed 0, about 50.7 million cycles, roughly half a minute. It
checks every applied pattern and captured frame, the final verdict and the
total test length.

Each testbench has also been run against a deliberately broken copy of its
module, and each one detects the break.

To simulate one with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl --top-module tb_uart_bist_top \
          rtl/uart_bist_pkg.sv tb/tb_uart_bist_top.sv
./obj_dir/Vtb_uart_bist_top
```

Use the same command with another testbench name for any of the others. For
a lint pass over a module, run `verilator --lint-only -Wall -Irtl -y rtl
rtl/uart_bist_pkg.sv rtl/<module>.sv`.
