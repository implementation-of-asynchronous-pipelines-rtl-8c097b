# A clockless 2-phase micropipeline for FPGAs, with a UART and a FIR filter built around it

Most pipelines move data on the edges of one global clock, so every stage must finish within
the slowest stage's time, and the clock must reach every register with little skew. A
*micropipeline* drops the global clock. Each stage has a request/acknowledge handshake with its
neighbours, and a data item (a *token*) moves forward as soon as the next stage is free.

This makes the pipeline elastic. Tokens spread out when traffic is light and bunch up behind a
slow receiver. Flow control comes for free: a full pipeline simply does not acknowledge.
Stages that have no token do not switch.

The design here targets FPGAs, where hazard-free asynchronous control is hard to build. Its
stage controller is one latch whose enable comes from its own output, which fits in a single
LUT. Its data registers are ordinary flip-flops, of which an FPGA has plenty.

The design has two applications:

* a **FIR filter** (60 taps) that takes its samples from the micropipeline;
* a **UART transmitter and receiver** that stage bytes through FIFO, hold register and shift
  register, so frames go out back to back.

## The handshake: 2-phase bundled data

Every link between two parties has a bundle of data wires plus two control wires, `req` forward
and `ack` backward. Signalling is by *transition*: each toggle of `req`, up or down, announces
one item, and each toggle of `ack` answers it. A cycle runs like this:

1. The sender sets the data, lets it settle, then toggles `req`.
2. The receiver takes the data. The sender must keep the data unchanged until:
3. the receiver toggles `ack`. The sender may now change the data again.

A link is idle when `req == ack`, and has an item in flight when `req != ack`. *Bundled data*
means there is no completion detection on the data. The sender's `req` is delayed on purpose
so that it never arrives before the data it stands for.

Every handshake port in this design follows this rule: the pipeline's `rin/ain` and
`rout/aout`, the FIR filter's `x_req/x_ack` and `y_req/y_ack`, and the top's `in_*` and `y_*`.

## How a token moves through the pipeline

```
        din ──► [REG 0] ──────────────► [REG 1] ──────────────► [REG 2] ──► dout
                   ▲                       ▲                       ▲
                   │ load on every         │                       │
                   │ edge of ro0           │                       │
   rin ───────► (DLQ 0) ro0 ─[delay]─► (DLQ 1) ro1 ─[delay]─► (DLQ 2) ro2 ─[delay]─► rout
   ain ◄──────── ro0 ◄──── ao0 = ro1 ◄─────── ao1 = ro2 ◄──────────── ao2 = aout
```

Each stage (`async_stage`) has a controller `async_dlq` and a register `async_detff_reg`.

**Controller.** The controller is a level-sensitive latch with `D = rin` and `Q = ro`. It is
transparent exactly while `ro == ao`, that is, while the stage is empty: its last output has
been acknowledged by the next stage. So:

* When a request toggles `rin` while the stage is empty, the toggle passes straight to `ro`.
* `ro` now differs from `ao`, which closes the latch. The stage holds its token, and any
  further toggle on `rin` waits.
* When the next stage takes the token, its own `ro` toggles. That signal is this stage's `ao`,
  so `ro == ao` again, the latch reopens, and a waiting request passes at once.
* `ro` is also the acknowledge to the previous stage (`ain = ro`): copying the request forward
  *is* the acknowledgement backward.

**Delay element.** Between stages the request passes through `async_delay`, which must be
longer than the data path beside it. It is also placed on the final `rout`, so `dout` has
settled when the receiver sees the request.

**Emptiness and capacity.** At reset every `ro` is 0 and every stage is empty. A pipeline of
`STAGES` stages holds `STAGES` tokens. With a stalled receiver the sender gets exactly
`STAGES` acknowledges, and the next request stays unanswered until `aout` toggles. The
pipeline testbench checks exactly this.

### Why the register is double-edge and XOR-encoded

With transition signalling, a rising *and* a falling edge of `ro` each carry a token, so the
register must load on both edges. FPGA flip-flops load on one edge, so `async_detff_reg` uses
two banks:

```
posedge ro:  q_rise <= d ^ q_fall
negedge ro:  q_fall <= d ^ q_rise
q = q_rise ^ q_fall
```

The more obvious design selects the last-written bank with `ro` through a multiplexer. That
version fails in a real pipeline. When stage *k+1* acknowledges, stage *k*'s `ro` may toggle in
the same instant. The multiplexer then briefly shows stage *k*'s *older* bank, and stage *k+1*
can capture that stale word.

In the XOR form, `q` changes only when a bank is written, never on an edge of `ro` alone. The
cost is `2 × WIDTH` flip-flops per stage.

### Timing constraints an implementation must meet

The RTL is self-timed, so synthesis cannot check its timing. Whoever places it on an FPGA
must make sure of three things:

* **Bundling.** Each delay element is longer than the data path from one register to the next,
  plus the next register's setup time.
* **Hold.** A register's input may change only after that register has captured it. The new
  data comes from the previous stage, which can update only after this stage's `ro` has toggled
  and passed through that stage's latch. That latch delay is the hold margin.
* **Latch and loop.** `async_dlq` is a real latch with a combinational feedback loop. Lint and
  synthesis report the latch and a logic loop. Both are intended. Keep each controller in one
  LUT so that it stays glitch-free.

In simulation, `async_delay` is a behavioural transport delay (`DELAY_NS`, 1 ns by default).
On silicon it would be a LUT chain or a constrained route.

## FIR filter on the pipeline's output

`fir_filter` computes `y[n] = Σ_{i=0}^{TAPS-1} x[n-i]·h[i]`, with `TAPS = 60`. It has five parts:

| part | what it is |
|---|---|
| delay line | shift register of the last 60 samples; shifts only when a new sample is taken |
| H[i] | 60 signed coefficients, written through `coef_we/coef_addr/coef_data`, cleared by reset |
| multiplier | one signed multiplier, `x[n-i]·h[i]` |
| accumulator | sums the 60 products of one output, one per clock |
| buffer | holds `y[n]` until it is acknowledged |

The filter's input handshake connects directly to the micropipeline's output. `x_req` (the
pipeline's `rout`) and the result acknowledge `y_ack` each pass through two synchronising
flip-flops. The data needs no synchroniser: by the handshake rule it is stable until `x_ack`
toggles.

**The buffer is the flow control.** A new sample is taken only when a sample is waiting
(`x_req ≠ x_ack`) *and* the buffer is free (`y_req == y_ack`). A consumer that does not
acknowledge therefore stops the filter. The filter then stops acknowledging the pipeline, the
pipeline fills up, and the sender upstream is held back. The top-level testbench makes this
chain of stalls happen on purpose.

**Latency.** `y_req` toggles `TAPS + 4` clocks after `x_req`:

* 2 clocks of synchronisation;
* 1 clock to shift the sample in;
* 60 clocks of multiply-accumulate;
* 1 clock to fill the buffer.

Throughput is one sample per `TAPS + 2` clocks or so, plus the time the consumer takes to
acknowledge.

The datapath is 8-bit samples and 8-bit coefficients in two's complement, with a 22-bit
accumulator (`8 + 8 + clog2(60)`), which cannot overflow.

## UART

The frame, LSB first, is: start bit (0), 8 data bits, even parity bit (when parity is on), and
one or two stop bits (1). That is 11 bits with parity and one stop bit. One bit lasts
`CLKS_PER_BIT` clocks (16).

### Transmitter: FIFO → THR → TSR

```
tx_in/wr ─► uart_fifo ─► uart_thr ─► uart_tsr ─► tx_out
              (T1)         (T2)        (T3)
```

* **`uart_fifo`** (16 bytes) shows its head byte at all times. `check` means a byte is
  available. A write while `full` is refused.
* **`uart_thr`** (hold register). It keeps `lsr = 1` while empty. It pulls the FIFO's head byte
  (`send` is the FIFO read strobe) as soon as it is empty, and `lsr` drops to 0.
* **`uart_tsr`** (shift register). It reports `tsr_empty` when idle, and also during the *last
  clock of the last stop bit*. In that cycle it takes the THR's byte, and the THR refills from
  the FIFO in the same cycle.

So a full FIFO drains as unbroken back-to-back frames, exactly `(10 + prty + stop) ×
CLKS_PER_BIT` clocks apart. This staging is where the UART's throughput comes from.

`temp` exposes the frame register as it shifts.

Controls:

* `start` and `enable` must both be high for a new frame to begin. A frame already under way
  always finishes.
* `prty` turns the parity bit on.
* `stop` selects two stop bits.

### Receiver: sampler → RHR → FIFO, plus status register

```
rx_in ─► uart_sampler ─► uart_rhr ─► uart_fifo ─► rx_out (read with rd)
          (R1)  │ stat     (R3)        (R5)
                └────► uart_status_reg (R4) ─► error_signal
```

**`uart_sampler`** synchronises `rx_in` and waits for a falling edge. Half a bit later it checks
that the line is still low, so a shorter pulse is dropped as noise. From then on it samples in
the middle of each bit and shifts the data into its receive shift register.

In the middle of the last stop bit it does four things:

* puts the word on `data_out`;
* puts three check bits on `stat`: second stop bit, first stop bit, and parity mismatch;
* pulses `done`;
* goes back to idle, so a back-to-back frame is caught.

**`uart_status_reg`** turns `stat` into `error_signal` for each frame, while `enable` is high:

* `error_signal[0]` is a parity error;
* `error_signal[1]` is a framing error, meaning a stop bit read as 0. The second stop bit counts
  only when `stop` is set.

**`uart_rhr`** takes each finished word and writes it into the receive FIFO when the FIFO has
room (`send`). A word that arrives while the RHR still holds one overwrites it. The UART line
has no flow control, so the host must read the FIFO fast enough.

`prty` and `stop` must be set the same at both ends.

## Top level: `async_system_top`

The two paths stand side by side and share `clk` and `rst`:

| ports | path |
|---|---|
| `in_req`, `in_ack`, `in_data[7:0]` | samples into the micropipeline (2-phase) |
| `coef_we`, `coef_addr[5:0]`, `coef_data[7:0]` | FIR coefficient writes |
| `y_req`, `y_ack`, `y_data[21:0]` | FIR results (2-phase) |
| `tx_*` | UART transmitter: `tx_start`, `tx_in[7:0]`, `tx_wr`, `tx_enable`, `tx_prty`, `tx_stop` in; `tx_fifo_empty`, `tx_ff`, `tx_lsr`, `tx_temp[10:0]`, `tx_out` out |
| `rx_*` | UART receiver: `rx_start`, `rx_in`, `rx_enable`, `rx_prty`, `rx_stop`, `rx_rd` in; `rx_out[7:0]`, `rx_fifo_empty`, `rx_ff`, `rx_rhr_empty`, `rx_error_signal[1:0]` out |

`rst` is active high. It clears the pipeline asynchronously (the pipeline has no clock) and the
clocked parts on a clock edge, so hold it for at least two clocks.

Top-level parameters, with their defaults:

| parameter | default |
|---|---|
| `PIPE_STAGES` | 3 |
| `DATA_W` | 8 |
| `FIR_TAPS` | 60 |
| `COEF_W` | 8 |
| `FIR_ACC_W` | 22 |
| `UART_FIFO_DEPTH` | 16 |
| `UART_CLKS_PER_BIT` | 16 |

## Files

| file | contents |
|---|---|
| `rtl/async_delay.sv` | behavioural matched delay (simulation model) |
| `rtl/async_dlq.sv` | stage controller latch |
| `rtl/async_detff_reg.sv` | double-edge, XOR-encoded register |
| `rtl/async_stage.sv` | one pipeline stage (controller and register) |
| `rtl/async_pipeline.sv` | the micropipeline |
| `rtl/fir_filter.sv` | 60-tap FIR filter with 2-phase ports |
| `rtl/uart_pkg.sv` | frame constants, state types, parity function |
| `rtl/uart_fifo.sv`, `uart_thr.sv`, `uart_tsr.sv`, `uart_transmitter.sv` | transmitter |
| `rtl/uart_sampler.sv`, `uart_status_reg.sv`, `uart_rhr.sv`, `uart_receiver.sv` | receiver |
| `rtl/async_system_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A time or cycle watchdog ends
a hung run as a failure. The commands below are for the top; for any other module, use its
`tb_<module>`:

```sh
verilator --binary --timing --assert -Wno-fatal --top-module tb_async_system_top \
    -y rtl -y tb -Irtl rtl/uart_pkg.sv tb/tb_async_system_top.sv -o sim
./obj_dir/sim
```

`--timing` is needed because of the delay elements and the testbench delays. Include
`rtl/uart_pkg.sv` explicitly, as above, for anything that uses the UART.

`tb_async_system_top` runs the whole design at its default parameters, in a few seconds. It
does the following:

* streams 90 random samples through the micropipeline into the filter, and checks each result
  against a direct evaluation of the sum;
* stalls the result consumer several times, so the filter buffer, the filter input and the
  pipeline all back up;
* loops `tx_out` into `rx_in` and sends 40 bytes, more than the transmit FIFO holds, so frames
  go back to back and both FIFOs report full;
* drives a frame with bad parity and one with a broken stop bit into the receiver.

It counts each of these mechanisms and fails if any of them never happened. The block
testbenches check the finer rules:

* controller truth table;
* double-edge capture;
* pipeline capacity, blocking when full, and forward latency (one delay element per stage);
* FIFO overflow and underflow against a queue model;
* exact frame periods for every `prty`/`stop` setting;
* sampler noise rejection;
* the FIR impulse response (a single 1 plays back `h[0..59]`) and the `TAPS + 4` latency.

## What follows the original design and what does not

These parts follow the original design:

* the pipeline structure: a latch controller per stage, the acknowledge taken from the stage's
  own output, a delay element between stages, and flip-flop registers loaded by the controller;
* the 2-phase bundled-data protocol;
* the 60-tap filter organised as delay line, coefficients, multiplier, accumulator and buffer,
  where the buffer enables the delay line;
* the UART block structure, and the port names on those blocks: FIFO, THR with its LSR flag,
  and TSR on the transmit side; sampler, RHR, receive FIFO and status register on the receive
  side;
* back-to-back transmission;
* the 11-bit frame and the 8-bit hold registers.

These are choices made here, where the original gives no detail:

* **Pipeline size and delay.** Pipeline depth 3 and width 8, and the delay value. The
  XOR-encoded double-edge register. Stages carry data unchanged: any processing between stages
  is left to the user.
* **Top-level connection.** The pipeline drives the filter directly.
* **FIR details.** Data and coefficient widths, the coefficient write port, one shared
  multiplier iterating over the taps, and the two-flip-flop synchronisers.
* **UART format.**
  * Bit order is start, data, parity, stop. One description of the frame lists the parity bit
    before the data, but the shift-register description puts parity after the data, and that
    order is used.
  * Even parity; `prty` turns parity on; `stop` selects two stop bits.
  * 16 clocks per bit. There is no baud-rate generator: the bit rate is `clk / 16`.
  * FIFO depth 16, with first-word-fall-through reads.
* **UART control and errors.**
  * `start` and `enable` are read as enables.
  * The status register flags only parity and framing errors.
  * The RHR overwrites a held word when a new one arrives.
* **Ports not in the original block diagrams.** The sampler also has `prty`, `stop` and `done`;
  the RHR has `load` and `push`; the THR has `lsr` as an output; the status register has a reset.
* **No word-length setting.** The original mentions a line control register that sets the word
  length, but does not describe it; the word length is fixed at 8 bits.

**Resource counts differ.** The original reports 24 flip-flops, 1 LUT and 19 I/O for its
proposed pipeline, without stating the pipeline size. At the defaults here the pipeline uses
48 flip-flop bits, because the registers load on both edges, plus 3 latch bits and 21 I/O bits.
A LUT count needs a mapping to a specific FPGA and is not given here.

**Not included.** The original compares its pipeline against MOUSETRAP, a pipeline style with
transparent data latches and a separate XNOR gate per stage. MOUSETRAP is only the baseline of
that comparison and is not part of this design.
