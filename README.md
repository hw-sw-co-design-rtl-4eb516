# Calling a streaming FFT core from C: stream engines and interface control

A C program on a host processor should be able to use a complex hardware IP
core as if it were a library function: `vfft16(dram_in, dram_out)` and
nothing else. For that to work, something on the FPGA has to fetch the input
block from shared memory, feed it to the core at the rate and with the
handshakes the core demands, collect the results, write them back, and tell
the program when it is finished. This is the approach of PaCIFIC (Parametric
C Interface For IP Cores). This RTL is the hardware side of that approach,
built around the system it was evaluated on: a streaming 16-point complex
FFT/IFFT core embedded in an FPGA next to a host CPU with shared DRAM.

Beside it stands a second, much smaller example of the same idea: the
interface controller for the "encrypt" behaviour of a crypt core. Its
controller is a state machine derived line by line from a short interface
micro-program (UCODE). The micro-program loads a key, hands over one word and
waits for the answer, with a timeout and an error exit.

```
           host register port                       local-bus master port (DRAM)
                 |                                           ^
              lb_regs ---- start, addresses, length          |
                 |  \                                   bus_arbiter
                 |   +---------------+--------------+   /        \
                 v                   v              v  /          \
        stream_engine_rd  --->  fft_if_ctrl  ---> stream_engine_wr
        (DRAM -> 256x32 FIFO)    |  ^             (256x32 FIFO -> DRAM)
                                 v  |
                           external FFT core (16 points, 82-cycle latency)

        crypt_ctrl  <---> external crypt core   (separate, own ports)
```

## One FFT run, step by step

1. The host writes SRC, DST and LEN (a multiple of 16 words), then writes
   CTRL with the start bit set. CTRL also carries the direction bit and the
   interrupt enable.
2. `lb_regs` sends a one-cycle `start` to three units at once: the source
   engine, the FFT interface control and the sink engine. Each latches what it
   needs.
3. The source engine issues read requests on the shared bus, one per cycle
   when granted. Read data come back in order and fill its FIFO.
4. Whenever a sample is waiting, `fft_if_ctrl` enables the core for one
   clock and passes the sample in. The sink engine must also be able to take
   whatever result the core shows in that clock.
5. After the last sample, `fft_if_ctrl` keeps the core running on zero
   samples until the last real result has come out. This flushes the
   pipeline.
6. The sink engine writes each result to DRAM. After the last write it
   reports done: `STATUS.done` goes high, `irq` rises if enabled, and
   `CYCLES` holds the length of the run in clocks.

All three units run at the same time. The FIFOs absorb the difference between
the bursty shared bus and the core, which wants one sample per clock.

## Keeping a clock-enabled pipeline lossless (`fft_if_ctrl`)

This is the part that needs the most care. The FFT core is a pipeline with
no flow control of its own. It is assumed to have a clock enable `fft_ce`
that freezes all of it. Each enabled clock does both of these things:

* it consumes `fft_din`;
* it retires whatever result the core is showing (`fft_dout` while `fft_dv`
  is high).

The first result appears after 82 enabled clocks. After that, every enabled
clock carries one result.

So a clock may be enabled only if both conditions hold:

* **input side:** during the input phase a sample is waiting in the source
  FIFO. During the flush phase no sample is needed; the input is zero.
* **output side:** if the core is showing a valid result, the sink engine is
  ready to take it.

The controller drives `fft_ce` with exactly this AND. Every enabled clock of
the input phase therefore pops the source FIFO. Every enabled clock with a
valid result pushes the sink FIFO. Assertions check both. A stall on either
side just freezes the core, the FIFOs and the counters together, and nothing
is lost or duplicated.

The controller counts samples still to send and results still to collect.
The run ends when the last result has been handed over. Without stalls, a run
of `len` words therefore takes exactly `len + 82` enabled clocks: 4178 for
4096 words. That equals the FFT processing time measured on the original
platform. The testbench checks the count under stalls too. An assertion
checks that the core's first valid result arrives exactly `LATENCY` enabled
clocks after `fft_start`.

The controller never needs to know the latency. It reacts to `fft_dv`, so a
core with a different latency still works; the `LATENCY` parameter is used
only by the check.

## The PaCIFIC port handshake (`hs_port`)

Every streaming connection between an engine and the IP side uses the same
handshake, implemented once in `hs_port`:

* Each end has an **outgoing line**. On an input port it means "ready to
  consume"; on an output port it means "a word is waiting". It also has an
  **incoming line**, which is the partner's outgoing line.
* The asserted level of each line is a parameter (`OUT_ACT_HIGH`,
  `IN_ACT_HIGH`).
* Either line can be left out (`USE_OUT`, `USE_IN`), giving a one-way
  handshake or no handshake at all.
* A word moves at a clock edge where **every line in use is active**. `xfer`
  flags that cycle.
* Once a line is active, it must stay active until the transfer has
  happened. Assertions check this for both ends.

All the handshake users are written to follow the hold rule. The source FIFO
stays non-empty until it is popped. The sink engine's "ready" drops only
after it has accepted all `len` words. The FFT controller's lines depend only
on state that cannot change without a transfer.

Two options exist. The engines and the FFT controller use neither.

* `OFFSET` holds the outgoing line back until `able` has been high for that
  many clocks. The count starts again after each transfer.
* `IN_IRQ` gives the incoming line interrupt semantics. An activation, even
  a single-clock pulse, is latched until this side serves it with exactly one
  transfer. No data need move with it.

The hold-rule assertions apply only to the plain level handshake.

## Stream engines and the shared bus

**Bus.** Both engines are masters on one request/grant bus
(`pacific_pkg::mem_req_t` / `mem_rsp_t`):

* A request is taken at an edge where `req` and `gnt` are both high.
* Writes are posted.
* Read data return later, in order, marked by `rvalid`.
* A request that has not been granted may be withdrawn.

**Source engine (`stream_engine_rd`).** It may have many reads in flight. It
issues a read only while FIFO occupancy plus outstanding reads is below the
FIFO depth, so every returning word has a place. This works for any read
latency.

**Sink engine (`stream_engine_wr`).** It requests a write whenever its FIFO
is not empty. It pops the head word when the write is granted.

**Arbiter (`bus_arbiter`).** It presents one master's request at a time, in
round robin.

* The turn passes after a grant. It also passes when the bus refuses the
  presented request while the other master is waiting. Without that, a bus
  that cannot take writes for a while would also block the reads.
* The arbiter stores the requester of each accepted read in a small FIFO of
  IDs (`MAX_RD` deep) and sends each `rvalid` to the master at its head.

Both engines share one port, and every sample crosses the bus twice, so a
long run moves at most one sample per two bus cycles. The end-to-end test
uses a DRAM model with an 8-cycle read latency and measured these times from
start to done:

* 16384 words, no back-pressure: 32,770 clocks. This is exactly the
  two-cycles-per-sample bound.
* 4096 words, with writes held off for 2000 clocks: about 9,700 clocks.

After the CTRL write, the first sample enters the core after 4 clocks of this
design's own logic plus the memory's read latency. The logic steps are the
start pulse, the engine start, the read request and the FIFO write. The
original stream engines needed 8 clocks for this step.

## Register map (`lb_regs`)

Word offsets on the host register port. Writes happen at the clock edge where
`cs` and `we` are high. Reads are combinational while `cs` is high.

| offset | name   | bits |
|-------:|--------|------|
| 0 | CTRL   | [0] start (write 1; reads 0), [1] inverse transform, [2] interrupt enable |
| 1 | STATUS | [0] busy, [1] done (write 1 to clear), [2] err (write 1 to clear) |
| 2 | SRC    | source word address (24 bits) |
| 3 | DST    | destination word address (24 bits) |
| 4 | LEN    | words per run (24 bits, non-zero multiple of 16) |
| 5 | CYCLES | clocks from start to done of the last run (read only) |

A start is refused, and `err` is set, if a run is in progress or LEN is not a
non-zero multiple of 16. `irq = done & irq_en`. The interrupt stays high until
`done` is cleared.

## The crypt "encrypt" controller (`crypt_ctrl`)

A call encrypts one 32-bit word. Each micro-program statement becomes a state
or an output:

| statement | hardware |
|-----------|----------|
| `posedge LOAD_KEY=1, KEY=<key>` | registered at the start edge; `LOAD_KEY` is high for one clock |
| `posedge LOAD_KEY=0` | next edge; the controller enters the transfer state at that edge |
| `level INDATA=plaintext, ACK_IN=1` | combinational outputs of the transfer state |
| `continue timeout: 16 error: INIT=0 ACK_OUT=1` | checked each clock in this order: INIT low → exception; 16 clocks waited → exception; ACK_OUT high → go on; otherwise wait |
| `posedge ciphertext=OUTDATA` | captured at the edge where ACK_OUT is seen high |
| `level ACK_IN=0` | ACK_IN drops right after that edge; the call ends (`done`, `error=0`) |
| `exception: continue INIT=1` | wait until INIT is high, then end with `done`, `error=1` |

A call answered in time takes 2 + (core latency) clocks from the start edge.
A core latency of up to 15 clocks is accepted. With a latency of 16, the
16-clock timeout has already expired when ACK_OUT appears.

## Parts outside this RTL

These parts are not designed here. Their pins are ports of `pacific_top`.
The testbenches use behavioural models for them; the models are not
synthesizable.

* **FFT core** (`tb/fft16_model.sv`). The real core is a vendor netlist.
  Only its function, bus width and latency are known; its pin set is assumed
  here: `fft_start`, `fft_ce`, `fft_fwd_inv`, `fft_din`, `fft_dout`,
  `fft_dv`. The model computes the DFT of each 16-sample frame (or the
  inverse DFT), divided by 16 and rounded. Samples are `{re[15:0], im[15:0]}`
  in two's complement.
* **Crypt core** (`tb/crypt_model.sv`). Only its pins are known. The model
  uses a stand-in cipher, `rotl(x ^ key, 5) + key`, and has a settable
  answer latency.
* **DRAM behind the host bridge** (`tb/dram_model.sv`). It has a settable
  read latency and grant rate, and can hold back writes to create
  back-pressure.
* **Not modelled at all:** the host CPU (the testbench acts as the host), the
  PCI/local-bus bridge (its protocol is replaced by the simple bus above), and
  the compression core of the compress → crypt example (it is known only by
  name).

## Sizes

| parameter | default | where |
|-----------|---------|-------|
| data word | 32 bits (16-bit real + 16-bit imaginary) | `pacific_pkg::DATA_W` |
| stream FIFO | 256 × 32 per engine | `FIFO_DEPTH`, engine `DEPTH` |
| FFT latency | 82 enabled clocks | `FFT_LATENCY`, `fft_if_ctrl.LATENCY` |
| word address | 24 bits (64 MB of DRAM) | `ADDR_W` |
| run length | up to 2^24 − 1 words | `CNT_W` |
| crypt key / timeout | 10027821 (decimal) / 16 clocks | `crypt_ctrl` |

The two FIFOs hold 16 Kbit, which is four 4-Kbit block RAMs on the original
FPGA. The original implementation of the stream engines and interface
control used four block RAMs as well.

## Where this design departs or chooses

* The FFT core's pins, and the assumption that a clock enable freezes the
  whole core, are assumptions. A core without a clock enable would need the
  FIFOs to guarantee a whole run without gaps instead.
* The bus protocol, the arbitration policy, the register map, the
  length-must-be-a-multiple-of-16 rule and the CYCLES counter are this
  design's own.
* The fixed crypt key is written without a radix in its source and is read
  here as decimal. The crypt controller's caller interface (start / done /
  error) stands in for the generated C function.
* The handshake offset is read as a delay after `able`, counted per
  transfer. Offset and initial latency are not told apart. The interrupt
  option is read as a latched rising activation.
* The original system ran the FPGA at 27 MHz. No timing constraint is part
  of this RTL.
* Reset is asynchronous and active low (`rst_n`) everywhere.

## Simulating

Every testbench checks its own results. It prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_sync_fifo` | random traffic against a queue model; full, empty, push and pop while full |
| `tb_hs_port` | all 16 line/polarity configurations, exhaustively |
| `tb_stream_engine_rd` | data order, FIFO filling under a slow consumer, one word per clock at full rate |
| `tb_stream_engine_wr` | memory contents, back-pressure, one word per clock at full rate |
| `tb_bus_arbiter` | read routing with reads outstanding from both masters, round robin |
| `tb_fft_if_ctrl` | results against a DFT, `len + 82` enabled clocks, 4178 clocks for 4096 words, stalls from both sides, both directions |
| `tb_lb_regs` | register map, refused starts, interrupt, counter |
| `tb_crypt_ctrl` | key pulse, handshake, latencies 0–15, timeout, INIT error, recovery |
| `tb_pacific_top` | end to end at default sizes, with crypt calls on the side. Runs through DRAM: 4096 words forward, 512 words inverse, 16384 words forward. Also covers both FIFOs filling, bus contention, interrupts, start-up latency and a refused start |

Example, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pacific_pkg.sv \
    tb/tb_pacific_top.sv --top-module tb_pacific_top -Mdir obj_top
./obj_top/Vtb_pacific_top
```

Replace the testbench name to run another one. Each testbench runs in well
under a second.

To lint a module, use `verilator --lint-only -Wall -Irtl rtl/pacific_pkg.sv
rtl/<module>.sv`. Lint reports these warnings, which are harmless:

* `SYNCASYNCNET`: the asserts use `rst_n` as a synchronous disable.
* `UNUSEDSIGNAL`: some status outputs are left open in the top.
