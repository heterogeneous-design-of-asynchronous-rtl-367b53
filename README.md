# Pausible-clock interface for heterogeneous systems

Two synchronous modules that run from unrelated clocks (say a processor at
2.2 GHz and a peripheral at 1.6 GHz) must exchange 32-bit words. The usual
answer is a dual-clock FIFO with synchronizer flip-flops, which trades
latency for a small but non-zero chance of metastable failure. This design
removes that chance instead of shrinking it:

* between the two modules, words travel through **self-timed micropipeline
  FIFOs**. They have no clock at all; every stage hands its word on with a
  request/acknowledge handshake.
* each module's clock comes from its own **ring oscillator that can be
  paused**. The ring is closed through a mutual-exclusion element (mutex).
  When a handshake signal from a FIFO changes, it competes for that mutex
  with the clock. If it wins, the next rising clock edge simply waits while
  the handshake is latched. The synchronous logic therefore never samples a
  signal that is changing, and no synchronizer is needed.

The RTL also contains the small asynchronous cell library the interface is
built from (C-element, transparent latch, mutex, toggle, select), and the
ring-oscillator test structure used to size those cells.

```
           side A                                                side B
   +-------------------+        fifo_ab (4 stages)        +-------------------+
   | sync    PCC A     | --req/data-->[][][][]--req/data--> |  PCC B    sync    |
   | module  (clock A) | <--ack-------            <--ack--- | (clock B) module  |
   |                   |        fifo_ba (4 stages)        |                   |
   |                   | <--req/data--[][][][]<-req/data-- |                   |
   +-------------------+ ---ack------>          ---ack---> +-------------------+
```

The synchronous modules are outside this RTL. Each side talks to its PCC
(pausible clocking control) through a plain valid/ready word interface,
clocked by the `sysclk` that the PCC produces.

## The pausible clock (`pcc`)

This is the least conventional part, and the one to understand before
changing anything.

```
     FIFO handshakes                                   +-------------+
  rx_req/rx_ack, tx_req/tx_ack  +---------+   mreq     |             |  grant  +-----------+
  ----------------------------->| async   |--rq_rx--> [arbiter]-->r2 |  mutex  |--g1---->| clock gen |--> sysclk
                                | state   |--rq_tx-->  |  <--mgnt--  |         |         | (ring)    |
  sync side <-- rx_data,valid --| machine |<-gt_rx--   |          r1 |         |<--rclk--|           |
            --> tx_data,valid ->|         |<-gt_tx--   +-------------+         +-----------+
                                +---------+
```

**Clock loop.** The clock generator is a delay line that inverts its input.
Its output `rclk` is the ring's request for the next high phase. It goes
into input `r1` of the mutex, and the mutex output `g1` goes back into the
delay line. `sysclk` is `g1` after a clock buffer. With nothing else
asking, the loop runs freely:

```
g1 rises -> (half period) -> rclk falls -> g1 falls
g1 falls -> (half period) -> rclk rises -> g1 rises, if the mutex is free
```

Every `HALF_PERIOD_PS` (227 ps by default) gives a 454 ps period (2.2 GHz).

**Pausing.** The other mutex input `r2` carries handshake requests. The mutex
can only be taken while `g1` is low, which means while `sysclk` is low. While
a handshake holds it, a rising `rclk` has to wait, so the low phase of
`sysclk` is stretched. It ends when the handshake lets go. The clock is never
cut short, only delayed.

**Events become requests.** The asynchronous state machine (`pcc_async_fsm`)
turns every edge of a FIFO handshake signal into a request, by comparing the
signal with the value it last latched:

* receive channel, a FIFO output: `rq_rx` is high when `rx_req` rose and the
  one-word receive register is free, or when `rx_req` fell and `rx_ack` is
  still high.
* send channel, a FIFO input: `rq_tx = tx_ack ^ ack_seen`.

A small arbiter (`pcc_arbiter`, itself a mutex) lets one of the two requests
through to the clock mutex at a time. It routes the grant back to the
winner. Inside the grant, latches open. For the receive channel, one latch
updates the word, a `got` flag and `rx_ack` together. For the send
channel, `ack_seen` is latched. Each latch update clears its own request,
which ends the grant, and the clock goes on. If the other port was waiting,
it inherits the paused clock at once.

The receive update is deliberately a single latch. A split version, with
`rx_ack` in its own latch that opened once `rx_valid` rose, has a race:
the rise of `rx_valid` both opens that latch and withdraws the request, so
the grant may end first. The acknowledge is then lost and the word is read
twice. In gate-level form, `rx_ack` still has to be delayed until the data
latch has closed, because the FIFO may change its data as soon as it sees
the acknowledge.

**What the synchronous side sees.** Everything it samples is either a
flip-flop on its own clock, or a latch that changes only inside a grant,
while the clock is held low:

* `rx_valid = got ^ taken`. Here `taken` is a flip-flop that toggles when
  the module consumes a word with `rx_take` on a rising `sysclk` edge.
* `tx_ready` is high when no word is pending or in flight. A word is taken
  on a rising edge when `tx_valid && tx_ready`. It is driven to the FIFO as
  `tx_fdata`. `tx_req` rises one clock later, so the data is set up a full
  cycle before its request (the bundled-data rule). `tx_req` falls on the
  first edge after the acknowledge has been latched.

Both FIFO channels use the four-phase protocol. From the PCC's side, every
edge is an event: a rising `req` brings a word, and a falling `req` only
returns the handshake to zero. Each of these edges takes one pause. A word
therefore costs up to four pauses on each side: two for the receiver and
two for the sender's acknowledge.

**Setup margin.** `sysclk` lags the mutex grant by the clock buffer delay
(`BUF_PS`, 20 ps). So the last latch change before a rising edge comes at
least that long before the edge. `tb_pcc` checks this margin.

**Zero-delay caveat.** The PCC logic (state machine, arbiter, mutex) is
zero-delay RTL. A grant therefore opens and closes within one simulation
time step. In simulation the clock is paused, but for zero time, and the
low phases keep their nominal length. In silicon the pause lasts as long as
the gates inside the grant take. `tb_pcc_clock_gen` shows the stretching
itself by holding the mutex from the testbench.

**Mutex ties.** A real mutex resolves requests that arrive together through
a metastability filter. `mutex` settles a tie in favour of `r1` (the clock),
deterministically. This cannot hide a functional error here, because the
losing request simply waits for the next low phase.

## The micropipeline FIFO (`mp_fifo`, `mp_stage_ctrl`)

The FIFO has four stages of 32 bits. Each stage has one control and one
transparent data latch. The control is a Muller C-element:

```
c[i] = C( req into stage i , ~c[i+1] )      rout = ain = c[i],   latch enable = ~c[i]
```

A stage is empty while `c[i]` is low, and then its latch is transparent. When
a request arrives and the next stage is empty, `c[i]` rises. This closes the
latch on the word, acknowledges the previous stage and requests the next. The
word thus ripples forward through all empty stages with no clock. `clear`
resets every C-element, which empties the FIFO.

Both sides use four-phase handshakes with bundled data:

* input side: set `data_in`, then raise `req_in`. `ack_out` rises. Lower
  `req_in`. `ack_out` falls.
* output side: `req_out` rises with `data_out` valid. The receiver raises
  `ack_in`, `req_out` falls, and the receiver lowers `ack_in`.

In a four-phase C-element pipeline a token is followed by a bubble. The
four stages therefore hold at most **two words**, counting the one waiting
at the output. The testbench measures this.

**Timing and the bundled-data rule.** The C-element and the latch carry the
propagation delays of their library cells (next section). A C-element rises
in 142 ps, but a latch passes a falling bit in 203 ps. So a bare C-element
chain would deliver `req_out` before the last bits of `data_out`. Each
stage therefore delays its outgoing request by a further `REQ_DLY_PS`
(70 ps, an assumed margin), so a request takes 212 ps per stage, against at
most 203 ps for data. Through an empty four-stage FIFO this gives:

| path                  | this model                 | transistor-level figure of the original |
|-----------------------|----------------------------|-----------------------------------------|
| `req_in` → `req_out`  | 4 × 212 = 848 ps           | 0.73 ns                                 |
| `data_in` → `data_out`| 520 ps rising, 812 ps falling bit | 0.62 ns                          |
| sustained word period | 676 ps (1.48 GHz)          | about 1.6 GHz                           |

The lumped cell delays ignore load, slew and wiring, so these figures agree
only roughly. `tb_mp_fifo_latency` checks the model's own numbers. It also
checks that the word period lies between the 644 ps that two neighbouring
stages need for one cycle of their handshake ring, and the 848 ps crossing
time.

## Cell library

| module        | cell         | behaviour                                                                 |
|---------------|--------------|---------------------------------------------------------------------------|
| `muller_c`    | Muller-C     | output copies the inputs when they agree, holds otherwise; `cdn` clears   |
| `trans_latch` | Trans-latch  | transparent while `en` is high                                            |
| `mutex`       | Mutex        | at most one of `g1`/`g2` high; a grant is kept until its request falls    |
| `toggle`      | Toggle       | input transitions go alternately to `y1` and `y2` (`y1` = input / 2)      |
| `select`      | Select       | an input transition goes to `yt` if `sel` is high, to `yf` if low         |

State is kept in `always_latch` processes, so lint tools report latches and
combinational loops. In a self-timed circuit these are the storage, not
mistakes. Clear inputs are active low (`cdn`). For `toggle` and `select`,
release the clear while the input is low.

`muller_c` and `trans_latch` model the characterized propagation delays of
the 0.25 µm cells. These are parameters `RISE_PS`/`FALL_PS`: 142/110 ps for
the C-element and 130/203 ps for the latch. Each is an inertial delay at
the output, so a pulse shorter than the delay is swallowed. Synthesis
ignores the delays. The other cells (mutex 130/216 ps, toggle 143/216 ps,
select 235/248 ps in silicon) are zero-delay here. Their role in the
pausible clock depends on a mutex with a metastability filter, which a
delay model would not capture faithfully.

## Ring-oscillator test structure (`ring_osc`, `divider256`)

The ring is a three-input NAND (`select`, `enable` and the feedback) followed
by 20 inverting stages, 21 stages in all. It is read out through an
isolation buffer and a divide-by-256 counter. `ring_osc` is a behavioural
delay model: its period is `2 * 21 * STAGE_PS`, and the 60 ps stage delay is
an assumed value. `divider256` is a ripple chain of eight toggle cells. Its
`count` output holds (256 − n) mod 256 after n input periods, because each
toggle fires on its input's rising edge. This structure is not connected to
the interface. The top module carries it beside the interface with its own
pins, together with one stand-alone `select` cell.

## Modules and parameters

| module             | kind                 | parameters (default)                                   |
|--------------------|----------------------|--------------------------------------------------------|
| `hetero_interface` | top                  | `WIDTH` 32, `STAGES` 4, `HALF_PERIOD_A_PS` 227, `HALF_PERIOD_B_PS` 313 |
| `pcc`              | synthesizable + model| `WIDTH` 32, `HALF_PERIOD_PS` 227                       |
| `pcc_async_fsm`    | synthesizable        | `WIDTH` 32                                             |
| `pcc_arbiter`      | synthesizable        | –                                                      |
| `pcc_clock_gen`    | behavioural model    | `HALF_PERIOD_PS` 227, `BUF_PS` 20                      |
| `mp_fifo`          | synthesizable        | `WIDTH` 32, `STAGES` 4                                 |
| `mp_stage_ctrl`    | synthesizable + delay| `REQ_DLY_PS` 70                                        |
| `muller_c`         | synthesizable + delay| `RISE_PS` 142, `FALL_PS` 110                           |
| `trans_latch`      | synthesizable + delay| `WIDTH` 1, `RISE_PS` 130, `FALL_PS` 203                |
| `mutex`, `toggle`, `select` | synthesizable | –                                                  |
| `ring_osc`         | behavioural model    | `STAGES` 21, `STAGE_PS` 60, `BUF_PS` 40                |
| `divider256`       | synthesizable        | `BITS` 8                                               |

"Synthesizable" here means latch-based asynchronous logic. It maps onto
latches and gates, but a real implementation would use the characterized
cells, and timing must be checked with delay-annotated simulation.

Top-level ports of `hetero_interface`, per side `x` = `a` or `b`:

* `en_x` starts the side's ring. `sysclk_x` is the side's clock. `pause_x`
  is high while a handshake holds that clock.
* `x_tx_data`, `x_tx_valid`, `x_tx_ready`: sending. A word is accepted on a
  rising `sysclk_x` edge when valid and ready are both high.
* `x_rx_data`, `x_rx_valid`, `x_rx_take`: receiving. The word is consumed on
  a rising `sysclk_x` edge with `x_rx_take` high.
* `clear`: active-high reset of both FIFOs and both PCCs. Pulse it after
  power-up, because the PCC flip-flops reset on its rising edge.
* `osc_*`, `sel_*`: the test structure and the stand-alone Select cell.

## Simulation

All files carry `` `timescale 1ps/1ps ``, and the clock models need timing
support. Any testbench in `tb/` builds the same way, for example the
end-to-end test at full size:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb tb/tb_hetero_interface.sv --top-module tb_hetero_interface
./obj_dir/Vtb_hetero_interface
```

Each testbench ends with `TB_RESULT checks=N failures=M` and has a
watchdog. What they check:

* `tb_hetero_interface`: runs at default parameters. It sends 200 random
  words each way at the same time, with 2.2 GHz and 1.6 GHz clocks and random
  take/send timing. It checks order and values in both directions, the
  nominal idle clock periods, idle state after traffic, and that `clear`
  empties a channel with a word in it. It also checks the ring period, the
  divide-by-256 output and Select steering. It counts clock pauses on both
  sides, sender back-pressure (`tx_valid` with `tx_ready` low), and
  receive-register holds. A mechanism that never happened counts as a
  failure. On both sides it also checks that what the synchronous module
  samples changes only while its clock is held.
* `tb_hetero_clock_ratios`: five complete interfaces side by side, at
  different clock pairs: the default pair, the pair swapped, equal clocks,
  and 5:1 in each direction (the ring length sets the frequency, so any
  ratio must work). Each exchanges 100 random words each way under random
  stalls, with the same delivery, pause and sampling-window checks. It uses
  the helper `hetero_ratio_run`.
* `tb_pcc`: checks the PCC against testbench FIFOs. It checks the idle
  period, at least three pauses per word, and in-order words. It also checks
  that latched handshake state changes only while the mutex withholds the
  clock, and never within `BUF_PS` before a rising edge.
* `tb_pcc_async_fsm`, `tb_pcc_arbiter`, `tb_pcc_clock_gen`: test the state
  machine, the arbiter and the clock model in isolation. The clock test
  includes a stretched low phase.
* `tb_mp_fifo`: streams 300 words with random four-phase timing against a
  scoreboard. It also checks the two-word capacity with a stalled receiver,
  and `clear`.
* `tb_mp_fifo_latency`: the default FIFO's request and data latency, the
  bundled-data order at its output, and its sustained word period.
* `tb_mp_stage_ctrl` and the cell testbenches check against reference
  models, and check the cells' rise and fall delays.

Random stimulus uses `$urandom`. Two-state simulation starts undriven
variables at random values, so every testbench pulses its resets.

## How far to trust it, and where it departs from the original

* **Timing is modelled only in part.** The FIFO cells carry lumped cell
  delays, and its latencies come out near the transistor-level figures, but
  not on them (see the table above): the request path is 16% slow, and the
  rate is 1.48 GHz against about 1.6 GHz. The request margin `REQ_DLY_PS` is
  an assumption. The PCC logic is zero-delay, and only its clock model has
  delays.
* **Four-phase handshakes.** The micropipeline could be built two-phase or
  four-phase. This RTL is four-phase throughout, with a single C-element per
  stage and latches that are transparent when a stage is empty. As a result
  a four-stage FIFO holds two words.
* **State machine contents are this design's.** The receive register, the
  flow control that keeps a full register from being overwritten, the
  valid/ready interface and the one-cycle data set-up on the send side are
  all choices made here. So is the arbiter built as a mutex.
* **Side B's clock** (313 ps half period) is an arbitrary second frequency.
  Only the 2.2 GHz clock comes from the original.
* **Clock stretching is invisible in zero-delay simulation.** See above.
  Pauses are counted through `pause_x`.
* **Not built:** the synchronous modules and the processor/peripheral they
  stand for; the pad ring and layout; the capture-pass FIFO the
  transparent-latch FIFO was compared with; and the characterization flow.
* **Stage and buffer delays** of `ring_osc` (60 ps, 40 ps) and the clock
  buffer of `pcc_clock_gen` (20 ps) are assumed values.

## Changing it

* Clock frequencies: `HALF_PERIOD_A_PS` and `HALF_PERIOD_B_PS`. Period = 2 ×
  half period.
* Width: `WIDTH` (all blocks pass it down). Depth: `STAGES`. The capacity
  is `STAGES/2` words, rounded up.
* To see real pauses and stretching, give the mutex and the state-machine
  latches delays in a timing-annotated netlist simulation. The functional
  RTL deliberately has none.
* Cell delays: the `RISE_PS`/`FALL_PS` defaults of `muller_c` and
  `trans_latch`. `mp_fifo` does not pass them down, so a new process means
  new defaults. Keep the C-element rise plus `REQ_DLY_PS` at least as large
  as the slower latch delay, or the FIFO output request will lead its data.
  Setting all of them to 0 gives a purely functional FIFO.
