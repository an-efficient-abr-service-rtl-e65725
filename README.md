# ABR service engine for an ATM switch port

An ATM switch that offers the Available Bit Rate (ABR) service has to tell
every ABR source how fast it may send. Sources periodically send resource
management (RM) cells. Each RM cell carries the source's current cell rate
(CCR), its minimum cell rate (MCR) and an explicit rate (ER) field. The
destination turns each RM cell around, and any switch on the way back may
lower the ER field or set the NI (no increase) and CI (congestion indication)
bits. This RTL does that work for one output port, at line rate and without
holding up any cell.

The approach follows the architecture published as "An Efficient ABR Service
Engine for ATM Network". It does not track per-connection state. Instead it
keeps two aggregate quantities:

* **QL_ave**: the queue length averaged over a period T.
* **QC**: an estimate of how many connections are queuing at the port. It is
  rebuilt every period W from the forward RM cells that pass.

Every T period a small floating-point datapath computes one ER from these two
quantities. That ER is then written into every backward RM cell that asks for
more. The arithmetic runs in the background, so the cell paths only compare,
substitute bytes and recompute a CRC.

```
             queue_len      total_conn (TC)        host bus
                 |               |                    |
   +-------------+---------------+--------------------+-----------+
   |  abr_timer: cell_tick, t_tick (T), w_tick (W)   abr_regfile  |
   |                                                              |
   |  ql_average --sum,count--> er_engine <--QC, corrector--+     |
   |                              |  ER, delta*ER           |     |
   |                              v                         |     |
   |  egress_cell --fwd RM CCR/MCR, CRC ok--> qc_estimation-+     |
   |     (EFCI on data cells)                (qci_accum,          |
   |                                           qc_compute)        |
   |  ingress_cell <--ER (rate format), NI, CI-- congestion_detector
   |     (ER/NI/CI into backward RM cells, new CRC-10)            |
   +--------------------------------------------------------------+
     eg_rx -> egress -> eg_tx                in_rx -> ingress -> in_tx
```

## The control law

### Explicit rate (`er_engine`)

Every T period the engine computes:

```
QL_ave  = sum of queue samples / number of samples
if QL_ave < ql_th:  (A, B) = start_phase ? (A0, B0) : (A1, B1)
QC_temp = max(QC + QC_corrector, 1)
ER      = ER_pre - A/QC_temp * (QL_ave - QL_ave_pre) - B/QC_temp * (QL_ave - q_T)
ER      = clamp(ER, 0, link_speed)
```

* The first correction term damps changes in the queue.
* The second term pulls the queue toward the target q_T.
* Dividing by QC_temp shares the correction among the connections that
  actually queue, which keeps the loop gain roughly independent of the number
  of connections.
* Two coefficient sets let the loop react fast after start-up. The start phase
  ends the first time QL_ave reaches `ql_th`. While QL_ave stays at or above
  `ql_th`, A and B keep their last values.

The datapath has one floating-point adder, one multiplier and one divider.
Operand multiplexers sit in front of them and result registers behind them,
and an FSM steers both. The three divisions are QL_ave, A/QC_temp and
B/QC_temp. They run back to back, and the subtractions and multiplications
are tucked under them. One computation therefore takes about three divider
latencies: 89 clocks from `start` to `done`. That is far shorter than any
sensible T.

After the ER, the engine forms two more values:

* `delta_er = delta * ER`, which goes to the QC estimator.
* The ER in 16-bit ATM rate format, which goes to the ingress cell path.

All three outputs update on the same clock.

### Queuing connections (`qci_accum`, `qc_compute`)

A connection running at CCR sends about `W * CCR / N_RM` forward RM cells in a
window W. If each of those cells adds `(N_RM/W) / CCR`, each connection adds
about 1 per window. The sum QC_i therefore counts connections. Two filters
decide which cells count:

* A cell counts only if its CRC-10 is good.
* A cell counts only if `CCR - MCR > delta * ER`. A connection held well
  below the current ER by some other bottleneck is not queuing here.

This test uses a 16-bit rate-format subtractor and comparator (`rate_alu`),
not floating point.

The division `(N_RM/W) / CCR` starts as soon as the MCR byte of a forward RM
cell has arrived. The quotient waits in a pipeline register until the last
byte brings the CRC verdict. Only then is it added or dropped. Division
(26 clocks) and addition each fit within one cell time (53 clocks), so RM
cells may arrive back to back.

Every W period the QC is updated:

```
QC_temp = QC_previous + QC_corrector
QC      = QC_temp * lambda + QC_i * (1 - lambda)
QC      = clamp(QC, 0, TC)
QC_i = 0, QC_corrector = 0
```

* The corrector adds up every increase of the total connection count TC seen
  during the window, because a new connection is assumed to queue.
* The ER engine uses `QC + QC_corrector`, so a new connection affects the ER
  immediately rather than a window later.
* `1 - lambda` comes from `one_minus_lambda`, not from an adder. With lambda
  in [0.5, 1) the exponent is fixed. The result is the inverted fraction
  field, renormalised by a shifter, and is one unit in the last place low.
  Writing a lambda outside that range makes the unit output 0 and raise
  `bad_exp`.

## Cells

Both ports carry 53-byte cells, one byte per clock, with a UTOPIA-like
handshake:

* The sender drives `valid`, `soc` and `data`.
* The receiver drives `ready`.
* A byte moves when `valid && ready` are both high.
* `soc` marks byte 0.

Each path buffers two cells in ping-pong fashion (`cell_buffer`), so a cell
leaves one cell time after it arrived. The whole cell must be held because
whether it may be modified depends on its CRC, which is known only at its
last byte. If both halves are full, `rx_ready` drops.

Field positions (byte index within the 53-byte cell):

| Field | Location |
|---|---|
| PTI | byte 3, bits 3:1. `110` = RM cell; `0x0` = data cell, where bit 2 is EFCI |
| message type | byte 6: DIR bit 7, BN bit 6, CI bit 5, NI bit 4 |
| ER, CCR, MCR | bytes 7–8, 9–10, 11–12 (16-bit rate format, big-endian) |
| CRC-10 | byte 51 bits 1:0 and byte 52. Covers bytes 5–50 and the 6 high bits of byte 51 |

The rate format is `nz * 2^e * (1 + m/512)` cells/s, with nz in bit 14, e in
bits 13:9 and m in bits 8:0.

**Egress path (`egress_cell`).** This path carries cells toward the
destinations.

* Forward RM cells sent by a source (DIR = 0, BN = 0) hand CCR and MCR to the
  QC_i accumulator, followed by their CRC verdict.
* For a data cell, if the queue exceeded `q_efci` when its header arrived,
  EFCI is set as the cell leaves.
* Nothing covered by the CRC changes, so no CRC is regenerated.

**Ingress path (`ingress_cell`).** This path carries cells back toward the
sources. It acts only on backward RM cells (DIR = 1, BN = 0) whose CRC is
good:

* ER rule: if `ER_cell > ER_engine + MCR_cell`, the ER field is replaced by
  `ER_engine + MCR_cell`. The sum is formed in rate format. Adding MCR keeps
  each connection's guaranteed minimum on top of the fair share.
* NI is set when the queue exceeds `q_ni`, and CI when it exceeds `q_ci`.
  Neither bit is ever cleared.
* If anything changed, a second CRC-10 unit recomputes the CRC over the
  outgoing payload. The new value is inserted in the last 10 bits as the cell
  leaves.

All other cells pass through unchanged, including RM cells with a bad CRC.

`crc10` is shared by the checkers and the generator. Its polynomial is
x^10+x^9+x^5+x^4+x+1. It starts from 0, takes MSB first, eight bits a clock,
and six bits for the reserved bits in front of the CRC.

## Number systems

Internally everything is IEEE-754 single precision. Two simplifications apply:

* Results are truncated, not rounded.
* Subnormals are flushed to zero, and there is no NaN or infinity.
  Division by zero gives the largest finite value.

`num_conv` converts between formats:

* integers (queue sums and counts, connection counts) → float;
* rate format (CCR, MCR) → float;
* float → rate format (ER, delta·ER). This direction truncates, gives 0 below
  1 cell/s, and saturates at the largest rate.

The operators are:

* `fp_add`: combinational, with a `sub` input.
* `fp_mul`: combinational.
* `fp_div`: restoring, one quotient bit per clock. `done` comes 26 clocks
  after `start`.
* `rate_alu`: expands both rate operands to 42-bit fixed point, adds or
  subtracts them exactly, then renormalises.

## Timing and control

`abr_timer` divides the clock by 53 (one cell on the byte bus) into the cell
time. It then counts cell times:

* `t_tick` every `T` cells;
* `w_tick` every `W` cells.

`ql_average` samples `queue_len` once per cell time and hands over sum and
count at `t_tick`. Its `valid` pulse starts the ER engine. `w_tick` closes the
QC window; the new QC is ready 4 clocks later. `congestion_detector`
registers the three threshold comparisons (EFCI, NI, CI), one clock behind
`queue_len`.

## Register map

The bus is synchronous: a write takes effect on a clock with `bus_we` high,
and reads are combinational. Floating-point registers hold IEEE-754 bit
patterns.

| Addr | Register | Format | Reset |
|---|---|---|---|
| 0, 1 | A0, B0 (start phase) | fp | 2000, 200 |
| 2, 3 | A1, B1 | fp | 500, 50 |
| 4 | ql_th | fp | 50 cells |
| 5 | q_T (target queue) | fp | 100 cells |
| 6 | link_speed | fp | 353207 cells/s (155.52 Mb/s SONET payload) |
| 7 | delta | fp | 0.9 |
| 8 | lambda, in [0.5, 1) | fp | 0.75 |
| 9 | N_RM / W (W in seconds) | fp | 3200 (N_RM = 32, W = 10 ms) |
| 10–12 | q_efci, q_ni, q_ci | integer | 200, 150, 300 |
| 13, 14 | T, W in cell times | integer | 353 (1 ms), 3532 (10 ms) |
| 16, 17, 18 | ER (fp), QC (fp), ER (rate format) | read only | |

The reset values are working defaults chosen for a 155 Mb/s port. They are
not tuned values from a reference.

## Top-level ports (`abr_engine`)

* Egress port: `eg_rx_*` and `eg_tx_*`. Ingress port: `in_rx_*` and
  `in_tx_*`. Both are byte streams as described under Cells.
* `queue_len[15:0]`: current occupancy of the port's ABR queue, in cells.
  It comes from the switch fabric.
* `total_conn[15:0]`: TC, the number of ABR connections set up on this port.
* `bus_*`: register access.
* Observation outputs:
  * `er`, `er_rate`, `qc`, `ql_ave`;
  * the strobes `er_done` and `qc_done`;
  * `ev`, a struct of one-clock event pulses (QC_i accepted or dropped, QC
    corrected, EFCI marked, backward RM seen, backward RM with bad CRC, ER
    written, ER engine busy) and the start-phase flag.

Reset (`rst_n`) is asynchronous and active low.

## Where this design makes its own choices

The published architecture gives the block structure, the ER and QC
formulas, the single shared adder/multiplier/divider, the inverter-and-shifter
`1 - lambda`, the rate-format comparators, the QC_i pipeline, the rules for
identifying cells, EFCI/NI/CI marking, and CRC checking and regeneration.
Everything below is this design's own:

* **Implementation details.** Bus protocol, register map and reset values;
  the two-cell buffer and its one-cell latency; byte offsets (the standard RM
  cell layout); CRC bit order; separate thresholds for EFCI, NI and CI.
* **Start phase.** It ends at the first period with QL_ave ≥ ql_th. A and B
  are 0 until the first period with QL_ave < ql_th.
* **Division guard.** QC_temp is floored at 1, so an empty QC estimate cannot
  blow up the divisions.
* **ER rule.** The source description adds the cell's *CCR* in one sentence
  but states the rule as `ER_cell > ER_engine + MCR_cell`. The stated rule,
  with MCR, is implemented.
* **Rounding.** Truncation everywhere, and `1 - lambda` is one ulp low.
* **Not built: switch-generated RM cells.** A switch may generate its own
  backward RM cells to signal congestion faster. This engine only marks
  passing cells.
* **Not built: other marking paths.** BECN cells (BN = 1) and forward RM cells
  on the ingress side pass untouched, and nothing clears NI or CI.
* **Not built: synthesis.** No gate-level implementation or timing closure is
  part of this RTL. At a 20 ns clock the byte-serial paths carry about
  0.9 M cells/s, well above the 353 k cells/s of a 155 Mb/s link.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
one compares the module against an independent model, prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/tb_pkg.sv` holds the
shared reference code:

* real ↔ float and real ↔ rate-format conversions;
* a bitwise CRC-10 by polynomial division;
* an RM cell builder.

Highlights:

* **Arithmetic.** Thousands of random and corner cases are checked against
  `real` arithmetic, within truncation bounds. This includes the divider's
  26-clock latency.
* **`tb_er_engine`.** Runs random periods against a `real` model of the ER
  law, including both coefficient sets, both limits and the 89-clock latency.
* **`tb_qc_estimation` / `tb_qci_accum` / `tb_qc_compute`.** Feed random RM
  cell streams with bad CRCs and failing rate conditions, check QC_i, the
  filter, the corrector and the TC limit, and check back-to-back RM cells.
* **Cell paths.** Random cell mixes, random back-pressure and corrupted CRCs.
  The testbench checks every output byte against its own prediction of the
  rewritten cell and recomputes the CRC.

`tb_abr_engine` and `tb_abr_engine_full` close the control loop around the
top level, using `tb_abr_env.sv`:

* **Model.** Several ABR sources send data cells and forward RM cells at their
  ACR, interleaved by credit. A queue model drains at link speed once per
  cell time and feeds `queue_len`. Returning backward RM cells set each
  source's ACR to the ER they carry. Receivers stall at random.
* **Scenario.** Phase 1 runs four connections plus a queue burst. Phase 2
  adds a fifth connection, which raises TC and exercises the QC corrector.
* **Settling checks.** At the end of each phase:
  * ER must be within 15 % of the fair share `link/n - MCR`;
  * QC must be within 30 % of n;
  * link use must be within 0.85–1.15.
* **Cell checks.** Every output cell is checked: data cells unchanged except
  for EFCI; backward RM cells never get a higher ER; the CRC is valid; CI
  never appears without NI.
* **Coverage.** It counts each mechanism (QC_i accepted and dropped,
  corrections, EFCI, NI, CI, ER writes, bad-CRC RM cells, back-pressure, end
  of start phase) and fails if any never occurred.
* **Sizes.** `tb_abr_engine` shortens T and W through the bus for speed.
  `tb_abr_engine_full` runs every register at its reset value over
  2 × 353,207 cell times, i.e. two seconds of the link. There, ER settles
  at 84,875 cells/s against a fair share of 84,770 with four connections, and
  at 67,220 against 67,109 with five. QC settles at 3.8 and 4.8, and the queue
  holds at q_T.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/abr_pkg.sv tb/tb_pkg.sv tb/tb_er_engine.sv --top-module tb_er_engine
./obj_dir/Vtb_er_engine
```

Replace `tb_er_engine` with any other testbench. The full-size closed-loop
run takes about a minute. The RTL uses only synthesizable
SystemVerilog: packages, structs, `always_ff`/`always_comb`, and a few
concurrent assertions on handshake rules.
