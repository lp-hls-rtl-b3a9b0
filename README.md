# Power shut-off for small accelerators: RCA, ALU and IDCT with a power management block

Logic that sits idle still leaks. The standard remedy is *power shut-off*
(PSO). The idle block goes into its own switchable power domain. A header
switch disconnects that domain's supply, and the always-on logic around it
makes the switch safe. It isolates the domain's outputs, saves any state
that must survive, gates the clock and buffers incoming data. The block that
orders these steps is the **power management block (PMB)**.

This repository holds synthesizable SystemVerilog for three example designs
built around the same PMB:

| design | what is switched off | trigger |
|---|---|---|
| `rca32_lp`: 32-bit ripple-carry adder | the upper 16-bit adder (bits 16–31) | `p_shutoff` (16-bit mode) |
| `alu_lp`: 8-function ALU | the multiplier and the divider, each in its own domain | `mp`, `dp` |
| `idct_lp`: 8×8 IDCT of a JPEG decoder | the whole IDCT | `sleep_req` from the decoder, while the IDCT is idle and its input FIFO is empty |

`lp_hls_top` places the three side by side. They share `clk` and `rst_n`.
Every other port is brought out with the prefix `rca_`, `alu_` or `idct_`.

The designs follow the example accelerators of a methodology that derives
power intent (the isolation, retention and switch rules that a back-end
flow reads as CPF or UPF) from a system-level model. The partitioning, the
PMB sequence and the role of each part follow that source. Widths, encodings,
handshakes and the IDCT's architecture are this implementation's own
choices. "Departures and choices" below lists them.

## The shut-off protocol (`pmb`)

The PMB turns one flag, `pwr_ctrl` (1 = the domain may be shut off), into
four controls. It changes one control per clock, in this order:

```
power down:   iso_en=1  ->  ret_en=1  ->  pse=0, clk_gate=1          (domain off)
power up:     pse=1, clk_gate=0  ->  [RAMP_CYCLES]  ->  ret_en=0  ->  iso_en=0   (domain active)
```

* **Isolation first, released last.** A domain that is losing or regaining
  its supply drives undefined values. `iso_en` covers the whole interval
  from before the switch opens until after the state is back.
* **Retention inside isolation.** `ret_en` rises after isolation is on and
  falls before it is released. Retained flops therefore save and restore a
  state that nothing outside can see changing.
* **Clock and supply together.** The domain's clock is gated in the same clock
  that its supply switches off, and released in the same clock that the
  supply returns.
* **Four transition clocks.** With `RAMP_CYCLES = 0` a shut-off and wake-up
  pair spends two clocks going down (states `DN_ISO`, `DN_RET`) and two coming
  up (`UP_PWR`, `UP_RET`). `RAMP_CYCLES` holds `UP_PWR` longer for a supply
  rail that needs time to charge.

`pse` follows the switch convention: 1 = header switch on, domain supplied.
All outputs are registered, and each changes one clock after the decision
that causes it. The flag is looked at only in `ACTIVE` and `OFF`, so a
sequence that has started always completes. A one-clock request therefore
costs a full power cycle. Reset puts the domain in `ACTIVE`. The PMB has no
idle-time threshold, so a caller that toggles the flag quickly pays four
transition clocks each time. Two assertions state the protocol: the supply
is never off unless isolation and retention are on, and retention is never
on without isolation.

Timing from the flag to the domain's status (`active`), as the testbenches
check it:

* **Flag raised in `ACTIVE`:** `iso_en` rises at the next clock and the
  supply is off two clocks later.
* **Flag dropped in `OFF`:** `active` returns at the third clock, counting
  the one that samples the flag (plus `RAMP_CYCLES`).

## Power-domain cells in RTL

The back-end flow inserts the isolation, retention and switch cells from the
power intent. Plain RTL simulation does not see them, so they are written
out here as small modules:

| module | kind | behaviour |
|---|---|---|
| `iso_cell` | synthesizable | `q = iso_en ? CLAMP : d`. The IDCT uses a clamp-to-1 instance for its `idle` output, so a sleeping IDCT reads as idle. |
| `clock_gate` | synthesizable (intended latch) | latch-based integrated clock gate. The enable is latched while `clk` is low, so `gclk` never carries a short pulse. |
| `power_switch` | behavioural model | `vdd` drops as `pse` falls and returns `RAMP_CYCLES` clocks after `pse` rises. |
| `ret_reg` | behavioural model | retention flop: a main register on the domain clock, plus a balloon latch in the always-on supply that is transparent while `ret_en` is low. |

`ret_reg` makes lost state visible. When the supply returns, the register is
either restored from the latch (`ret_en` high) or, if nothing restores it,
loaded with the inverted saved value. A missing retention step therefore
corrupts the simulation instead of passing silently. The IDCT keeps its
control state (phase and counter) in a `ret_reg`, so it wakes up in the
phase it was in when it went to sleep.

## The three designs

### `rca32_lp`: adder with a switchable upper half

Two 16-bit ripple-carry adders (`rca16`, chains of `full_adder`). The
carry out of the low half feeds the upper half. The upper half's sum and
carry pass through isolation cells. Two output multiplexers, selected
directly by `p_shutoff`, choose what is valid:

* `p_shutoff = 1`: `s_out = {16'h0, low sum}`, `c_out` = carry out of bit 15.
* `p_shutoff = 0`: `s_out` = full 32-bit sum, `c_out` = carry out of bit 31.

The datapath is combinational. Only the PMB is clocked. After `p_shutoff`
falls, the upper half is still isolated for the wake-up clocks, and its bits
read 0 in that window. `msb_ready` tells when 32-bit results are valid
again. The adder has no state, so retention is not used.

### `alu_lp`: ALU with switchable multiplier and divider

Eight function units share the operands `a` and `b` (16 bits by default):
AND, OR, ADD, SUBTRACT, SHIFT_L, SHIFT_R, MULTIPLY and DIVIDE. The result
bus `out` is 32 bits wide.

* `alu_encoder` turns the one-hot `sel` into an opcode (`lp_pkg::alu_op_e`).
  If several bits are set, the lowest one wins.
* `alu_mul` gives the unsigned product.
* `alu_div` gives `{remainder, quotient}`. Division by zero gives quotient
  all ones and remainder `a`.
* MULTIPLY and DIVIDE each have their own PMB, clock gate, switch and
  isolation. `mp` and `dp` are their shut-off flags.

Every function has one clock of latency. The simple units are registered in
the always-on domain. MULTIPLY and DIVIDE register their result on their own
gated clock. A product or quotient is valid (`out_valid = 1`) only if the
unit's domain was active when the operation was issued and is not isolated
when it is read. Otherwise `out` reads 0 and `out_valid` is 0. The caller
drives `mp`/`dp` ahead of the operations it is about to issue, and watches
`mul_ready`/`div_ready`.

### `idct_lp`: power-gated IDCT behind an input FIFO

`idct8x8` computes the 2-D inverse DCT of an 8×8 block: a 1-D IDCT of each
column, then of each row:

```
f(y,x) = sum_u sum_v M(y,u) M(x,v) F(u,v),   M(x,u) = c(u)/2 * cos((2x+1) u pi / 16),   c(0) = 1/sqrt(2)
```

A block moves through four phases, with one dot product of eight multiplies
per clock:

| phase | clocks | work |
|---|---|---|
| `LOAD` | 64 | takes 12-bit signed coefficients in row-major order |
| `COL` | 64 | computes T = M·F, kept with 3 fraction bits |
| `ROW` | 64 | computes T·Mᵀ, rounds it, adds the JPEG level shift of 128 and clamps to 0..255 |
| `OUT` | 64 | delivers 8-bit pixels in row-major order |

A block takes 256 clocks when the output is never stalled. M is a 64-entry
constant table, 2^13 scaled. It is built at elaboration from the nine
values cos(kπ/16)·2^12 in `lp_pkg::IDCT_COS`, using
`k = (2x+1)·u mod 32`, then folding k into 0..8 with the sign flip of the
second quadrant. Pixels agree with a floating-point IDCT to within ±1.

Around it, `idct_lp` adds:

* **Input FIFO** (always on, 16 × 12 bits, valid/ready on both sides). It
  takes coefficients while the IDCT sleeps or wakes up, so nothing is lost.
* **Shut-off flag:** `sleep_req AND FIFO empty AND IDCT idle`. The decoder
  saying "sleep" is not enough on its own. A block in progress keeps the
  domain on, and a coefficient arriving while asleep makes the FIFO
  non-empty, which drops the flag and wakes the IDCT.
* **Clock gate** driven by the PMB's `clk_gate`, which is the same decision
  that opens the switch.
* **Isolation** on `in_ready`, `out_valid`, `out_data` (clamped to 0) and
  `idle` (clamped to 1).
* **Valid mask:** the FIFO's valid into the domain is ANDed with `!iso_en`.
  The domain clock already runs during the two wake-up clocks, while
  `in_ready` is still isolated. Without the mask, the IDCT would take a word
  that the FIFO never sees taken, and every later block would be shifted.
  The IDCT testbench catches exactly this.

After a sleep, the first coefficient waits for the wake-up: three clocks
from the FIFO going non-empty to `ACTIVE` (plus `RAMP_CYCLES`).

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `pmb`, `power_switch`, all three designs, `lp_hls_top` | `RAMP_CYCLES` | 0 | extra clocks for the supply rail to settle |
| `alu_lp`, units | `W` (`ALU_W` in the top) | 16 | ALU operand width |
| `idct_lp`, `lp_hls_top` | `FIFO_DEPTH` | 16 | input FIFO depth |
| `sync_fifo` | `W`, `DEPTH` | 12, 16 | word width, depth |
| `idct8x8` | `CW` | 12 | coefficient width |
| `iso_cell` | `W`, `CLAMP` | 1, 0 | width, clamp value |
| `ret_reg` | `W` | 8 | width |

## Departures and choices

These follow the source design:

* The three examples and their partitioning: which part is switchable, and
  which parts stay on.
* The PMB's order of steps, with one clock between steps and four
  transition clocks per down/up pair.
* Clock gating tied to the power-gating decision.
* The FIFO ahead of the IDCT.
* Output multiplexers selected by the RCA's shut-off input.
* Column-then-row IDCT.

These are this implementation's own choices:

* All widths except the 32-bit adder and its 16-bit halves.
* One-hot `sel` and the opcode values.
* One-cycle ALU latency, unsigned multiply and divide, the divide-by-zero
  result.
* `out_valid`, `msb_ready` and `idct_active` status outputs.
* Clamp values.
* FIFO depth and the valid/ready handshake.
* The IDCT's fixed-point architecture, level shift and clamp.
* The wake-up rule of `idct_lp` and the valid mask.
* Reset to the active state.
* Which IDCT flops are retained.

The multiplier and divider shut-off flags are separate inputs, `mp` and
`dp`. The source draws them as PMB inputs, but also says the sequence is
triggered from the function select. Here the stimulus drives them in step
with `sel`, and the ALU does not derive them itself.

There is no input FIFO in front of the adder or the ALU, because their
diagrams show none. A result from a sleeping unit is reported through
`out_valid` / `msb_ready` instead.

Not included:

* The JPEG decoder stages around the IDCT (variable-length decoding,
  zig-zag, dequantisation, colour conversion, reordering). `idct_lp` takes
  dequantised coefficients in row-major order, so a real decoder must undo
  the zig-zag order first.
* Any power-intent file.
* The physical cells themselves. `power_switch` and `ret_reg` are simulation
  models of library cells, and synthesis turns them into ordinary logic.

## What is verified

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* **`tb_pmb`:** clock-by-clock sequence for ramps of 0 and 3, the
  four-transition-clock count, short requests, and release during power-down.
* **`tb_rca32_lp`:** activity profiles with the upper half on for 10, 30, 50,
  70 and 90 % of the time, every result, isolation during wake-up, the wake-up
  latency.
* **`tb_alu_lp`:** profiles with divider/multiplier in use 30/60, 20/50,
  10/40 and 1/10 %. All eight functions give valid results, and reads of a
  sleeping unit are checked.
* **`tb_idct8x8`:** random dense and sparse blocks against a floating-point
  IDCT, the 256-clock block time, output stalls.
* **`tb_idct_lp`:** bursts of blocks with sleep in the gaps, at four gap
  lengths (roughly 1×, 4×, 8× and 20–30× as many power cycles). Checks that
  no block is lost, that the domain never leaves `ACTIVE` while the IDCT
  holds a block, and that the FIFO buffers during wake-up.
* **`tb_lp_hls_top`:** all three designs at once, at default parameters,
  requiring every mechanism at least once. This includes a shut-off and
  wake-up of each of the four domains, isolated reads, FIFO buffering, and a
  refused sleep request.

Each testbench also has a watchdog.

The block testbenches for the cells and units (`tb_iso_cell`,
`tb_clock_gate`, `tb_ret_reg`, `tb_power_switch`, `tb_sync_fifo`,
`tb_rca16`, `tb_alu_*`) check against integer or queue models.
`tb/idct_ref.svh` holds the shared IDCT reference and block generator.

Power is not measured. The testbenches check function and the control
sequence, not energy.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl \
    rtl/lp_pkg.sv tb/tb_lp_hls_top.sv --top-module tb_lp_hls_top
./obj_dir/Vtb_lp_hls_top
```

Replace `tb_lp_hls_top` with any other testbench name. `lp_pkg.sv` must come
first because the modules import it. `-Wno-fatal` only keeps a lint note
from stopping the build: in testbenches that tie `ret_en` low, the retention
latch is optimised away. Every testbench finishes in well under a second.

## Files

* `rtl/lp_pkg.sv`: PMB states, ALU opcodes, IDCT phases and cosine constants.
* `rtl/pmb.sv`, `clock_gate.sv`, `iso_cell.sv`, `ret_reg.sv`,
  `power_switch.sv`, `sync_fifo.sv`: the power-management parts.
* `rtl/full_adder.sv`, `rca16.sv`, `rca32_lp.sv`: the adder.
* `rtl/alu_encoder.sv`, `alu_and.sv`, `alu_or.sv`, `alu_add.sv`, `alu_sub.sv`,
  `alu_shl.sv`, `alu_shr.sv`, `alu_mul.sv`, `alu_div.sv`, `alu_lp.sv`: the ALU.
* `rtl/idct8x8.sv`, `idct_lp.sv`: the IDCT.
* `rtl/lp_hls_top.sv`: all three side by side.
* `tb/`: one testbench per module, plus `idct_ref.svh`.
