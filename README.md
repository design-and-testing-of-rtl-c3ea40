# BAC128: a 128-bit programmable correlator and PRBS generator

BAC128 finds a synchronisation word in a serial bit stream that arrives over a
noisy channel. It keeps the last 128 received bits in a shift register and
compares all of them, on every bit clock, with a 128-bit reference word. It
counts how many positions agree and compares that score with an error
tolerance. When the word is present with no more errors than allowed, it
raises a one-clock pulse on its `SYN` pin. It also recognises the word when
every bit arrives inverted. A mask register turns any subset of the 128
positions into don't-cares, so the sync word may be shorter than 128 bits or
spread out between data bits. Two chips cascade into a 256-bit correlator.
The same hardware also works as a 128-stage linear feedback shift register
that generates pseudo-random binary sequences (PRBS).

The chip is a microprocessor peripheral. An 8-bit data bus, a 3-bit address
and active-low `CS`, `WR` and `RD` strobes program every register and read
back the status, the first byte of the shift register and the raw score. This
repository holds the synthesizable SystemVerilog of the whole digital chip,
from the compare cells and the adder tree up to the pin-level top `bac128`.
It also holds a self-checking testbench for every block.

## How the score is formed

```
 SIN ──► 128-bit shift register ──► 128 compare cells ──► 1's counter ──► integrator ──► decision maker ──► SYN
             (q[0] newest)        ▲                     (0..128, 8 bit)    (+ C0..C7 in      (THRE1, THRE2)    INV flag
                                  │                                        the master)
                      reference register, mask register
```

* **Compare cell** (`comparator`): for every position `i` the output is
  `(q[i] XNOR ref[i]) OR mask[i]`. A masked position therefore always counts
  as a match.
* **1's counter** (`ones_counter`): a binary tree of adders sums the 128 cell
  outputs. The first level has 64 half adders. Each later level has half as
  many adders, each one bit wider, down to a single 7-bit adder. Each n-bit
  adder is a ripple chain with a half adder in the lowest position
  (`ripple_adder`). Altogether that is 127 half adders and 120 full adders.
  The result is 8 bits wide, 0 to 128.
* **Integrator** (`integrator`): selects the score that the decision uses.
  With `M/S = 0` this is the chip's own count. With `M/S = 1` (cascade
  master) it is the own count plus the count received on `C0..C7`, a 9-bit
  value from 0 to 256. A chip with `M/S = 0` drives its own count onto
  `C0..C7`.
* **Decision maker** (`decision_maker`): two 9-bit adders add the score to
  the two thresholds. Only the top two sum bits of each adder are built
  (`decision_adder`): below them is a carry-only chain. The decisions are
  then captured in two flip-flops on the rising edge of `CLK`.

### The decision rule

Number the bits of each 9-bit sum as S1 (weight 1) to S9 (weight 256).

| mode | sync (SYN) | inverted sync (SYN and INV) |
|------|------------|-----------------------------|
| 128-bit (`M/S = 0`) | S8 of `score + THRE1` is 1 | S9 of `score + THRE2` is 0 |
| 256-bit master (`M/S = 1`) | S9 of `score + THRE1` is 1 | S9 of `score + THRE2` is 0 |

An inverted sync always raises SYN as well, so the processor needs only one
interrupt line. It reads INV from the status register to learn the polarity.

Programming for a tolerance of `t` wrong bits, with `m` masked positions:

* `THRE1 = t`. In 128-bit mode a sync is found when
  `matches + m + t >= 128`: at most `t` of the unmasked bits are wrong.
* `THRE2 = 255 - (t + m)`, the one's complement of `t + m`. The second sum
  stays below 256 exactly when `matches + m <= t + m`, that is, when at most
  `t` unmasked positions agree with the reference. The word has then
  arrived inverted with at most `t` errors.

Example: a full 128-bit word with up to 3 errors gives `THRE1 = 3`,
`THRE2 = 252`. In a 256-bit cascade, `m` counts the masked bits of both
chips, and `THRE1` may go up to 255.

One consequence of using S8 alone in 128-bit mode is kept from the original
logic. A sum of 256 or more has S8 clear, so `score = 128` with
`THRE1 >= 128` gives no sync. Keep `THRE1 <= 127` in 128-bit mode.

### When SYN appears

The shift register and the decision flip-flops use the same rising `CLK`
edge. The flip-flops therefore capture the decision on the register
contents *before* the edge. Count the edge that shifts in the first bit of
a 128-bit word as edge 1. Edge 128 then completes the word, and `SYN` rises
on edge 129 and stays high for one `CLK` period. If the next window also
satisfies the rule, it stays high longer. Descriptions of the original
chip put this pulse at the 128th or at the 129th clock pulse; the difference
lies only in where the count starts. Between edges, the whole comparator,
counter and adder chain must settle within one `CLK` period. It is purely
combinational.

`SOUT` shows `q[127]`, the bit that leaves the register, so a bit sent on
`SIN` appears on `SOUT` after 128 edges.

## Programming the chip

| A2..A0 | write | read |
|--------|-------|------|
| `000` | reference register, 16 bytes | – |
| `001` | mask register, 16 bytes (1 = don't care) | – |
| `010` | threshold register: first THRE1, then THRE2 | – |
| `011` | status: D0 CLEAR, D1 SOE, D2 PRBS, D3 M/S, D4 WSH | D0 SYNOUT, D1 INVOUT, D2 CLK |
| `100` | shift register, one byte per write (only while WSH = 1) | shift register bits q[7:0] |
| `101` | – | 1's counter output (also on C0..C7 when M/S = 0) |
| `110` | scan-test mode (see below) | – |
| `111` | unused | – |

Registers capture the data on the falling edge of `WR` while `CS` is low.
A read drives `D0..D7` while `CS` and `RD` are low and `WR` is high. If `WR`
and `RD` are both low, the write wins and the pins stay undriven. Status
read bits D3..D7 read as 0.

**Bit order of the 128-bit registers.** The reference and mask registers are
eight 16-stage shift chains, one per data line. Each write shifts every
chain by one place. After 16 writes, the first byte lands in bits 127..120
(D0 in bit 127), and the last byte lands in bits 7..0 (D0 in bit 7). Bit 127
faces the oldest bit in the data register. Write the sync word in the order
it is transmitted: the first bit on the line goes into D0 of the first byte.

**Status bits.**

| bit | name | meaning |
|-----|------|---------|
| D0 | CLEAR | active low: holds SYN and INV cleared (used in PRBS mode) |
| D1 | SOE | active low: 0 puts `SOUT` in high impedance |
| D2 | PRBS | 1 = PRBS generator, 0 = correlator |
| D3 | M/S | 1 = cascade master (256-bit), 0 = single chip or slave |
| D4 | WSH | 1 = shift register is clocked by bus writes instead of `CLK` |

A usual start-up writes the status register, 16 reference bytes, 16 mask
bytes and the two thresholds, and then starts `CLK`. The chip has no reset
pin: register contents are undefined until written, and the processor must
program every register before use.

## Cascading two chips (256 bits)

The serial data enters the **master** (`M/S = 1`), and the master's `SOUT`
feeds the slave's `SIN`. The `C0..C7` pins of both chips are joined. The
slave (`M/S = 0`) drives its count on them, and the master adds it to its
own count. The slave therefore holds the first 128 bits of a 256-bit word
and the master the last 128. Load the slave's reference with the first half
of the word and the master's with the second half. Only the master's `SYN`
matters. The slave still makes its own 128-bit decision, which is ignored.
Both chips must share `CLK`.

## PRBS generator mode

With `PRBS = 1`, the serial input of the shift register is replaced by the
least significant bit of the 1's counter. The mask selects the feedback
taps. Write 0 into the mask at each tap and 1 everywhere else, and set the
reference to all ones. A compare cell at a tap then outputs the data bit
itself, and every other cell outputs 1. The counter's LSB is the parity of
the tapped bits, because the masked ones add a constant. That parity
enters the register on every `CLK` edge and also appears on `SOUT`
directly, without travelling through the 128 stages. The fixed contribution
of the masked cells is 128 minus the number of taps. If it is odd, the
feedback is inverted (an XNOR LFSR), which still gives a maximal sequence
for a primitive tap set. Set `CLEAR = 0` to keep `SYN` quiet in this mode.

The starting state is loaded from the bus. With `WSH = 1`, each write to
address `100` shifts all eight chains of the data register once, chain `k`
taking D_k. Sixteen writes fill all 128 bits, and the last byte written sits
nearest the serial input. Set `WSH` back to 0 before `CLK` runs again. The
clock switch between `CLK` and the write strobe is a plain multiplexer, so
change `WSH` only while `CLK` is low.

## Scan path for register test

Address `110` turns the reference, mask, threshold and status registers into
one 277-bit shift register (128 + 128 + 16 + 5). Each of them has a
multiplexing scan flip-flop (`srl_cell`) only at the head of every internal
chain. All four register clocks then follow `WR`. Every write pulse shifts
the chain by one place, with `D0` as the scan input. The last status bit
(WSH) replaces `SYN` on the pin. The order is: D0 → reference chains
D0…D7 → mask chains D0…D7 → threshold (THRE2[k] → THRE1[k] for k = 0…7) →
status CLEAR → SOE → PRBS → M/S → WSH → `SYN` pin. Because scan writes go
through the status bits, the chip's modes change while scanning. Rewrite
the status register afterwards. The data shift register is not in the
chain: it already has its own serial input and output.

## Timing model and departures from the original chip

The RTL keeps the original block structure, bit-level organisation and
decision arithmetic. It differs in these points:

* **Edge-triggered flip-flops.** The original uses master-slave flip-flops
  whose new value appears at the end of the clock pulse. Here every storage
  element is a rising-edge flip-flop. Bus registers are clocked by the
  decoded write strobe, so they update on `WR` falling, as the interface
  description states. On the original part the new value is visible only
  when `WR` returns high. `SYN` and `SOUT` change on the rising `CLK` edge.
* **Bus load of the shift register at address `100`.** The original
  logic drawing clocks the bus load from any write while `WSH = 1`. Its
  simulation scripts, however, load it at address `100`. This RTL uses the
  address, so the other registers can still be written while `WSH = 1`.
* **Integrator multiplexer.** One sentence of the original description
  gives the multiplexer select the other way round. The RTL follows the
  block drawing and the mode description: the master (`M/S = 1`) uses the
  cascaded sum.
* **Status bit order.** Two drawings of the status register list the bits in
  different orders. The RTL follows the scan-design version, which the
  register simulation also uses (D0 = CLEAR … D4 = WSH).
* **Pins.** Tristate and bidirectional pins are split into input, output
  and output-enable ports: `d_in`/`d_out`/`d_oe`, `c_in`/`c_out`/`c_oe`,
  `sout`/`sout_oe`. A chip-level wrapper or the board resolves them. The
  address pins are taken as true-polarity. Undriven outputs read 0.
* **CLEAR as an asynchronous clear.** CLEAR is a register output, and it
  clears the SYN/INV flip-flops asynchronously. Lint tools report this net
  as used both synchronously and asynchronously. This is intended.

Not part of the RTL: the input and output pads, the digital PLL that
recovers `CLK` from the line, and the host processor.

## Module overview

| module | role |
|--------|------|
| `bac_pkg` | sizes (128 taps, 8-bit bus), address map enum, status struct |
| `bac128` | top: the whole chip, pin-level ports |
| `bus_buffer` | data-bus direction control (read/write/high-Z table) |
| `controller` | address decoder: register write strobes, read selects, TEST |
| `shift_register` | 128-bit data register, serial/bus load, PRBS feedback |
| `pattern_register` | 128-bit write-only register (reference and mask) |
| `threshold_register` | THRE1/THRE2 pair |
| `status_register` | five mode bits and the read-back word |
| `srl_cell` | scan flip-flop: D or scan input, selected by TEST |
| `comparator` | 128 compare cells |
| `ones_counter` | 128-input adder tree |
| `ripple_adder` | n-bit ripple adder used in the tree and the cascade sum |
| `integrator` | counter, cascade adder, score select, C-bus output |
| `decision_adder` | 9-bit adder that produces only its top two sum bits |
| `decision_maker` | threshold adders, SYN/INV logic and flip-flops |

Parameter `N` (taps) defaults to 128 and is carried through the data path.
The register organisation (8 chains × 16) assumes the default.

## Simulation

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing -Irtl rtl/bac_pkg.sv tb/tb_bac128.sv -y rtl --top-module tb_bac128
./obj_dir/Vtb_bac128
```

Replace `tb_bac128` by any other testbench name. All of them run in
seconds.

| testbench | what it checks |
|-----------|----------------|
| `tb_bac128` | Full-size end to end, two chips on one bus with an independent model. It covers a sync within tolerance, a rejection with one error too many, an inverted sync, a masked (distributed) word and the 129th-edge latency. It also covers the status, shift-register and counter reads, and 256-bit sync, inverted sync and rejection. Further, it checks the bus load of the data register, 300 PRBS bits against a model LFSR, CLEAR, SOE, and a full scan-out and scan-in. Each of these 16 mechanisms is counted and must occur. |
| `tb_chip_test` | One chip tested through its pins only, with `CLK` stopped. The registers are tested over the scan path with flushes of ones and zeros and the shift pattern `001100`. The comparator gets all 8 uniform (mask, reference, data) vectors and random words. Then the adder tree gets its 5722 stage vectors by writing the reference register, with the result read on `C0..C7`. |
| `tb_sync_demo` | All-ones word, zero tolerance: SYN on edge 129, inverted sync on edge 257, and the status read during both pulses. |
| `tb_ones_counter` | Stage-by-stage functional test of the adder tree: all input combinations of every adder level (4 + 9 + 25 + 81 + 289 + 1089 + 4225 = 5722 vectors), plus random vectors. |
| `tb_comparator`, `tb_integrator`, `tb_decision_maker` | The combinational path and the decision table against arithmetic models, including the threshold edge cases. |
| `tb_shift_register`, `tb_pattern_register`, `tb_threshold_register`, `tb_status_register`, `tb_srl_cell` | Load order, bit numbering, read-back and scan order of each register. |
| `tb_controller`, `tb_bus_buffer` | Exhaustive decode and bus-direction tables. |
