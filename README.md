# Multimode OFDM block interleavers (IEEE 802.11a/g and IEEE 802.16e)

An OFDM transmitter interleaves each block of coded bits before mapping, so
that a burst of channel errors reaches the decoder as scattered single errors.
The block size Ncbps and the permutation depend on the modulation (and, in
802.16e, also on the number of subchannels), so a transmitter that switches
modes needs either one interleaver per mode or one *multimode* circuit. This
RTL is the multimode kind, and its central idea is to avoid evaluating the
permutation formula in hardware at all: the permuted addresses are generated
by an accumulator that adds one of a few small constants per clock, and a
small FSM reloads the accumulator at the points where that pattern breaks.

Two designs are included and stand side by side in `interleaver_top`:

* **802.11a/g interleaver** (`wlan_interleaver`): address generator plus a
  ping-pong pair of bit-wide RAMs; BPSK, QPSK, 16-QAM, 64-QAM
  (Ncbps = 48, 96, 192, 288). Bit-serial, one bit per clock in and out.
* **802.16e address generator** (`wimax_addr_gen`): the same scheme for the
  16 modulation/depth combinations of 802.16e (QPSK at 8 depths from 96 to
  576 bits, 16-QAM and 64-QAM at 4 depths each). Only the addresses are
  generated; they are brought out for an external interleaver memory.

## The permutation and why an accumulator can produce it

With d = 16 columns and s = max(1, Ncpc/2) (1 for BPSK/QPSK, 2 for 16-QAM,
3 for 64-QAM), bit k of a block goes to position

    m_k = (Ncbps/16)·(k mod 16) + floor(k/16)
    j_k = s·floor(m_k/s) + (m_k + Ncbps − floor(16·m_k/Ncbps)) mod s

Write `rows = Ncbps/16` and split k into an *iteration* i = floor(k/16)
(0 … rows−1) and a column c = k mod 16. Then m_k = rows·c + i, and
floor(16·m_k/Ncbps) is simply c. Working the mod-s term through gives:

| s | address j inside iteration i | step from column c to c+1 |
|---|------------------------------|---------------------------|
| 1 | rows·c + i | always rows |
| 2 | rows·c + i + (c mod 2) for even i; rows·c + i − (c mod 2) for odd i | rows+1, rows−1, … (even i); rows−1, rows+1, … (odd i) |
| 3 | rows·c + i − (i mod 3) + ((i − c) mod 3) | cycles through rows+2, rows−1, rows−1, starting at a point set by i mod 3 |

So within an iteration the address advances by a constant (s = 1), by two
alternating constants (s = 2) or by three constants in rotation (s = 3). For
802.11a/g 16-QAM (rows = 12) the steps are 13 and 11; for 64-QAM (rows = 18)
they are 20, 17, 17: the block starts 0, 20, 37, 54, 74, …

Every iteration starts at address i: `j = i` for c = 0 in all three cases.
The last address of iteration i (c = 15) is `Ncbps − rows + i` for s = 1 and
s = 3, and `Ncbps − rows + (i xor 1)` for s = 2. These terminal values are the
only addresses at or above `Ncbps − rows`, so the accumulator value alone tells
which iteration just ended. That is what the preset logic uses.

## 802.11a/g address generator (`wlan_addr_gen`)

    qam16_sel (T flip-flop) ──► mux-1: 13 | 11 ─┐
    qam64_sel (mod-3 count) ──► mux-2: 20 | 17 | 17 ─┤
                              3 (BPSK), 6 (QPSK) ─┴► mux-3 (mod_typ) ─► 6 bit ─┐
                                                                               ▼
                        preset logic ──load/preset──► accumulator ◄── 9-bit adder
                                                          │
                                                          └──► write_address

* **Increment path.** mux-3, selected by `mod_typ`, picks 3 (BPSK), 6 (QPSK),
  the 16-QAM mux-1 or the 64-QAM mux-2. The 6-bit result is zero-extended and
  added to the 9-bit accumulator every clock.
* **qam16_sel / qam64_sel** (`ilv_qam16_sel`, `ilv_qam64_sel`) step once per
  added increment. At the start of each iteration they are loaded with that
  iteration's phase: for 16-QAM `i mod 2`; for 64-QAM 0, 2, 1 for
  `i mod 3` = 0, 1, 2 (phase 0 selects the rows+2 step). A free-running
  flip-flop and counter would not give the right pattern, because the number
  of steps per iteration (15) is not matched to the pattern length.
* **Preset logic** (`wlan_preset_logic`) is a hierarchical FSM:
  `SF` after `clr` (accumulator 0) → `SMTx` for the selected modulation →
  at the end of every iteration a preset state (`S000`, `S001`, … in BPSK,
  reached from accumulator values 45, 46, 47). A 4-bit column counter marks
  the 16th address of each iteration. In that cycle `load` is high and the
  accumulator takes the preset instead of the sum. The preset is the next
  iteration's first address, i + 1, where i is read back from the accumulator
  as above. After the last iteration the preset is 0 and the block starts
  again, so an unchanged mode yields the same address sequence indefinitely.
  The FSM state is exposed as a `preset_state_t` struct (level, captured mode,
  iteration index).
* **Read address** (`ilv_read_counter`): a 9-bit up counter, 0 … Ncbps−1,
  wrapping at the terminal count.
* **sel** (`ilv_sel_gen`): a T flip-flop cleared by `clr` that toggles when the
  read counter wraps, i.e. once per block.

## Ping-pong interleaver memory (`wlan_ilv_memory`)

Two bit-wide RAMs alternate. With `sel = 0` RAM-1 is read at the linear read
address and RAM-2 is written at the permuted write address; `sel = 1` swaps
them. Writes are permuted and reads linear, so output position r of a block
carries the input bit k with j_k = r.

    RAM-1: WE = sel,   A = sel ? write_address : read_address
    RAM-2: WE = ~sel,  A = sel ? read_address  : write_address
    interleaved_data = sel ? RAM-2 : RAM-1

`MEM_STYLE` selects how the RAMs are built:

* `MEM_DRAM` (default): `dram_288x1` covers the 288 bits of the largest block
  with four 64×1 and one 32×1 LUT RAMs (`dist_ram`). A 3-to-5 decoder on
  address bits [8:6] drives their write enables, and the read data is muxed by
  the same bits. Reads are asynchronous.
* `MEM_BRAM`: each RAM is one 16K×1 block RAM (`bram_16kx1`), of which 288
  bits are used. Reads are synchronous, so the output mux uses `sel` delayed
  by one clock.

## Timing

All registers use one clock. `clr` is a synchronous, active-high clear and is
the only reset; it may be applied at any time.

* In the first cycle after `clr` falls, `write_address`, `read_address` and
  `sel` are all 0 (k = 0). From then on there is one address per clock, with no
  gaps at iteration or block boundaries. `sel` toggles every Ncbps cycles.
* `raw_data` is written in the same cycle as its write address. During block
  b ≥ 1, `interleaved_data` carries block b−1 in interleaved order. Position r
  appears in the cycle with `read_address = r` (`MEM_DRAM`) or one cycle later
  (`MEM_BRAM`). Whatever the output shows during block 0 is not valid data.
* The mode inputs (`mod_typ`; `mod_type` and `id` for 802.16e) drive the
  increment muxes directly. They may change only together with `clr`, and an
  assertion in each address generator flags a violation. A mode change is
  therefore "clr, then the new mode", and the new address sequence begins on
  the next clock.

## 802.16e address generator (`wimax_addr_gen`)

Same accumulator, preset logic, read counter and sel generator, widened to a
10-bit adder/accumulator/counter for blocks up to 576 bits. The increment
comes from three levels of multiplexers (`wimax_incr_mux`, 7-bit output):

| mod_type | modulation | id | depth (Ncbps) | increments |
|---|---|---|---|---|
| 00 | QPSK | 0–7 | 96, 144, 192, 288, 384, 432, 480, 576 | 6, 9, 12, 18, 24, 27, 30, 36 |
| 01 | 16-QAM | x00–x11 | 192, 288, 384, 576 | 13/11, 19/17, 25/23, 37/35 |
| 1x | 64-QAM | x00–x11 | 288, 384, 432, 576 | 20/17/17, 26/23/23, 29/26/26, 38/35/35 |

Level 1 has four 2:1 muxes (16-QAM, shared select from the T flip-flop) and
four 3:1 muxes (64-QAM, shared mod-3 select). Level 2 has an 8:1 mux of the
QPSK increments by `id`, and one 4:1 mux each picking the 16-QAM and 64-QAM
level-1 outputs by `id[1:0]`. Level 3 selects by `mod_type`. The preset FSM
(`wimax_preset_logic`) goes `SF` → `SMTx` (modulation) → `SIDy` (depth) →
preset states. For example, QPSK at depth 96 ends its first iteration at
address 90 and presets 1. The `SMTx` and `SIDy` choices are both made on the
edge that leaves `SF`.

## Files

| file | content |
|---|---|
| `rtl/ilv_pkg.sv` | shared enums/struct, mode tables (Ncbps, rows, class), preset arithmetic |
| `rtl/interleaver_top.sv` | both designs side by side |
| `rtl/wlan_interleaver.sv` | 802.11a/g interleaver = address generator + memory |
| `rtl/wlan_addr_gen.sv`, `rtl/wlan_preset_logic.sv` | 802.11a/g address generation |
| `rtl/wimax_addr_gen.sv`, `rtl/wimax_incr_mux.sv`, `rtl/wimax_preset_logic.sv` | 802.16e address generation |
| `rtl/ilv_qam16_sel.sv`, `rtl/ilv_qam64_sel.sv`, `rtl/ilv_read_counter.sv`, `rtl/ilv_sel_gen.sv` | shared small blocks |
| `rtl/wlan_ilv_memory.sv`, `rtl/dram_288x1.sv`, `rtl/dist_ram.sv`, `rtl/bram_16kx1.sv` | interleaver memory |
| `tb/ilv_ref_pkg.sv` | reference permutation evaluated directly from the formulas |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself (it
also has a watchdog). For example, the end-to-end test of both designs at
default parameters:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/ilv_pkg.sv tb/ilv_ref_pkg.sv rtl/*.sv tb/interleaver_top_tb.sv \
      --top-module interleaver_top_tb -o sim
    ./obj_dir/sim

Replace the testbench name to run any other. Packages are listed first. All
testbenches finish in well under a second.

What the tests establish:

* The address generators are compared cycle by cycle with `ilv_ref_pkg::ref_jk`,
  which evaluates the formulas above directly. This covers every 802.11a/g
  mode and every 802.16e mode/depth, over more than one block, including
  mid-block clears followed by a mode change. The tests also check the
  published first-32-address tables for 802.11a/g (all four modes) and
  802.16e (QPSK 96, 16-QAM 288, 64-QAM 384).
* The 802.11a/g interleaver is checked end to end with random data in every
  mode, for both RAM styles: each output bit must be the input bit the
  permutation puts there.
* `interleaver_top_tb` runs both designs concurrently at their defaults and
  counts that preset loads, bank switches, mode changes, and the 16-QAM and
  64-QAM increment patterns all occur.
* The preset FSMs, muxes, counters and RAMs have unit tests of their own.

## Where this RTL departs from, or fills in, the original description

* **Preset after the last iteration.** The state diagram of the original
  design labels the BPSK state after address 47 with preset 3. The permutation
  formulas, and the published address tables, restart the block at address 0,
  so this RTL loads 0 there.
* **Select phases.** The original design drives the 16-QAM and 64-QAM selects
  from a plain T flip-flop and mod-3 counter clocked every cycle. That alone
  does not reproduce the published address tables, so here the preset logic
  reloads them at each iteration start and they hold during the preset cycle.
* **FSM encoding.** The preset FSM is written as level + captured mode + iteration
  index, not as one named state per preset. Its 4-bit counter is used as the
  column counter that marks the end of each iteration.
* **802.16e read counter and sel.** These are taken over from the 802.11a/g
  generator, with which the 802.16e generator shares its schematic. No
  802.16e memory is included.
* **Distributed-RAM bank split.** Bits [8:6] select the bank; the original
  decoder table is not reproduced. Addresses 288–319 alias onto the 32×1 bank,
  but the generator never produces them.
* **Block-RAM style.** Synchronous read and the delayed output select follow
  usual block-RAM behaviour and are not from the original description.
* **Not included.** The rest of the 802.16e PHY chain (randomizer, RS-CC
  codec, mapper, IFFT/FFT, deinterleaver) and the FPGA fabric itself are only
  context here and are not implemented.

In the `interleaver_top` outputs, `wlan_state.id` is always 0, because the
802.11a/g FSM has no depth field.
