# Low-switching MBIST address generator

A memory built-in self-test (MBIST) has to visit every word of a memory several
times, once per pass of its test algorithm. For a test such as Zero-One the
order of the addresses does not matter, only that each appears exactly once
per pass. An n-bit LFSR is a cheap way to produce such a sweep, but every step
of a plain LFSR shifts the whole register, so on average about n/2 address
lines toggle every cycle. That toggling is dynamic power spent in the test,
and test power is limited.

This design splits the address in two:

```
 addr[N-1:2]  (N-2 bits)          addr[1:0]
 +------------------------------+ +-----------+
 |  modified complete LFSR      | | 2-bit     |
 |  (advances 1 step in 4)      | | complete  |
 |                              | | LFSR      |
 +------------------------------+ | (3 in 4)  |
                                  +-----------+
```

* The two low bits come from a 2-bit complete LFSR that walks the Gray cycle
  `11 -> 01 -> 00 -> 10`. Each of its steps changes exactly one address bit.
* The upper N-2 bits come from a complete LFSR: an LFSR whose period has been
  extended from 2^(N-2)-1 to 2^(N-2) so that it also passes through zero.
* Out of every four address steps, three advance the 2-bit part and one
  advances the upper part. The upper part therefore holds still while the
  low bits run through all four values, and a sweep covers all 2^N addresses
  in 2^N steps before it returns to its seed.

Only one step in four moves the wide register, so the address bus toggles far
less than with a single N-bit LFSR. Over one full sweep, the N=10 generator
switches 1791 address bits (seed 1111111111). A plain 10-bit LFSR switches
about 5 bits per step, which comes to roughly 5000 over the same sweep.

The RTL implements the generator described in "Efficient Memory Built in
Self Test Address Generator Implementation". It also contains a small
Zero-One MBIST wrapper (controller, pattern generator and response analyzer)
that drives an external memory with that generator.

## Address sequence

Starting from seed 00000, the 5-bit generator produces:

| step | upper (3 bits) | low (2 bits) | address | step | upper | low | address |
|-----:|:--:|:--:|:--:|-----:|:--:|:--:|:--:|
| 0  | 000 | 00 | 00000 | 16 | 011 | 00 | 01100 |
| 1  | 000 | 10 | 00010 | 17 | 011 | 10 | 01110 |
| 2  | 000 | 11 | 00011 | 18 | 011 | 11 | 01111 |
| 3  | 000 | 01 | 00001 | 19 | 011 | 01 | 01101 |
| 4  | 100 | 01 | 10001 | 20 | 101 | 01 | 10101 |
| 5  | 100 | 00 | 10000 | 21 | 101 | 00 | 10100 |
| 6  | 100 | 10 | 10010 | 22 | 101 | 10 | 10110 |
| 7  | 100 | 11 | 10011 | 23 | 101 | 11 | 10111 |
| 8  | 110 | 11 | 11011 | 24 | 010 | 11 | 01011 |
| 9  | 110 | 01 | 11001 | 25 | 010 | 01 | 01001 |
| 10 | 110 | 00 | 11000 | 26 | 010 | 00 | 01000 |
| 11 | 110 | 10 | 11010 | 27 | 010 | 10 | 01010 |
| 12 | 111 | 10 | 11110 | 28 | 001 | 10 | 00110 |
| 13 | 111 | 11 | 11111 | 29 | 001 | 11 | 00111 |
| 14 | 111 | 01 | 11101 | 30 | 001 | 01 | 00101 |
| 15 | 111 | 00 | 11100 | 31 | 001 | 00 | 00100 |

After step 31 the generator is back at 00000. The low two bits are not reset
when the upper part moves. Each group of four starts where the previous group
ended, so every step changes either one low bit or only the upper register.

## The modified complete LFSR (`mod_clfsr`)

This is an external-feedback (Fibonacci) shift register of M = N-2 flip-flops,
FF1 to FFM. On each of its steps every stage shifts one place towards FFM, and
FF1 loads a feedback bit D1. FF1 is the most significant address bit. D1 is the
XOR of:

* every stage Q_i whose coefficient b_i is 1 in a primitive polynomial of
  degree M, including Q_M, since b_M = 1 always;
* the NOR of stages 1 to M-1. This term sits in the position of b_0.

Without the NOR term this is a plain maximal-length LFSR: it never enters the
all-zero state and has period 2^M - 1. With the NOR term, the state
`0...01` moves to `0...00` rather than to `10...0`, and `0...00` moves on to
`10...0`. The all-zero state is thereby spliced into the cycle, which gives
period 2^M. The NOR must leave out the last stage. If it included every
stage, zero would be reached once from reset and never again, and the
sequence would no longer be complete.

The XOR is built as a chain of full-adder cells used only for their sum
(`rfa_cell`, wired together in `clfsr_feedback`). The carry input of the first
cell takes Q_M. Each cell adds two tapped stages, and passes its sum to the
carry input of the next cell. The last cell adds the NOR term and Q_1 and
outputs D1. Carry outputs are not used. Untapped inputs are constant 0 and
disappear in synthesis.

The taps for each degree come from `mbist_pkg::clfsr_taps(m)` (b_0 and b_m
are always 1):

| degree m | other taps | degree m | other taps |
|---|---|---|---|
| 2, 3, 4, 6, 7, 15, 22 | 1 | 14 | 12, 11, 1 |
| 5, 11, 21, 29 | 2 | 16 | 5, 3, 2 |
| 8, 19 | 6, 5, 1 | 18 | 7 |
| 9 | 4 | 23 | 5 |
| 10, 17, 20, 25, 28 | 3 | 26, 27 | 8, 7, 1 |
| 12 | 7, 4, 3 | 30 | 16, 15, 1 |
| 13, 24 | 4, 3, 1 | | |

Every polynomial in this table has been checked to be primitive. N is
therefore limited to 4 to 32; other values stop elaboration with an error.

## The 2-bit complete LFSR (`clfsr2`)

This is the degree-2 case of the same construction. The polynomial is
x^2+x+1, and the "NOR of stages 1..M-1" is just an inverter on Q1. A single
full-adder cell adds Q1, Q2 and NOT Q1, which gives NOT Q2, and loads it into
FF1 while FF1 shifts into FF2. The result is a two-bit Johnson/Gray counter:

| Q1 Q2 | NOT Q1 | FA sum = D1 | D2 = Q1 | next |
|---|---|---|---|---|
| 11 | 0 | 0 | 1 | 01 |
| 01 | 1 | 0 | 0 | 00 |
| 00 | 1 | 1 | 0 | 10 |
| 10 | 0 | 1 | 1 | 11 |

Q1 is address bit 1 and Q2 is address bit 0.

## Two rates from one clock (`dual_clock_gen`)

In the original scheme the two parts run on separate clocks. The 2-bit part
gets a "high-frequency" clock, which is the normal clock with every fourth
pulse removed. The upper part gets a "low-frequency" clock that carries only
those fourth pulses. Here the two clocks become two enables, `en_hi` and
`en_lo`, generated on one clock by a 2-bit phase counter. For each `step`
request the counter raises `en_hi` for phases 0, 1 and 2, and `en_lo` for
phase 3.

This keeps the RTL free of generated clocks. A clock-gating insertion step
in an ASIC flow turns the enables back into gated clocks for the two
register banks, and on an FPGA they map to flip-flop clock enables. A `load`
restarts the phase, so the first three steps after a new seed always belong
to the 2-bit part.

## Generator interface (`mbist_addr_gen`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset to address 0 |
| step | in | 1 | advance one address; the new address appears after the clock edge |
| load | in | 1 | load `seed` into both parts and restart the 3:1 phase (priority over step) |
| seed | in | N | start address |
| addr | out | N | current address, registered |

The generator produces one address per clock while `step` is held high. It
uses N+2 flip-flops: N for the address and 2 for the phase counter.

## The Zero-One MBIST around it

`mbist_top` connects four blocks:

```
            +------------------+   step/load   +----------------+ addr
 start ---> | mbist_controller |-------------->| mbist_addr_gen |-----------> mem_addr
 seed  ---> |  W0 R0 W1 R1     |               +----------------+
 done  <--- |                  |  bg, rd_issue +-------------------+ wdata
 pass  <--- |                  |-------------->| mbist_pattern_gen |-------> mem_wdata
            |                  |               +-------------------+
            |                  |<-- fail --+   cmp_en, exp_data |
            +------------------+           |                    v
                                   +--------------------+
                   mem_rdata ----->| mbist_sig_analyzer |--> err_count, fail_bits
                                   +--------------------+
```

* **Controller.** When `start` arrives, the controller loads the seed into the
  generator and clears the analyzer. It then runs four passes: write all 0,
  read all 0, write all 1, read all 1. Each pass makes one memory access per
  clock at the current address and steps the generator. Because the
  generator returns to its seed after exactly 2^N steps, a pass ends when the
  address equals the seed again. The controller uses no address counter.
  That cycle is a one-clock bubble in which the next pass begins. After the
  last pass the controller waits `READ_LAT` clocks for the last compare, then
  raises `done` and sets `pass` to the analyzer's verdict.
* **Pattern generator.** It drives the solid background: all 0s or all 1s.
  It delays the read strobe and the expected word by `READ_LAT` clocks, so
  that they meet the memory's read data.
* **Response analyzer.** It compares each read word with the expected word.
  A mismatch sets a sticky `fail` flag and increments a saturating
  `err_count`. The mismatching bit positions are ORed into `fail_bits`.

A test from `start` to `done` takes 4*(2^N + 1) + READ_LAT + 1 clocks. With
the defaults that is 4102 clocks.

Memory interface: `mem_en` and `mem_we` qualify an access at `mem_addr`. Write
data is `mem_wdata`. `mem_rdata` must hold the word read `READ_LAT` clocks
after the read request.

Top-level parameters:

| parameter | default | meaning |
|---|---|---|
| N | 10 | address bits (memory of 2^N words), 4..32 |
| DATA_W | 8 | word width |
| READ_LAT | 1 | memory read latency in clocks, at least 1 |
| CNT_W | 16 | width of the mismatch counter |

## Switching activity

The figure counted here is the sum of the Hamming distances between
consecutive addresses over one sweep of 2^n addresses, which is 2^n - 1
transitions:

| seed | n | this RTL | published figure for the design |
|---|---|---|---|
| 11111 | 5 | 35 | 36 |
| 01001 | 5 | 33 | 32 |
| 1111111111 | 10 | 1791 | 1783 |
| 0100000001 | 10 | 1789 | 1777 |

The published figures for plain, bit-swapping and dual-speed LFSRs of the
same sizes are 85 and 5130 transitions, down to 64 and 2376 for the best
alternative.

The RTL does not match the published figures exactly. Their source
publishes an example sequence for the upper part of the 5-bit case (000, 100,
010, 110, 001, 101, ...) that is a bit-reversed binary count. A shift
register like the one described cannot produce that sequence. This RTL
follows the described shift-register structure and polynomial table, so its
upper-part sequence is 000, 100, 110, 111, 011, 101, 010, 001. The 2-bit
sequence and the 3:1 split match the published example exactly. How the
published counts were taken is not stated.

## Where this RTL departs from, or adds to, the original description

* **Two enables instead of two clocks** (see above).
* **NOR inputs.** The NOR covers stages 1 to M-1, not all M stages. This is
  the choice that makes the sequence complete, and it matches the
  schematic.
* **Seed load and reset.** A `load` port sets any seed. Reset clears the
  generator to address 0, which is the seed of the published example.
* **MBIST wrapper.** The controller, pattern generator and analyzer exist in
  the original only as blocks of a generic MBIST diagram. Everything inside
  them here is this design's own: the Zero-One pass sequence, the
  end-of-pass detection at the seed, the read-latency alignment, direct
  comparison instead of a compressed signature, and the diagnostic counters.
  So are the word width and the read latency.
* **Register count.** The published FPGA results list n registers for an
  n-bit generator. This RTL uses n+2, because of the phase counter.
* **Not modelled.** The memory under test is not part of the RTL. Power and
  FPGA area results cannot be reproduced in simulation.

## Files

`rtl/`:

| file | contents |
|---|---|
| `mbist_pkg.sv` | polynomial tap table `clfsr_taps()`, test phase enum `phase_e` |
| `rfa_cell.sv` | full-adder cell, sum only |
| `clfsr_feedback.sv` | chain of `rfa_cell`s computing D1 |
| `mod_clfsr.sv` | (N-2)-bit modified complete LFSR |
| `clfsr2.sv` | 2-bit complete LFSR |
| `dual_clock_gen.sv` | 3:1 high/low rate enables |
| `mbist_addr_gen.sv` | the address generator |
| `mbist_controller.sv`, `mbist_pattern_gen.sv`, `mbist_sig_analyzer.sv` | Zero-One MBIST blocks |
| `mbist_top.sv` | complete MBIST, memory ports brought out |

`tb/`: each module has a self-checking testbench, `tb_<module>.sv`. In
addition:

* `tb_mbist_top.sv` runs the full-size MBIST (1024 x 8 bits) three times: on
  a fault-free memory and with two stuck-at faults. It checks the verdict,
  the error count, the failing bits, the test length, that each address is
  accessed once per pass, the bus switching activity, and that every
  mechanism occurred.
* `tb_mbist_top_n5.sv` runs the 32-word configuration with a read latency
  of 2.
* `tb_mbist_addr_gen.sv` checks the published 5-bit example and the
  switching activity at n=5 and n=10.
* `mem_model.sv` is the behavioural memory, with stuck-at fault injection.

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
A watchdog ends any run that hangs.

Simulating with Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/mbist_pkg.sv tb/tb_mbist_top.sv -y rtl -y tb --top-module tb_mbist_top
./obj_dir/Vtb_mbist_top
```

Replace `tb_mbist_top` with any other testbench name. Every run takes well
under a second.

To change the memory size, set `N` on `mbist_top`; the taps follow from
`clfsr_taps(N-2)`. To use a different polynomial, give `clfsr_feedback` a
different `TAPS` vector. Any primitive polynomial of degree N-2 keeps the
sequence complete.
