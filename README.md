# Kyber NTT / INTT accelerator with two butterfly units

CRYSTALS-Kyber (ML-KEM) multiplies polynomials of 256 coefficients modulo
q = 3329. It does this in the number-theoretic-transform domain. The forward
transform (NTT) and the inverse transform (INTT) take most of the time when
they run in software. This RTL implements a small NTT/INTT engine for that
job, designed for FPGA block RAM and DSP slices. A polynomial is streamed in,
transformed in place by two butterfly units working in parallel, and streamed
out.

The design rests on four ideas:

* **One butterfly for both directions.** Each unit has three arithmetic stages:
  add/subtract, multiply, add/subtract. The forward Cooley-Tukey butterfly
  uses the last two stages. The inverse Gentleman-Sande butterfly uses the
  first two. A mode bit travels down the pipeline with the data.
* **Shift-and-add modular reduction.** Kyber's prime is q = 13·2^8 + 1. The
  K-RED step `13·C[7:0] − (C >> 8)` therefore shrinks a product using shifts
  and adds only. Modular additions and subtractions use Brent-Kung
  parallel-prefix adders.
* **Address sequences from a table.** The address pattern of every operation
  (NTT, INTT, load, unload) is precomputed into a block-RAM table. This
  replaces address arithmetic.
* **Conflict-free banking.** Coefficients are split over two dual-port RAMs
  by address parity. Each butterfly unit can then read two words and write
  two words per cycle, and the two units never compete for a port.

## Using the accelerator

Top module: `ntt_accel` (package `ntt_pkg` holds the constants and types).

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | rising-edge clock, asynchronous active-low reset |
| `start` | in | 1 | pulse to begin an operation (ignored while `busy`) |
| `mode` | in | 1 | 0 = forward NTT, 1 = inverse NTT; sampled with `start` |
| `din`, `din_valid` | in | 16, 1 | input coefficient, read as an unsigned integer 0..65535 |
| `din_ready` | out | 1 | a coefficient is taken in every cycle with `din_valid && din_ready` |
| `dout`, `dout_valid` | out | 16, 1 | output coefficient, fully reduced to [0, q) |
| `busy`, `done` | out | 1 | operation in progress; `done` pulses with the last output word |

An operation goes through four phases:

1. **Load.** Coefficients 0..255 arrive in order. If `din_valid` drops, the
   load simply waits.
2. **Transform.** Seven layers of 64 cycles each. Two butterflies are issued
   per cycle.
3. **Unload.** Coefficients 0..255 leave in order, one per cycle. The output
   has no back-pressure.
4. **Back to idle.** A new `start` may come in the cycle after `done`.

Input words need not be reduced modulo q. They are read as unsigned
integers, and 2^16 is not a multiple of q. So a signed value such as a Kyber
secret coefficient −1 must be given as its residue (3328), not as the 16-bit
two's-complement word 65535.

The output uses the ordering of the Kyber reference code: the NTT result is
in the usual bit-reversed "pairs" order that Kyber's base multiplication
expects, and the INTT result is the polynomial in normal order. The INTT
already includes Kyber's final multiplication by 128^-1, so INTT(NTT(a)) = a
mod q.

Cycle budget from the `start` cycle to the `done` cycle, without input
stalls, is **978 cycles**:

| phase | cycles |
|---|---|
| start to load | 2 |
| load | 256, plus 1 to write the last word |
| transform | 448 (7 × 64) issue cycles, plus 11 (table read 1, RAM read 1, butterfly 9) |
| unload | 256, plus 3 |
| state changes | a few cycles between phases |

Each cycle with `din_valid` low during the load adds one cycle.

## How the transform is scheduled

The transform is Kyber's negacyclic NTT with 7 layers:

* the forward transform uses `len` = 128, 64, …, 2;
* the inverse uses `len` = 2, 4, …, 128.

Each layer has 128 butterflies. A butterfly combines the coefficients at
addresses `j` and `j + len` with twiddle number `k`. Butterflies are issued in
the order of the Kyber reference loops, and two consecutive butterflies share
a cycle:

* unit 1 takes the even-numbered butterfly;
* unit 2 takes the odd-numbered one.

The twiddle index `k`:

* **forward:** counts up from 1, one step per group of `len` butterflies;
* **inverse:** counts down from 127.

`addr_seq_rom` holds this schedule. It is a 2048-word table addressed by
`{operation, step}`. For NTT and INTT, one word holds both butterflies'
addresses and twiddle indices. For load and unload it holds the coefficient
address. The table is computed at elaboration by `ntt_pkg::seq_value`, so no
data file is needed.

**Banking.** Coefficient `i` is stored in RAM B when `^i` (the XOR of its
address bits) is 1, and in RAM A otherwise. The two inputs of a butterfly
differ in exactly one address bit (`len`), so they are always in different
RAMs. Unit 1 uses port 1 of both RAMs and unit 2 uses port 2. A "swap" bit
(`^a`) tells each unit whether its upper input comes from RAM B. The same bit
steers its two results back. Each RAM is 256 words deep and indexed by the
full address, so half of each RAM is unused. In exchange, no address
translation is needed.

**Why no stalls are needed between layers.** A result is written 11 cycles
after its butterfly is issued. With this issue order, no butterfly reads a
coefficient sooner than 32 cycles after the butterfly that produced it was
issued (the worst case is at the 128/64 layer boundary). Layers therefore
follow each other back to back. The end-to-end test confirms this against a
reference model.

**Load and unload** use the same RAM ports. During the load, the registered
input word is written at its address into port 1 and port 2 of both RAMs at
once. The copy in the "wrong" RAM is never read. During the unload, port 1
of both RAMs reads the address and the I/O block keeps the word from the bank
that holds it.

## The butterfly unit (`butterfly`)

```
mode 0 (CT, forward):  c = a + w·b        d = a − w·b
mode 1 (GS, inverse):  c = (a + b) / 2    d = (a − b) · w
```

The unit has a 9-stage pipeline and accepts one butterfly per cycle. The
`mode` bit is pipelined with the data.

| stage | work |
|---|---|
| 1 | `mod_reduce` brings both 16-bit inputs into [0, q). Inputs need not be reduced: any 16-bit value is allowed. |
| 2 | GS: `a + b` and `a − b` mod q. CT: pass `b` to the multiplier and `a` around it. |
| 3–7 | `mod_mul` multiplies the operand by the twiddle word. |
| 8 | CT: `y + u` and `y − u` mod q. GS: halve `y` mod q, as `y >> 1`, plus (q+1)/2 when `y` is odd. |
| 9 | Output registers. |

Halving in every inverse layer divides the result by 2^7 = 128. This is
exactly Kyber's final INTT scaling, so no separate scaling pass exists. The
matching factor 1/2 on the `(a − b)` branch is built into the inverse twiddle
words.

The modular add and subtract units (`mod_add`, `mod_sub`) each use two
Brent-Kung adders:

* `mod_add` forms the sum, then subtracts q when that does not borrow;
* `mod_sub` forms the difference, then adds q back on a borrow.

`mod_reduce` uses five Brent-Kung compare-and-subtract steps, by 16q, 8q,
4q, 2q and q. `bk_adder` is a generic Brent-Kung prefix adder: an up-sweep
and a down-sweep of the (g, p) operator, for any width.

## Modular multiplication with K-RED (`mod_mul`, `kred`)

`kred` computes `S = 13·C0 − C1`, where `C0 = C[7:0]` and `C1 = C >>> 8`. It
uses shifts and adds only: `(C0 << 4) − (C1 + C0 + (C0 << 1))`. Since
2^8 ≡ −1/13 (mod q), S ≡ 13·C (mod q). S is smaller than C, but it is not
fully reduced.

`mod_mul` is five pipeline registers long. Value ranges at each step:

1. **Product.** `x · w` with x in [0, q) and w a signed twiddle word:
   |P| < 2^23. Two registers, matching a DSP slice's M and P registers.
2. **First K-RED.** |D1| < 2^15.
3. **Second K-RED.** −97 ≤ D2 ≤ 3400.
4. **Correction.** Add or subtract q once, giving a result in [0, q).

The result is `x · w · 169 mod q`, because each K-RED step contributes a
factor of 13. The twiddle table cancels this factor.

## Twiddle table (`twiddle_rom`)

The table has 256 signed 16-bit words, centred in [−1664, 1664]. It is read
through two ports, one per butterfly unit. The contents are computed at
elaboration by `ntt_pkg::twiddle_value`. With `zeta(k) = 17^bitrev7(k) mod q`
(Kyber's twiddles):

```
word k        (forward, k = 1..127) = zeta(k) · 169^-1            mod q
word 128 + k  (inverse, k = 1..127) = −zeta(k) · 2^-1 · 169^-1    mod q
```

169^-1 mod 3329 = 2285 and 2^-1 = 1665.

## Controller and address generator

`ntt_ctrl` is the top-level state machine:
IDLE → INPUT → NTT or INTT → OUTPUT → IDLE. On entering each working state
it sends the address generator a start pulse with the operation, and it
leaves the state when the address generator reports `op_done`.

`addr_gen` counts steps. During the load, it steps only when a word is
accepted. It reads `addr_seq_rom` and drives:

* the RAM read addresses and twiddle addresses, one cycle after the table
  read;
* the swap and valid bits, one cycle later, when the read data arrive;
* the write addresses and `we`, through a 9-stage delay line that matches the
  butterfly latency.

Assertions check two rules:

* in `ntt_accel`: the butterflies' `out_valid` coincides with the write-back
  `we`, and the two units stay in step;
* in `addr_gen`: a load write never collides with a write-back.

## Departures from the reference architecture, and what is this design's own

This RTL follows the published architecture "Efficient number theoretic
transform accelerator for CRYSTALS-Kyber". It takes these blocks and
parameters from that architecture:

* two dual-configuration CT/GS butterfly units with a 9-cycle latency;
* Brent-Kung modular add/subtract and K-RED reduction for q = 3329;
* two dual-port 256 × 16 coefficient RAMs with a shared `we`;
* a dual-port 256 × 16 twiddle ROM;
* an address generator driven by address sequences stored in block RAM;
* a state machine for input, NTT, INTT and output;
* 16-bit coefficients and 64 cycles per layer.

It differs in the following points, or fills gaps:

* **7 layers, not 8.** The architecture description counts 8 layers for
  n = 256, but it also specifies a 128-entry twiddle set. A full 8-layer
  negacyclic NTT would need a 512th root of unity, which does not exist
  modulo 3329. This design implements Kyber's actual 7-layer transform.
* **K-RED.** The reduction is written as `C0 << 4`, which gives 13 = 16 − 3.
  A prose description of a 10-bit shift was not followed. The number of
  K-RED steps (two), the pre-scaling of the twiddles by 169^-1 and the final
  ±q correction are this design's choices. They make every result exact and
  fully reduced.
* **INTT scaling.** The 1/128 factor is merged into the GS butterflies: the
  halving, plus a factor 1/2 in the inverse twiddles.
* **Twiddle ROM layout.** 128 forward and 128 inverse words fill the 256-word
  ROM.
* **RAM behaviour.** The RAMs read every cycle, also while writing, with the
  old word returned on a same-address collision. The description associates
  reads with `we = 0`, but pipelined operation needs both at once.
* **Own choices where the architecture gives none:**
  * the parity banking;
  * the address-table word layout;
  * the input-reduction circuit;
  * the split of the butterfly into pipeline stages;
  * the valid/ready handshake and the I/O timing;
  * the reset scheme: control state only, memories and datapath registers
    not reset.
* **Not reproduced.** The FPGA results reported for the original (Artix-7:
  1405 LUTs, 190 FFs, 10 DSPs, 11 BRAMs, 262 MHz) were not measured for this
  RTL. In this RTL, both RAMs write two ports in the same cycle and also read
  two ports, which a vendor tool may map to more than one block RAM per
  instance. A generic yosys synthesis counts about 980 flip-flop bits, far
  above 190. Most of them are the write-back address delay line in
  `addr_gen` (about 370 bits) and the pipeline registers of the two
  butterflies (about 300 bits each). A vendor flow can absorb part of them
  into DSP and block-RAM registers or shift-register LUTs.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. Expected values come from plain integer
arithmetic in `tb/tb_ref_pkg.sv`, a transcription of the Kyber reference NTT
and INTT loops. They are never derived from the RTL's own tables.

* `tb_ntt_accel` runs the whole accelerator at its default size:
  * the NTT of the unit polynomial;
  * random NTTs;
  * INTTs of unreduced 16-bit inputs with random input stalls;
  * two round trips (NTT then INTT returns the input mod q);
  * a `start` while busy;
  * back-to-back operations.

  It checks every output word and the exact start-to-done cycle count, and
  it counts each of these mechanisms.
* `tb_kyber_polymul` runs the workload the accelerator exists for, once
  for each Kyber parameter set (k = 2, 3, 4). It computes the inner product
  of two length-k polynomial vectors as INTT(Σ NTT(f_i) ∘ NTT(g_i)). All 2k+1
  transforms run back to back on the accelerator; the base multiplication
  (∘) is done in the testbench. The result is compared with a schoolbook
  negacyclic product, and the cycle count must be (2k+1) × 978.
* The unit testbenches check:
  * `bk_adder`: random and corner operands, at 16 and 13 bits;
  * `mod_reduce`: all 65536 inputs;
  * `mod_add`, `mod_sub`: random and corner operands;
  * `kred`: random and corner 32-bit values;
  * `mod_mul`, `butterfly`: streams at full rate, checking the 5-cycle and
    9-cycle latencies;
  * `poly_ram`: read/write behaviour;
  * `twiddle_rom`, `addr_seq_rom`: every word, against the Kyber loops;
  * `addr_gen`: exact address timing;
  * `ntt_ctrl`, `ntt_io`: their protocols.

Run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ntt_pkg.sv tb/tb_ref_pkg.sv tb/tb_ntt_accel.sv --top-module tb_ntt_accel
./obj_dir/Vtb_ntt_accel
```

For other testbenches, replace `tb_ntt_accel`. `-Wno-fatal` is needed
because Verilator reports width-extension warnings in the testbenches'
64-bit reference arithmetic. It also reports that `rst_n` is used both as an
asynchronous reset and synchronously, because the assertions in `addr_gen` and
`ntt_accel` are disabled while it is low. None of these warnings changes
behaviour. The end-to-end test simulates
about 6000 cycles and finishes in well under a second.

## Changing the design

Global constants live in `ntt_pkg`: Q, N, the word width, the layer count and
the latencies. Both ROM contents are derived from them by the package
functions. The arithmetic is specific to q = 3329, however:

* the K-RED constants (13, 8) in `kred`;
* the subtraction chain in `mod_reduce`;
* the range analysis in `mod_mul`.

Changing the prime therefore needs those three reworked. Changing the
butterfly pipeline means keeping `BU_LATENCY` in step with it. The
write-back delay line in `addr_gen` and the top-level alignment assertion
both depend on that value.
