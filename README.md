# Karatsuba polynomial-multiplication accelerator for FV encryption

Encrypting with the FV (Fan–Vercauteren) homomorphic scheme is mostly two large polynomial
products: the public-key polynomials `P_key[1]` and `P_key[2]` times a random binary
polynomial `U`. With *batching* (several messages packed into one ciphertext) the usual NTT
shortcut no longer works, because the cyclotomic polynomial that batching needs is not
`x^n + 1`. Karatsuba multiplication does not care about the reduction polynomial, so this
design uses it.

The work is split between a host CPU and this FPGA datapath:

* The host applies six Karatsuba recursions to the 2560-coefficient operands. This gives
  3^6 = 729 pairs of 40-coefficient sub-polynomials, which it streams to the hardware.
* The hardware applies three more recursions to each pair (40 → 20 → 10 → 5 coefficients),
  multiplies the 27 resulting 5-coefficient pairs with the schoolbook method, and reduces
  every coefficient modulo q.
* It then reassembles five Karatsuba levels. Nine consecutive input pairs therefore come back
  as one 319-coefficient product.
* The host finishes the remaining four levels, reduces by the cyclotomic polynomial and adds
  the noise.

One public-key sub-polynomial is multiplied by **four** binary polynomials at once, so four
encryptions share one pass. Binary values stay small even after nine recursions (at most 10
bits), and the multipliers are sized for this: 10 × 135-bit, not 135 × 135-bit.

The RTL is SystemVerilog-2017, synthesizable, and parameterised with the sizes above.

## Data on the link

The link is a 128-bit stream in each direction (RIFFA over PCI-E Gen3 x4 at 250 MHz in the
original system). The top brings it out as plain `rx_*` / `tx_*` valid/ready ports.

**Input.** A public-key coefficient has up to 131 bits. It is carried as five 27-bit chunks
(a 135-bit container). A binary coefficient has 7 bits on the link. Every coefficient index
of a sub-polynomial takes five bursts. Burst `k` (k = 0..4) holds:

| bits      | content                                                              |
|-----------|----------------------------------------------------------------------|
| `[26:0]`  | chunk `k` of the public-key coefficient, least significant chunk first |
| `[33:27]` | coefficient of binary polynomial `k` (k = 0..3; unused in burst 4)     |
| `[127:34]`| unused                                                               |

So a 40-coefficient sub-polynomial is 200 bursts, and the whole operation is
729 × 200 = 145,800 bursts.

**Output.** Each word carries one coefficient modulo q in bits `[124:0]`. The rest of the
word is zero. Per group of nine inputs, the stream carries the 319 coefficients of
encryption 0 in ascending order, then those of encryptions 1, 2 and 3: 1276 words in all.
A full operation yields 81 groups.

**Order.** The hardware assumes the host's depth-first Karatsuba order. At every level the
children of a polynomial come as (low half, high half, low + high). The input is nine
sub-polynomials per group, in the order `3x + y` over the two host levels. The hardware keeps
this order internally, and post-computation depends on it.

## Datapath

```
rx ─► packager ─┬─► pre_computation (public key, 135-bit) ─► pre_crossbar ─┐
                └─► pre_computation (4 binary, 10-bit)    ─► pre_crossbar ─┤
                                                                           ▼
         poly_multiplier x4  (each: 5 x int_mul_4x10x135, each: 4 x int_mul_10x27)
                                                                           │
                     post_crossbar ─► post_computation x4 (one per encryption)
                                                                           │
                                                  out_buffer ─► tx ◄───────┘
```

### Pre-computation (recursions 7–9)

`pre_recursion` turns each polynomial `A` into `A_L`, `A_H` and `A_L + A_H`.
`pre_computation` chains three of them. Its output for input `p` is sub-polynomial
`27p + 9x + 3y + z`, where each digit is 0 (low), 1 (high) or 2 (sum).

Public-key additions are done chunk by chunk, with the carry passed from each 27-bit chunk to
the next. This is the same representation the host software uses. Values grow by one bit per
level: 131 → 134 bits for the public key, 7 → 10 bits for binary.

The binary lane is a second instance with four input polynomials, one per encryption.

### Crossbar and multipliers

Three recursions give 27 sub-polynomial pairs per input, but there are only four multiplier
lanes. `pre_crossbar` stores the 27 pairs and issues them in seven rounds: lane `k` gets pair
`4r + k` in round `r`. In round 7 only three lanes are used. There are two crossbar
instances, one per lane type, which receive the same handshakes and so stay in step.

`poly_multiplier` computes the 5 × 5 schoolbook product for all four encryptions:

* In step `s`, its five `int_mul_4x10x135` units multiply `b[u]` by the four `a[e][s]`. The
  results belong to coefficient `u + s`.
* A reconstruction stage adds them modulo q into nine accumulators per encryption.

Each `int_mul_4x10x135` works through the five 27-bit chunks of `b`, one per cycle, on four
10 × 27 multipliers. It adds the shifted partial products into a 145-bit value and reduces it
modulo q by restoring reduction (21 compare-and-subtract steps).

### Post-computation (recursions 9 down to 5)

This is the least obvious part.

`post_recursion` with size `N` waits for three products of `2N-1` coefficients, in the order
`LL = A_L·B_L`, `HH = A_H·B_H`, `MM = (A_L+A_H)(B_L+B_H)`. It then outputs

    LL + (MM − LL − HH)·x^N + HH·x^(2N)      (4N−1 coefficients, all modulo q)

`post_computation` chains five of these, with N = 5, 10, 20, 40, 80:

* N = 5, 10, 20: the 27 products of one input sub-polynomial (9 coefficients each) become
  9, then 3, then 1 product of 19, 39 and 79 coefficients.
* N = 40, 80: three consecutive inputs give a 159-coefficient product, and three of those
  (nine inputs) give the final 319-coefficient product.

Each level holds only its pending `LL` and `HH`, so the storage per level is small.

The two extra levels (N = 40 and N = 80) exist to save link bandwidth. Without them, each
input would return 79 wide coefficients per encryption, more than the 128-bit return link can
carry. With them, nine inputs (1800 bursts in) return 1276 words.

`post_crossbar` sits between the multipliers and this chain. It captures the four lanes' 9-coefficient
products of a round and emits them one per cycle, lowest lane first. This restores the order
`0, 1, …, 26`. The chain only works if products arrive in exactly that order. For that reason
every multiplier lane has the same fixed latency: a lane accepts a start only when its
integer multipliers can issue on the next edge, so lanes that start together finish together.

### Output buffer and flow control

`out_buffer` copies a finished group into a holding register. It writes the group into a
FIFO (65,536 × 128 bits) one coefficient per cycle. It starts an upload only when a complete
group (1276 words) is stored, and then sends that group without gaps. This keeps the host's
transfers long.

Its `room` output is high while two more groups fit: the one being built plus one more.
When `room` is low the crossbars stop issuing. That stalls the pre-computation and fills the
packager's two sub-polynomial buffers, and then `rx_ready` falls. When the host drains the
output at full rate, `room` never falls.

## Timing

* Input: one burst per cycle, so 200 cycles per sub-polynomial.
* Multipliers: one round per 26 cycles, so the seven rounds of a sub-polynomial take 182
  cycles. The datapath therefore keeps up with the link.
* A full operation takes 145,800 cycles of input, or 583.2 µs at 250 MHz.
* Latencies:
  * packager: the sub-polynomial is ready on the edge that stores its 200th burst;
  * pre-computation: 3 cycles;
  * polynomial multiplier: 30 cycles from start;
  * post-computation: 1 cycle per level;
  * an upload starts once a group is fully in the FIFO.

## Where this RTL departs from the original description, and its own choices

* **Modulus.** q is not specified. `Q` defaults to 2^125 − 159. Any q with
  2^124 ≤ q < 2^125 works; the 125-bit width follows the 125-bit coefficients of the setup.
  A 135-bit modulus, as one of the original result tables states, would need `Q_W` and the
  restoring reduction widened.
* **Modular post-computation.** Post-computation is done modulo q at every step. In the
  original, the hardware outputs carry extra guard bits (130 bits) and the software reduces
  later. The mathematical result is the same.
* **Schedules.** The crossbar schedule (round-robin, Karatsuba order) and the convolution
  schedule inside `poly_multiplier` are this design's own, since the original does not give
  them. In the original schedule, the four integer-multiplier lanes start one cycle apart;
  here they start together.
* **Chunk adds in one cycle.** The public-key chunk additions ripple through all five chunks
  in one cycle. The original spreads them over five steps.
* **Stored sub-polynomials.** The pre-computation keeps all 27 sub-polynomials of one input
  side by side in registers. The original describes eight streaming lines.
* **Burst layout, buffer sizes, handshakes.** The bit positions in a burst, the packager's
  double buffer, the FIFO depth (chosen to match the ~8.4 Mbit the original reports for this
  interface) and the one-group upload length are this design's choices. So are all
  valid/ready handshakes and the `room` flow control.
* **Not included:** the PCI-E/RIFFA core, the host software (recursions 1–6 and their
  post-computations, cyclotomic reduction, batching, noise sampling), and the board.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares against values computed
independently inside the testbench: plain `%` on 256-bit integers, direct schoolbook
products, and direct index formulas for the Karatsuba splits. Each checks the cycle counts
where the design promises them. Each has a watchdog and ends with a
`TB_RESULT checks=N failures=M` line.

* `tb_karatsuba_accel` plays the host end to end on three groups (27 sub-polynomials). It
  does the two host recursions itself and checks every output word against `A·U[e] mod q`.
  The FIFO is shrunk to 4096 words and the output is held back for a while. This makes each
  mechanism happen, and the testbench counts each one:
  * input back-pressure;
  * three-lane rounds;
  * complete uploads and waits for them;
  * transmit stalls;
  * the `room` stop.
* `tb_karatsuba_accel_full` runs the default configuration through one complete operation:
  729 sub-polynomials and 103,356 checked output words. It checks that all 145,800 bursts are
  taken in 145,800 cycles. It runs in under a minute.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
          rtl/he_pkg.sv tb/tb_karatsuba_accel.sv --top-module tb_karatsuba_accel
./obj_dir/Vtb_karatsuba_accel
```

Replace the testbench name to run any other. Lint with `verilator --lint-only -Wall -y rtl
+libext+.sv rtl/he_pkg.sv rtl/karatsuba_accel.sv`.

## Files

| file | content |
|------|---------|
| `rtl/he_pkg.sv` | sizes, coefficient type, `mod_add` / `mod_sub` / `mod_reduce` |
| `rtl/karatsuba_accel.sv` | top level |
| `rtl/packager.sv` | receive-side buffering and unpacking |
| `rtl/pre_recursion.sv`, `rtl/pre_computation.sv` | Karatsuba pre-computation, one level / three levels |
| `rtl/pre_crossbar.sv` | scheduling onto four lanes |
| `rtl/poly_multiplier.sv`, `rtl/int_mul_4x10x135.sv`, `rtl/int_mul_10x27.sv` | multiplier hierarchy |
| `rtl/post_crossbar.sv` | reordering of lane results |
| `rtl/post_recursion.sv`, `rtl/post_computation.sv` | Karatsuba post-computation, one level / five levels |
| `rtl/out_buffer.sv` | transmit-side FIFO and complete-transfer upload |
| `tb/tb_*.sv` | one testbench per module, plus the end-to-end and full-size runs |

To change the modulus, set `Q` on the top. To change the FIFO size, set `BUF_DEPTH`; it must
hold at least two groups (2552 words). The remaining sizes are fixed by the Karatsuba split:
40-coefficient inputs, three hardware pre-recursions and five post-recursions.
