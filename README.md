# NTRUEncrypt engine with a limited-reach shifter

This is an encryption/decryption engine for NTRUEncrypt with parameters
(N, p, q) = (251, 3, 128). The costly step in NTRU is the product of two
polynomials in Z_q[x]/(x^N - 1). One factor is always ternary and sparse: the
ephemeral key r for encryption, and the private key for decryption. For
(251, 3, 128), r has only 2d = 72 non-zero coefficients out of 251.

The engine does not walk all N coefficient positions. It receives the sorted
positions of the non-zero coefficients and rotates the dense operand straight
from one position to the next. A full N-way barrel shifter would be far too
large, so the rotator reaches at most **S** positions per clock (the
"(N,s)-shifter"). The product then costs

    T_conv(S) = sum over i of ceil((d_i - d_(i-1)) / S)        (d_0 = 0)

clocks instead of N. The non-zero positions sit on average N/72 ≈ 3.5 apart,
so S = 8 brings the product from 251 clocks down to about 77, and S = 4 to
about 96. Going past S = 8 buys little: T_conv cannot drop below 72, one clock
per non-zero coefficient.

## Arithmetic

The two operations share a single datapath:

| operation  | sparse t | dense b | addend | result                                  |
|------------|----------|---------|--------|-----------------------------------------|
| encryption | r        | h       | m      | e = m + 3·(r * h) mod q                 |
| decryption | f1       | e       | e      | m = centre-lift(e + 3·(f1 * e) mod q) mod 3 |

The private key takes the form f = 1 + 3·f1. Then f^-1 mod 3 = 1, and
decryption needs just one product: f*e = e + 3·(f1*e). Only the sparse f1
is loaded, as a list of 72 positions, just like r. Since q = 2^7, every
reduction mod q is a truncation to 7 bits, and because t is ternary the
"multiplication" only ever adds or subtracts.

Plaintext coefficients are the residues 0, 1, 2 of Z_3. Encryption adds 2 as
-1 (a centred message), and decryption returns residues 0, 1, 2.

Key generation is not part of the hardware. h (= f^-1 * g mod q) and f1 are
computed elsewhere and loaded once.

## The (N,s)-shifter and the reversed registers (`ntru_shifter`, `ntru_conv`)

The shifter uses one S-to-1 multiplexer per coefficient. Output k selects
among inputs k+1 … k+S (mod N):

    y[k] = x[(k + t) mod N],   t = 1 … S   (sel = t - 1)

Read in natural coefficient order, this wiring divides by x^t. `ntru_conv`
therefore stores both the rotating operand B and the accumulator in reversed
order: register k holds coefficient (N - k) mod N. In that order the same
wiring multiplies by x^t. The reversal is fixed wiring at the operand input
and the accumulator output, so the unit's ports use natural order.

The convolution loop works one list entry at a time. Per clock:

* `gap` is the current location minus the rotation applied so far.
* If gap > S, B rotates by S and nothing is added.
* If 1 ≤ gap ≤ S, B rotates by gap. In the same clock the rotated value is
  added to the accumulator (or subtracted, for a -1 coefficient), and the unit
  moves to the next entry.
* gap = 0 can only happen when the first location is 0. The unit then adds B
  without rotating it. This costs one clock, which the formula above does not
  count: about 0.29 clocks on average for random r.

The location list must be strictly increasing. An assertion in `ntru_conv`
reports a list that is not. `done` pulses one clock after the last update.

## Host interface and timing (`ntru_engine`, `ntru_ctrl`)

All polynomial transfers are by bit-plane. In one clock the N-bit bus `din`
carries bit j of every coefficient. `loc_in` (72 bits) carries bit j of every
location. A location list takes 8 location planes followed by one sign plane
(1 = coefficient -1). The least significant plane always comes first.

A command is accepted in a clock where `ready` and `cmd_valid` are both high.
Its input planes go in the clocks straight after that one:

| command      | inputs after the accepting clock         | output                    |
|--------------|------------------------------------------|---------------------------|
| `CMD_LOAD_H` | 7 planes of h on `din`                   | –                         |
| `CMD_LOAD_F` | 8 + 1 planes of f1 on `loc_in`           | –                         |
| `CMD_ENC`    | 8 + 1 planes of r on `loc_in`, then 2 planes of m on `din` | 7 planes of e |
| `CMD_DEC`    | 7 planes of e on `din`                   | 2 planes of m             |

After the inputs come three control clocks: PREP, which loads the operand and
starts the convolution; the T_conv convolution clocks; and a clock that
captures the result. Output planes follow with `dout_valid` high. Counting
clocks after the accepting clock, the first output plane appears at

* encryption: 9 + 2 + T_conv + 3 clocks, then 7 output clocks;
* decryption: 7 + T_conv + 3 clocks, then 2 output clocks.

Counting the accepting clock, a block therefore occupies the engine for
21 + T_conv clocks (encryption) or 12 + T_conv clocks (decryption). At S = 8
that averages about 98 and 89 clocks per 251-coefficient block.

`ready` stays low from acceptance until the last output plane, and
`cmd_valid` is ignored while `ready` is low. The public key h stays in its
own register. It is copied into the rotating register at the start of every
encryption, so h and f1 are each loaded once per key.

## Mod-p reduction (`ntru_modp_mersenne`, `ntru_modp_lut`)

Decryption reduces each of the 251 coefficients in parallel. The `MODP`
parameter chooses the reducer:

* **Mersenne folding** (default). Since p = 3 = 2^2 - 1, the 2-bit sections of
  a number add up to the same residue. The fold repeats while the value
  exceeds p, unrolled into a fixed adder cascade, and a final value of p
  becomes 0. Centre-lifting maps a > q/2 to a - q; the reducer applies it by
  adding (-q mod p) to the residue and folding again.
* **Look-up table.** One 128 × 2-bit ROM per coefficient holds
  ((a > q/2 ? a - q : a) mod 3). Its contents are computed at elaboration.

Both take any q = 2^LOGQ. The Mersenne reducer needs p = 2^K - 1.

## Parameters

| parameter (`ntru_engine`) | default         | meaning                                          |
|---------------------------|-----------------|--------------------------------------------------|
| `N`                       | 251             | ring degree                                      |
| `P`                       | 3               | small modulus                                    |
| `LOGQ`                    | 7               | q = 2^LOGQ                                       |
| `NNZ`                     | 72              | non-zero coefficients in r and f1 (2d, d = 36)   |
| `S`                       | 8               | shifter reach per clock (4 is the other design point) |
| `MODP`                    | `MODP_MERSENNE` | mod-p reducer, or `MODP_LUT`                     |

The other parameter sets in common use, (167,3,128), (347,3,128) and
(503,3,256), need different `N`/`LOGQ`/`NNZ` values. They are not simulated
here.

## What is this design's own choice

The architecture fixes the shifter structure, the convolution schedule and its
clock count, bit-plane I/O with its plane counts, and both mod-p methods. This
implementation chose the following:

* The command handshake, the command encoding and a separate 72-bit location
  bus. This gives 581 pins, close to the 579 I/O blocks quoted for this
  architecture.
* Plane order (LSB first), the sign plane coming last, and sign polarity.
* The form f = 1 + 3·f1, with f1 holding as many non-zeros as r. The weight of
  f1 is not otherwise fixed.
* The centre-lift range (-q/2, q/2], and mapping a plaintext residue of 2 to -1.
* Three control clocks per block, and one extra clock when a list starts at
  location 0.
* An asynchronous active-low reset that clears every register.

With f1 of weight 72 and dense messages, f*e often leaves the centred range
for q = 128, so decryption fails for those messages. The engine still computes
exactly centre-lift(f*e) mod 3. The end-to-end test checks decryption
round trips only for sparse messages, where the range holds. A practical key
would use a lighter f1.

## Verification

Each block has a self-checking testbench in `tb/`, which prints
`TB_RESULT checks=… failures=…`:

* `tb_ntru_shifter`: every shift amount on random vectors.
* `tb_ntru_plane_sipo`, `tb_ntru_plane_piso`: plane order, hold and priority.
* `tb_ntru_modp_mersenne`, `tb_ntru_modp_lut`: exhaustive for q = 128/p = 3 and
  q = 256/p = 7.
* `tb_ntru_conv`: products against a schoolbook convolution, and the clock
  count against the T_conv formula, including lists with location 0, adjacent
  locations and location N-1.
* `tb_ntru_ctrl`: the length of every phase and both latencies.
* `tb_ntru_engine`: default parameters, end to end. It generates a real key
  pair (f inverted mod 2, then lifted to mod 128 by Newton steps; the reference
  code is in `tb/ntru_tb_pkg.sv`). It loads the keys through the pins, checks
  every ciphertext, every decryption and every latency, checks round trips,
  and counts that each mechanism occurred: full-reach and partial shifts, the
  location-0 case, subtractions, lifted negatives, back-to-back commands, and
  requests held while busy.
* `tb_ntru_workload`: 5000 random encryptions each with S = 4 and S = 8,
  using the LUT reducer. Measured T_conv: S = 4 gives mean 96.43 (min 89,
  max 104); S = 8 gives mean 76.81 (min 72, max 82). The expected statistics
  for this parameter set are 96.4 (85…106) and 76.85 (72…85).

To simulate with Verilator 5, run from the directory that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Irtl -Itb rtl/ntru_pkg.sv \
        tb/ntru_tb_pkg.sv tb/tb_ntru_engine.sv --top-module tb_ntru_engine
    ./obj_dir/Vtb_ntru_engine

For a block testbench, replace the last two file names and the top module
(for example `tb/tb_ntru_conv.sv --top-module tb_ntru_conv`). Files are found
through `-I` by module name. Each module lives in `<name>.sv`.
