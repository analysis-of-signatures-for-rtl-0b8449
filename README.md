# Observation IP: bus-traffic signatures without void words

An observation IP watches a wide on-chip bus (an AMBA bus, a PCI link, the
address ring of a cache) during test and reduces everything that passes into
a short signature. After the test the signature is compared with the one a
good device produces; a mismatch flags a fault. Two things can spoil that
comparison:

* **aliasing** – a faulty traffic stream reaches the same signature as the
  good one. A longer signature register makes this rarer, so this design uses
  a 32-bit register with x^32 + x^25 + x^15 + x^7 + 1 rather than a 16-bit
  one.
* **void words** – the compressor that narrows the bus to the register width
  turns a non-zero bus word into all zeros. A zero word leaves no trace and a
  zero signature looks exactly like a register that was just reset. The
  classic XOR-of-chunks compressor does this for every word made of two
  equal halves (`0x66666666_66666666` and the like), which is common bus
  data. This design rotates the running word by one bit before every XOR,
  which removes that case.

```
             N-bit bus word                  W-bit compressed word
 in_valid ─┐                              ┌────────────────────────┐
 in_data  ─┴─► obs_compressor ──(1 clk)──►┤                        ├─► comp_valid / comp_data
              zero-prefix, cut into       │  obs_misr    (order-dependent) ──► misr_signature
              W-bit chunks, rotate-XOR    │  obs_data_accum (order-free)   ──► accum_signature
                                          └────────────────────────┘
```

The top is `observation_ip` (defaults N = 66, W = 32). The compressed stream
is also brought out (`comp_valid`, `comp_data`) for debug logic, which is not
part of this RTL.

## The compressor fold

`obs_compressor` reduces an N-bit word to W bits in one clock.

1. **Zero prefix.** The word is extended with zeros on its most significant
   side to K·W bits, K = ceil(N/W). For the default 66-bit bus this gives
   three 32-bit chunks. The top chunk holds bits 65:64 with 30 zeros in front.
2. **Rotate-XOR chain.** Starting from zero, from the top chunk down to
   chunk 0:

   ```
   acc = 0
   for i = K-1 downto 0:
       acc = rotate_right_1(acc) XOR chunk[i]
   ```

   In closed form, chunk i is rotated right by i bit positions and all the
   rotated chunks are XORed together. The rotation goes right: bit 0 of the
   running word moves to bit W-1.

Worked values for W = 32:

| bus word (66 bits)                       | plain XOR fold | this fold     |
|------------------------------------------|----------------|---------------|
| `{2'b00, 32'h66666666, 32'h66666666}`    | `0x00000000`   | `0x55555555`  |
| bit 64 only (top chunk = 1)              | `0x00000001`   | `0x40000000`  |
| bit 65 only (top chunk = 2)              | `0x00000002`   | `0x80000000`  |

Properties worth knowing before changing it:

* **Leading zero chunks do not matter.** The chain starts from zero, so a
  narrower bus zero-extended to N bits folds to the same word as in a
  compressor sized exactly for it. A 64-bit bus can therefore use the 66-bit
  default unchanged.
* **Two equal chunks cancel only if the chunk is all zeros or all ones.**
  `c XOR rotr1(c)` is zero only for a rotation-invariant `c`.
* **Void words cannot be removed entirely.** The fold is linear and maps
  2^N inputs onto 2^W outputs. For N > W there are always 2^(N-W) − 1
  non-zero inputs that fold to zero. With two chunks these are the words
  where `chunk0 == rotr1(chunk1)`. The rotation moves the void set away from
  repeated data; it does not empty it. With 2^19 inputs counting up from
  zero on a 32-bit bus, a 16-bit fold hits 7 void words (see the workload
  results below).
* **Many equal chunks.** With K equal chunks the fold is the XOR of K
  rotations of the same word. For K = W this is the parity of the chunk in
  every bit. For K = 2W (a 64x ratio) it is always zero. So "no void word for
  repeated data" holds for two chunks, not for every ratio.

Output timing: `out_valid` is `in_valid` delayed by one clock. `out_data`
takes the folded word when `in_valid` is 1 and holds it otherwise.

## The signature register (MISR / LFSR)

`obs_misr` is an internal-feedback (Galois) shift register. Its stages shift
from stage W-1 towards stage 0. With `POLY` holding the coefficient of x^k in
bit k (the x^W term is implied), one step is:

```
fb      = sig[0]
sig_nxt = (sig >> 1) ^ (fb ? bitreverse(POLY) : 0) ^ data
```

A polynomial term x^e feeds stage 0 back into stage W-1-e. The x^0 term is
the feedback into stage W-1. Data bit i enters stage i. For the default
polynomial the feedback lands in stages 31, 24, 16 and 6. From a state of 1,
one step with zero data gives `0x81010040`.

| `lfsr_mode` | behaviour                                                      |
|-------------|----------------------------------------------------------------|
| 0 (MISR)    | steps only on clocks with `in_valid`, XORing in the data word  |
| 1 (LFSR)    | steps on every clock, data ignored (pattern generator)         |

Controls, in priority order: `seed_load` loads `seed`, `clear` sets zero,
then the step above. Reset is asynchronous to zero. The register has to be
seeded before LFSR use, because zero is a fixed point. An assertion checks
that in LFSR mode a non-zero state never steps to zero; this holds whenever
POLY has its x^0 coefficient set.

Other polynomials go in through the `POLY` parameter. `obs_pkg::POLY16` is
x^16 + x^5 + x^3 + x^2 + 1 for a 16-bit variant; x^16 + x^12 + x^10 + 1
(`16'h1401`) is the other 16-bit polynomial in use with this register. Only
the 32-bit polynomial is a default here.

## The data accumulation unit

`obs_data_accum` adds every compressed word into a W-bit total, modulo 2^W
(`acc <= acc + word` on `in_valid`). Addition commutes, so the words
`a, b, c` and `b, a, c` give the same total, while the MISR tells them apart.
The pair of signatures distinguishes "wrong data" from "right data in the
wrong order". The "+" is taken as binary addition with the carry dropped.

## Timing of the whole IP

A bus word sampled at clock edge t appears on `comp_valid`/`comp_data` after
edge t. It is absorbed into both signatures at edge t+1, so bus to signature
is two clocks. The IP accepts one word per clock with no back-pressure.
`clear` acts on both collectors at once. In LFSR mode the MISR ignores the
compressed stream, but the accumulator keeps summing it.

## Parameters

| module           | parameter | default                       | meaning                    |
|------------------|-----------|-------------------------------|----------------------------|
| `observation_ip` | `N`       | 66                            | bus width, any value ≥ 1   |
|                  | `W`       | 32                            | compressed/signature width |
|                  | `POLY`    | `32'h02008081`                | x^32+x^25+x^15+x^7+1       |

The compression ratio is N/W. Shared constants live in `rtl/obs_pkg.sv`.

## How far to trust it, and where it departs

Followed closely:
* the block structure: a compressor feeding a MISR and an accumulator;
* zero prefixing of a partial chunk and XOR combining of W-bit chunks;
* the rotate-by-one of the improved compressor;
* the 32-bit width and polynomial;
* the single enable that selects LFSR or MISR operation.

This design's own choices:
* the chunk order (most significant first) and the rotation direction (right),
  read from a drawing of the running word that shows bit 0 moved to the top;
* the Galois form and the mapping of polynomial terms to stages;
* the one-clock registered compressor output;
* `seed_load`, `clear` and the asynchronous reset;
* LFSR mode stepping on every clock;
* the accumulator width (W) and modulo-2^W addition;
* the default bus width of 66 bits, which is the worked example of a width
  that is not a multiple of 32.

Known gaps:
* The improved compressor was meant to give no void word for any non-zero
  input. No linear N-to-W fold can do that, as shown above. This RTL removes
  the equal-chunks case and documents the rest.
* The debugging blocks of the IP are not specified and not included.
* The golden-signature comparator of a BIST setup is left to the user.
* The polynomial is a parameter, not a run-time register.

## Testbenches

Every testbench checks itself against bit-level reference models in
`tb/tb_obs_model_pkg.sv`. These models are written from the algorithms
above, not from the RTL. Each testbench prints `TB_RESULT checks=… failures=…`
and has a watchdog.

| testbench            | what it shows |
|----------------------|---------------|
| `tb_obs_compressor`  | 66→32 and 32→16 folds against the model; the worked values above; one-clock latency; streaming. |
| `tb_obs_misr`        | MISR traffic with gaps; the tap pattern; clear, seed, LFSR mode; order dependence; a 4-bit x^4+x+1 LFSR visits all 15 non-zero states. |
| `tb_obs_data_accum`  | running sum with carry wrap; clear; order independence. |
| `tb_observation_ip`  | the whole IP at its defaults. It checks the compressed word and both signatures on every clock and the two-clock latency. It counts padded words, equal-half words, idle gaps, MISR steps, LFSR steps, seed loads, clears and a reordered run, and fails if any of these never happens. |
| `tb_obs_workloads`   | ten instances at 16 and 32 bits and at 2x, 4x, 16x, 32x and 64x compression. Each takes 2^19 counting and 2^19 random vectors, all checked against the model (about 1.5 minutes). |

Results of `tb_obs_workloads` for one run. "Repeats" is the highest number
of times one running MISR value occurred. "Void" is the number of non-zero
vectors that compressed to zero.

| signature | stream        | distinct MISR values | repeats | void |
|-----------|---------------|----------------------|---------|------|
| 32 bit    | counting      | 524 272 of 524 288   | 2       | 0    |
| 32 bit    | random        | ≈ 524 255            | 2       | 0    |
| 16 bit    | counting      | 65 510               | 21      | 7    |
| 16 bit    | random        | ≈ 65 515             | 21–25   | 4–11 |

The counting-stream figures are identical for every compression ratio, and
the random ones differ only by chance. The 16-bit register
cannot hold more than 65 535 distinct non-zero values, so with 2^19 inputs
it must repeat. The 32-bit register almost never does. These counts are
not aliasing probabilities measured against injected faults, and they use a
different measure from published aliasing tables for this kind of IP.

## Running the simulations

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Wno-fatal \
  -y rtl -y tb rtl/obs_pkg.sv tb/tb_obs_model_pkg.sv \
  tb/tb_observation_ip.sv --top-module tb_observation_ip
./obj_dir/Vtb_observation_ip
```

Replace `tb_observation_ip` with any testbench name above. Change the
sizes in the `#(...)` of the instance, for example `observation_ip #(.N(128), .W(16), .POLY(obs_pkg::POLY16))`.
