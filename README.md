# Fault-detecting InvRBLWE key generation, encryption and decryption

Ring-BinLWE is a ring-learning-with-errors encryption scheme whose error
polynomials have binary coefficients instead of Gaussian ones. Its
"inverted" hardware form (InvRBLWE) keeps every coefficient of
`Z_q[x]/(x^n + 1)` as a two's-complement number with `q = 2^8`, so all
arithmetic wraps modulo q with no reduction logic, and every polynomial
product has one binary operand, so a multiplier is just an array of adders.

This RTL implements the three InvRBLWE stages and protects each one against
faults by **recomputation with encoded operands**: the stage computes its
result once normally, then a second time on the same adders with the
operands encoded so that a faulty wire or gate disturbs the two runs
differently. A comparator, itself triplicated with a majority voter,
flags any difference. Two encodings are provided:

* **RENO** (recomputing with negated operands, the default): the second run
  uses `-a` and `-b`. The product is unchanged, so no decoding is needed.
* **RESO** (recomputing with shifted operands): the second run uses `2a`
  and `2c` on a datapath one bit wider. The result is halved by dropping
  its least significant bit.

Defaults: `n = 256`, `q = 256` (8-bit coefficients), RENO.

## The three stages

With `a` public, and `r1, r2, e1, e2, e3, m` binary polynomials (n-bit vectors,
bit i is the coefficient of `x^i`):

| stage | computes | module |
|---|---|---|
| key generation | `p = r1 - a*r2`; public key `(a, p)`, secret key `r2` | `keygen_fd` |
| encryption | `c1 = a*e1 + e2`, `c2 = p*e1 + e3 + encode(m)` | `enc_fd` (two units in parallel) |
| decryption | `m~ = c1*r2 + c2`, then `m = decode(m~)` | `dec_fd` + `msg_decode` |

`encode(m)_i = m_i * (-q/2)`. With q = 256 that is `0x80` for a one. Since
`e3_i` only sets bit 0, the addend `e3 + encode(m)` is built by wiring.

Decryption leaves `m~_i = noise_i + m_i*(-q/2)`, where
`noise = e2*r2 + r1*e1 + e3`. Because of the wrap-around sign of `x^n = -1`,
this noise does not average zero: its mean is `i - (n-3)/2` (negative for low
coefficients, positive for high ones). `msg_decode` subtracts that centre,
rounded to `i - (n-2)/2`, and reads the remainder `d_i` as a signed byte. It
outputs `m_i = 1` when `|d_i| > q/4`, because a coefficient carrying a one
sits about q/2 away from the centre. For n = 256 the noise standard deviation
is about 10, far inside the ±64 window, so decryption is reliable.
(The published decode rule also compares the distance from the centre with
q/4. Which side of the threshold means one is fixed here by the encode
rule.)

All three stages reduce to one operation, `R = ±A*b + C`, with a W-bit
polynomial `A`, a binary `b` and a W-bit addend `C`:

| stage | A | b | C | sign |
|---|---|---|---|---|
| key generation | a | r2 | r1 (0/1 per coefficient) | `C - A*b` (`SUB = 1`) |
| c1 | a | e1 | e2 | `A*b + C` |
| c2 | p | e1 | e3 + encode(m) | `A*b + C` |
| decryption | c1 | r2 | c2 | `A*b + C` |

## The cell array (`polymac_core`)

n cells, one per coefficient, each with an accumulator `Res[i]`. The binary
operand `b` enters one bit per cycle from a shift register
(`bit_shift_reg`), highest degree first. Each multiply cycle (`S1 = 0`) is
one Horner step, `R <- x*R + b_j*A`:

* cell i adds `Res[i-1]` (multiplying by x moves every coefficient up one);
* cell 0 adds **minus** `Res[n-1]`. This is the anti-circular rotation, since
  `x^n = -1`;
* the term a cell adds is its coefficient `a_i` ANDed with the current bit
  of b, which is stretched to W bits. When a negative product is wanted
  (key generation), the term is complemented and 1 is added (the NAND + 1
  form of `-(a*b)`).

After n multiply cycles, one add cycle (`S1 = 1`) adds `C` to every cell
without rotating. A **sub-pipeline register** sits between the term logic
(AND, complement, +1, S1 multiplexer) and the accumulating adder. It splits
the cell's critical path roughly in half. The term path is feed-forward, so
the register costs one cycle of latency and nothing else. The array has
n W-bit adders and 2·n·W flip-flops (accumulators plus term register).

## Recomputation and what it catches

Both schemes use one `fd_ctrl` sequencer and one core per unit, and run it
twice (`run = 0` normal, `run = 1` recomputed). The normal result is
captured when the second run starts. The comparison is made in the cycle
after the second run ends.

**RESO (`reso_unit`).** The core is W+1 = 9 bits wide. The normal run feeds
sign-extended `A` and `C`, and its low 8 bits are kept. The recomputed run
feeds `{A,0}` and `{C,0}`, which gives `2R mod 2^9`; bits 8..1 of that are
`R mod 2^8` again. The binary operand is not shifted. A stuck line at bit k
in the normal run corresponds to bit k-1 of the decoded recomputed result,
so the two errors differ. Every intermediate value is doubled in the second
run, so the same argument covers the term logic, the adders and the
accumulators, not only the operand buses. The cost is a ninth bit in
every cell and an offset (bits 8..1 against 7..0) in the comparison.

**RENO (`reno_unit`).** The core stays 8 bits wide. The recomputed run feeds
`-A` (complement plus one at the operand multiplexer). A coefficient of
`-b` is 0 or -1, and a bit stretched to 8 ones already *is* -1. So the
negated binary operand is realised by flipping the cell's sign control:
`neg = SUB xor run`. The product `(-A)(-b)` equals `A*b`, and the two results
are compared directly with no decoding. A stuck operand line disturbs the
runs by `+e·2^k` and `-e'·2^k`. These are equal only at the sign bit
(`+q/2 = -q/2 mod q`), and only when the coefficient is 0 or -q/2, the two
values that are their own negatives. In that case negation changes nothing,
and the fault escapes. The fault campaign below shows this as a small
shortfall on single-bit faults.

RENO has a limit that follows from its algebra. Every term equals its
normal-run counterpart (`-(a·b)` and `(-a)·b` are the same number), so the
accumulators hold identical partial sums in both runs. A stuck bit in an
accumulator register, or on the addend `C`, which is not negated, corrupts
both runs identically and is **not** detected. RESO covers those
locations. RENO is cheaper: no extra bit, no decode, and a plain
comparison. Choose with the `SCHEME` parameter (`FD_RENO` or `FD_RESO`).

**Comparator (`tmr_comparator`).** Three equality comparators over all
n·W result bits feed a 2-of-3 majority voter. One faulty comparator can
therefore neither hide a fault nor raise a false alarm. The
`force_replica` input inverts individual replicas for testing; the units
tie it to zero. A synthesis tool merges identical replicas unless they are
marked keep/dont_touch. Do that in the implementation flow.

## Timing

`fd_ctrl` runs `LOAD (1) → MUL (n) → ADD (1) → DRAIN (1)` twice, then `CMP (1)`.
Counting the clock edge that samples `start` as the first, `done` is high
after edge **2n + 8**, which is 520 cycles for n = 256. One unprotected run
would need n + 4. Recomputation therefore about doubles the cycle count, and
the sub-pipeline register is what lets the clock run faster to make up for it.

## Top level (`rlwe_fd_top`)

One command port drives three independent stage units:

* `op = OP_GEN` (0): computes `p` from `a, r1, r2`. `p` stays on `pk_p`, and
  `r2` is latched as the secret key.
* `op = OP_ENC` (1): encrypts `m` with `a` and the kept `p`, using `e1..e3`.
  The ciphertext appears on `c1`, `c2`.
* `op = OP_DEC` (2): decrypts `c1_in`, `c2_in` with the kept secret key.
  Outputs are `m_tilde` and `m_out`.

Pulse `start` while `busy` is low, and hold the stage's inputs until `done`
pulses. A start while busy, or with op 3, is ignored. `fault_gen`,
`fault_enc` and `fault_dec` are set when a stage's two runs disagree. Each
stays set until that stage runs again, and `fault` is their OR. The stages'
results are not suppressed on a fault: the system has to discard them.
Reset is synchronous and active low.

Polynomial ports are packed arrays `[N-1:0][W-1:0]`, with coefficient i at
index i.

Hierarchy:

```
rlwe_fd_top
├── keygen_fd ── fd_unit ── reno_unit | reso_unit
├── enc_fd ──── fd_unit ×2 (c1, c2)
└── dec_fd ──── fd_unit, msg_decode
     reno_unit / reso_unit = fd_ctrl + bit_shift_reg + polymac_core + tmr_comparator
```

`rlwe_pkg` holds the default sizes (`RLWE_N`, `RLWE_W`) and the
`fd_scheme_e` and `rlwe_op_e` enums.

## Sizes

At the defaults (RENO, n = 256), coarse synthesis of `rlwe_fd_top` gives about
16.6k word-level cells and 25.9k flip-flop bits. That is four units, each with
2048 accumulator bits, 2048 term-register bits and 2048 captured-result bits,
plus the key and ciphertext ports. This is a fully parallel, one-coefficient-per-cell
array. Published FPGA results for this kind of design report far fewer
flip-flops, which points to a narrower or partly serial datapath there. Those
results cannot be reproduced from this RTL. The (n, q) = (512, 256) parameter
set is obtained with `N = 512`: everything scales linearly, and latency
becomes 1032 cycles.

## Measured error coverage

`tb_fault_campaign` injects 65,536 stuck-at faults into the decryption unit
at n = 32. Each fault sits on the encoded multiplicand bus, at the input of
the cell array. A third of the faults are single bits (SBU), a third are two
bits of one coefficient (SBDBU), and a third are 2 to 8 bits anywhere (MB).
Half are held for the whole operation; half are held for a random window of
cycles. Coverage is the share of faults that corrupted `m~` and also raised
`fault`:

| class | RENO | RESO |
|---|---|---|
| SBU, permanent | 99.91 % | 100 % |
| SBDBU, permanent | 99.83 % | 98.11 % |
| MB, permanent | 100 % | 99.96 % |
| transient (all classes) | 100 % | 100 % |
| overall | 99.94 % | 99.55 % |

RENO's escapes are the self-negating coefficients described above. RESO's
escapes are adjacent stuck bits whose errors match after the one-place
shift. For example, bit 1 can be wrong only in the normal run and bit 2 only
in the shifted one. A fault on the primary inputs, before the encoding, hits
both runs alike, and no recomputation scheme can see it.

`tb_keygen_campaign` injects 12,000 single stuck-at faults into key
generation at n = 32. They go to three places: the operand bus (INPUT), one
accumulator bit, i.e. an adder output (ADDER), and the operand bus again
with one comparator replica stuck at "equal" (VOTER):

| location | RENO permanent | RENO transient | RESO permanent | RESO transient |
|---|---|---|---|---|
| INPUT | 99.90 % | 100 % | 100 % | 100 % |
| ADDER | **0 %** | 99.90 % | 100 % | 100 % |
| VOTER | 100 % | 100 % | 100 % | 100 % |

The VOTER row matches the INPUT row, and a stuck replica alone raises no
alarm, so the voter does its job. The RENO ADDER figure is the limit
explained above: a permanently stuck accumulator bit corrupts both runs in
the same way. If the accumulators need protection against permanent
faults, use RESO.

## Design choices

These points are not fixed by the scheme itself and were decided here:

* Bits of b are consumed highest degree first, and `r1`/`C` is added to all
  cells in one cycle after the multiplication. The alternative reading,
  feeding r1 bit by bit, was not taken.
* Where the sub-pipeline register sits (after the term logic).
* The generic `neg` control, which serves the key-generation NAND+1 form,
  the additive stages and RENO's negated binary operand with one cell design.
* How `-A` and `-b` are produced in RENO.
* The whole-result comparison in one cycle, the start/busy/done handshake,
  the 2n+8 latency, and the top level's kept key registers and command port.
* The polarity of the decoder (see above).
* The result is not suppressed or zeroed when a fault is flagged.

## Simulating

Each testbench is self-checking and ends with a `TB_RESULT checks=… failures=…`
line. With plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_rlwe_fd_top_full \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/rlwe_pkg.sv tb/rlwe_ref_pkg.sv tb/tb_rlwe_fd_top_full.sv -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_rlwe_fd_top_full` | default top (n = 256, RENO): key generation, encryption, decryption against the reference, message recovered, 520-cycle latency, injected fault flagged |
| `tb_rlwe_fd_top` | RENO and RESO tops side by side at n = 32: eight rounds of gen/enc/dec; ignored commands, a fault injected in each stage, flags clearing, both message values |
| `tb_fault_campaign` | 65,536 stuck-at faults on the decryption unit's operand bus, both schemes, by class (SBU, SBDBU, MB) and duration; prints coverage |
| `tb_keygen_campaign` | 12,000 stuck-at faults on key generation at the operand bus, an accumulator bit and a comparator replica; prints coverage |
| `tb_keygen_fd`, `tb_enc_fd`, `tb_dec_fd` | each stage under both schemes, with fault injection |
| `tb_reso_unit`, `tb_reno_unit` | both signs of `±A*b + C`, latency, stuck-at lines on the encoded operand bus |
| `tb_polymac_core` | the cell array driven by hand, including the one-cycle sub-pipeline delay |
| `tb_fd_ctrl`, `tb_bit_shift_reg`, `tb_tmr_comparator`, `tb_msg_decode` | the small blocks |

`tb/rlwe_ref_pkg.sv` is the reference model: schoolbook negacyclic
multiplication over plain integers, encode and decode. Faults are injected
with `force`. The unit and stage benches force single bits of the encoded
operand bus (`a_sel` in `reno_unit`, `a_enc` in `reso_unit`) for a whole
operation. The campaign benches force masked patterns onto that bus and
single accumulator bits (`u_core.res`), for a whole operation or for a
window of cycles. Testbenches that set `N` smaller than 256 do so only to
keep the run short; the RTL is the same at every size.
