# Parity-checked AES S-boxes and inverse S-boxes in composite fields

A fault attack on AES flips or sticks a few wires inside the cipher and reads
what comes out. A cheap defence is to make every part of the datapath check
its own result. For the linear parts of AES a parity bit does this well. The
S-box is the hard case: it is non-linear, so the parity of its output cannot
be found from the parity of its input. A table-driven S-box with a stored
parity bit also gives only about 50 % coverage of random faults.

This RTL builds the S-box and the inverse S-box from logic gates over a
composite field, GF(2^8) viewed as a degree-2 extension of GF(2^4). The
datapath is split into five blocks. Each block gets its own predicted parity
bit, computed in closed form from the block's inputs. Each block also
computes the actual parity of its output, and the two are compared. The
gates inside every block are arranged so that **any single stuck-at fault
changes either no output bit or an odd number of output bits**. Every single
fault that matters is therefore caught by its block's check. For random
multiple faults each of the five checks catches half of the cases
independently, so the coverage is about 1 - (1/2)^5 = 96.9 %.

Two field representations are provided, each as S-box, inverse S-box and a
combined S-box/inverse S-box:

| prefix | field | sub-field polynomials |
|---|---|---|
| `gf1_` | GF(((2^2)^2)^2) | GF(4): z^2+z+1; GF(16): z^2+z+phi, phi = `2`; GF(256): z^2+z+lambda, lambda = `C` |
| `gf2_` | GF((2^4)^2) | GF(16): z^4+z+1; GF(256): z^2+z+e, e = `E` |

A variant of the S-box moves the last block's check into the next clock
cycle, so the check adds no delay to the S-box output. On top of these sit a SubBytes layer of 16 checked S-boxes and an iterative
AES-128 encryption core. The core uses checked S-boxes both in SubBytes and in
the key schedule.

## Bit conventions

- A GF(256) element is an 8-bit vector. Bit 0 is the constant coefficient.
- A composite-field element `eta` is split into `eta[7:4]` (high half,
  eta_h) and `eta[3:0]` (low half, eta_l). The element is eta_h*z + eta_l.
- A GF(16) element of the `gf1_` field is itself split into `[3:2]` (high
  GF(4) half) and `[1:0]` (low half).
- The AES state is 128 bits. Byte k is `[127-8k -: 8]`, so byte 0 is the
  first byte of the FIPS-197 input. Column c is `[127-32c -: 32]`.

## The five blocks

S-box: `x -> [1] -> eta, N -> [2] -> gamma -> [3] -> theta -> [4] -> sigma -> [5] -> y`

| block | S-box | inverse S-box | checked bits |
|---|---|---|---|
| 1 | isomorphism delta, GF(2^8) into the composite field, then the adder N = eta_h + eta_l | inverse affine, then delta (merged into one XOR network), then the same adder | 4 (N) |
| 2 | norm gamma = eta_h^2*lambda + N*eta_l (`gf1_`), or eta_h^2*e + eta_h*eta_l + eta_l^2 (`gf2_`) | same | 4 |
| 3 | theta = gamma^-1 in GF(16) (0 maps to 0) | same | 4 |
| 4 | sigma_h = eta_h*theta, sigma_l = N*theta | same | 8 |
| 5 | delta^-1 merged with the AES affine map (constant 0x63) | delta^-1 only | 8 |

Blocks 2–4 together form the inversion in GF(256). They are one module
(`gf1_mul_inv` / `gf2_mul_inv`), shared by the S-box, the inverse S-box and
the mixed unit. Blocks 1 and 5 are linear maps over GF(2). Their predicted
parity is the XOR of a fixed subset of the input bits, namely the columns of
the matrix with odd weight.

Block 1 ends with the adder that forms N = eta_h + eta_l. N is used by the
Block 4 multiplier, and in the `gf1_` field also by Block 2. Its check runs
over the four bits of N rather than the eight bits of eta. The parity of N
always equals the parity of eta, so a fault inside the transformation
network is still seen, and so is a fault in the adder itself. A fault on N
would escape if N were left unchecked: it reaches Blocks 2 and 4 through
multipliers, which can turn a single wrong bit into an even number of wrong
bits. In the `gf1_` S-box, 223 of the 964 single stuck-at faults on N that
change the output would raise none of the Block 2-5 flags.

| structure | Block 1 prediction | Block 5 prediction |
|---|---|---|
| `gf1_sbox_fd` | x5^x4^x2^x0 | s6^s4^s2^s1^s0 (inverted twice by the constant, so no NOT) |
| `gf1_isbox_fd` | y7^y6^y5^y3 | s6^s4^s2^s1^s0 |
| `gf2_sbox_fd` | x6^x3^x2^x1^x0 | s7^s6^s2^s0 |
| `gf2_isbox_fd` | y6^y5^y4^y1^y0 | s7^s6^s2^s0 |

(s = sigma.) Blocks 2–4 are not linear. Their predictions (`gf1_pred`,
`gf2_pred`) are closed forms in the block inputs. In the formulas below,
Ph is the parity of eta_h and Pt is the parity of theta.

```
gf1:  P_gamma = eta4 ^ eta3(~Ph ^ eta5) ^ ~eta2(Ph ^ eta6) ^ eta1(eta6 ^ eta4) ^ eta0 ~Ph
      P_theta = (~gamma2 | gamma1) gamma0 ^ (gamma1 ^ gamma0) gamma3
      P_sigma = eta3(Pt ^ theta1) ^ eta2(Pt ^ theta2) ^ eta1(theta2 ^ theta0) ^ eta0 Pt
gf2:  P_gamma = eta3 eta4 ^ eta2(eta5 ^ eta4) ^ eta1(~Ph ^ eta7) ^ eta0 ~Ph ^ Ph
      P_theta = ~gamma3 gamma2 ~gamma0 ^ gamma0 (~gamma1 | ~(gamma2 ^ gamma3))
      P_sigma = eta3 theta0 ^ eta2(theta1 ^ theta0) ^ eta1(Pt ^ theta3) ^ eta0 Pt
```

Each block's check is a `parity_check` instance: an XOR tree over the block
output, XORed with the prediction. The five flags come out as a `blk_err_t`
struct (`b1` to `b5`), and their OR is `err`. The design treats that final OR
as trusted. In silicon it would be built from hardened cells or triplicated.

## Why the gates are arranged the way they are

Consider a stuck-at fault on an internal node. It flips exactly those block
outputs that have an odd number of paths from the node. This holds when
every path to an output runs through XOR/XNOR gates only. A node feeding AND
or OR gates behaves the same way for every input where it flips the gate
output. Parity checking works if every node has an odd number of paths to
the block outputs. Then a flip of the node flips an odd number of outputs,
and the parity changes.

The usual minimum-gate versions of these circuits break this rule by sharing
subexpressions between two outputs. This design builds each such
subexpression once per user when it has an even number of users. Where a
subexpression is shared, it has three users. Examples:

- `gf1_delta`: (x2^x7) is built twice. One copy, `n1`, feeds three outputs.
  (x1^x4) is also built twice. The result is 18 XOR, depth 4.
- `gf1_mul`, `gf2_mul`: each product bit has its own AND and XOR gates.
  There is no sharing between output bits. This gives 16 AND and 21 XOR
  (`gf1_`), or 16 AND and 18 XOR (`gf2_`).
- `gf1_sq_lambda`, `gf2_sq_e`: squaring and the multiply by the constant
  are merged into one 4-XOR network. With separate units, an intermediate
  bit would reach two outputs.
- `gf1_invdelta_affine`: the shared terms s2^s7 and s0^s1 each reach three
  outputs.
- `gf1_invaffine_delta`: the sum (y1^y7)^(y6^y2) and the inverted y5 each
  serve three outputs. A separate copy of each serves a fourth output.
- `gf2_invdelta_affine`, `gf2_invaffine_delta`, `gf2_invdelta`: shared terms
  A..F each reach an odd number of outputs. (A^B) is built separately where
  it would otherwise reach two.
- `gf1_inv`: the XNOR of gamma2 and gamma0 is built twice (`xn_t1`,
  `xn_t0`), once for each output that uses it.

The names of these internal nets are kept stable so that a testbench can
force them.

## Mixed S-box / inverse S-box

`gf1_mixed_fd` and `gf2_mixed_fd` take `dec` (0: S-box, 1: inverse S-box)
and share one `*_mul_inv`. Both Block-1 variants and both Block-5 variants
are built. Three multiplexers select:

- which Block-1 output goes on to the inversion;
- which Block-1 prediction goes to the Block-1 check;
- which Block-5 output goes to `dout`.

The Block-5 check runs on the multiplexed output, so a fault in the output
multiplexer is caught as well. N is formed after the Block-1 multiplexer, so
the Block-1 check also covers that multiplexer. The Block-5 prediction is the same for both
modes, so it needs no multiplexer. The placement of the multiplexers is this
design's choice.

## Block 5 checked in the next cycle (`sbox_fd_pipe`)

In the plain S-box structures the Block 5 check sits after the S-box output:
its XOR tree adds to the critical path of the error flag. `sbox_fd_pipe`
moves that check into the next clock cycle, so the S-box output does not
wait for the check.

- **Cycle of the input.** `y` leaves combinationally, and the datapath can
  use it at once. The Block 1-4 flags and the predicted parity of the
  Block 5 output (from sigma) are formed in the same cycle.
- **Clock edge.** When `valid` is high, the edge stores `y`, the prediction
  and the four flags.
- **Next cycle.** The actual parity of the stored `y` is compared with the
  stored prediction. That gives the Block 5 flag. `err_valid` is high, and
  `blk_err` / `err` describe the input of the previous cycle. Both are zero
  while `err_valid` is low.

The split itself (predictions now, Block 5 parity and comparison one cycle
later) is the published idea. This design adds three choices of its own:
- the `valid` / `err_valid` handshake;
- the asynchronous reset;
- registering the Block 1-4 flags as well, so that all five flags of one
  input arrive together.

`FIELD` picks the `gf1_` or `gf2_` datapath.

## AES-128 encryption core (`aes_enc_fd`)

The state register holds plaintext XOR key after the accepting clock edge.
Each following edge applies one full round (SubBytes, ShiftRows, MixColumns,
AddRoundKey, with MixColumns skipped in round NR). The next round key is
expanded on the fly in the same cycle.

- **Handshake.** `start` is sampled while `busy` is low. `busy` then stays
  high for NR cycles. `done` pulses for one cycle with `ctext` valid. `ctext`
  holds its value until the next start. A `start` during `busy` is ignored.
- **Latency.** `done` rises on the NR-th clock edge after the edge that
  samples `start`: 10 for AES-128, one round per cycle.
- **Error flags.** `err_sb` (any SubBytes S-box), `err_ks` (any of the four
  key-schedule S-boxes) and `err` (their OR) are sticky. They are cleared by
  the next accepted `start` or by the asynchronous active-low `rst_n`.
  - `sb_byte_err` gives the current round's flag of each state byte.
  - `sb_blk_err_q` accumulates which of the five blocks fired, over all
    16 S-boxes.
- **Field.** `FIELD` (`FIELD_GF1` / `FIELD_GF2`) picks the S-box
  realisation.
- **Assertion.** A concurrent assertion checks that the
  round counter stays in 1..NR while busy.

Only the S-boxes are checked. ShiftRows, MixColumns and AddRoundKey are
plain logic here: a parity scheme for them exists in the literature, but it
is not part of this design.

## Top level (`aes_fd_top`)

The top places all the structures side by side, each with its own ports:

- the four stand-alone S-box / inverse S-box structures;
- the two mixed units;
- two `sbox_fd_pipe` units, one per field (`pp1_*`, `pp2_*`);
- two AES cores, one per field.

The two AES cores share the `aes_key` and `aes_ptext` inputs. Each core has
its own `start`, status and result ports. `NR` (default 10) is passed to
both cores.

## Files

| file | contents |
|---|---|
| `rtl/aes_fd_pkg.sv` | types (`gf256_t`, `gf16_t`, `blk_err_t`, `field_e`), `xtime`, `mix_column`, `shift_rows` |
| `rtl/parity_check.sv` | actual parity XOR predicted parity |
| `rtl/gf1_*.sv`, `rtl/gf2_*.sv` | blocks, multipliers, squarers, predictions, complete structures |
| `rtl/sbox_fd_sel.sv` | picks the `gf1_` or `gf2_` S-box by parameter |
| `rtl/sbox_fd_pipe.sv` | S-box with the Block 5 check in the next cycle |
| `rtl/aes_subbytes_fd.sv`, `rtl/aes_enc_fd.sv`, `rtl/aes_fd_top.sv` | SubBytes, AES core, top |
| `tb/tb_ref_pkg.sv` | reference model: GF(2^8) arithmetic with the AES polynomial, affine maps, both isomorphisms as matrices, GF(16) arithmetic, AES-128 encryption |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_sbox_multifault.sv` | random multiple-fault campaign |

## Verification

Every testbench computes its expected values from `tb_ref_pkg`, which uses
plain field arithmetic and matrices, not the gate networks. Each testbench
prints `TB_RESULT checks=N failures=M`.

- **Linear blocks, squarers, inverters, multipliers, Blocks 2 and 4,
  predictions.** Exhaustive over their input space.
- **Complete S-box and inverse S-box structures.** Checked as follows:
  - All 256 inputs against the AES S-box / inverse S-box, with every flag
    low.
  - For every input, stuck-at-0 and stuck-at-1 on each bit of each block
    output (eta and N for Block 1), and on every named shared node inside
    the blocks.
  - Each fault that changes the block output must change an odd number of
    bits and raise that block's flag and `err`.
  - All such faults are detected. No even-weight error occurs.
- **Mixed units.** The same checks in both modes.
- **`tb_sbox_multifault`.** 256,000 random multiple faults per structure.
  Every block output gets a random non-empty set of bits stuck at random
  values, applied in data-flow order. N also gets random stuck bits. Measured coverage,
  100*(N2+N3)/(N1+N2+N3), is 96.9–97.0 % for all four structures, as the
  independence argument predicts.
  - N1: output wrong, no flag.
  - N2: output right, flag.
  - N3: output wrong, flag.
- **`tb_aes_subbytes_fd`.** Random states against the reference, plus
  forced faults in single S-boxes.
- **`tb_aes_enc_fd`.** Checks:
  - the FIPS-197 Appendix B vector and random key/plaintext pairs against
    the reference;
  - the latency, and that `start` is ignored while busy;
  - a forced SubBytes fault and a forced key-schedule fault raise the
    right sticky flag;
  - reset.
- **`tb_aes_fd_top`.** Runs the whole top at its default parameters. It
  drives every S-box structure over all inputs, both modes of both mixed
  units, and several encryptions on both cores, the FIPS-197 vector first.
  It forces one block-output bit per structure and one inside an AES core,
  and counts each mechanism: detection in each of the five blocks, both
  mixed-unit modes, encryptions completing in 10 cycles, starts ignored
  while busy, a fault detected inside a core. On the two `sbox_fd_pipe`
  units it checks all inputs with the flags one edge late, and an output
  fault that must be flagged by Block 5 only after the edge.
- **`tb_sbox_fd_pipe`.** Both fields, all 256 inputs. For each input it
  runs a clean pass, then a forced output bit and then a forced eta bit.
  - The forced output bit must not raise a flag in its own cycle. After
    the edge it must raise the Block 5 flag and nothing else.
  - The forced eta bit must raise the Block 1 flag.

Limits of this verification:

- Faults are injected on block outputs and on named shared nets, not on
  every gate input.
- The multiple-fault campaign places faults on the five block outputs
  rather than on randomly chosen gates. It therefore confirms the per-block
  independence, but not a gate-weighted fault distribution.

Run a testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/aes_fd_pkg.sv tb/tb_ref_pkg.sv \
          tb/tb_gf1_sbox_fd.sv --top-module tb_gf1_sbox_fd
./obj_dir/Vtb_gf1_sbox_fd
```

The other modules are found through `-Irtl`. Swap the last file and the
top-module name for any other testbench.

## Where this design departs from the published equations

The structures were checked exhaustively against the AES S-box. Four places
needed a reading different from the published equations; the RTL follows the
working version:

1. **GF1 S-box Block 5 (`gf1_invdelta_affine`).** Four outputs carry an
   inverter, y6, y5, y1 and y0, which matches the affine constant 0x63.
   The published equation shows the inverter on three of them. The prose
   for the block counts four NOT gates.
2. **GF2 multiplier (`gf2_mul`).** The first product term of z1 is u1*v0.
   The published form has u0*v1 there, which cancels against another term
   and gives a wrong product.
3. **GF2 squarer-times-e (`gf2_sq_e`).** The published four output
   expressions are listed with coordinate 0 first. They give a^2*e for
   e = 0xE. Read with the highest coordinate first, as the GF1 version is,
   they do not.
4. **GF2 inverse S-box Block 1 prediction (`gf2_isbox_fd`).** The published
   prediction y4^y2^y1^y0 matches the published matrix for this block. That
   matrix does not match the published gate network. The gate network is
   the one that gives the correct inverse S-box, and its output parity is
   y6^y5^y4^y1^y0. That is what is predicted here. With the other formula,
   about half of all inputs would raise a false alarm.

Not built:

- AES decryption;
- fault detection for ShiftRows, MixColumns and AddRoundKey.

The squarer in `gf2_block2` (`gf2_sq`, a^2 in GF(2^4) with z^4+z+1) is the
straightforward two-XOR network. Each of its outputs has its own gate, so it
already obeys the odd-path rule.
