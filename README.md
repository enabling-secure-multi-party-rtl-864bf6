# Three-party secret-sharing MPC engine

This is RTL for a hardware engine that computes on secret data held by three
compute parties. No party ever sees the data in the clear. The engine
implements the honest-majority, semi-honest three-party protocol of
Araki, Furukawa, Lindell, Nof and Ohara (2016), with Boolean and arithmetic
shares. It targets FPGAs in a datacenter. There, three devices owned by
different organisations sit next to each other on a low-latency network.
Secret sharing suits that setting because each AND or multiply gate costs one
128-bit message per party and a single network latency. Garbled circuits need
roughly 500 times more traffic per gate.

The code contains:

* the three per-party building blocks: XOR/ADD, AND/MUL and correlated randomness;
* the PRF and key-exchange support they need;
* a party wrapper with a host message port;
* a top level with groups of three parties wired in a ring, plus a
  share-splitting dealer and a reconstruction unit.

## Shares

All data words are 128 bits wide. Every operation carries a mode:

* **Boolean**: the 128 bits are 128 independent one-bit secrets. Addition is
  XOR and multiplication is AND.
* **Arithmetic**: the word is one element of Z(2^128). Addition and
  multiplication are taken mod 2^128.

Below, `+` and `-` mean XOR in Boolean mode and ring addition and subtraction
in arithmetic mode. Party indices wrap around (party 1's predecessor is party 3).

A secret `v` is split by drawing random `x1`, `x2` and setting
`x3 = -(x1 + x2)`, so that `x1 + x2 + x3 = 0`. Party `i` gets the tuple
`(x_i, a_i)` with `a_i = x_(i-1) - v`. One party alone sees only random words.
Any two neighbours recover the secret as `v = x_(i-1) - a_i`
(`share_split.sv`, `reconstruct.sv`).

## Gates

**XOR / ADD** (`local_gate.sv`) is local. The output share is
`(x_i + y_i, a_i + b_i)`. It accepts one operation per cycle and has one
cycle of latency.

**AND / MUL** (`mult_gate.sv`) needs one exchange around the ring.

1. Each party computes one of these, using a correlated random `alpha_i`:
   * Boolean: `r_i = (x_i & y_i) ^ (a_i & b_i) ^ alpha_i`
   * arithmetic: `r_i = (a_i*b_i - x_i*y_i + alpha_i) * q`, where `q = 0xAAAA…AAAB` is the inverse of 3 mod 2^128
2. Party `i` sends `r_i` to party `i+1` and receives `r_(i-1)`.
3. The new share is:
   * Boolean: `z_i = r_i ^ r_(i-1)`, `c_i = r_i`
   * arithmetic: `z_i = r_(i-1) - r_i`, `c_i = -2*r_(i-1) - r_i`

The three `r` values sum to the product, and every two of them look random.
The result is again a valid sharing. The unit keeps its own `r_i` in a pending
FIFO and buffers incoming `r_(i-1)` in a receive FIFO. It pairs them in
operation order. Parties therefore need not run in exact lockstep, as long as
they are given the same operations in the same order.

Timing: the unit is fully pipelined. It can accept one operation per cycle.
With the parties in lockstep, a result appears 3 cycles after the operation is
accepted.

The ring has no back-pressure. A party may run at most `RX_DEPTH - 3` (5)
operations ahead of its successor. A sticky `rx_overflow` flag and an
assertion report a violation.

## Correlated randomness without communication

Every AND/MUL consumes one `alpha_i` per party, and the three alphas must sum
to zero. Generating them by talking to the other parties would cost a second
network round per gate. Instead, the parties exchange keys once, and each
party derives its alpha locally (`key_setup.sv`, `corr_rand.sv`).

**Key setup.** After reset, each party builds a 128-bit key `K_i` from four
32-bit RNG words. It sends the key to party `i-1` and receives `K_(i+1)`.
All parties run an ID counter that starts at 0 and advances in lockstep.

**Alpha generation.** AES-128 serves as the PRF, in counter mode:
`P(K, ID) = AES_K(ID)`. Then:

    alpha_i = P(K_i, ID) xor P(K_(i+1), ID)     (Boolean)
    alpha_i = P(K_i, ID)  -  P(K_(i+1), ID)     (arithmetic)

Each `P` term appears once with each sign across the three parties, so the
alphas cancel.

**Pre-computation.** The PRF does not depend on the data, so alphas are
computed ahead of use. Up to `DEPTH` = 32 pairs are held or in flight.
32 covers the 21-cycle AES latency, so the PRF never idles. The pair is
stored raw, and the combining function is applied when an operation consumes
it, in that operation's mode. The parties must therefore issue the same mode
sequence, which they do because they execute the same operations.

**Throughput.** `NUM_AES` sets the rate:

* `NUM_AES = 1` (default): one AES core alternates the two keys every cycle
  and the ID advances every second cycle. This gives one alpha, and so one
  AND/MUL, per 2 cycles.
* `NUM_AES = 2`: two cores give one alpha per cycle, so the AND/MUL unit runs
  at full rate.

The first alpha is ready 23 cycles (one core) or 22 cycles (two cores) after
the keys are ready.

**AES core.** `aes128_pipe.sv` has 21 register stages: `pt ^ key`, then two
stages per round. Round keys are expanded in the pipeline next to the data,
so the key may change every cycle. The S-box is computed from its definition
(GF(2^8) inverse plus affine map) at elaboration time.

**RNG.** `rng32.sv` XORs a 43-bit LFSR with a 37-bit rule-90/150 cellular
automaton. It is **not** a cryptographic source. A real deployment must
replace it with a hardware entropy source.

## The party and the top level

`mpc_party.sv` accepts host messages of 512 data bits
`{x_i, a_i, y_i, b_i}` (x_i in the top 128 bits), an op (`gate`, `mode`)
and an 8-bit tag. It steers each message to the XOR/ADD or the AND/MUL unit.
Results `(z_i, c_i)` return on one port together with the op and the tag.
An AND/MUL result takes the port before an XOR/ADD result that is ready in
the same cycle, so results can come back out of order; use the tag. All
handshakes are valid/ready. A message must stay stable while it waits for
`cmd_ready`, and an assertion checks this.

To run a circuit, the host sends the same gate sequence, with each party's
own shares, to all three parties of a group. It then feeds result shares
back as operands of later gates.

`mpc_system.sv` holds `NUM_GROUPS` independent groups of three parties:

* party `j` sends `r` to party `j+1` and its key to party `j-1`;
* one `share_split` dealer turns a secret into three share tuples;
* one `reconstruct` unit takes `z_(i-1)` and `c_i` and returns the secret.

Party `3g+j` has its own message port, result port and status bits
(`keys_ready`, `alpha_avail`, `rx_overflow`). All parties sit on one device
and the ring links are plain wires. To split parties across devices, cut the
`key_*` and `r_*` wires at a party boundary and carry them over a network
link.

### Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| mpc_system | NUM_GROUPS | 1 | three-party groups (one AND unit per party) |
| mpc_system, mpc_party, corr_rand | NUM_AES | 1 | AES cores per party: 1 = alternating keys, 2 = full rate |
| mpc_party | ALPHA_DEPTH | 32 | correlated randomness pre-computed or in flight |
| mult_gate | PEND_DEPTH / RX_DEPTH | 4 / 8 | own-r and received-r buffers |
| mpc_party, rng32, share_split | SEED | constants | RNG seeds (the top derives one per party) |

Shared types (`share_t`, `mode_e`, `gate_e`, `op_t`) and `INV3` are in
`mpc_pkg.sv`. The AES round functions are in `aes_pkg.sv`.

## Performance

At the default configuration, a group of three parties completes one
128-bit AND/MUL every 2 cycles, with each party doing its share, and one
XOR/ADD every cycle. At 125 MHz that is 8 Gbit/s of AND-gate throughput per
group. Each party also sends 8 Gbit/s of `r` traffic to its successor.
For MPC AES-128 (a 5440-AND Boolean circuit), that is 1.47 M bit-sliced AES
evaluations per second per group. With `NUM_AES = 2`, one 128-bit gate per
cycle saturates a 10 Gbit/s link at 78.13 MHz. Throughput grows linearly with
`NUM_GROUPS`.

## Where this departs from the design it follows

* The reference hardware took a new AND/MUL every 6 cycles, and later every
  4. Its insides are not published. This AND/MUL unit is fully pipelined and
  limited only by the randomness supply (2 cycles with one AES core). The
  6- and 4-cycle versions are not reproduced.
* The reference used third-party AES and RNG cores. Here the AES core is
  written from the standard to the same behaviour: 21-cycle latency and one
  block per cycle. The RNG is this design's own non-cryptographic generator.
* The host side was an AXI bus behind a cloud vendor's PCIe shell. Here it is
  one valid/ready message port per party. The tag, the op encoding and the
  result arbitration are this design's own.
* The combining function for alphas is chosen per operation, not once per
  party.
* The FIFOs, buffer depths, reset behaviour (asynchronous, active low, on
  control state only) and handshakes are this design's own choices.
* Not included: the PCIe/DMA shell, the host software, inter-FPGA network
  links, the maliciously secure protocol extensions, and fused
  multiply-accumulate or matrix-multiply units. The latter would sum several
  local products before one ring exchange; they were planned for the
  reference design but never specified.

## Verification

Each block (all modules but the two small helpers `aes_sbox` and `sync_fifo`,
which are exercised through their users) has a self-checking testbench in
`tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_aes128_pipe`: FIPS-197 and SP 800-38A vectors, with keys changing every
  cycle; checks the exact 21-cycle latency.
* `tb_rng32`: reference model, hold, no repeats, bit balance.
* `tb_key_setup`: key assembly; neighbour key arriving late or early.
* `tb_corr_rand`: alphas cancel in both modes; one- and two-core variants
  give the same sequence; one known value from AES answer tables; first-alpha
  delay; rates of 1/2 and 1 per cycle.
* `tb_local_gate`, `tb_reconstruct`, `tb_share_split`: results against
  values computed in the clear; stalls.
* `tb_mult_gate`: three units in a ring with test-supplied randomness;
  products recovered from every neighbour pair; latency 3; rate 1 per cycle;
  a 3-cycle skew between parties.
* `tb_mpc_party`: three parties in a ring; mixed operations; message field
  order; latencies; no AND before randomness exists.
* `tb_mpc_system`: end-to-end at default parameters (the full-size test). It
  covers key exchange, dealer splitting, a two-level circuit in each mode,
  and 60 back-to-back AND/MUL gates that drain the randomness buffer. It
  checks the steady rate of 1 per 2 cycles, arbitration between the two
  units, a skewed party, result back-pressure and mode switching. Each
  result is reconstructed from all three neighbour pairs. The test fails if
  any of these mechanisms never occurred.
* `tb_workload_scaling`: four groups (12 AND units) with `NUM_AES = 2`, all
  fed back-to-back AND/MUL gates at once. It checks every product, and that
  each unit sustains one 128-bit gate per cycle (256 products in 64 cycles).
  Larger sizes, up to the 20 groups (60 AND units) of the largest
  configuration this design was scaled to, were not simulated.

To run one with Verilator (from the directory that holds `rtl/` and `tb/`):

    verilator --binary --timing --assert -y rtl -y tb rtl/mpc_pkg.sv rtl/aes_pkg.sv \
        tb/tb_mpc_system.sv --top-module tb_mpc_system
    ./obj_dir/Vtb_mpc_system

The packages must come first on the command line; `-y` finds the modules.
