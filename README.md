# NTT polynomial multiplier and Kyber co-processor datapath

CRYSTALS-Kyber spends most of its time multiplying polynomials of degree
below 256 with 12-bit coefficients modulo q = 3329, in the ring
Z_q[X]/(X^256+1), and producing those polynomials from SHAKE output. This RTL
implements both parts in hardware:

* A polynomial multiplier. It computes f·g as INTT(NTT(f) ∘ NTT(g)). A
  2×2 array of butterflies does two NTT layers per pass over memory. The
  memory delivers four coefficients per cycle, and no bit-reversal pass is
  needed.
* A hashing and sampling unit. It has a one-round-per-cycle Keccak-f[1600]
  core with 64-bit serial-in/parallel-out and parallel-in/serial-out
  buffers, a rejection sampler and a binomial sampler. The samplers write
  straight into the multiplier's polynomial memory, and they run while the
  Keccak core computes the next output block.

Modular reduction uses no multipliers. q = 13·2^8 + 1, so a product splits
into 8-bit digits that are recombined with shifts and adds (the "K²-RED"
reduction below). The twiddle factors are pre-scaled to cancel the constant
factor this reduction leaves.

The top module is `kyber_coproc`. It brings out two independent command
ports, one for hashing/sampling and one for the multiplier, plus a host port
into the polynomial memory. A Kyber KEM sequencer (KeyGen/Encaps/Decaps)
would issue commands on these ports. That sequencer is not part of this RTL,
and neither are polynomial addition, compression or encoding.

## Arithmetic: K²-RED (`k2red`)

Write q = k·2^m + 1 with k = 13, m = 8. Then 2^m ≡ −k^-1 (mod q). Split the
input as C = C0 + 2^8·C1 + 2^16·C2 (8-bit C0 and C1; C2 the rest). This gives

    k²·C ≡ k²·C0 − k·C1 + C2  (mod q)

Here k² = 169 = 2^7+2^5+2^3+1 and k = 13 = 2^3+2^2+1, so the right-hand side
needs only shifts and adds. For an input of up to 25 bits, the value lies
in (−q, 16q). The unit adds q, then subtracts 8q, 4q, 2q and q, each only if
the result stays non-negative. The output is then fully reduced to [0, q) in
12 bits, so no extra correction is needed anywhere else in the datapath.

The result is k²·C, not C. Every twiddle factor is therefore stored
multiplied by k^-2 = 169^-1 = 2285 (mod q). A butterfly product
`reduce(b · w·k^-2)` then equals b·w exactly. The point-wise unit reduces
twice in a chain. It ends with one multiplication by k^-4 = 1353, again
through K²-RED.

The unit is combinational; the butterfly registers around it.

## The butterfly (`butterfly`)

There are four pipeline stages: operand registers, the 12×12 multiply,
K²-RED, then the add/subtract stage.

* **CT (forward):** a' = a + w·b, b' = a − w·b.
* **GS (inverse):** a' = (a+b)/2, b' = (b−a)·w/2.

In the inverse, halving mod q is `x/2 = x even ? x>>1 : (x+q)>>1`. Each of
the 7 inverse layers halves, so the INTT's 1/128 factor needs no final pass.
The GS difference is taken as b−a, not a−b. With that choice, the inverse
twiddles ω^-i are read from the forward table: ω^-i = −ω^(n−i), and the
minus sign is folded into the order of the subtraction. A bypass input
passes a and b through with the same four-cycle delay.

## Two layers per pass: the PMC (`pmc`)

The polynomial multiplication core (PMC) is two rows of two butterflies,
8 cycles deep. Each cycle it takes a group of four coefficients
x = (f[j], f[j+s], f[j+2s], f[j+3s]) and applies two consecutive NTT layers
to it:

| mode | meaning | row 1 pairs | row 2 pairs | output order |
|---|---|---|---|---|
| 0 `MODE_CT` | CT, layers of distance 2s then s | (x0,x2) (x1,x3) | (y0a,y1a) (y0b,y1b) | (z2a, z2b, z3a, z3b) |
| 1 `MODE_GS` | GS, layers of distance s then 2s | (x0,x1) (x2,x3) | same | (z2a, z3a, z2b, z3b) |
| 2 `MODE_BYPASS_CT` | row 1 passes through, row 2 CT at distance 1 | bypass | same | as GS |
| 3 `MODE_BYPASS_GS` | row 1 passes through, row 2 GS at distance 1 | bypass | same | as GS |

Row 2 is wired the same in all modes. Only row 1's input pairing and the
final output permutation change. Kyber's NTT has 7 layers, an odd number,
so one round of each transform uses a single row. The forward transform
needs that round with CT butterflies and the inverse with GS butterflies,
which is why there are two bypass modes.

## Polynomial memory without conflicts (`poly_ram`)

Each polynomial slot is 256 coefficients in four banks of 64 words.
Coefficient i lives in:

* bank (sum of the base-4 digits of i) mod 4
* address i >> 2

In a group {j, j+s, j+2s, j+3s}, with s a power of 4 and j having a zero
base-4 digit at position log4(s), the four members differ only in that one
digit. They therefore land in four different banks. Four consecutive
coefficients 4a..4a+3 also land in four different banks; the host port uses
this. Reads and writes of any round group take one cycle. A crossbar
rotates the lanes to and from the banks, and read data appear 2 cycles
after the request. Simulation assertions check that every access uses four
distinct banks.

## Round schedule and twiddles (`polymul_ctrl`, `twiddle_rom`)

| command | rounds (mode, group spacing s) | cycles |
|---|---|---|
| `OP_NTT` | CT 64, CT 16, CT 4, BYPASS_CT 1 | 4 × 75 = 300 |
| `OP_INTT` | BYPASS_GS 1, GS 4, GS 16, GS 64 | 4 × 75 = 300 |
| `OP_PWM` | one pass over the 64 groups | 75 |

Each round issues 64 groups, one per cycle, which is n/4 accesses per round
and (n/8)·log2 n = 256 issue cycles per transform. It then spends 11 cycles
draining: 10 for the last group to pass the RAM read (2 cycles) and the
PMC (8 cycles) and be written, and 1 to start the next round. Results are written back
in place, into the same bank positions they were read from. The next round
starts only after the last write, so a round never reads stale data. A
design with several polynomials in flight could hide this drain. This one
does not.

The twiddle ROM holds 128 entries, TABLE[i] = 17^brv7(i) · 169^-1 mod q,
where brv7 is the 7-bit bit reversal. It is computed at elaboration by a
constant function and has four read ports. The index formulas for each
round are in `polymul_ctrl`:

* CT round p (l1 = 6 − 2p): row 1 uses 2^l1 + j/(4s); row 2 uses
  2^(l1+1) + j/(2s) and the next entry.
* GS rounds read the same table from the top down, with the entries
  mirrored.

The forward transform produces Kyber's NTT-domain order (bit-reversed
residues). The inverse takes that order and returns normal order. So
inputs and outputs of a full multiplication are in normal order, and
nothing is ever permuted.

## Point-wise multiplication (`pwm_unit`)

Kyber's NTT stops at 128 residues of degree 1, modulo X² − ζ_i. A group of
four NTT-domain coefficients holds two of them: (a0,a1) modulo X² − ζ and
(a2,a3) modulo X² + ζ. For each residue:

    r0 = a0·b0 + ζ·a1·b1
    r1 = a0·b1 + a1·b0

Both are computed with K²-RED, then scaled by k^-4. The second residue uses
−ζ. ζ comes from the same twiddle ROM (entry 64 + group). The unit is
pipelined 4 cycles deep and accepts one group per cycle.

## Multiplier top (`polymul_top`)

`polymul_top` combines `NUM_POLY = 4` memory slots, the controller, the PMC,
the PWM unit and the ROM.

* Commands: `cmd_op`, `cmd_src0`, `cmd_src1` and `cmd_dst` are taken on
  `cmd_valid && cmd_ready`. `done` pulses when the result is in memory.
  NTT and INTT work in place on `cmd_dst`.
* Host port: while the unit is idle, `host_we` or `host_re` moves one group
  of coefficients 4a..4a+3 of slot `host_slot` per cycle. Read data arrive
  2 cycles later with `host_rvalid`.

## Hashing and sampling (`keccak_core`, `sipo`, `piso`, `rej_sampler`, `cbd_sampler`, `hash_sampler`)

* `keccak_core`: Keccak-f[1600], one round per cycle, 24 cycles per
  permutation. It can clear the state and XOR in a 1344-bit rate block
  when it starts.
* `sipo` collects 64-bit words into a 1344-bit block. `piso` streams a
  block out as 64-bit words; the word count is programmable so that
  SHAKE-256 (17 words) and SHA3-512 (9 words) also work.
* `rej_sampler` (Kyber's Parse): each 3 bytes give two 12-bit candidates,
  and candidates ≥ q are dropped. It takes 72 bits per cycle, so a
  1344-bit SHAKE-128 block is consumed in 21 cycles (at the stream's 64
  bits per cycle). Its roughly 91 kept values are written, packed four per
  group, in about 23 cycles. Both are below the 24 cycles of the next
  permutation.
* `cbd_sampler` (centered binomial, η = 2 or 3): four coefficients per
  cycle.
* `hash_sampler` runs all of these from one command port: `ABSORB` (with
  optional state clear), `SQUEEZE` to the host, `SAMPLE_REJ` and
  `SAMPLE_CBD`. When a block is handed to the PISO, the core immediately
  permutes the next one. Sampling block k therefore overlaps computing
  block k+1, and the samplers add no time of their own beyond a few cycles
  per command (checked in `tb_hash_sampler`).
* Padding (SHAKE's 0x1F … 0x80) is the host's job. It is included in the
  words loaded into the SIPO.

## The co-processor (`kyber_coproc`)

`kyber_coproc` connects sampler writes to a multiplier slot (`hs_slot`)
through the multiplier's host port. A key-generation step looks like this:

1. Absorb seed‖j‖i, then `SAMPLE_REJ` into slot 0. The result is â,
   already in the NTT domain.
2. Absorb σ‖nonce, then `SAMPLE_CBD` into slot 1. The result is s.
3. `OP_NTT` slot 1, `OP_PWM` 0,1→2, `OP_INTT` 2.

Sampling and host accesses use the memory port, so they must wait until the
multiplier is idle. An absorb or squeeze may run while the multiplier is
busy.

## Where this departs from the source design

* **Buffering:** the source pipeline lists 2 cycles of RAM read, 8 cycles
  of butterflies and 4 cycles of result buffering in registers. The skewed
  bank mapping here lets every round write its group back to the same
  positions in one cycle, so there is no buffering stage; a round is 64 + 11
  cycles.
* **Bypass modes:** the source names three modes (CT, GS, bypass). This
  design has two bypass modes, one for each butterfly type.
* **K²-RED internals:** the shifts-and-adds form of k²C0 − kC1 + C2 comes
  from the KRED-2x reduction. The final correction into 12 bits (conditional
  subtraction of 8q, 4q, 2q, q) is this design's own.
* **Twiddle scaling:** twiddles are only scaled by k^-2. The k^-1 scaling,
  which goes with a single-level KRED, is not used.
* **Point-wise unit:** it has its own multipliers, not shared with the
  butterflies, and its internal structure is this design's own.
* **Keccak:** a plain round-per-cycle core with the same 24-cycle latency,
  not the specific published core the source builds on.
* **Not built:** the KEM sequencer, polynomial addition/subtraction,
  compression, and byte encoding/decoding. The source reports complete
  Kyber-512/768/1024 KeyGen/Encaps/Decaps timings, which cannot be
  reproduced without them. Because there is no addition, the sum over a
  row of Kyber's matrix-vector product is accumulated by the host (see
  `tb_kyber_matvec` below).
* Slot count, command/host handshakes, the sampler rates and the hashing
  command set are this design's choices.

## How far it is verified

Every module has its own self-checking testbench in `tb/`. Each compares
against an independent software model written in the testbench:

* `tb_k2red` checks corner inputs and random 24- and 25-bit values
  against k²·c mod q.
* `tb_twiddle_rom` checks every entry by square-and-multiply.
* `tb_keccak_core` checks known answers: the all-zero permutation, SHAKE-128
  output blocks and SHA3-256("abc").
* `tb_polymul_ctrl` replays the controller's butterflies in software and
  compares them with a reference NTT, checking the 300/75-cycle command
  lengths.
* `tb_polymul_top` runs random polynomials through NTT (against a direct
  reference NTT), PWM and INTT, and compares the product with schoolbook
  negacyclic multiplication.
* `tb_kyber_coproc` runs the full-size top, with no parameters overridden,
  through one complete key-generation-style step:
  1. rejection-sample â from SHAKE-128;
  2. sample s with CBD η=3;
  3. NTT, PWM and INTT.

  It reads â and s back and checks their ranges. It checks the result
  against INTT(â)·s, computed in software with a schoolbook negacyclic
  product, and checks one SHAKE-128 squeeze against a known output value.
  The exact sampler outputs are checked in their own testbenches
  (`tb_rej_sampler`, `tb_cbd_sampler`, `tb_hash_sampler`). The testbench
  also counts the mechanisms: every PMC mode, the samplers' writes, Keccak permutations
  that overlap sampling, and hashing that overlaps a multiplier command. It
  fails if any count is zero.

* `tb_kyber_matvec` is the workload test. It computes one row of Kyber's
  key-generation product t̂ = Â∘ŝ for k = 2, 3 and 4 (Kyber-512, -768
  and -1024). Each term is sampled, transformed and multiplied on the
  co-processor. The host accumulates the row sum, writes it back, and the
  co-processor runs the INTT. The result is compared with the software
  sum of negacyclic products. One row takes 2067, 2902 and 3718 cycles for
  k = 2, 3 and 4. That includes the host reading back s, â and each
  product (66 cycles per polynomial); nothing in this sequence is
  overlapped.

Each module's own testbench also failed against a deliberately broken
copy of the module (for example: a wrong K²-RED constant, a missing GS halving, a wrong
butterfly pairing, a removed bank crossbar, the wrong sign of ζ, Keccak's
χ step without its inversion, a sampler accepting q). No timing closure or
FPGA resource figures are claimed. The RTL has been linted with verilator
and elaborated with yosys/slang, but not placed and routed.

## Simulating with verilator

Packages first, then the testbench. Modules are found through the library
path:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/ntt_pkg.sv rtl/keccak_pkg.sv tb/tb_polymul_top.sv --top-module tb_polymul_top
    ./obj_dir/Vtb_polymul_top

Each testbench prints one line `TB_RESULT checks=N failures=M` and has a
watchdog. Substitute any `tb/tb_<module>.sv`. `tb_kyber_coproc` is the
end-to-end test and `tb_kyber_matvec` the Kyber workload. Both build in
under a minute and simulate in seconds. Adding `+verilator+rand+reset+2` to
the simulation command starts every uninitialised variable at a random
value. The testbenches are written to pass that way.
