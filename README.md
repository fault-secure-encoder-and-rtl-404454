# Fault-secure encoder and corrector for a nanoscale memory: (15,7,5) EG-LDPC

In a memory built from very small devices, transient faults hit more than the
stored bits. The encoder that builds the check bits and the corrector that
repairs words on their way out can fail too. A conventional ECC memory trusts
those two circuits. This design checks both of them.

The check uses the same code that protects the storage, so no duplicated
logic is needed. The code is the (15,7,5) Euclidean Geometry LDPC code. Its
parity-check matrix has more rows than its rank, and that redundancy makes a
plain syndrome checker *fault-secure*: any combination of up to four errors
is flagged, whether they are in the checked word or in the checker's own
gates. One such checker watches the encoder output and another watches the
corrector output. When either checker flags an error, the unit behind it
repeats its work. Stored words are repaired on every read and by a periodic
scrub, so upsets cannot pile up beyond what the code corrects.

```
 write data (7b) ─► encoder ─► [fault-secure detector] ──ok──► memory (15b words)
                        ▲ repeat on error                          │
                        └──────────── controller ◄─────────────────┤
                        ┌ repeat on error                          ▼
 read data (7b)  ◄──────┴─ [fault-secure detector] ◄── majority-logic corrector
                                                     (also used by the scrub,
                                                      which writes the result back)
```

## The code

The code is the type-I two-dimensional EG-LDPC code with t = 2:

| quantity | value |
|---|---|
| length n = 2^(2t) − 1 | 15 |
| information bits k = 2^(2t) − 3^t | 7 |
| minimum distance 2^t + 1 | 5 |
| parity-check matrix | 15 × 15, row and column weight 4 |

**Codeword layout.** The code is systematic. Bits `c[6:0]` hold the
information bits `i0..i6` unchanged, and bits `c[14:7]` hold the parity bits
`p0..p7`. A read therefore needs no separate decode step: after correction,
the data is simply the low 7 bits.

**Generator.** The code is cyclic, with generator polynomial
g(x) = 1 + x + x² + x⁴ + x⁸. Parity bit p_j of information bit i_m is bit j
of x^(8+m) mod g(x). Written out:

```
p0 = i0^i4^i6          p4 = i0^i2^i3
p1 = i0^i1^i4^i5^i6    p5 = i1^i3^i4
p2 = i0^i1^i2^i4^i5    p6 = i2^i4^i5
p3 = i1^i2^i3^i5^i6    p7 = i3^i5^i6
```

These equations take 22 two-input XORs. For example, information bits
`000_0010` (only i1 set) give p0..p7 = 0,1,1,1,0,1,0,0.

**Parity-check matrix.** Each row of H is the incidence vector of one line of
the Euclidean plane EG(2, 4). Row r is the line {0, 4, 6, 7} rotated by r
positions: bit c_j takes part in check r when (j − r) mod 15 is one of
{0, 4, 6, 7}. Two lines meet in at most one point. So for every bit
position, the four rows that contain it are *orthogonal* on that bit: the
bit appears in all four, and every other bit appears in at most one of them.

The line {0, 4, 6, 7} was derived from the generator. It is the only weight-4
vector whose 15 rotations are all orthogonal to every codeword.

`eg_ldpc_pkg` works out both matrices from `GEN_POLY` and `H_LINE` with
constant functions, so the RTL holds no table.

## Fault-secure detector (`fs_detector`)

The detector computes S = C·Hᵀ as 15 independent 4-input XORs, followed by a
15-input OR. A zero syndrome means C is a codeword. H has rank 8 but 15 rows,
so the extra syndrome bits are what make the checker fault-secure with no
logic added. Two instances are used: one on the encoder output and one on the
corrector output. The syndromes are also brought out as `enc_syndrome` and
`cor_syndrome`.

## Majority-logic corrector (`mlg_corrector`)

This is the part to understand first. The corrector decodes in one step by
majority logic. For bit i it evaluates the four parity checks orthogonal on
i:

* **Bit i is wrong, with at most one other error.** All four checks see the
  error in i. The other error can cancel it in at most one check, so at
  least **3** checks are 1.
* **Bit i is right, with at most two errors elsewhere.** Each of those errors
  is in at most one of the four checks, so at most **2** checks are 1.

So bit i is inverted when at least `THRESH = 3` of its four checks are 1. This
corrects every pattern of up to two errors, which is exactly what minimum
distance 5 allows.

Each output bit has its own check-sum XORs and its own majority gate. A
single fault inside the corrector therefore damages at most one output bit,
and the detector behind the corrector sees that.

Three or more errors in one stored word are beyond the code. The corrector
output is then usually not a codeword. The detector flags it, the retries
fail, and the read ends with `rsp_error`. Some 3-error patterns are
miscorrected into a different valid codeword, and those go unnoticed.

## Encoder (`eg_ldpc_encoder`)

The encoder copies the information bits and computes each parity bit with
its own XOR of the information bits the generator selects. No gate is shared
between codeword bits. A single internal fault therefore corrupts one digit
at most, and the encoder's detector is guaranteed to catch it.

## Retry and scrubbing (`ft_mem_ctrl`)

The controller runs a 6-state FSM.

* **Write.** The encoder output is checked in the cycle after the request is
  accepted. If it is clean, the codeword is stored and the response is given
  in that same cycle. If the detector flags an error, the encoder is
  evaluated again in the next cycle (a retry).
* **Read.** The memory is read. In the next cycle the corrector output is
  checked. If it is clean, the response carries `corrected[6:0]`. If not,
  the correction is repeated on the same stored word.
* **Retry limit.** After `MAX_RETRY` repeats that still fail, the operation is
  abandoned and `rsp_error` is set. A failed write stores nothing. A failed
  read returns the last corrector output.
* **Scrub.** Every `SCRUB_PERIOD` cycles a scrub becomes pending. Once the
  current request is finished, `req_ready` stays low and every word is read,
  corrected, checked (with retry) and written back. That takes 2 cycles per
  word plus any retries. A word that never passes the check is left
  untouched, and `scrub_fail` pulses.

**Timing without faults:**

| operation | response after acceptance |
|---|---|
| write | 1 cycle |
| read | 2 cycles |
| scrub | 2·DEPTH cycles with no requests accepted |

Each retry adds one cycle.

**Handshake.** A request is accepted on a clock edge where `req_valid` and
`req_ready` are both high. Each accepted request gets exactly one
`rsp_valid` pulse. Reset is synchronous and active low (`rst_n`). It clears
the controller but not the memory array.

**Status outputs:**

| signal | meaning |
|---|---|
| `enc_retry`, `cor_retry` | a repeat was started |
| `cor_fixed` | a word that passed the check was changed by the corrector |
| `scrub_active` | a scrub is in progress (level) |
| `scrub_fail` | a scrubbed word never passed the check |

## Memory (`codeword_memory`)

The memory is a single-port synchronous array of `DEPTH` words of 15 bits.
Read data appears one cycle after the read and is held until the next read.
It stands in for the dense nanoscale storage array, whose cell technology is
outside this design.

## Fault-injection inputs

The top level, `ft_memory_system`, has inputs that emulate transient faults.
Tie them to zero in real use.

| input | effect |
|---|---|
| `enc_fault_mask` | XORed onto the encoder output |
| `cor_fault_mask` | XORed onto the corrector output |
| `upset_en`, `upset_addr`, `upset_mask` | flip bits of one stored word; a write to the same word in the same cycle wins |

## Parameters

| parameter | default | meaning |
|---|---|---|
| `DEPTH` | 1024 | words in the memory (15 360 stored bits, 7 168 data bits) |
| `MAX_RETRY` | 3 | repeats before an operation is abandoned |
| `SCRUB_PERIOD` | 65536 | cycles between scrub passes |
| `THRESH` (corrector) | 3 | check sums needed to invert a bit |

The code itself (`T = 2`, hence N = 15 and K = 7) is fixed in `eg_ldpc_pkg`.
Larger EG-LDPC codes (for example t = 3, a (63,37,9) code) would need a new
`GEN_POLY` and `H_LINE` and wider data ports.

## What comes from the published scheme and what is this design's own

**Taken from the published scheme:**

* The code and its parameters.
* The systematic generator, given as the parity equations.
* The syndrome check S = C·Hᵀ with a 15 × 15 cyclic H built from a line and
  its rotations.
* One fault-secure detector on the encoder and one on the corrector.
* Repeating an operation when its detector flags an error.
* The rule of no shared logic between codeword bits.
* Periodic scrubbing that stops normal accesses.

**This design's own choices:**

* The specific line {0, 4, 6, 7}, derived from the code.
* One-step majority-logic correction and its threshold.
* The retry limit and the error response when it runs out.
* The scrub schedule: a full pass every `SCRUB_PERIOD` cycles.
* The memory size and the request/response interface.
* The fault-injection inputs.

**Not built:**

* The nanowire crossbar memory and its defect-tolerance circuits.
* Larger codes.
* The reliability (FIT) and area analysis that motivates the scheme.

**Caveat on "no shared logic".** The RTL writes every codeword bit's logic
separately, but a synthesis tool will merge equal XOR subterms unless told
not to. To keep the single-fault-one-digit property in a netlist, keep the
hierarchy or mark the `g_parity`, `g_row` and `g_bit` generate blocks as
don't-touch.

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog.

| testbench | what it checks |
|---|---|
| `tb_eg_ldpc_encoder` | all 128 messages against the written-out parity equations; the `000_0010` example |
| `tb_fs_detector` | no false alarm on any codeword; every error pattern of weight 1–4 on every codeword is flagged; syndrome bits against an independent model |
| `tb_mlg_corrector` | all error patterns of weight ≤ 2 on all 128 codewords; random words compared with nearest-codeword search |
| `tb_codeword_memory` | random reads, writes and upsets against a shadow array |
| `tb_ft_mem_ctrl` | controller alone with modelled neighbours: latencies, one-retry and give-up cases for the encoder and the corrector, a scrub repairing upset words while requests wait |
| `tb_ft_memory_system` | whole system at default parameters, end to end (see below) |

The end-to-end test runs random traffic through two scrub passes with faults
injected. It counts how often each mechanism occurs and fails if any never
occurs:

* encoder and corrector retries
* corrections on read and during scrubbing
* abandoned writes and reads
* requests stalled by a scrub
* single and double upsets

The reference model used by the testbenches is `tb/ldpc_ref_pkg.sv`.

To run one testbench with Verilator (5.x):

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/eg_ldpc_pkg.sv tb/ldpc_ref_pkg.sv tb/tb_ft_memory_system.sv \
    --top-module tb_ft_memory_system -o sim
./obj_dir/sim
```

Substitute any other testbench name. The full-system test at default size
finishes in well under a second.
