# Integer-vector homomorphic encryption accelerator

This RTL accelerates a homomorphic encryption scheme for integer vectors. In this
scheme a cloud server can add ciphertexts, apply linear maps to them and take
weighted inner products of them, and so evaluate polynomials, without ever
seeing the data. A plaintext `x` (m integers) is encrypted as a ciphertext `c`
(n integers) under an integer secret key `S`, so that

    S c = w x + e        (w a large scalar, |e_i| < w/2)

and decryption is `x = round(S c / w)`. Every operation on ciphertexts is
integer matrix arithmetic, so both parties need the same kind of hardware:

* the **client** (key owner) builds *key-switching matrices* `M`, which let the
  server turn the result of an operation back into an ordinary ciphertext, and
  decrypts results;
* the **server** (data owner) runs the operations on stored ciphertexts.

The top level, `he_accel`, holds one accelerator for each side:
`key_switch_accel` (client) and `server_accel` (server). They share only clock
and reset: the two parties exchange matrices and results in software. All
elements are 32-bit two's-complement integers and the vector datapaths are 16
lanes wide.

## The arithmetic the hardware implements

**Key switching.** To move a ciphertext from key `S` to a new key `S'`, the
ciphertext is first written in signed bits and the key scaled to match:

* `c*`: each element `c_i` becomes l digits `b_ik ∈ {-1, 0, 1}` with
  `c_i = Σ b_ik 2^k`, most significant digit first. A negative element gives
  the negated bits of its magnitude.
* `S*`: each key entry `S_ij` becomes the l entries `[2^(l-1) S_ij, …, 2 S_ij, S_ij]`.

Then `S* c* = S c` while `|c*| = 1`, which keeps the noise small. The client
draws two Gaussian matrices `A` and `E` and forms
`M = [S* − T A + E ; A]` with the new key `S' = [I, T]`. The server then
computes `c' = M c*`. The assembly of `M` is done in software from the results
of the hardware units.

Worked example, used in the testbenches: `c = [1, −2]`, `S = [1 2; 3 4]`, l = 3 gives
`c* = [0,0,1, 0,−1,0]` and `S* = [4 2 1 8 4 2; 12 6 3 16 8 4]`, so `S* c* = S c = [−3, −5]`.

**Server operations.**

| operation | computation | unit |
|---|---|---|
| addition | `c = c1 + c2` | `vec_addition` |
| linear transform `G` | `c' = M c` (M switches the key from `G S`) | `linear_transform` |
| weighted inner products `x1ᵀ H_j x2` | `c'' = M · round(vec(c1 c2ᵀ) / w)` | `weighted_inner_prod` |
| degree-2 polynomial | the same on the extended ciphertexts `[w, c]` | `polynomial_accel` |

`vec(A)` stacks the columns of `A`: entry `(i, j)` goes to position `j·rows + i`.
Each row of `M` in the inner product holds one `vec(S1ᵀ H_j S2)ᵀ`, so one pass
computes as many inner products as `M` has rows. Polynomials of higher degree
are sequences of such passes, which software schedules.

## Server side: `server_accel`

The server accelerator stores the encrypted database in a Dmem of 256 words.
Each word holds one ciphertext of up to 16 elements. A request runs in two
steps:

1. **Memory read.** The request (`cmd_valid`, taken when `cmd_ready`) gives the
   operation (`op_t`: `OP_ADD`, `OP_LIN`, `OP_WIP`, `OP_POLY`), two addresses, `w`
   and the number of rows of `M`. The cycle that takes the request reads `c1`.
   The next cycle reads `c2`.
2. **Operation.** An issue cycle starts the selected unit. Then the rows of
   `M` are accepted on `m_row` while `m_ready` is high:
   * `OP_LIN`: one 16-element row per write.
   * `OP_WIP`: one write per row.
   * `OP_POLY`: 16 writes per row.

   Results come out on `res_*`. An addition gives all 16 lanes. The other
   operations give one 32-bit entry per row, in lane 0, numbered by `res_row`.
   `irq` pulses once the operation has delivered its last result.

Latencies, measured by the testbenches:

* **Addition:** the sum is valid 3 cycles after the cycle that presents the request.
* **Linear transform:** one result per row, one cycle after each row of `M`.
  An m-row matrix takes m cycles.
* **Inner product and polynomial:** see below.

`OP_WIP` uses the first 4 elements of each stored ciphertext. `OP_POLY` uses the
first 15.

### The weighted inner product pipeline

`weighted_inner_prod` is the most involved unit. It is built for ciphertexts
of `N = 4` elements, so that `vec(c1 c2ᵀ)` has 16 entries and one row of `M`
fits one 16-lane write. A job runs in three phases:

1. **LOAD.** The first write latches `c1`, `c2`, `w` and the row count. Each
   later write stores one 16-entry chunk of a row of `M` in a Dmem. There are
   `CHUNKS = ceil(NE²/16)` chunks per row.
2. **OUTER.** This phase starts once the last chunk is in.
   * `outer_product` emits `c1 c2ᵀ` one row per cycle, as 64-bit products.
   * `vectorize` collects the rows and emits `vec()` in 16-entry chunks.
   * `nint_vector_divide` divides each chunk by `w` and rounds it to the
     nearest integer (ties away from zero).

   The rounded vector `c'` (at most `CHUNKS × 16` entries) is kept in registers.
3. **DOT.** The rows of `M` are read back from the Dmem, one chunk per cycle,
   and each row is dotted with `c'`. Each row's sum leaves on `c` with `c_valid`.
   That is one result every `CHUNKS` cycles, and `done` marks the last.

The first result appears `NE + 2·CHUNKS + 5` cycles after the cycle of the
last chunk. That is 11 cycles for the 4-element unit and 53 for the
polynomial unit.

With `EXTEND = 1`, the unit prepends `w` to both ciphertexts, forming the
ciphertext of `[1, x]`. That adds constant and linear terms to the quadratic
form. `polynomial_accel` is this configuration with 15 ciphertext elements, so
the extended vectors have 16 elements, `vec()` has 256 entries and each row of
`M` arrives as 16 chunks. Its row store is 256 rows × 16 chunks × 512 bits
(256 kB), the largest memory in the design.

Products of two ciphertext elements are kept at 64 bits until the division.
After the division, all sums wrap modulo 2³².

## Client side: `key_switch_accel`

The client accelerator has five independent units. Each has its own group of
ports, which corresponds to one driver call:

| prefix | unit | does |
|---|---|---|
| `brv_` | `bit_repr_vector` | `c → c*` |
| `brm_` | `bit_repr_matrix` | `S → S*` |
| `rnd_` | `get_random_matrix` | Gaussian matrices `A`, `E` |
| `mm_` | `mat_mult` | `T A`, `S c`, `G S`, `H S`, `Sᵀ H S` |
| `div_` | `nint_vector_divide` | `round(v / w)` for decryption |
| `vz_` | `vectorize` | `vec(Sᵀ H S)`, the rows of a polynomial key |
| `km_` | `dmem_bank` | cache of 8 Dmems for `S`, `S*`, `A`, `E`, `M` |

`irq` is registered and pulses one cycle after any unit finishes.

**`bit_repr_vector` and `bit_repr_matrix`**

* **Loading.** Elements are written one per cycle with `chipselect` and
  `write` into a Dmem. `bit_repr_matrix` can also take a whole row of `S` per
  cycle with `chipselect` and `row_write` on the 16-entry `S_row` input,
  because it keeps one Dmem per column. Hold `width` (and `length`) and `ell`
  steady while loading. Supported sizes: vectors up to 256 elements, keys up to
  256 × 16, and l up to 32.
* **Output.** Two cycles after the last write, the output streams one entry
  per cycle with `out_valid`, with no gaps even when l = 1, and `done` marks
  the last. To achieve this, the next element is fetched from the Dmem while
  the current one is being expanded.
* **Sizes.** `output_length` and `output_width` report the size of the result.
* **Key entries.** Entries of `S*` wrap modulo 2³².

**`get_random_matrix`**

* **Starting.** A cycle with `chipselect` and `gen` starts a `length × width`
  matrix. One sample per cycle goes into a Dmem, and then the samples are read
  out row-major.
* **Timing.** The first sample appears `length·width + 3` cycles after the
  `gen` cycle.
* **Samples.** Each sample is the sum of the low 4 bits of four free-running
  32-bit LFSRs, minus 30. The sum of uniforms approximates a zero-mean
  Gaussian with σ ≈ 9.2, in the range −30…30.
* **Spread.** `NUM_LFSR` and `U_BITS` set the spread.

**`vectorize` (client instance)**

* **Function.** Takes an `n × n` matrix (`n ≤ 16`, given on `vz_rows`) one
  row per cycle, with the unused columns zero. It returns `vec()` of it as 16
  chunks of 16 entries, zeros after the first `n²`.
* **Timing.** The chunks follow on consecutive cycles. The first is valid
  two cycles after the last row is presented. `vz_out_last` marks the last chunk.
* **Shared module.** The server's inner-product units use the same module with
  the row count tied to 4 or 16.

**`dmem_bank` (matrix cache)**

* **Contents.** Eight Dmems of 256 rows × 512 bits: 128 kB, enough for eight
  256 × 16 matrices.
* **Access.** One write port (`we`, `wbank`, `waddr`, `wdata`) and one read
  port. `rdata` holds row `raddr` of Dmem `rbank` one cycle after they are
  presented.
* **Use.** The driver keeps `S`, `S*`, `A`, `E` and the finished `M` here
  between steps. Nothing moves data between the cache and the units on its
  own; the driver does the copying.

**`mat_mult`**

* **Loading B.** The right operand `B` (up to 16 × 16) is loaded one row per
  cycle.
* **Products.** Each row `a` presented with `a_valid` gives the row `a·B` one
  cycle later. An m-row product takes m cycles.
* **Larger matrices.** These are split into 16 × 16 blocks by software.

**`nint_vector_divide`**

* **Function.** Divides 16 64-bit entries by `w` in one cycle, rounding to
  the nearest integer with ties away from zero.
* **Zero divisor.** `w = 0` gives 0.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `he_pkg` | `LANES`, `DATA_W` | 16, 32 | lanes, element width |
| `dmem` | `DEPTH`, `WIDTH` | 256, 512 | a 16 kB Dmem |
| `dmem_bank` | `NUM_BANKS` | 8 | Dmems in the client cache |
| `bit_repr_vector` | `MAX_N`, `MAX_ELL` | 256, 32 | vector length, digits |
| `bit_repr_matrix`, `get_random_matrix` | `MAX_ROWS`, `MAX_COLS` | 256, 16 | key / matrix size |
| `get_random_matrix` | `NUM_LFSR`, `U_BITS` | 4, 4 | Gaussian approximation |
| `weighted_inner_prod` | `N`, `EXTEND`, `MAX_ROWS` | 4, 0, 256 | ciphertext length, `[w, c]` extension, rows of `M` |
| `polynomial_accel` | `N` | 15 | ciphertext length before extension |
| `server_accel` | `CT_DEPTH`, `MAX_ROWS` | 256, 256 | stored ciphertexts, rows of `M` |

The 16-lane datapath, 32-bit elements, 256-row / 16-column limits and the
16 kB Dmem size come from the original design. `he_accel` has no parameters,
and its port widths follow these defaults.

The whole design holds about 3.72 Mbit of memory (about 454 kB): 2.67 Mbit
in the units, mostly the polynomial unit's row store, and 1 Mbit in the client
cache. That is within the original estimate of about 640 kB of on-chip memory
and well within a Cyclone V's 12 Mbit.

## How this RTL relates to the original design

The original design gives the scheme, the list of hardware units, port lists
for most of them, the 16-lane / 32-bit / 256-row sizes and the memory budget.
It leaves the inside of most units as outlines. The following are choices made
here:

* **Bit representation:**
  * Digits are emitted most significant first, which is the order that makes
    `S* c* = S c` hold with `S*` ordered from the highest power of two down.
  * l is an input port (`ell`).
  * The length fields are wider than 8 bits so that 256 can be expressed.
  * Each digit is formed during read-out instead of in a separate pass.
  * `bit_repr_matrix` keeps one Dmem per column instead of one Dmem per row,
    so that a whole row can be written in one cycle. Both the original
    entry-per-cycle loading and the row-per-cycle loading are built; the
    `row_write` / `S_row` port names are chosen here.
* **Random matrices:** the LFSR polynomial (x³²+x²²+x²+x+1), the seeds, the
  sum-of-uniforms construction and the spread are choices made here. The
  original gives no σ.
* **Rounding:** ties round away from zero, and division by zero gives 0.
* **Inner product:**
  * The first write carries `c1`, `c2`, `w` and the row count. Rows of `M`
    follow in 16-entry chunks.
  * Results stream out one per row instead of appearing as a single wide word.
* **Polynomial unit:** "16-element vectors" is read as the length after
  extension, so the unit takes 15 ciphertext elements.
* **Server:** the request format, the single `M` input stream, the shared
  result port and the one-ciphertext-per-word database layout are choices
  made here.
* **Memories:** the 8 client Dmems are the matrix cache, with a single
  read and write port chosen here. The server's Dmems sit inside the units
  that use them rather than in a shared pool of 16 blocks. Their sizes match
  the original block size where the unit needs it.
* **Not in hardware:**
  * the client and server programs;
  * the Linux drivers and the ioctl / interrupt plumbing;
  * the client–server link;
  * the assembly of `M` from `S*`, `T A` and `E`;
  * the scheduling of higher-degree polynomials.

  Each hardware unit exposes plain `chipselect` / `write` strobes and data
  ports in place of a processor bus.
* **Overflow:** arithmetic is 32-bit modular, as the scheme uses 32-bit
  integers. Nothing detects overflow, so keeping `w`, keys and noise in range
  is the software's job.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv` that compares
the unit with arithmetic done in the testbench, checks the cycle timing given
above, and ends with a `TB_RESULT checks=N failures=M` line. Highlights:

* `tb_bit_repr_vector`, `tb_bit_repr_matrix`, `tb_key_switch_accel`: the worked
  example, random keys, `S* c* = S c` computed through the matrix multiplier,
  and both ways of loading a key.
* `tb_dmem_bank`, `tb_key_switch_accel`: random writes and reads across all
  eight cache Dmems.
* `tb_get_random_matrix`: sample count, range, mean ≈ 0, variance ≈ 85.
* `tb_weighted_inner_prod`, `tb_polynomial_accel`: random jobs up to 256 (64)
  rows against a 64-bit reference, with idle gaps in the `M` stream.
* `tb_server_accel`: all four operations at random database addresses.
* `tb_he_accel`: end to end at the default sizes. Plaintexts are encrypted as
  `c = w x + e` under the identity key (`w = 2¹⁶`, `|e| ≤ 3`) and stored. The
  server adds them, applies a linear map, takes three weighted inner products
  and evaluates `x2² − 4·x1·x3 + 3·x1 + 5`. The client decrypts each result with
  the multiplier and the rounding divider. Each `M` goes through the client's
  cache before it is streamed to the server. The test also counts that every
  unit and both interrupts were exercised.

To run one with Verilator (from the folder holding `rtl/` and `tb/`):

    verilator --binary --timing --assert -y rtl -y tb rtl/he_pkg.sv \
        tb/tb_he_accel.sv --top-module tb_he_accel -o sim
    ./obj_dir/sim

Every testbench finishes within seconds. Lint with
`verilator --lint-only -Wall -y rtl rtl/he_pkg.sv rtl/he_accel.sv`.

The arithmetic, the orderings and the timing are checked by simulation. The
design has not been run on an FPGA, and timing closure of the 16 × 16
multiplier array and the 64-bit dividers at any clock rate is unverified.
Those paths are combinational within one cycle and would need pipelining for
high clock rates.
