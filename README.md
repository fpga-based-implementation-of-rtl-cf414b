# Size-adaptive Toeplitz privacy amplification in rhomboid blocks

Privacy amplification is the last step of quantum key distribution: the two
parties hash their error-corrected key of L bits down to a shorter final key
of L_k bits, removing what an eavesdropper may know. The hash is a random
L_k x L Toeplitz matrix T (constant along every diagonal), applied over GF(2):

    K = T * X        (AND is the multiplication, XOR the addition)

T is defined by L + L_k - 1 random bits: its first row T(1) .. T(L) and the
rest of its first column T(L+1) .. T(L+L_k-1). Element (r, c) is T(c-r+1)
when c >= r and T(L+r-c) otherwise.

This RTL computes K with a p x p array of AND/XOR cells (p = 256 by default)
that takes one p x p piece of the matrix per clock. It never stores the
matrix, and it stores nothing of size L_k x L. Besides the input key and the
L + L_k - 1 hash bits, its only working memory is the L_k-bit final key
itself. L and L_k are given per
block at run time (hence "size-adaptive"), up to the compile-time maxima.

## The rhomboid-block decomposition

The matrix is cut into blocks that are not squares but parallelograms
("rhomboid blocks", RBs). An RB covers p consecutive rows; in each row it
covers p consecutive columns, and each row starts one column to the right of
the row above. Because T is constant along diagonals, **every row of an RB
holds the same p hash bits** h[0..p-1], and every RB on the same diagonal of
RBs holds the same p bits too. One diagonal of RBs therefore needs one p-bit
hash word, read once.

To make every RB complete, the matrix is padded:

* p columns in front of the first column, and zero columns after the last,
  to N = ceil(L/p)*p + 2p columns; the key X is padded the same way (p zeros
  in front, zeros after);
* rows up to M = ceil(L_k/p)*p; the padding follows the diagonal rule and any
  element that the rule does not define is zero.

The padded matrix is an m x n array of RBs, with

    nk = ceil(L/p)        words of key
    n  = nk + 1           RB columns
    m  = ceil(L_k/p)      RB rows = words of final key
    s  = m + n - 1        diagonals ("groups") = hash words

Number the RB rows A = 0 .. m-1 and columns J = 0 .. n-1. The padded key is a
sequence of p-bit words D(0) = 0, D(1) .. D(nk) = the key, D(nk+1) = 0. RB
(A, J) multiplies row i of its block with the bits i .. i+p-1 of the 2p-bit
window {D(J+1), D(J)}:

    out[i] = XOR_k ( h[k] AND window[i+k] ),   i = 0 .. p-1

and the result is XORed into the running key word A. After all n RBs of row
A have been applied, word A is final key bits p*A .. p*A+p-1.

Example, p = 4, L = 11, L_k = 10: nk = 3, n = 4, m = 3, s = 6. The groups
are, as (A, J):

    group 0: (0,1) (1,2) (2,3)     first-row bits T1..T4
    group 1: (0,2) (1,3)           T5..T8
    group 2: (0,3)                 T9..T11, 0
    group 3: (0,0) (1,1) (2,2)     T12..T15, reversed
    group 4: (1,0) (2,1)           T16..T19, reversed
    group 5: (2,0)                 T20, 0, 0, 0, reversed

## Walking order

The controller walks the diagonals in this order:

1. **Top-right groups** g = 0 .. n-2: the diagonal starts at (0, g+1). Its
   hash word holds first-row bits T(p*g+1) .. T(p*g+p), in the order an RB
   row uses them.
2. **Main and bottom-left groups** g = n-1 .. s-1, with q = g-n+1: the
   diagonal starts at (q, 0). Its hash word holds first-column bits
   T(L+p*q+1) .. T(L+p*q+p). An RB row uses these from right to left, so the
   word is **bit-reversed** before use.

Along a diagonal A and J both step by one. The diagonal ends when A reaches m
(the rows run out) or J reaches n (the key runs out). Each (A, J) pair lies on
exactly one diagonal, so a block issues m*n RBs.

Two flags travel with each RB:

* **first**: the first visit of row A. Its running key starts at zero. With
  L_k <= L every row is first visited in group 0. If L_k > L, rows A >= n-1
  are first met where their bottom-left diagonal crosses column n-1. The
  controller handles both cases.
* **last**: J = 0, which only happens in the main and bottom-left groups. This
  is the row's last visit, so the result is a final key word. Row A finishes
  in group n-1+A; the final words therefore appear in order 0, 1, .., m-1,
  each at the start of its group.

## Pipeline and the running-key bypass

One RB enters a four-stage pipeline every clock, with no stalls:

| stage | work |
|-------|------|
| 1 read | key words J and J+1 (both ports of the key memory); running key word A (intermediate memory); at a group start, the group's hash word |
| 2 reverse | hash word registered, bit-reversed in the main/bottom-left groups |
| 3 PMAC | p x p AND/XOR onto the running key; result registered |
| 4 write | result written back to word A; on a `last` RB also sent to the key stream |

The difficult part is the running key. It is read in stage 1 but written
back only in stage 4. When the same row comes round again less than four
cycles later, the memory still holds a stale value. This happens on short
diagonals near the corners of the RB array. In the last group the same row
is even issued twice in a row: in the example, RB (2,1) is followed directly
by (2,0).

The helper `mid_bypass` keeps the results of the last three RBs, tagged with
their row: the one being written now, the one written at the last clock
edge, and the one written at the edge on which the memory was read. In
stage 3 it replaces the memory value with the youngest of these that matches
the row. The memory is read-first on a same-address collision, and the
third entry covers exactly that case. A `first` RB ignores all of this and
uses zero. That also protects against stale words left by the previous
block. The `bypass_used` status output shows which distance was forwarded
in each cycle.

## Timing and throughput

`start` is taken in an idle cycle. The first RB is issued in the next cycle
and one follows every cycle after that. `busy` stays high until the last
write-back, and `done` pulses in the cycle after that:

    start-to-done = m * n + 4 cycles = ceil(L_k/p) * (ceil(L/p)+1) + 4

The throughput is S = L*f / (m*n) input bits per second, and the final-key
rate is L_k*f / (m*n). At L = 1,000,000, L_k = 100,000 and f = 100 MHz:

| p   | m*n cycles  | block time | S (Mbit/s) | final key (Mbit/s) |
|-----|-------------|-----------:|-----------:|-------------------:|
| 32  | 97,659,375  | 0.977 s    | 1.024      | 0.102 |
| 64  | 24,423,438  | 0.244 s    | 4.094      | 0.409 |
| 128 | 6,110,548   | 61.1 ms    | 16.37      | 1.64  |
| 256 | 1,528,028   | 15.3 ms    | 65.44      | 6.54  |

The cycle counts are exact. Simulation checks them at p = 256 for the full
block, and at all four values of p for a quarter-size block.

## Memories and data layout

| memory | module | width x depth (defaults) | contents |
|--------|--------|--------------------------|----------|
| BRAM-1 | `key_ram` | p x (nk_max + 3) = 256 x 3910 | word j+1 = key bits p*j .. p*j+p-1, bit 0 first |
| BRAM-2 | `mid_ram` | p x m_max = 256 x 391 (100,096 bits) | running key, then final key, word A = bits p*A .. |
| hash   | `hash_rom` | p x (m_max + nk_max) = 256 x 4298 | word g: top-right groups g < nk: bit b = T(p*g+b+1), zero past T(L); word nk+q: bit b = T(L+p*q+b+1), zero past T(L+L_k-1) |

BRAM-1 does not store the zero padding. A read of word 0 or of any word past
nk returns zeros, and bits at or above L mod p are cleared in word nk. A key
shorter than the previous block can therefore be loaded over it without
clearing anything. Key word j is loaded at `key_wr_addr = j`; the +1 offset
is applied inside the core.

The hash memory is one port: it is loaded between blocks and read once per
group during a block. Its output register keeps the group's word for all of
the group's RBs.

## Interface (`pa_top`)

Parameters: `P` (processing-unit size, a power of two, default 256), `L_MAX`
(default 1,000,000) and `LK_MAX` (default 100,000). Everything is
synchronous to `clk`. `rst_n` is an asynchronous active-low reset of the
control and the pipeline; the memories are not reset.

| signals | use |
|---------|-----|
| `key_wr_en/addr/data` | load key word `addr` while idle |
| `hash_wr_en/addr/data` | load hash word `addr` while idle |
| `start`, `len_l`, `len_lk` | start a block of L and L_k bits (L <= L_MAX, L_k <= LK_MAX) |
| `busy`, `done` | block running; one-cycle completion pulse |
| `key_valid/index/data` | final key word `index`, at its write-back; bits past L_k are zero |
| `key_rd_en/addr`, `key_rd_data` | read final key word `addr` while idle; data one cycle later |
| `bypass_used[2:0]` | status: the PMAC stage forwarded a result from 1, 2 or 3 RBs back |

Assertions flag loads while busy and lengths above the maxima. L_k = 0 is
allowed: no RB is issued and `done` still comes after 4 cycles. L = 0 is
allowed too: the final key is then all zero.

## Origin of the design, and what this RTL adds

The following come from the published FPGA design:

* the rhomboid-block decomposition with its padding;
* the group order, with top-right diagonals first and the reversed hash
  order in the bottom-left corner;
* the parallel AND/XOR multiply-accumulate array;
* the three memories and their shapes: a true dual-port key memory of
  depth n+2, an intermediate memory of depth m holding the final key, and a
  single-port hash memory of depth s;
* the four-cycle read / reverse / PMAC / write pipeline, issuing one RB per
  clock;
* the main configuration: p = 256, 1 Mbit blocks, 10 % compression,
  100 kbit of intermediate memory.

The following are this implementation's own choices:

* The running-key bypass. The reference design gives the uninterrupted
  pipeline but not how same-row hazards are resolved.
* Zero padding produced by gating reads instead of stored zero words.
* The flag-based controller. A diagonal ends when the row reaches m or the
  column reaches n, which covers all three corner cases. The first-visit
  rule also supports L_k > L.
* Load ports in place of a preloaded ROM, the final-key stream and read-out
  port, clearing of bits past L_k, and the reset and `done` timing.
* A single-ended clock. On the original board a 200 MHz differential
  oscillator feeds a 100 MHz operating clock through FPGA clocking
  primitives, which are not part of this RTL.

Known limits:

* With the defaults, the final key is limited to 100,000 bits. A 1 Mbit
  final key needs `LK_MAX = 1_000_000`, which makes BRAM-2 1 Mbit and the
  hash memory 7814 words.
* Blocks of 100 Mbit need `L_MAX = 100_000_000` and `LK_MAX = 10_000_000`.
  BRAM-2 is then 10 Mbit.
* Only one block is in flight at a time. Loading the next block overlaps
  nothing.
* The hash bits come from a memory loaded before the block starts. In the
  reference design the hash can be produced while the block runs, p bits at a
  time, because each group reads its word once and in order. The hash
  memory's read request (`en` with the group index as address, one read per
  group, in order) is the place to attach such a generator. A generator is
  not included here.

## Verification

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_pmac` | PMAC against a bit-level GF(2) model, p = 32 |
| `tb_hash_reverse` | pass-through and reversal, hold on enable low |
| `tb_key_ram` | both ports, zero words at both ends, tail clearing |
| `tb_mid_ram` | random reads and writes, read-first collisions |
| `tb_hash_rom` | load, random reads, held output |
| `tb_pa_control` | the exact RB order against an independently built diagonal walk, all flags, m*n+4 cycles; the p = 4, L = 11, L_k = 10 example, L_k > L, L = 0, L_k = 0, random sizes |
| `tb_pa_top` | p = 8, 19 blocks of varied sizes: every final key word against the full product T*X from the matrix definition, on the stream and through the read-out port, cycle counts; counts top-right, main and bottom-left RBs, reversed words, all three bypass distances, partial words, L_k = 0 and L_k > L, and fails if any never occurred |
| `tb_pa_full` | default parameters (p = 256, L = 1,000,000, L_k = 100,000): one block, 1,528,032 cycles, all 391 words streamed once and read back, 96 key bits against the product |
| `tb_pa_table1` | a quarter-size block at the same 10 % ratio (L = 250,000, L_k = 25,000) with p = 32, 64, 128 and 256 (helper `pa_block_runner`): exact cycle counts and sampled key bits |

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/pa_pkg.sv tb/tb_pa_top.sv \
        --top-module tb_pa_top -o sim && ./obj_dir/sim

`tb_pa_full` and `tb_pa_table1` each take a few seconds to a quarter of a
minute. The full 1 Mbit block at p = 32 (97.7 million cycles) takes one to
three minutes. To run it, set `L` and `LK` of the runners in `tb_pa_table1`
to 1,000,000 and 100,000. Then also set the expected cycle counts to those of
the throughput table plus 4, and lengthen the watchdog.

## Files

* `rtl/pa_pkg.sv`: shared constants, the RB command record `rb_cmd_t`, the
  ceil-divide helper.
* `rtl/pa_top.sv`: the core; the pipeline registers and stage wiring.
* `rtl/pa_control.sv`: size computation and the diagonal walk.
* `rtl/pmac.sv`: the p x p AND/XOR array.
* `rtl/hash_reverse.sv`: stage-2 reversal.
* `rtl/mid_bypass.sv`: running-key forwarding.
* `rtl/key_ram.sv`, `rtl/mid_ram.sv`, `rtl/hash_rom.sv`: the three memories.
* `tb/`: the testbenches above and `pa_block_runner.sv`.
