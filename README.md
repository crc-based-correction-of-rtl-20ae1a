# CRC multiple-error correction with a syndrome-indexed table

A CRC is normally used only to *detect* a damaged packet, which is then
dropped. This design uses the CRC to *repair* the packet instead. For a packet
whose CRC check fails, it lists every error pattern of up to `N_MAX` flipped
bits that would produce the observed CRC syndrome. It then narrows that list
with the payload's 16-bit one's-complement checksum (the UDP/TCP checksum).
If exactly one pattern survives, it flips those bits back in a stored copy of
the packet.

The work is done with a small table indexed by syndrome. Its size depends
only on the CRC width, not on the packet length or the number of errors. Each
row holds two things:

- the first bit position at which one error would give that syndrome;
- the syndrome's *next element*: what the syndrome becomes when an assumed
  error is moved one position up.

Single errors take one table read. Double errors take one read per bit
position. N errors are handled by fixing N-2 "forced" positions and running
the double-error walk on what remains.

The file names use "ecot" for this error correction with an optimized table.

The default build is CRC-16-CCITT (g = x^16 + x^12 + x^5 + 1), packets of up
to 1500 payload bytes plus the CRC, and up to 3 errors.

## Conventions

- **Packet polynomial.** A packet of L = m + n bits (m payload bits, n CRC
  bits) is a polynomial over GF(2). The **position** of a bit is the degree
  of its term: the last CRC bit sent is position 0 and the first payload bit
  is position L-1. All positions in the interfaces use this numbering.
- **CRC.** The CRC is the plain remainder: payload times x^n, modulo g, with
  zero initial value, no bit reflection and no final XOR. A packet is intact
  when the remainder of the whole packet, the **syndrome**, is zero. An error
  pattern e(x) gives the syndrome s = e(x) mod g, whatever the data.
- **Checksum.** The payload (without the CRC) is read as 16-bit words, first
  bit in the MSB, with an odd tail padded with zeros. Its one's-complement sum
  must be 0xFFFF. The design does not care where in the payload the checksum
  field sits.

## The table

### P1 and the cycle

A single error at position p gives the syndrome x^p mod g. The powers of x
modulo g repeat with some period, the **cycle** of g. This is 32767 for
CRC-16-CCITT, 127 for CRC-8-CCITT and 15 for the CRC-5 example g = 0x35 used in
the tests. A syndrome s therefore has either no single-error position, or one
at P1 < cycle and then also at P1 + cycle, P1 + 2·cycle, and so on. Column P1
stores that first position, or -1 (all ones) if there is none. The table thus
covers packets of any length.

### The next element

Let s be the content of an n-bit window that still has to be cancelled, and
assume the window's lowest bit is an error, the "forced" position. The
**next element** is what the window becomes when that forced error is
cancelled and the forced position moves one bit up:

1. Append a 1 below s, XOR in g and shift right by one; call the result t.
   This cancels the old forced bit.
2. If bit 0 of t is already 1, the new forced position needs nothing more,
   and next = t >> 1.
3. Otherwise XOR in g once more to set it, and next = (t ^ g) >> 1.

Algebraically, next · x² + x ≡ s · x + 1 (mod g). The testbenches use this
identity as an independent check.

### Filling the table

The table is filled in two passes after reset (`crc_table_gen`):

1. **Fill:** every row gets P1 = -1 and its next element. This takes 2^n
   cycles.
2. **Walk:** e = x^p mod g is walked for p = 0, 1, ... until e returns to 1.
   Each visited row gets P1 = p, and the number of steps is the cycle length.
   This takes *cycle* cycles.

`table_ready` rises 2^n + cycle + 2 cycles after reset: 98,305 cycles for
CRC-16. The memory is 2^n × (P1_W + n) bits, which is 2,097,152 bits for
CRC-16.

## Searching for errors

### One error (`crc_single_corr`)

Read row s. If P1 is not -1, the candidates are P1, P1 + cycle, ... below L,
one per cycle.

### Two errors (`crc_double_corr`)

Try each position F1 = 0 .. L-2 as the lower error. Cancelling F1 leaves an
n-bit window w that starts just above F1. The first window is s >> 1 if
s[0] = 1, else (s ^ g) >> 1. A single error in that window at P1 of w
(+ j·cycle), as long as it stays inside the packet, gives the pair
(F1, F1 + 1 + P1). Then w becomes next(w) for the following F1.

So the walk is one table read per bit position, which is about L cycles,
plus one cycle for every F1 that yields more than one pair. A `base` input
shifts all positions, so that the N-error search can run the walk on the
part of the packet above its forced bits.

### N errors (`crc_n_corr`, `crc_forced_update`)

For k = N_MAX down to 3, every sorted set of k-2 forced positions below L-2
is visited in lexicographic order. For each set:

1. The syndrome is brought to the window above the highest forced position.
   This is done one bit per cycle from bit 0: where the low bit differs from
   the wanted value (1 at a forced position, 0 elsewhere), g is added, then
   the window shifts.
2. The double-error walk finds the last two errors in the remaining bits.

Then the double walk and the single lookup run on the original syndrome over
the whole packet. Every pattern of 1 .. N_MAX errors with the syndrome comes
out exactly once, positions ascending.

The cost grows as about L^(N_MAX-1) cycles. With N_MAX = 3 that is about
L²: 279 k cycles for a 64-byte packet and 144 M cycles for a 1500-byte one.

### Special syndromes (`crc_exceptions`)

Three syndromes of g behave unlike the others in the next-element graph:

- **Type I self-loop:** its next element is itself after one XOR of g.
  Exists only for g of even weight.
- **Type II self-loop:** its next element is itself after two XORs. For odd g
  it is g >> 1.
- **No single error:** odd weight, yet it has no single-error position.
  Exists only for g of even weight.

Each is given by a short bit recurrence on g. For CRC-16-CCITT the three are
30735, 34832 and 61471. The design computes them from g and flags a packet
whose syndrome is one of them. It does not use them to shorten the search.

## Choosing a candidate (`crc_checksum_val`)

For long packets, many patterns fit the syndrome. A 64-byte CRC-16 packet has
several hundred 3-error candidates. The checksum filter removes most of them.

While the packet streams in, the payload's one's-complement sum is
accumulated. The CRC bits are held back by an n-bit delay line, so they are
never added. A candidate's effect on the sum is computed without re-reading
the packet:

- flipping payload bit b of a word that was 0 adds 2^b;
- flipping one that was 1 subtracts 2^b, that is, adds ~2^b.

The received bits at the candidate's positions come from the packet buffer.
Flips in the CRC bits change nothing. The verdict is registered, so it comes
one cycle after the candidate.

## The top: `crc_ecot_top`

### Operation

After reset the top builds the table. During that time `in_ready` is low and
`busy` is high. Once `table_ready` is high, a packet is streamed in one bit per
cycle: payload first, CRC last, with `in_last` on the final bit, handshake
`in_valid`/`in_ready`. While it streams, the packet is stored, its syndrome
is computed and its checksum is accumulated.

Then one of these happens:

| status (`res_status`) | when |
|---|---|
| 0 NO_ERROR | syndrome zero |
| 1 CORRECTED | exactly one accepted candidate; its bits have been flipped in the stored packet |
| 2 AMBIGUOUS | more than one accepted candidate; nothing is changed |
| 3 NO_CANDIDATE | no accepted candidate |
| 4 TOO_LONG | more than L_MAX bits were sent; no search |

"Accepted" means: passes the checksum when `cfg_use_checksum` = 1, or any
candidate when it is 0. `cfg_use_checksum` is sampled at the end of the
search.

### Results

`res_valid` pulses once per packet, together with:

- the syndrome and the received checksum sum;
- the packet length;
- the number of candidates, and how many of them pass the checksum;
- the first accepted pattern (`res_err_cnt`, `res_err_pos`);
- the three special-syndrome flags.

The stored packet, corrected or not, can be read by 16-bit words
(`rd_word_idx` → `rd_word`, combinational, first bit in bit 15) until the
first bit of the next packet is taken. `exc_*` give the special syndromes of G
as constants. `cycle_len` gives the measured cycle.

### Timing

- Table: 2^n + cycle + 2 cycles after reset.
- Intact or too-long packet: `res_valid` comes 3 cycles after the last bit is
  taken.
- Damaged packet: the search (see above), then one cycle per corrected bit.
- `in_ready` stays low from the last bit to `res_valid`.

### Parameters

| parameter | default | meaning |
|---|---|---|
| `CRC_W` | 16 | CRC width n |
| `G` | 17'h1_1021 | generator with its x^n term |
| `P1_W` | 16 | P1 column width; all ones = -1, so it needs cycle < 2^P1_W - 1 |
| `POS_W` | 16 | width of positions and lengths |
| `L_MAX` | 12016 | largest packet, in bits: 1500-byte payload + 16 |
| `N_MAX` | 3 | most errors searched |
| `CNT_W` | 32 | candidate counter width |

Changing `G` and `CRC_W` gives other CRCs. The tests build CRC-8-CCITT
(9'h107) and the CRC-5 example (6'h35). After coarse synthesis, the default
top is about 600 word-level cells and 745 flip-flop bits, plus 2,109,168
memory bits (the table and the packet store).

## Files

Each file under `rtl/` holds one unit. Its opening comment gives its
interface and timing, and which parts follow the method and which are this
design's own.

| file | what |
|---|---|
| `crc_ecot_pkg.sv` | default sizes, status codes, one's-complement add |
| `crc_syndrome.sv` | serial CRC remainder |
| `crc_next_element.sv` | next element of a window, combinational |
| `crc_table_gen.sv` | fill and walk sequencer, cycle measurement |
| `crc_ecot_table.sv` | the two-column table memory |
| `crc_single_corr.sv` | single-error candidates |
| `crc_double_corr.sv` | double-error walk |
| `crc_forced_update.sv` | next set of forced positions |
| `crc_n_corr.sv` | N-error search sequencer |
| `crc_exceptions.sv` | special syndromes of g |
| `crc_checksum_val.sv` | checksum sum and candidate test |
| `crc_packet_buffer.sv` | packet store: position reads, flips, word reads |
| `crc_ecot_top.sv` | the corrector |

## Verification

Every unit has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The reference arithmetic (powers of x,
multiplication modulo g, cycle length) is in `tb/tb_crc_ref_pkg.sv`.
Highlights:

- `tb_crc_table_gen`: the complete CRC-5 table against the published example,
  plus the CRC-16 cycle, special rows, random rows and the fill time.
- `tb_crc_syndrome`: a published CRC-8 (g = 0x11D) example, and random CRC-16
  packets.
- `tb_crc_double_corr`, `tb_crc_n_corr`: the candidate lists against an
  exhaustive scan of all patterns. This covers CRC-5 and CRC-8, N = 3 and 4,
  offsets and short packets, and checks for duplicates and missing patterns.
- `tb_crc_checksum_val`, `tb_crc_packet_buffer`, `tb_crc_exceptions`,
  `tb_crc_next_element`, `tb_crc_single_corr`, `tb_crc_forced_update`,
  `tb_crc_ecot_table`: each against a model.
- `tb_crc_ecot_top`: end to end at CRC-8, N_MAX = 3, L_MAX = 256. Against a
  brute-force model, it checks every status, both checksum modes, the
  special-syndrome flags, too-long packets, the input stall and the readback
  of corrected packets. It counts each of these and fails if any never
  happened.
- `tb_crc_ecot_full`: the top at its default parameters. It checks the table
  timing, a clean 1500-byte packet, 64-byte packets with 1 to 3 errors
  against a brute-force model, a 1500-byte packet with 2 errors, and a
  too-long packet. It runs about two minutes in verilator.

To run one with verilator:

```
verilator --binary --timing --assert -Wno-fatal tb/tb_crc_ref_pkg.sv \
  rtl/crc_ecot_pkg.sv rtl/crc_*.sv tb/tb_crc_ecot_top.sv --top-module tb_crc_ecot_top
./obj_dir/Vtb_crc_ecot_top
```

Lint (`verilator --lint-only -Wall`) reports no latches, loops or multiple
drivers. It does report:

- unused low bits and unused busy outputs;
- package defaults that a small module does not use;
- constant comparisons in `crc_n_corr` when N_MAX = 3;
- `rst_n` used both as the asynchronous reset and to disable the top's
  assertion.

The opening comment of each affected module explains them.

## Where this design departs from the method, and its limits

- **Table fill.** The published flowchart visits syndromes through two loop
  variables and skips some rows, yet its own example table gives every row a
  next element. This design gives every row both values, using the simpler
  fill-then-walk order.
- **Table columns.** The method can store extra columns (four times the
  memory) holding the forcing results of the N-error search. Here those are
  recomputed bit-serially instead. The table is 2^n × (P1_W + n) bits, but
  an N-error search costs F + 1 extra cycles per forced set.
- **Forced-position range.** The method forces positions only within the
  first m-1 bits. Here forced positions range over the whole packet, so
  errors in the CRC bits are found as well.
- **Forced-position count.** The N-error search forces N-2 positions, as the
  method's text says. The loop bounds in the method's pseudo-code read
  differently.
- **Fixed search depth.** The N-error search always runs to N_MAX. There is
  no early stop on the first candidate, and the special syndromes are only
  flagged.
- **Packet length.** The default maximum packet is a 1500-byte payload.
  Longer packets, such as the 2500 bytes used in the method's timing
  comparison, need a larger L_MAX; they are reported as too long otherwise.
- **Large CRCs.** The table has 2^n rows, so CRC-24 (101 MB) and CRC-32 are
  not practical on chip. CRC-32 would also need P1_W = 33, because its cycle
  is 2^32 - 1. Neither was built.
- **No backpressure.** A candidate cannot be stalled. The checksum filter
  keeps up at one candidate per cycle.
- **Throughput.** One packet is handled at a time. A new packet is taken only
  after the previous result.
