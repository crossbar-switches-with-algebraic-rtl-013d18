# Algebraic crossbar switches

A conventional crossbar steers each data bit through a matrix of pass gates.
The switches here work differently: a sender does not route its data, it
routes its *own address*. The sender's data bit gates a code word that names
the receiver it wants. A small decoder turns that code word back into a
single active receiver line, and the lines of all senders are ORed. When the
data bit is 0, no code word is sent and no receiver line rises. The whole
switch is two or three levels of combinational logic with no storage. A clock
is needed only to capture the outputs.

Two algebraic structures supply the code words:

* **Hadamard codes.** The code words are rows of a Hadamard matrix. They are
  far apart in Hamming distance, so the decoder can also correct errors on
  the address and gate lines.
* **Galois field GF(2^m).** Each sender is a fixed field element. The
  address is a second element. Their product, read as a binary number, is
  the receiver. This gives 2^m − 1 ports from m address lines per sender,
  but no error correction.

A third design, the **synchronous switch**, serves one source per clock. It
uses the GF(2^m) multiplier with a source counter in front.

The RTL is SystemVerilog-2017 and synthesizable. All three switches are
parameterised. Their defaults are the sizes of the source article's
examples: an 8 × 8 Hadamard switch, a 15 × 15 switch over GF(2^4), and a
15-source synchronous switch.

---

## 1. Hadamard-structured switch

### Code words

`H(n)` is the Sylvester Hadamard matrix, written with 1/0 instead of +1/−1.
It is built by doubling: `H(2n) = [H H; H −H]`, where `−H` is the bitwise
complement. Row *r* (counting from 1) has a 1 in column *j* (counting from 0)
exactly when `(r−1) & j` has an even number of ones. For n = 8:

| receiver | code word (column 0 first) |
|---|---|
| 1 | 11111111 |
| 2 | 10101010 |
| 3 | 11001100 |
| 4 | 10011001 |
| 5 | 11110000 |
| 6 | 10100101 |
| 7 | 11000011 |
| 8 | 10010110 |

Any two of these words differ in at least n/2 = 4 bits. The all-zero word,
which is what a 0 data bit produces, also differs from each of them in at
least 4 bits. A decoder that accepts every word within
T = (n/2 − 1)/2 bits of a code word (T = 1 for n = 8) therefore corrects T
errors. The words that are 2 bits from a code word can be recognised as
wrong but cannot be corrected.

**Extended (2n − 1)-port switch.** Rows 2..n of `−H(n)` can be added as
receivers n+1 .. 2n−1. Row 1 of `−H(n)` is left out because it is the idle
word. All 2n − 1 words, and the idle word, are still at least n/2 apart. So
H(8) serves a 15 × 15 switch with the same 8 AND gates per unit. Only the
decoder grows. Set `EXT = 1` to build it.

### One unit (`hadamard_unit`)

```
din ──┬──&──┐
addr0─┘     │
din ──┬──&──┤   hadamard_decoder     dst[1..N_RX]   (one-hot)
addr1─┘     ├──────────────────────► err           (uncorrectable)
  ...       │
din ──┬──&──┘
addrN-1
```

The N AND gates put either the receiver's code word or all zeros on the
decoder. The address lines take the place of the 1/0 ties of a fixed unit.
For example, a unit wired to `10101010` always reaches receiver 2.

`hadamard_decoder` compares the word with every code word. Output r goes
high when the word is within T bits of code word r. `err` goes high when the
word is within T bits of no code word and more than T bits from the idle
word. In other words, `err` flags a fault that was detected but could not be
corrected. The logic is an XOR with each constant word followed by a small
"at most T ones" test.

### Crossbar (`hadamard_crossbar`)

There is one unit per sender and per data bit. Output r of every unit
within a bit slice is ORed into receiver r. `err[s]` is the OR of sender s's
unit errors over all bit slices. The switch does not block: every sender can
reach any receiver at the same time as the others. If two senders address
the same receiver, their data are ORed. Avoiding that is the controller's
job.

---

## 2. Switch over GF(2^m)

### The field

The default field is GF(2^4) with F(X) = X^4 + X + 1. Its root a generates
all 15 nonzero elements. Elements are *printed* with the a^0 coefficient
first, but are *held* in RTL vectors with bit i = coefficient of a^i. For
example, a^4 = 1 + a prints as `1100` and is held as `4'b0011`.

| k | a^k | k | a^k | k | a^k |
|---|---|---|---|---|---|
| 0 | 1000 | 5 | 0110 | 10 | 1110 |
| 1 | 0100 | 6 | 0011 | 11 | 0111 |
| 2 | 0010 | 7 | 1101 | 12 | 1111 |
| 3 | 0001 | 8 | 1010 | 13 | 1011 |
| 4 | 1100 | 9 | 0101 | 14 | 1001 |

a^k · a^j = a^((k+j) mod 15).

### Multiplier (`gf_mul`)

Every coefficient pair a_i b_j has one AND gate, which makes m² gates (16
for m = 4). Each product bit is the XOR of the AND outputs whose power
a^(i+j), reduced mod F(X), has a 1 in that bit. For GF(2^4):

```
p0 = a0b0 + a1b3 + a2b2 + a3b1
p1 = a0b1 + a1b0 + a1b3 + a2b2 + a2b3 + a3b2 + a3b1
p2 = a0b2 + a1b1 + a2b0 + a2b3 + a3b2 + a3b3
p3 = a0b3 + a1b2 + a2b1 + a3b0 + a3b3          (+ is XOR)
```

The XOR selection masks are computed at elaboration from `M` and `POLY`, so
any field up to m = 16 can be used. Elaboration stops with an error if
`POLY` is not primitive. A non-primitive polynomial would map two senders to
the same receivers.

### Addressing rule

* Sender s is the element a^(s−1). Its unit's encoder is only wiring: the
  data bit drives the lines where a^(s−1) has a 1, and the other lines are
  tied to 0.
* The receiver is the product's printed form read as a binary number, with
  a^0 as the most significant bit. For example, `0101` is receiver 5. The
  zero product selects nothing.
* To send from sender s to receiver r, apply the control element
  `ctrl = e(r) · a^−(s−1)`, where e(r) is the element whose printed form is
  r in binary.

Worked example: sender 2 (a^1) to receiver 5 (`0101` = a^9) needs
ctrl = a^8. Sender 2 to receiver 6 (`0110` = a^5) needs ctrl = a^4.

`gf_address_gen` computes `ctrl` from the sender and receiver numbers. It
uses a constant table of inverse powers and one multiplier. A control element
of 0 disconnects the sender.

### Unit and crossbar (`gf_unit`, `gf_crossbar`)

A unit is the encoder wiring, one multiplier and one m-to-(2^m−1) decoder
(`bin_decoder`). The crossbar has one unit per sender and data bit, with the
receiver lines ORed as in the Hadamard switch. A path is one AND level, one
parity tree and one decoder deep. Each sender needs m control lines. With
`M = 5` and `N_SRC = N_DST = 16`, the field GF(2^5) gives a 16 × 16 switch.
Larger fields give up to 2^m − 1 ports. Known-good primitive polynomials
are:

| m | F(X) | `POLY` |
|---|---|---|
| 4 | X^4+X+1 | `'h13` |
| 5 | X^5+X^2+1 | `'h25` |
| 6 | X^6+X+1 | `'h43` |
| 7 | X^7+X+1 | `'h83` |
| 8 | X^8+X^4+X^3+X^2+1 | `'h11D` |
| 9 | X^9+X^4+1 | `'h211` |
| 10 | X^10+X^3+1 | `'h409` |

---

## 3. Synchronous switch (`sync_switch`)

This switch is meant for event data that must be redistributed in time. An
example is 7 detectors whose events reach the switch with staggered delays:
detector i holds, at step t, the event for receiver t − i + 1. It handles one
source per clock:

```
addr1 ─► src_counter ─► D (bin_decoder) ─► &1..&N ◄─ din[1..N]
                                             │
                                  E (gf_encoder, m OR gates)
                                             │ a^(s−1) or 0
                            addr2 ─► gf_mul ─┘
                                             │
                                  D (bin_decoder) ─► flip-flops ─► dout
```

* `src_counter` is loaded with a binary source number (`load`, `addr1`).
  Otherwise it advances one source per clock when `count_en` is high,
  wrapping from N back to 1. Load has priority. Reset clears it to 0, which
  selects no source.
* Only the selected source's AND gate is open. The encoder turns it into
  a^(s−1), or into 0 when the data bit is 0.
* `addr2` is the receiver element, using the same rule as in section 2. For
  example, source 2 with a^4 gives a^5 = `0110`, which is receiver 6.
* The receiver lines are registered every clock. A pulse appears on
  `dout[r]` one clock after its source was selected.

---

## 4. Top level (`algebraic_xbar_top`)

The three switches sit side by side with independent ports. The defaults
are HD_N = 8, HD_EXT = 0, GF_M = 4, GF_POLY = `'h13` and WIDTH = 1.

| group | ports | meaning |
|---|---|---|
| common | `clk`, `rst_n` | rising-edge clock; synchronous active-low reset |
| Hadamard | `hd_din[s]`, `hd_dest[s]` | data and receiver number (0 = none) per sender |
| | `hd_addr_fault[s]` | XOR mask on sender s's address lines. It models wiring faults and is 0 in normal use. |
| | `hd_strobe` → `hd_dout[r]`, `hd_err[s]` | output register loads on a strobed edge |
| GF | `gf_din[s]`, `gf_dest[s]`, `gf_strobe` → `gf_dout[r]` | same scheme. `gf_address_gen` makes each sender's control element. |
| synchronous | `ss_load`, `ss_addr1`, `ss_count_en`, `ss_din`, `ss_dest` → `ss_dout`, `ss_src` | the receiver element is generated from `ss_dest` and the current source `ss_src` |

Timing: the crossbar outputs are combinational. They are captured on the
rising edge where `hd_strobe` / `gf_strobe` is high and appear one clock
later. The synchronous switch also has one clock of latency. Arrays are
packed and indexed from 0: index s is sender s+1 and index r is receiver r+1.
With WIDTH > 1, all bit slices of a sender share one address, so each sender
moves a whole word.

---

## 5. Choices made in this implementation

The following parts follow the published design: the structure of each
unit, the code words, the field and its multiplier, the sender encoding for
the GF switches (sender 1 is a^0), and the block order of the synchronous
switch. The rest are this implementation's own choices:

* **Receiver numbering in the GF switches.** The printed form is read as
  binary with a^0 as the MSB. The source's worked examples do not all agree
  on how senders and control elements are numbered. The rule used here
  matches the wiring of the first unit (input 1 carries a^0) and the
  "`0101` selects receiver 5" decoding. Under this rule, sender 2 reaches
  receiver 5 with a^8 (not a^7) and receiver 6 with a^4 (not a^3).
* **−H(n)** is taken as the exact bitwise complement of H(n).
* **Error flag.** Correction is as specified. The separate `err` output
  for detected but uncorrectable words is an addition: the source asks for
  detection but gives no signal for it.
* **Decoder internals** use XOR plus ones-counting rather than a hand-made
  gate network. The claimed delays (at most three AND delays for the
  Hadamard switch, four for the GF switch) were not checked against a gate
  library.
* **Address generation, output-register strobes, counter load/wrap/reset,
  and the shared address across bit slices** are not specified in detail
  and were chosen as described above. The source counts N × n control bits
  for an N-bit switch. Here a sender needs only m (GF) or n (Hadamard)
  address lines, whatever the width.
* **`hd_addr_fault`** is a test and diagnosis input, not part of the
  original switch.

The following are described in the source but not built:

* the GF(2^m) switch made error-correcting with BCH code words (only
  mentioned);
* the "modular" and "complementary" schemes for power-of-two port counts
  (the larger-field route, e.g. 16 × 16 over GF(2^5), is available by
  parameter);
* the detector processors and FIFO memories in front of the synchronous
  switch. What they compute and how they are sized is not given.

---

## 6. Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog. The expected values come
from the published tables, not from the RTL's own functions: the GF(2^4)
element list (`tb/gf_tables.svh`), the printed H(8) rows
(`tb/hd_tables.svh`), the p0..p3 equations, and independent shift-and-add
field arithmetic.

| testbench | what it covers |
|---|---|
| `gf_mul_tb` | all 256 GF(2^4) products against the equations and the power table; all GF(2^5) products |
| `gf_fields_tb` | random products for m = 6..10; a has order 1023 in GF(2^10) |
| `bin_decoder_tb`, `gf_encoder_tb`, `gf_unit_tb`, `gf_address_gen_tb` | exhaustive |
| `gf_crossbar_tb` | 15 × 15, 1 and 4 bits wide: random permutations, many-to-one OR, disconnect |
| `gf_switch16_tb` | 16 × 16 over GF(2^5) |
| `hadamard_decoder_tb` | every 8-bit word for 8 and 15 outputs; H(16) with 3 errors corrected |
| `hadamard_unit_tb`, `hadamard_crossbar_tb` | every single address-line fault corrected; double faults flagged; 8 × 8 and 15 × 15 |
| `strobe_reg_tb`, `src_counter_tb` | load/hold, count/wrap |
| `sync_switch_tb` | all 225 source/receiver pairs, one-clock latency, counting mode, the 7-detector event schedule (49 events) |
| `algebraic_xbar_top_tb` | 3000 random cycles at default sizes; checks that each mechanism occurred (delivery, correction, detection, OR-merge, disconnect, register hold, counter load/step/wrap) |

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/xbar_pkg.sv tb/algebraic_xbar_top_tb.sv --top-module algebraic_xbar_top_tb
./obj_dir/Valgebraic_xbar_top_tb
```

Run it from the repository root, because the testbenches include
`tb/*.svh` by that path. Lint a module with
`verilator --lint-only -Wall -Wno-fatal -y rtl rtl/xbar_pkg.sv rtl/<module>.sv`. The
remaining lint warnings are about unused upper bits of elaboration-time
function arguments.

## 7. Files

| file | contents |
|---|---|
| `rtl/xbar_pkg.sv` | field and Hadamard elaboration-time functions, defaults |
| `rtl/gf_mul.sv`, `rtl/gf_encoder.sv`, `rtl/bin_decoder.sv` | field multiplier, one-hot→element encoder, binary→one-hot decoder |
| `rtl/gf_unit.sv`, `rtl/gf_crossbar.sv`, `rtl/gf_address_gen.sv` | GF switch |
| `rtl/hadamard_decoder.sv`, `rtl/hadamard_unit.sv`, `rtl/hadamard_crossbar.sv`, `rtl/hadamard_address_gen.sv` | Hadamard switch |
| `rtl/src_counter.sv`, `rtl/strobe_reg.sv`, `rtl/sync_switch.sv` | synchronous switch and output register |
| `rtl/algebraic_xbar_top.sv` | top level |
