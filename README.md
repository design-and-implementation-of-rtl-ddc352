# S-BOX: triplicated SEC-DED coding for an on-chip link

Long on-chip interconnect wires between network-on-chip routers suffer from
transient noise, which flips single wires (random errors) or several
neighbouring wires at once (burst errors), and from crosstalk, where a wire
is slowed down when its neighbours switch the other way. The S-BOX code
handles both with one simple scheme:

1. the 32-bit message is encoded with a (39,32) extended Hamming code that
   corrects one error and detects two (SEC-DED, minimum distance 4);
2. each of the 39 code bits is sent three times, on three adjacent wires,
   so the link has 117 wires.

Triplication raises the minimum distance to 3 x 4 = 12, so any pattern of
up to five wrong wires can be corrected, whether the errors are random,
in one burst, or both. The receiver does not need a full 117-bit decoder. It
decodes the three copies separately with ordinary SEC-DED decoders. A small
selection circuit then picks a copy that is known to have decoded correctly.
Because the three copies of a bit sit side by side and switch together, no
wire ever has both neighbours switching against it.

Everything is combinational: a message put on `tx_msg_i` appears on the
wires at once, and a word on the wires is decoded at once. Registers are
left to the surrounding design.

## Code word and wire layout

The code word has 39 bits, numbered j = 0..38:

| bits j = 0..37 (Hamming position p = j+1) | contents |
|---|---|
| p = 1, 2, 4, 8, 16, 32 | check bits C1..C6 |
| all other p (3, 5, 6, 7, 9, ...) | data bits 0..31, in ascending order |
| j = 38 | overall even parity over bits 0..37 |

Check bit C(k+1) is chosen so that the XOR of the indices p of all set bits
is zero. A single flipped bit at position p then gives syndrome p. An error
in the overall parity bit alone gives a zero syndrome and an odd parity
check.

The wire order is **wire 3j+g = copy g of code bit j**. Copy g = 0, 1 and 2
form groups A, B and C. The receiver's group separator is just this wiring
in reverse. Because the code is systematic, 96 of the 117 wires are copies
of message bits, so a synthesis report lists them as outputs wired
straight to inputs.

Bursts look simple in this layout. A burst of four wires starting at wire
3i hits bits i and i+1 of both A and B. Both copies then hold the same
double error and the same decoded value. A burst of five hits two bits of
two groups and one bit of the third.

## Receive side: one decoder per copy

Each group goes through `secded_decoder`. The decoder has five parts:

- **Syndrome computation** (`syndrome_computation`): C1..C6 from the 38
  Hamming bits.
- **Syndrome decoder** (`syndrome_decoder`): turns the syndrome into a
  one-hot mask. Syndromes 39..63 cannot come from a single error and
  select nothing.
- **XOR block**: flips the located bit.
- **Message decoder**: keeps the 32 data positions.
- **Double-error detection**: `double_err = (C != 0) && (parity over all 39
  bits is even)`.

The correction is applied even when a double error is flagged. Such a copy
is never selected while a better one exists.

Each decoder also outputs a 7-bit syndrome, `{parity check, C6..C1}`. It is
zero exactly when the copy arrived as a valid code word. The selection
below needs it to tell an error-free copy from a copy with three errors.

`group_comparator` produces two signals:

- `received_not_eq`: the three received groups all differ.
- `dec_a_eq_dec_b`: copies A and B decoded to the same message.

## Choosing the copy (`copy_select_mux`)

This is the part that needs the most thought. With at most five errors,
at least one group holds at most one error, because 2+2+2 = 6. That group
decodes correctly. The selector must find such a group using only the
three double-error flags, the three syndromes and `dec_a_eq_dec_b`.

Call a copy *clean* when its double-error flag is 0. A clean copy holds 0
or 1 errors and is correct, or it holds 3, 4 (undetected) or 5 errors and
is wrong. Two clean copies can never both be wrong, because that needs at
least 6 errors. The rules branch first on copy A's flag:

| A | B | C | further test | forward |
|---|---|---|---|---|
| clean | clean | any | dec A == dec B | A |
| clean | clean | clean | A != B | C (one of A/B holds >= 3 errors, so C holds <= 1) |
| clean | clean | flagged | A != B | whichever of A/B has zero syndrome (only 3+0+2 errors fits) |
| clean | flagged | flagged | | A |
| clean | flagged | clean | | A if its syndrome is zero, else C if its syndrome is zero, else A |
| flagged | flagged | any | | C |
| flagged | clean | flagged | | B |
| flagged | clean | clean | | B if its syndrome is zero, else C if its syndrome is zero, else B |

"Zero syndrome" is the 7-bit one. In the mixed cases a copy with a zero
syndrome cannot be a wrong 4-error copy: with another copy flagged, that
would take at least 6 errors. If neither copy has a zero syndrome, both hold
an odd number of errors, and only 1+2+1 fits.

`received_not_eq` is computed and brought out, but these rules do not need
it. Splits such as (4,1,0) and (5,0,0) are handled by the
`dec_a_eq_dec_b` and syndrome tests. With six or more errors no copy is
guaranteed correct; if all three flags are set, copy C is forwarded.

## Crosstalk

Consider the middle wire of a triple. Both of its neighbours carry the same
bit, so they always switch with it. An outer wire has one neighbour in its
own triple, which switches with it. So no wire can see both neighbours
switch in the opposite direction, and the worst crosstalk case never
occurs. The testbenches check this rule on every pair of consecutive
transmitted words.

## Modules

| file | role |
|---|---|
| `rtl/sbox_pkg.sv` | sizes (32, 6, 38, 39, 3, 117), `copy_sel_e`, data-position function |
| `rtl/secded_encoder.sv` | (39,32) extended Hamming encoder |
| `rtl/sbox_encoder.sv` | encoder plus triplication onto 117 wires |
| `rtl/syndrome_computation.sv` | C1..C6 |
| `rtl/syndrome_decoder.sv` | syndrome to one-hot error location |
| `rtl/secded_decoder.sv` | one copy: correction, message extraction, double-error flag |
| `rtl/group_comparator.sv` | `received_not_eq`, `dec_a_eq_dec_b` |
| `rtl/copy_select_mux.sv` | selection rules above |
| `rtl/sbox_decoder.sv` | group separator, three decoders, comparator, selector |
| `rtl/sbox_link.sv` | top: encoder and decoder of one link |

`sbox_link` has the following ports:

- `tx_msg_i[31:0]` drives `link_o[116:0]`.
- `link_i[116:0]` is what arrives at the far end of the wires.
- `rx_msg_o[31:0]` is the decoded message.
- `rx_sel_o` names the copy forwarded.
- `rx_double_err_o[2:0]` holds the double-error flags of C, B and A.
- `rx_received_not_eq_o` and `rx_dec_a_eq_dec_b_o` are the comparator
  outputs.

The wires are outside the module. Connect `link_i` to `link_o` through
whatever models or forms the link. After coarse synthesis the whole link is
about 500 word-level cells and has no flip-flops.

## Verification

Every module has a self-checking testbench in `tb/`. It compares the module
against `tb/sbox_ref_pkg.sv`, a reference model written in a different way:
it builds code words from the "XOR of set-bit indices is zero" property.

- `tb_secded_encoder`, `tb_syndrome_computation`, `tb_syndrome_decoder`,
  `tb_secded_decoder`, `tb_group_comparator`: corner cases, exhaustive
  single and double errors, and random words.
- `tb_sbox_encoder`: wire map and the crosstalk rule.
- `tb_copy_select_mux`, `tb_sbox_decoder`: every split (a,b,c) of up to
  five errors over the three groups, plus random errors, bursts and mixes.
- `tb_sbox_link`: end to end at full size. It covers a noiseless link,
  every pattern of 1 to 3 errors, every burst of 1 to 5 wires at every
  position, and random 4- and 5-error patterns. It counts how often
  single-error correction, double-error detection, selection of A, B and
  C, `received_not_eq` and A/B disagreement occur, and fails if any of them
  never occurs.
- `tb_sbox_link_exhaustive`: all 175,230,471 patterns of one to five wrong
  wires. This is C(117,1) + ... + C(117,5). Every one decodes to the
  message sent. It takes about a minute.

To run one, for example:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_sbox_link \
    rtl/sbox_pkg.sv tb/sbox_ref_pkg.sv tb/tb_sbox_link.sv rtl/*.sv
./obj_dir/Vtb_sbox_link
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`.

## What is fixed and what was chosen

These points come from the description of the code:

- the (39,32) SEC-DED code with 6 check bits and an overall parity bit;
- triplication to 117 wires;
- correction of up to five errors;
- the decoder structure: group separator, three SEC-DED decoders,
  comparator and multiplexer;
- inside each decoder: syndrome computation, syndrome decoder, XOR block,
  message decoder, and double-error detection from the syndrome and
  overall parity;
- the signal names `Received_Not_eq`, `DecodeA_eq_DecodeB` and
  `Double_error_A/B/C`.

These are choices made in this design:

- the bit positions of the Hamming code and the even parity;
- the adjacent-copy wire order. The burst behaviour described for the code
  implies this order.
- the 7-bit syndrome, with the parity check included, as the selector's
  syndrome input;
- the exact selection rules. They are checked exhaustively for up to five
  errors.
- `received_not_eq` is produced but not used for selection;
- copy C is forwarded when all three copies flag a double error;
- purely combinational timing, with no registers or reset.

The name "S-BOX" here is the name of this error-control code. No AES-style
substitution box is part of this design.
