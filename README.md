# Hexadecimal 7-segment decoder from Karnaugh-map-minimised logic

A 7-segment display draws a character with seven bars, a to g. To show any
4-bit value as one hexadecimal digit, 0 1 2 3 4 5 6 7 8 9 A b C d E F, each
bar needs its own Boolean function of the four input bits. This design makes
each of those seven functions a minimum two-level sum of products, found by
grouping 1s in a 4-variable Karnaugh map. The result is seven small AND-OR
circuits side by side, 61 word-level gates in all after synthesis, with no
clock and no state.

```
            digit[3:0] = A B C D   (A = most significant bit)
                 |
   +------+------+------+------+------+------+
   |      |      |      |      |      |      |
 seg_a  seg_b  seg_c  seg_d  seg_e  seg_f  seg_g      one AND-OR circuit each
   |      |      |      |      |      |      |
   a      b      c      d      e      f      g       seg (segments_t), 1 = lit

        --a--
       |     |          a top          d bottom
       f     b          b upper right  e lower left
       |     |          c lower right  f upper left
        --g--           g middle
       |     |
       e     c
       |     |
        --d--
```

## The truth table

The bits of the input are called A, B, C, D from left to right, so hex `A`
(1010) has A=1, B=0, C=1, D=0. A 1 in the table lights the bar.

| hex | ABCD | a | b | c | d | e | f | g | glyph |
|-----|------|---|---|---|---|---|---|---|-------|
| 0 | 0000 | 1 | 1 | 1 | 1 | 1 | 1 | 0 | 0 |
| 1 | 0001 | 0 | 1 | 1 | 0 | 0 | 0 | 0 | 1 |
| 2 | 0010 | 1 | 1 | 0 | 1 | 1 | 0 | 1 | 2 |
| 3 | 0011 | 1 | 1 | 1 | 1 | 0 | 0 | 1 | 3 |
| 4 | 0100 | 0 | 1 | 1 | 0 | 0 | 1 | 1 | 4 |
| 5 | 0101 | 1 | 0 | 1 | 1 | 0 | 1 | 1 | 5 |
| 6 | 0110 | 1 | 0 | 1 | 1 | 1 | 1 | 1 | 6 |
| 7 | 0111 | 1 | 1 | 1 | 0 | 0 | 0 | 0 | 7 |
| 8 | 1000 | 1 | 1 | 1 | 1 | 1 | 1 | 1 | 8 |
| 9 | 1001 | 1 | 1 | 1 | 1 | 0 | 1 | 1 | 9 |
| A | 1010 | 1 | 1 | 1 | 0 | 1 | 1 | 1 | A |
| B | 1011 | 0 | 0 | 1 | 1 | 1 | 1 | 1 | b |
| C | 1100 | 1 | 0 | 0 | 1 | 1 | 1 | 0 | C |
| D | 1101 | 0 | 1 | 1 | 1 | 1 | 0 | 1 | d |
| E | 1110 | 1 | 0 | 0 | 1 | 1 | 1 | 1 | E |
| F | 1111 | 1 | 0 | 0 | 0 | 1 | 1 | 1 | F |

B and D are drawn in lower case because upper-case B and D would look the
same as 8 and 0. All sixteen inputs are used, so there are no don't-care
cells to exploit.

## From table to gates

Each column of the table is drawn as a 4x4 Karnaugh map. The rows are AB and
the columns are CD, both in Gray order 00, 01, 11, 10. Neighbouring cells
then differ in one bit, and the map wraps around at its edges. Every group
of 1, 2, 4 or 8 adjacent 1-cells gives one product term. Within a group, a
variable that changes value drops out of the term. The cover uses as few
groups as possible, each as large as possible. Where two covers tie, this
design keeps the one that shares the most terms with the published
derivation.

The expressions built by default (`'` is complement):

| segment | sum of products | AND terms |
|---|---|---|
| a | A'C + BC + AD' + B'D' + A'BD + AB'C' | 6 |
| b | A'B' + B'D' + A'C'D' + A'CD + AC'D | 5 |
| c | A'B + AB' + A'C' + A'D + C'D | 5 |
| d | AC' + BC'D + BCD' + B'CD + A'B'D' | 5 |
| e | AB + AC + CD' + B'D' | 4 |
| f | AB' + AC + BD' + C'D' + A'BC' | 5 |
| g | AB' + AD + B'C + CD' + A'BC' | 5 |

No term with fewer AND gates covers these functions. This was checked by an
exhaustive search over all prime implicants. The segments are kept
independent: no product term is shared between two segments, even where one
could be (CD' appears in both e and g, for instance). A multi-output
minimiser would save a few gates. Synthesis tools do that sharing on their
own, so the RTL keeps one readable expression per segment.

## The published segment equations, and `PRINTED_EQ`

This decoder follows a published Karnaugh-map derivation. Its truth table
and glyphs are the ones above, but its seven printed equations do not
implement that table:

| segment | published equation | wrong for inputs |
|---|---|---|
| a | BC'D + A'C + B'C + AD' + B'D' | 9, B, D, F |
| b | BC'D' + AC'D + A'CD + ABD' + A'B' | 8, A, C, E |
| c | C'D + A'C' + A'D + B | 8, A, B, C, E, F |
| d | BC'D + A'CD' + ABD + A'B'C + AC' + B'D' | A, B, E, F |
| e | CD' + AB' + AC + B'C + AD' + B'D' | 3, 9, D |
| f | C'D' + BC' + BD' + A | D |
| g | CD' + BC' + AD + B'C | 8, C |

Each equation agrees with its own Karnaugh map. The maps are the problem:
the row labelled AB=11 holds the table values for inputs 8-B, and the row
labelled AB=10 holds those for C-F. The rows were filled in counting order,
but the labels are in Gray order. So for inputs 8-F the published circuit
shows the glyph of the input with bit B flipped: 8 shows C, C shows 8, A
shows E, and so on. The maps for e and f each have one more wrong cell. As a
result, input 3 lights `1111101` and input 9 lights `0111111`, neither of
which is a hex glyph. Only 0, 1, 2, 4, 5, 6 and 7 come out right.

The RTL follows the truth table, because the point of the circuit is to show
every hex digit correctly. The parameter `PRINTED_EQ` (default `0`) is on
every segment module and on the top. Setting it to `1` builds the published
equations exactly as printed, so that circuit can be compared. Use it only
for that.

The published gate drawings use 5, 5, 3 (+ a direct B), 6, 6, 3 (+ a direct
A) and 4 AND gates for a to g. Which inputs they invert also matches the
published equations. With `PRINTED_EQ=1`, those are the term counts built
here.

## Interface and timing

`hex7seg_decoder`, the top:

| port | dir | type | meaning |
|---|---|---|---|
| `digit` | in | `hex_digit_t` (`logic [3:0]`) | `digit[3]` = A ... `digit[0]` = D |
| `seg` | out | `segments_t` | packed struct `{a,b,c,d,e,f,g}`; `a` is bit 6, `g` bit 0; 1 = lit |

Because `a` is the most significant bit of `segments_t`, `seg` read as a
7-bit number matches a table row (`7'b1111110` is 0).

Each segment module `seg_a` ... `seg_g` has the same `digit` input and a
1-bit `seg` output.

Timing: the logic is purely combinational, two gate levels plus input
inverters. The outputs follow the input with no clock cycles of latency.
There is no reset, enable, blanking input or decimal point.

Polarity: the outputs are active high, which suits a common-cathode display.
A common-anode display lights a bar when its pin is low, so drive it with
`~seg`. Inverting outside the decoder keeps the segment logic unchanged.

## Files

| file | contents |
|---|---|
| `rtl/hex7seg_pkg.sv` | `hex_digit_t` and `segments_t` |
| `rtl/seg_a.sv` ... `rtl/seg_g.sv` | one segment circuit each, both variants behind `PRINTED_EQ` |
| `rtl/hex7seg_decoder.sv` | top: the seven segment circuits on one input |
| `tb/tb_seg_a.sv` ... `tb/tb_seg_g.sv` | per-segment tests |
| `tb/tb_hex7seg_decoder.sv` | end-to-end test at default parameters |
| `tb/tb_hex7seg_printed.sv` | behaviour of the `PRINTED_EQ=1` build |

## Verification

Every testbench applies one input per 10 ns clock period and checks the
outputs 1 ns later, in the same period. It counts the periods to confirm
there is no latency. A watchdog ends a run with a failure if it hangs. Each
testbench prints `TB_RESULT checks=N failures=M`.

- `tb_seg_x` runs all 16 inputs through the default build and compares it
  with that column of a truth table held in the testbench. It also runs the
  `PRINTED_EQ=1` build and checks that it differs from the table exactly at
  the inputs listed above. 33 checks.
- `tb_hex7seg_decoder` runs inputs 0-F in order, then 64 random inputs. Each
  output word is compared with two references written independently of each
  other: the table, and a list of which bars each glyph leaves dark. The test
  fails unless all sixteen glyphs appear and every bar is seen both lit and
  dark. 184 checks, all at default parameters.
- `tb_hex7seg_printed` checks the exact words the published equations
  produce. For 8-F it also checks the "B flipped" glyph swap. 38 checks.

Each testbench was also run against a copy of its module with one fault
inserted: one product term removed from a segment, or the b and c outputs
swapped in the top. It was also run against an empty module. In every case
the testbench reported failures. Verilator lint (`-Wall`) and the slang
front end of yosys accept every RTL file with no warnings in the RTL.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/hex7seg_pkg.sv tb/tb_hex7seg_decoder.sv \
  --top-module tb_hex7seg_decoder -o sim
./obj_dir/sim
```

Replace the testbench file and `--top-module` to run the others.

## Changing it

- To use different glyphs (for example a 7 with bar f, or a 6 and 9 without
  their tails), edit the affected rows of the table in the testbenches. Then
  re-derive the changed segments' sums of products and replace the
  `g_table` branch of those modules.
- Any 4-input function can be placed in the same two-level form. The
  testbench tables are the specification to check it against.
