// hex7seg_decoder: hexadecimal (0-F) to 7-segment decoder.
//
// A 4-bit code ABCD (A = digit[3], the most significant bit) selects one of
// the sixteen glyphs 0 1 2 3 4 5 6 7 8 9 A b C d E F, and the seven outputs
// a-g light the segments that draw it (1 = lit). The decoder is seven
// independent two-level AND-OR circuits, one per segment (seg_a .. seg_g),
// each fed by the same four inputs; no product term is shared between
// segments. It is purely combinational: no clock, no reset, no latency
// beyond the gate delay.
//
// Truth table (seg = {a,b,c,d,e,f,g}):
//   0 1111110   4 0110011   8 1111111   C 1001110
//   1 0110000   5 1011011   9 1111011   d 0111101
//   2 1101101   6 1011111   A 1110111   E 1001111
//   3 1111001   7 1110000   b 0011111   F 1000111
//
// The glyphs and the table are those of the source design. The per-segment
// expressions are minimum sums of products of this table. PRINTED_EQ = 1
// instead builds the source's printed segment equations, which display the
// wrong glyph for several of the inputs 8-F (see seg_a .. seg_g); it exists
// only for comparison. Active-high outputs suit a common-cathode display; a
// common-anode display needs the outputs inverted outside this module.
//
// Interface: digit (hex_digit_t) in; seg (segments_t, fields a..g) out.
module hex7seg_decoder
  import hex7seg_pkg::*;
#(
  parameter bit PRINTED_EQ = 1'b0
) (
  input  hex_digit_t digit,
  output segments_t  seg
);

  seg_a #(.PRINTED_EQ(PRINTED_EQ)) u_seg_a (.digit(digit), .seg(seg.a));
  seg_b #(.PRINTED_EQ(PRINTED_EQ)) u_seg_b (.digit(digit), .seg(seg.b));
  seg_c #(.PRINTED_EQ(PRINTED_EQ)) u_seg_c (.digit(digit), .seg(seg.c));
  seg_d #(.PRINTED_EQ(PRINTED_EQ)) u_seg_d (.digit(digit), .seg(seg.d));
  seg_e #(.PRINTED_EQ(PRINTED_EQ)) u_seg_e (.digit(digit), .seg(seg.e));
  seg_f #(.PRINTED_EQ(PRINTED_EQ)) u_seg_f (.digit(digit), .seg(seg.f));
  seg_g #(.PRINTED_EQ(PRINTED_EQ)) u_seg_g (.digit(digit), .seg(seg.g));

endmodule
