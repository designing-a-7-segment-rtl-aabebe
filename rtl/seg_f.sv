// seg_f: drive for segment f (upper left bar) of a hexadecimal 7-segment decoder.
//
// Segment f is dark for 1, 2, 3, 7 and d.
// The logic is a two-level sum of products of the
// input bits A, B, C, D (A = digit[3], the most significant bit) and their
// complements: a bank of AND terms feeding one OR. It is purely combinational,
// with no clock or reset; the output follows the input after the gate delay.
//
// The default build (PRINTED_EQ = 0) uses the 5-term minimum cover of the
// hexadecimal truth table obtained by Karnaugh-map grouping:
//   f = AB' + AC + BD' + C'D' + A'BC'
// The published derivation of this decoder gives
//   f = C'D' + BC' + BD' + A
// whose Karnaugh map has the rows AB=11 and AB=10 filled with each other's
// values and cell 9 marked 1; that expression lights segment f wrongly for input(s)
// D (hex).
// PRINTED_EQ = 1 builds it unchanged, for comparison only.
//
// Interface: digit (4 bits, hex_digit_t) in, seg (1 = segment lit) out.
module seg_f
  import hex7seg_pkg::*;
#(
  parameter bit PRINTED_EQ = 1'b0
) (
  input  hex_digit_t digit,
  output logic       seg
);

  logic A, B, C, D;
  assign {A, B, C, D} = digit;

  generate
    if (PRINTED_EQ) begin : g_printed
      assign seg = (~C & ~D) |
                   (B & ~C) |
                   (B & ~D) |
                   A;
    end else begin : g_table
      assign seg = (A & ~B) |
                   (A & C) |
                   (B & ~D) |
                   (~C & ~D) |
                   (~A & B & ~C);
    end
  endgenerate

endmodule
