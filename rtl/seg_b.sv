// seg_b: drive for segment b (upper right bar) of a hexadecimal 7-segment decoder.
//
// Segment b is lit for 0-4, 7-A and d.
// The logic is a two-level sum of products of the
// input bits A, B, C, D (A = digit[3], the most significant bit) and their
// complements: a bank of AND terms feeding one OR. It is purely combinational,
// with no clock or reset; the output follows the input after the gate delay.
//
// The default build (PRINTED_EQ = 0) uses the 5-term minimum cover of the
// hexadecimal truth table obtained by Karnaugh-map grouping:
//   b = A'B' + B'D' + A'C'D' + A'CD + AC'D
// The published derivation of this decoder gives
//   b = BC'D' + AC'D + A'CD + ABD' + A'B'
// whose Karnaugh map has the rows AB=11 and AB=10 filled with each other's
// values; that expression lights segment b wrongly for input(s)
// 8, A, C and E (hex).
// PRINTED_EQ = 1 builds it unchanged, for comparison only.
//
// Interface: digit (4 bits, hex_digit_t) in, seg (1 = segment lit) out.
module seg_b
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
      assign seg = (B & ~C & ~D) |
                   (A & ~C & D) |
                   (~A & C & D) |
                   (A & B & ~D) |
                   (~A & ~B);
    end else begin : g_table
      assign seg = (~A & ~B) |
                   (~B & ~D) |
                   (~A & ~C & ~D) |
                   (~A & C & D) |
                   (A & ~C & D);
    end
  endgenerate

endmodule
