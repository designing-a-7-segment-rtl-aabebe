// seg_e: drive for segment e (lower left bar) of a hexadecimal 7-segment decoder.
//
// Segment e is lit for 0, 2, 6, 8 and A-F.
// The logic is a two-level sum of products of the
// input bits A, B, C, D (A = digit[3], the most significant bit) and their
// complements: a bank of AND terms feeding one OR. It is purely combinational,
// with no clock or reset; the output follows the input after the gate delay.
//
// The default build (PRINTED_EQ = 0) uses the 4-term minimum cover of the
// hexadecimal truth table obtained by Karnaugh-map grouping:
//   e = AB + AC + CD' + B'D'
// The published derivation of this decoder gives
//   e = CD' + AB' + AC + B'C + AD' + B'D'
// whose Karnaugh map has the rows AB=11 and AB=10 filled with each other's
// values and cell 3 marked 1; that expression lights segment e wrongly for input(s)
// 3, 9 and D (hex).
// PRINTED_EQ = 1 builds it unchanged, for comparison only.
//
// Interface: digit (4 bits, hex_digit_t) in, seg (1 = segment lit) out.
module seg_e
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
      assign seg = (C & ~D) |
                   (A & ~B) |
                   (A & C) |
                   (~B & C) |
                   (A & ~D) |
                   (~B & ~D);
    end else begin : g_table
      assign seg = (A & B) |
                   (A & C) |
                   (C & ~D) |
                   (~B & ~D);
    end
  endgenerate

endmodule
