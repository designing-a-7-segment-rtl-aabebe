// seg_a: drive for segment a (top bar) of a hexadecimal 7-segment decoder.
//
// Segment a is lit for every digit except 1, 4, b and d.
// The logic is a two-level sum of products of the
// input bits A, B, C, D (A = digit[3], the most significant bit) and their
// complements: a bank of AND terms feeding one OR. It is purely combinational,
// with no clock or reset; the output follows the input after the gate delay.
//
// The default build (PRINTED_EQ = 0) uses the 6-term minimum cover of the
// hexadecimal truth table obtained by Karnaugh-map grouping:
//   a = A'C + BC + AD' + B'D' + A'BD + AB'C'
// The published derivation of this decoder gives
//   a = BC'D + A'C + B'C + AD' + B'D'
// whose Karnaugh map has the rows AB=11 and AB=10 filled with each other's
// values; that expression lights segment a wrongly for input(s)
// 9, B, D and F (hex).
// PRINTED_EQ = 1 builds it unchanged, for comparison only.
//
// Interface: digit (4 bits, hex_digit_t) in, seg (1 = segment lit) out.
module seg_a
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
      assign seg = (B & ~C & D) |
                   (~A & C) |
                   (~B & C) |
                   (A & ~D) |
                   (~B & ~D);
    end else begin : g_table
      assign seg = (~A & C) |
                   (B & C) |
                   (A & ~D) |
                   (~B & ~D) |
                   (~A & B & D) |
                   (A & ~B & ~C);
    end
  endgenerate

endmodule
