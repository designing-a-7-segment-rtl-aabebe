// hex7seg_pkg: types shared by the hexadecimal-to-7-segment decoder.
//
// hex_digit_t is the 4-bit input code. Its bits are named A, B, C, D from
// the most significant to the least significant bit, so digit[3] = A and
// digit[0] = D (hex 'A' = 1010 gives A=1, B=0, C=1, D=0).
//
// segments_t holds the seven segment drives in the order a, b, c, d, e, f, g,
// with a in the most significant bit, so a 7-bit literal reads like a row of
// the truth table (7'b1111110 is the digit 0). A 1 lights the segment.
// Segment placement: a top, b upper right, c lower right, d bottom,
// e lower left, f upper left, g middle.
package hex7seg_pkg;

  typedef logic [3:0] hex_digit_t;

  typedef struct packed {
    logic a;
    logic b;
    logic c;
    logic d;
    logic e;
    logic f;
    logic g;
  } segments_t;

endpackage
