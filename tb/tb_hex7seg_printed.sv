// tb_hex7seg_printed: testbench of the decoder built with PRINTED_EQ = 1,
// the segment equations as originally published.
//
// Shows what that variant displays. For 0-2 and 4-7 it draws the right
// glyph. For 8-F it draws the glyph of the input with bit B inverted
// (8 shows C, C shows 8, A shows E, ...), the effect of a Karnaugh map whose
// rows AB=11 and AB=10 hold each other's values; the maps of segments e and f
// have one more wrong cell each, so 3, 9 and D differ further (3 and 9 draw
// no hexadecimal glyph at all). The expected words below were worked out by
// hand from the published equations, independently of the RTL. Each input is
// checked in the period it is applied; a watchdog stops the run after 200
// clock periods.
module tb_hex7seg_printed;
  import hex7seg_pkg::*;

  // Correct truth table rows {a,b,c,d,e,f,g} for 0..F.
  localparam logic [6:0] TABLE [16] = '{
    7'b1111110, 7'b0110000, 7'b1101101, 7'b1111001,
    7'b0110011, 7'b1011011, 7'b1011111, 7'b1110000,
    7'b1111111, 7'b1111011, 7'b1110111, 7'b0011111,
    7'b1001110, 7'b0111101, 7'b1001111, 7'b1000111
  };
  // What the published equations light for 0..F.
  localparam logic [6:0] PRINTED [16] = '{
    7'b1111110, 7'b0110000, 7'b1101101, 7'b1111101,
    7'b0110011, 7'b1011011, 7'b1011111, 7'b1110000,
    7'b1001110, 7'b0111111, 7'b1001111, 7'b1000111,
    7'b1111111, 7'b1111011, 7'b1110111, 7'b0011111
  };
  // The inputs whose glyph the published equations get right.
  localparam logic [15:0] RIGHT = 16'b0000_0000_1111_0111;

  logic       clk;
  initial clk = 1'b0;
  hex_digit_t digit;
  segments_t  seg;
  int         checks = 0, failures = 0, n_right = 0, n_wrong = 0;

  hex7seg_decoder #(.PRINTED_EQ(1'b1)) dut (.digit(digit), .seg(seg));

  always #5 clk = ~clk;

  initial begin
    digit = '0;
    for (int n = 0; n < 16; n++) begin
      @(posedge clk);
      digit = hex_digit_t'(n);
      #1;
      checks++;
      if (seg !== segments_t'(PRINTED[n])) begin
        failures++;
        $display("FAIL digit=%h seg=%b expected %b", n, seg, PRINTED[n]);
      end
      checks++;
      if ((seg == segments_t'(TABLE[n])) != RIGHT[n]) begin
        failures++;
        $display("FAIL digit=%h right-glyph status wrong", n);
      end
      if (seg == segments_t'(TABLE[n])) n_right++; else n_wrong++;
      // Inputs 8-F with B inverted, where the extra e and f cells do not bite.
      if (n >= 8 && n != 9 && n != 13) begin
        checks++;
        if (seg !== segments_t'(TABLE[n ^ 4])) begin
          failures++;
          $display("FAIL digit=%h does not show glyph %h", n, n ^ 4);
        end
      end
    end
    $display("published equations: %0d glyphs right, %0d wrong", n_right, n_wrong);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
