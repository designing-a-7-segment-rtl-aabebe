// tb_hex7seg_decoder: end-to-end testbench of the hexadecimal 7-segment
// decoder at its default parameters.
//
// One input code per clock period: first the sixteen codes 0..F in order,
// then 64 codes drawn with $urandom. Every output word is compared, in the
// period its input was applied (the decoder has no latency), with the
// truth table held below, and with a second reference that rebuilds each
// glyph from the shape of the character (which bars a hand-drawn 0..F
// uses). The run counts how often each of the sixteen glyphs was shown and
// how often each segment was lit and dark; a glyph never shown or a
// segment never switched both ways counts as a failure. A watchdog ends
// the run with a failure after 1000 clock periods.
module tb_hex7seg_decoder;
  import hex7seg_pkg::*;

  localparam int unsigned N_RANDOM = 64;
  // Segment names by bit position of segments_t (bit 0 = g ... bit 6 = a).
  localparam string NAMES [7] = '{"g", "f", "e", "d", "c", "b", "a"};

  // Truth table rows {a,b,c,d,e,f,g} for the inputs 0..F.
  localparam logic [6:0] TABLE [16] = '{
    7'b1111110, 7'b0110000, 7'b1101101, 7'b1111001,
    7'b0110011, 7'b1011011, 7'b1011111, 7'b1110000,
    7'b1111111, 7'b1111011, 7'b1110111, 7'b0011111,
    7'b1001110, 7'b0111101, 7'b1001111, 7'b1000111
  };

  // Second reference: the dark bars of each glyph, by name.
  function automatic segments_t glyph(input int unsigned n);
    segments_t s;
    s = '{default: 1'b1};
    case (n)
      0:  s.g = 1'b0;
      1:  begin s.a = 0; s.d = 0; s.e = 0; s.f = 0; s.g = 0; end
      2:  begin s.c = 0; s.f = 0; end
      3:  begin s.e = 0; s.f = 0; end
      4:  begin s.a = 0; s.d = 0; s.e = 0; end
      5:  begin s.b = 0; s.e = 0; end
      6:  s.b = 1'b0;
      7:  begin s.d = 0; s.e = 0; s.f = 0; s.g = 0; end
      8:  ;
      9:  s.e = 1'b0;
      10: s.d = 1'b0;                        // A
      11: begin s.a = 0; s.b = 0; end        // b
      12: begin s.b = 0; s.c = 0; s.g = 0; end // C
      13: begin s.a = 0; s.f = 0; end        // d
      14: begin s.b = 0; s.c = 0; end        // E
      15: begin s.b = 0; s.c = 0; s.d = 0; end // F
      default: s = '0;
    endcase
    return s;
  endfunction

  logic       clk;
  initial clk = 1'b0;
  hex_digit_t digit;
  segments_t  seg;
  int         checks = 0, failures = 0, cycles = 0;
  int         shown [16];
  int         lit [7], dark [7];

  hex7seg_decoder dut (.digit(digit), .seg(seg));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  task automatic apply(input int unsigned n);
    @(posedge clk);
    digit = hex_digit_t'(n);
    #1;
    checks++;
    if (seg !== segments_t'(TABLE[n])) begin
      failures++;
      $display("FAIL digit=%h seg=%b expected %b", n, seg, TABLE[n]);
    end
    checks++;
    if (seg !== glyph(n)) begin
      failures++;
      $display("FAIL digit=%h seg=%b glyph %b", n, seg, glyph(n));
    end
    for (int k = 0; k < 16; k++)
      if (seg == segments_t'(TABLE[k])) shown[k]++;
    for (int b = 0; b < 7; b++)
      if (seg[b]) lit[b]++; else dark[b]++;
  endtask

  initial begin
    digit = '0;
    foreach (shown[k]) shown[k] = 0;
    foreach (lit[b]) begin lit[b] = 0; dark[b] = 0; end

    for (int n = 0; n < 16; n++) apply(n);
    for (int r = 0; r < N_RANDOM; r++) apply($urandom_range(15, 0));

    // One output word per period: the decoder adds no latency.
    checks++;
    if (cycles != 16 + N_RANDOM) begin
      failures++;
      $display("FAIL %0d periods for %0d inputs", cycles, 16 + N_RANDOM);
    end
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (shown[k] == 0) begin
        failures++;
        $display("FAIL glyph %h never shown", k);
      end
    end
    for (int b = 0; b < 7; b++) begin
      checks++;
      if (lit[b] == 0 || dark[b] == 0) begin
        failures++;
        $display("FAIL segment %s never switched (lit %0d dark %0d)", NAMES[b], lit[b], dark[b]);
      end
    end
    $display("glyphs shown 0..F: %p", shown);
    $display("segment g..a lit: %p dark: %p", lit, dark);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
