// tb_seg_a: self-checking testbench for seg_a, the segment-a driver.
//
// Applies all sixteen input codes, one per clock period, to two copies of
// the block: the default build, which must match column a of the
// hexadecimal truth table held below, and the PRINTED_EQ build, which must
// differ from that column exactly at input(s) 9, B, D, F (hex). The block is
// combinational, so each output is checked in the same period as its input
// (zero cycles of latency), 1 ns after the input changes. A watchdog ends
// the run with a failure if it has not finished after 100 clock periods.
module tb_seg_a;
  import hex7seg_pkg::*;

  // Truth table rows {a,b,c,d,e,f,g} for the inputs 0..F.
  localparam logic [6:0] TABLE [16] = '{
    7'b1111110, 7'b0110000, 7'b1101101, 7'b1111001,
    7'b0110011, 7'b1011011, 7'b1011111, 7'b1110000,
    7'b1111111, 7'b1111011, 7'b1110111, 7'b0011111,
    7'b1001110, 7'b0111101, 7'b1001111, 7'b1000111
  };
  localparam int unsigned COL = 6;            // bit of segment a in a row
  localparam logic [15:0] PRINTED_WRONG = 16'haa00; // inputs 9, B, D, F

  logic       clk;
  initial clk = 1'b0;
  hex_digit_t digit;
  logic       seg_tab, seg_prt;
  int         checks = 0, failures = 0, cycles = 0;

  seg_a                      dut_tab (.digit(digit), .seg(seg_tab));
  seg_a #(.PRINTED_EQ(1'b1)) dut_prt (.digit(digit), .seg(seg_prt));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    digit = '0;
    for (int n = 0; n < 16; n++) begin
      @(posedge clk);
      digit = hex_digit_t'(n);
      #1;
      checks++;
      if (seg_tab !== TABLE[n][COL]) begin
        failures++;
        $display("FAIL seg_a digit=%h got %b expected %b", n, seg_tab, TABLE[n][COL]);
      end
      checks++;
      if (seg_prt !== (TABLE[n][COL] ^ PRINTED_WRONG[n])) begin
        failures++;
        $display("FAIL seg_a PRINTED_EQ digit=%h got %b expected %b",
                 n, seg_prt, TABLE[n][COL] ^ PRINTED_WRONG[n]);
      end
    end
    // All sixteen inputs were applied in sixteen periods: no extra latency.
    checks++;
    if (cycles != 16) begin
      failures++;
      $display("FAIL seg_a took %0d periods for 16 inputs", cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("FAIL seg_a watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
