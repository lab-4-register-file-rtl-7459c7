// seven_four: four-digit multiplexed seven-segment display driver.
//
// Shows the 16-bit input value as four hexadecimal digits, most significant
// nibble on the leftmost digit (sel[3]). The four digits share one set of
// segment lines, so the driver lights one digit at a time: a free-running
// counter of SCAN_BITS+2 bits selects the digit from its top two bits, which
// moves to the next digit every 2**SCAN_BITS clock cycles (2**16 cycles is
// about 1.3 ms at 50 MHz, fast enough that the eye sees all four digits).
// sel, dp and segment are active low, as on common-anode display boards:
// the selected digit's sel bit is 0, segment[0..6] are segments a..g, and
// the decimal point is kept dark (dp = 1). reset clears the scan counter.
//
// The display module of the specification uses a driver of this name as a component
// without describing it; everything here, including the polarity, the digit
// order and the scan rate, is this design's choice.
module seven_four
  import lab4_pkg::*;
#(
  parameter int unsigned SCAN_BITS = 16
) (
  input  logic        clk,
  input  logic        reset,
  input  logic [15:0] value,
  output seg_pins_t   pins
);

  logic [SCAN_BITS+1:0] scan_q;
  logic [1:0]           digit;
  logic [3:0]           nibble;
  logic [6:0]           seg_on;   // active-high segments g..a

  always_ff @(posedge clk) begin
    if (reset) scan_q <= '0;
    else       scan_q <= scan_q + 1'b1;
  end

  assign digit  = scan_q[SCAN_BITS+1 -: 2];
  assign nibble = value[4*digit +: 4];

  // Segment patterns for hex digits, bit 0 = a ... bit 6 = g.
  always_comb begin
    unique case (nibble)
      4'h0: seg_on = 7'b0111111;
      4'h1: seg_on = 7'b0000110;
      4'h2: seg_on = 7'b1011011;
      4'h3: seg_on = 7'b1001111;
      4'h4: seg_on = 7'b1100110;
      4'h5: seg_on = 7'b1101101;
      4'h6: seg_on = 7'b1111101;
      4'h7: seg_on = 7'b0000111;
      4'h8: seg_on = 7'b1111111;
      4'h9: seg_on = 7'b1101111;
      4'hA: seg_on = 7'b1110111;
      4'hB: seg_on = 7'b1111100;
      4'hC: seg_on = 7'b0111001;
      4'hD: seg_on = 7'b1011110;
      4'hE: seg_on = 7'b1111001;
      4'hF: seg_on = 7'b1110001;
    endcase
  end

  always_comb begin
    pins.sel     = ~(4'b0001 << digit);
    pins.dp      = 1'b1;
    pins.segment = ~seg_on;
  end

endmodule
