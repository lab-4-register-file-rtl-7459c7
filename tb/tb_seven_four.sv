// tb_seven_four: checks the multiplexed four-digit display driver.
//
// Runs the driver with a short scan period (SCAN_BITS = 2, a new digit every
// 4 cycles). For random 16-bit values it watches a full scan and checks, at
// every cycle, that exactly one digit enable is low, that the digit shown
// carries the right nibble (leftmost digit = most significant), that the
// decimal point is dark, and that all four digits were visited in order with
// the expected dwell time.
module tb_seven_four;
  import lab4_pkg::*;
  import tb_seg_ref_pkg::*;

  localparam int SB = 2;
  logic        clk = 1'b0, reset;
  logic [15:0] value;
  seg_pins_t   pins;
  int checks = 0, failures = 0;

  seven_four #(.SCAN_BITS(SB)) dut (.clk, .reset, .value, .pins);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, prev_d, dwell;
    reset = 1'b1; value = 16'h0123;
    @(posedge clk); @(posedge clk); #1;
    reset = 1'b0;
    // after reset the rightmost digit is shown first
    checks++;
    if (pins.sel !== 4'b1110) begin failures++; $display("sel after reset %b", pins.sel); end
    prev_d = 0; dwell = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (t % 37 == 0) value = (t < 600) ? {4'(t), 4'(t >> 4), 4'(t >> 8), 4'(t >> 2)} : 16'($urandom);
      #1;
      d = -1;
      for (int k = 0; k < 4; k++) if (pins.sel == ~(4'b1 << k)) d = k;
      checks++;
      if (d < 0) begin failures++; $display("sel not one-hot-low: %b", pins.sel); continue; end
      if (d == prev_d) dwell++;
      else begin
        checks++;
        if (dwell != (1 << SB) || d != (prev_d + 1) % 4) begin
          failures++; $display("scan order/dwell wrong: %0d->%0d after %0d", prev_d, d, dwell);
        end
        dwell = 1; prev_d = d;
      end
      checks++;
      if (pins.segment !== ~seg_ref_on(value[4*d +: 4]) || pins.dp !== 1'b1) begin
        failures++;
        if (failures < 10) $display("digit %0d of %h: seg %b", d, value, pins.segment);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
