// tb_seven_segment: checks the bus-written display register and its pins.
//
// Writes random words with chip select high and checks that the register
// takes them on the rising edge (not before), that writes without chip select
// or without write are ignored, that reads leave it alone, and that reset
// clears it. With a short scan period it also checks that the pins show the
// low half-word of the register, digit by digit.
module tb_seven_segment;
  import lab4_pkg::*;
  import tb_seg_ref_pkg::*;

  localparam int SB = 1;
  logic      clk = 1'b0, reset, cs, read, write, addr;
  data_t     wrdata, value;
  seg_pins_t data_out;
  data_t     expected;
  int checks = 0, failures = 0;

  seven_segment #(.SCAN_BITS(SB)) dut (.clk, .reset, .cs, .read, .write, .addr, .wrdata, .data_out, .value);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_value(input string what);
    checks++;
    if (value !== expected) begin failures++; $display("%s: got %h want %h", what, value, expected); end
  endtask

  task automatic check_pins();
    int d;
    d = -1;
    for (int k = 0; k < 4; k++) if (data_out.sel == ~(4'b1 << k)) d = k;
    checks++;
    if (d < 0 || data_out.segment !== ~seg_ref_on(expected[4*d +: 4])) begin
      failures++; $display("pins wrong for %h: sel %b seg %b", expected, data_out.sel, data_out.segment);
    end
  endtask

  initial begin
    cs = 0; read = 0; write = 0; addr = 0; wrdata = 0;
    reset = 1; expected = '0;
    repeat (2) @(posedge clk); #1;
    reset = 0;
    check_value("after reset");
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      cs = 1'($urandom); write = 1'($urandom); read = !write && 1'($urandom);
      addr = 1'($urandom); wrdata = $urandom;
      #1;
      check_value("before edge");
      @(posedge clk); #1;
      if (cs && write) expected = wrdata;
      cs = 0; write = 0; read = 0;
      check_value("after edge");
      check_pins();
    end
    // reset clears the register
    @(negedge clk); reset = 1;
    @(posedge clk); #1; reset = 0; expected = '0;
    check_value("after second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
