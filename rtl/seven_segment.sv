// seven_segment: one-word output register on the memory bus, shown on the
// board's four-digit seven-segment display.
//
// A write with cs high stores wrdata into the internal display register on the
// rising clock edge (same timing as a RAM write); reset clears it. The
// register's low 16 bits drive seven_four, which shows them as four hex digits
// on the display pins (data_out: sel, dp, segment). The register is the
// slave's only storage, so every word address in its region reaches it: the
// address input (bus address bit 2) and read are accepted for a uniform slave
// interface but not used, and the slave never drives rddata.
//
// The register, its write timing, the reset and the port list follow the
// specification's description and block diagram. Showing the low half-word is this
// design's choice, forced by the display having four digits.
module seven_segment
  import lab4_pkg::*;
#(
  parameter int unsigned SCAN_BITS = 16
) (
  input  logic      clk,
  input  logic      reset,
  input  logic      cs,
  input  logic      read,
  input  logic      write,
  input  logic      addr,
  input  data_t     wrdata,
  output seg_pins_t data_out,
  output data_t     value       // the display register, for observation
);

  data_t disp_q;

  always_ff @(posedge clk) begin
    if (reset)              disp_q <= '0;
    else if (cs && write)   disp_q <= wrdata;
  end

  assign value = disp_q;

  seven_four #(.SCAN_BITS(SCAN_BITS)) u_driver (
    .clk   (clk),
    .reset (reset),
    .value (disp_q[15:0]),
    .pins  (data_out)
  );

endmodule
