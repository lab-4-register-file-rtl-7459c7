// tb_seg_ref_pkg: reference seven-segment patterns for the testbenches,
// spelled as the lit segments of each hex digit (segments a..g) so that they
// are worked out independently of the driver's table. seg_ref_on() returns
// the lit segments as a 7-bit mask with bit 0 = a.
package tb_seg_ref_pkg;
  function automatic logic [6:0] seg_ref_on(input logic [3:0] digit);
    string lit;
    logic [6:0] m;
    case (digit)
      4'h0: lit = "abcdef";   4'h1: lit = "bc";      4'h2: lit = "abdeg";   4'h3: lit = "abcdg";
      4'h4: lit = "bcfg";     4'h5: lit = "acdfg";   4'h6: lit = "acdefg";  4'h7: lit = "abc";
      4'h8: lit = "abcdefg";  4'h9: lit = "abcdfg";  4'hA: lit = "abcefg";  4'hB: lit = "cdefg";
      4'hC: lit = "adef";     4'hD: lit = "bcdeg";   4'hE: lit = "adefg";   default: lit = "aefg";
    endcase
    m = '0;
    for (int i = 0; i < lit.len(); i++) m[lit[i] - "a"] = 1'b1;
    return m;
  endfunction
endpackage
