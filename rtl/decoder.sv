// decoder: chip-select generator for the memory bus.
//
// Compares the 16-bit bus address with the four regions of the address map in
// lab4_pkg and raises the chip select of the region that holds it: cs_rom,
// cs_ram, cs_do (seven-segment output) or cs_di (button input). The regions do
// not overlap, so at most one select is high; addresses above the button
// region raise none. Purely combinational: the selects follow the address
// within the cycle, as the slaves sample them together with read and write on
// the next rising clock edge.
//
// The region bounds and the output names follow the specification's address map and
// system diagram. Decoding on full byte addresses against those bounds
// is this design's choice.
module decoder
  import lab4_pkg::*;
(
  input  addr_t addr,
  output logic  cs_rom,
  output logic  cs_ram,
  output logic  cs_do,
  output logic  cs_di
);

  always_comb begin
    cs_rom = (addr <= ROM_LAST);   // the ROM region starts at ROM_BASE = 0
    cs_ram = (addr >= RAM_BASE) && (addr <= RAM_LAST);
    cs_do  = (addr >= DO_BASE)  && (addr <= DO_LAST);
    cs_di  = (addr >= DI_BASE)  && (addr <= DI_LAST);
  end

  always_comb assert ($onehot0({cs_rom, cs_ram, cs_do, cs_di}))
    else $error("decoder: more than one chip select active");

endmodule
