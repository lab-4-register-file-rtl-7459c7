// memory_system: the bus-attached memory system (ROM, RAM, display
// output and button input behind one address decoder).
//
// A bus master drives address (16 bits), read, write and wrdata. The decoder
// raises the chip select of the region holding the address:
//   0x0000-0x0FFF ROM (4 KB)      0x1000-0x1FFF RAM (4 KB)
//   0x2000-0x200F seven-segment   0x2010-0x2037 buttons
// ROM and RAM get address bits 11..2, the display and button ports bit 2.
// Writes take effect on the rising edge that ends the request cycle. Reads of
// every readable slave (ROM, RAM, buttons) have one cycle of latency: data for
// a read issued in cycle n is on rddata during cycle n+1, and a new request
// can be issued in every cycle. rddata is zero in cycles that answer no read,
// including reads of the display or of unmapped addresses.
//
// The connection scheme follows the specification's system diagram. Its shared tri-state
// rddata bus is built here as an OR of the slaves' outputs, each forced to
// zero unless its output enable is high; an assertion checks that no two
// slaves drive at once. reset clears the display and button registers; ROM
// and RAM have no reset.
module memory_system
  import lab4_pkg::*;
#(
  parameter string       ROM_INIT  = "rtl/rom_init.hex",
  parameter int unsigned SCAN_BITS = 16
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             read,
  input  logic             write,
  input  addr_t            address,
  input  data_t            wrdata,
  output data_t            rddata,
  input  logic [BTN_W-1:0] btn_in,
  output seg_pins_t        seg_pins,
  output data_t            disp_value
);

  logic  cs_rom, cs_ram, cs_do, cs_di;
  data_t rom_rd, ram_rd, di_rd;
  logic  rom_oe, ram_oe, di_oe;

  decoder u_decoder (
    .addr   (address),
    .cs_rom (cs_rom),
    .cs_ram (cs_ram),
    .cs_do  (cs_do),
    .cs_di  (cs_di)
  );

  rom #(.INIT_FILE(ROM_INIT)) u_rom (
    .clk       (clk),
    .cs        (cs_rom),
    .read      (read),
    .addr      (address[11:2]),
    .rddata    (rom_rd),
    .rddata_oe (rom_oe)
  );

  ram u_ram (
    .clk       (clk),
    .cs        (cs_ram),
    .read      (read),
    .write     (write),
    .addr      (address[11:2]),
    .wrdata    (wrdata),
    .rddata    (ram_rd),
    .rddata_oe (ram_oe)
  );

  seven_segment #(.SCAN_BITS(SCAN_BITS)) u_seven_segment (
    .clk      (clk),
    .reset    (reset),
    .cs       (cs_do),
    .read     (read),
    .write    (write),
    .addr     (address[2]),
    .wrdata   (wrdata),
    .data_out (seg_pins),
    .value    (disp_value)
  );

  buttons u_buttons (
    .clk       (clk),
    .reset     (reset),
    .cs        (cs_di),
    .read      (read),
    .write     (write),
    .addr      (address[2]),
    .data_in   (btn_in),
    .rddata    (di_rd),
    .rddata_oe (di_oe)
  );

  assign rddata = rom_rd | ram_rd | di_rd;

  // The shared read bus must never have two drivers (the tri-state rule).
  assert property (@(posedge clk) disable iff (reset) $onehot0({rom_oe, ram_oe, di_oe}))
    else $error("memory_system: two slaves drive rddata");

endmodule
