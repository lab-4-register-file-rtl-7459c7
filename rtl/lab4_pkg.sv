// lab4_pkg: widths, address map and bus types shared by the memory system.
//
// The memory bus is 16 address bits and 32 data bits wide. Its address space
// is split into four regions, each owned by one slave: ROM at 0x0000-0x0FFF,
// RAM at 0x1000-0x1FFF, the seven-segment display register at 0x2000-0x200F
// and the button input at 0x2010-0x2037. All slaves are word aligned and
// ignore the two least significant address bits. Addresses above 0x2037 select
// nothing. The region bounds follow the published address map; the upper end
// of the button region is rounded up to a whole word (the map prints 0x2035 as
// its last address and 0x2038 as the first free one).
package lab4_pkg;

  localparam int unsigned ADDR_W = 16;
  localparam int unsigned DATA_W = 32;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;

  // Region bounds, inclusive, as byte addresses.
  localparam addr_t ROM_BASE = 16'h0000;
  localparam addr_t ROM_LAST = 16'h0FFF;
  localparam addr_t RAM_BASE = 16'h1000;
  localparam addr_t RAM_LAST = 16'h1FFF;
  localparam addr_t DO_BASE  = 16'h2000;
  localparam addr_t DO_LAST  = 16'h200F;
  localparam addr_t DI_BASE  = 16'h2010;
  localparam addr_t DI_LAST  = 16'h2037;

  // One bus request as a master drives it: the request half of Figure 1.
  typedef struct packed {
    logic  read;
    logic  write;
    addr_t address;
    data_t wrdata;
  } bus_req_t;

  // Pins of the four-digit seven-segment display: digit enables, decimal
  // point and segments a..g (segment[0] = a). All active low.
  typedef struct packed {
    logic [3:0] sel;
    logic       dp;
    logic [6:0] segment;
  } seg_pins_t;

  localparam int unsigned BTN_W = 8;

  localparam bus_req_t BUS_IDLE = '{read: 1'b0, write: 1'b0, address: '0, wrdata: '0};

endpackage
