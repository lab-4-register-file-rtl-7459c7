// lab4_top: two designs side by side.
//
// 1. The memory system (ROM, RAM, seven-segment output, button input and
//    address decoder) with the copy controller as a second bus master. The
//    external bus (proc_*) is where a processor connects.
//    While the controller is busy it owns the bus and the external request is
//    ignored; otherwise the external request goes straight through. rddata is
//    seen by both masters. Bus timing is that of memory_system: writes on the
//    next rising edge, read data one cycle after the request.
// 2. The 32 x 32 register file (rf_*), which is built for the
//    processor but does not connect to the memory system.
//
// The two designs and their internal connections follow the specification. Sharing the
// bus between the external master and the controller, with the controller
// taking priority while it runs, is this design's choice.
module lab4_top
  import lab4_pkg::*;
#(
  parameter string       ROM_INIT  = "rtl/rom_init.hex",
  parameter int unsigned SCAN_BITS = 16
) (
  input  logic             clk,
  input  logic             reset,
  // external bus master (processor)
  input  logic             proc_read,
  input  logic             proc_write,
  input  addr_t            proc_address,
  input  data_t            proc_wrdata,
  output data_t            rddata,
  // board I/O
  input  logic [BTN_W-1:0] btn_in,
  output seg_pins_t        seg_pins,
  output data_t            disp_value,
  // copy controller
  input  logic             ctrl_start,
  input  addr_t            ctrl_ptr_addr,
  input  addr_t            ctrl_copy_src,
  input  addr_t            ctrl_copy_dst,
  output logic             ctrl_busy,
  output logic             ctrl_done,
  // register file
  input  logic [4:0]       rf_aa,
  input  logic [4:0]       rf_ab,
  input  logic [4:0]       rf_aw,
  input  logic             rf_wren,
  input  data_t            rf_wrdata,
  output data_t            rf_a,
  output data_t            rf_b
);

  bus_req_t ctrl_bus, proc_bus, bus;

  assign proc_bus = '{read: proc_read, write: proc_write,
                      address: proc_address, wrdata: proc_wrdata};

  mem_controller u_ctrl (
    .clk      (clk),
    .reset    (reset),
    .start    (ctrl_start),
    .ptr_addr (ctrl_ptr_addr),
    .copy_src (ctrl_copy_src),
    .copy_dst (ctrl_copy_dst),
    .bus      (ctrl_bus),
    .rddata   (rddata),
    .busy     (ctrl_busy),
    .done     (ctrl_done)
  );

  assign bus = ctrl_busy ? ctrl_bus : proc_bus;

  memory_system #(.ROM_INIT(ROM_INIT), .SCAN_BITS(SCAN_BITS)) u_mem (
    .clk        (clk),
    .reset      (reset),
    .read       (bus.read),
    .write      (bus.write),
    .address    (bus.address),
    .wrdata     (bus.wrdata),
    .rddata     (rddata),
    .btn_in     (btn_in),
    .seg_pins   (seg_pins),
    .disp_value (disp_value)
  );

  register_file u_rf (
    .clk    (clk),
    .aa     (rf_aa),
    .ab     (rf_ab),
    .aw     (rf_aw),
    .wren   (rf_wren),
    .wrdata (rf_wrdata),
    .a      (rf_a),
    .b      (rf_b)
  );

endmodule
