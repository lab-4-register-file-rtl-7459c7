// rom: 4 KB synchronous ROM slave on the memory bus.
//
// Wraps rom_core (1024 x 32 block ROM) with the bus read protocol shared by
// every slave: the ROM receives bus address bits 11..2 (word aligned), and at
// the rising edge ending a cycle in which cs and read are both high it
// captures the request; during the next cycle the core's registered-address
// output is driven onto rddata with rddata_oe high. Read latency is one cycle
// and a new read may start every cycle. There is no write port.
//
// The specification puts a tri-state buffer on rddata; this design uses an output enable
// with rddata forced to zero when not driving, so the system can OR the
// slaves together. The core's address register plays the role of the
// registered address of the read timing; the cs-and-read flag is the wrapper's.
module rom #(
  parameter int unsigned DEPTH     = 1024,
  parameter int unsigned DATA_W    = 32,
  parameter string       INIT_FILE = "rtl/rom_init.hex",
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              cs,
  input  logic              read,
  input  logic [AW-1:0]     addr,
  output logic [DATA_W-1:0] rddata,
  output logic              rddata_oe
);

  logic [DATA_W-1:0] dout;
  logic              rd_pending;

  rom_core #(.DEPTH(DEPTH), .DATA_W(DATA_W), .INIT_FILE(INIT_FILE)) u_core (
    .clk  (clk),
    .addr (addr),
    .dout (dout)
  );

  always_ff @(posedge clk) rd_pending <= cs && read;

  always_comb begin
    rddata_oe = rd_pending;
    rddata    = rd_pending ? dout : '0;
  end

endmodule
