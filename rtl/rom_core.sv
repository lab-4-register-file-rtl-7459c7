// rom_core: single-port block ROM, 1024 words of 32 bits.
//
// Stands in for the FPGA vendor's generated block-memory ROM: the address is
// registered on the rising edge of clk and the addressed word appears on dout
// during the following cycle (one cycle of latency, like a block RAM read).
// The contents are loaded at start-up from the hex file named by INIT_FILE,
// one 32-bit word per line from address 0; words the file does not reach read
// as zero. The generated core has no enable or reset, and neither has this one.
//
// Width, depth, single-port ROM organisation and file initialisation follow
// the specification; the hex format and the zero fill are this design's choices.
module rom_core #(
  parameter int unsigned DEPTH     = 1024,
  parameter int unsigned DATA_W    = 32,
  parameter string       INIT_FILE = "rtl/rom_init.hex",
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic [AW-1:0]     addr,
  output logic [DATA_W-1:0] dout
);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [AW-1:0]     addr_q;

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) addr_q <= addr;

  assign dout = mem[addr_q];

endmodule
