// ram: 4 KB synchronous RAM slave on the memory bus (1024 words of 32 bits).
//
// The RAM is word addressed: it receives address bits 11..2 of the bus, so the
// two byte-offset bits are ignored. Write: when cs and write are high at a
// rising clock edge, wrdata is stored at addr on that edge (no extra latency;
// a new write may follow in the next cycle). Read: at the rising edge that ends
// the request cycle, the address and the cs-and-read condition are captured in
// registers; during the following cycle the registered address selects the
// word driven on rddata, so read latency is one cycle and reads may be issued
// back to back.
//
// The specification gives the slave a tri-state buffer on rddata. Here the buffer is
// replaced by an output enable: rddata_oe is high exactly in the cycle the
// RAM would drive the bus, and rddata is zero otherwise, so the system ORs
// the slaves' outputs. This and the lack of a reset (none is drawn for the
// RAM) are this design's choices; size, word alignment and timing follow the
// specification. rd_pending starts at an arbitrary value, which only matters for
// the first cycle after power-up.
module ram #(
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              cs,
  input  logic              read,
  input  logic              write,
  input  logic [AW-1:0]     addr,
  input  logic [DATA_W-1:0] wrdata,
  output logic [DATA_W-1:0] rddata,
  output logic              rddata_oe
);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [AW-1:0]     addr_q;
  logic              rd_pending;

  always_ff @(posedge clk) begin
    if (cs && write) mem[addr] <= wrdata;
    addr_q     <= addr;
    rd_pending <= cs && read;
  end

  always_comb begin
    rddata_oe = rd_pending;
    rddata    = rd_pending ? mem[addr_q] : '0;
  end

endmodule
