// register_file: 32 registers of 32 bits with two read ports and one write port.
//
// Reads are combinational: the register addressed by aa appears on a and the
// one addressed by ab on b in the same cycle, so a controller can set the
// addresses at the start of a cycle and use the data before its end. Writes are
// synchronous: when wren is 1, wrdata is stored into register aw on the rising
// edge of clk. Register 0 always reads as zero and writes to it are dropped.
// A write is visible on the read ports from the cycle after the edge; there is
// no write-to-read bypass within a cycle.
//
// The port names, widths, register count, read and write timing and the
// zero register follow the specification. The file has no reset port, as
// in its block diagram, so registers 1..31 hold arbitrary values until written.
module register_file #(
  parameter int unsigned NREGS  = 32,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned AW    = $clog2(NREGS)
) (
  input  logic              clk,
  input  logic [AW-1:0]     aa,
  input  logic [AW-1:0]     ab,
  input  logic [AW-1:0]     aw,
  input  logic              wren,
  input  logic [DATA_W-1:0] wrdata,
  output logic [DATA_W-1:0] a,
  output logic [DATA_W-1:0] b
);

  logic [DATA_W-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (wren && aw != '0) regs[aw] <= wrdata;
  end

  always_comb begin
    a = (aa == '0) ? '0 : regs[aa];
    b = (ab == '0) ? '0 : regs[ab];
  end

endmodule
