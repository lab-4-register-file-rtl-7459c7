// buttons: input port on the memory bus for the board's 8 buttons/switches.
//
// An internal register samples data_in on every rising clock edge (and is
// cleared by reset), which also keeps the asynchronous button lines out of
// the bus logic. A read with cs high is served like a memory read: the request
// is captured at the rising edge ending its cycle, and during the next cycle
// the register's current value, zero-extended to 32 bits, is driven on rddata
// with rddata_oe high. Writes and the address input (bus address bit 2) have
// no effect: the port has one readable word, repeated over its whole region.
//
// Port list, 8-bit width, internal register and one-cycle read latency follow
// the specification. The output enable in place of a tri-state buffer and sampling the
// buttons every cycle are this design's choices.
module buttons
  import lab4_pkg::*;
(
  input  logic             clk,
  input  logic             reset,
  input  logic             cs,
  input  logic             read,
  input  logic             write,
  input  logic             addr,
  input  logic [BTN_W-1:0] data_in,
  output data_t            rddata,
  output logic             rddata_oe
);

  logic [BTN_W-1:0] btn_q;
  logic             rd_pending;

  always_ff @(posedge clk) begin
    if (reset) begin
      btn_q      <= '0;
      rd_pending <= 1'b0;
    end else begin
      btn_q      <= data_in;
      rd_pending <= cs && read;
    end
  end

  always_comb begin
    rddata_oe = rd_pending;
    rddata    = rd_pending ? data_t'(btn_q) : '0;
  end

endmodule
