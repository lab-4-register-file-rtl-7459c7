// mem_controller: bus master that exercises the memory system in hardware.
//
// After a start pulse it runs one fixed sequence over the memory bus and then
// pulses done:
//   1. read the pointer word at ROM address ptr_addr;
//   2. read the word at the bus address held in that pointer (normally a RAM
//      address) and write it to the seven-segment display register;
//   3. read the buttons and write their value to the display register;
//   4. copy one word: read ROM address copy_src and write it to copy_dst
//      (normally in RAM).
// Every read is one bus cycle followed by a cycle in which the controller
// takes the answer from rddata (the slaves' one-cycle read latency); every
// write is one bus cycle. The sequence occupies the bus for 11 cycles starting
// in the cycle after start is seen, and done is high in the 12th. busy is high while the sequence runs; start is ignored
// while busy. Addresses are bus byte addresses.
//
// The specification asks for a controller that reads an address from the ROM, shows the
// RAM content it selects, then shows the buttons, and copies data from the
// ROM into the RAM. The order of those steps, the start/done handshake, the
// address inputs and the state encoding are this design's choices.
module mem_controller
  import lab4_pkg::*;
(
  input  logic     clk,
  input  logic     reset,
  input  logic     start,
  input  addr_t    ptr_addr,
  input  addr_t    copy_src,
  input  addr_t    copy_dst,
  output bus_req_t bus,
  input  data_t    rddata,
  output logic     busy,
  output logic     done
);

  typedef enum logic [3:0] {
    S_IDLE,
    S_PTR_RD,  S_PTR_CAP,
    S_RAM_RD,  S_RAM_CAP, S_SHOW_RAM,
    S_BTN_RD,  S_BTN_CAP, S_SHOW_BTN,
    S_CP_RD,   S_CP_CAP,  S_CP_WR,
    S_DONE
  } state_t;

  state_t state_q, state_d;
  data_t  data_q, data_d;

  always_ff @(posedge clk) begin
    if (reset) begin
      state_q <= S_IDLE;
      data_q  <= '0;
    end else begin
      state_q <= state_d;
      data_q  <= data_d;
    end
  end

  always_comb begin
    state_d = state_q;
    data_d  = data_q;
    bus     = BUS_IDLE;
    unique case (state_q)
      S_IDLE:     if (start) state_d = S_PTR_RD;
      S_PTR_RD:   begin bus.read = 1'b1; bus.address = ptr_addr; state_d = S_PTR_CAP; end
      S_PTR_CAP:  begin data_d = rddata; state_d = S_RAM_RD; end
      S_RAM_RD:   begin bus.read = 1'b1; bus.address = addr_t'(data_q); state_d = S_RAM_CAP; end
      S_RAM_CAP:  begin data_d = rddata; state_d = S_SHOW_RAM; end
      S_SHOW_RAM: begin
                    bus.write = 1'b1; bus.address = DO_BASE; bus.wrdata = data_q;
                    state_d = S_BTN_RD;
                  end
      S_BTN_RD:   begin bus.read = 1'b1; bus.address = DI_BASE; state_d = S_BTN_CAP; end
      S_BTN_CAP:  begin data_d = rddata; state_d = S_SHOW_BTN; end
      S_SHOW_BTN: begin
                    bus.write = 1'b1; bus.address = DO_BASE; bus.wrdata = data_q;
                    state_d = S_CP_RD;
                  end
      S_CP_RD:    begin bus.read = 1'b1; bus.address = copy_src; state_d = S_CP_CAP; end
      S_CP_CAP:   begin data_d = rddata; state_d = S_CP_WR; end
      S_CP_WR:    begin
                    bus.write = 1'b1; bus.address = copy_dst; bus.wrdata = data_q;
                    state_d = S_DONE;
                  end
      S_DONE:     state_d = S_IDLE;
      default:    state_d = S_IDLE;
    endcase
  end

  assign busy = (state_q != S_IDLE);
  assign done = (state_q == S_DONE);

  // A master never reads and writes in the same cycle.
  assert property (@(posedge clk) disable iff (reset) !(bus.read && bus.write))
    else $error("mem_controller: read and write together");

endmodule
