// tb_mem_controller: checks the copy controller's bus sequence and timing.
//
// The controller talks to a small bus slave written here: a sparse word
// memory that answers reads one cycle after the request, as the memory system
// does. For random pointer, source and destination addresses and random memory
// contents, each run must produce exactly this bus trace, cycle by cycle from
// the cycle after start:
//   1 read ptr   3 read *ptr   5 write display = *ptr   6 read buttons
//   8 write display = buttons   9 read src   11 write dst = *src
// with the bus idle in the other cycles, and done high in cycle 12 only.
// start pulses while busy must be ignored.
module tb_mem_controller;
  import lab4_pkg::*;

  logic     clk = 1'b0, reset, start, busy, done;
  addr_t    ptr_addr, copy_src, copy_dst;
  bus_req_t bus;
  data_t    rddata;
  data_t    mem [addr_t];
  logic     rd_q;
  addr_t    addr_q;
  int checks = 0, failures = 0, runs = 0;

  mem_controller dut (.clk, .reset, .start, .ptr_addr, .copy_src, .copy_dst,
                      .bus, .rddata, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic data_t rd(input addr_t a);
    return mem.exists({a[15:2], 2'b00}) ? mem[{a[15:2], 2'b00}] : 32'h0;
  endfunction

  // bus slave: writes on the edge, read data in the next cycle
  always @(posedge clk) begin
    if (bus.write) mem[{bus.address[15:2], 2'b00}] = bus.wrdata;
    rd_q   <= bus.read && !reset;
    addr_q <= bus.address;
  end
  assign rddata = rd_q ? rd(addr_q) : 32'h0;

  task automatic expect_bus(input int cyc, input logic r, input logic w, input addr_t a, input data_t d);
    checks++;
    if (bus.read !== r || bus.write !== w || ((r || w) && bus.address !== a) || (w && bus.wrdata !== d)) begin
      failures++;
      $display("cycle %0d: got r%b w%b %h %h want r%b w%b %h %h", cyc, bus.read, bus.write,
               bus.address, bus.wrdata, r, w, a, d);
    end
  endtask

  initial begin
    addr_t p, src, dst;
    data_t ram_word, btn_word, rom_word;
    reset = 1; start = 0; ptr_addr = 0; copy_src = 0; copy_dst = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); reset = 0;
    for (int r = 0; r < 200; r++) begin
      ptr_addr = 16'($urandom_range(0, 16'h03FF)) & 16'hFFFC;
      p        = 16'h1000 | (16'($urandom) & 16'h0FFC);
      src      = 16'($urandom_range(16'h0400, 16'h0FFC)) & 16'hFFFC;
      dst      = 16'h1000 | (16'($urandom) & 16'h0FFC);
      copy_src = src; copy_dst = dst;
      mem[ptr_addr] = data_t'(p);
      ram_word = $urandom; mem[p] = ram_word;
      btn_word = 32'($urandom_range(0, 255)); mem[DI_BASE] = btn_word;
      rom_word = $urandom;
      if (src != ptr_addr) mem[src] = rom_word; else rom_word = data_t'(p);
      start = 1;
      @(posedge clk); #1;
      start = r[0];          // a start held high while busy must not matter
      for (int c = 1; c <= 12; c++) begin
        case (c)
          1:  expect_bus(c, 1, 0, ptr_addr, '0);
          3:  expect_bus(c, 1, 0, p, '0);
          5:  expect_bus(c, 0, 1, DO_BASE, ram_word);
          6:  expect_bus(c, 1, 0, DI_BASE, '0);
          8:  expect_bus(c, 0, 1, DO_BASE, btn_word);
          9:  expect_bus(c, 1, 0, src, '0);
          11: expect_bus(c, 0, 1, dst, rom_word);
          default: expect_bus(c, 0, 0, '0, '0);
        endcase
        checks++;
        if (done !== (c == 12) || busy !== 1'b1) begin
          failures++; $display("cycle %0d: done %b busy %b", c, done, busy);
        end
        @(posedge clk); #1;
      end
      start = 0;
      checks++;
      if (busy || done) begin failures++; $display("not idle after run"); end
      checks++;
      if (rd(dst) !== rom_word) begin failures++; $display("copy missing at %h", dst); end
      runs++;
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
    end
    $display("runs %0d", runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
