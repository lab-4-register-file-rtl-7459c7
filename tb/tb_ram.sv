// tb_ram: self-checking test of the 4 KB bus RAM.
//
// Drives one random bus request per cycle (read, write, idle, with chip
// select sometimes low) and keeps a reference copy of the memory. After every
// rising edge it checks the answer to the previous cycle's request: a selected
// read must show the addressed word with rddata_oe high exactly one cycle after
// the request (and not in the request cycle itself); any other cycle must
// leave rddata zero and rddata_oe low. Writes without chip select must be
// dropped. Back-to-back reads and read-after-write of one address are covered
// by a directed phase before the random phase.
module tb_ram;
  logic        clk = 1'b0;
  logic        cs, read, write;
  logic [9:0]  addr;
  logic [31:0] wrdata, rddata;
  logic        rddata_oe;
  logic [31:0] model [1024];
  bit          written [1024];
  int checks = 0, failures = 0;

  ram dut (.clk, .cs, .read, .write, .addr, .wrdata, .rddata, .rddata_oe);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One bus cycle: apply the request, check the request cycle's output, take
  // the edge, then check the answer.
  task automatic cycle(input logic c, input logic r, input logic w,
                       input logic [9:0] ad, input logic [31:0] d);
    logic        exp_oe;
    logic [31:0] exp_data;
    @(negedge clk);
    cs = c; read = r; write = w; addr = ad; wrdata = d;
    // a read and write of one word in one cycle returns the new word
    if (c && w) begin model[ad] = d; written[ad] = 1'b1; end
    exp_oe   = c && r;
    exp_data = exp_oe ? model[ad] : '0;
    @(posedge clk); #1;
    // drop the request and move the address: the answer must not depend on them
    cs = 0; read = 0; write = 0; addr = 10'($urandom);
    #1;
    checks++;
    if (rddata_oe !== exp_oe || (written[ad] && rddata !== exp_data)) begin
      failures++;
      if (failures < 10) $display("addr %0d: got oe=%b %h want oe=%b %h", ad, rddata_oe, rddata, exp_oe, exp_data);
    end
  endtask

  initial begin
    cs = 0; read = 0; write = 0; addr = 0; wrdata = 0;
    @(posedge clk);
    // fill the whole memory
    for (int i = 0; i < 1024; i++) cycle(1, 0, 1, 10'(i), $urandom);
    // back-to-back reads of every word
    for (int i = 0; i < 1024; i++) cycle(1, 1, 0, 10'(1023 - i), 0);
    // request cycle has no data yet (one-cycle latency)
    cycle(0, 0, 0, 10'd0, 0);
    @(negedge clk); cs = 1; read = 1; addr = 10'd5; #1;
    checks++;
    if (rddata_oe) begin failures++; $display("data in the request cycle"); end
    @(posedge clk); #1;
    checks++;
    if (!rddata_oe || rddata !== model[5]) begin failures++; $display("no data one cycle after request"); end
    // write then read the same word in the next cycle
    cycle(1, 0, 1, 10'd77, 32'hA5A55A5A);
    cycle(1, 1, 0, 10'd77, 0);
    // write without chip select is dropped
    cycle(0, 0, 1, 10'd77, 32'h0);
    cycle(1, 1, 0, 10'd77, 0);
    // read without chip select drives nothing
    cycle(0, 1, 0, 10'd77, 0);
    // random traffic
    for (int n = 0; n < 4000; n++)
      cycle(1'($urandom_range(0, 3) != 0), 1'($urandom), 1'($urandom), 10'($urandom), $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
