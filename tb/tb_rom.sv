// tb_rom: self-checking test of the bus ROM wrapper.
//
// Reference contents come from the initialisation file, loaded here into an
// array of its own. One random request per cycle (chip select and read each
// random); after each rising edge the previous request's answer is checked:
// a selected read gives the word with rddata_oe high one cycle after the
// request, everything else gives zero with rddata_oe low. A directed phase
// reads all 1024 words back to back first.
module tb_rom;
  logic        clk = 1'b0;
  logic        cs, read;
  logic [9:0]  addr;
  logic [31:0] rddata;
  logic        rddata_oe;
  logic [31:0] ref_mem [1024];
  int checks = 0, failures = 0;

  rom dut (.clk, .cs, .read, .addr, .rddata, .rddata_oe);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle(input logic c, input logic r, input logic [9:0] ad);
    logic exp_oe;
    @(negedge clk);
    cs = c; read = r; addr = ad;
    exp_oe = c && r;
    @(posedge clk); #1;
    // drop the request and move the address: the answer must not depend on them
    cs = 0; read = 0; addr = 10'($urandom);
    #1;
    checks++;
    if (rddata_oe !== exp_oe || rddata !== (exp_oe ? ref_mem[ad] : 32'h0)) begin
      failures++;
      if (failures < 10) $display("addr %0d: got oe=%b %h", ad, rddata_oe, rddata);
    end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) ref_mem[i] = '0;
    $readmemh("rtl/rom_init.hex", ref_mem);
    cs = 0; read = 0; addr = 0;
    @(posedge clk);
    for (int i = 0; i < 1024; i++) cycle(1, 1, 10'(i));
    for (int i = 0; i < 16; i++) cycle(1, 1, 10'(i));
    for (int n = 0; n < 3000; n++) cycle(1'($urandom), 1'($urandom), 10'($urandom_range(0, 31)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
