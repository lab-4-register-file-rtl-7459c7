// tb_rom_core: checks the 1024 x 32 block ROM against its initialisation file.
//
// Loads the same hex file into its own array (words past the end of the file
// are zero) and reads every address in turn, checking that the word appears
// one cycle after the address is applied and not in the same cycle.
module tb_rom_core;
  logic        clk = 1'b0;
  logic [9:0]  addr;
  logic [31:0] dout;
  logic [31:0] ref_mem [1024];
  int checks = 0, failures = 0;

  rom_core dut (.clk, .addr, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) ref_mem[i] = '0;
    $readmemh("rtl/rom_init.hex", ref_mem);
    addr = 10'd1;
    @(posedge clk);
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      addr = 10'(i);
      #1;
      if (i > 0 && ref_mem[i] != ref_mem[i-1]) begin
        checks++;   // the new address must not reach dout before the edge
        if (dout !== ref_mem[i-1]) begin failures++; $display("addr %0d: dout changed before edge", i); end
      end
      @(posedge clk); #1;
      checks++;
      if (dout !== ref_mem[i]) begin
        failures++;
        if (failures < 10) $display("addr %0d: got %h want %h", i, dout, ref_mem[i]);
      end
    end
    // the file must really have been loaded
    checks++;
    if (ref_mem[0] == 32'h0) begin failures++; $display("init file empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
