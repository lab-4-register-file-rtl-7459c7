// tb_register_file: self-checking test of the 32 x 32 register file.
//
// Keeps its own model of the 32 registers. It writes every register with a
// random value, reads them back on both ports in the same cycle the address
// changes (combinational read), checks that register 0 stays zero after a
// write, that wren = 0 leaves a register alone, and that a write shows on the
// read ports only after the rising edge. Then runs random mixed traffic.
module tb_register_file;
  logic        clk = 1'b0;
  logic [4:0]  aa, ab, aw;
  logic        wren;
  logic [31:0] wrdata, a, b;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  register_file dut (.clk, .aa, .ab, .aw, .wren, .wrdata, .a, .b);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads(input logic [4:0] ra, input logic [4:0] rb);
    aa = ra; ab = rb;
    #1;
    checks += 2;
    if (a !== model[ra]) begin failures++; $display("a: r%0d got %h want %h", ra, a, model[ra]); end
    if (b !== model[rb]) begin failures++; $display("b: r%0d got %h want %h", rb, b, model[rb]); end
  endtask

  task automatic do_write(input logic [4:0] wa, input logic [31:0] wd, input logic en);
    @(negedge clk);
    aw = wa; wrdata = wd; wren = en;
    @(posedge clk);
    #1;
    if (en && wa != 0) model[wa] = wd;
    wren = 1'b0;
  endtask

  initial begin
    wren = 0; aa = 0; ab = 0; aw = 0; wrdata = 0;
    model[0] = '0;
    for (int i = 1; i < 32; i++) model[i] = $urandom;
    // fill every register
    for (int i = 1; i < 32; i++) do_write(5'(i), model[i], 1'b1);
    for (int i = 0; i < 32; i++) check_reads(5'(i), 5'(31 - i));
    // register 0 ignores writes
    do_write(5'd0, 32'hDEADBEEF, 1'b1);
    check_reads(5'd0, 5'd0);
    // wren low leaves the register alone
    do_write(5'd7, 32'h12345678, 1'b0);
    check_reads(5'd7, 5'd7);
    // the write takes effect on the rising edge, not before it
    @(negedge clk);
    aw = 5'd9; wrdata = ~model[9]; wren = 1'b1; aa = 5'd9; ab = 5'd9;
    #1;
    checks++;
    if (a !== model[9]) begin failures++; $display("write visible before edge"); end
    @(posedge clk); #1;
    model[9] = ~model[9];
    wren = 1'b0;
    check_reads(5'd9, 5'd0);
    // random traffic
    for (int n = 0; n < 300; n++) begin
      do_write(5'($urandom), $urandom, 1'($urandom));
      check_reads(5'($urandom), 5'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
