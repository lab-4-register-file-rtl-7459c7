// tb_buttons: checks the bus-readable button port.
//
// Changes the 8 button inputs at random. A selected read must return, in the
// cycle after the request and with rddata_oe high, the button value sampled
// into the internal register at the request's rising edge, zero-extended to
// 32 bits. Any other cycle must give zero with rddata_oe low; writes do
// nothing. A read during reset is not answered.
module tb_buttons;
  import lab4_pkg::*;

  logic             clk = 1'b0, reset, cs, read, write, addr;
  logic [BTN_W-1:0] data_in;
  data_t            rddata;
  logic             rddata_oe;
  int checks = 0, failures = 0;

  buttons dut (.clk, .reset, .cs, .read, .write, .addr, .data_in, .rddata, .rddata_oe);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [BTN_W-1:0] sampled;
    logic             exp_oe;
    cs = 0; read = 0; write = 0; addr = 0; data_in = 8'h5A;
    reset = 1;
    @(negedge clk); cs = 1; read = 1;
    @(posedge clk); #1;
    // a read during reset is not answered
    checks++;
    if (rddata_oe !== 1'b0 || rddata !== '0) begin failures++; $display("answer during reset"); end
    @(negedge clk); reset = 0; cs = 1; read = 1;
    @(posedge clk); #1;
    // first read after reset: the value sampled at the request's edge
    checks++;
    if (rddata_oe !== 1'b1 || rddata !== 32'h5A) begin failures++; $display("first read %h", rddata); end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      sampled = data_in;           // value the register holds from the last edge
      cs = 1'($urandom); read = 1'($urandom); write = 1'($urandom); addr = 1'($urandom);
      exp_oe = cs && read;
      // the buttons may change while the request is pending
      data_in = 8'($urandom);
      @(posedge clk); #1;
      checks++;
      if (rddata_oe !== exp_oe || rddata !== (exp_oe ? {24'h0, data_in} : 32'h0)) begin
        failures++;
        if (failures < 10) $display("got oe=%b %h want oe=%b %h (prev %h)", rddata_oe, rddata, exp_oe, data_in, sampled);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
