// tb_decoder: exhaustive test of the address decoder.
//
// Walks all 65536 bus addresses and compares the four chip selects with the
// region bounds of the address map, written out here as plain numbers:
// ROM 0x0000-0x0FFF, RAM 0x1000-0x1FFF, display 0x2000-0x200F, buttons
// 0x2010-0x2037, nothing above. Also checks the example from the map's
// description: address 0x10F0 selects the RAM.
module tb_decoder;
  logic [15:0] addr;
  logic cs_rom, cs_ram, cs_do, cs_di;
  int checks = 0, failures = 0;

  decoder dut (.addr, .cs_rom, .cs_ram, .cs_do, .cs_di);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] want;
    for (int i = 0; i < 65536; i++) begin
      addr = 16'(i);
      #1;
      want[3] = (i < 32'h1000);
      want[2] = (i >= 32'h1000) && (i < 32'h2000);
      want[1] = (i >= 32'h2000) && (i < 32'h2010);
      want[0] = (i >= 32'h2010) && (i < 32'h2038);
      checks++;
      if ({cs_rom, cs_ram, cs_do, cs_di} !== want) begin
        failures++;
        if (failures < 10) $display("addr %h: got %b want %b", addr, {cs_rom, cs_ram, cs_do, cs_di}, want);
      end
    end
    addr = 16'h10F0; #1;
    checks++;
    if (!(cs_ram && !cs_rom && !cs_do && !cs_di)) begin failures++; $display("0x10F0 not RAM"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
