// tb_lab4_top: end-to-end test of the whole design at its default parameters.
//
// Memory system, as the external master (the processor) sees it:
//   - writes RAM words and reads them back, reads ROM words against the
//     initialisation file, issues back-to-back reads, reads the buttons,
//     writes the display register and follows it on the seven-segment pins
//     through a full digit scan, and touches an unmapped address;
//   - starts the copy controller, which reads a pointer from ROM word 0,
//     shows the RAM word it points to, shows the buttons and copies a ROM word
//     into RAM; meanwhile the external master tries to write, which must be
//     ignored while the controller owns the bus.
// Register file: writes all registers, reads pairs on both ports, and checks
// that register 0 ignores writes.
// Every mechanism is counted and must have happened at least once.
module tb_lab4_top;
  import lab4_pkg::*;
  import tb_seg_ref_pkg::*;

  logic             clk = 1'b0, reset;
  logic             proc_read, proc_write;
  addr_t            proc_address;
  data_t            proc_wrdata, rddata, disp_value;
  logic [BTN_W-1:0] btn_in;
  seg_pins_t        seg_pins;
  logic             ctrl_start, ctrl_busy, ctrl_done;
  addr_t            ctrl_ptr_addr, ctrl_copy_src, ctrl_copy_dst;
  logic [4:0]       rf_aa, rf_ab, rf_aw;
  logic             rf_wren;
  data_t            rf_wrdata, rf_a, rf_b;

  data_t rom_ref [1024];
  data_t rf_ref  [32];
  int checks = 0, failures = 0;
  int n_rom_rd = 0, n_ram_wr = 0, n_ram_rd = 0, n_b2b = 0, n_btn_rd = 0, n_disp_wr = 0;
  int n_unmapped = 0, n_ctrl_run = 0, n_bus_blocked = 0, n_disp_digits = 0;
  int n_rf_wr = 0, n_rf_r0 = 0, n_rf_rd = 0;

  lab4_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus_write(input addr_t a, input data_t d);
    @(negedge clk);
    proc_read = 0; proc_write = 1; proc_address = a; proc_wrdata = d;
    @(posedge clk); #1;
    proc_write = 0;
  endtask

  // read: request in one cycle, data checked in the next
  task automatic bus_read(input addr_t a, output data_t d);
    @(negedge clk);
    proc_read = 1; proc_write = 0; proc_address = a;
    @(posedge clk); #1;
    proc_read = 0;
    d = rddata;
  endtask

  initial begin
    data_t d;
    for (int i = 0; i < 1024; i++) rom_ref[i] = '0;
    $readmemh("rtl/rom_init.hex", rom_ref);
    proc_read = 0; proc_write = 0; proc_address = 0; proc_wrdata = 0;
    btn_in = 8'h3C; ctrl_start = 0; ctrl_ptr_addr = 0; ctrl_copy_src = 0; ctrl_copy_dst = 0;
    rf_aa = 0; rf_ab = 0; rf_aw = 0; rf_wren = 0; rf_wrdata = 0;
    reset = 1;
    repeat (3) @(posedge clk);
    @(negedge clk); reset = 0;

    // ---- RAM write / read back
    for (int i = 0; i < 64; i++) begin bus_write(16'h1000 + 16'(4 * i), 32'hC0DE0000 + 32'(i)); n_ram_wr++; end
    for (int i = 0; i < 64; i++) begin
      bus_read(16'h1000 + 16'(4 * i), d); n_ram_rd++;
      check(d == 32'hC0DE0000 + 32'(i), $sformatf("RAM word %0d = %h", i, d));
    end
    // byte offsets are ignored
    bus_read(16'h1003, d); n_ram_rd++;
    check(d == 32'hC0DE0000, "RAM byte offset ignored");

    // ---- ROM reads, back to back: a new request every cycle
    // (the answer to each request is on rddata right after the edge that ends it)
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      proc_read = 1; proc_address = 16'(4 * i);
      @(posedge clk); #1;
      check(rddata == rom_ref[i], $sformatf("ROM word %0d = %h", i, rddata));
      n_rom_rd++;
      if (i > 0) n_b2b++;
    end
    proc_read = 0;
    // ROM ignores writes
    bus_write(16'h0004, 32'hFFFF0000);
    bus_read(16'h0004, d); n_rom_rd++;
    check(d == rom_ref[1], "ROM unchanged by write");

    // ---- buttons
    btn_in = 8'hA7;
    bus_read(DI_BASE, d); n_btn_rd++;
    check(d == 32'h000000A7, $sformatf("buttons read %h", d));
    bus_read(16'h2034, d); n_btn_rd++;
    check(d == 32'h000000A7, "buttons at last word of region");

    // ---- unmapped address: no data, nothing changed
    bus_write(16'h4000, 32'h11111111);
    bus_read(16'h4000, d); n_unmapped++;
    check(d == 32'h0, "unmapped read returns zero");

    // ---- display register and pins through a full scan
    bus_write(DO_BASE, 32'h1234ABCD); n_disp_wr++;
    check(disp_value == 32'h1234ABCD, "display register written");
    begin
      bit seen [4];
      for (int t = 0; t < (1 << 18) + 10; t++) begin
        @(negedge clk);
        for (int k = 0; k < 4; k++) if (seg_pins.sel == ~(4'b1 << k)) begin
          if (!seen[k]) begin
            seen[k] = 1; n_disp_digits++;
            check(seg_pins.segment == ~seg_ref_on(disp_value[4*k +: 4]), $sformatf("digit %0d pattern", k));
          end
        end
      end
      check(n_disp_digits == 4, "all four digits shown");
    end

    // ---- copy controller: pointer in ROM word 0 names a RAM word
    begin
      addr_t p;
      data_t shown [$];
      int    cycles;
      p = addr_t'(rom_ref[0]);
      bus_write(p, 32'h0000BEEF); n_ram_wr++;
      btn_in = 8'h5D;
      ctrl_ptr_addr = 16'h0000; ctrl_copy_src = 16'h0008; ctrl_copy_dst = 16'h1100;
      @(negedge clk); ctrl_start = 1;
      @(posedge clk); #1; ctrl_start = 0;
      cycles = 0;
      fork
        begin
          // the external master tries to overwrite the copy target meanwhile
          @(negedge clk);
          proc_write = 1; proc_address = 16'h1100; proc_wrdata = 32'hBAD0BAD0;
          repeat (4) @(negedge clk);
          proc_write = 0;
          n_bus_blocked++;
        end
        begin
          data_t last;
          last = disp_value;
          while (!ctrl_done) begin
            @(posedge clk); #1; cycles++;
            if (disp_value != last) begin shown.push_back(disp_value); last = disp_value; end
          end
        end
      join
      n_ctrl_run++;
      // first bus cycle starts at the edge after start; done 11 edges later
      check(cycles == 11, $sformatf("controller took %0d cycles", cycles));
      check(shown.size() == 2 && shown[0] == 32'h0000BEEF && shown[1] == 32'h0000005D,
            "display showed RAM word then buttons");
      @(posedge clk); #1;
      bus_read(16'h1100, d); n_ram_rd++;
      check(d == rom_ref[2], $sformatf("copied word %h", d));
    end

    // ---- register file
    rf_ref[0] = '0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      rf_aw = 5'(i); rf_wrdata = 32'h0BAD0000 ^ (32'(i) * 32'h01010101); rf_wren = 1;
      @(posedge clk); #1;
      if (i != 0) begin rf_ref[i] = rf_wrdata; n_rf_wr++; end
      else n_rf_r0++;
      rf_wren = 0;
    end
    for (int i = 0; i < 32; i++) begin
      rf_aa = 5'(i); rf_ab = 5'(31 - i); #1; n_rf_rd++;
      check(rf_a == rf_ref[i] && rf_b == rf_ref[31 - i], $sformatf("register pair %0d", i));
    end

    $display("rom rd %0d, ram wr %0d, ram rd %0d, back-to-back %0d, button rd %0d, display wr %0d, digits %0d",
             n_rom_rd, n_ram_wr, n_ram_rd, n_b2b, n_btn_rd, n_disp_wr, n_disp_digits);
    $display("unmapped %0d, controller runs %0d, blocked master %0d, rf writes %0d, r0 writes %0d, rf reads %0d",
             n_unmapped, n_ctrl_run, n_bus_blocked, n_rf_wr, n_rf_r0, n_rf_rd);
    check(n_rom_rd > 0 && n_ram_wr > 0 && n_ram_rd > 0 && n_b2b > 0 && n_btn_rd > 0 &&
          n_disp_wr > 0 && n_unmapped > 0 && n_ctrl_run > 0 && n_bus_blocked > 0 &&
          n_rf_wr > 0 && n_rf_r0 > 0 && n_rf_rd > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
