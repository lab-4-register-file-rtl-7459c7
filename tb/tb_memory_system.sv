// tb_memory_system: bus-level test of the whole memory system.
//
// Issues one random bus request per cycle over the full 16-bit address space
// (weighted towards the mapped regions) and checks every answer against a
// reference built here from the address map: ROM contents from the
// initialisation file, a RAM copy, the display register and the sampled
// button value. A read's data must be on rddata in the cycle after the
// request; cycles answering no read must give zero. Writes to the ROM, the
// button port or unmapped addresses must change nothing. Each kind of access
// is counted and must have happened at least once.
module tb_memory_system;
  import lab4_pkg::*;

  logic             clk = 1'b0, reset, read, write;
  addr_t            address;
  data_t            wrdata, rddata, disp_value;
  logic [BTN_W-1:0] btn_in;
  seg_pins_t        seg_pins;

  data_t rom_ref [1024];
  data_t ram_ref [1024];
  bit    ram_wr  [1024];
  data_t disp_ref;
  int checks = 0, failures = 0;
  int n_rom_rd = 0, n_ram_rd = 0, n_ram_wr = 0, n_do_wr = 0, n_di_rd = 0;
  int n_unmapped = 0, n_rom_wr = 0, n_b2b = 0;

  memory_system #(.SCAN_BITS(1)) dut (.clk, .reset, .read, .write, .address, .wrdata, .rddata,
                                      .btn_in, .seg_pins, .disp_value);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic addr_t pick_addr();
    case ($urandom_range(0, 9))
      0, 1, 2: return 16'($urandom_range(16'h0000, 16'h003F));   // first ROM words
      3:       return 16'($urandom_range(16'h0000, 16'h0FFF));
      4, 5:    return 16'($urandom_range(16'h1000, 16'h10FF));
      6:       return 16'($urandom_range(16'h2000, 16'h200F));
      7:       return 16'($urandom_range(16'h2010, 16'h2037));
      8:       return 16'($urandom_range(16'h2038, 16'hFFFF));
      default: return 16'($urandom_range(16'h1000, 16'h1FFF));
    endcase
  endfunction

  initial begin
    data_t exp_rd;
    bit    exp_known, prev_read;
    int    w;
    for (int i = 0; i < 1024; i++) rom_ref[i] = '0;
    $readmemh("rtl/rom_init.hex", rom_ref);
    read = 0; write = 0; address = 0; wrdata = 0; btn_in = 0;
    reset = 1; disp_ref = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); reset = 0;
    prev_read = 0;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      address = pick_addr();
      read  = ($urandom_range(0, 2) != 0);
      write = !read && 1'($urandom);
      wrdata = $urandom;
      btn_in = 8'($urandom);
      w = int'(address[11:2]);
      exp_known = 1;
      exp_rd = '0;
      if (address <= 16'h0FFF) begin
        if (read) begin exp_rd = rom_ref[w]; n_rom_rd++; end
        if (write) n_rom_wr++;
      end else if (address <= 16'h1FFF) begin
        if (write) begin ram_ref[w] = wrdata; ram_wr[w] = 1; n_ram_wr++; end
        if (read) begin exp_rd = ram_ref[w]; exp_known = ram_wr[w]; n_ram_rd++; end
      end else if (address <= 16'h200F) begin
        if (write) begin disp_ref = wrdata; n_do_wr++; end
      end else if (address <= 16'h2037) begin
        if (read) begin exp_rd = {24'h0, btn_in}; n_di_rd++; end
      end else n_unmapped++;
      if (read && prev_read) n_b2b++;
      prev_read = read;
      @(posedge clk); #1;
      if (exp_known) begin
        checks++;
        if (rddata !== exp_rd) begin
          failures++;
          if (failures < 10) $display("%s %h: got %h want %h", read ? "read" : "idle", address, rddata, exp_rd);
        end
      end
      checks++;
      if (disp_value !== disp_ref) begin failures++; $display("display %h want %h", disp_value, disp_ref); end
    end
    // after the last write every RAM word written must still be intact
    for (int i = 0; i < 1024; i++) if (ram_wr[i]) begin
      @(negedge clk); address = 16'h1000 + 16'(4 * i); read = 1; write = 0;
      @(posedge clk); #1;
      checks++;
      if (rddata !== ram_ref[i]) begin failures++; $display("RAM word %0d lost", i); end
    end
    // every access kind must have occurred
    checks++;
    if (n_rom_rd == 0 || n_ram_rd == 0 || n_ram_wr == 0 || n_do_wr == 0 || n_di_rd == 0 ||
        n_unmapped == 0 || n_rom_wr == 0 || n_b2b == 0) begin
      failures++; $display("an access kind never occurred");
    end
    $display("rom rd %0d, ram rd %0d, ram wr %0d, display wr %0d, button rd %0d, rom wr %0d, unmapped %0d, back-to-back rd %0d",
             n_rom_rd, n_ram_rd, n_ram_wr, n_do_wr, n_di_rd, n_rom_wr, n_unmapped, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
