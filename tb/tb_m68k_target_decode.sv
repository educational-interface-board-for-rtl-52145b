// tb_m68k_target_decode: random MC68000 addresses under random size and
// swap switch settings, compared with a reference model of the board's
// memory map (RAM pairs from 000000h, EPROM pairs from 020000h, swap
// switches exchanging pair 0 and pair 1, shared area 010000h-010FFFh left
// free) and of the I/O page at 080000h with its 68000-type and 6800-type
// halves. Directed checks cover the reset vector, the shared area and
// each I/O device select.
module tb_m68k_target_decode;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [23:1] a;
  logic        as_n, sw_ram8k, sw_rom8k;
  logic [1:0]  sw_swap;
  logic        mem_n, iopage_n, m6800_n, vpadrv_n;
  logic [3:0]  ram_ce_n, rom_ce_n;
  logic [7:0]  dev_n;
  m68k_target_decode dut (.*);

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: which pair (0..3) of RAM or EPROM a byte address falls in
  function automatic int pair_of(int unsigned addr, int unsigned base, bit big);
    int unsigned span = big ? 16384 : 4096;
    if (addr < base || addr >= base + 4 * span) return -1;
    return int'((addr - base) / span);
  endfunction

  function automatic void model(output logic [3:0] ram, output logic [3:0] rom,
                                output logic mem);
    int unsigned addr = {8'h0, a, 1'b0};
    int rp = pair_of(addr, 0, sw_ram8k);
    int ep = pair_of(addr, 32'h20000, sw_rom8k);
    ram = 4'h0; rom = 4'h0;
    if (rp >= 0) begin
      if (rp < 2 && sw_swap[rp]) rom[rp] = 1'b1; else ram[rp] = 1'b1;
    end
    if (ep >= 0) begin
      if (ep < 2 && sw_swap[ep]) ram[ep] = 1'b1; else rom[ep] = 1'b1;
    end
    mem = |ram || |rom;
  endfunction

  task automatic compare(string tag);
    logic [3:0] er, ee; logic em; logic [7:0] ed;
    bit io = ({a, 1'b0} >= 24'h080000) && ({a, 1'b0} <= 24'h080FFF);
    #1;
    model(er, ee, em);
    check(mem_n == !em, $sformatf("%s MEM at %h", tag, {a, 1'b0}));
    check(ram_ce_n == (as_n ? 4'hF : ~er), $sformatf("%s RAM CE at %h: %b", tag, {a, 1'b0}, ram_ce_n));
    check(rom_ce_n == (as_n ? 4'hF : ~ee), $sformatf("%s EPROM CE at %h: %b", tag, {a, 1'b0}, rom_ce_n));
    ed = 8'hFF;
    if (io && !as_n) ed[a[11:9]] = 1'b0;
    check(dev_n == ed, $sformatf("%s I/O select at %h: %b", tag, {a, 1'b0}, dev_n));
    check(iopage_n == !(io && !a[11]), $sformatf("%s IOPAGE at %h", tag, {a, 1'b0}));
    check(m6800_n  == !(io &&  a[11]), $sformatf("%s M6800 at %h", tag, {a, 1'b0}));
    check(vpadrv_n == !(io && a[11] && !as_n), $sformatf("%s VPADRIVE at %h", tag, {a, 1'b0}));
  endtask

  initial begin
    as_n = 1; a = 0; sw_ram8k = 0; sw_rom8k = 0; sw_swap = 0;
    #5;
    // random sweep, biased toward the decoded regions
    for (int n = 0; n < 40000; n++) begin
      logic [23:0] addr;
      sw_ram8k = 1'($urandom); sw_rom8k = 1'($urandom); sw_swap = 2'($urandom);
      as_n = ($urandom_range(0, 7) == 0);
      case ($urandom_range(0, 4))
        0: addr = 24'($urandom_range(0, 32'h1FFFF));
        1: addr = 24'h020000 + 24'($urandom_range(0, 32'hFFFF));
        2: addr = 24'h080000 + 24'($urandom_range(0, 32'hFFF));
        3: addr = 24'h010000 + 24'($urandom_range(0, 32'hFFF));
        default: addr = 24'($urandom);
      endcase
      a = addr[23:1];
      compare("random");
      #4;
    end

    // directed: reset vector and program space
    as_n = 0;
    for (int s = 0; s < 16; s++) begin
      {sw_ram8k, sw_rom8k, sw_swap} = 4'(s);
      a = 23'h0; #1;
      check(sw_swap[0] ? (rom_ce_n == 4'b1110 && ram_ce_n == 4'hF)
                       : (ram_ce_n == 4'b1110 && rom_ce_n == 4'hF),
            $sformatf("reset vector with switches %b", 4'(s)));
      // the shared area is never decoded on the board
      for (int k = 0; k < 64; k++) begin
        a = 23'((24'h010000 + 24'(k * 64)) >> 1); #1;
        check(mem_n && ram_ce_n == 4'hF && rom_ce_n == 4'hF,
              $sformatf("shared area %h decoded", {a, 1'b0}));
      end
    end
    // directed: each I/O device select and the two halves
    for (int d = 0; d < 8; d++) begin
      a = 23'((24'h080000 + 24'(d * 512) + 24'($urandom_range(0, 255) * 2)) >> 1); #1;
      check(dev_n == ~(8'b1 << d), $sformatf("device %0d select %b", d, dev_n));
      check(vpadrv_n == (d < 4), $sformatf("device %0d VPADRIVE %b", d, vpadrv_n));
      check(iopage_n == (d >= 4) && m6800_n == (d < 4), $sformatf("device %0d half", d));
      as_n = 1; #1;
      check(dev_n == 8'hFF && vpadrv_n, $sformatf("device %0d select without AS", d));
      as_n = 0;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
