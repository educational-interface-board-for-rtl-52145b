// tb_z80_target_decode: random Z80 memory and I/O cycles under random
// size and swap switch settings, compared with a reference model of the
// memory map (RAM sockets from 0000, EPROM sockets from 8000, swap links
// exchanging the two, F800-FFFF left to the interface card) and of the
// I/O map 90h-ABh. Also checks the LED latch, the DIL switch read and
// the buffer controls.
module tb_z80_target_decode;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic clk = 0;
  always #62 clk = ~clk;
  logic rst_n, mreq_n, iorq_n, rd_n, wr_n, m1_n, busack_n;
  logic [15:0] a;
  logic [7:0] d_in, dil, led, d_out;
  logic [2:0] sw_size;
  logic [3:0] sw_swap, ram_ce_n, rom_ce_n;
  logic mem_n, ctc1_n, dart_n, pio1_n, pio2_n, ctc2_n, d_oe, cpu_buf_en, dbuf, mem_en, dir;
  z80_target_decode dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void model(output logic [3:0] ram, output logic [3:0] rom);
    int rsz, esz;
    ram = 4'hF; rom = 4'hF;
    rsz = sw_size[0] ? 8192 : 2048;
    esz = (sw_size[2:1] == 2'b00) ? 2048 : (sw_size[2:1] == 2'b01) ? 4096 : 8192;
    if (mreq_n || a >= 16'hF800) return;
    for (int i = 0; i < 4; i++) begin
      bit rh, eh;
      rh = int'(a) >= i * rsz && int'(a) < (i + 1) * rsz;
      eh = int'(a) >= 32768 + i * esz && int'(a) < 32768 + (i + 1) * esz;
      if (sw_swap[i]) begin ram[i] = !eh; rom[i] = !rh; end
      else            begin ram[i] = !rh; rom[i] = !eh; end
    end
  endfunction

  initial begin
    logic [7:0] led_m;
    rst_n = 0; mreq_n = 1; iorq_n = 1; rd_n = 1; wr_n = 1; m1_n = 1; busack_n = 1;
    a = 0; d_in = 0; dil = 0; sw_size = 0; sw_swap = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    led_m = 0;
    for (int n = 0; n < 20000; n++) begin
      logic [3:0] er, ee;
      int dev;
      sw_size = 3'($urandom); sw_swap = ($urandom_range(0, 3) == 0) ? 4'($urandom) : 4'h0;
      a = 16'($urandom); d_in = 8'($urandom); dil = 8'($urandom);
      busack_n = 1'($urandom); m1_n = 1;
      mreq_n = 1; iorq_n = 1; rd_n = 1; wr_n = 1;
      case ($urandom_range(0, 4))
        0: begin mreq_n = 0; rd_n = 0; end
        1: begin mreq_n = 0; wr_n = 0; end
        2: begin iorq_n = 0; if ($urandom_range(0, 1)) rd_n = 0; else wr_n = 0;
                 if ($urandom_range(0, 1)) a[7:0] = 8'($urandom_range(8'h90, 8'hAB)); end
        3: begin iorq_n = 0; m1_n = 0; end
        4: begin mreq_n = 0; end                  // refresh
      endcase
      #1;
      model(er, ee);
      check(ram_ce_n == er && rom_ce_n == ee, $sformatf("memory map a=%h size=%b swap=%b", a, sw_size, sw_swap));
      check(mem_n == (&er && &ee), "MEM");
      dev = (!iorq_n && m1_n && a[7:0] >= 8'h90 && a[7:0] <= 8'hAB) ? (a[7:0] - 8'h90) / 4 : -1;
      check(ctc1_n == (dev != 0) && dart_n == (dev != 1) && pio1_n == (dev != 2) &&
            pio2_n == (dev != 3) && ctc2_n == (dev != 4), $sformatf("I/O map a=%h", a[7:0]));
      check(d_oe == (dev == 6 && !rd_n), "DIL read enable");
      if (d_oe) check(d_out == dil, "DIL value");
      check(dir == !wr_n && cpu_buf_en == busack_n && dbuf == (!rd_n || (!m1_n && !iorq_n)), "buffer controls");
      check(mem_en == ((!mreq_n || (!iorq_n && m1_n)) && (!rd_n || !wr_n)), "bus buffer enable");
      if (dev == 5 && !wr_n) led_m = d_in;
      @(negedge clk);
      check(led == led_m, "LED latch");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
