// tb_eib_workloads: the uses the interface was built for, run at full size
// on the whole system at its default parameters:
//   - a 4 KB message through board K's shared memory, placed where the
//     68000 board reserves it (010000h-010FFFh): the master fills all
//     2048 words, the 68000 target reads every word and writes back its
//     complement, and the master checks every word;
//   - a 2 KB message through board Z's shared memory (Z80 F800h-FFFFh):
//     the Z80 reads and rewrites every byte, and the master checks both
//     the Z80 half and that the other half of the RAM is untouched;
//   - a DMA sweep of the whole Z80 memory map outside the shared area:
//     every RAM byte (0000h-7FFFh) written and read back, every EPROM byte
//     (8000h-F7FFh) read;
//   - a DMA sweep of all decoded 68000 target memory through the 64 KB
//     window and the extra byte address latch: every RAM word
//     (000000h-00FFFFh) and every EPROM word (020000h-02FFFFh) written and
//     read back (the bench's EPROM model is writable).
// Data are random ($urandom); every word is checked against a model.
module tb_eib_workloads;
  import eib_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  // ---------------------------------------------------------------- clocks
  logic clk16 = 0, clk8 = 0;
  always #31 clk16 = ~clk16;
  always @(posedge clk16) clk8 <= ~clk8;

  // ---------------------------------------------------------------- ports
  logic rst_n;
  logic [23:1] ma; logic mas_n, muds_n, mlds_n, mrw; logic [15:0] md_wr, md_rd;
  logic md_oe, mdtack_n, mvpa_n, mirq_n, iain_n, iaout_n;
  logic [6:0] z_base_sw, k_base_sw; logic [3:0] z_dly_sw, k_dly_sw;
  logic z_pia_cs_n, z_pia_ca1_n, z_pia_cb1_n, z_pia_irqa_n, z_pia_irqb_n;
  logic [7:0] z_pa, z_pb;
  logic [15:0] zc_a; logic [7:0] zc_d_out, zc_d_in;
  logic zc_mreq_n, zc_iorq_n, zc_rd_n, zc_wr_n, zc_m1_n, zc_busack_n, zc_halt_n;
  logic zc_busreq_n, zc_wait_n, zc_int_n, zc_nmi_n, zc_reset_n;
  logic z_dev_int_n; logic [2:0] z_sw_size; logic [3:0] z_sw_swap; logic [7:0] z_dil, z_mem_d;
  logic [15:0] z_bus_a; logic [7:0] z_bus_d;
  logic z_bus_mreq_n, z_bus_iorq_n, z_bus_rd_n, z_bus_wr_n;
  logic [3:0] z_ram_ce_n, z_rom_ce_n; logic [4:0] z_io_ce_n; logic [7:0] z_led;
  logic k_pia_cs_n, k_pia_ca1_n, k_pia_cb1_n, k_pia_irqa_n, k_pia_irqb_n;
  logic [7:0] k_pa, k_pb;
  logic [23:1] kc_a; logic [15:0] kc_d_out, kc_d_in;
  logic kc_as_n, kc_uds_n, kc_lds_n, kc_rw, kc_bg_n, kc_intack_n;
  logic kc_br_n, kc_dtack_n, kc_berr_n, kc_vpa_n, kc_halt_n, kc_reset_n;
  logic [2:0] kc_ipl_n;
  logic k_sw_ram8k, k_sw_rom8k; logic [1:0] k_sw_swap;
  logic [3:0] k_ram_ce_n, k_rom_ce_n; logic [7:0] k_io_ce_n; logic k_iopage_n, k_m6800_n;
  logic k_mem_n; logic [8:0] k_dev_irq_n; logic [2:0] k_lk_dtack, k_lk_berr; logic [15:0] k_mem_d;
  logic [23:1] k_bus_a; logic [15:0] k_bus_d;
  logic k_bus_as_n, k_bus_uds_n, k_bus_lds_n, k_bus_rw, k_bus_bgack_n, k_inton_n, k_vecen_n;

  eib_system dut (.*);

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (40000000) @(posedge clk16);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [23:0] ZW = 24'h860000;
  localparam logic [23:0] KW = 24'h880000;

  // ================================================================ master
  task automatic mcycle(input logic [23:0] addr, input logic rw, input logic u, input logic l,
                        input logic [15:0] wd, output logic [15:0] rd, output int clocks,
                        output logic vpa);
    @(negedge clk16);
    ma = addr[23:1]; mrw = rw; md_wr = wd; mas_n = 0; muds_n = !u; mlds_n = !l;
    clocks = 0; vpa = 0;
    while (mdtack_n && mvpa_n && clocks < 400) begin @(negedge clk16); clocks++; end
    vpa = !mvpa_n;
    rd = md_rd;
    @(negedge clk16);
    mas_n = 1; muds_n = 1; mlds_n = 1; mrw = 1;
    @(negedge clk16);
  endtask
  task automatic mwr(input logic [23:0] addr, input logic [15:0] wd, input logic u = 1, input logic l = 1);
    logic [15:0] rd; int c; logic v;
    mcycle(addr, 0, u, l, wd, rd, c, v);
    check(c < 400 && !v, $sformatf("master write %h answered", addr));
  endtask
  task automatic mrd(input logic [23:0] addr, output logic [15:0] rd, input logic u = 1, input logic l = 1);
    int c; logic v;
    mcycle(addr, 1, u, l, 16'h0, rd, c, v);
    check(c < 400 && !v, $sformatf("master read %h answered", addr));
  endtask

  // ================================================================ Z80 target
  logic [7:0] zmem [65536];
  logic z_busy;
  always_comb z_mem_d = zmem[z_bus_a];
  always @(posedge clk8) begin
    if (!z_bus_mreq_n && !z_bus_wr_n && (z_ram_ce_n != 4'hF)) zmem[z_bus_a] <= z_bus_d;
  end
  // bus grant: BUSACK when the Z80 is between cycles
  always @(posedge clk8 or negedge rst_n) begin
    if (!rst_n) zc_busack_n <= 1;
    else if (!zc_busreq_n && !z_busy) zc_busack_n <= 0;
    else if (zc_busreq_n) zc_busack_n <= 1;
  end

  task automatic z_start();
    @(negedge clk8);
    z_busy = 1;
    while (!zc_busack_n || !zc_busreq_n) begin
      z_busy = 0; @(negedge clk8); z_busy = 1;
    end
  endtask
  task automatic z_end();
    zc_mreq_n = 1; zc_iorq_n = 1; zc_rd_n = 1; zc_wr_n = 1; zc_m1_n = 1;
    @(negedge clk8); z_busy = 0;
  endtask
  // memory cycle with WAIT; returns the number of wait clocks
  task automatic z_mem(input logic [15:0] a, input logic wr, input logic [7:0] d,
                       output logic [7:0] rd, output int waits);
    z_start();
    zc_a = a; zc_mreq_n = 0; zc_rd_n = wr; zc_wr_n = !wr; zc_d_out = d;
    waits = 0;
    @(negedge clk8);
    while (!zc_wait_n && waits < 100) begin @(negedge clk8); waits++; end
    rd = zc_d_in;
    z_end();
  endtask
  task automatic z_inta(output logic [7:0] v);
    z_start();
    zc_m1_n = 0; zc_iorq_n = 0;
    @(negedge clk8); v = zc_d_in;
    z_end();
  endtask

  // ================================================================ 68000 target
  logic [15:0] kmem [131072];
  logic k_busy;
  always_comb begin
    k_mem_d = kmem[k_bus_a[17:1]];
  end
  always @(posedge clk8) begin
    if (!k_mem_n && !k_bus_as_n && !k_bus_rw) begin
      if (!k_bus_uds_n) kmem[k_bus_a[17:1]][15:8] <= k_bus_d[15:8];
      if (!k_bus_lds_n) kmem[k_bus_a[17:1]][7:0]  <= k_bus_d[7:0];
    end
  end
  // bus grant: BG when the 68000 is between cycles and BR is asserted
  always @(posedge clk8 or negedge rst_n) begin
    if (!rst_n) kc_bg_n <= 1;
    else kc_bg_n <= !( !kc_br_n && !k_busy );
  end
  task automatic k_start();
    @(negedge clk8);
    k_busy = 1;
    while (!k_bus_bgack_n) begin k_busy = 0; @(negedge clk8); k_busy = 1; end
  endtask
  task automatic k_end();
    kc_as_n = 1; kc_uds_n = 1; kc_lds_n = 1; kc_rw = 1; kc_intack_n = 1;
    @(negedge clk8); k_busy = 0;
  endtask
  // bus cycle; returns clocks to DTACK (or BERR / VPA) and which came
  task automatic k_cyc(input logic [23:0] a, input logic rw, input logic [15:0] d,
                       output logic [15:0] rd, output int clocks, output logic berr);
    k_start();
    kc_a = a[23:1]; kc_rw = rw; kc_d_out = d; kc_as_n = 0; kc_uds_n = 0; kc_lds_n = 0;
    clocks = 0;
    #1;
    while (kc_dtack_n && kc_berr_n && clocks < 100) begin @(negedge clk8); clocks++; #1; end
    berr = !kc_berr_n;
    rd = kc_d_in;
    @(negedge clk8);
    k_end();
  endtask
  task automatic k_iack(input logic [2:0] lvl, output logic vpa, output logic inton, output logic vecen);
    k_start();
    kc_a = {20'hFFFFF, lvl}; kc_intack_n = 0; kc_as_n = 0; kc_rw = 1; kc_lds_n = 0;
    #1; vpa = !kc_vpa_n; inton = !k_inton_n;
    @(negedge clk8); @(negedge clk8);
    vecen = !k_vecen_n;
    k_end();
  endtask

  // ================================================================ workloads
  initial begin
    logic [15:0] rd, w; int c; logic b;
    logic [15:0] ksm [2048];
    logic [15:0] zsm [2048];
    rst_n = 0;
    ma = 0; mas_n = 1; muds_n = 1; mlds_n = 1; mrw = 1; md_wr = 0; iain_n = 1;
    z_base_sw = 7'h43; k_base_sw = 7'h44; z_dly_sw = 4'd1; k_dly_sw = 4'd1;
    z_pia_irqa_n = 1; z_pia_irqb_n = 1; z_pa = 8'b0000_0011;   // 8-bit target, shared memory on
    k_pia_irqa_n = 1; k_pia_irqb_n = 1; k_pa = 8'b0000_0010;   // 16-bit target, shared memory on
    zc_a = 0; zc_d_out = 0; zc_mreq_n = 1; zc_iorq_n = 1; zc_rd_n = 1; zc_wr_n = 1; zc_m1_n = 1;
    zc_halt_n = 1; z_dev_int_n = 1; z_dil = 8'h00;
    z_sw_size = 3'b101; z_sw_swap = 0;                        // 8K RAM, 8K EPROM
    kc_a = 0; kc_d_out = 0; kc_as_n = 1; kc_uds_n = 1; kc_lds_n = 1; kc_rw = 1; kc_intack_n = 1;
    k_dev_irq_n = '1; k_lk_dtack = 3'd1; k_lk_berr = 3'd7;
    k_sw_ram8k = 1; k_sw_rom8k = 1; k_sw_swap = 2'b00;
    z_busy = 0; k_busy = 0;
    for (int i = 0; i < 65536; i++) zmem[i] = 8'($urandom);
    for (int i = 0; i < 131072; i++) kmem[i] = 16'($urandom);
    repeat (4) @(negedge clk16); rst_n = 1;
    repeat (4) @(negedge clk16);

    mwr(ZW + 24'h4000, 16'h001F);          // Z80 area F800-FFFF
    mwr(KW + 24'h4000, 16'h0020);          // 68000 area 010000-010FFF

    // ---------------------------------------------------- 4 KB message, 68000 target
    for (int i = 0; i < 2048; i++) begin
      ksm[i] = 16'($urandom); mwr(KW + 24'(2 * i), ksm[i]);
    end
    for (int i = 0; i < 2048; i++) begin
      logic [15:0] r;
      k_cyc(24'h010000 + 24'(2 * i), 1, 0, r, c, b);
      check(!b && r == ksm[i], $sformatf("68000 reads message word %0d", i));
      k_cyc(24'h010000 + 24'(2 * i), 0, ~r, r, c, b);
      check(!b, $sformatf("68000 writes reply word %0d", i));
    end
    for (int i = 0; i < 2048; i++) begin
      mrd(KW + 24'(2 * i), rd);
      check(rd == ~ksm[i], $sformatf("master reads reply word %0d", i));
    end
    $display("4 KB message through board K done, %0d checks", checks);

    // ---------------------------------------------------- 2 KB message, Z80 target
    for (int i = 0; i < 2048; i++) begin
      zsm[i] = 16'($urandom); mwr(ZW + 24'(2 * i), zsm[i]);
    end
    for (int i = 0; i < 2048; i++) begin
      logic [7:0] r, e; int waits;
      e = i[0] ? zsm[1024 + i / 2][7:0] : zsm[1024 + i / 2][15:8];
      z_mem(16'hF800 + 16'(i), 0, 0, r, waits);
      check(r == e, $sformatf("Z80 reads message byte %0d", i));
      z_mem(16'hF800 + 16'(i), 1, ~r, r, waits);
    end
    for (int i = 0; i < 2048; i++) begin
      mrd(ZW + 24'(2 * i), rd);
      check(rd == (i >= 1024 ? ~zsm[i] : zsm[i]), $sformatf("master reads Z80 reply word %0d", i));
    end
    $display("2 KB message through board Z done, %0d checks", checks);

    // ---------------------------------------------------- Z80 memory map by DMA
    for (int a = 0; a < 32768; a++) begin
      logic [7:0] v; v = 8'($urandom);
      if (a[0]) mwr(ZW + 24'h10000 + 24'(a), {8'h00, v}, 0, 1);
      else      mwr(ZW + 24'h10000 + 24'(a), {v, 8'h00}, 1, 0);
      check(zmem[a] == v, $sformatf("DMA write to Z80 RAM %h", a));
    end
    for (int a = 0; a < 16'hF800; a++) begin
      mrd(ZW + 24'h10000 + 24'(a), rd, !a[0], a[0]);
      check((a[0] ? rd[7:0] : rd[15:8]) == zmem[a], $sformatf("DMA read of Z80 memory %h", a));
    end
    repeat (4) @(negedge clk8);
    check(zc_busreq_n && zc_busack_n, "Z80 bus returned");
    $display("Z80 memory sweep done, %0d checks", checks);

    // ---------------------------------------------------- 68000 memory by DMA
    foreach (kmem[i]) kmem[i] = 16'($urandom);
    for (int bank = 0; bank < 3; bank += 2) begin
      mwr(KW + 24'hA000, 16'(bank));
      for (int off = 0; off < 65536; off += 2) begin
        w = 16'($urandom);
        mwr(KW + 24'h10000 + 24'(off), w);
        check(kmem[{bank[1], 1'b0, off[15:1]}] == w, $sformatf("DMA write to 68000 memory %0h%04h", bank, off));
        mrd(KW + 24'h10000 + 24'(off), rd);
        check(rd == w, $sformatf("DMA read of 68000 memory %0h%04h", bank, off));
      end
    end
    repeat (4) @(negedge clk8);
    check(k_bus_bgack_n && kc_br_n, "68000 bus returned");
    $display("68000 memory sweep done, %0d checks", checks);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
