// tb_eib_system: end-to-end bench of the whole system at its default
// parameters. The bench plays the master MC68000, both PIAs (their port A
// outputs and interrupt requests), the target Z80 with its memories and
// the target MC68000 with its memories and peripherals. Each operation is
// checked against models of the memories, and every mechanism of the
// design is counted; one that never happened counts as a failure:
//   master and target shared-memory cycles on both boards (8-bit and
//   16-bit target modes), arbitration contention, Z80 WAIT, Z80 DMA
//   reads/writes of memory and I/O (BUSREQ/BUSACK/RELWAIT), the vector
//   latch, every Z80 PIA command, 68000 DMA (BR/BG/BGACK) with the extra
//   byte address latch, 68000 TWAIT, INT/HALT/RESET of the 68000 target
//   with VECEN, the 68000 board's memory and I/O decode (swap switch,
//   6800-type devices with VPA), target-board DTACK and BERR timing,
//   interrupt priority and autovector/vectored acknowledge, the PIA interrupt daisy chain, the
//   DTACK delay switch and addresses outside both windows.
module tb_eib_system;
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
    repeat (3000000) @(posedge clk16);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- counters
  typedef enum int {
    M_Z_SM_MASTER, M_Z_SM_TARGET, M_Z_WAIT, M_Z_CONTEND, M_Z_DMA_RD, M_Z_DMA_WR,
    M_Z_IO_WR, M_Z_IO_RD, M_Z_VECTOR, M_Z_INT, M_Z_NMI, M_Z_RESET, M_Z_PIA_BUSREQ,
    M_K_SM_MASTER, M_K_SM_TARGET, M_K_TWAIT_RD, M_K_TWAIT_WR, M_K_CONTEND, M_K_EBAL,
    M_K_DMA_RD, M_K_DMA_WR, M_K_INT, M_K_VECEN, M_K_HALT, M_K_RESET, M_K_DTACK,
    M_K_BERR, M_K_IPL, M_K_AVEC, M_K_INTON, M_CHAIN_Z, M_CHAIN_K, M_DTACK_DELAY,
    M_MISS, M_MODE8, M_MODE16, M_K_DECODE, M_NUM
  } mech_e;
  int unsigned cnt [M_NUM];
  string mname [M_NUM] = '{"Z shared memory from master", "Z shared memory from Z80", "Z80 WAIT",
    "Z contention", "Z80 DMA read", "Z80 DMA write", "Z80 I/O write", "Z80 I/O read",
    "Z80 vector", "Z80 INT", "Z80 NMI", "Z80 RESET", "Z80 BUSREQ command",
    "K shared memory from master", "K shared memory from 68000", "K TWAIT read", "K TWAIT write",
    "K contention", "K extra byte latch", "68000 DMA read", "68000 DMA write", "68000 INT",
    "68000 VECEN", "68000 HALT", "68000 RESET", "68000 board DTACK", "68000 board BERR",
    "68000 interrupt priority", "68000 autovector", "68000 vectored", "daisy chain board Z",
    "daisy chain board K", "DTACK delay switch", "outside both windows", "8-bit mode", "16-bit mode",
    "68000 board decode"};

  localparam logic [23:0] ZW = 24'h860000;
  localparam logic [23:0] KW = 24'h880000;

  // contention: a target request that finds the memory granted to the master
  always @(negedge clk16) begin
    if (rst_n && !dut.z_tsmr_n && dut.z_tsmra_n && !dut.u_eib_z.msmra_n) cnt[M_Z_CONTEND]++;
    if (rst_n && !dut.k_tsmr_n && dut.k_tsmra_n && !dut.u_eib_k.msmra_n) cnt[M_K_CONTEND]++;
  end

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

  // ================================================================ test
  logic [7:0] zsm [4096];    // board Z shared memory, byte addressed
  logic [15:0] ksm [2048];   // board K shared memory, word addressed

  initial begin
    logic [15:0] rd; int c; logic v;
    rst_n = 0;
    ma = 0; mas_n = 1; muds_n = 1; mlds_n = 1; mrw = 1; md_wr = 0; iain_n = 1;
    z_base_sw = 7'h43; k_base_sw = 7'h44; z_dly_sw = 4'd1; k_dly_sw = 4'd1;
    z_pia_irqa_n = 1; z_pia_irqb_n = 1; z_pa = 8'b0000_0011;   // 8-bit target, shared memory on
    k_pia_irqa_n = 1; k_pia_irqb_n = 1; k_pa = 8'b0000_0010;   // 16-bit target, shared memory on
    zc_a = 0; zc_d_out = 0; zc_mreq_n = 1; zc_iorq_n = 1; zc_rd_n = 1; zc_wr_n = 1; zc_m1_n = 1;
    zc_halt_n = 1; z_dev_int_n = 1; z_sw_size = 3'b001; z_sw_swap = 0; z_dil = 8'h5C;
    kc_a = 0; kc_d_out = 0; kc_as_n = 1; kc_uds_n = 1; kc_lds_n = 1; kc_rw = 1; kc_intack_n = 1;
    k_dev_irq_n = '1; k_lk_dtack = 3'd1; k_lk_berr = 3'd7;
    k_sw_ram8k = 1; k_sw_rom8k = 1; k_sw_swap = 2'b00;          // 8K devices: RAM 0-FFFF, EPROM 20000-2FFFF
    z_busy = 0; k_busy = 0;
    foreach (cnt[i]) cnt[i] = 0;
    for (int i = 0; i < 65536; i++) zmem[i] = 8'(i * 13 + 1);
    for (int i = 0; i < 131072; i++) kmem[i] = 16'(i * 7 + 5);
    repeat (4) @(negedge clk16); rst_n = 1;
    repeat (4) @(negedge clk16);

    // ---------------------------------------------------- window decode
    mcycle(24'h8A0000, 1, 1, 1, 0, rd, c, v);
    check(c == 400 && !v && !md_oe, "no board answers outside the windows");
    if (c == 400) cnt[M_MISS]++;
    for (int d = 0; d < 4; d++) begin
      int c0;
      z_dly_sw = 4'(d);
      mcycle(ZW + 24'h4000, 1, 1, 1, 0, rd, c, v);
      check(c == d + 1, $sformatf("DTACK delay %0d: %0d clocks", d, c));
      if (c == d + 1) cnt[M_DTACK_DELAY]++;
    end
    z_dly_sw = 4'd1;

    // ---------------------------------------------------- shared-memory bases
    mwr(ZW + 24'h4000, 16'h001F);          // Z80 area F800-FFFF
    mwr(KW + 24'h4000, 16'h0400);          // 68000 area 200000-200FFF
    mrd(ZW + 24'h4000, rd); check(rd == 16'h001F, "Z base read back");
    mrd(KW + 24'h4000, rd); check(rd == 16'h0400, "K base read back");

    // ---------------------------------------------------- board Z shared memory
    for (int i = 0; i < 4096; i += 2) begin
      logic [15:0] w; w = 16'($urandom);
      mwr(ZW + 24'(i), w); zsm[i] = w[15:8]; zsm[i + 1] = w[7:0];
    end
    cnt[M_Z_SM_MASTER]++;
    for (int n = 0; n < 60; n++) begin
      logic [10:0] a; logic [7:0] r, w; int waits;
      a = 11'($urandom); w = 8'($urandom);
      if ($urandom_range(0, 1)) begin
        z_mem(16'hF800 + 16'(a), 0, 0, r, waits);
        check(r == zsm[2048 + int'(a)], $sformatf("Z80 reads shared %h", a));
      end else begin
        z_mem(16'hF800 + 16'(a), 1, w, r, waits);
        zsm[2048 + int'(a)] = w;
        mrd(ZW + 24'(2048 + (int'(a) & ~1)), rd);
        check(rd == {zsm[2048 + (int'(a) & ~1)], zsm[2048 + (int'(a) | 1)]}, "master sees the Z80 byte");
        cnt[M_Z_SM_MASTER]++;
      end
      cnt[M_Z_SM_TARGET]++; cnt[M_MODE8]++;
      check(waits >= 3, "Z80 held by WAIT for 500 ns");
      if (waits > 0) cnt[M_Z_WAIT]++;
    end
    // contention: master and Z80 together
    for (int n = 0; n < 20; n++) begin
      logic [7:0] r; int waits; logic [15:0] w;
      w = 16'($urandom);
      fork
        mwr(ZW + 24'h0800, w);
        begin repeat (n % 3) @(negedge clk16); z_mem(16'hF802, 1, 8'(n), r, waits); end
      join
      zsm[2048] = w[15:8]; zsm[2049] = w[7:0]; zsm[2050] = 8'(n);
      mrd(ZW + 24'h0802, rd);
      check(rd[15:8] == 8'(n), "Z80 write kept under contention");
      mrd(ZW + 24'h0800, rd);
      check(rd == w, "master write kept under contention");
    end

    // ---------------------------------------------------- Z80 DMA
    for (int n = 0; n < 30; n++) begin
      logic [15:0] a; logic [7:0] b;
      a = 16'($urandom_range(0, 16'h7FFF)); b = 8'($urandom);
      if (a[0]) mwr(ZW + 24'h10000 + 24'(a), {8'h00, b}, 0, 1);
      else      mwr(ZW + 24'h10000 + 24'(a), {b, 8'h00}, 1, 0);
      check(zmem[a] == b, $sformatf("DMA write to Z80 memory %h", a));
      if (zmem[a] == b) cnt[M_Z_DMA_WR]++;
      mrd(ZW + 24'h10000 + 24'(a), rd, !a[0], a[0]);
      check(rd[7:0] == b, $sformatf("DMA read of Z80 memory %h", a));
      if (rd[7:0] == b) cnt[M_Z_DMA_RD]++;
    end
    // I/O: LED latch write and DIL switch read
    mwr(ZW + 24'h2000 + 24'hA4, 16'hA500, 1, 0);
    check(z_led == 8'hA5, "LED latch written by DMA I/O");
    if (z_led == 8'hA5) cnt[M_Z_IO_WR]++;
    mrd(ZW + 24'h2000 + 24'hA8, rd, 1, 0);
    check(rd[7:0] == z_dil, "DIL switches read by DMA I/O");
    if (rd[7:0] == z_dil) cnt[M_Z_IO_RD]++;

    // ---------------------------------------------------- vector latch
    mwr(ZW + 24'h8000, 16'h00E7);
    begin logic [7:0] vz; z_inta(vz); check(vz == 8'hE7, "Z80 vector"); if (vz == 8'hE7) cnt[M_Z_VECTOR]++; end

    // ---------------------------------------------------- Z80 PIA commands
    z_pa = 8'b0010_1011; repeat (2) @(negedge clk8);
    check(!zc_int_n && z_pb[0] == 0, "Z80 INT command"); if (!zc_int_n) cnt[M_Z_INT]++;
    z_pa = 8'b0101_0011; repeat (2) @(negedge clk8);
    check(!zc_nmi_n && zc_int_n && z_pb[1] == 0, "Z80 NMI command"); if (!zc_nmi_n) cnt[M_Z_NMI]++;
    z_pa = 8'b0110_0011; repeat (2) @(negedge clk8);
    check(!zc_reset_n && z_pb[2] == 0, "Z80 RESET command"); if (!zc_reset_n) cnt[M_Z_RESET]++;
    z_pa = 8'b1000_0011; repeat (4) @(negedge clk8);
    check(!zc_busreq_n && !zc_busack_n && z_pb[3] == 0 && z_pb[4] == 0, "Z80 BUSREQ command");
    if (!zc_busack_n) cnt[M_Z_PIA_BUSREQ]++;
    z_pa = 8'b0000_0011; repeat (4) @(negedge clk8);
    check(zc_int_n && zc_nmi_n && zc_reset_n && zc_busreq_n && zc_busack_n, "Z80 home state");

    // ---------------------------------------------------- board K shared memory
    for (int i = 0; i < 2048; i++) begin
      logic [15:0] w; w = 16'($urandom);
      mwr(KW + 24'(2 * i), w); ksm[i] = w;
    end
    cnt[M_K_SM_MASTER]++;
    for (int n = 0; n < 60; n++) begin
      logic [10:0] a; logic [15:0] w, r; logic b;
      a = 11'($urandom); w = 16'($urandom);
      if ($urandom_range(0, 1)) begin
        k_cyc(24'h200000 + 24'(2 * a), 1, 0, r, c, b);
        check(!b && r == ksm[a], $sformatf("68000 reads shared %h", a));
        // READ_CYCLES clocks after the grant, which comes with the next 16 MHz edge
        check(c == 2 || c == 3, $sformatf("TWAIT read after %0d clocks", c));
        if (c == 2 || c == 3) cnt[M_K_TWAIT_RD]++;
      end else begin
        k_cyc(24'h200000 + 24'(2 * a), 0, w, r, c, b);
        ksm[a] = w;
        check(c == 3 || c == 4, $sformatf("TWAIT write after %0d clocks", c));
        if (c == 3 || c == 4) cnt[M_K_TWAIT_WR]++;
        mrd(KW + 24'(2 * a), rd); check(rd == w, "master sees the 68000 word");
      end
      cnt[M_K_SM_TARGET]++; cnt[M_MODE16]++;
    end
    for (int n = 0; n < 20; n++) begin
      logic [15:0] w, r; logic b;
      w = 16'($urandom);
      fork
        mwr(KW + 24'h10, w);
        begin repeat (n % 3) @(negedge clk16); k_cyc(24'h200012, 0, ~w, r, c, b); end
      join
      mrd(KW + 24'h10, rd); check(rd == w, "master write kept under contention");
      mrd(KW + 24'h12, rd); check(rd == ~w, "68000 write kept under contention");
    end

    // ---------------------------------------------------- 68000 DMA with EBAL
    for (int n = 0; n < 30; n++) begin
      logic [7:0] hi; logic [15:0] off, w; logic [16:0] idx;
      hi = $urandom_range(0, 1) ? 8'h02 : 8'h00; off = 16'($urandom) & 16'hFFFE; w = 16'($urandom);
      mwr(KW + 24'hA000, {8'h00, hi});
      cnt[M_K_EBAL]++;
      idx = {hi[1], 1'b0, off[15:1]};
      mwr(KW + 24'h10000 + 24'(off), w);
      check(kmem[idx] == w, $sformatf("DMA write to 68000 memory %h%h", hi, off));
      if (kmem[idx] == w) cnt[M_K_DMA_WR]++;
      mrd(KW + 24'h10000 + 24'(off), rd);
      check(rd == w, "DMA read of 68000 memory");
      if (rd == w) cnt[M_K_DMA_RD]++;
    end
    check(k_bus_bgack_n && kc_br_n, "68000 bus returned");

    // ---------------------------------------------------- 68000 board DTACK / BERR
    for (int l = 0; l < 8; l++) begin
      logic [15:0] r; logic b;
      k_lk_dtack = 3'(l);
      k_cyc(24'h000100, 1, 0, r, c, b);
      check(!b && c == l + 1 && r == kmem[17'h80], $sformatf("board DTACK link %0d: %0d clocks", l, c));
      if (!b && c == l + 1) cnt[M_K_DTACK]++;
    end
    k_lk_dtack = 3'd1;
    for (int l = 2; l < 8; l++) begin
      logic [15:0] r; logic b;
      k_lk_berr = 3'(l);
      k_cyc(24'h300000, 1, 0, r, c, b);
      check(b && c == l + 1, $sformatf("BERR link %0d: %0d clocks", l, c));
      if (b && c == l + 1) cnt[M_K_BERR]++;
    end

    // ---------------------------------------------------- 68000 board decode
    begin
      int ok = 0;
      k_start();
      kc_a = 23'h000000; kc_as_n = 0; kc_uds_n = 0; kc_lds_n = 0; #1;
      ok += int'(k_ram_ce_n == 4'b1110 && k_rom_ce_n == 4'hF);
      check(k_ram_ce_n == 4'b1110 && k_rom_ce_n == 4'hF, "RAM pair 0 on the reset vector");
      k_sw_swap = 2'b01; #1;
      ok += int'(k_ram_ce_n == 4'hF && k_rom_ce_n == 4'b1110);
      check(k_ram_ce_n == 4'hF && k_rom_ce_n == 4'b1110, "EPROM pair 0 on the reset vector after swap");
      k_sw_swap = 2'b00;
      kc_a = 23'(24'h010400 >> 1); #1;
      ok += int'(k_mem_n);
      check(k_mem_n, "shared area not decoded on the 68000 board");
      kc_a = 23'(24'h080800 >> 1); #1;               // ACIA1, 6800-type half
      ok += int'(!kc_vpa_n && k_io_ce_n == 8'b1110_1111 && !k_m6800_n && k_iopage_n);
      check(!kc_vpa_n && k_io_ce_n == 8'b1110_1111 && !k_m6800_n,
            $sformatf("ACIA1 select %b with VPA", k_io_ce_n));
      kc_a = 23'(24'h080000 >> 1); #1;               // PI/T1, 68000-type half
      ok += int'(kc_vpa_n && k_io_ce_n == 8'b1111_1110 && k_m6800_n && !k_iopage_n);
      check(kc_vpa_n && k_io_ce_n == 8'b1111_1110 && !k_iopage_n,
            $sformatf("PI/T1 select %b without VPA", k_io_ce_n));
      k_end();
      if (ok == 5) cnt[M_K_DECODE]++;
    end

    // ---------------------------------------------------- 68000 interrupts
    begin
      logic vpa, inton, vecen;
      k_dev_irq_n[0] = 0;                       // ACIA1, linked to level 6
      #1 check(kc_ipl_n == 3'b100, "ACIA1 at level 6 (IPL2..0 wired A0,A1,A2)");
      k_dev_irq_n[4] = 0;                       // PI/T2a, level 3
      #1 check(kc_ipl_n == 3'b100, "level 6 wins over level 3");
      k_dev_irq_n[0] = 1;
      #1 check(kc_ipl_n == 3'b001, "level 3 alone");
      if (kc_ipl_n == 3'b001) cnt[M_K_IPL]++;
      k_iack(3'd3, vpa, inton, vecen);
      check(!vpa && inton, "level 3 vectored on board");
      if (inton) cnt[M_K_INTON]++;
      k_dev_irq_n[4] = 1;
      k_pa = 8'b0010_0010; repeat (3) @(negedge clk8);
      check(!dut.kp_int_n && kc_ipl_n == 3'b000, "master interrupt at level 7");
      if (kc_ipl_n == 3'b000) cnt[M_K_INT]++;
      k_iack(3'd7, vpa, inton, vecen);
      check(vpa && !inton, "level 7 autovectored");
      check(vecen, "VECEN in the acknowledge");
      if (vpa) cnt[M_K_AVEC]++;
      if (vecen) cnt[M_K_VECEN]++;
      repeat (2) @(negedge clk8);
      check(kc_ipl_n == 3'b111, "request spent after the acknowledge");
      k_pa = 8'b0100_0010; repeat (3) @(negedge clk8);
      check(!kc_halt_n && kc_reset_n && k_pb[1] == 0, "68000 HALT");
      if (!kc_halt_n) cnt[M_K_HALT]++;
      k_pa = 8'b0110_0010; repeat (3) @(negedge clk8);
      check(!kc_halt_n && !kc_reset_n && k_pb[2] == 0, "68000 RESET");
      if (!kc_reset_n) cnt[M_K_RESET]++;
      k_pa = 8'b0000_0010; repeat (3) @(negedge clk8);
      check(kc_halt_n && kc_reset_n, "68000 home state");
    end

    // ---------------------------------------------------- PIA interrupt daisy chain
    z_pia_irqa_n = 0;
    #1 check(!mirq_n, "board Z requests");
    ma = 23'h7FFFFF; mas_n = 0; iain_n = 0;
    repeat (3) @(negedge clk16);
    check(!mvpa_n && iaout_n, "board Z takes the acknowledge");
    if (!mvpa_n) cnt[M_CHAIN_Z]++;
    mas_n = 1; iain_n = 1; z_pia_irqa_n = 1;
    repeat (2) @(negedge clk16);
    k_pia_irqb_n = 0;
    ma = 23'h7FFFFF; mas_n = 0; iain_n = 0;
    repeat (3) @(negedge clk16);
    check(!mvpa_n && iaout_n && dut.u_eib_k.liack && !dut.u_eib_z.liack, "acknowledge passed by Z to K");
    if (dut.u_eib_k.liack) cnt[M_CHAIN_K]++;
    mas_n = 1; iain_n = 1; k_pia_irqb_n = 1;
    repeat (2) @(negedge clk16);
    check(mvpa_n && mirq_n, "chain idle");

    for (int i = 0; i < M_NUM; i++) begin
      check(cnt[i] > 0, $sformatf("mechanism never seen: %s", mname[i]));
      $display("  %-30s %0d", mname[i], cnt[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
