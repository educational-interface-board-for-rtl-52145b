// tb_eib: bench for one interface board with a model personality card and
// a model target bus. A master bus-functional task runs MC68000 cycles
// (address, strobes, wait for DTACK or VPA, release); a target task runs
// shared-memory cycles from the target side. Covered:
//  - the window switch: cycles outside the window get no answer;
//  - master and target shared-memory reads and writes against a model of
//    the memory, in 16-bit and 8-bit target modes, with the base latch
//    written and read back through the target-access-latch slot;
//  - simultaneous master and target requests (never both granted, both
//    complete);
//  - target memory and I/O requests (MTR, MTIOR): DTACK only after RELWAIT,
//    target address and data buffers, read data from the target bus;
//  - the DTACK delay switch (delay counted in clocks from AS);
//  - VECL/EBAL/CA1/CB1 strobes, the PIA select with VPA, the PIA
//    interrupt request and its acknowledge through the daisy chain.
module tb_eib;
  import eib_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  logic clk = 0;
  always #31 clk = ~clk;

  logic rst_n;
  logic [6:0] base_sw;
  logic [3:0] dly_sw;
  logic [23:1] ma;
  logic mas_n, muds_n, mlds_n, mrw;
  logic [15:0] md_wr, md_rd;
  logic md_oe, mdtack_n, mvpa_n, mirq_n, iain_n, iaout_n;
  logic pia_cs_n, pia_ca1_n, pia_cb1_n, pia_irqa_n, pia_irqb_n;
  logic [7:0] pa;
  logic mtr_n, mtior_n, vecl_n, ebal_n, mtmra_n, relwait_n, tsmr_n, tsmra_n;
  logic [23:0] ta_in;
  logic tstb_n, tuds_n, tlds_n, trw;
  logic [15:0] td_in, ta_out, td_out;
  logic ta_oe, td_oe, tubr_n, tlbr_n;

  eib dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- model personality card: bus after 2 clocks, RELWAIT after 5
  int pmc_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin pmc_cnt <= 0; mtmra_n <= 1; relwait_n <= 1; end
    else if (mtr_n) begin pmc_cnt <= 0; mtmra_n <= 1; relwait_n <= 1; end
    else begin
      pmc_cnt <= pmc_cnt + 1;
      if (pmc_cnt >= 2) mtmra_n <= 0;
      if (pmc_cnt >= 5) relwait_n <= 0;
    end
  end

  // never both granted
  always @(negedge clk) if (rst_n) check(msmra_n_of() || tsmra_n, "shared memory granted to both sides");
  function automatic logic msmra_n_of(); return dut.msmra_n; endfunction

  // ---- shared-memory model, byte addressed (even = high byte)
  logic [7:0] sm [4096];

  // target bus: the target drives td_in for its own writes; during master
  // target reads the model target memory answers with a function of TA
  logic [15:0] t_drive;
  logic        t_driving;
  assign td_in = t_driving ? t_drive : (ta_oe ? (ta_out ^ 16'h5A5A) : 16'hFFFF);

  // ---- master bus-functional model
  task automatic mcycle(input logic [23:0] addr, input logic rw, input logic u, input logic l,
                        input logic [15:0] wd, output logic [15:0] rd, output int clocks,
                        output logic vpa);
    @(negedge clk);
    ma = addr[23:1]; mrw = rw; md_wr = wd; mas_n = 0;
    muds_n = !u; mlds_n = !l;
    clocks = 0; vpa = 0;
    while (mdtack_n && mvpa_n && clocks < 64) begin
      @(negedge clk); clocks++;
      if (!mtr_n && !mdtack_n) check(!relwait_n, "DTACK only after RELWAIT");
    end
    vpa = !mvpa_n;
    rd = md_rd;
    if (rw && clocks < 64 && !vpa) check(md_oe, "board drives the data bus on a read");
    @(negedge clk);
    mas_n = 1; muds_n = 1; mlds_n = 1; mrw = 1;
    @(negedge clk);
    check(mdtack_n, "DTACK negated after AS");
  endtask

  task automatic mwr(input logic [23:0] addr, input logic [15:0] wd, input logic u = 1, input logic l = 1);
    logic [15:0] rd; int c; logic v;
    mcycle(addr, 0, u, l, wd, rd, c, v);
    check(c < 64, $sformatf("master write %h answered", addr));
  endtask

  task automatic mrd(input logic [23:0] addr, output logic [15:0] rd);
    int c; logic v;
    mcycle(addr, 1, 1, 1, 16'h0, rd, c, v);
    check(c < 64, $sformatf("master read %h answered", addr));
  endtask

  // ---- target shared-memory cycle
  task automatic tcycle(input logic [23:0] addr, input logic rw, input logic u, input logic l,
                        input logic [15:0] wd, output logic [15:0] rd);
    int k;
    @(negedge clk);
    ta_in = addr; trw = rw; tstb_n = 0; tuds_n = !u; tlds_n = !l;
    t_drive = wd; t_driving = !rw;
    #1 check(!tsmr_n, $sformatf("TSMR for %h", addr));
    k = 0;
    while (tsmra_n && k < 200) begin @(negedge clk); k++; end
    check(!tsmra_n, "target granted");
    if (rw) check(td_oe, "board drives the target data bus on a read");
    if (pa[0]) check(tubr_n == addr[0] && tlbr_n == !addr[0], "byte lane request from TA0");
    rd = td_out;
    @(negedge clk);
    tstb_n = 1; tuds_n = 1; tlds_n = 1; trw = 1; t_driving = 0;
    @(negedge clk);
  endtask

  localparam logic [23:0] WIN = 24'h860000;

  initial begin
    logic [15:0] rd;
    int c; logic v;
    rst_n = 0; base_sw = 7'h43; dly_sw = 0;
    ma = '0; mas_n = 1; muds_n = 1; mlds_n = 1; mrw = 1; md_wr = 0; iain_n = 1;
    pia_irqa_n = 1; pia_irqb_n = 1; pa = 8'b0000_0010;   // 16-bit target, shared memory enabled
    ta_in = 24'hFFFFFF; tstb_n = 1; tuds_n = 1; tlds_n = 1; trw = 1; t_drive = 0; t_driving = 0;
    repeat (3) @(negedge clk); rst_n = 1;

    // outside the window: no answer
    mcycle(24'h840000, 1, 1, 1, 0, rd, c, v);
    check(c == 64 && !v, "no answer outside the window");
    base_sw = 7'h42;
    mcycle(WIN, 1, 1, 1, 0, rd, c, v);
    check(c == 64, "base switch moves the window");
    base_sw = 7'h43;

    // DTACK delay switch
    for (int d = 0; d < 16; d++) begin
      dly_sw = 4'(d);
      mcycle(WIN + 24'h10, 1, 1, 1, 0, rd, c, v);
      check(c == d + 2, $sformatf("DTACK delay %0d gives %0d clocks", d, c));
    end
    dly_sw = 1;

    // shared-memory base latch: target area 010000-010FFF
    mwr(WIN + 24'h4000, 16'h0020);
    mrd(WIN + 24'h4000, rd);
    check(rd == 16'h0020, "base latch read back");

    // master fills the shared memory
    for (int i = 0; i < 4096; i += 2) begin
      logic [15:0] w;
      w = 16'($urandom);
      mwr(WIN + 24'(i), w);
      sm[i] = w[15:8]; sm[i + 1] = w[7:0];
    end
    // random master and target accesses, 16-bit target
    for (int n = 0; n < 300; n++) begin
      logic [11:0] a; logic [15:0] w; logic u, l;
      a = 12'($urandom) & 12'hFFE; w = 16'($urandom);
      u = 1'($urandom); l = !u || 1'($urandom);
      case ($urandom_range(0, 3))
        0: begin logic [15:0] r; mrd(WIN + 24'(a), r);
                 check(r == {sm[a], sm[a + 1]}, $sformatf("master read %h", a)); end
        1: begin mwr(WIN + 24'(a), w, u, l); if (u) sm[a] = w[15:8]; if (l) sm[a + 1] = w[7:0]; end
        2: begin logic [15:0] r; tcycle(24'h010000 + 24'(a), 1, 1, 1, 0, r);
                 check(r == {sm[a], sm[a + 1]}, $sformatf("target read %h", a)); end
        3: begin logic [15:0] r; tcycle(24'h010000 + 24'(a), 0, u, l, w, r);
                 if (u) sm[a] = w[15:8]; if (l) sm[a + 1] = w[7:0]; end
      endcase
    end
    // target outside its area, or shared memory disabled: no TSMR
    ta_in = 24'h011000; tstb_n = 0; #1 check(tsmr_n, "no TSMR outside the area");
    ta_in = 24'h010010; pa[1] = 0; #1 check(tsmr_n, "no TSMR while disabled");
    pa[1] = 1; tstb_n = 1;

    // simultaneous requests
    for (int n = 0; n < 50; n++) begin
      logic [11:0] a, b; logic [15:0] w1, w2, r1;
      a = 12'($urandom) & 12'hFFE; b = a ^ 12'h002; w1 = 16'($urandom); w2 = 16'($urandom);
      fork
        mwr(WIN + 24'(a), w1);
        begin repeat ($urandom_range(0, 2)) @(negedge clk); tcycle(24'h010000 + 24'(b), 0, 1, 1, w2, r1); end
      join
      sm[a] = w1[15:8]; sm[a + 1] = w1[7:0]; sm[b] = w2[15:8]; sm[b + 1] = w2[7:0];
      mrd(WIN + 24'(b), r1); check(r1 == w2, "target write survived contention");
      mrd(WIN + 24'(a), r1); check(r1 == w1, "master write survived contention");
    end

    // 8-bit target: area F800-FFFF, both bytes of each word
    pa = 8'b0000_0011;
    mwr(WIN + 24'h4000, 16'h001F);
    for (int n = 0; n < 200; n++) begin
      logic [10:0] a; logic [15:0] r; logic [7:0] w; int ba;
      a = 11'($urandom); w = 8'($urandom); ba = 2048 + int'(a);
      if ($urandom_range(0, 1)) begin
        tcycle({8'h00, 16'hF800 + 16'(a)}, 1, 1, 1, 0, r);
        check(r[7:0] == sm[ba], $sformatf("8-bit target read %h", a));
      end else begin
        tcycle({8'h00, 16'hF800 + 16'(a)}, 0, 1, 1, {8'h00, w}, r);
        sm[ba] = w;
        mrd(WIN + 24'(ba & ~1), r);
        check(r == {sm[ba & ~1], sm[ba | 1]}, "master sees the target byte");
      end
    end

    // target memory and I/O requests through the personality card
    pa = 8'b0000_0010;
    for (int n = 0; n < 40; n++) begin
      logic [15:0] a, w; logic io;
      a = 16'($urandom) & 16'hFFFE; w = 16'($urandom); io = 1'($urandom);
      fork
        begin
          if (io) mcycle(WIN + 24'h2000 + 24'(a[12:0]), 1, 1, 1, 0, rd, c, v);
          else    mcycle(WIN + 24'h10000 + 24'(a), 1, 1, 1, 0, rd, c, v);
        end
        begin
          @(negedge clk); #1;
          check(!mtr_n && (mtior_n == !io), "MTR and MTIOR");
          wait (!relwait_n); #1;
          check(ta_oe, "target address driven");
          check(ta_out == (io ? {3'b001, a[12:1], 1'b0} : {a[15:1], 1'b0}), $sformatf("target address %h", ta_out));
        end
      join
      check(c < 64 && rd == ((io ? {3'b001, a[12:1], 1'b0} : {a[15:1], 1'b0}) ^ 16'h5A5A), "target read data");
      fork
        mcycle(WIN + 24'h10000 + 24'(a), 0, 1, 1, w, rd, c, v);
        begin wait (!relwait_n); #1 check(td_oe && td_out == w, "target write data driven"); end
      join
    end

    // strobes: VECL, EBAL, CA1, CB1 answer with DTACK; PIA with VPA
    begin
      logic [23:0] off [4] = '{24'h8000, 24'hA000, 24'hC000, 24'hE000};
      for (int i = 0; i < 4; i++) begin
        fork
          mcycle(WIN + off[i], 0, 1, 1, 16'h00AA, rd, c, v);
          begin @(negedge clk); #1;
            case (i)
              0: check(!vecl_n, "VECL strobe");
              1: check(!ebal_n, "EBAL strobe");
              2: check(!pia_ca1_n, "CA1 strobe");
              3: check(!pia_cb1_n, "CB1 strobe");
            endcase
          end
        join
        check(c < 64 && !v, "strobe cycle ends with DTACK");
      end
      fork
        mcycle(WIN + 24'h6000, 1, 1, 1, 0, rd, c, v);
        begin @(negedge clk); #1 check(!pia_cs_n, "PIA chip select"); end
      join
      check(v, "PIA cycle ends with VPA");
    end

    // PIA interrupt through the daisy chain
    check(mirq_n, "no request");
    iain_n = 0; @(negedge clk) #1 check(!iaout_n, "acknowledge passed on when idle");
    iain_n = 1;
    pia_irqb_n = 0; #1 check(!mirq_n, "PIA request raised");
    ma = 23'h7FFFFF; mrw = 1; mas_n = 0; iain_n = 0;
    repeat (2) @(negedge clk);
    check(iaout_n && !mvpa_n, "acknowledge kept and autovectored");
    mas_n = 1; iain_n = 1; pia_irqb_n = 1;
    @(negedge clk) check(mvpa_n && mirq_n, "acknowledge ended");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
