// tb_z80_pmc: bench for the Z80 personality card with a model Z80 that
// grants BUSREQ after a random delay and a model interface board that
// asserts DTACK a random time after RELWAIT. Checks the DMA sequence for
// memory and I/O reads and writes (BUSREQ, BUSACK, strobes, RELWAIT after
// 500 ns, BUSREQ release), WAIT for shared-memory cycles, the vector
// latch, every PIA command of the command table and the status on port B.
module tb_z80_pmc;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask
  logic clk = 0;
  always #62 clk = ~clk;
  logic rst_n, mtr_n, mtior_n, mrw, mdtack_n, tsmr_n, tsmra_n, vecl_n;
  logic [7:0] pd, pa, pb, tvec, ta_hi, td_hi;
  logic mtmra_n, relwait_n, busack_n, m1_n, bus_iorq_n, bus_int_n, bus_nmi_n, bus_reset_n;
  logic bus_busreq_n, bus_halt_n, tbusreq_n, tint_n, tnmi_n, treset_n, twait_n;
  logic mreq_n, iorq_n, rd_n, wr_n, ctrl_oe, tvec_oe;
  z80_pmc dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; mtr_n = 1; mtior_n = 1; mrw = 1; mdtack_n = 1; tsmr_n = 1; tsmra_n = 1;
    vecl_n = 1; pd = 0; pa = 0; busack_n = 1; m1_n = 1; bus_iorq_n = 1;
    {bus_int_n, bus_nmi_n, bus_reset_n, bus_busreq_n, bus_halt_n} = '1;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk) check(tbusreq_n && relwait_n && twait_n && !ctrl_oe, "idle");
    check(ta_hi == 0 && td_hi == 0, "upper target lines held low");

    // DMA cycles
    for (int n = 0; n < 200; n++) begin
      int k;
      logic io, rw;
      io = 1'($urandom); rw = 1'($urandom);
      mtr_n = 0; mtior_n = !io; mrw = rw;
      @(negedge clk) check(!tbusreq_n, "BUSREQ");
      repeat ($urandom_range(0, 5)) @(negedge clk) check(!ctrl_oe && relwait_n, "no drive before BUSACK");
      busack_n = 0;
      #1 check(!mtmra_n && ctrl_oe, "strobes driven after BUSACK");
      check(mreq_n == io && iorq_n == !io && rd_n == !rw && wr_n == rw, "Z80 strobes");
      k = 0;
      while (relwait_n && k < 20) begin @(negedge clk); k++; end
      check(k == 5, $sformatf("RELWAIT %0d clocks after BUSACK", k));
      repeat ($urandom_range(0, 3)) @(negedge clk);
      mdtack_n = 0;
      @(negedge clk);
      check(tbusreq_n == !rw, rw ? "read: BUSREQ kept during DTACK" : "write: BUSREQ released at DTACK");
      mdtack_n = 1; mtr_n = 1;
      @(negedge clk) check(tbusreq_n, "BUSREQ released");
      busack_n = 1;
      @(negedge clk);
    end
    mtior_n = 1;

    // WAIT for shared-memory cycles
    tsmr_n = 0;
    #1 check(!twait_n, "WAIT with TSMR");
    repeat (6) @(negedge clk) check(!twait_n, "WAIT until granted");
    tsmra_n = 0;
    #1 check(twait_n, "WAIT ends with the grant after 500 ns");
    tsmr_n = 1; tsmra_n = 1;

    // vector latch
    for (int n = 0; n < 20; n++) begin
      logic [7:0] v;
      v = 8'($urandom);
      @(negedge clk) vecl_n = 0; mrw = 0; pd = v;
      @(negedge clk) vecl_n = 1; mrw = 1; pd = 0;
      m1_n = 0; bus_iorq_n = 0;
      #1 check(tvec_oe && tvec == v, "vector given in the acknowledge cycle");
      m1_n = 1;
      #1 check(!tvec_oe, "vector only with M1");
      bus_iorq_n = 1;
    end

    // PIA commands
    for (int c = 0; c < 8; c++) begin
      for (int e = 0; e < 4; e++) begin
        pa = {3'(c), e[1], e[0], 3'b000};
        #1;
        check(tint_n == !(c == 1 && e[0]), $sformatf("INT for command %0d", c));
        check(tnmi_n == !(c == 2 && e[1]), $sformatf("NMI for command %0d", c));
        check(treset_n == !(c == 3), $sformatf("RESET for command %0d", c));
        check(tbusreq_n == !(c == 4), $sformatf("BUSREQ for command %0d", c));
      end
    end
    pa = 0;
    for (int n = 0; n < 32; n++) begin
      {bus_int_n, bus_nmi_n, bus_reset_n, busack_n, bus_busreq_n, bus_halt_n} = 6'($urandom);
      #1 check(pb[5:0] == {bus_halt_n, bus_busreq_n, busack_n, bus_reset_n, bus_nmi_n, bus_int_n}, "port B status");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
