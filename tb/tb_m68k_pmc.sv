// tb_m68k_pmc: bench for the MC68000 personality card with a model
// target 68000 that grants the bus after a random delay and sometimes
// finishes a cycle of its own first. Checks the BR/BG/BGACK sequence for
// master requests, MTMRA and RELWAIT, the strobe buffer, the extra byte
// address latch, TWAIT for target shared-memory reads and writes, and the
// interrupt, halt and reset commands with VECEN in the acknowledge.
module tb_m68k_pmc;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask
  logic clk = 0;
  always #62 clk = ~clk;
  logic rst_n, mtr_n, mrw, mas_n, muds_n, mlds_n, ebal_n, tsmr_n, tsmra_n;
  logic [7:0] pd, pa, pb, ta_hi;
  logic mtmra_n, relwait_n, tbg_n, tas_n, tdtack_n, tbgack_in_n, trw, tintack_n;
  logic bus_int_n, bus_halt_n, bus_reset_n, tbr_n, tbgack_n, twait_n, tint_n, vecen_n;
  logic thalt_n, treset_n, strb_oe, t_rw, t_as_n, t_uds_n, t_lds_n, mdtack_n, t_dtack_n;
  m68k_pmc dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; mtr_n = 1; mrw = 1; mas_n = 1; muds_n = 1; mlds_n = 1; mdtack_n = 1; ebal_n = 1;
    tsmr_n = 1; tsmra_n = 1; pd = 0; pa = 0; tbg_n = 1; tas_n = 1; tdtack_n = 1;
    tbgack_in_n = 1; trw = 1; tintack_n = 1; bus_int_n = 1; bus_halt_n = 1; bus_reset_n = 1;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk) check(tbr_n && tbgack_n && !strb_oe && twait_n, "idle");

    // extra byte address latch
    for (int n = 0; n < 20; n++) begin
      logic [7:0] v;
      v = 8'($urandom);
      @(negedge clk) ebal_n = 0; mrw = 0; pd = v;
      @(negedge clk) ebal_n = 1; mrw = 1; pd = 8'($urandom);
      check(ta_hi == v, "TA23..TA16 latched");
      @(negedge clk) ebal_n = 0;
      @(negedge clk) ebal_n = 1;
      check(ta_hi == v, "latch kept on a read of the strobe");
    end

    // master requests for the target bus
    for (int n = 0; n < 200; n++) begin
      int k;
      logic busy;
      busy = 1'($urandom);
      tas_n = !busy; tdtack_n = !busy;
      mas_n = 0; muds_n = 1'($urandom); mlds_n = 1'($urandom); mrw = 1'($urandom);
      mtr_n = 0;
      @(negedge clk) check(!tbr_n, "BR");
      mdtack_n = 1'($urandom);
      #1 check(t_as_n && t_dtack_n && !strb_oe, "strobes not driven before BGACK");
      repeat ($urandom_range(0, 4)) @(negedge clk);
      tbg_n = 0;
      if (busy) begin
        repeat (3) @(negedge clk) check(tbgack_n, "no BGACK while the target's cycle runs");
        tas_n = 1; tdtack_n = 1;
      end
      k = 0;
      while (tbgack_n && k < 10) begin @(negedge clk); k++; end
      check(k <= 1, "BGACK once the bus is free");
      check(tbr_n && !mtmra_n && !relwait_n, "MTMRA and RELWAIT with BGACK");
      check(strb_oe && t_as_n == mas_n && t_uds_n == muds_n && t_lds_n == mlds_n && t_rw == mrw,
            "master strobes on the target bus");
      check(t_dtack_n == mdtack_n, "master DTACK on the target bus");
      mdtack_n = !mdtack_n;
      #1 check(t_dtack_n == mdtack_n, "master DTACK follows");
      mdtack_n = 1;
      tbg_n = 1;
      @(negedge clk);
      mtr_n = 1; mas_n = 1; muds_n = 1; mlds_n = 1; mrw = 1;
      @(negedge clk) check(tbgack_n && !strb_oe && relwait_n, "bus returned");
    end

    // TWAIT
    for (int n = 0; n < 100; n++) begin
      int k;
      trw = 1'($urandom); tsmr_n = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
      tsmra_n = 0;
      k = 0;
      while (twait_n && k < 20) begin @(negedge clk); k++; end
      check(k == (trw ? 2 : 3), $sformatf("TWAIT after %0d clocks", k));
      tsmr_n = 1; tsmra_n = 1;
      @(negedge clk) check(twait_n, "TWAIT ends");
    end

    // interrupt, halt, reset
    pa = 8'b0010_0000;
    repeat (2) @(negedge clk) check(!tint_n, "TINT");
    tintack_n = 0;
    repeat (2) @(negedge clk);
    check(tint_n && !vecen_n, "VECEN in the acknowledge");
    tintack_n = 1;
    repeat (2) @(negedge clk) check(tint_n && vecen_n, "request spent");
    pa = 8'b0100_0000;
    repeat (2) @(negedge clk) check(!thalt_n && treset_n, "HALT");
    pa = 8'b0110_0000;
    repeat (2) @(negedge clk) check(!thalt_n && !treset_n, "RESET");
    pa = 0;
    repeat (2) @(negedge clk) check(thalt_n && treset_n && tint_n, "home");
    for (int n = 0; n < 8; n++) begin
      {bus_reset_n, bus_halt_n, bus_int_n} = 3'(n);
      #1 check(pb[2:0] == 3'(n), "port B status");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
