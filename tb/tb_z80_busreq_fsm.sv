// tb_z80_busreq_fsm: drives random master read and write requests through
// the bus-request sequencer with a Z80 that answers BUSREQ after a random
// number of clocks and a master that asserts DTACK a random time after
// RELWAIT. Checks BUSREQ on request, RELWAIT exactly RELWAIT_CYCLES clocks
// after BUSACK, BUSREQ held to the end of DTACK on reads and dropped at
// DTACK on writes, and the return to idle.
module tb_z80_busreq_fsm;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  localparam int unsigned RW = 4;
  logic clk = 0;
  always #62 clk = ~clk;
  logic rst_n, mtr_n, trw, mdtack_n, busack_n, tbusreq_n, relwait_n, mtmra_n;

  z80_busreq_fsm #(.RELWAIT_CYCLES(RW)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; mtr_n = 1; trw = 1; mdtack_n = 1; busack_n = 1;
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (2) @(negedge clk);
    check(tbusreq_n && relwait_n && mtmra_n, "idle after reset");
    for (int n = 0; n < 400; n++) begin
      int d, k;
      trw = 1'($urandom); mtr_n = 0;
      @(negedge clk) check(!tbusreq_n, "BUSREQ follows MTR");
      d = $urandom_range(0, 6);
      repeat (d) @(negedge clk) check(!tbusreq_n && relwait_n, "waiting for BUSACK");
      busack_n = 0;
      #1 check(!mtmra_n, "MTMRA follows BUSACK");
      k = 0;
      while (relwait_n && k < 20) begin @(negedge clk); k++; end
      check(k == RW + 1, $sformatf("RELWAIT %0d clocks after BUSACK (want %0d)", k, RW + 1));
      repeat ($urandom_range(0, 3)) @(negedge clk) check(!relwait_n && !tbusreq_n, "RELWAIT held until DTACK");
      mdtack_n = 0;
      @(negedge clk);
      if (trw) begin
        check(!tbusreq_n, "read: BUSREQ held while DTACK asserted");
        repeat ($urandom_range(0, 2)) @(negedge clk) check(!tbusreq_n, "read hold");
        mdtack_n = 1; mtr_n = 1;
        @(negedge clk) check(tbusreq_n, "read: BUSREQ released after DTACK negated");
      end else begin
        check(tbusreq_n, "write: BUSREQ released at DTACK");
        mdtack_n = 1; mtr_n = 1;
        @(negedge clk);
      end
      check(relwait_n, "RELWAIT negated at the end");
      busack_n = 1;
      repeat ($urandom_range(1, 3)) @(negedge clk) check(tbusreq_n && relwait_n, "idle between cycles");
    end
    // back-to-back reads: DTACK and MTR end at the same edge and the next
    // request follows one clock later
    for (int n = 0; n < 20; n++) begin
      trw = 1; mtr_n = 0;
      @(negedge clk); busack_n = 0;
      while (relwait_n) @(negedge clk);
      mdtack_n = 0;
      @(negedge clk); check(!tbusreq_n, "read hold");
      mdtack_n = 1; mtr_n = 1;
      @(negedge clk); busack_n = 1; mtr_n = 0;
      repeat (2) @(negedge clk);
      check(!tbusreq_n, "next request after a one-clock gap gets BUSREQ");
      mtr_n = 1;
      repeat (2) @(negedge clk);
    end
    // request withdrawn before BUSACK
    mtr_n = 0; @(negedge clk); mtr_n = 1; @(negedge clk); @(negedge clk);
    check(tbusreq_n, "withdrawn request releases BUSREQ");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
