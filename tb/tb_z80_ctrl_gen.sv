// tb_z80_ctrl_gen: exhaustive check of the Z80 control-strobe generator
// over its four inputs against the expected MREQ/IORQ/RD/WR.
module tb_z80_ctrl_gen;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic mtr_n, mtior_n, mrw, mtra_n, mreq_n, iorq_n, rd_n, wr_n, ctrl_oe;
  z80_ctrl_gen dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      logic act;
      {mtr_n, mtior_n, mrw, mtra_n} = 4'(i);
      #1;
      act = !mtr_n && !mtra_n;
      check(ctrl_oe == !mtra_n, "drive only while the master owns the bus");
      check(mreq_n == !(act && mtior_n), $sformatf("MREQ for %b", 4'(i)));
      check(iorq_n == !(act && !mtior_n), $sformatf("IORQ for %b", 4'(i)));
      check(rd_n == !(act && mrw), $sformatf("RD for %b", 4'(i)));
      check(wr_n == !(act && !mrw), $sformatf("WR for %b", 4'(i)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
