// tb_z80_pia_ctrl: exhaustive check of the PIA command decoder over all
// port A values (command in A7..A5, INT and NMI enables in A3 and A4) and
// of the status bits returned on port B.
module tb_z80_pia_ctrl;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic [7:0] pa, pb;
  logic int_n, nmi_n, reset_n, busack_n, busreq_n, halt_n;
  logic tint_n, tnmi_n, treset_n, tbusreq_n;
  z80_pia_ctrl dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      logic [2:0] c;
      pa = 8'(i); c = pa[7:5];
      {int_n, nmi_n, reset_n, busack_n, busreq_n, halt_n} = 6'($urandom);
      #1;
      check(tint_n    == !(c == 3'b001 && pa[3]), $sformatf("INT for PA=%h", pa));
      check(tnmi_n    == !(c == 3'b010 && pa[4]), $sformatf("NMI for PA=%h", pa));
      check(treset_n  == !(c == 3'b011), $sformatf("RESET for PA=%h", pa));
      check(tbusreq_n == !(c == 3'b100), $sformatf("BUSREQ for PA=%h", pa));
      check(pb[5:0] == {halt_n, busreq_n, busack_n, reset_n, nmi_n, int_n}, "status on port B");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
