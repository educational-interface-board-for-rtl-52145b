// tb_eib_buffer_ctrl: exhaustive check of all 512 input combinations of
// the buffer enable and direction logic against the rules written out
// independently in the testbench.
module tb_eib_buffer_ctrl;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic msmra_n, mtmra_n, tsmra_n, mas_n, muds_n, mlds_n, mrw, trw, pa0;
  logic maden_n, lden_n, hden_n, len_n, hen_n, tdir;

  eib_buffer_ctrl dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      bit mown, town, mt;
      {msmra_n, mtmra_n, tsmra_n, mas_n, muds_n, mlds_n, mrw, trw, pa0} = 9'(v);
      #1;
      mown = (msmra_n == 0) || (mtmra_n == 0);
      mt   = (mtmra_n == 0);
      town = (tsmra_n == 0);
      check(maden_n == !(mown && mas_n == 0),  $sformatf("MADEN v=%0d", v));
      check(lden_n  == !(mown && mlds_n == 0), $sformatf("LDEN v=%0d", v));
      check(hden_n  == !(mown && muds_n == 0), $sformatf("HDEN v=%0d", v));
      check(len_n   == !(mt || town),          $sformatf("LEN v=%0d", v));
      check(hen_n   == !((mt || town) && pa0 == 0), $sformatf("HEN v=%0d", v));
      check(tdir    == ((mt && mrw == 0) || (town && trw == 1)), $sformatf("DIR v=%0d", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
