// tb_m68k_target_dtack: for every link setting, runs 68000 cycles of
// random length and checks that DTACK appears for on-board memory exactly
// lk_dtack+1 clocks after the data strobe, that BERR appears lk_berr+1
// clocks after the strobe when no DTACK is on the bus, and that both are
// removed with the strobe.
module tb_m68k_target_dtack;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask
  logic clk = 0;
  always #62 clk = ~clk;
  logic rst_n, uds_n, lds_n, mem_n, bus_dtack_n, dtack_n, berr_n;
  logic [2:0] lk_dtack, lk_berr;
  m68k_target_dtack dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; uds_n = 1; lds_n = 1; mem_n = 1; bus_dtack_n = 1; lk_dtack = 0; lk_berr = 7;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int kd, kb, len;
      lk_dtack = 3'($urandom); lk_berr = 3'($urandom);
      mem_n = 1'($urandom);
      {uds_n, lds_n} = 2'($urandom_range(0, 2));
      kd = -1; kb = -1;
      len = $urandom_range(1, 10);
      for (int c = 0; c <= len; c++) begin
        bus_dtack_n = dtack_n;      // only this board answers in this bench
        #1;
        if (kd < 0 && !dtack_n) kd = c;
        if (kb < 0 && !berr_n) kb = c;
        @(negedge clk);
      end
      if (!mem_n) check(kd == ((lk_dtack + 1 <= len) ? lk_dtack + 1 : -1), $sformatf("DTACK at %0d, link %0d", kd, lk_dtack));
      else        check(kd == -1, "no DTACK for off-board addresses");
      if (mem_n) check(kb == ((lk_berr + 1 <= len) ? lk_berr + 1 : -1), $sformatf("BERR at %0d, link %0d", kb, lk_berr));
      else check(kb == -1 || kb < kd || kd == -1, "BERR only while no DTACK");
      uds_n = 1; lds_n = 1;
      #1 check(dtack_n && berr_n, "released with the strobe");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
