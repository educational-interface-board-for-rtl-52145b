// tb_m68k_twait_fsm: random 68000 target reads and writes to the shared
// memory with a random arbiter grant delay. Checks that TWAIT comes
// exactly READ_CYCLES (WRITE_CYCLES) clocks after the grant, stays until
// the cycle ends, and is negated when it ends.
module tb_m68k_twait_fsm;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask
  localparam int unsigned RC = 2, WC = 3;
  logic clk = 0;
  always #62 clk = ~clk;
  logic rst_n, tsmr_n, tsmra_n, trw, twait_n;
  m68k_twait_fsm #(.READ_CYCLES(RC), .WRITE_CYCLES(WC)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; tsmr_n = 1; tsmra_n = 1; trw = 1;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      int k;
      trw = 1'($urandom); tsmr_n = 0;
      repeat ($urandom_range(0, 5)) @(negedge clk) check(twait_n, "no TWAIT before the grant");
      tsmra_n = 0;
      k = 0;
      while (twait_n && k < 20) begin @(negedge clk); k++; end
      check(k == (trw ? RC : WC), $sformatf("TWAIT after %0d clocks for %s", k, trw ? "read" : "write"));
      repeat ($urandom_range(0, 3)) @(negedge clk) check(!twait_n, "TWAIT held");
      tsmr_n = 1; if ($urandom_range(0, 1)) tsmra_n = 1;
      @(negedge clk) check(twait_n, "TWAIT ends with the cycle");
      tsmra_n = 1;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
