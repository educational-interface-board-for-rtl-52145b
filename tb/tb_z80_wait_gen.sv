// tb_z80_wait_gen: random Z80 shared-memory cycles with a random arbiter
// grant delay. Checks that WAIT is asserted from TSMR, stays asserted for
// WAIT_CYCLES clocks after the grant at the least, and is negated once
// both have run out, and that no WAIT appears without TSMR.
module tb_z80_wait_gen;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  localparam int unsigned WC = 4;
  logic clk = 0;
  always #62 clk = ~clk;
  logic rst_n, tsmr_n, tsmra_n, twait_n;
  z80_wait_gen #(.WAIT_CYCLES(WC)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; tsmr_n = 1; tsmra_n = 1;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk) check(twait_n, "no WAIT when idle");
    for (int n = 0; n < 500; n++) begin
      int g, k;
      tsmr_n = 0;
      #1 check(!twait_n, "WAIT from TSMR");
      g = $urandom_range(0, 8);
      repeat (g) @(negedge clk) check(!twait_n, "WAIT while not granted");
      tsmra_n = 0; #1;
      k = 0;
      while (!twait_n && k < 30) begin @(negedge clk); k++; end
      check(k == ((g >= WC) ? 0 : WC - g), $sformatf("WAIT ended %0d clocks after grant (grant after %0d)", k, g));
      repeat ($urandom_range(0, 3)) @(negedge clk) check(twait_n, "WAIT stays negated");
      tsmr_n = 1; tsmra_n = 1;
      repeat ($urandom_range(1, 3)) @(negedge clk) check(twait_n, "idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
