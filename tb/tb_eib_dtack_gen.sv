// tb_eib_dtack_gen: for every DIP-switch delay, checks that DTACK falls
// exactly delay+1 clocks after the access becomes ready, stays asserted
// while AS is asserted (even if ready goes away) and is negated when AS is
// negated; also checks that DTACK never comes without ready.
module tb_eib_dtack_gen;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0;
  always #31 clk = ~clk;
  logic rst_n, mas_n, ready, mdtack_n;
  logic [3:0] dly_sw;

  eib_dtack_gen dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; mas_n = 1; ready = 0; dly_sw = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int d = 0; d < 16; d++) begin
      int n;
      dly_sw = 4'(d);
      @(negedge clk) mas_n = 0;
      repeat (3) @(negedge clk) check(mdtack_n == 1, "no DTACK before ready");
      ready = 1;
      n = 0;
      while (mdtack_n && n < 40) begin @(negedge clk); n++; end
      check(n == d + 1, $sformatf("delay %0d gives %0d clocks", d, n));
      ready = 0;
      repeat (2) @(negedge clk) check(mdtack_n == 0, "DTACK held until AS negated");
      mas_n = 1;
      @(negedge clk) check(mdtack_n == 1, "DTACK negated after AS");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
