// tb_z80_vector: writes random vectors into the latch and checks that the
// value is driven only in Z80 interrupt acknowledge cycles (M1 with IORQ)
// and that it survives other Z80 cycles.
module tb_z80_vector;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic clk = 0;
  always #62 clk = ~clk;
  logic rst_n, vecl_wr, m1_n, iorq_n, td_oe;
  logic [7:0] pd, td_out;
  z80_vector dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v;
    rst_n = 0; vecl_wr = 0; m1_n = 1; iorq_n = 1; pd = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    v = 8'h00;
    for (int n = 0; n < 1000; n++) begin
      if ($urandom_range(0, 1)) begin
        v = 8'($urandom); pd = v; vecl_wr = 1;
        @(negedge clk) vecl_wr = 0; pd = 8'($urandom);
      end
      {m1_n, iorq_n} = 2'($urandom);
      #1 check(td_oe == (!m1_n && !iorq_n), "vector driven only in M1 with IORQ");
      if (td_oe) check(td_out == v, "vector value");
      @(negedge clk); m1_n = 1; iorq_n = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
