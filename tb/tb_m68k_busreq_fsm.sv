// tb_m68k_busreq_fsm: random master requests against a model 68000 that
// grants the bus after a random delay and finishes its current cycle
// (AS and DTACK) a random time after the grant, with another bus master
// sometimes holding BGACK. Checks that BR is asserted on request, that
// BGACK is taken only when BG is asserted and AS, DTACK and the other
// BGACK are all negated, that BR is dropped when BGACK is taken, and that
// BGACK is released when the request ends.
module tb_m68k_busreq_fsm;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask
  logic clk = 0;
  always #62 clk = ~clk;
  logic rst_n, mtr_n, tbg_n, tas_n, tdtack_n, tbgack_in_n, tbr_n, tbgack_n;
  m68k_busreq_fsm dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic prev_bgack_n = 1;
  logic ok_to_take;
  always @(posedge clk) begin
    ok_to_take <= !tbg_n && tas_n && tdtack_n && tbgack_in_n;
    prev_bgack_n <= tbgack_n;
  end
  always @(negedge clk) if (rst_n && prev_bgack_n && !tbgack_n)
    check(ok_to_take, "BGACK taken only with BG and a free bus");

  initial begin
    rst_n = 0; mtr_n = 1; tbg_n = 1; tas_n = 1; tdtack_n = 1; tbgack_in_n = 1;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk) check(tbr_n && tbgack_n, "idle after reset");
    for (int n = 0; n < 400; n++) begin
      int k;
      tas_n = 1'($urandom); tdtack_n = tas_n ? 1'b1 : 1'($urandom);
      tbgack_in_n = ($urandom_range(0, 3) != 0);
      mtr_n = 0;
      @(negedge clk) check(!tbr_n && tbgack_n, "BR follows MTR");
      repeat ($urandom_range(0, 4)) @(negedge clk) check(!tbr_n, "BR held");
      tbg_n = 0;
      repeat ($urandom_range(0, 4)) begin
        @(negedge clk);
        check(tbgack_n == 1'b1 || (tas_n && tdtack_n && tbgack_in_n), "bus still busy");
      end
      tas_n = 1; tdtack_n = 1; tbgack_in_n = 1;
      k = 0;
      while (tbgack_n && k < 10) begin @(negedge clk); k++; end
      check(k <= 1, "BGACK once the bus is free");
      check(tbr_n, "BR dropped with BGACK");
      tbg_n = 1;
      repeat ($urandom_range(1, 5)) @(negedge clk) check(!tbgack_n, "BGACK held while requested");
      mtr_n = 1;
      @(negedge clk) check(tbgack_n && tbr_n, "BGACK released");
    end
    // request withdrawn before the grant
    mtr_n = 0; @(negedge clk); mtr_n = 1; @(negedge clk);
    check(tbr_n && tbgack_n, "withdrawn request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
