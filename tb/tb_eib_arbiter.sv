// tb_eib_arbiter: directed first-come-first-served cases (single requests,
// simultaneous requests, a request arriving while the memory is in use)
// with one-clock grant latency checks, then a random run compared cycle by
// cycle with a reference model of the arbiter.
module tb_eib_arbiter;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0;
  always #31 clk = ~clk;   // about 16 MHz
  logic rst_n, msmr_n, tsmr_n, msmra_n, tsmra_n;

  eib_arbiter dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: 0 idle, 1 master, 2 target
  int ref_st = 0;
  always @(posedge clk) begin
    if (!rst_n) ref_st <= 0;
    else case (ref_st)
      0: ref_st <= (!msmr_n) ? 1 : (!tsmr_n) ? 2 : 0;
      1: ref_st <= msmr_n ? 0 : 1;
      2: ref_st <= tsmr_n ? 0 : 2;
      default: ref_st <= 0;
    endcase
  end

  initial begin
    rst_n = 0; msmr_n = 1; tsmr_n = 1;
    repeat (2) @(negedge clk); rst_n = 1;
    // master alone: granted at the next edge
    @(negedge clk) msmr_n = 0;
    check(msmra_n == 1, "no grant before the edge");
    @(negedge clk) check(msmra_n == 0 && tsmra_n == 1, "master granted after one clock");
    // target arrives while master owns memory: waits
    tsmr_n = 0;
    repeat (3) @(negedge clk) check(tsmra_n == 1 && msmra_n == 0, "target waits while master owns");
    msmr_n = 1;
    @(negedge clk) check(msmra_n == 1 && tsmra_n == 1, "released, idle for one clock");
    @(negedge clk) check(tsmra_n == 0, "waiting target granted");
    // master arrives while target owns
    msmr_n = 0;
    repeat (2) @(negedge clk) check(msmra_n == 1, "master waits");
    tsmr_n = 1;
    @(negedge clk); @(negedge clk) check(msmra_n == 0, "master granted after target");
    msmr_n = 1;
    repeat (2) @(negedge clk);
    // simultaneous: master wins by default
    msmr_n = 0; tsmr_n = 0;
    @(negedge clk) check(msmra_n == 0 && tsmra_n == 1, "tie goes to master");
    msmr_n = 1; tsmr_n = 1;
    repeat (2) @(negedge clk);
    // random run against the model
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      check(msmra_n == (ref_st != 1) && tsmra_n == (ref_st != 2), $sformatf("model match at %0d", i));
      check(msmra_n || tsmra_n, "never both granted");
      if ($urandom_range(0, 3) == 0) msmr_n = ~msmr_n;
      if ($urandom_range(0, 3) == 0) tsmr_n = ~tsmr_n;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
