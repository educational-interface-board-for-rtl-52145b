// tb_eib_irq_chain: checks the request output, the daisy-chain pass-through
// when no request is pending, the capture of the acknowledge (IAOUT held,
// VPA asserted one clock after IAIN) when a request is pending, that the
// capture lasts to the end of the cycle, and VPA for PIA accesses. A
// random phase then drives PIA requests, master cycles, acknowledges and
// PIA accesses and compares every output with a clocked reference model.
module tb_eib_irq_chain;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0;
  always #31 clk = ~clk;
  logic rst_n, irqa_n, irqb_n, iain_n, mas_n, piaen_n;
  logic mirq_n, iaout_n, mvpa_n, liack;

  eib_irq_chain dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; irqa_n = 1; irqb_n = 1; iain_n = 1; mas_n = 1; piaen_n = 1;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk) check(mirq_n == 1 && mvpa_n == 1 && iaout_n == 1, "idle");
    // acknowledge for someone else passes through
    mas_n = 0; iain_n = 0;
    @(negedge clk) check(iaout_n == 0 && mvpa_n == 1, "IAIN passed to IAOUT");
    mas_n = 1; iain_n = 1;
    @(negedge clk) check(iaout_n == 1, "IAOUT negated");
    // PIA requests
    irqa_n = 0; #1 check(mirq_n == 0, "IRQA raises request");
    irqa_n = 1; irqb_n = 0; #1 check(mirq_n == 0, "IRQB raises request");
    mas_n = 0; iain_n = 0;
    #1 check(iaout_n == 1, "acknowledge kept by requesting board");
    check(mvpa_n == 1, "VPA waits for the clock");
    @(negedge clk) check(mvpa_n == 0 && liack == 1, "VPA asserted for local IACK");
    irqb_n = 1;
    @(negedge clk) check(mvpa_n == 0 && iaout_n == 1, "capture held to the end of the cycle");
    mas_n = 1; iain_n = 1;
    @(negedge clk) check(mvpa_n == 1 && liack == 0, "released when AS negated");
    // ordinary PIA access
    mas_n = 0; piaen_n = 0;
    #1 check(mvpa_n == 0, "VPA for PIA access");
    mas_n = 1; piaen_n = 1;
    #1 check(mvpa_n == 1, "no VPA after PIA access");

    // random phase against a reference model
    begin
      logic m_liack;
      m_liack = 0;
      for (int n = 0; n < 3000; n++) begin
        @(posedge clk);
        if (mas_n) m_liack = 0;
        else if (!iain_n && (!irqa_n || !irqb_n)) m_liack = 1;
        @(negedge clk);
        // change inputs in the middle of a clock
        irqa_n = ($urandom_range(0, 3) != 0);
        irqb_n = ($urandom_range(0, 3) != 0);
        if ($urandom_range(0, 3) == 0) mas_n = !mas_n;
        iain_n  = mas_n ? 1'b1 : 1'($urandom_range(0, 2) == 0);
        piaen_n = mas_n ? 1'b1 : 1'($urandom_range(0, 3) != 0);
        #1;
        check(mirq_n == (irqa_n && irqb_n), "random: request");
        check(liack == m_liack, $sformatf("random: local IACK %b, model %b", liack, m_liack));
        check(iaout_n == (iain_n || !irqa_n || !irqb_n || m_liack), "random: IAOUT");
        check(mvpa_n == !(m_liack || (!piaen_n && !mas_n)), "random: VPA");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
