// tb_m68k_target_irq: random sets of active interrupt sources with the
// default links, compared with a reference priority encoder (highest
// linked level wins) and the wiring of the encoder outputs to IPL2..IPL0;
// then every acknowledge level is checked for the autovector (VPA) or
// vectored (INTON) response.
module tb_m68k_target_irq;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic [9:0] src_n;
  logic intack_n, vpa_n, inton_n;
  logic [3:1] a;
  logic [2:0] ipl_n;
  m68k_target_irq dut (.*);

  // default links: source -> encoder input
  int link [10] = '{7, 6, 6, 4, 4, 3, 3, 5, 1, 2};

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int top;
      logic [2:0] t;
      src_n = (n < 1024) ? 10'(n) : 10'($urandom);
      intack_n = 1; a = 3'($urandom);
      #1;
      top = 0;
      for (int s = 0; s < 10; s++) if (!src_n[s] && link[s] > top) top = link[s];
      t = 3'(top);
      check(ipl_n == {!t[0], !t[1], !t[2]}, $sformatf("IPL for sources %b", src_n));
      check(vpa_n && inton_n, "no acknowledge response outside INTACK");
    end
    for (int l = 0; l < 8; l++) begin
      intack_n = 0; a = 3'(l);
      #1;
      check(vpa_n == !(l >= 5), $sformatf("VPA for level %0d", l));
      check(inton_n == !(l >= 1 && l <= 4), $sformatf("INTON for level %0d", l));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
