// tb_m68k_irq_fsm: random sequences of PIA commands and target interrupt
// acknowledges, compared clock by clock with a small reference model of
// the command table (home, interrupt, halt, reset) and the
// request/acknowledge/spent sequence of the interrupt.
module tb_m68k_irq_fsm;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask
  logic clk = 0;
  always #62 clk = ~clk;
  logic rst_n, pa5, pa6, tintack_n, tint_n, vecen_n, thalt_n, treset_n;
  m68k_irq_fsm dut (.*);

  int m_state;          // 0 home, 1 request, 2 acknowledge, 3 spent
  logic [1:0] m_cmd;
  int n_int, n_ack, n_halt, n_reset;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin m_state <= 0; m_cmd <= 0; end
    else begin
      m_cmd <= {pa6, pa5};
      case (m_state)
        0: if ({pa6, pa5} == 2'b01) m_state <= 1;
        1: if ({pa6, pa5} != 2'b01) m_state <= 0; else if (!tintack_n) m_state <= 2;
        2: if (tintack_n) m_state <= 3;
        3: if ({pa6, pa5} != 2'b01) m_state <= 0;
        default: m_state <= 0;
      endcase
    end
  end

  initial begin
    rst_n = 0; pa5 = 0; pa6 = 0; tintack_n = 1;
    n_int = 0; n_ack = 0; n_halt = 0; n_reset = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      check(tint_n == (m_state != 1), "TINT");
      check(vecen_n == (m_state != 2), "VECEN");
      check(thalt_n == !(m_cmd[1]), "THALT");
      check(treset_n == !(m_cmd == 2'b11), "TRESET");
      if (!tint_n) n_int++;
      if (!vecen_n) n_ack++;
      if (!thalt_n) n_halt++;
      if (!treset_n) n_reset++;
      if ($urandom_range(0, 5) == 0) {pa6, pa5} = 2'($urandom);
      if (!tint_n && $urandom_range(0, 2) == 0) tintack_n = 0;
      else if (!tintack_n && $urandom_range(0, 1) == 0) tintack_n = 1;
    end
    check(n_int > 0 && n_ack > 0 && n_halt > 0 && n_reset > 0, "every output exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
