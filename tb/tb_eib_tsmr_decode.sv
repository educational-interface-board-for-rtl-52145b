// tb_eib_tsmr_decode: loads shared-memory bases into the latch and checks
// TSMR for addresses inside, at the edges of and outside the 2 KB (8-bit)
// and 4 KB (16-bit) windows, with the strobe and the enable toggled.
module tb_eib_tsmr_decode;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, wr, tstb_n, sm_en, eight_bit, tsmr_n;
  logic [12:0] wdata, base;
  logic [23:0] ta;

  eib_tsmr_decode dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input logic [12:0] b);
    @(negedge clk); wr = 1; wdata = b;
    @(negedge clk); wr = 0;
    check(base == b, "base latched");
  endtask

  function automatic bit model(input logic [23:0] a, input logic [12:0] b, input bit eb, input bit en, input bit stb_n);
    logic [23:0] lo, hi;
    if (eb) begin lo = {b, 11'h000}; hi = lo + 24'h7FF; end
    else    begin lo = {b[12:1], 12'h000}; hi = lo + 24'hFFF; end
    return !(en && !stb_n && a >= lo && a <= hi);
  endfunction

  initial begin
    rst_n = 0; wr = 0; wdata = 0; ta = 0; tstb_n = 1; sm_en = 1; eight_bit = 1;
    #12 rst_n = 1;
    // Z80 target: shared area F800-FFFF -> TA23..TA11 = 0x001F
    load(13'h001F);
    ta = 24'h00F800; tstb_n = 0; #1 check(tsmr_n == 0, "F800 hits");
    ta = 24'h00FFFF; #1 check(tsmr_n == 0, "FFFF hits");
    ta = 24'h00F7FF; #1 check(tsmr_n == 1, "F7FF misses");
    ta = 24'h00FC00; tstb_n = 1; #1 check(tsmr_n == 1, "no strobe no request");
    tstb_n = 0; sm_en = 0; #1 check(tsmr_n == 1, "disabled by PA1");
    sm_en = 1;
    // 68000 target: shared area 10000-10FFF -> base 0x0020
    eight_bit = 0;
    load(13'h0020);
    ta = 24'h010000; #1 check(tsmr_n == 0, "10000 hits");
    ta = 24'h010FFE; #1 check(tsmr_n == 0, "10FFE hits");
    ta = 24'h011000; #1 check(tsmr_n == 1, "11000 misses");
    ta = 24'h00FFFE; #1 check(tsmr_n == 1, "0FFFE misses");
    for (int i = 0; i < 3000; i++) begin
      logic [12:0] b;
      if (i % 100 == 0) begin b = 13'($urandom); load(b); end
      eight_bit = 1'($urandom); sm_en = ($urandom_range(0, 7) != 0); tstb_n = ($urandom_range(0, 3) == 0);
      ta = (i % 2) ? {base, 11'($urandom)} ^ (24'h1 << $urandom_range(0, 12)) : 24'($urandom);
      #1 check(tsmr_n == model(ta, base, eight_bit, sm_en, tstb_n), $sformatf("random ta=%h base=%h eb=%0d", ta, base, eight_bit));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
