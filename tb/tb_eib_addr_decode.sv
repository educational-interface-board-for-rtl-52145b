// tb_eib_addr_decode: checks the master address decoder against an
// independent model of the interface window (base on A23..A17, MTMR on
// A16 = 1, eight 8 KB strobes on A15..A13) for fixed corner addresses and
// random addresses, with the strobe both asserted and negated.
module tb_eib_addr_decode;
  import eib_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [23:1] ma;
  logic        mas_n;
  logic [6:0]  base_sw;
  logic        match, mtr_n;
  eib_sel_t    sel;

  eib_addr_decode dut (.ma, .mas_n, .base_sw, .match, .sel, .mtr_n);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input logic [23:0] addr, input logic as_n, input logic [6:0] sw);
    logic [8:0] exp;   // {msmr,tio,tacc,piaen,vecl,ebal,ca1,cb1,mtmr}, active low
    bit in;
    ma = addr[23:1]; mas_n = as_n; base_sw = sw;
    #1;
    in  = !as_n && addr[23:17] == sw;
    exp = '1;
    if (in) begin
      if (addr[16]) exp[0] = 1'b0;
      else          exp[8 - addr[15:13]] = 1'b0;
    end
    check(match == in, $sformatf("match at %h", addr));
    check(sel == exp, $sformatf("sel at %h: got %b exp %b", addr, sel, exp));
    check(mtr_n == (exp[0] & exp[7]), $sformatf("mtr at %h", addr));
  endtask

  initial begin
    // the document's window 860000-87FFFF with switches at 43h
    try(24'h860000, 0, 7'h43); check(sel.msmr_n == 0, "860000 is MSMR");
    try(24'h862000, 0, 7'h43); check(sel.tio_n == 0 && mtr_n == 0, "862000 is TIO");
    try(24'h864000, 0, 7'h43); check(sel.tacc_n == 0, "864000 is TACC");
    try(24'h866000, 0, 7'h43); check(sel.piaen_n == 0, "866000 is PIAEN");
    try(24'h868000, 0, 7'h43); check(sel.vecl_n == 0, "868000 is VECL");
    try(24'h86A000, 0, 7'h43); check(sel.ebal_n == 0, "86A000 is EBAL");
    try(24'h86C000, 0, 7'h43); check(sel.piaca1_n == 0, "86C000 is CA1");
    try(24'h86E000, 0, 7'h43); check(sel.piacb1_n == 0, "86E000 is CB1");
    try(24'h870000, 0, 7'h43); check(sel.mtmr_n == 0 && mtr_n == 0, "870000 is MTMR");
    try(24'h87FFFE, 0, 7'h43); check(sel.mtmr_n == 0, "87FFFE is MTMR");
    try(24'h85FFFE, 0, 7'h43); check(!match, "85FFFE outside");
    try(24'h880000, 0, 7'h43); check(!match, "880000 outside");
    try(24'h860000, 1, 7'h43); check(sel == EIB_SEL_IDLE, "no strobe, no select");
    for (int i = 0; i < 2000; i++) begin
      logic [23:0] a;
      logic [6:0]  sw;
      sw = (i % 3 == 0) ? 7'($urandom) : 7'h43;
      a  = {sw, 17'($urandom)};
      if (i % 5 == 0) a = 24'($urandom);
      try({a[23:1], 1'b0}, 1'($urandom_range(0, 3) == 0), sw);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
