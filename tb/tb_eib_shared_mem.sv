// tb_eib_shared_mem: random master and target accesses (word and byte,
// 8-bit and 16-bit target modes) compared with a byte-array model of the
// 4 KB memory; checks the byte-lane steering for an 8-bit target, the
// TUBR/TLBR outputs and that an ungranted port cannot write.
module tb_eib_shared_mem;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0;
  always #31 clk = ~clk;
  logic eight_bit, msmra_n, muds_n, mlds_n, mrw, tsmra_n, tuds_n, tlds_n, trw, tubr_n, tlbr_n;
  logic [11:1] ma;
  logic [11:0] ta;
  logic [15:0] mwdata, mrdata, twdata, trdata;

  eib_shared_mem dut (.*);

  logic [7:0] model [4096];   // byte address, even = high byte

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    msmra_n = 1; tsmra_n = 1; muds_n = 1; mlds_n = 1; tuds_n = 1; tlds_n = 1; mrw = 1; trw = 1;
  endtask

  task automatic mwrite(input logic [11:1] a, input logic [15:0] d, input logic u, input logic l);
    @(negedge clk); idle(); msmra_n = 0; ma = a; mwdata = d; mrw = 0; muds_n = !u; mlds_n = !l;
    @(negedge clk); idle();
    if (u) model[{a, 1'b0}] = d[15:8];
    if (l) model[{a, 1'b1}] = d[7:0];
  endtask

  task automatic mread(input logic [11:1] a);
    @(negedge clk); idle(); msmra_n = 0; ma = a; mrw = 1; muds_n = 0; mlds_n = 0;
    #1 check(mrdata == {model[{a, 1'b0}], model[{a, 1'b1}]}, $sformatf("master read %h", a));
    @(negedge clk); idle();
  endtask

  task automatic twrite(input logic [11:0] a, input logic [15:0] d, input logic u, input logic l);
    @(negedge clk); idle(); tsmra_n = 0; ta = a; twdata = d; trw = 0;
    if (eight_bit) begin
      tuds_n = 0; tlds_n = 0;
      #1 check(tubr_n == a[0] && tlbr_n == !a[0], "TUBR/TLBR from TA0");
    end else begin tuds_n = !u; tlds_n = !l; end
    @(negedge clk); idle();
    if (eight_bit) model[a] = d[7:0];
    else begin
      if (u) model[{a[11:1], 1'b0}] = d[15:8];
      if (l) model[{a[11:1], 1'b1}] = d[7:0];
    end
  endtask

  task automatic tread(input logic [11:0] a);
    @(negedge clk); idle(); tsmra_n = 0; ta = a; trw = 1; tuds_n = 0; tlds_n = 0;
    #1;
    if (eight_bit) check(trdata[7:0] == model[a], $sformatf("8-bit target read %h", a));
    else check(trdata == {model[{a[11:1], 1'b0}], model[{a[11:1], 1'b1}]}, $sformatf("16-bit target read %h", a));
    @(negedge clk); idle();
  endtask

  initial begin
    idle(); eight_bit = 0; ma = 0; ta = 0; mwdata = 0; twdata = 0;
    for (int i = 0; i < 2048; i++) mwrite(11'(i), 16'(i * 7 + 3), 1, 1);
    // ungranted writes do nothing
    @(negedge clk); idle(); ma = 11'h10; mwdata = 16'hDEAD; mrw = 0; muds_n = 0; mlds_n = 0;
    @(negedge clk); idle(); mread(11'h10);
    // the 8-bit target reaches both bytes of a word the master wrote
    eight_bit = 1;
    mwrite(11'h400, 16'hA55A, 1, 1);
    tread(12'h800); check(trdata[7:0] == 8'hA5, "even byte is the high byte");
    tread(12'h801); check(trdata[7:0] == 8'h5A, "odd byte is the low byte");
    twrite(12'h801, 16'h00C3, 0, 1); mread(11'h400); check(mrdata == 16'hA5C3, "target byte lands in low lane");
    for (int i = 0; i < 6000; i++) begin
      logic [11:0] a;
      a = 12'($urandom);
      eight_bit = 1'($urandom);
      case ($urandom_range(0, 3))
        0: mwrite(a[11:1], 16'($urandom), 1'($urandom), 1'($urandom));
        1: mread(a[11:1]);
        2: twrite(a, 16'($urandom), 1'($urandom), 1'($urandom));
        3: tread(a);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
