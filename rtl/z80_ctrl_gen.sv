// z80_ctrl_gen: Z80 bus strobes for a master direct-memory-access cycle.
//
// While the master requests the target (MTR), a 2-to-4 decode of the
// request kind (memory or I/O, MTIOR) and of the master R/W gives the
// Z80-style strobes: MREQ or IORQ, and RD or WR. The strobes are driven
// onto the Z80 bus only while the master owns it (MTRA, the Z80 BUSACK);
// otherwise they float and the bus pull-ups hold them high, which the
// output enable ctrl_oe tells the bus model. Combinational.
//
// The decode and the MTRA-enabled buffer follow the original card.
module z80_ctrl_gen (
  input  logic mtr_n,      // master target request
  input  logic mtior_n,    // request is to target I/O
  input  logic mrw,        // master R/W (1 = read)
  input  logic mtra_n,     // master owns the Z80 bus
  output logic mreq_n,
  output logic iorq_n,
  output logic rd_n,
  output logic wr_n,
  output logic ctrl_oe     // strobes are driven
);

  always_comb begin
    ctrl_oe = !mtra_n;
    mreq_n  = 1'b1;
    iorq_n  = 1'b1;
    rd_n    = 1'b1;
    wr_n    = 1'b1;
    if (ctrl_oe && !mtr_n) begin
      mreq_n = !mtior_n;
      iorq_n =  mtior_n;
      rd_n   = !mrw;
      wr_n   =  mrw;
    end
  end

endmodule
