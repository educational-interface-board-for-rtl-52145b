// z80_pmc: personality module card for a Z80 target.
//
// The card adapts the interface board's generic requests to the Z80 bus:
//  - z80_busreq_fsm turns a master target request into BUSREQ / BUSACK
//    and tells the interface when to end the master cycle (RELWAIT);
//  - z80_ctrl_gen drives MREQ/IORQ/RD/WR while the master owns the bus;
//  - z80_wait_gen holds the Z80 in WAIT around shared-memory accesses;
//  - z80_vector supplies a master-written mode-2 interrupt vector;
//  - z80_pia_ctrl maps PIA port A commands onto INT, NMI, RESET and
//    BUSREQ and returns the Z80 line levels on port B.
// The Z80 has no TA16..TA23 or TD8..TD15, so the card holds those
// interface lines low. Open-collector lines (BUSREQ, INT, NMI, RESET, WAIT)
// are outputs here; the bus combines all drivers of a line with AND.
//
// Clock: 8 MHz. Structure and functions follow the original card; see the
// sub-blocks for their own choices. The vector latch is written by a
// master write to the VECL strobe.
module z80_pmc (
  input  logic       clk,          // 8 MHz
  input  logic       rst_n,
  // interface board side
  input  logic       mtr_n,
  input  logic       mtior_n,
  input  logic       mrw,
  input  logic       mdtack_n,
  input  logic       tsmr_n,
  input  logic       tsmra_n,
  input  logic       vecl_n,
  input  logic [7:0] pd,           // master data D7..D0
  input  logic [7:0] pa,
  output logic       mtmra_n,
  output logic       relwait_n,
  output logic [7:0] pb,
  // Z80 bus, as seen on the bus
  input  logic       busack_n,
  input  logic       m1_n,
  input  logic       bus_iorq_n,
  input  logic       bus_int_n,
  input  logic       bus_nmi_n,
  input  logic       bus_reset_n,
  input  logic       bus_busreq_n,
  input  logic       bus_halt_n,
  // Z80 bus, driven by the card
  output logic       tbusreq_n,
  output logic       tint_n,
  output logic       tnmi_n,
  output logic       treset_n,
  output logic       twait_n,
  output logic       mreq_n,
  output logic       iorq_n,
  output logic       rd_n,
  output logic       wr_n,
  output logic       ctrl_oe,
  output logic [7:0] tvec,
  output logic       tvec_oe,
  output logic [7:0] ta_hi,        // TA23..TA16, held low
  output logic [7:0] td_hi         // TD15..TD8, held low
);

  logic fsm_busreq_n, pia_busreq_n;

  z80_busreq_fsm u_br (
    .clk, .rst_n, .mtr_n, .trw(mrw), .mdtack_n, .busack_n,
    .tbusreq_n(fsm_busreq_n), .relwait_n, .mtmra_n
  );

  z80_ctrl_gen u_ctl (
    .mtr_n, .mtior_n, .mrw, .mtra_n(mtmra_n),
    .mreq_n, .iorq_n, .rd_n, .wr_n, .ctrl_oe
  );

  z80_wait_gen u_wait (
    .clk, .rst_n, .tsmr_n, .tsmra_n, .twait_n
  );

  z80_vector u_vec (
    .clk, .rst_n, .vecl_wr(!vecl_n && !mrw), .pd,
    .m1_n, .iorq_n(bus_iorq_n), .td_out(tvec), .td_oe(tvec_oe)
  );

  z80_pia_ctrl u_pia (
    .pa, .int_n(bus_int_n), .nmi_n(bus_nmi_n), .reset_n(bus_reset_n),
    .busack_n, .busreq_n(bus_busreq_n), .halt_n(bus_halt_n),
    .tint_n, .tnmi_n, .treset_n, .tbusreq_n(pia_busreq_n), .pb
  );

  assign tbusreq_n = fsm_busreq_n & pia_busreq_n;
  assign ta_hi     = 8'h00;
  assign td_hi     = 8'h00;

endmodule
