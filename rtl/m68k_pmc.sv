// m68k_pmc: personality module card for an MC68000 target.
//
// Master and target are the same processor family, so the card is mostly
// three state machines:
//  - m68k_busreq_fsm acquires the target bus for a master request
//    (BR / BG / BGACK); BGACK is returned to the interface as MTMRA and,
//    because the target needs no further conversion, also as RELWAIT so
//    the interface ends the master cycle after its DTACK delay;
//  - m68k_twait_fsm ends target cycles to the shared memory (TWAIT, used
//    as the target's DTACK);
//  - m68k_irq_fsm turns PIA PA5/PA6 into TINT, THALT, TRESET and VECEN.
// The interface's window onto target memory is 64 KB, so an extra byte
// address latch (written by the master through the EBAL strobe, data
// D7..D0) supplies TA23..TA16. While BGACK is asserted a one-way buffer
// passes the master's R/W, UDS, LDS, AS and DTACK to the target bus.
// Target memory that answers with its own DTACK is not needed for the
// master's cycle to end: the interface board ends it after RELWAIT.
// Port B bits 2..0 return the target INT, HALT and RESET line levels.
//
// Clock: 8 MHz. Everything listed follows the original card; the PB bit
// order and the latch being a clocked register are choices of this
// design.
module m68k_pmc #(
  parameter int unsigned READ_CYCLES  = 2,
  parameter int unsigned WRITE_CYCLES = 3
) (
  input  logic       clk,          // 8 MHz
  input  logic       rst_n,
  // interface board side
  input  logic       mtr_n,
  input  logic       mrw,
  input  logic       mas_n,
  input  logic       muds_n,
  input  logic       mlds_n,
  input  logic       mdtack_n,     // master DTACK (backplane line)
  input  logic       ebal_n,
  input  logic [7:0] pd,           // master data D7..D0
  input  logic       tsmr_n,
  input  logic       tsmra_n,
  input  logic [7:0] pa,
  output logic       mtmra_n,
  output logic       relwait_n,
  output logic [7:0] pb,
  // target bus, as seen on the bus
  input  logic       tbg_n,
  input  logic       tas_n,
  input  logic       tdtack_n,
  input  logic       tbgack_in_n,  // BGACK of other masters
  input  logic       trw,
  input  logic       tintack_n,
  input  logic       bus_int_n,
  input  logic       bus_halt_n,
  input  logic       bus_reset_n,
  // target bus, driven by the card
  output logic       tbr_n,
  output logic       tbgack_n,
  output logic       twait_n,
  output logic       tint_n,
  output logic       vecen_n,
  output logic       thalt_n,
  output logic       treset_n,
  output logic [7:0] ta_hi,        // TA23..TA16 from the latch
  output logic       strb_oe,      // master strobes are driven onto the target bus
  output logic       t_rw,
  output logic       t_as_n,
  output logic       t_uds_n,
  output logic       t_lds_n,
  output logic       t_dtack_n
);

  m68k_busreq_fsm u_br (
    .clk, .rst_n, .mtr_n, .tbg_n, .tas_n, .tdtack_n, .tbgack_in_n,
    .tbr_n, .tbgack_n
  );

  m68k_twait_fsm #(.READ_CYCLES(READ_CYCLES), .WRITE_CYCLES(WRITE_CYCLES)) u_tw (
    .clk, .rst_n, .tsmr_n, .tsmra_n, .trw, .twait_n
  );

  m68k_irq_fsm u_irq (
    .clk, .rst_n, .pa5(pa[5]), .pa6(pa[6]), .tintack_n,
    .tint_n, .vecen_n, .thalt_n, .treset_n
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 ta_hi <= 8'h00;
    else if (!ebal_n && !mrw)   ta_hi <= pd;
  end

  assign mtmra_n   = tbgack_n;
  assign relwait_n = tbgack_n;
  assign strb_oe   = !tbgack_n;
  assign t_rw      = strb_oe ? mrw    : 1'b1;
  assign t_as_n    = strb_oe ? mas_n  : 1'b1;
  assign t_uds_n   = strb_oe ? muds_n : 1'b1;
  assign t_lds_n   = strb_oe ? mlds_n : 1'b1;
  assign t_dtack_n = strb_oe ? mdtack_n : 1'b1;
  assign pb        = {5'b11111, bus_reset_n, bus_halt_n, bus_int_n};

endmodule
