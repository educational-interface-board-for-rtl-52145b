// z80_pia_ctrl: master control and monitoring of Z80 control lines.
//
// PIA port A bits 7..5 carry a command (eib_pkg::z80_pia_cmd_e): home
// state, INT, NMI, RESET or BUSREQ, each asserted on the Z80 bus for as
// long as the code is held. PA3 enables the INT command and PA4 the NMI
// command, so the master can block them. Port B bits 5..0 return the
// levels of the Z80 INT, NMI, RESET, BUSACK, BUSREQ and HALT lines; PB7
// and PB6 read 1. Combinational.
//
// The command codes and the PB assignment follow the original card. The
// polarity of the enables (1 = enabled) and PA3 for INT / PA4 for NMI are
// choices of this design.
module z80_pia_ctrl
  import eib_pkg::*;
(
  input  logic [7:0] pa,          // PIA port A outputs
  input  logic       int_n,       // Z80 bus lines as seen on the bus
  input  logic       nmi_n,
  input  logic       reset_n,
  input  logic       busack_n,
  input  logic       busreq_n,
  input  logic       halt_n,
  output logic       tint_n,      // drives of this card onto the Z80 bus
  output logic       tnmi_n,
  output logic       treset_n,
  output logic       tbusreq_n,
  output logic [7:0] pb           // PIA port B inputs
);

  z80_pia_cmd_e cmd;

  always_comb begin
    cmd       = z80_pia_cmd_e'(pa[7:5]);
    tint_n    = !(cmd == Z80_INT && pa[3]);
    tnmi_n    = !(cmd == Z80_NMI && pa[4]);
    treset_n  = !(cmd == Z80_RESET);
    tbusreq_n = !(cmd == Z80_BUSREQ);
    pb        = {2'b11, halt_n, busreq_n, busack_n, reset_n, nmi_n, int_n};
  end

endmodule
