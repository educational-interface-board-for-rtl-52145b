// eib_irq_chain: PIA interrupt entry into the master's interrupt daisy chain.
//
// Either PIA interrupt output raises the board's master interrupt request.
// In the master's interrupt acknowledge cycle the acknowledge arrives on
// IAIN; if this board has a request pending it keeps the acknowledge
// (IAOUT stays negated), forms a local IACK and asserts VPA so that the
// master takes an autovector. Otherwise IAIN is passed on to IAOUT. VPA is
// also asserted for ordinary master accesses to the PIA, which is an M6800
// peripheral and needs the synchronous E-clock cycle.
//
// Timing: the local IACK is captured on the clock edge at which IAIN and
// AS are both asserted with a request pending, and held until AS is
// negated, so a request dropping mid-cycle cannot break the chain. VPA for
// the local IACK therefore follows IAIN by one clock. Keeping the
// acknowledge when a request is pending and the use of VPA follow the
// original board; the clocked capture is a choice of this design.
module eib_irq_chain (
  input  logic clk,
  input  logic rst_n,
  input  logic irqa_n,    // PIA IRQA
  input  logic irqb_n,    // PIA IRQB
  input  logic iain_n,    // interrupt acknowledge in (daisy chain)
  input  logic mas_n,     // master address strobe
  input  logic piaen_n,   // PIA addressed by the master
  output logic mirq_n,    // interrupt request to the master
  output logic iaout_n,   // interrupt acknowledge out (daisy chain)
  output logic mvpa_n,    // valid peripheral address to the master
  output logic liack      // local IACK (this board was acknowledged)
);

  logic req;
  assign req    = !irqa_n || !irqb_n;
  assign mirq_n = !req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          liack <= 1'b0;
    else if (mas_n)                      liack <= 1'b0;
    else if (!iain_n && req)             liack <= 1'b1;
  end

  assign iaout_n = iain_n || req || liack;
  assign mvpa_n  = !(liack || (!piaen_n && !mas_n));

endmodule
