// z80_vector: interrupt vector supply for Z80 interrupt mode 2.
//
// The master writes an 8-bit vector into the card's vector latch (VECL
// strobe, data PD7..PD0). In the Z80's interrupt acknowledge cycle, which
// is the only cycle with M1 and IORQ asserted together, the latch is
// driven onto the target data bus TD7..TD0.
//
// Timing: the latch loads on the rising clock edge while vecl_wr is high;
// the output enable is combinational. The latch and the M1/IORQ enable
// follow the original card; a clocked register in place of the
// transparent latch is a choice of this design.
module z80_vector (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       vecl_wr,   // master writes the vector latch
  input  logic [7:0] pd,        // master data PD7..PD0
  input  logic       m1_n,
  input  logic       iorq_n,
  output logic [7:0] td_out,
  output logic       td_oe
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       td_out <= 8'h00;
    else if (vecl_wr) td_out <= pd;
  end

  assign td_oe = !m1_n && !iorq_n;

endmodule
