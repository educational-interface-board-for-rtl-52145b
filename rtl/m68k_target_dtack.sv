// m68k_target_dtack: DTACK and bus-error timing of the MC68000 target board.
//
// An 8-stage shift register, clocked at 8 MHz, is held clear while
// neither data strobe (UDS, LDS) is asserted; once a strobe is asserted a
// 1 is shifted in every clock, so stage k goes high k+1 clocks after the
// strobe. A link (LK21) picks the stage that asserts DTACK for on-board
// memory (MEM), giving 125 ns to 1000 ns in 125 ns steps. A later stage,
// picked by a second link, asserts BERR if no DTACK is seen on the bus by
// then, so that a cycle to an empty address cannot hang the processor.
//
// Timing: with link value k, dtack_n falls on the (k+1)th rising clock
// edge after the strobe is asserted and rises as soon as the strobes are
// negated. The shift register, the link choice and the BERR path follow
// the original board; taking the link settings as inputs is a choice of
// this design.
module m68k_target_dtack (
  input  logic       clk,          // 8 MHz
  input  logic       rst_n,
  input  logic       uds_n,
  input  logic       lds_n,
  input  logic       mem_n,        // on-board memory addressed
  input  logic       bus_dtack_n,  // DTACK on the bus from any source
  input  logic [2:0] lk_dtack,     // stage used for DTACK
  input  logic [2:0] lk_berr,      // stage used for BERR
  output logic       dtack_n,
  output logic       berr_n
);

  logic [7:0] q;
  logic       strobe;

  assign strobe = !uds_n || !lds_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= '0;
    else if (!strobe) q <= '0;
    else              q <= {q[6:0], 1'b1};
  end

  assign dtack_n = !(strobe && !mem_n && q[lk_dtack]);
  assign berr_n  = !(strobe && q[lk_berr] && bus_dtack_n);

endmodule
