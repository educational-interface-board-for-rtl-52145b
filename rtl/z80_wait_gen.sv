// z80_wait_gen: Z80 WAIT for target accesses to the shared memory.
//
// As soon as the Z80 addresses the shared memory (TSMR) the card pulls
// the Z80 WAIT line, whether or not the master is using the memory. WAIT
// stays asserted for at least WAIT_CYCLES clocks (500 ns at 8 MHz) from
// the start of the request, so that the Z80 cannot start another shared-
// memory access before this one has been arbitrated, and for as long as
// the arbiter has not granted the memory (TSMRA), so that the Z80 is held
// while the master owns it. A counter, cleared while neither TSMR nor
// TSMRA is asserted, measures the time.
//
// Timing: twait_n falls combinationally with TSMR and rises on the clock
// edge at which the count is complete and TSMRA is asserted. The 500 ns
// and the clear-while-idle counter follow the original card; holding WAIT
// until the grant is this design's reading of the wait-state rule.
module z80_wait_gen #(
  parameter int unsigned WAIT_CYCLES = 4   // 500 ns at 8 MHz
) (
  input  logic clk,        // 8 MHz
  input  logic rst_n,
  input  logic tsmr_n,
  input  logic tsmra_n,
  output logic twait_n
);

  logic active;
  localparam int unsigned CW = $clog2(WAIT_CYCLES + 1);
  logic [CW-1:0] cnt;

  assign active = !tsmr_n || !tsmra_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  cnt <= '0;
    else if (!active)            cnt <= '0;
    else if (cnt != CW'(WAIT_CYCLES)) cnt <= cnt + 1'b1;
  end

  assign twait_n = !(active && (cnt != CW'(WAIT_CYCLES) || tsmra_n));

endmodule
