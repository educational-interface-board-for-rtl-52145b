// eib_dtack_gen: master DTACK generation of the interface board.
//
// When a master cycle to the interface becomes ready (shared memory
// granted, target bus released by the personality card, or a local
// latch addressed) a counter runs for the number of clocks set on the
// DIP switch and then asserts DTACK. DTACK then stays asserted until the
// master negates its address strobe, which also clears the counter.
//
// Timing: with dly_sw = N, mdtack_n falls on the (N+1)th rising clk edge
// at which ready is seen with mas_n low. The DIP-switch delay follows the
// original board; the 4-bit switch width and counting in 16 MHz clocks
// are choices of this design.
module eib_dtack_gen #(
  parameter int unsigned DLY_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             mas_n,    // master address strobe
  input  logic             ready,    // the addressed resource is ready
  input  logic [DLY_W-1:0] dly_sw,   // DIP switch: delay in clocks
  output logic             mdtack_n
);

  logic [DLY_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      mdtack_n <= 1'b1;
    end else if (mas_n) begin
      cnt      <= '0;
      mdtack_n <= 1'b1;
    end else if (mdtack_n && ready) begin
      if (cnt == dly_sw) mdtack_n <= 1'b0;
      else               cnt      <= cnt + 1'b1;
    end
  end

endmodule
