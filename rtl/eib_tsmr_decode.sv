// eib_tsmr_decode: target shared-memory request (TSMR) generation.
//
// The master writes the base of the shared-memory area in the target's
// address map into a 13-bit latch holding TA23..TA11 (data bits D12..D0 of
// a write to the target-access-latch strobe). Each target cycle compares
// its address with the latch; a match while the target strobe is active
// and shared-memory access is enabled (PIA PA1) asserts TSMR.
//
// An 8-bit target uses a 2 KB window (TA23..TA11 compared). A 16-bit
// target uses a 4 KB window: TA11 is left out of the compare. Both window
// sizes are those of the two target boards; leaving TA11 out in 16-bit
// mode, the data-bus position of the base and the PA1 polarity
// (1 = enabled) are choices of this design.
//
// Timing: the latch loads on the rising clk edge while wr is high;
// tsmr_n is combinational from the target address.
module eib_tsmr_decode (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr,          // load the base latch this cycle
  input  logic [12:0] wdata,       // new base, TA23..TA11
  input  logic [23:0] ta,          // target byte address
  input  logic        tstb_n,      // target memory strobe (MREQ or AS)
  input  logic        sm_en,       // PIA PA1: shared-memory access enabled
  input  logic        eight_bit,   // PIA PA0: 1 = 8-bit target
  output logic [12:0] base,        // latched base, for read-back
  output logic        tsmr_n
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  base <= '0;
    else if (wr) base <= wdata;
  end

  logic hit;
  always_comb begin
    if (eight_bit) hit = (ta[23:11] == base);
    else           hit = (ta[23:12] == base[12:1]);
    tsmr_n = !(hit && !tstb_n && sm_en);
  end

endmodule
