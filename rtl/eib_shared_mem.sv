// eib_shared_mem: the 4 KB shared memory of the interface board.
//
// A 2K x 16 RAM is owned by whichever processor the arbiter has granted:
// MSMRA selects the master port, TSMRA the target port; a port without a
// grant neither reads nor writes. The master addresses words with A11..A1
// and bytes with UDS/LDS. A 16-bit target does the same. For an 8-bit
// target (eight_bit = 1) the byte-lane buffer steers the target's single
// data byte TD7..TD0 to the high lane when TA0 = 0 (TUBR) and to the low
// lane when TA0 = 1 (TLBR), so an 8-bit target can use both halves of
// every word; either target strobe then starts the access.
//
// Timing: writes happen on every rising clk edge while the owning port's
// strobe and write are active; reads are combinational from the array.
//
// The 4 KB size, the byte-lane steering and TUBR/TLBR from TA0 follow the
// original board; the 2K x 16 organisation and word addressing are
// choices of this design.
module eib_shared_mem
  import eib_pkg::*;
#(
  parameter int unsigned WORDS = SM_WORDS,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          eight_bit,   // PIA PA0: 1 = 8-bit target
  // master port
  input  logic          msmra_n,
  input  logic [AW:1]   ma,
  input  logic          muds_n,
  input  logic          mlds_n,
  input  logic          mrw,         // 1 = read
  input  logic [15:0]   mwdata,
  output logic [15:0]   mrdata,
  // target port
  input  logic          tsmra_n,
  input  logic [AW:0]   ta,          // target byte address
  input  logic          tuds_n,
  input  logic          tlds_n,
  input  logic          trw,         // 1 = read
  input  logic [15:0]   twdata,
  output logic [15:0]   trdata,
  output logic          tubr_n,      // target upper byte request (8-bit target)
  output logic          tlbr_n       // target lower byte request (8-bit target)
);

  logic [15:0] mem [WORDS];

  logic [15:0] tword;
  logic        t_hi, t_lo;           // target byte enables after steering
  logic [15:0] t_wd;                 // target write data after steering

  always_comb begin
    tubr_n = !(eight_bit && !ta[0]);
    tlbr_n = !(eight_bit &&  ta[0]);
    tword  = mem[ta[AW:1]];
    if (eight_bit) begin
      t_hi   = !tubr_n && !(tuds_n && tlds_n);
      t_lo   = !tlbr_n && !(tuds_n && tlds_n);
      t_wd   = {twdata[7:0], twdata[7:0]};
      trdata = {8'h00, ta[0] ? tword[7:0] : tword[15:8]};
    end else begin
      t_hi   = !tuds_n;
      t_lo   = !tlds_n;
      t_wd   = twdata;
      trdata = tword;
    end
    mrdata = mem[ma];
  end

  always_ff @(posedge clk) begin
    if (!msmra_n && !mrw) begin
      if (!muds_n) mem[ma][15:8] <= mwdata[15:8];
      if (!mlds_n) mem[ma][7:0]  <= mwdata[7:0];
    end else if (!tsmra_n && !trw) begin
      if (t_hi) mem[ta[AW:1]][15:8] <= t_wd[15:8];
      if (t_lo) mem[ta[AW:1]][7:0]  <= t_wd[7:0];
    end
  end

endmodule
