// eib_addr_decode: master address decoder of the interface board.
//
// The interface occupies a 128 KB window of the master's 16 MB space. The
// window base (A23..A17) is set by DIL switches and compared with the
// master address, as the board's comparator does. Inside a matching cycle
// (AS asserted) A16 = 1 selects the 64 KB target-memory window (MTMR);
// A16 = 0 enables a 3-to-8 decoder on A15..A13 that produces one of the
// eight strobes of eib_pkg::eib_fn_e. MTR, the request sent to the
// personality card, is MTMR or TIO. Purely combinational, no clock.
//
// The window layout and the function of every 8 KB slot follow the
// original board. Using A16 as the MTMR qualifier and taking the DIL
// setting as a 7-bit input are choices of this design.
module eib_addr_decode
  import eib_pkg::*;
(
  input  logic [23:1] ma,        // master address
  input  logic        mas_n,     // master address strobe
  input  logic [6:0]  base_sw,   // DIL switch setting for A23..A17
  output logic        match,     // address is inside the window
  output eib_sel_t    sel,       // decoded request lines (active low)
  output logic        mtr_n      // master target request (MTMR or TIO)
);

  always_comb begin
    sel   = EIB_SEL_IDLE;
    match = !mas_n && (ma[23:17] == base_sw);
    if (match) begin
      if (ma[16]) begin
        sel.mtmr_n = 1'b0;
      end else begin
        unique case (eib_fn_e'(ma[15:13]))
          SEL_MSMR:   sel.msmr_n   = 1'b0;
          SEL_TIO:    sel.tio_n    = 1'b0;
          SEL_TACC:   sel.tacc_n   = 1'b0;
          SEL_PIAEN:  sel.piaen_n  = 1'b0;
          SEL_VECL:   sel.vecl_n   = 1'b0;
          SEL_EBAL:   sel.ebal_n   = 1'b0;
          SEL_PIACA1: sel.piaca1_n = 1'b0;
          SEL_PIACB1: sel.piacb1_n = 1'b0;
        endcase
      end
    end
    mtr_n = sel.mtmr_n & sel.tio_n;
  end

endmodule
