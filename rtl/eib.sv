// eib: one Educational Interface Board.
//
// The board sits on the master (MC68000) backplane and connects it to a
// target processor bus through a personality module card (PMC). It lets
// the master (1) read and write target memory and I/O by direct memory
// access, (2) share a 4 KB memory with the target, arbitrated first come
// first served, and (3) control and watch the target's interrupt, halt and
// reset lines through a PIA. The PIA itself is an external M6821: this
// module produces its chip select and CA1/CB1 strobes and takes its port
// A outputs and interrupt requests.
//
// Inside: the address decoder cuts the 128 KB window into request lines;
// a master request for target memory or I/O (MTR) goes to the PMC, which
// acquires the target bus and reports MTMRA and, when the target cycle can
// be terminated, RELWAIT. Shared-memory requests from both sides (MSMR,
// TSMR) meet in the arbiter; the grant (MSMRA/TSMRA) opens the buffers and
// the RAM port. The DTACK generator ends every master cycle a DIP-switch
// delay after its resource is ready. PIA PA0 tells the board whether the
// target is 8-bit (1) or 16-bit (0); PA1 enables target shared-memory
// access.
//
// Buses with several drivers are split into an input, an output and an
// output enable (ta_oe, td_oe, md_oe). Everything is clocked by the 16 MHz
// arbitration clock. The decode map, the arbitration, the buffer
// controls and the PA0/PA1 functions follow the original board; the use of
// the target-access-latch strobe to load the shared-memory base and the
// target address A0 taken from UDS for byte cycles are choices of this
// design.
module eib
  import eib_pkg::*;
(
  input  logic        clk,           // 16 MHz
  input  logic        rst_n,
  input  logic [6:0]  base_sw,       // window base, A23..A17
  input  logic [3:0]  dly_sw,        // DTACK delay in clocks
  // master bus
  input  logic [23:1] ma,
  input  logic        mas_n,
  input  logic        muds_n,
  input  logic        mlds_n,
  input  logic        mrw,
  input  logic [15:0] md_wr,         // data driven by the master
  output logic [15:0] md_rd,         // data driven by this board
  output logic        md_oe,
  output logic        mdtack_n,
  output logic        mvpa_n,
  output logic        mirq_n,
  input  logic        iain_n,
  output logic        iaout_n,
  // PIA
  output logic        pia_cs_n,
  output logic        pia_ca1_n,
  output logic        pia_cb1_n,
  input  logic        pia_irqa_n,
  input  logic        pia_irqb_n,
  input  logic [7:0]  pa,            // PIA port A outputs
  // personality module card
  output logic        mtr_n,         // master target request
  output logic        mtior_n,       // ... of the I/O kind
  output logic        vecl_n,        // vector latch strobe
  output logic        ebal_n,        // extra byte address latch strobe
  input  logic        mtmra_n,       // master owns the target bus
  input  logic        relwait_n,     // target cycle may be terminated
  output logic        tsmr_n,
  output logic        tsmra_n,
  // target bus
  input  logic [23:0] ta_in,
  input  logic        tstb_n,        // target memory strobe (MREQ or AS)
  input  logic        tuds_n,
  input  logic        tlds_n,
  input  logic        trw,
  input  logic [15:0] td_in,
  output logic [15:0] ta_out,
  output logic        ta_oe,
  output logic [15:0] td_out,
  output logic        td_oe,
  output logic        tubr_n,
  output logic        tlbr_n
);

  eib_sel_t   sel;
  logic       match;
  logic       msmra_n;
  logic [12:0] sm_base;
  logic       maden_n, lden_n, hden_n, len_n, hen_n, tdir;
  logic [15:0] sm_mrdata, sm_trdata;
  logic       liack;
  logic       eight_bit, sm_en;

  assign eight_bit = pa[0];
  assign sm_en     = pa[1];

  eib_addr_decode u_dec (
    .ma, .mas_n, .base_sw, .match, .sel, .mtr_n
  );

  assign mtior_n   = sel.tio_n;
  assign vecl_n    = sel.vecl_n;
  assign ebal_n    = sel.ebal_n;
  assign pia_cs_n  = sel.piaen_n;
  assign pia_ca1_n = sel.piaca1_n;
  assign pia_cb1_n = sel.piacb1_n;

  eib_tsmr_decode u_tsmr (
    .clk, .rst_n,
    .wr       (!sel.tacc_n && !mrw && !mlds_n),
    .wdata    (md_wr[12:0]),
    .ta       (ta_in),
    .tstb_n,
    .sm_en,
    .eight_bit,
    .base     (sm_base),
    .tsmr_n
  );

  eib_arbiter u_arb (
    .clk, .rst_n,
    .msmr_n  (sel.msmr_n),
    .tsmr_n,
    .msmra_n,
    .tsmra_n
  );

  eib_buffer_ctrl u_buf (
    .msmra_n, .mtmra_n, .tsmra_n, .mas_n, .muds_n, .mlds_n, .mrw, .trw,
    .pa0 (eight_bit),
    .maden_n, .lden_n, .hden_n, .len_n, .hen_n, .tdir
  );

  eib_shared_mem u_sm (
    .clk, .eight_bit,
    .msmra_n, .ma(ma[SM_AW:1]), .muds_n, .mlds_n, .mrw,
    .mwdata (md_wr), .mrdata(sm_mrdata),
    .tsmra_n, .ta(ta_in[SM_AW:0]), .tuds_n, .tlds_n, .trw,
    .twdata (td_in), .trdata(sm_trdata),
    .tubr_n, .tlbr_n
  );

  eib_dtack_gen u_dtack (
    .clk, .rst_n, .mas_n,
    .ready (!msmra_n || (!mtr_n && !relwait_n) || !sel.tacc_n || !sel.vecl_n ||
            !sel.ebal_n || !sel.piaca1_n || !sel.piacb1_n),
    .dly_sw,
    .mdtack_n
  );

  eib_irq_chain u_irq (
    .clk, .rst_n, .irqa_n(pia_irqa_n), .irqb_n(pia_irqb_n), .iain_n, .mas_n,
    .piaen_n(sel.piaen_n), .mirq_n, .iaout_n, .mvpa_n, .liack
  );

  // Master data bus: the board drives it for reads through the master
  // data buffers, from the shared memory, the target bus or the base latch.
  always_comb begin
    md_rd = 16'h0000;
    md_oe = 1'b0;
    if (mrw && !(lden_n && hden_n)) begin
      md_oe = 1'b1;
      if (!msmra_n)       md_rd = sm_mrdata;
      else if (eight_bit) md_rd = {td_in[7:0], td_in[7:0]};
      else                md_rd = td_in;
    end else if (mrw && !sel.tacc_n) begin
      md_oe = 1'b1;
      md_rd = {3'b000, sm_base};
    end
  end

  // Target address and data buses.
  always_comb begin
    ta_oe  = !maden_n && !mtmra_n;
    ta_out = {ma[15:1], muds_n};
    td_oe  = !len_n && tdir;
    if (!tsmra_n)       td_out = sm_trdata;
    else if (eight_bit) td_out = {8'h00, muds_n ? md_wr[7:0] : md_wr[15:8]};
    else                td_out = md_wr;
    if (hen_n) td_out[15:8] = 8'h00;
  end

endmodule
