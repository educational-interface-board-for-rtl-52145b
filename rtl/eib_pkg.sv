// eib_pkg: types and constants shared by the Educational Interface Board
// (EIB), its personality module cards (PMCs) and the target-board logic.
//
// All bus control lines keep the board's active-low sense and carry an
// "_n" suffix. The master (supportive) processor is an MC68000 whose
// interface window is 128 KB at 860000-87FFFF; inside it the first 64 KB
// are cut into eight 8 KB strobes and the second 64 KB is the window onto
// target memory. The shared memory is 4 KB, organised as 2K x 16.
//
// Linting this package on its own lists SM_AW and EIB_SEL_IDLE as unused
// parameters; the interface board and the address decoder use them.
package eib_pkg;

  // Shared memory: 2K words of 16 bits (4 KB).
  localparam int unsigned SM_WORDS  = 2048;
  localparam int unsigned SM_AW     = $clog2(SM_WORDS);

  // Function of each 8 KB strobe in the first half of the window,
  // selected by master address A15..A13 (Table of master addresses).
  typedef enum logic [2:0] {
    SEL_MSMR   = 3'd0,  // 860000 shared memory
    SEL_TIO    = 3'd1,  // 862000 target I/O
    SEL_TACC   = 3'd2,  // 864000 target access latch (shared-memory base)
    SEL_PIAEN  = 3'd3,  // 866000 PIA
    SEL_VECL   = 3'd4,  // 868000 vector latch
    SEL_EBAL   = 3'd5,  // 86A000 extra byte address latch
    SEL_PIACA1 = 3'd6,  // 86C000 PIA CA1 interrupt input
    SEL_PIACB1 = 3'd7   // 86E000 PIA CB1 interrupt input
  } eib_fn_e;

  // Decoded master request lines, all active low.
  typedef struct packed {
    logic msmr_n;    // master shared memory request
    logic tio_n;     // master target I/O request
    logic tacc_n;    // target access latch
    logic piaen_n;   // PIA enable
    logic vecl_n;    // vector latch
    logic ebal_n;    // extra byte address latch
    logic piaca1_n;  // PIA CA1 strobe
    logic piacb1_n;  // PIA CB1 strobe
    logic mtmr_n;    // master target memory request (870000-87FFFF)
  } eib_sel_t;

  localparam eib_sel_t EIB_SEL_IDLE = '{default: 1'b1};

  // Codes the master writes to PIA port A bits 7..5 on the Z80 card.
  typedef enum logic [2:0] {
    Z80_HOME   = 3'b000,
    Z80_INT    = 3'b001,
    Z80_NMI    = 3'b010,
    Z80_RESET  = 3'b011,
    Z80_BUSREQ = 3'b100
  } z80_pia_cmd_e;

endpackage
