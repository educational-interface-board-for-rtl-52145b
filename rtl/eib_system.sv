// eib_system: a supportive MC68000 system with two interface boards.
//
// The interface board lets a master MC68000 inspect and control a target
// microprocessor system of another family: it reads and writes target
// memory and I/O by taking the target bus, shares a 4 KB memory with the
// target, and drives the target's interrupt, halt and reset lines through a
// PIA. A personality module card adapts the board to each target family.
// This top places two boards side by side on one master bus, each at its
// own DIL-switch base address:
//   - board Z: Z80 personality card and Z80 target-board decode;
//   - board K: MC68000 personality card and MC68000 target-board decode,
//     DTACK and interrupt logic.
// The processors, the PIAs, the target memories and the target
// peripherals are not part of the RTL; their pins are ports of this module,
// so that a testbench can play them.
//
// Bus modelling: every line with several drivers is resolved here in two
// states. Open-collector lines (BUSREQ, WAIT, INT, NMI, RESET, BR, BGACK,
// DTACK, BERR, VPA, IRQ) are the AND of their drivers; three-state buses
// take the value of the one driver whose output enable is set, or all
// ones (pull-ups) when none is.
//
// Clocks: clk16 (16 MHz) runs both interface boards; clk8 (8 MHz, from the
// same oscillator, rising with clk16) runs both personality cards and the
// target-board timing logic.
//
// Two boards in one system, their base addresses and the
// bus-resolution rules are choices of this design; each board with its
// card follows the original design.
//
// Some board outputs are left unconnected here because no part in this
// system uses them: the Z80 board's EBAL strobe (the Z80 card has no extra
// address latch), its TUBR/TLBR byte requests (steering happens inside the
// board), the Z80 card's control-drive enable and the Z80 target board's
// buffer controls (the buffers themselves are replaced by the bus
// resolution above), MTIOR of the 68000 board (memory-mapped I/O), and
// address line A0 of its target bus (the 68000 has none).
// Lint lists them as unused signals.
module eib_system
  import eib_pkg::*;
(
  input  logic        clk16,
  input  logic        clk8,
  input  logic        rst_n,
  // ---- master (supportive) bus
  input  logic [23:1] ma,
  input  logic        mas_n,
  input  logic        muds_n,
  input  logic        mlds_n,
  input  logic        mrw,
  input  logic [15:0] md_wr,
  output logic [15:0] md_rd,
  output logic        md_oe,
  output logic        mdtack_n,
  output logic        mvpa_n,
  output logic        mirq_n,
  input  logic        iain_n,
  output logic        iaout_n,
  // ---- board Z (Z80 target)
  input  logic [6:0]  z_base_sw,
  input  logic [3:0]  z_dly_sw,
  output logic        z_pia_cs_n,
  output logic        z_pia_ca1_n,
  output logic        z_pia_cb1_n,
  input  logic        z_pia_irqa_n,
  input  logic        z_pia_irqb_n,
  input  logic [7:0]  z_pa,
  output logic [7:0]  z_pb,
  // Z80 CPU pins
  input  logic [15:0] zc_a,
  input  logic [7:0]  zc_d_out,
  input  logic        zc_mreq_n,
  input  logic        zc_iorq_n,
  input  logic        zc_rd_n,
  input  logic        zc_wr_n,
  input  logic        zc_m1_n,
  input  logic        zc_busack_n,
  input  logic        zc_halt_n,
  output logic [7:0]  zc_d_in,
  output logic        zc_busreq_n,
  output logic        zc_wait_n,
  output logic        zc_int_n,
  output logic        zc_nmi_n,
  output logic        zc_reset_n,
  // Z80 board devices
  input  logic        z_dev_int_n,     // interrupt from the board's Z80 peripherals
  input  logic [2:0]  z_sw_size,
  input  logic [3:0]  z_sw_swap,
  input  logic [7:0]  z_dil,
  input  logic [7:0]  z_mem_d,         // data from the selected memory / peripheral
  output logic [15:0] z_bus_a,
  output logic [7:0]  z_bus_d,
  output logic        z_bus_mreq_n,
  output logic        z_bus_iorq_n,
  output logic        z_bus_rd_n,
  output logic        z_bus_wr_n,
  output logic [3:0]  z_ram_ce_n,
  output logic [3:0]  z_rom_ce_n,
  output logic [4:0]  z_io_ce_n,       // CTC2, PIO2, PIO1, DART, CTC1
  output logic [7:0]  z_led,
  // ---- board K (MC68000 target)
  input  logic [6:0]  k_base_sw,
  input  logic [3:0]  k_dly_sw,
  output logic        k_pia_cs_n,
  output logic        k_pia_ca1_n,
  output logic        k_pia_cb1_n,
  input  logic        k_pia_irqa_n,
  input  logic        k_pia_irqb_n,
  input  logic [7:0]  k_pa,
  output logic [7:0]  k_pb,
  // MC68000 target CPU pins
  input  logic [23:1] kc_a,
  input  logic [15:0] kc_d_out,
  input  logic        kc_as_n,
  input  logic        kc_uds_n,
  input  logic        kc_lds_n,
  input  logic        kc_rw,
  input  logic        kc_bg_n,
  input  logic        kc_intack_n,     // interrupt acknowledge (FC = 111)
  output logic [15:0] kc_d_in,
  output logic        kc_br_n,
  output logic        kc_dtack_n,
  output logic        kc_berr_n,
  output logic        kc_vpa_n,
  output logic [2:0]  kc_ipl_n,
  output logic        kc_halt_n,
  output logic        kc_reset_n,
  // MC68000 board devices
  input  logic        k_sw_ram8k,      // S18: RAM device size
  input  logic        k_sw_rom8k,      // S19: EPROM device size
  input  logic [1:0]  k_sw_swap,       // S21, S20: RAM/EPROM swap
  input  logic [8:0]  k_dev_irq_n,     // ACIA1, ACIA2, PI/T1a/b, PI/T2a/b, PTM, INT1, INT2
  input  logic [2:0]  k_lk_dtack,
  input  logic [2:0]  k_lk_berr,
  input  logic [15:0] k_mem_d,         // data from on-board memory
  output logic        k_mem_n,         // on-board memory addressed
  output logic [3:0]  k_ram_ce_n,
  output logic [3:0]  k_rom_ce_n,
  output logic [7:0]  k_io_ce_n,       // PI/T1, PI/T2, LEDs, DIL, ACIA1, ACIA2, -, -
  output logic        k_iopage_n,
  output logic        k_m6800_n,
  output logic [23:1] k_bus_a,
  output logic [15:0] k_bus_d,
  output logic        k_bus_as_n,
  output logic        k_bus_uds_n,
  output logic        k_bus_lds_n,
  output logic        k_bus_rw,
  output logic        k_bus_bgack_n,
  output logic        k_inton_n,
  output logic        k_vecen_n
);

  // =====================================================================
  // Board Z: interface board + Z80 personality card + Z80 target decode
  // =====================================================================
  logic [15:0] z_md_rd;   logic z_md_oe, z_dtack_n, z_vpa_n, z_irq_n, z_iaout_n;
  logic z_mtr_n, z_mtior_n, z_vecl_n, z_ebal_n, z_mtmra_n, z_relwait_n;
  logic z_tsmr_n, z_tsmra_n, z_tubr_n, z_tlbr_n;
  logic [15:0] z_ta_out, z_td_out;  logic z_ta_oe, z_td_oe;
  logic zp_busreq_n, zp_int_n, zp_nmi_n, zp_reset_n, zp_wait_n;
  logic zp_mreq_n, zp_iorq_n, zp_rd_n, zp_wr_n, zp_ctrl_oe;
  logic [7:0] zp_vec, zp_ta_hi, zp_td_hi;  logic zp_vec_oe;
  logic [7:0] zd_d_out;  logic zd_d_oe, zd_mem_n, zd_cpu_buf_en, zd_dbuf, zd_mem_en, zd_dir;
  logic zc_owns;

  assign zc_owns = zc_busack_n;

  // Z80 bus resolution
  always_comb begin
    z_bus_a      = zc_owns ? zc_a : (z_ta_oe ? z_ta_out : 16'hFFFF);
    z_bus_mreq_n = (zc_owns ? zc_mreq_n : 1'b1) & zp_mreq_n;
    z_bus_iorq_n = (zc_owns ? zc_iorq_n : 1'b1) & zp_iorq_n;
    z_bus_rd_n   = (zc_owns ? zc_rd_n   : 1'b1) & zp_rd_n;
    z_bus_wr_n   = (zc_owns ? zc_wr_n   : 1'b1) & zp_wr_n;
    if (zp_vec_oe)                           z_bus_d = zp_vec;
    else if (z_td_oe)                        z_bus_d = z_td_out[7:0];
    else if (zd_d_oe)                        z_bus_d = zd_d_out;
    else if (zd_mem_en && !z_bus_rd_n)       z_bus_d = z_mem_d;
    else if (zc_owns && !zc_wr_n)            z_bus_d = zc_d_out;
    else                                     z_bus_d = 8'hFF;
    zc_d_in     = z_bus_d;
    zc_busreq_n = zp_busreq_n;
    zc_wait_n   = zp_wait_n;
    zc_int_n    = zp_int_n & z_dev_int_n;
    zc_nmi_n    = zp_nmi_n;
    zc_reset_n  = zp_reset_n;
  end

  eib u_eib_z (
    .clk(clk16), .rst_n, .base_sw(z_base_sw), .dly_sw(z_dly_sw),
    .ma, .mas_n, .muds_n, .mlds_n, .mrw, .md_wr,
    .md_rd(z_md_rd), .md_oe(z_md_oe), .mdtack_n(z_dtack_n), .mvpa_n(z_vpa_n),
    .mirq_n(z_irq_n), .iain_n, .iaout_n(z_iaout_n),
    .pia_cs_n(z_pia_cs_n), .pia_ca1_n(z_pia_ca1_n), .pia_cb1_n(z_pia_cb1_n),
    .pia_irqa_n(z_pia_irqa_n), .pia_irqb_n(z_pia_irqb_n), .pa(z_pa),
    .mtr_n(z_mtr_n), .mtior_n(z_mtior_n), .vecl_n(z_vecl_n), .ebal_n(z_ebal_n),
    .mtmra_n(z_mtmra_n), .relwait_n(z_relwait_n), .tsmr_n(z_tsmr_n), .tsmra_n(z_tsmra_n),
    .ta_in({zp_ta_hi, z_bus_a}), .tstb_n(z_bus_mreq_n),
    .tuds_n(z_bus_rd_n & z_bus_wr_n), .tlds_n(z_bus_rd_n & z_bus_wr_n),
    .trw(z_bus_wr_n), .td_in({zp_td_hi, z_bus_d}),
    .ta_out(z_ta_out), .ta_oe(z_ta_oe), .td_out(z_td_out), .td_oe(z_td_oe),
    .tubr_n(z_tubr_n), .tlbr_n(z_tlbr_n)
  );

  z80_pmc u_pmc_z (
    .clk(clk8), .rst_n,
    .mtr_n(z_mtr_n), .mtior_n(z_mtior_n), .mrw, .mdtack_n,
    .tsmr_n(z_tsmr_n), .tsmra_n(z_tsmra_n), .vecl_n(z_vecl_n), .pd(md_wr[7:0]),
    .pa(z_pa), .mtmra_n(z_mtmra_n), .relwait_n(z_relwait_n), .pb(z_pb),
    .busack_n(zc_busack_n), .m1_n(zc_owns ? zc_m1_n : 1'b1), .bus_iorq_n(z_bus_iorq_n),
    .bus_int_n(zc_int_n), .bus_nmi_n(zc_nmi_n), .bus_reset_n(zc_reset_n),
    .bus_busreq_n(zc_busreq_n), .bus_halt_n(zc_halt_n),
    .tbusreq_n(zp_busreq_n), .tint_n(zp_int_n), .tnmi_n(zp_nmi_n), .treset_n(zp_reset_n),
    .twait_n(zp_wait_n), .mreq_n(zp_mreq_n), .iorq_n(zp_iorq_n), .rd_n(zp_rd_n),
    .wr_n(zp_wr_n), .ctrl_oe(zp_ctrl_oe), .tvec(zp_vec), .tvec_oe(zp_vec_oe),
    .ta_hi(zp_ta_hi), .td_hi(zp_td_hi)
  );

  z80_target_decode u_zdec (
    .clk(clk8), .rst_n, .a(z_bus_a), .d_in(z_bus_d),
    .mreq_n(z_bus_mreq_n), .iorq_n(z_bus_iorq_n), .rd_n(z_bus_rd_n), .wr_n(z_bus_wr_n),
    .m1_n(zc_owns ? zc_m1_n : 1'b1), .busack_n(zc_busack_n),
    .sw_size(z_sw_size), .sw_swap(z_sw_swap), .dil(z_dil),
    .ram_ce_n(z_ram_ce_n), .rom_ce_n(z_rom_ce_n), .mem_n(zd_mem_n),
    .ctc1_n(z_io_ce_n[0]), .dart_n(z_io_ce_n[1]), .pio1_n(z_io_ce_n[2]),
    .pio2_n(z_io_ce_n[3]), .ctc2_n(z_io_ce_n[4]),
    .led(z_led), .d_out(zd_d_out), .d_oe(zd_d_oe),
    .cpu_buf_en(zd_cpu_buf_en), .dbuf(zd_dbuf), .mem_en(zd_mem_en), .dir(zd_dir)
  );

  // =====================================================================
  // Board K: interface board + MC68000 personality card + target logic
  // =====================================================================
  logic [15:0] k_md_rd;   logic k_md_oe, k_dtack_n, k_vpa_n, k_irq_n;
  logic k_mtr_n, k_mtior_n, k_vecl_n, k_ebal_n, k_mtmra_n, k_relwait_n;
  logic k_tsmr_n, k_tsmra_n, k_tubr_n, k_tlbr_n;
  logic [15:0] k_ta_out, k_td_out;  logic k_ta_oe, k_td_oe;
  logic kp_br_n, kp_bgack_n, kp_twait_n, kp_int_n, kp_halt_n, kp_reset_n;
  logic [7:0] kp_ta_hi;
  logic kp_strb_oe, kp_rw, kp_as_n, kp_uds_n, kp_lds_n, kp_dtack_n;
  logic kt_dtack_n, kt_berr_n, kt_vpa_n, kd_vpadrv_n;
  logic kc_owns;

  assign kc_owns = kp_bgack_n;

  always_comb begin
    k_bus_a     = kc_owns ? kc_a : {kp_ta_hi, k_ta_out[15:1]};
    k_bus_as_n  = kc_owns ? kc_as_n  : kp_as_n;
    k_bus_uds_n = kc_owns ? kc_uds_n : kp_uds_n;
    k_bus_lds_n = kc_owns ? kc_lds_n : kp_lds_n;
    k_bus_rw    = kc_owns ? kc_rw    : kp_rw;
    k_bus_bgack_n = kp_bgack_n;
    if (k_td_oe)                                    k_bus_d = k_td_out;
    else if (!k_mem_n && k_bus_rw && !k_bus_as_n)   k_bus_d = k_mem_d;
    else if (kc_owns && !kc_rw)                     k_bus_d = kc_d_out;
    else                                            k_bus_d = 16'hFFFF;
    kc_d_in    = k_bus_d;
    kc_br_n    = kp_br_n;
    kc_dtack_n = kt_dtack_n & kp_twait_n & kp_dtack_n;
    kc_berr_n  = kt_berr_n;
    kc_vpa_n   = kt_vpa_n & kd_vpadrv_n;
    kc_halt_n  = kp_halt_n;
    kc_reset_n = kp_reset_n;
  end

  eib u_eib_k (
    .clk(clk16), .rst_n, .base_sw(k_base_sw), .dly_sw(k_dly_sw),
    .ma, .mas_n, .muds_n, .mlds_n, .mrw, .md_wr,
    .md_rd(k_md_rd), .md_oe(k_md_oe), .mdtack_n(k_dtack_n), .mvpa_n(k_vpa_n),
    .mirq_n(k_irq_n), .iain_n(z_iaout_n), .iaout_n,
    .pia_cs_n(k_pia_cs_n), .pia_ca1_n(k_pia_ca1_n), .pia_cb1_n(k_pia_cb1_n),
    .pia_irqa_n(k_pia_irqa_n), .pia_irqb_n(k_pia_irqb_n), .pa(k_pa),
    .mtr_n(k_mtr_n), .mtior_n(k_mtior_n), .vecl_n(k_vecl_n), .ebal_n(k_ebal_n),
    .mtmra_n(k_mtmra_n), .relwait_n(k_relwait_n), .tsmr_n(k_tsmr_n), .tsmra_n(k_tsmra_n),
    .ta_in({k_bus_a, 1'b0}), .tstb_n(k_bus_as_n),
    .tuds_n(k_bus_uds_n), .tlds_n(k_bus_lds_n),
    .trw(k_bus_rw), .td_in(k_bus_d),
    .ta_out(k_ta_out), .ta_oe(k_ta_oe), .td_out(k_td_out), .td_oe(k_td_oe),
    .tubr_n(k_tubr_n), .tlbr_n(k_tlbr_n)
  );

  m68k_pmc u_pmc_k (
    .clk(clk8), .rst_n,
    .mtr_n(k_mtr_n), .mrw, .mas_n, .muds_n, .mlds_n, .mdtack_n, .ebal_n(k_ebal_n), .pd(md_wr[7:0]),
    .tsmr_n(k_tsmr_n), .tsmra_n(k_tsmra_n), .pa(k_pa),
    .mtmra_n(k_mtmra_n), .relwait_n(k_relwait_n), .pb(k_pb),
    .tbg_n(kc_bg_n), .tas_n(k_bus_as_n), .tdtack_n(kc_dtack_n), .tbgack_in_n(1'b1),
    .trw(k_bus_rw), .tintack_n(kc_intack_n),
    .bus_int_n(kp_int_n), .bus_halt_n(kc_halt_n), .bus_reset_n(kc_reset_n),
    .tbr_n(kp_br_n), .tbgack_n(kp_bgack_n), .twait_n(kp_twait_n),
    .tint_n(kp_int_n), .vecen_n(k_vecen_n), .thalt_n(kp_halt_n), .treset_n(kp_reset_n),
    .ta_hi(kp_ta_hi), .strb_oe(kp_strb_oe), .t_rw(kp_rw), .t_as_n(kp_as_n),
    .t_uds_n(kp_uds_n), .t_lds_n(kp_lds_n), .t_dtack_n(kp_dtack_n)
  );

  m68k_target_decode u_kdec (
    .a(k_bus_a), .as_n(k_bus_as_n), .sw_ram8k(k_sw_ram8k), .sw_rom8k(k_sw_rom8k),
    .sw_swap(k_sw_swap), .mem_n(k_mem_n), .ram_ce_n(k_ram_ce_n), .rom_ce_n(k_rom_ce_n),
    .dev_n(k_io_ce_n), .iopage_n(k_iopage_n), .m6800_n(k_m6800_n), .vpadrv_n(kd_vpadrv_n)
  );

  m68k_target_dtack u_kdtack (
    .clk(clk8), .rst_n, .uds_n(k_bus_uds_n), .lds_n(k_bus_lds_n), .mem_n(k_mem_n),
    .bus_dtack_n(kc_dtack_n), .lk_dtack(k_lk_dtack), .lk_berr(k_lk_berr),
    .dtack_n(kt_dtack_n), .berr_n(kt_berr_n)
  );

  m68k_target_irq u_kirq (
    .src_n({k_dev_irq_n, kp_int_n}), .intack_n(kc_intack_n), .a(k_bus_a[3:1]),
    .ipl_n(kc_ipl_n), .vpa_n(kt_vpa_n), .inton_n(k_inton_n)
  );

  // =====================================================================
  // Master bus
  // =====================================================================
  always_comb begin
    md_oe    = z_md_oe | k_md_oe;
    md_rd    = z_md_oe ? z_md_rd : (k_md_oe ? k_md_rd : 16'hFFFF);
    mdtack_n = z_dtack_n & k_dtack_n;
    mvpa_n   = z_vpa_n & k_vpa_n;
    mirq_n   = z_irq_n & k_irq_n;
  end

endmodule
