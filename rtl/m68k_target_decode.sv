// m68k_target_decode: memory and I/O decode of the MC68000 target board.
//
// Memory: four pairs of RAM sockets and four pairs of EPROM sockets. Each
// pair is an upper-byte and a lower-byte device, so a pair holds 4 KB
// with 2K devices or 16 KB with 8K devices. Switch S18 gives the RAM
// device size and S19 the EPROM device size (0 = 2K, 1 = 8K). RAM pair i
// starts at i * pair size from 000000h, so the RAM ends below 010000h.
// EPROM pair i starts at 020000h + i * pair size. The 4 KB shared-memory
// area at 010000h-010FFFh therefore never reaches on-board memory.
// Swap switch S20 exchanges the address ranges of RAM pair 0 and EPROM
// pair 0, which puts the EPROM on the reset vector for stand-alone
// running. S21 does the same for pair 1, so a program of up to two EPROM
// pairs can sit at the bottom of memory. MEM is asserted for any on-board
// memory address. The pair selects are qualified by AS; the board takes
// the upper and lower device of a pair from UDS and LDS.
//
// I/O: a 4 KB page at 080000h-080FFFh. Its lower half (A11 = 0) is for
// MC68000-type devices and asserts IOPAGE; its upper half (A11 = 1) is for
// M6800-type devices, asserts M6800 and, with AS, VPADRIVE, which pulls
// VPA so that the processor runs an M6800 synchronous cycle. A11..A9 are
// decoded into eight 512-byte device selects, qualified by AS:
//   0 PI/T1, 1 PI/T2, 2 LEDs, 3 DIL switches (68000-type half),
//   4 ACIA1, 5 ACIA2, 6 and 7 free (6800-type half).
//
// Timing: combinational. The device counts and sizes, the size and swap
// switches, the reserved shared area, selection in byte pairs, MEM, the
// I/O page at 080000h and the IOPAGE, M6800 and VPADRIVE outputs follow
// the original board. The exact address layout of the sockets and of the
// I/O devices, and the role of each swap switch, are choices of this
// design, as the original maps are not known. The board's DTACK circuit
// serves memory only; LED and switch cycles are not acknowledged here.
module m68k_target_decode (
  input  logic [23:1] a,
  input  logic        as_n,
  input  logic        sw_ram8k,      // S18: RAM device size, 1 = 8K
  input  logic        sw_rom8k,      // S19: EPROM device size, 1 = 8K
  input  logic [1:0]  sw_swap,       // S21, S20: swap RAM/EPROM pair 1, pair 0
  output logic        mem_n,         // on-board memory addressed
  output logic [3:0]  ram_ce_n,      // RAM pair selects
  output logic [3:0]  rom_ce_n,      // EPROM pair selects
  output logic [7:0]  dev_n,         // I/O device selects
  output logic        iopage_n,      // 68000-type I/O half
  output logic        m6800_n,       // 6800-type I/O half
  output logic        vpadrv_n       // VPA for 6800-type devices
);

  localparam logic [23:0] ROM_BASE = 24'h020000;
  localparam logic [11:0] IO_PAGE  = 12'h080;   // A23..A12

  logic [23:0] addr;
  logic [23:0] ram_size, rom_size;               // bytes per pair
  logic [3:0]  ram_rng, rom_rng;                 // address in pair i's range
  logic [3:0]  ram_hit, rom_hit;
  logic        io;

  assign addr     = {a, 1'b0};
  assign ram_size = sw_ram8k ? 24'h4000 : 24'h1000;
  assign rom_size = sw_rom8k ? 24'h4000 : 24'h1000;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      ram_rng[i] = (addr >= 24'(i) * ram_size) && (addr < 24'(i + 1) * ram_size);
      rom_rng[i] = (addr >= ROM_BASE + 24'(i) * rom_size) &&
                   (addr <  ROM_BASE + 24'(i + 1) * rom_size);
    end
    ram_hit = ram_rng;
    rom_hit = rom_rng;
    for (int i = 0; i < 2; i++) begin
      if (sw_swap[i]) begin
        ram_hit[i] = rom_rng[i];
        rom_hit[i] = ram_rng[i];
      end
    end
    mem_n    = !(|ram_hit || |rom_hit);
    ram_ce_n = as_n ? 4'hF : ~ram_hit;
    rom_ce_n = as_n ? 4'hF : ~rom_hit;

    io       = (a[23:12] == IO_PAGE);
    iopage_n = !(io && !a[11]);
    m6800_n  = !(io && a[11]);
    vpadrv_n = !(io && a[11] && !as_n);
    dev_n    = '1;
    if (io && !as_n) dev_n[a[11:9]] = 1'b0;
  end

endmodule
