// z80_target_decode: memory, I/O and buffer decode of the Z80 target board.
//
// Memory: the board has four RAM sockets (2K or 8K devices) and four
// EPROM sockets (2K, 4K or 8K devices), up to 32 KB of each, decoded in
// 2K pages from A15..A11. Size switches S0..S2 give the device sizes:
// S0 = 0 for 2K RAM, 1 for 8K RAM; S2,S1 = 00 for 2K EPROM, 01 for 4K,
// 1x for 8K. RAM socket i starts at i * RAM size, EPROM socket i at
// 8000h + i * EPROM size. Swap switch S(3+i) exchanges the address ranges
// of RAM socket i and EPROM socket i, which puts an EPROM at the reset
// vector (0000h) for stand-alone running. The 2K area F800h-FFFFh belongs
// to the shared memory and is never decoded on board. MEM is asserted for
// any on-board memory cycle.
//
// I/O (IORQ without M1, port address A7..A0), four ports each:
//   90h CTC1, 94h DART, 98h PIO1, 9Ch PIO2, A0h CTC2,
//   A4h LEDs (write only, 8-bit latch), A8h DIL switch (read only).
//
// Buffers: the CPU-side buffers are enabled unless BUSACK is asserted; the
// CPU data buffer points toward the CPU (dbuf = 1) for reads and for the
// interrupt acknowledge cycle (M1 with IORQ). The memory-side data buffer
// is enabled (mem_en) for every memory or I/O read or write cycle, not for
// refresh or interrupt acknowledge, and points toward the devices (dir = 1)
// for writes.
//
// Timing: decodes are combinational; the LED latch loads on the rising
// clock edge during an I/O write to its ports. The I/O map, the socket
// counts and sizes, the 2K page decode, the swap switches, the shared
// area and the buffer rules follow the original board. The switch
// encodings and the socket address layout are choices of this design, as
// the board's PROM contents are not known.
module z80_target_decode (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [15:0] a,
  input  logic [7:0] d_in,
  input  logic       mreq_n,
  input  logic       iorq_n,
  input  logic       rd_n,
  input  logic       wr_n,
  input  logic       m1_n,
  input  logic       busack_n,
  input  logic [2:0] sw_size,     // S0..S2
  input  logic [3:0] sw_swap,     // S3..S6
  input  logic [7:0] dil,
  output logic [3:0] ram_ce_n,
  output logic [3:0] rom_ce_n,
  output logic       mem_n,
  output logic       ctc1_n,
  output logic       dart_n,
  output logic       pio1_n,
  output logic       pio2_n,
  output logic       ctc2_n,
  output logic [7:0] led,
  output logic [7:0] d_out,
  output logic       d_oe,
  output logic       cpu_buf_en,
  output logic       dbuf,
  output logic       mem_en,
  output logic       dir
);

  logic [4:0] page;          // 2K page number, A15..A11
  logic [4:0] ram_pages;     // pages per RAM device: 1 or 4
  logic [4:0] rom_pages;     // pages per EPROM device: 1, 2 or 4
  logic [3:0] ram_hit, rom_hit;
  logic       io, io_sel;
  logic [2:0] io_dev;

  always_comb begin
    page      = a[15:11];
    ram_pages = sw_size[0] ? 5'd4 : 5'd1;
    unique case (sw_size[2:1])
      2'b00:   rom_pages = 5'd1;
      2'b01:   rom_pages = 5'd2;
      default: rom_pages = 5'd4;
    endcase
    for (int i = 0; i < 4; i++) begin
      ram_hit[i] = ({1'b0, page} >= 6'(i) * {1'b0, ram_pages}) &&
                   ({1'b0, page} <  6'(i + 1) * {1'b0, ram_pages});
      rom_hit[i] = ({1'b0, page} >= 6'd16 + 6'(i) * {1'b0, rom_pages}) &&
                   ({1'b0, page} <  6'd16 + 6'(i + 1) * {1'b0, rom_pages});
    end
    ram_ce_n = 4'hF;
    rom_ce_n = 4'hF;
    if (!mreq_n && page != 5'd31) begin
      for (int i = 0; i < 4; i++) begin
        if (sw_swap[i]) begin
          ram_ce_n[i] = !rom_hit[i];
          rom_ce_n[i] = !ram_hit[i];
        end else begin
          ram_ce_n[i] = !ram_hit[i];
          rom_ce_n[i] = !rom_hit[i];
        end
      end
    end

    io     = !iorq_n && m1_n;
    io_sel = io && (a[7:0] >= 8'h90) && (a[7:0] <= 8'hAB);
    io_dev = 3'(8'(a[7:0] - 8'h90) >> 2);
    ctc1_n = !(io_sel && io_dev == 3'd0);
    dart_n = !(io_sel && io_dev == 3'd1);
    pio1_n = !(io_sel && io_dev == 3'd2);
    pio2_n = !(io_sel && io_dev == 3'd3);
    ctc2_n = !(io_sel && io_dev == 3'd4);
    d_oe   = io_sel && io_dev == 3'd6 && !rd_n;
    d_out  = dil;

    mem_n      = (&ram_ce_n) && (&rom_ce_n);
    mem_en     = (!mreq_n || io) && (!rd_n || !wr_n);
    dir        = !wr_n;
    cpu_buf_en = busack_n;
    dbuf       = !rd_n || (!m1_n && !iorq_n);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  led <= 8'h00;
    else if (io_sel && io_dev == 3'd5 && !wr_n)  led <= d_in;
  end

endmodule
