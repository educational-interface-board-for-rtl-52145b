// m68k_target_irq: interrupt encoding and autovector decode of the MC68000 target.
//
// Encoding: ten interrupt sources (active low) are jumpered by a link
// array onto the eight inputs of a priority encoder; input 0 is tied
// active, so the encoder always reports the highest active input. Its
// three inverted outputs A0, A1, A2 drive IPL2, IPL1, IPL0 respectively,
// as on the board. The master interface's line (J1C2) is linked to input
// 7 so that it is a level-7, non-maskable interrupt.
//
// Acknowledge: in an interrupt acknowledge cycle (INTACK) the processor
// puts the level being served on A3..A1. A 3-to-8 decoder turns it into
// one of eight lines; a second link array routes each level either to
// 6800IRQ, which asserts VPA so the processor takes an autovector (for
// M6800 peripherals that supply no vector), or to INTON, which enables the
// on-board vectored devices. Combinational.
//
// The encoder, its IPL wiring, the level-7 master line and the decode
// follow the original board. The link settings are parameters whose
// defaults are choices of this design.
module m68k_target_irq #(
  // encoder input (0 = not linked) for sources
  // 0 master NMI (J1C2), 1 ACIA1, 2 ACIA2, 3 PI/T1a, 4 PI/T1b,
  // 5 PI/T2a, 6 PI/T2b, 7 PTM, 8 INT1 (J2C2), 9 INT2 (J2C3)
  parameter logic [29:0] LINK = {3'd2, 3'd1, 3'd5, 3'd3, 3'd3, 3'd4, 3'd4, 3'd6, 3'd6, 3'd7},
  // processor levels (bit n = level n) that are autovectored
  parameter logic [7:0]  AVEC_LEVELS = 8'b1110_0000,
  // processor levels served by on-board vectored devices
  parameter logic [7:0]  VEC_LEVELS  = 8'b0001_1110
) (
  input  logic [9:0] src_n,
  input  logic       intack_n,
  input  logic [3:1] a,
  output logic [2:0] ipl_n,       // IPL2..IPL0 to the processor
  output logic       vpa_n,       // 6800IRQ: autovector request
  output logic       inton_n      // on-board vectored devices enabled
);

  logic [7:0] enc_in;             // active-high encoder inputs
  logic [2:0] idx;
  logic [7:0] lvl;

  always_comb begin
    enc_in = 8'b0000_0001;
    for (int s = 0; s < 10; s++) begin
      if (!src_n[s] && LINK[3*s +: 3] != 3'd0) enc_in[LINK[3*s +: 3]] = 1'b1;
    end
    idx = 3'd0;
    for (int i = 1; i < 8; i++) begin
      if (enc_in[i]) idx = 3'(i);
    end
    // encoder outputs are ~idx; A0 -> IPL2, A1 -> IPL1, A2 -> IPL0
    ipl_n[2] = !idx[0];
    ipl_n[1] = !idx[1];
    ipl_n[0] = !idx[2];

    lvl     = intack_n ? 8'h00 : (8'h01 << a);
    vpa_n   = !(|(lvl & AVEC_LEVELS));
    inton_n = !(|(lvl & VEC_LEVELS));
  end

endmodule
