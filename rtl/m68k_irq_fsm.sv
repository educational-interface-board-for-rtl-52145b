// m68k_irq_fsm: master control of an MC68000 target's INT, HALT and RESET.
//
// The master writes a command on PIA port A bits 6 and 5, numbered like
// the Z80 card's command table: 00 home state, 01 interrupt, 10 halt,
// 11 reset. An interrupt command asserts TINT until the target starts its
// interrupt acknowledge cycle (TINTACK); during that cycle VECEN releases
// the vector supplied for the target. The request is then spent: a new
// interrupt needs the command to leave 01 and return. Halt asserts THALT;
// reset asserts TRESET together with THALT, which a 68000 needs for an
// external reset. Both last as long as the command is held.
//
// Timing: PA5, PA6 and TINTACK are registered on the rising edge of the
// 8 MHz clock, so every output follows its cause by one clock. The
// inputs, outputs and registered structure follow the original card;
// the command codes and asserting THALT with TRESET are choices of this
// design.
module m68k_irq_fsm (
  input  logic clk,        // 8 MHz
  input  logic rst_n,
  input  logic pa5,
  input  logic pa6,
  input  logic tintack_n,  // target interrupt acknowledge
  output logic tint_n,
  output logic vecen_n,
  output logic thalt_n,
  output logic treset_n
);

  typedef enum logic [1:0] {IQ_HOME, IQ_REQ, IQ_ACK, IQ_SPENT} iq_state_e;
  iq_state_e  state;
  logic [1:0] cmd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IQ_HOME;
      cmd   <= 2'b00;
    end else begin
      cmd <= {pa6, pa5};
      unique case (state)
        IQ_HOME:  if ({pa6, pa5} == 2'b01) state <= IQ_REQ;
        IQ_REQ: begin
          if ({pa6, pa5} != 2'b01) state <= IQ_HOME;
          else if (!tintack_n)     state <= IQ_ACK;
        end
        IQ_ACK:   if (tintack_n) state <= IQ_SPENT;
        IQ_SPENT: if ({pa6, pa5} != 2'b01) state <= IQ_HOME;
        default:  state <= IQ_HOME;
      endcase
    end
  end

  assign tint_n   = (state != IQ_REQ);
  assign vecen_n  = (state != IQ_ACK);
  assign thalt_n  = !(cmd == 2'b10 || cmd == 2'b11);
  assign treset_n = !(cmd == 2'b11);

endmodule
