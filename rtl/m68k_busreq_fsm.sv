// m68k_busreq_fsm: master-to-MC68000-target bus arbitration on the 68000 card.
//
// A master target request (MTR) asserts the target's bus request BR. The
// target answers with BG once it will give up the bus at the end of its
// current cycle. The card takes the bus, by asserting BGACK, as soon as
// BG is asserted and the bus is quiet: AS, DTACK and BGACK (of any other
// master) negated. With BGACK asserted BR is withdrawn, as the 68000
// protocol requires. BGACK, which the interface also uses as MTMRA, is held
// until the master ends its cycle and drops MTR.
//
// Timing: inputs are sampled on the rising edge of the 8 MHz clock; BR
// follows MTR by one clock and BGACK follows the first clock edge that
// sees BG with the bus quiet. The inputs watched and the outputs follow the
// original card; dropping BR when BGACK is asserted and holding BGACK until
// MTR ends are choices of this design.
module m68k_busreq_fsm (
  input  logic clk,          // 8 MHz
  input  logic rst_n,
  input  logic mtr_n,        // master target request
  input  logic tbg_n,        // target bus grant
  input  logic tas_n,        // target address strobe (bus)
  input  logic tdtack_n,     // target DTACK (bus)
  input  logic tbgack_in_n,  // BGACK of any other bus master
  output logic tbr_n,        // target bus request
  output logic tbgack_n      // bus grant acknowledge, also MTMRA
);

  typedef enum logic [1:0] {BG_IDLE, BG_REQ, BG_OWN} bg_state_e;
  bg_state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= BG_IDLE;
    else begin
      unique case (state)
        BG_IDLE: if (!mtr_n) state <= BG_REQ;
        BG_REQ: begin
          if (mtr_n) state <= BG_IDLE;
          else if (!tbg_n && tas_n && tdtack_n && tbgack_in_n) state <= BG_OWN;
        end
        BG_OWN:  if (mtr_n) state <= BG_IDLE;
        default: state <= BG_IDLE;
      endcase
    end
  end

  assign tbr_n    = (state != BG_REQ);
  assign tbgack_n = (state != BG_OWN);

endmodule
